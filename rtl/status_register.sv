// status_register: the processor status flags N V - B D I Z C and the
// branch condition.
//
// Each flag has its own small set of sources, named as in the original
// chip: C from the ALU carry (ACR) or IR bit 5 (CLC/SEC), Z from a zero
// test of SB, N from SB bit 7 or DB bit 7, V from the ALU overflow (AVR),
// DB bit 6 (BIT) or cleared (CLV), I and D from IR bit 5, I set on BRK,
// and all flags at once from DB (PLP, RTI). 'p' is the byte pushed by PHP
// and BRK: bits 5 and 4 (B) read as 1. 'brc' is the branch condition of
// the branch opcode in 'ir': IR[7:6] picks N, V, C or Z and IR[5] the
// value that takes the branch. Flags change at the clock edge.
module status_register
  import cpu_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic [7:0] ir,
  input  logic [7:0] sb,
  input  logic [7:0] db,
  input  logic       acr,
  input  logic       avr,
  input  n_src_t     n_src,
  input  logic       z_sb,
  input  c_src_t     c_src,
  input  v_src_t     v_src,
  input  i_src_t     i_src,
  input  logic       d_ir5,
  input  logic       p_db,
  output logic [7:0] p,
  output logic       flag_c,
  output logic       flag_d,
  output logic       brc
);
  logic n, v, d, i, z, c;

  always_ff @(posedge clk) begin
    if (rst) begin
      {n, v, d, z, c} <= '0;
      i <= 1'b1;
    end else if (ce) begin
      if (p_db) begin
        {n, v} <= db[7:6];
        {d, i, z, c} <= db[3:0];
      end else begin
        unique case (n_src)
          FN_SB:   n <= sb[7];
          FN_DB:   n <= db[7];
          default: ;
        endcase
        if (z_sb) z <= (sb == 8'h00);
        unique case (c_src)
          FC_ACR:  c <= acr;
          FC_IR5:  c <= ir[5];
          default: ;
        endcase
        unique case (v_src)
          FV_AVR:  v <= avr;
          FV_CLR:  v <= 1'b0;
          FV_DB6:  v <= db[6];
          default: ;
        endcase
        unique case (i_src)
          FI_IR5:  i <= ir[5];
          FI_SET:  i <= 1'b1;
          default: ;
        endcase
        if (d_ir5) d <= ir[5];
      end
    end
  end

  always_comb begin
    p      = {n, v, 1'b1, 1'b1, d, i, z, c};
    flag_c = c;
    flag_d = d;
    unique case (ir[7:6])
      2'b00:   brc = (n == ir[5]);
      2'b01:   brc = (v == ir[5]);
      2'b10:   brc = (c == ir[5]);
      default: brc = (z == ir[5]);
    endcase
  end
endmodule
