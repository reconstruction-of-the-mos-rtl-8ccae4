// alu6502: the 8-bit arithmetic logic unit with decimal adjust.
//
// Combinational. Operations: SUMS (ai + bi + cin), ANDS, EORS, ORS and SRS
// (shift ai right, cin enters bit 7). 'acr' is the carry out (for SRS the
// bit shifted out), 'avr' the two's complement overflow of the sum, 'hc'
// the carry out of bit 3. With 'daa' set the sum is corrected to packed BCD
// (addition); with 'dsa' set it is corrected for a BCD subtraction whose
// subtrahend arrives inverted on bi. As on the NMOS part, avr is taken
// from the binary sum. The operation set and flag names follow the
// document's block diagram; the decimal correction scheme is the usual
// nibble-wise add-6 / subtract-6 and is this design's own.
module alu6502
  import cpu_pkg::*;
(
  input  logic [7:0] ai,
  input  logic [7:0] bi,
  input  logic       cin,
  input  alu_op_t    op,
  input  logic       daa,
  input  logic       dsa,
  output logic [7:0] result,
  output logic       acr,
  output logic       avr,
  output logic       hc
);
  logic [8:0] sum;
  logic [4:0] lo;
  logic [4:0] dlo;
  logic [4:0] dhi;
  logic       dc;

  // dsa: a nibble that borrowed (no carry out of it) reads 6 too high.

  always_comb begin
    sum = {1'b0, ai} + {1'b0, bi} + {8'd0, cin};
    lo  = {1'b0, ai[3:0]} + {1'b0, bi[3:0]} + {4'd0, cin};
    hc  = lo[4];
    avr = (ai[7] == bi[7]) && (sum[7] != ai[7]);
    dlo = 5'd0; dhi = 5'd0; dc = 1'b0;
    result = sum[7:0];
    acr    = 1'b0;
    unique case (op)
      ALU_SUM: begin
        result = sum[7:0];
        acr    = sum[8];
        if (daa) begin
          dlo = (lo > 5'd9) ? lo + 5'd6 : lo;
          dhi = {1'b0, ai[7:4]} + {1'b0, bi[7:4]} + {4'd0, dlo[4]};
          dc  = (dhi > 5'd9);
          if (dc) dhi = dhi + 5'd6;
          result = {dhi[3:0], dlo[3:0]};
          acr    = dc;
        end else if (dsa) begin
          result = sum[7:0] - (hc ? 8'h00 : 8'h06) - (sum[8] ? 8'h00 : 8'h60);
          acr    = sum[8];
        end
      end
      ALU_AND: result = ai & bi;
      ALU_EOR: result = ai ^ bi;
      ALU_OR:  result = ai | bi;
      default: begin
        result = {cin, ai[7:1]};
        acr    = ai[0];
      end
    endcase
  end
endmodule
