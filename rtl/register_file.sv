// register_file: the accumulator (AC), index registers X and Y and the
// stack pointer S.
//
// Each register loads from the special bus SB at the clock edge when its
// load strobe (SB/AC, SB/X, SB/Y, SB/S) is high and holds otherwise; all
// four are always readable. Loading only from SB follows the document's
// datapath figure. Reset clears AC, X and Y and sets S to 8'hFF, a
// choice of this design (the original part leaves them undefined).
module register_file (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic [7:0] sb,
  input  logic       ld_ac,
  input  logic       ld_x,
  input  logic       ld_y,
  input  logic       ld_s,
  output logic [7:0] ac,
  output logic [7:0] x,
  output logic [7:0] y,
  output logic [7:0] s
);
  always_ff @(posedge clk) begin
    if (rst) begin
      ac <= 8'h00;
      x  <= 8'h00;
      y  <= 8'h00;
      s  <= 8'hFF;
    end else if (ce) begin
      if (ld_ac) ac <= sb;
      if (ld_x)  x  <= sb;
      if (ld_y)  y  <= sb;
      if (ld_s)  s  <= sb;
    end
  end
endmodule
