// clock_divider: produces a one-clock enable pulse every DIV clocks, used
// to run the processor slowly enough to follow on the board's displays.
//
// 'tick' is high for one clock in every DIV; the counter restarts on reset.
// Running the logic from the fast clock with an enable, rather than
// generating a slow clock, keeps the design on a single clock. DIV is this
// design's choice: 2 500 000 gives 20 processor cycles per second from the
// 50 MHz board clock.
module clock_divider #(
  parameter int unsigned DIV = 2_500_000
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  localparam int CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
