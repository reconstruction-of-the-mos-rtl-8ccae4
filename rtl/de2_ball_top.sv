// de2_ball_top: the 6502 system for the DE2 board running the
// bouncing-ball program.
//
// The processor core runs from program memory that reset fills with the
// ball program. Its registers are brought out for monitoring: A, X and Y as
// two hexadecimal digits each on six seven-segment displays (hex[5:4] = A,
// hex[3:2] = X, hex[1:0] = Y, most significant digit first) and the status
// flags N V - B D I Z C on eight LEDs. With 'slow' high the processor
// advances one cycle per clock_divider tick, so a person can follow the
// registers; with 'slow' low it runs one cycle per clock. 'ball_x' and
// 'ball_y' are the ball position (the X and Y registers) for a display
// unit outside this design. 'rst_n' is an active-low push button,
// synchronised here. Reset restarts the program and reloads memory.
// Showing A, X, Y and the flags and a slow debug clock follow the
// original board setup; the digit assignment, the divider ratio, the
// cycle-enable form of the slow clock and the reset synchroniser are this
// design's choices.
module de2_ball_top #(
  parameter int unsigned SLOW_DIV = 2_500_000,
  parameter int          MEM_DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        slow,
  output logic [6:0]  hex [6],
  output logic [7:0]  ledr,
  output logic [7:0]  ball_x,
  output logic [7:0]  ball_y,
  output logic [15:0] pc
);
  logic        rst_meta, rst;
  logic        tick, rdy;
  logic [15:0] addr;
  logic [7:0]  din, dout, ra, rx, ry, rs, rp, rir;
  logic        rw, sync;

  always_ff @(posedge clk) begin
    rst_meta <= !rst_n;
    rst      <= rst_meta;
  end

  clock_divider #(.DIV(SLOW_DIV)) u_div (.clk(clk), .rst(rst), .tick(tick));

  assign rdy = slow ? tick : 1'b1;

  cpu6502 #(.RESET_PC(16'h0000)) u_cpu (
    .clk(clk), .rst(rst), .rdy(rdy), .data_in(din), .addr(addr), .data_out(dout),
    .rw(rw), .sync(sync), .reg_a(ra), .reg_x(rx), .reg_y(ry), .reg_s(rs),
    .reg_p(rp), .reg_pc(pc), .reg_ir(rir)
  );

  ball_memory #(.DEPTH(MEM_DEPTH)) u_mem (
    .clk(clk), .rst(rst), .addr(addr), .we(!rw && rdy), .wdata(dout), .rdata(din)
  );

  hex7seg u_h5 (.digit(ra[7:4]), .seg_n(hex[5]));
  hex7seg u_h4 (.digit(ra[3:0]), .seg_n(hex[4]));
  hex7seg u_h3 (.digit(rx[7:4]), .seg_n(hex[3]));
  hex7seg u_h2 (.digit(rx[3:0]), .seg_n(hex[2]));
  hex7seg u_h1 (.digit(ry[7:4]), .seg_n(hex[1]));
  hex7seg u_h0 (.digit(ry[3:0]), .seg_n(hex[0]));

  assign ledr   = rp;
  assign ball_x = rx;
  assign ball_y = ry;
endmodule
