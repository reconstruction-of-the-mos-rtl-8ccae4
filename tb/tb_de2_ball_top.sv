// tb_de2_ball_top: end-to-end test of the board system at its default
// parameters, running the bouncing-ball program from reset.
//
// A reference model of the ball (X and Y each step by one, reversing at 0
// and at the sizes FFh / DFh the program stores) predicts every change of
// the ball_x / ball_y outputs. The run goes through full X and Y bounces at
// full speed. The tail of the X loop (the JMP at 006Bh) is then patched to
// pass through an INC of a counter at 0090h, which exercises the
// read-modify-write cycles; the counter must equal the number of X steps
// that were not at an end. Slow mode is then switched on with the default
// divider and the core must advance exactly once per tick. Finally a
// second reset must restart the program and reload the memory image.
// The seven-segment and LED outputs are checked against the registers.
// Each mechanism (branch taken / not taken, RMW, slow-mode stall, memory
// write, X and Y reversal at both ends, reset reload) is counted and must
// occur at least once.
module tb_de2_ball_top;
  import cpu_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n, slow;
  logic [6:0]  hex [6];
  logic [7:0]  ledr, ball_x, ball_y;
  logic [15:0] pc;
  int          checks = 0, failures = 0;

  de2_ball_top dut (
    .clk(clk), .rst_n(rst_n), .slow(slow), .hex(hex), .ledr(ledr),
    .ball_x(ball_x), .ball_y(ball_y), .pc(pc)
  );

  always #5 clk = ~clk;

  // reference seven-segment code, active low, bit 0 = segment a
  function automatic logic [6:0] seg_ref(input logic [3:0] d);
    logic [15:0][6:0] t;
    t = {7'h71, 7'h79, 7'h5E, 7'h39, 7'h7C, 7'h77, 7'h6F, 7'h7F,
         7'h07, 7'h7D, 7'h6D, 7'h66, 7'h4F, 7'h5B, 7'h06, 7'h3F};
    return ~t[d];
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL: %s (x=%h y=%h pc=%h)", what, ball_x, ball_y, pc);
    end
  endtask

  // ---------------------------------------------------------- ball model
  logic [7:0] mx, my;
  logic       dx, dy;
  int n_br_taken, n_br_not, n_rmw, n_stall, n_write, n_xrev0, n_xrevmax, n_yrev0, n_yrevmax;
  int n_reload, n_xsteps_mid, n_xsteps, n_ysteps;
  logic [7:0] px, py;
  logic       track;

  always @(posedge clk) begin
    if (dut.rst) begin
      px <= 8'h00; py <= 8'h00;
    end else begin
      if (dut.rdy) begin
        if (dut.u_cpu.u_ir.inst.mode == M_REL && dut.u_cpu.ts.t == 3'd2)
          if (dut.u_cpu.ts.last) n_br_not++; else n_br_taken++;
        if (dut.u_cpu.ts.sd2) n_rmw++;
        if (!dut.rw) n_write++;
      end else n_stall++;
      px <= ball_x; py <= ball_y;
      if (track && ball_x != px) begin
        n_xsteps++;
        mx = dx ? mx + 8'd1 : mx - 8'd1;
        check(ball_x == mx, "X step follows the model");
        if (dx && mx == 8'hFF) begin dx = 1'b0; n_xrevmax++; end
        else if (!dx && mx == 8'h00) begin dx = 1'b1; n_xrev0++; end
        else n_xsteps_mid++;
      end
      if (track && ball_y != py) begin
        n_ysteps++;
        my = dy ? my + 8'd1 : my - 8'd1;
        check(ball_y == my, "Y step follows the model");
        if (dy && my == 8'hDF) begin dy = 1'b0; n_yrevmax++; end
        else if (!dy && my == 8'h00) begin dy = 1'b1; n_yrev0++; end
      end
    end
  end

  initial begin : watchdog
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mid_at_patch;
  int cyc_before;
  logic [15:0] pc0;

  initial begin
    {n_br_taken, n_br_not, n_rmw, n_stall, n_write} = '0;
    {n_xrev0, n_xrevmax, n_yrev0, n_yrevmax, n_reload, n_xsteps_mid, n_xsteps, n_ysteps} = '0;
    track = 1'b0;
    mx = 0; my = 0; dx = 1; dy = 1;
    rst_n = 1'b0; slow = 1'b0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    track = 1'b1;

    // full X bounce (0 -> FF -> 0) and a full Y bounce (0 -> DF -> 0)
    wait (n_yrev0 >= 1 && n_xrev0 >= 1);
    wait (pc == 16'h0019);  // opcode fetch of B1: both updates of the last pass done
    @(negedge clk);
    check(dut.u_mem.mem[8'h70] == 8'hFF && dut.u_mem.mem[8'h71] == 8'hDF, "sizes stored");
    check(dut.u_mem.mem[8'h72] == {7'd0, dx} && dut.u_mem.mem[8'h73] == {7'd0, dy},
          "direction variables match the model");
    for (int d = 0; d < 6; d++) begin
      logic [7:0] r;
      r = (d >= 4) ? dut.u_cpu.reg_a : (d >= 2) ? ball_x : ball_y;
      check(hex[d] == seg_ref((d % 2) ? r[7:4] : r[3:0]), "seven-segment digit");
    end
    check(ledr == dut.u_cpu.reg_p, "flag LEDs");

    // patch B12's JMP $0021 into JMP $0080: INC $90 ; JMP $0021
    dut.u_mem.mem[8'h90] = 8'h00;
    dut.u_mem.mem[8'h80] = 8'hE6; dut.u_mem.mem[8'h81] = 8'h90;
    dut.u_mem.mem[8'h82] = 8'h4C; dut.u_mem.mem[8'h83] = 8'h21; dut.u_mem.mem[8'h84] = 8'h00;
    // wait until the core is far from 006Bh, then redirect
    wait (pc == 16'h0019);
    mid_at_patch = n_xsteps_mid;
    dut.u_mem.mem[8'h6C] = 8'h80;
    dut.u_mem.mem[8'h6D] = 8'h00;
    repeat (20000) @(posedge clk);
    wait (pc == 16'h0019);
    @(negedge clk);
    check(n_xsteps_mid - mid_at_patch > 0, "X steps after the patch");
    check(dut.u_mem.mem[8'h90] == 8'(n_xsteps_mid - mid_at_patch),
          $sformatf("INC counter %0d vs %0d mid steps", dut.u_mem.mem[8'h90], n_xsteps_mid - mid_at_patch));

    // slow mode: one core cycle per SLOW_DIV clocks
    slow = 1'b1;
    @(posedge dut.tick);
    @(negedge clk);
    pc0 = pc;
    cyc_before = n_stall;
    for (int k = 0; k < 3; k++) @(posedge dut.tick);
    @(negedge clk);
    check(n_stall - cyc_before == 3 * (2_500_000 - 1) + 1 || n_stall - cyc_before == 3 * (2_500_000 - 1),
          $sformatf("stall cycles %0d", n_stall - cyc_before));
    slow = 1'b0;

    // second reset: program restarts, memory image restored
    track = 1'b0;
    rst_n = 1'b0;
    repeat (4) @(posedge clk);
    @(negedge clk);
    check(dut.u_mem.mem[8'h6C] == 8'h21 && dut.u_mem.mem[8'h80] == 8'h00, "memory image reloaded");
    if (dut.u_mem.mem[8'h6C] == 8'h21) n_reload++;
    check(pc == 16'h0000, "reset PC");
    rst_n = 1'b1;
    mx = 0; my = 0; dx = 1; dy = 1;
    @(posedge clk);
    track = 1'b1;
    wait (n_xsteps > 700);
    @(negedge clk);

    check(n_br_taken > 0,   $sformatf("branch taken %0d", n_br_taken));
    check(n_br_not > 0,     $sformatf("branch not taken %0d", n_br_not));
    check(n_rmw > 0,        $sformatf("read-modify-write %0d", n_rmw));
    check(n_stall > 0,      $sformatf("slow-mode stall cycles %0d", n_stall));
    check(n_write > 0,      $sformatf("memory writes %0d", n_write));
    check(n_xrev0 > 0 && n_xrevmax > 0, "X reverses at both ends");
    check(n_yrev0 > 0 && n_yrevmax > 0, "Y reverses at both ends");
    check(n_reload > 0,     "reset reload");
    $display("counts: taken %0d not-taken %0d rmw %0d stall %0d writes %0d xrev %0d/%0d yrev %0d/%0d xsteps %0d ysteps %0d",
             n_br_taken, n_br_not, n_rmw, n_stall, n_write, n_xrev0, n_xrevmax, n_yrev0, n_yrevmax,
             n_xsteps, n_ysteps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
