// tb_timing_generator: drives the timing generator with opcode classes and
// condition inputs and checks the T-state sequence: normal instructions
// last cycle# cycles, RMW marks SD1/SD2 on its last two cycles, an indexed
// read ends a cycle early without ACR, a branch takes 2, 3 or 4 cycles
// depending on BRC and the page crossing, and SYNC returns after each.
module tb_timing_generator;
  import cpu_pkg::*;
  logic       clk = 1'b0, rst, ce;
  logic [2:0] cyc_in;
  kind_t      kind_in;
  logic       brc, acr, pgx;
  tstate_t    ts;
  logic       sync;
  int checks = 0, failures = 0;

  timing_generator dut (.clk(clk), .rst(rst), .ce(ce), .cycle_num(cyc_in), .kind_in(kind_in),
                        .brc(brc), .acr(acr), .page_cross(pgx), .ts(ts), .sync(sync));
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0d)", what, ts.t); end
  endtask

  // Runs one instruction from its SYNC cycle; returns its length.
  task automatic run(input logic [2:0] n, input kind_t k, input logic b, input logic a,
                     input logic p, output int len, output int sd1_at, output int sd2_at);
    len = 0; sd1_at = 0; sd2_at = 0;
    check(sync && ts.t == 3'd1, "SYNC at start");
    cyc_in = n; kind_in = k; brc = b; acr = a; pgx = p;
    do begin
      len++;
      @(negedge clk);
      if (ts.sd1) sd1_at = len + 1;
      if (ts.sd2) sd2_at = len + 1;
    end while (!sync && len < 10);
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len, s1, s2;
    rst = 1; ce = 1; cyc_in = 2; kind_in = K_NORMAL; brc = 0; acr = 0; pgx = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    @(negedge clk);
    for (int n = 2; n <= 7; n++) begin
      run(3'(n), K_NORMAL, 0, 0, 0, len, s1, s2);
      check(len == n, $sformatf("normal length %0d got %0d", n, len));
    end
    for (int n = 5; n <= 7; n++) begin
      run(3'(n), K_RMW, 0, 0, 0, len, s1, s2);
      check(len == n && s1 == n - 1 && s2 == n,
            $sformatf("rmw %0d: len %0d sd1 %0d sd2 %0d", n, len, s1, s2));
    end
    run(3'd5, K_IDXREAD, 0, 0, 0, len, s1, s2); check(len == 4, "indexed read, no carry");
    run(3'd5, K_IDXREAD, 0, 1, 0, len, s1, s2); check(len == 5, "indexed read, carry");
    run(3'd6, K_IDXREAD, 0, 0, 0, len, s1, s2); check(len == 5, "(zp),Y read, no carry");
    run(3'd4, K_BRANCH, 0, 0, 0, len, s1, s2);  check(len == 2, "branch not taken");
    run(3'd4, K_BRANCH, 1, 0, 0, len, s1, s2);  check(len == 3, "branch taken");
    run(3'd4, K_BRANCH, 1, 0, 1, len, s1, s2);  check(len == 4, "branch taken, page crossed");
    // ce low freezes the state
    ce = 0; cyc_in = 3'd3; kind_in = K_NORMAL;
    repeat (3) @(negedge clk);
    check(ts.t == 3'd1 && sync, "frozen while ce is low");
    ce = 1;
    @(negedge clk);
    check(ts.t == 3'd2, "advances again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
