// tb_clock_divider: checks that the tick is one clock wide and comes every
// DIV clocks, for a small divider.
module tb_clock_divider;
  localparam int DIV = 7;
  logic clk = 1'b0, rst, tick;
  int checks = 0, failures = 0;

  clock_divider #(.DIV(DIV)) dut (.clk(clk), .rst(rst), .tick(tick));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_tick, n;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    last_tick = -1; n = 0;
    for (int cyc = 0; cyc < 200; cyc++) begin
      @(negedge clk);
      if (tick) begin
        if (last_tick >= 0) begin
          checks++;
          if (cyc - last_tick != DIV) begin
            failures++;
            $display("FAIL: ticks %0d apart", cyc - last_tick);
          end
        end
        last_tick = cyc;
        n++;
      end
    end
    checks++;
    if (n < 200 / DIV - 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
