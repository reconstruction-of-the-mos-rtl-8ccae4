// tb_register_file: random loads of A, X, Y and S from SB, checked against
// a copy of the four registers kept here; reset values and the cycle
// enable are checked too.
module tb_register_file;
  logic       clk = 1'b0, rst, ce;
  logic [7:0] sb, ac, x, y, s;
  logic       la, lx, ly, ls;
  logic [7:0] ea, ex, ey, es;
  int checks = 0, failures = 0;

  register_file dut (.clk(clk), .rst(rst), .ce(ce), .sb(sb), .ld_ac(la), .ld_x(lx),
                     .ld_y(ly), .ld_s(ls), .ac(ac), .x(x), .y(y), .s(s));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ce = 1; {la, lx, ly, ls} = '0; sb = 0;
    @(posedge clk); #1 rst = 0;
    {ea, ex, ey, es} = {8'h00, 8'h00, 8'h00, 8'hFF};
    checks++; if ({ac, x, y, s} !== {ea, ex, ey, es}) failures++;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      sb = 8'($urandom); {la, lx, ly, ls} = 4'($urandom); ce = ($urandom_range(4) != 0);
      @(posedge clk); #1;
      if (ce) begin
        if (la) ea = sb;
        if (lx) ex = sb;
        if (ly) ey = sb;
        if (ls) es = sb;
      end
      checks++;
      if ({ac, x, y, s} !== {ea, ex, ey, es}) begin
        failures++;
        if (failures < 5) $display("FAIL: %h %h %h %h want %h %h %h %h", ac, x, y, s, ea, ex, ey, es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
