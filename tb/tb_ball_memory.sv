// tb_ball_memory: checks that reset loads the ball program image (bytes
// taken from the published listing and typed in here), that reads are
// asynchronous, that writes land and mirror across the address space, and
// that a second reset restores the image.
module tb_ball_memory;
  logic        clk = 1'b0, rst, we;
  logic [15:0] addr;
  logic [7:0]  wd, rd;
  logic [7:0]  shadow [256];
  int checks = 0, failures = 0;

  ball_memory dut (.clk(clk), .rst(rst), .addr(addr), .we(we), .wdata(wd), .rdata(rd));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_image();
    // spot checks: init, block entries, jumps, tail
    logic [15:0] a [10] = '{16'h0000, 16'h0005, 16'h000A, 16'h0018, 16'h002A,
                            16'h003F, 16'h0040, 16'h0068, 16'h006D, 16'h0070};
    logic [7:0]  v [10] = '{8'hA2, 8'hFF, 8'hDF, 8'hAD, 8'hE8, 8'hD0, 8'h27, 8'h4C, 8'h00, 8'h00};
    for (int k = 0; k < 10; k++) begin
      addr = a[k]; #1;
      checks++;
      if (rd !== v[k]) begin
        failures++;
        $display("FAIL image at %h: %h want %h", a[k], rd, v[k]);
      end
    end
  endtask

  initial begin
    rst = 1; we = 0; addr = 0; wd = 0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    check_image();
    for (int k = 0; k < 256; k++) begin addr = 16'(k); #1; shadow[k] = rd; end
    for (int k = 0; k < 600; k++) begin
      @(negedge clk);
      addr = 16'($urandom); we = 1'($urandom); wd = 8'($urandom);
      #1;
      checks++;
      if (rd !== shadow[addr[7:0]]) failures++;
      @(posedge clk); #1;
      if (we) shadow[addr[7:0]] = wd;
    end
    @(negedge clk); we = 0; rst = 1;
    @(posedge clk); #1 rst = 0;
    check_image();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
