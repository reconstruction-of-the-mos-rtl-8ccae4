// tb_instruction_register: checks that the IR resets to NOP, loads the
// opcode and its decoded form only when SYNC and the cycle enable are both
// high, and holds otherwise.
module tb_instruction_register;
  import cpu_pkg::*;
  logic       clk = 1'b0, rst, ce, sync;
  logic [7:0] din, opc;
  dec_t       din_dec, ir_dec;
  int checks = 0, failures = 0;

  instruction_register dut (.clk(clk), .rst(rst), .ce(ce), .sync(sync), .opcode_in(din),
                            .inst_in(din_dec), .opcode(opc), .inst(ir_dec));
  always #5 clk = ~clk;
  assign din_dec = decode_opcode(din);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] expv;
    rst = 1; ce = 1; sync = 0; din = 8'h00;
    @(posedge clk); #1 rst = 0;
    checks++; if (opc !== 8'hEA || ir_dec !== decode_opcode(8'hEA)) failures++;
    expv = 8'hEA;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      din = 8'($urandom); sync = 1'($urandom); ce = ($urandom_range(3) != 0);
      @(posedge clk); #1;
      if (sync && ce) expv = din;
      checks++;
      if (opc !== expv || ir_dec !== decode_opcode(expv)) begin
        failures++;
        if (failures < 5) $display("FAIL: ir %h want %h", opc, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
