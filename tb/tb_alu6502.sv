// tb_alu6502: exhaustive-in-part random check of the ALU against
// arithmetic written out here: binary sum with carry and overflow, the
// logic operations, shift right, and BCD add / subtract on valid BCD
// operands.
module tb_alu6502;
  import cpu_pkg::*;
  logic [7:0] ai, bi, result;
  logic       cin, daa, dsa, acr, avr, hc;
  alu_op_t    op;
  int checks = 0, failures = 0;

  alu6502 dut (.ai(ai), .bi(bi), .cin(cin), .op(op), .daa(daa), .dsa(dsa),
               .result(result), .acr(acr), .avr(avr), .hc(hc));

  task automatic expect_eq(input logic [7:0] r, input logic c, input string what);
    checks++;
    if (result !== r || acr !== c) begin
      failures++;
      if (failures < 10) $display("FAIL %s: ai=%h bi=%h cin=%b got %h/%b want %h/%b",
                                  what, ai, bi, cin, result, acr, r, c);
    end
  endtask

  function automatic int bcd2int(input logic [7:0] b);
    return int'(b[7:4]) * 10 + int'(b[3:0]);
  endfunction
  function automatic logic [7:0] int2bcd(input int v);
    return {4'(v / 10), 4'(v % 10)};
  endfunction

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, a10, b10;
    for (int i = 0; i < 4000; i++) begin
      ai = 8'($urandom); bi = 8'($urandom); cin = 1'($urandom); daa = 0; dsa = 0;
      op = ALU_SUM; #1;
      s = int'(ai) + int'(bi) + int'(cin);
      expect_eq(8'(s), s > 255, "sum");
      checks++;
      if (avr !== ((ai[7] == bi[7]) && (8'(s) >> 7 != ai[7]))) failures++;
      checks++;
      if (hc !== ((int'(ai[3:0]) + int'(bi[3:0]) + int'(cin)) > 15)) failures++;
      op = ALU_AND; #1; expect_eq(ai & bi, 1'b0, "and");
      op = ALU_EOR; #1; expect_eq(ai ^ bi, 1'b0, "eor");
      op = ALU_OR;  #1; expect_eq(ai | bi, 1'b0, "or");
      op = ALU_SR;  #1; expect_eq({cin, ai[7:1]}, ai[0], "shift right");
      // BCD
      a10 = $urandom_range(99); b10 = $urandom_range(99);
      ai = int2bcd(a10); bi = int2bcd(b10); op = ALU_SUM;
      daa = 1; dsa = 0; #1;
      s = a10 + b10 + int'(cin);
      expect_eq(int2bcd(s % 100), s >= 100, "bcd add");
      bi = ~int2bcd(b10); daa = 0; dsa = 1; #1;
      s = a10 - b10 - int'(!cin);
      expect_eq(int2bcd((s + 100) % 100), s >= 0, "bcd sub");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
