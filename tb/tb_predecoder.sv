// tb_predecoder: checks the cycle# and timing class the predecoder gives
// for every documented opcode against the 6502 cycle table written out
// here (longest count: page-crossing reads included), and that the
// undocumented ones become two-cycle, one-byte NOPs.
module tb_predecoder;
  import cpu_pkg::*;
  logic [7:0] db;
  dec_t       inst;
  logic [2:0] cyc;
  kind_t      kind;
  int checks = 0, failures = 0;

  predecoder dut (.databus(db), .inst(inst), .cycle_num(cyc), .kind(kind));

  // cycle table, 0 = undocumented; '+' entries (page crossing) given as max
  int unsigned tbl [256];
  initial begin : fill
    string rows [16];
    rows[0]  = "7600035032200460";
    rows[1]  = "4600046025000570";
    rows[2]  = "6600335042204460";
    rows[3]  = "4600046025000570";
    rows[4]  = "6600035032203460";
    rows[5]  = "4600046025000570";
    rows[6]  = "6600035042205460";
    rows[7]  = "4600046025000570";
    rows[8]  = "0600333020204440";
    rows[9]  = "4600444025200500";
    rows[10] = "2620333022204440";
    rows[11] = "4600444025205550";
    rows[12] = "2600335022204460";
    rows[13] = "4600046025000570";
    rows[14] = "2600335022204460";
    rows[15] = "4600046025000570";
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++)
        tbl[r * 16 + c] = rows[r][c] - "0";
  end

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_c;
    #1;
    for (int o = 0; o < 256; o++) begin
      db = 8'(o); #1;
      exp_c = (tbl[o] == 0) ? 2 : int'(tbl[o]);
      // columns 1/5/9/D of odd rows and BE etc. carry the page-cross cycle
      checks++;
      if (int'(cyc) != exp_c) begin
        failures++;
        if (failures < 10) $display("FAIL opcode %h: cycle# %0d want %0d", o, cyc, exp_c);
      end
      if (tbl[o] == 0) begin
        checks++;
        if (!(inst.op == OP_NOP && inst.onebyte)) begin
          failures++;
          $display("FAIL opcode %h should be a one-byte NOP", o);
        end
      end
      checks++;
      if ((o[4:0] == 5'h10) != (kind == K_BRANCH)) begin
        failures++;
        $display("FAIL opcode %h branch class", o);
      end
    end
    // a few decoded fields
    db = 8'hFE; #1; checks++; if (!(inst.op == OP_INC && inst.mode == M_ABSX && kind == K_RMW)) failures++;
    db = 8'hB1; #1; checks++; if (!(inst.op == OP_LDA && inst.mode == M_IZY && kind == K_IDXREAD)) failures++;
    db = 8'h96; #1; checks++; if (!(inst.op == OP_STX && inst.mode == M_ZPY)) failures++;
    db = 8'h6C; #1; checks++; if (!(inst.mode == M_JMPI)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
