// tb_cpu6502: checks the 6502 core against an instruction-level reference
// model written here, independently of the RTL decode tables.
//
// 64 KiB of memory is filled with pseudo-random bytes, so the core runs a
// random instruction stream (branches, jumps, stack operations, BRK/RTI,
// decimal mode included). At every SYNC the core's A, X, Y, S, P and PC
// are compared with the model, and the number of clocks since the previous
// SYNC with the model's cycle count for that instruction (page-crossing and
// branch penalties included). At the end both memories are compared. A
// few seeds are run, each from reset. The model treats the undocumented
// opcodes as one-byte, two-cycle NOPs, as the core does.
module tb_cpu6502;
  logic        clk = 1'b0;
  logic        rst;
  logic [7:0]  mem [0:65535];
  logic [7:0]  mm  [0:65535];
  logic [15:0] addr;
  logic [7:0]  dout, din;
  logic        rw, sync;
  logic [7:0]  ra, rx, ry, rs, rp, rir;
  logic [15:0] rpc;
  int          checks = 0, failures = 0;

  cpu6502 #(.RESET_PC(16'h0200)) dut (
    .clk(clk), .rst(rst), .rdy(1'b1), .data_in(din), .addr(addr), .data_out(dout),
    .rw(rw), .sync(sync), .reg_a(ra), .reg_x(rx), .reg_y(ry), .reg_s(rs),
    .reg_p(rp), .reg_pc(rpc), .reg_ir(rir)
  );

  always #5 clk = ~clk;
  assign din = mem[addr];
  always_ff @(posedge clk) if (!rst && !rw) mem[addr] <= dout;

  // ------------------------------------------------------ reference model
  logic [7:0]  mA, mX, mY, mS;
  logic        fN, fV, fD, fI, fZ, fC;
  logic [15:0] mPC;

  function automatic logic [7:0] mP();
    return {fN, fV, 1'b1, 1'b1, fD, fI, fZ, fC};
  endfunction
  function automatic logic [7:0] rd(input logic [15:0] a);
    return mm[a];
  endfunction
  task automatic wr(input logic [15:0] a, input logic [7:0] v);
    mm[a] = v;
  endtask
  task automatic nz(input logic [7:0] v);
    fN = v[7]; fZ = (v == 8'h00);
  endtask
  task automatic push(input logic [7:0] v);
    wr({8'h01, mS}, v); mS = mS - 8'd1;
  endtask
  function automatic logic [7:0] pull();
    mS = mS + 8'd1;
    return rd({8'h01, mS});
  endfunction
  function automatic logic [7:0] fetch();
    logic [7:0] v;
    v = rd(mPC); mPC = mPC + 16'd1;
    return v;
  endfunction

  task automatic do_adc(input logic [7:0] v);
    logic [8:0] s;
    logic [4:0] lo, hi;
    s  = {1'b0, mA} + {1'b0, v} + {8'd0, fC};
    fV = (mA[7] == v[7]) && (s[7] != mA[7]);
    if (fD) begin
      lo = {1'b0, mA[3:0]} + {1'b0, v[3:0]} + {4'd0, fC};
      if (lo > 9) lo = lo + 6;
      hi = {1'b0, mA[7:4]} + {1'b0, v[7:4]} + {4'd0, lo[4]};
      fC = (hi > 9);
      if (fC) hi = hi + 6;
      mA = {hi[3:0], lo[3:0]};
    end else begin
      fC = s[8]; mA = s[7:0];
    end
    nz(mA);
  endtask

  task automatic do_sbc(input logic [7:0] v);
    logic [8:0] s;
    logic       h;
    s  = {1'b0, mA} + {1'b0, ~v} + {8'd0, fC};
    h  = ({1'b0, mA[3:0]} + {1'b0, ~v[3:0]} + {4'd0, fC}) > 5'd15;
    fV = (mA[7] != v[7]) && (s[7] != mA[7]);
    fC = s[8];
    mA = s[7:0];
    if (fD) begin
      if (!h)  mA = mA - 8'h06;
      if (!fC) mA = mA - 8'h60;
    end
    nz(mA);
  endtask

  task automatic do_cmp(input logic [7:0] r, input logic [7:0] v);
    logic [8:0] s;
    s = {1'b0, r} + {1'b0, ~v} + 9'd1;
    fC = s[8]; nz(s[7:0]);
  endtask

  // Executes one instruction, returns its cycle count.
  task automatic step(output int cyc);
    logic [7:0]  op, lo, hi, v, t;
    logic [15:0] ea, base;
    logic [2:0]  aaa, bbb;
    logic [1:0]  cc;
    logic        pgx, rmw, st, take;
    int          mode;  // 0 imp 1 imm 2 zp 3 zpx 4 zpy 5 abs 6 absx 7 absy 8 izx 9 izy
    op = fetch();
    aaa = op[7:5]; bbb = op[4:2]; cc = op[1:0];
    pgx = 1'b0; mode = 0; cyc = 2;
    // ---- instructions without a memory operand
    case (op)
      8'h00: begin // BRK
        v = fetch(); push(mPC[15:8]); push(mPC[7:0]); push(mP()); fI = 1'b1;
        mPC = {rd(16'hFFFF), rd(16'hFFFE)}; cyc = 7; return;
      end
      8'h20: begin lo = fetch(); hi = rd(mPC); push(mPC[15:8]); push(mPC[7:0]);
        mPC = {hi, lo}; cyc = 6; return; end
      8'h40: begin v = pull(); {fN, fV} = v[7:6]; {fD, fI, fZ, fC} = v[3:0];
        lo = pull(); hi = pull(); mPC = {hi, lo}; cyc = 6; return; end
      8'h60: begin lo = pull(); hi = pull(); mPC = {hi, lo} + 16'd1; cyc = 6; return; end
      8'h4C: begin lo = fetch(); hi = fetch(); mPC = {hi, lo}; cyc = 3; return; end
      8'h6C: begin lo = fetch(); hi = fetch();
        mPC = {rd({hi, lo + 8'd1}), rd({hi, lo})}; cyc = 5; return; end
      8'h08: begin push(mP()); cyc = 3; return; end
      8'h48: begin push(mA); cyc = 3; return; end
      8'h28: begin v = pull(); {fN, fV} = v[7:6]; {fD, fI, fZ, fC} = v[3:0]; cyc = 4; return; end
      8'h68: begin mA = pull(); nz(mA); cyc = 4; return; end
      8'h18: begin fC = 0; return; end
      8'h38: begin fC = 1; return; end
      8'h58: begin fI = 0; return; end
      8'h78: begin fI = 1; return; end
      8'hB8: begin fV = 0; return; end
      8'hD8: begin fD = 0; return; end
      8'hF8: begin fD = 1; return; end
      8'hAA: begin mX = mA; nz(mX); return; end
      8'h8A: begin mA = mX; nz(mA); return; end
      8'hA8: begin mY = mA; nz(mY); return; end
      8'h98: begin mA = mY; nz(mA); return; end
      8'hBA: begin mX = mS; nz(mX); return; end
      8'h9A: begin mS = mX; return; end
      8'hE8: begin mX = mX + 1; nz(mX); return; end
      8'hC8: begin mY = mY + 1; nz(mY); return; end
      8'hCA: begin mX = mX - 1; nz(mX); return; end
      8'h88: begin mY = mY - 1; nz(mY); return; end
      8'hEA: return;
      8'h0A: begin fC = mA[7]; mA = {mA[6:0], 1'b0}; nz(mA); return; end
      8'h2A: begin t = {mA[6:0], fC}; fC = mA[7]; mA = t; nz(mA); return; end
      8'h4A: begin fC = mA[0]; mA = {1'b0, mA[7:1]}; nz(mA); return; end
      8'h6A: begin t = {fC, mA[7:1]}; fC = mA[0]; mA = t; nz(mA); return; end
      default: ;
    endcase
    if (cc == 2'b00 && bbb == 3'd4) begin // branches
      v = fetch();
      case (aaa[2:1])
        2'b00: take = (fN == aaa[0]);
        2'b01: take = (fV == aaa[0]);
        2'b10: take = (fC == aaa[0]);
        default: take = (fZ == aaa[0]);
      endcase
      cyc = 2;
      if (take) begin
        base = mPC;
        mPC = mPC + {{8{v[7]}}, v};
        cyc = (base[15:8] == mPC[15:8]) ? 3 : 4;
      end
      return;
    end
    // ---- which opcodes are documented memory-operand instructions
    case (cc)
      2'b01: if (op == 8'h89) return;
      2'b10: if (!(bbb inside {3'd0, 3'd1, 3'd3, 3'd5, 3'd7}) || (bbb == 3'd0 && op != 8'hA2)
                 || op == 8'h9E) begin mPC = mPC; return; end
      2'b00: if (!(op inside {8'hA0, 8'hC0, 8'hE0, 8'h24, 8'h84, 8'hA4, 8'hC4, 8'hE4,
                              8'h2C, 8'h8C, 8'hAC, 8'hCC, 8'hEC, 8'h94, 8'hB4, 8'hBC})) return;
      default: return;
    endcase
    // addressing mode
    if (cc == 2'b01) mode = (bbb == 0) ? 8 : (bbb == 1) ? 2 : (bbb == 2) ? 1 : (bbb == 3) ? 5 :
                            (bbb == 4) ? 9 : (bbb == 5) ? 3 : (bbb == 6) ? 7 : 6;
    else begin
      mode = (bbb == 0) ? 1 : (bbb == 1) ? 2 : (bbb == 3) ? 5 : (bbb == 5) ? 3 : 6;
      if (cc == 2'b10 && (aaa == 4 || aaa == 5)) begin
        if (mode == 3) mode = 4;
        if (mode == 6) mode = 7;
      end
    end
    st  = (aaa == 3'd4);
    rmw = (cc == 2'b10) && !(aaa inside {3'd4, 3'd5});
    case (mode)
      1: begin ea = mPC; mPC = mPC + 1; cyc = 2; end
      2: begin ea = {8'h00, fetch()}; cyc = 3; end
      3: begin ea = {8'h00, fetch() + mX}; cyc = 4; end
      4: begin ea = {8'h00, fetch() + mY}; cyc = 4; end
      5: begin lo = fetch(); hi = fetch(); ea = {hi, lo}; cyc = 4; end
      6, 7: begin lo = fetch(); hi = fetch(); base = {hi, lo};
        ea = base + ((mode == 6) ? {8'h00, mX} : {8'h00, mY});
        pgx = (ea[15:8] != base[15:8]); cyc = (st || rmw || pgx) ? 5 : 4; end
      8: begin t = fetch() + mX; ea = {rd({8'h00, t + 8'd1}), rd({8'h00, t})}; cyc = 6; end
      default: begin t = fetch(); base = {rd({8'h00, t + 8'd1}), rd({8'h00, t})};
        ea = base + {8'h00, mY}; pgx = (ea[15:8] != base[15:8]);
        cyc = (st || pgx) ? 6 : 5; end
    endcase
    if (rmw) cyc = cyc + 2;
    v = rd(ea);
    if (cc == 2'b01) begin
      case (aaa)
        0: begin mA = mA | v; nz(mA); end
        1: begin mA = mA & v; nz(mA); end
        2: begin mA = mA ^ v; nz(mA); end
        3: do_adc(v);
        4: wr(ea, mA);
        5: begin mA = v; nz(mA); end
        6: do_cmp(mA, v);
        default: do_sbc(v);
      endcase
    end else if (cc == 2'b10) begin
      case (aaa)
        0: begin fC = v[7]; v = {v[6:0], 1'b0}; nz(v); wr(ea, v); end
        1: begin t = {v[6:0], fC}; fC = v[7]; nz(t); wr(ea, t); end
        2: begin fC = v[0]; v = {1'b0, v[7:1]}; nz(v); wr(ea, v); end
        3: begin t = {fC, v[7:1]}; fC = v[0]; nz(t); wr(ea, t); end
        4: wr(ea, mX);
        5: begin mX = v; nz(mX); end
        6: begin v = v - 1; nz(v); wr(ea, v); end
        default: begin v = v + 1; nz(v); wr(ea, v); end
      endcase
    end else begin
      case (aaa)
        1: begin fN = v[7]; fV = v[6]; fZ = ((mA & v) == 8'h00); end
        4: wr(ea, mY);
        5: begin mY = v; nz(mY); end
        6: do_cmp(mY, v);
        default: do_cmp(mX, v);
      endcase
    end
  endtask

  // ------------------------------------------------------------ driver
  int n_instr, cycles_since, exp_cyc, bad_shown;
  int SEEDS = 6;
  int INSTR = 4000;
  int unsigned seed_val;
  logic [7:0]  last_op;

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bad_shown = 0;
    for (int sd = 0; sd < SEEDS; sd++) begin
      seed_val = $urandom(sd + 1);
      for (int i = 0; i < 65536; i++) begin
        mem[i] = 8'($urandom);
        // keep decimal mode rare, so binary arithmetic dominates
        if (mem[i] == 8'hF8 && (i % 4) != 0) mem[i] = 8'hD8;
        mm[i] = mem[i];
      end
      rst = 1'b1;
      @(posedge clk); @(posedge clk);
      #1 rst = 1'b0;
      mA = 0; mX = 0; mY = 0; mS = 8'hFF; mPC = 16'h0200;
      {fN, fV, fD, fZ, fC} = '0; fI = 1'b1;
      exp_cyc = 0; cycles_since = 0; n_instr = 0;
      while (n_instr < INSTR) begin
        @(negedge clk);
        if (sync) begin
          // the previous instruction finishes its write-back in this cycle
          @(negedge clk);
          cycles_since++;
          if (n_instr > 0) begin
            checks++;
            if (cycles_since != exp_cyc) begin
              failures++;
              if (bad_shown++ < 10)
                $display("cycle count: seed %0d instr %0d got %0d expected %0d (op %h)",
                         sd, n_instr, cycles_since, exp_cyc, last_op);
            end
          end
          checks++;
          if ({ra, rx, ry, rs, rp, rpc} !== {mA, mX, mY, mS, mP(), mPC + 16'd1}) begin
            failures++;
            if (bad_shown++ < 10)
              $display("state: seed %0d instr %0d rtl A%h X%h Y%h S%h P%h PC%h model A%h X%h Y%h S%h P%h PC%h",
                       sd, n_instr, ra, rx, ry, rs, rp, rpc, mA, mX, mY, mS, mP(), mPC);
            // resynchronise on a mismatch only by restarting the seed
            break;
          end
          last_op = mm[mPC];
          step(exp_cyc);
          n_instr++;
          cycles_since = 1;
        end else cycles_since++;
      end
      // let the last instruction finish its writes
      if (n_instr < INSTR) continue;
      do @(negedge clk); while (!sync);
      checks++;
      for (int i = 0; i < 65536; i++)
        if (mem[i] !== mm[i]) begin
          failures++;
          if (bad_shown++ < 10) $display("memory differs at %h: %h vs %h", i, mem[i], mm[i]);
          break;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
