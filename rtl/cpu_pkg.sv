// cpu_pkg: types and the opcode decode table shared by the 6502 core.
//
// The 6502 opcode byte follows the AAABBBCC pattern: CC and AAA select the
// operation, BBB the addressing mode. decode_opcode() turns an opcode into
// an addressing mode, an operation, the kind of memory access, the
// write-back the instruction needs in the first cycle of the next
// instruction, and the longest cycle count (the "cycle#" that the
// predecoder hands to the timing generator). The cycle counts are those of
// the original NMOS 6502. Undocumented opcodes decode as a two-cycle NOP,
// which is this design's own choice.
//
// ctl_t is the control word that the random control logic drives into the
// datapath each clock. Its fields are the bus transfers of the original
// chip (PCL/ADL, DL/DB, SB/AC, SUMS, ...) regrouped as multiplexer selects,
// because the internal buses are multiplexers here instead of precharged
// tristate buses. An undriven bus reads as 8'hFF, like a precharged bus.
package cpu_pkg;

  typedef enum logic [4:0] {
    M_IMP, M_IMM, M_ZP, M_ZPX, M_ZPY, M_ABS, M_ABSX, M_ABSY, M_IZX, M_IZY,
    M_REL, M_JMPA, M_JMPI, M_JSR, M_RTS, M_RTI, M_BRK, M_PUSH, M_PULL
  } mode_t;

  typedef enum logic [5:0] {
    OP_NOP, OP_ORA, OP_AND, OP_EOR, OP_ADC, OP_STA, OP_LDA, OP_CMP, OP_SBC,
    OP_ASL, OP_ROL, OP_LSR, OP_ROR, OP_STX, OP_LDX, OP_DEC, OP_INC,
    OP_BIT, OP_STY, OP_LDY, OP_CPY, OP_CPX,
    OP_INX, OP_INY, OP_DEX, OP_DEY, OP_TAX, OP_TXA, OP_TAY, OP_TYA,
    OP_TSX, OP_TXS, OP_CLC, OP_SEC, OP_CLI, OP_SEI, OP_CLV, OP_CLD, OP_SED,
    OP_PHA, OP_PHP, OP_PLA, OP_PLP, OP_BR, OP_JMP, OP_JSR, OP_RTS, OP_RTI,
    OP_BRK
  } op_t;

  // Memory access class of the operand cycle(s).
  typedef enum logic [1:0] {ACC_NONE, ACC_READ, ACC_WRITE, ACC_RMW} acc_t;

  // Work finished in the opcode-fetch cycle (T1) of the following instruction.
  typedef enum logic [2:0] {WB_NONE, WB_AC, WB_CMP, WB_BIT, WB_X, WB_Y} wb_t;

  // Timing-generator class (the three types of the Mealy machine, plus the
  // indexed reads that skip a cycle when no page is crossed).
  typedef enum logic [1:0] {K_NORMAL, K_BRANCH, K_RMW, K_IDXREAD} kind_t;

  typedef struct packed {
    mode_t      mode;
    op_t        op;
    acc_t       acc;
    wb_t        wb;
    kind_t      kind;
    logic [2:0] cycles;   // cycle#: longest length of the instruction
    logic       onebyte;  // no operand byte follows the opcode
  } dec_t;

  // ---------------------------------------------------------------- buses
  typedef enum logic [2:0] {ADL_NONE, ADL_PCL, ADL_DL, ADL_ADD, ADL_S, ADL_VECL} adl_sel_t;
  typedef enum logic [2:0] {ADH_NONE, ADH_PCH, ADH_DL, ADH_SB, ADH_ZERO, ADH_ONE, ADH_ADD} adh_sel_t;
  typedef enum logic [2:0] {DB_NONE, DB_DL, DB_DIN, DB_PCL, DB_PCH, DB_SB, DB_AC, DB_P} db_sel_t;
  typedef enum logic [2:0] {SB_NONE, SB_S, SB_ADD, SB_DB, SB_X, SB_Y, SB_AC} sb_sel_t;
  typedef enum logic [1:0] {AI_HOLD, AI_SB, AI_ZERO} ai_sel_t;
  typedef enum logic [1:0] {BI_HOLD, BI_DB, BI_NDB, BI_ADL} bi_sel_t;
  typedef enum logic [2:0] {ALU_SUM, ALU_AND, ALU_EOR, ALU_OR, ALU_SR} alu_op_t;
  typedef enum logic [1:0] {CIN_0, CIN_1, CIN_C, CIN_ACR} cin_t;

  typedef enum logic [1:0] {FN_NONE, FN_SB, FN_DB} n_src_t;
  typedef enum logic [1:0] {FC_NONE, FC_ACR, FC_IR5} c_src_t;
  typedef enum logic [1:0] {FV_NONE, FV_AVR, FV_CLR, FV_DB6} v_src_t;
  typedef enum logic [1:0] {FI_NONE, FI_IR5, FI_SET} i_src_t;

  typedef struct packed {
    adl_sel_t adl;
    adh_sel_t adh;
    logic     ld_abl;     // ADL/ABL
    logic     ld_abh;     // ADH/ABH
    db_sel_t  db;
    sb_sel_t  sb;
    ai_sel_t  ai;         // SB/ADD, 0/ADD
    bi_sel_t  bi;         // DB/ADD, ~DB/ADD, ADL/ADD
    alu_op_t  alu;        // SUMS ANDS EORS ORS SRS
    cin_t     cin;        // I/ADDC
    logic     daa;        // decimal add adjust
    logic     dsa;        // decimal subtract adjust
    logic     ld_ac;      // SB/AC
    logic     ld_x;       // SB/X
    logic     ld_y;       // SB/Y
    logic     ld_s;       // SB/S
    logic     pcl_adl;    // ADL/PCL
    logic     pch_adh;    // ADH/PCH
    logic     pc_inc;     // I/PC
    logic     rw;         // 1 = read
    logic     dl_hold;    // keep the input data latch
    n_src_t   n_src;
    logic     z_sb;       // Z from SB
    c_src_t   c_src;
    v_src_t   v_src;
    i_src_t   i_src;
    logic     d_ir5;      // D from IR5
    logic     p_db;       // all flags from DB (PLP, RTI)
  } ctl_t;

  localparam ctl_t CTL_IDLE = '{adl: ADL_NONE, adh: ADH_NONE, ld_abl: 1'b0, ld_abh: 1'b0,
                                db: DB_NONE, sb: SB_NONE, ai: AI_HOLD, bi: BI_HOLD,
                                alu: ALU_SUM, cin: CIN_0, daa: 1'b0, dsa: 1'b0,
                                ld_ac: 1'b0, ld_x: 1'b0, ld_y: 1'b0, ld_s: 1'b0,
                                pcl_adl: 1'b0, pch_adh: 1'b0, pc_inc: 1'b0,
                                rw: 1'b1, dl_hold: 1'b0, n_src: FN_NONE, z_sb: 1'b0,
                                c_src: FC_NONE, v_src: FV_NONE, i_src: FI_NONE,
                                d_ir5: 1'b0, p_db: 1'b0};

  // T-state from the timing generator.
  typedef struct packed {
    logic [2:0] t;      // 1 = opcode fetch (SYNC), 2..7 following cycles
    logic       last;   // final cycle of the instruction (T0 of the 6502)
    logic       sd1;    // read-modify-write: first (unmodified) write
    logic       sd2;    // read-modify-write: second (modified) write
  } tstate_t;

  localparam logic [7:0] OPC_NOP = 8'hEA;

  // ------------------------------------------------------------- decoder
  function automatic dec_t decode_opcode(input logic [7:0] opc);
    dec_t d;
    logic [2:0] a, b;
    logic [1:0] c;
    a = opc[7:5]; b = opc[4:2]; c = opc[1:0];
    d.mode = M_IMP; d.op = OP_NOP; d.acc = ACC_NONE; d.wb = WB_NONE;
    d.kind = K_NORMAL; d.cycles = 3'd2; d.onebyte = 1'b1;

    if (c == 2'b01) begin
      unique case (a)
        3'd0: d.op = OP_ORA; 3'd1: d.op = OP_AND; 3'd2: d.op = OP_EOR; 3'd3: d.op = OP_ADC;
        3'd4: d.op = OP_STA; 3'd5: d.op = OP_LDA; 3'd6: d.op = OP_CMP; default: d.op = OP_SBC;
      endcase
      unique case (b)
        3'd0: d.mode = M_IZX; 3'd1: d.mode = M_ZP;  3'd2: d.mode = M_IMM; 3'd3: d.mode = M_ABS;
        3'd4: d.mode = M_IZY; 3'd5: d.mode = M_ZPX; 3'd6: d.mode = M_ABSY; default: d.mode = M_ABSX;
      endcase
      if (opc == 8'h89) begin d.op = OP_NOP; d.mode = M_IMP; end
    end else if (c == 2'b10) begin
      unique case (a)
        3'd0: d.op = OP_ASL; 3'd1: d.op = OP_ROL; 3'd2: d.op = OP_LSR; 3'd3: d.op = OP_ROR;
        3'd4: d.op = OP_STX; 3'd5: d.op = OP_LDX; 3'd6: d.op = OP_DEC; default: d.op = OP_INC;
      endcase
      unique case (b)
        3'd0: d.mode = (opc == 8'hA2) ? M_IMM : M_IMP;
        3'd1: d.mode = M_ZP;
        3'd2: d.mode = M_IMP;
        3'd3: d.mode = M_ABS;
        3'd5: d.mode = (a == 3'd4 || a == 3'd5) ? M_ZPY : M_ZPX;
        3'd7: d.mode = (a == 3'd5) ? M_ABSY : M_ABSX;
        default: d.mode = M_IMP;
      endcase
      if (d.mode == M_IMP) begin
        unique case (opc)
          8'h0A, 8'h2A, 8'h4A, 8'h6A: ;          // shifts of A keep their op
          8'h8A: d.op = OP_TXA;
          8'hAA: d.op = OP_TAX;
          8'hCA: d.op = OP_DEX;
          8'h9A: d.op = OP_TXS;
          8'hBA: d.op = OP_TSX;
          default: d.op = OP_NOP;
        endcase
      end
      if (opc == 8'h9E) begin d.op = OP_NOP; d.mode = M_IMP; end
    end else if (c == 2'b00) begin
      d.op = OP_NOP;
      unique case (b)
        3'd0: unique case (a)
          3'd0: begin d.op = OP_BRK; d.mode = M_BRK;  end
          3'd1: begin d.op = OP_JSR; d.mode = M_JSR;  end
          3'd2: begin d.op = OP_RTI; d.mode = M_RTI;  end
          3'd3: begin d.op = OP_RTS; d.mode = M_RTS;  end
          3'd5: begin d.op = OP_LDY; d.mode = M_IMM;  end
          3'd6: begin d.op = OP_CPY; d.mode = M_IMM;  end
          3'd7: begin d.op = OP_CPX; d.mode = M_IMM;  end
          default: ;
        endcase
        3'd1: begin
          d.mode = M_ZP;
          unique case (a)
            3'd1: d.op = OP_BIT; 3'd4: d.op = OP_STY; 3'd5: d.op = OP_LDY;
            3'd6: d.op = OP_CPY; 3'd7: d.op = OP_CPX;
            default: d.mode = M_IMP;
          endcase
        end
        3'd2: unique case (a)
          3'd0: begin d.op = OP_PHP; d.mode = M_PUSH; end
          3'd1: begin d.op = OP_PLP; d.mode = M_PULL; end
          3'd2: begin d.op = OP_PHA; d.mode = M_PUSH; end
          3'd3: begin d.op = OP_PLA; d.mode = M_PULL; end
          3'd4: d.op = OP_DEY;
          3'd5: d.op = OP_TAY;
          3'd6: d.op = OP_INY;
          default: d.op = OP_INX;
        endcase
        3'd3: begin
          d.mode = M_ABS;
          unique case (a)
            3'd1: d.op = OP_BIT;
            3'd2: begin d.op = OP_JMP; d.mode = M_JMPA; end
            3'd3: begin d.op = OP_JMP; d.mode = M_JMPI; end
            3'd4: d.op = OP_STY; 3'd5: d.op = OP_LDY;
            3'd6: d.op = OP_CPY; 3'd7: d.op = OP_CPX;
            default: d.mode = M_IMP;
          endcase
        end
        3'd4: begin d.op = OP_BR; d.mode = M_REL; end
        3'd5: begin
          d.mode = M_ZPX;
          unique case (a)
            3'd4: d.op = OP_STY; 3'd5: d.op = OP_LDY;
            default: d.mode = M_IMP;
          endcase
        end
        3'd6: unique case (a)
          3'd0: d.op = OP_CLC; 3'd1: d.op = OP_SEC; 3'd2: d.op = OP_CLI; 3'd3: d.op = OP_SEI;
          3'd4: d.op = OP_TYA; 3'd5: d.op = OP_CLV; 3'd6: d.op = OP_CLD; default: d.op = OP_SED;
        endcase
        default: begin
          if (a == 3'd5) begin d.op = OP_LDY; d.mode = M_ABSX; end
          else d.mode = M_IMP;
        end
      endcase
    end
    // c == 2'b11 : undocumented, stays a two-cycle NOP

    // memory access class and write-back
    unique case (d.op)
      OP_ORA, OP_AND, OP_EOR, OP_ADC, OP_SBC: begin d.acc = ACC_READ; d.wb = WB_AC; end
      OP_CMP, OP_CPX, OP_CPY:                 begin d.acc = ACC_READ; d.wb = WB_CMP; end
      OP_BIT:                                 begin d.acc = ACC_READ; d.wb = WB_BIT; end
      OP_LDA, OP_LDX, OP_LDY:                 d.acc = ACC_READ;
      OP_STA, OP_STX, OP_STY:                 d.acc = ACC_WRITE;
      OP_ASL, OP_ROL, OP_LSR, OP_ROR: begin
        if (d.mode == M_IMP) d.wb = WB_AC; else d.acc = ACC_RMW;
      end
      OP_INC, OP_DEC:                         d.acc = ACC_RMW;
      OP_INX, OP_DEX:                         d.wb = WB_X;
      OP_INY, OP_DEY:                         d.wb = WB_Y;
      default: ;
    endcase
    if (d.mode == M_IMP && d.op == OP_NOP) d.acc = ACC_NONE;

    // cycle# and timing class
    unique case (d.mode)
      M_IMP:  d.cycles = 3'd2;
      M_IMM:  d.cycles = 3'd2;
      M_ZP:   d.cycles = 3'd3;
      M_ZPX, M_ZPY, M_ABS: d.cycles = 3'd4;
      M_ABSX, M_ABSY: d.cycles = 3'd5;
      M_IZX, M_IZY:   d.cycles = 3'd6;
      M_REL:  d.cycles = 3'd4;
      M_JMPA: d.cycles = 3'd3;
      M_JMPI: d.cycles = 3'd5;
      M_JSR, M_RTS, M_RTI: d.cycles = 3'd6;
      M_BRK:  d.cycles = 3'd7;
      M_PUSH: d.cycles = 3'd3;
      M_PULL: d.cycles = 3'd4;
      default: d.cycles = 3'd2;
    endcase
    if (d.acc == ACC_RMW) d.cycles = d.cycles + 3'd2;
    if (d.mode == M_REL) d.kind = K_BRANCH;
    else if (d.acc == ACC_RMW) d.kind = K_RMW;
    else if (d.acc == ACC_READ && (d.mode == M_ABSX || d.mode == M_ABSY || d.mode == M_IZY))
      d.kind = K_IDXREAD;
    d.onebyte = (d.mode == M_IMP || d.mode == M_PUSH || d.mode == M_PULL ||
                 d.mode == M_RTS || d.mode == M_RTI);
    return d;
  endfunction

endpackage
