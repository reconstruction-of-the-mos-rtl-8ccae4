// random_control_logic: turns the instruction in the IR and the T-state
// from the timing generator into the datapath control word of the cycle.
//
// Combinational. In T1 (opcode fetch) the address comes from the PC, or for
// the jump group (JMP, JSR, RTI, BRK) from ADD/DL, and the PC is loaded with
// that address plus one; the same cycle finishes the write-back of the
// previous instruction (an ALU result into A, X or Y, compare or BIT flags).
// In T2 onwards the addressing mode steps out the effective address, in
// the cycle order of the original 6502, and the access cycle performs the
// operation: loads and ALU operands take the data input straight off the
// data bus, stores drive DB, read-modify-write reads the operand, writes it
// back unmodified (SD1) while the ALU modifies it, then writes the result
// (SD2). The control signal names and the split of work between timing
// generator and control logic follow the document; the per-cycle transfers
// are this design's reconstruction of standard 6502 behaviour.
module random_control_logic
  import cpu_pkg::*;
(
  input  dec_t       inst,
  input  tstate_t    ts,
  input  logic       flag_d,
  input  logic       dl7,
  output ctl_t       ctl
);
  // operand index register on SB for the indexed modes
  function automatic sb_sel_t idx_sel(input mode_t m);
    return (m == M_ZPY || m == M_ABSY || m == M_IZY) ? SB_Y : SB_X;
  endfunction

  logic access;   // this cycle reads or writes the effective operand

  always_comb begin
    ctl = CTL_IDLE;
    access = 1'b0;

    if (ts.t == 3'd1) begin
      // ------------------------------------------------ opcode fetch (T1)
      ctl.ld_abl = 1'b1;
      ctl.ld_abh = 1'b1;
      ctl.pc_inc = 1'b1;
      if (inst.mode inside {M_JMPA, M_JMPI, M_JSR, M_RTI, M_BRK}) begin
        ctl.adl = ADL_ADD;
        ctl.adh = ADH_DL;
        ctl.pcl_adl = 1'b1;
        ctl.pch_adh = 1'b1;
      end else begin
        ctl.adl = ADL_PCL;
        ctl.adh = ADH_PCH;
      end
      unique case (inst.wb)
        WB_AC: begin
          ctl.sb = SB_ADD; ctl.ld_ac = 1'b1; ctl.n_src = FN_SB; ctl.z_sb = 1'b1;
          if (inst.op inside {OP_ADC, OP_SBC}) begin
            ctl.c_src = FC_ACR; ctl.v_src = FV_AVR;
          end
          if (inst.op inside {OP_ASL, OP_ROL, OP_LSR, OP_ROR}) ctl.c_src = FC_ACR;
        end
        WB_CMP: begin
          ctl.sb = SB_ADD; ctl.n_src = FN_SB; ctl.z_sb = 1'b1; ctl.c_src = FC_ACR;
        end
        WB_BIT: begin
          ctl.sb = SB_ADD; ctl.z_sb = 1'b1;
        end
        WB_X: begin
          ctl.sb = SB_ADD; ctl.ld_x = 1'b1; ctl.n_src = FN_SB; ctl.z_sb = 1'b1;
        end
        WB_Y: begin
          ctl.sb = SB_ADD; ctl.ld_y = 1'b1; ctl.n_src = FN_SB; ctl.z_sb = 1'b1;
        end
        default: ;
      endcase
    end else begin
      // ------------------------------------------- address sequencing (T2+)
      unique case (inst.mode)
        M_IMP: begin
          // dummy read of the next byte, PC not advanced
          ctl.adl = ADL_PCL; ctl.adh = ADH_PCH; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
          unique case (inst.op)
            OP_ASL, OP_ROL: begin
              ctl.sb = SB_AC; ctl.db = DB_SB; ctl.ai = AI_SB; ctl.bi = BI_DB;
              ctl.alu = ALU_SUM; ctl.cin = (inst.op == OP_ROL) ? CIN_C : CIN_0;
            end
            OP_LSR, OP_ROR: begin
              ctl.sb = SB_AC; ctl.ai = AI_SB; ctl.bi = BI_DB;
              ctl.alu = ALU_SR; ctl.cin = (inst.op == OP_ROR) ? CIN_C : CIN_0;
            end
            OP_INX, OP_INY: begin
              ctl.sb = (inst.op == OP_INX) ? SB_X : SB_Y;
              ctl.ai = AI_SB; ctl.bi = BI_NDB; ctl.cin = CIN_1;
            end
            OP_DEX, OP_DEY: begin
              ctl.sb = (inst.op == OP_DEX) ? SB_X : SB_Y;
              ctl.ai = AI_SB; ctl.bi = BI_DB; ctl.cin = CIN_0;
            end
            OP_TAX: begin ctl.sb = SB_AC; ctl.ld_x  = 1'b1; ctl.n_src = FN_SB; ctl.z_sb = 1'b1; end
            OP_TAY: begin ctl.sb = SB_AC; ctl.ld_y  = 1'b1; ctl.n_src = FN_SB; ctl.z_sb = 1'b1; end
            OP_TXA: begin ctl.sb = SB_X;  ctl.ld_ac = 1'b1; ctl.n_src = FN_SB; ctl.z_sb = 1'b1; end
            OP_TYA: begin ctl.sb = SB_Y;  ctl.ld_ac = 1'b1; ctl.n_src = FN_SB; ctl.z_sb = 1'b1; end
            OP_TSX: begin ctl.sb = SB_S;  ctl.ld_x  = 1'b1; ctl.n_src = FN_SB; ctl.z_sb = 1'b1; end
            OP_TXS: begin ctl.sb = SB_X;  ctl.ld_s  = 1'b1; end
            OP_CLC, OP_SEC: ctl.c_src = FC_IR5;
            OP_CLI, OP_SEI: ctl.i_src = FI_IR5;
            OP_CLD, OP_SED: ctl.d_ir5 = 1'b1;
            OP_CLV:         ctl.v_src = FV_CLR;
            default: ;
          endcase
        end

        M_IMM: if (ts.t == 3'd2) begin
          ctl.adl = ADL_PCL; ctl.adh = ADH_PCH; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
          ctl.pc_inc = 1'b1; access = 1'b1;
        end

        M_ZP, M_ZPX, M_ZPY, M_ABS, M_ABSX, M_ABSY, M_IZX, M_IZY: begin
          if (ts.t == 3'd2) begin
            // first operand byte
            ctl.adl = ADL_PCL; ctl.adh = ADH_PCH; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
            ctl.pc_inc = 1'b1;
          end else unique case (inst.mode)
            M_ZP: if (ts.t == 3'd3) begin
              ctl.adl = ADL_DL; ctl.adh = ADH_ZERO; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
              access = 1'b1;
            end
            M_ZPX, M_ZPY: begin
              if (ts.t == 3'd3) begin
                ctl.adl = ADL_DL; ctl.adh = ADH_ZERO; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
                ctl.db = DB_DL; ctl.bi = BI_DB; ctl.sb = idx_sel(inst.mode); ctl.ai = AI_SB;
              end else if (ts.t == 3'd4) begin
                ctl.adl = ADL_ADD; ctl.adh = ADH_ZERO; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
                access = 1'b1;
              end
            end
            M_ABS: begin
              if (ts.t == 3'd3) begin
                ctl.adl = ADL_PCL; ctl.adh = ADH_PCH; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
                ctl.pc_inc = 1'b1;
                ctl.db = DB_DL; ctl.bi = BI_DB; ctl.ai = AI_ZERO;
              end else if (ts.t == 3'd4) begin
                ctl.adl = ADL_ADD; ctl.adh = ADH_DL; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
                access = 1'b1;
              end
            end
            M_ABSX, M_ABSY: begin
              if (ts.t == 3'd3) begin
                ctl.adl = ADL_PCL; ctl.adh = ADH_PCH; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
                ctl.pc_inc = 1'b1;
                ctl.db = DB_DL; ctl.bi = BI_DB; ctl.sb = idx_sel(inst.mode); ctl.ai = AI_SB;
              end else if (ts.t == 3'd4) begin
                ctl.adl = ADL_ADD; ctl.adh = ADH_DL; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
                if (inst.kind == K_IDXREAD && ts.last) access = 1'b1;
                else begin
                  ctl.db = DB_DL; ctl.bi = BI_DB; ctl.ai = AI_ZERO; ctl.cin = CIN_ACR;
                end
              end else if (ts.t == 3'd5) begin
                ctl.adh = ADH_ADD; ctl.ld_abh = 1'b1;
                access = 1'b1;
              end
            end
            M_IZX: begin
              if (ts.t == 3'd3) begin
                ctl.adl = ADL_DL; ctl.adh = ADH_ZERO; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
                ctl.db = DB_DL; ctl.bi = BI_DB; ctl.sb = SB_X; ctl.ai = AI_SB;
              end else if (ts.t == 3'd4) begin
                ctl.adl = ADL_ADD; ctl.adh = ADH_ZERO; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
                ctl.bi = BI_ADL; ctl.ai = AI_ZERO; ctl.cin = CIN_1;
              end else if (ts.t == 3'd5) begin
                ctl.adl = ADL_ADD; ctl.adh = ADH_ZERO; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
                ctl.db = DB_DL; ctl.bi = BI_DB; ctl.ai = AI_ZERO;
              end else if (ts.t == 3'd6) begin
                ctl.adl = ADL_ADD; ctl.adh = ADH_DL; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
                access = 1'b1;
              end
            end
            default: begin // M_IZY
              if (ts.t == 3'd3) begin
                ctl.adl = ADL_DL; ctl.adh = ADH_ZERO; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
                ctl.db = DB_DL; ctl.bi = BI_DB; ctl.ai = AI_ZERO; ctl.cin = CIN_1;
              end else if (ts.t == 3'd4) begin
                ctl.adl = ADL_ADD; ctl.adh = ADH_ZERO; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
                ctl.db = DB_DL; ctl.bi = BI_DB; ctl.sb = SB_Y; ctl.ai = AI_SB;
              end else if (ts.t == 3'd5) begin
                ctl.adl = ADL_ADD; ctl.adh = ADH_DL; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
                if (inst.kind == K_IDXREAD && ts.last) access = 1'b1;
                else begin
                  ctl.db = DB_DL; ctl.bi = BI_DB; ctl.ai = AI_ZERO; ctl.cin = CIN_ACR;
                end
              end else if (ts.t == 3'd6) begin
                ctl.adh = ADH_ADD; ctl.ld_abh = 1'b1;
                access = 1'b1;
              end
            end
          endcase
        end

        M_REL: begin
          if (ts.t == 3'd2) begin
            // fetch offset; AI <- offset, BI <- PCL of the offset byte, +1
            ctl.adl = ADL_PCL; ctl.adh = ADH_PCH; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
            ctl.pc_inc = 1'b1;
            ctl.db = DB_DIN; ctl.sb = SB_DB; ctl.ai = AI_SB; ctl.bi = BI_ADL; ctl.cin = CIN_1;
          end else if (ts.t == 3'd3) begin
            // T3_b: PCL <- ADD; prepare PCH +/- 1 for a page crossing
            ctl.adl = ADL_ADD; ctl.adh = ADH_PCH; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
            ctl.pcl_adl = 1'b1;
            ctl.db = DB_PCH; ctl.bi = BI_DB;
            ctl.ai = dl7 ? AI_SB : AI_ZERO;          // idle SB reads 8'hFF
            ctl.cin = dl7 ? CIN_0 : CIN_1;
          end else begin
            // page fix: PCH <- ADD
            ctl.adh = ADH_ADD; ctl.ld_abh = 1'b1; ctl.pch_adh = 1'b1;
          end
        end

        M_JMPA, M_JMPI: begin
          if (ts.t == 3'd2 || ts.t == 3'd3) begin
            ctl.adl = ADL_PCL; ctl.adh = ADH_PCH; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
            ctl.pc_inc = 1'b1;
            if (ts.t == 3'd3) begin
              ctl.db = DB_DL; ctl.bi = BI_DB; ctl.ai = AI_ZERO;
            end
          end else if (ts.t == 3'd4) begin
            ctl.adl = ADL_ADD; ctl.adh = ADH_DL; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
            ctl.bi = BI_ADL; ctl.ai = AI_ZERO; ctl.cin = CIN_1;  // no carry into the high byte
          end else begin
            ctl.adl = ADL_ADD; ctl.ld_abl = 1'b1;
            ctl.db = DB_DL; ctl.bi = BI_DB; ctl.ai = AI_ZERO;
          end
        end

        M_JSR: begin
          unique case (ts.t)
            3'd2: begin
              ctl.adl = ADL_PCL; ctl.adh = ADH_PCH; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
              ctl.pc_inc = 1'b1;
            end
            3'd3: begin
              ctl.adl = ADL_S; ctl.adh = ADH_ONE; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
              ctl.dl_hold = 1'b1;
              ctl.ai = AI_SB; ctl.bi = BI_ADL;                    // S - 1
            end
            3'd4: begin
              ctl.db = DB_PCH; ctl.rw = 1'b0;
              ctl.sb = SB_ADD; ctl.ld_s = 1'b1;
            end
            3'd5: begin
              ctl.adl = ADL_S; ctl.ld_abl = 1'b1;
              ctl.db = DB_PCL; ctl.rw = 1'b0;
              ctl.ai = AI_SB; ctl.bi = BI_ADL;                    // S - 1
            end
            default: begin
              ctl.adl = ADL_PCL; ctl.adh = ADH_PCH; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
              ctl.sb = SB_ADD; ctl.ld_s = 1'b1;
              ctl.db = DB_DL; ctl.bi = BI_DB; ctl.ai = AI_ZERO;   // hold target low
            end
          endcase
        end

        M_RTS, M_RTI: begin
          unique case (ts.t)
            3'd2: begin
              ctl.adl = ADL_PCL; ctl.adh = ADH_PCH; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
            end
            3'd3: begin
              ctl.adl = ADL_S; ctl.adh = ADH_ONE; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
              ctl.bi = BI_ADL; ctl.ai = AI_ZERO; ctl.cin = CIN_1;  // S + 1
            end
            3'd4: begin
              ctl.adl = ADL_ADD; ctl.ld_abl = 1'b1;
              ctl.bi = BI_ADL; ctl.ai = AI_ZERO; ctl.cin = CIN_1;
            end
            3'd5: begin
              ctl.adl = ADL_ADD; ctl.ld_abl = 1'b1;
              if (inst.mode == M_RTS) begin
                ctl.sb = SB_ADD; ctl.ld_s = 1'b1;
                ctl.db = DB_DL; ctl.bi = BI_DB; ctl.ai = AI_ZERO;
              end else begin
                ctl.db = DB_DL; ctl.p_db = 1'b1;
                ctl.bi = BI_ADL; ctl.ai = AI_ZERO; ctl.cin = CIN_1;
              end
            end
            default: begin
              if (inst.mode == M_RTS) begin
                // dummy read at the return address - 1, PC <- it + 1
                ctl.adl = ADL_ADD; ctl.adh = ADH_DL; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
                ctl.pcl_adl = 1'b1; ctl.pch_adh = 1'b1; ctl.pc_inc = 1'b1;
              end else begin
                ctl.adl = ADL_ADD; ctl.ld_abl = 1'b1;
                ctl.sb = SB_ADD; ctl.ld_s = 1'b1;
                ctl.db = DB_DL; ctl.bi = BI_DB; ctl.ai = AI_ZERO;
              end
            end
          endcase
        end

        M_BRK: begin
          unique case (ts.t)
            3'd2: begin
              ctl.adl = ADL_PCL; ctl.adh = ADH_PCH; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
              ctl.pc_inc = 1'b1;
            end
            3'd3: begin
              ctl.adl = ADL_S; ctl.adh = ADH_ONE; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
              ctl.db = DB_PCH; ctl.rw = 1'b0;
              ctl.ai = AI_SB; ctl.bi = BI_ADL;
            end
            3'd4, 3'd5: begin
              ctl.adl = ADL_ADD; ctl.ld_abl = 1'b1;
              ctl.db = (ts.t == 3'd4) ? DB_PCL : DB_P; ctl.rw = 1'b0;
              ctl.ai = AI_SB; ctl.bi = BI_ADL;
            end
            3'd6: begin
              ctl.adl = ADL_VECL; ctl.adh = ADH_NONE; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
              ctl.sb = SB_ADD; ctl.ld_s = 1'b1; ctl.i_src = FI_SET;
            end
            default: begin
              ctl.adl = ADL_NONE; ctl.ld_abl = 1'b1;
              ctl.db = DB_DL; ctl.bi = BI_DB; ctl.ai = AI_ZERO;
            end
          endcase
        end

        M_PUSH: begin
          if (ts.t == 3'd2) begin
            ctl.adl = ADL_PCL; ctl.adh = ADH_PCH; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
            ctl.sb = SB_S; ctl.ai = AI_SB; ctl.bi = BI_DB;        // S + FF
          end else begin
            ctl.adl = ADL_S; ctl.adh = ADH_ONE; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
            ctl.db = (inst.op == OP_PHA) ? DB_AC : DB_P; ctl.rw = 1'b0;
            ctl.sb = SB_ADD; ctl.ld_s = 1'b1;
          end
        end

        M_PULL: begin
          if (ts.t == 3'd2) begin
            ctl.adl = ADL_PCL; ctl.adh = ADH_PCH; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
            ctl.sb = SB_S; ctl.ai = AI_SB; ctl.bi = BI_NDB; ctl.cin = CIN_1;  // S + 1
          end else if (ts.t == 3'd3) begin
            ctl.adl = ADL_S; ctl.adh = ADH_ONE; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
            ctl.sb = SB_ADD; ctl.ld_s = 1'b1;
          end else begin
            ctl.adl = ADL_S; ctl.adh = ADH_ONE; ctl.ld_abl = 1'b1; ctl.ld_abh = 1'b1;
            ctl.db = DB_DIN;
            if (inst.op == OP_PLA) begin
              ctl.sb = SB_DB; ctl.ld_ac = 1'b1; ctl.n_src = FN_SB; ctl.z_sb = 1'b1;
            end else ctl.p_db = 1'b1;
          end
        end

        default: ;
      endcase

      // --------------------------------------------- operand access cycle
      if (access) begin
        unique case (inst.op)
          OP_LDA, OP_LDX, OP_LDY: begin
            ctl.db = DB_DIN; ctl.sb = SB_DB; ctl.n_src = FN_SB; ctl.z_sb = 1'b1;
            ctl.ld_ac = (inst.op == OP_LDA);
            ctl.ld_x  = (inst.op == OP_LDX);
            ctl.ld_y  = (inst.op == OP_LDY);
          end
          OP_ORA, OP_AND, OP_EOR, OP_ADC, OP_SBC, OP_CMP, OP_BIT: begin
            ctl.db = DB_DIN; ctl.sb = SB_AC; ctl.ai = AI_SB;
            ctl.bi = (inst.op inside {OP_SBC, OP_CMP}) ? BI_NDB : BI_DB;
            unique case (inst.op)
              OP_ORA:  ctl.alu = ALU_OR;
              OP_AND, OP_BIT: ctl.alu = ALU_AND;
              OP_EOR:  ctl.alu = ALU_EOR;
              default: ctl.alu = ALU_SUM;
            endcase
            ctl.cin = (inst.op inside {OP_ADC, OP_SBC}) ? CIN_C :
                      (inst.op == OP_CMP) ? CIN_1 : CIN_0;
            ctl.daa = flag_d && (inst.op == OP_ADC);
            ctl.dsa = flag_d && (inst.op == OP_SBC);
            if (inst.op == OP_BIT) begin
              ctl.n_src = FN_DB; ctl.v_src = FV_DB6;
            end
          end
          OP_CPX, OP_CPY: begin
            ctl.db = DB_DIN; ctl.sb = (inst.op == OP_CPX) ? SB_X : SB_Y;
            ctl.ai = AI_SB; ctl.bi = BI_NDB; ctl.cin = CIN_1;
          end
          OP_STA: begin ctl.db = DB_AC; ctl.rw = 1'b0; end
          OP_STX: begin ctl.sb = SB_X; ctl.db = DB_SB; ctl.rw = 1'b0; end
          OP_STY: begin ctl.sb = SB_Y; ctl.db = DB_SB; ctl.rw = 1'b0; end
          default: ;   // read-modify-write: plain read, see SD1/SD2
        endcase
      end

      // --------------------------------------------- read-modify-write
      if (ts.sd1) begin
        ctl = CTL_IDLE;
        ctl.db = DB_DL; ctl.rw = 1'b0;          // write back unmodified
        unique case (inst.op)
          OP_ASL, OP_ROL: begin
            ctl.sb = SB_DB; ctl.ai = AI_SB; ctl.bi = BI_DB;
            ctl.cin = (inst.op == OP_ROL) ? CIN_C : CIN_0;
          end
          OP_LSR, OP_ROR: begin
            ctl.sb = SB_DB; ctl.ai = AI_SB; ctl.bi = BI_DB; ctl.alu = ALU_SR;
            ctl.cin = (inst.op == OP_ROR) ? CIN_C : CIN_0;
          end
          OP_INC: begin ctl.ai = AI_ZERO; ctl.bi = BI_DB; ctl.cin = CIN_1; end
          default: begin ctl.sb = SB_DB; ctl.ai = AI_SB; ctl.bi = BI_ADL; end  // DEC: + FF
        endcase
      end else if (ts.sd2) begin
        ctl = CTL_IDLE;
        ctl.sb = SB_ADD; ctl.db = DB_SB; ctl.rw = 1'b0;
        ctl.n_src = FN_SB; ctl.z_sb = 1'b1;
        if (inst.op inside {OP_ASL, OP_ROL, OP_LSR, OP_ROR}) ctl.c_src = FC_ACR;
      end
    end
  end

endmodule
