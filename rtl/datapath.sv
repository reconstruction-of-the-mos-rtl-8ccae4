// datapath: the 6502 data path with its internal buses built as
// multiplexers.
//
// Four internal buses carry the transfers: DB (data bus), SB (special bus),
// ADL and ADH (address low / high). Each is a multiplexer whose select comes
// from the control word; a bus with nothing selected reads 8'hFF, standing
// in for the precharged bus of the original chip (the decrement of S uses
// this, as SB + ADL with SB idle). The registers on the buses are PCL/PCH,
// the stack pointer, A, X, Y (register_file), the ALU input registers AI
// and BI, the address bus registers ABL/ABH, the input data latch DL and
// the status register P.
//
// Timing, one clock per machine cycle:
//  * The external address is formed in the cycle it is used: ABL/ABH are
//    transparent when loaded (address = ADL/ADH bus) and hold otherwise.
//  * DL captures the data input at the end of every read cycle.
//  * AI and BI (and the ALU operation with them) load at the end of a
//    cycle; the ALU output, the adder hold value ADD, is then valid for
//    the whole next cycle and holds until AI/BI load again.
//  * The program counter loads {PCH select, PCL select} + I/PC each cycle:
//    the select register picks the PC itself or the ADL/ADH buses, then
//    the incrementer adds one.
//  * data_out is DB; 'rw' low marks a write cycle.
// Two paths are this design's own, to fit the two-phase transfers of the
// original into one clock: DB can take the data input directly (DB_DIN),
// so an operand can reach the ALU or a register in the cycle it is read,
// and ADH can take ADD directly, so a page-crossing address fix can use it
// while SB carries an operand.
module datapath
  import cpu_pkg::*;
#(
  parameter logic [15:0] RESET_PC = 16'h0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  ctl_t        ctl,
  input  logic [7:0]  ir,
  input  logic [7:0]  data_in,
  output logic [15:0] addr,
  output logic [7:0]  data_out,
  output logic        rw,
  output logic        acr,
  output logic        brc,
  output logic        dl7,
  output logic        flag_d,
  output logic [7:0]  reg_a,
  output logic [7:0]  reg_x,
  output logic [7:0]  reg_y,
  output logic [7:0]  reg_s,
  output logic [7:0]  reg_p,
  output logic [15:0] reg_pc
);
  logic [7:0] pcl, pch, abl, abh, dl, ai, bi;
  logic [7:0] add;
  logic [7:0] adl_bus, adh_bus, db_bus, sb_bus, db_nosb, sb_nodb;
  logic [7:0] ac, x, y, s, p;
  logic       avr, hc;
  alu_op_t    alu_op_q;
  logic       cin_q, daa_q, dsa_q;
  logic [7:0] pcls, pchs;
  logic       cin_now;
  logic       flag_c;

  // ---------------------------------------------------------------- buses
  always_comb begin
    unique case (ctl.adl)
      ADL_PCL:  adl_bus = pcl;
      ADL_DL:   adl_bus = dl;
      ADL_ADD:  adl_bus = add;
      ADL_S:    adl_bus = s;
      ADL_VECL: adl_bus = 8'hFE;
      default:  adl_bus = 8'hFF;
    endcase
    unique case (ctl.sb)
      SB_S:    sb_nodb = s;
      SB_ADD:  sb_nodb = add;
      SB_X:    sb_nodb = x;
      SB_Y:    sb_nodb = y;
      SB_AC:   sb_nodb = ac;
      default: sb_nodb = 8'hFF;
    endcase
    unique case (ctl.db)
      DB_DL:   db_nosb = dl;
      DB_DIN:  db_nosb = data_in;
      DB_PCL:  db_nosb = pcl;
      DB_PCH:  db_nosb = pch;
      DB_AC:   db_nosb = ac;
      DB_P:    db_nosb = p;
      default: db_nosb = 8'hFF;
    endcase
    // SB/DB pass transistors: at most one direction is used in a cycle
    db_bus = (ctl.db == DB_SB) ? sb_nodb : db_nosb;
    sb_bus = (ctl.sb == SB_DB) ? db_nosb : sb_nodb;
    unique case (ctl.adh)
      ADH_PCH:  adh_bus = pch;
      ADH_DL:   adh_bus = dl;
      ADH_SB:   adh_bus = sb_bus;
      ADH_ZERO: adh_bus = 8'h00;
      ADH_ONE:  adh_bus = 8'h01;
      ADH_ADD:  adh_bus = add;
      default:  adh_bus = 8'hFF;
    endcase
  end

  // ------------------------------------------------------ address output
  assign addr     = {ctl.ld_abh ? adh_bus : abh, ctl.ld_abl ? adl_bus : abl};
  assign data_out = db_bus;
  assign rw       = ctl.rw;
  assign dl7      = dl[7];

  // ------------------------------------------------------ program counter
  always_comb begin
    pcls = ctl.pcl_adl ? adl_bus : pcl;
    pchs = ctl.pch_adh ? adh_bus : pch;
  end

  always_comb begin
    unique case (ctl.cin)
      CIN_1:   cin_now = 1'b1;
      CIN_C:   cin_now = flag_c;
      CIN_ACR: cin_now = acr;
      default: cin_now = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      {pch, pcl} <= RESET_PC;
      abl <= RESET_PC[7:0];
      abh <= RESET_PC[15:8];
      dl  <= 8'h00;
      ai  <= 8'h00;
      bi  <= 8'h00;
      alu_op_q <= ALU_SUM;
      cin_q <= 1'b0;
      daa_q <= 1'b0;
      dsa_q <= 1'b0;
    end else if (ce) begin
      {pch, pcl} <= {pchs, pcls} + {15'd0, ctl.pc_inc};
      if (ctl.ld_abl) abl <= adl_bus;
      if (ctl.ld_abh) abh <= adh_bus;
      if (ctl.rw && !ctl.dl_hold) dl <= data_in;
      unique case (ctl.ai)
        AI_SB:   ai <= sb_bus;
        AI_ZERO: ai <= 8'h00;
        default: ;
      endcase
      unique case (ctl.bi)
        BI_DB:   bi <= db_bus;
        BI_NDB:  bi <= ~db_bus;
        BI_ADL:  bi <= adl_bus;
        default: ;
      endcase
      if (ctl.ai != AI_HOLD || ctl.bi != BI_HOLD) begin
        alu_op_q <= ctl.alu;
        cin_q    <= cin_now;
        daa_q    <= ctl.daa;
        dsa_q    <= ctl.dsa;
      end
    end
  end

  alu6502 u_alu (
    .ai(ai), .bi(bi), .cin(cin_q), .op(alu_op_q), .daa(daa_q), .dsa(dsa_q),
    .result(add), .acr(acr), .avr(avr), .hc(hc)
  );

  register_file u_regs (
    .clk(clk), .rst(rst), .ce(ce), .sb(sb_bus),
    .ld_ac(ctl.ld_ac), .ld_x(ctl.ld_x), .ld_y(ctl.ld_y), .ld_s(ctl.ld_s),
    .ac(ac), .x(x), .y(y), .s(s)
  );

  status_register u_p (
    .clk(clk), .rst(rst), .ce(ce), .ir(ir), .sb(sb_bus), .db(db_bus),
    .acr(acr), .avr(avr), .n_src(ctl.n_src), .z_sb(ctl.z_sb),
    .c_src(ctl.c_src), .v_src(ctl.v_src), .i_src(ctl.i_src),
    .d_ir5(ctl.d_ir5), .p_db(ctl.p_db),
    .p(p), .flag_c(flag_c), .flag_d(flag_d), .brc(brc)
  );

  assign reg_a  = ac;
  assign reg_x  = x;
  assign reg_y  = y;
  assign reg_s  = s;
  assign reg_p  = p;
  assign reg_pc = {pch, pcl};
endmodule
