// cpu6502: a 6502 processor core built from flip-flops and multiplexers,
// on a single clock.
//
// The structure is the document's: a predecoder decodes the opcode while it
// is on the data bus, the instruction register (IR) takes it on SYNC, the
// timing generator (a Mealy machine) steps the T-states, the random control
// logic turns opcode and T-state into the control word, and the datapath
// (internal buses as multiplexers, register file, ALU) carries it out. The
// latches and two-phase clock of the original are replaced by edge
// triggered flip-flops on one clock: one clock is one machine cycle.
//
// Bus interface: 'addr', 'data_out' and 'rw' are valid during the cycle;
// memory must return 'data_in' combinationally for the address of the same
// cycle (asynchronous read); a write (rw = 0) is committed at the rising
// clock edge that ends the cycle, and only when 'rdy' is high. 'rdy' low
// freezes the whole core (a cycle enable; the original stops only on
// reads). 'sync' is high in an opcode-fetch cycle. Reset starts the
// first opcode fetch at RESET_PC instead of reading a reset vector, because
// the document's demonstration program starts at address 0. Interrupt
// inputs (IRQ, NMI) are not implemented; BRK is.
// Cycle counts are those of the NMOS 6502, including the extra cycle of a
// taken branch, a branch page crossing and an indexed read that crosses a
// page.
module cpu6502
  import cpu_pkg::*;
#(
  parameter logic [15:0] RESET_PC = 16'h0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        rdy,
  input  logic [7:0]  data_in,
  output logic [15:0] addr,
  output logic [7:0]  data_out,
  output logic        rw,
  output logic        sync,
  output logic [7:0]  reg_a,
  output logic [7:0]  reg_x,
  output logic [7:0]  reg_y,
  output logic [7:0]  reg_s,
  output logic [7:0]  reg_p,
  output logic [15:0] reg_pc,
  output logic [7:0]  reg_ir
);
  dec_t       pre_inst, ir_inst;
  logic [2:0] pre_cycles;
  kind_t      pre_kind;
  logic [7:0] ir;
  tstate_t    ts;
  ctl_t       ctl;
  logic       acr, brc, dl7, flag_d;

  predecoder u_pre (
    .databus(data_in), .inst(pre_inst), .cycle_num(pre_cycles), .kind(pre_kind)
  );

  instruction_register u_ir (
    .clk(clk), .rst(rst), .ce(rdy), .sync(sync), .opcode_in(data_in),
    .inst_in(pre_inst), .opcode(ir), .inst(ir_inst)
  );

  timing_generator u_tg (
    .clk(clk), .rst(rst), .ce(rdy), .cycle_num(pre_cycles), .kind_in(pre_kind),
    .brc(brc), .acr(acr), .page_cross(acr ^ dl7), .ts(ts), .sync(sync)
  );

  random_control_logic u_rcl (
    .inst(ir_inst), .ts(ts), .flag_d(flag_d), .dl7(dl7), .ctl(ctl)
  );

  datapath #(.RESET_PC(RESET_PC)) u_dp (
    .clk(clk), .rst(rst), .ce(rdy), .ctl(ctl), .ir(ir), .data_in(data_in),
    .addr(addr), .data_out(data_out), .rw(rw), .acr(acr), .brc(brc), .dl7(dl7),
    .flag_d(flag_d),
    .reg_a(reg_a), .reg_x(reg_x), .reg_y(reg_y), .reg_s(reg_s), .reg_p(reg_p),
    .reg_pc(reg_pc)
  );

  assign reg_ir = ir;
endmodule
