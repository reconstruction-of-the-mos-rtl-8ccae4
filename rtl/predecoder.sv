// predecoder: looks at the byte on the external data bus during the
// opcode-fetch cycle and decodes it before it is clocked into the
// instruction register.
//
// Combinational. 'inst' is the decoded opcode (addressing mode, operation,
// access class, write-back), and 'cycle_num' the instruction's longest
// length in clock cycles, the "cycle#" that the timing generator loads in
// the same cycle. The split into a predecoder that feeds both the IR and the
// timing generator follows the document's block structure; the decode table
// itself is the standard 6502 instruction set (cpu_pkg::decode_opcode).
module predecoder
  import cpu_pkg::*;
(
  input  logic [7:0] databus,
  output dec_t       inst,
  output logic [2:0] cycle_num,
  output kind_t      kind
);
  always_comb begin
    inst      = decode_opcode(databus);
    cycle_num = inst.cycles;
    kind      = inst.kind;
  end
endmodule
