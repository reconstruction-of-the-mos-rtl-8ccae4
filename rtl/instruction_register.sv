// instruction_register: holds the opcode of the instruction being executed
// together with its predecoded form.
//
// It loads at the clock edge that ends the opcode-fetch cycle, when the
// timing generator raises SYNC, and holds until the next SYNC, so the
// random control logic still sees the previous instruction during the
// opcode-fetch cycle (that is when it finishes the previous instruction's
// write-back). Reset loads a NOP. 'ce' is the cycle enable (RDY).
// Loading on SYNC and holding the predecoded bits next to the opcode
// follow the original block structure; the NOP reset value is this
// design's choice.
module instruction_register
  import cpu_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic       sync,
  input  logic [7:0] opcode_in,
  input  dec_t       inst_in,
  output logic [7:0] opcode,
  output dec_t       inst
);
  always_ff @(posedge clk) begin
    if (rst) begin
      opcode <= OPC_NOP;
      inst   <= decode_opcode(OPC_NOP);
    end else if (ce && sync) begin
      opcode <= opcode_in;
      inst   <= inst_in;
    end
  end
endmodule
