// ball_memory: the board's program and data memory for the 6502.
//
// DEPTH bytes of read/write memory, decoded on the low address bits and
// repeated through the 64 KiB address space. Reset (re)loads every byte
// from the bouncing-ball program image (ball_program_pkg), so the program
// can both run from it and keep its variables in it (0070h-0073h lie
// inside the image). Reads are asynchronous: 'rdata' follows 'addr' in the
// same cycle, as the processor core expects. A write happens at the rising
// clock edge when 'we' is high. The reload-on-reset memory is this
// design's reading of the document's initialisation ROM; the size is
// assumed.
module ball_memory
  import ball_program_pkg::*;
#(
  parameter int DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] addr,
  input  logic        we,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata
);
  localparam int AW = $clog2(DEPTH);
  logic [7:0] mem [DEPTH];
  logic [AW-1:0] a;

  assign a     = addr[AW-1:0];
  assign rdata = mem[a];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= prog_byte(i);
    end else if (we) begin
      mem[a] <= wdata;
    end
  end
endmodule
