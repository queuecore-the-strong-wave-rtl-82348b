// qc_imem: QueueCore program memory, WORDS x 32 bits (the document's 2048-word
// memory). Each word holds two 16-bit instructions, the one at the lower byte
// address in bits [15:0], as in the document's memory dump where MEMORY[0] reads
// 00310030.
//
// The fetch port reads an aligned 8-byte block (two words, four instructions)
// asynchronously: faddr_i is the byte address of the block, bits [2:0] ignored.
// A write port loads the program one word at a time. Port layout and timing are
// this design's choice.
module qc_imem #(
  parameter int unsigned WORDS = 2048,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we_i,
  input  logic [AW-1:0] waddr_i,
  input  logic [31:0]   wdata_i,
  input  logic [15:0]   faddr_i,
  output logic [63:0]   fdata_o
);

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] w0, w1;

  assign w0      = AW'({faddr_i[15:3], 1'b0});
  assign w1      = AW'({faddr_i[15:3], 1'b1});
  assign fdata_o = {mem[w1], mem[w0]};

  always_ff @(posedge clk)
    if (we_i) mem[waddr_i] <= wdata_i;

endmodule
