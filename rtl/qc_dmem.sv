// qc_dmem: QueueCore data memory, WORDS x 32 bits (the document's 2048-word
// memory), byte-addressed and little-endian.
//
// Two access ports, one per load/store unit, each with an asynchronous word
// read and a synchronous write with byte enables; a third read-only port lets a
// host or testbench inspect the memory. When both ports write the same byte in
// one cycle, port 1 (the later instruction of the group) wins, which keeps
// program order. The port count and timing are this design's choice.
module qc_dmem #(
  parameter int unsigned WORDS = 2048,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr_i  [2],
  input  logic          we_i    [2],
  input  logic [3:0]    be_i    [2],
  input  logic [31:0]   wdata_i [2],
  output logic [31:0]   rdata_o [2],
  input  logic [AW-1:0] dbg_addr_i,
  output logic [31:0]   dbg_data_o
);

  logic [31:0] mem [WORDS];

  assign rdata_o[0] = mem[addr_i[0]];
  assign rdata_o[1] = mem[addr_i[1]];
  assign dbg_data_o = mem[dbg_addr_i];

  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++)
      for (int b = 0; b < 4; b++)
        if (we_i[p] && be_i[p][b]) mem[addr_i[p]][8*b +: 8] <= wdata_i[p][8*b +: 8];
  end

endmodule
