// qc_qreg: circular queue register (QREG).
//
// DEPTH entries of DW data bits plus one valid bit each (the document's
// "256*33 QREG file"). The entries are addressed by the wrapping queue pointers
// QH, QT and LQH, so the file itself is a plain multi-ported register array; the
// circular behaviour lives in the pointer arithmetic of the QCU.
//
// The valid bit is this design's scoreboard: the issue stage clears it for the
// DEST entry of every instruction it issues (clr_*), and the execute stage sets
// it again when it writes the result (we_*). An instruction may issue only when
// the entries it reads are valid. If a set and a clear name the same entry in
// one cycle, the clear wins. Reset clears all valid bits; data is not reset.
//
// Ports: RD asynchronous read ports, WR synchronous write ports and WR clear
// ports. Write ports are expected to name different entries; when two do, the
// higher-numbered port wins. Port counts are this design's choice (two reads per
// instruction of a 4-wide group, one write per ALU slot).
module qc_qreg #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned DW    = 32,
  parameter int unsigned RD    = 8,
  parameter int unsigned WR    = 4,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] raddr_i  [RD],
  output logic [DW-1:0] rdata_o  [RD],
  output logic          rvalid_o [RD],
  input  logic          we_i     [WR],
  input  logic [AW-1:0] waddr_i  [WR],
  input  logic [DW-1:0] wdata_i  [WR],
  input  logic          clr_i    [WR],
  input  logic [AW-1:0] caddr_i  [WR]
);

  logic [DW-1:0] data  [DEPTH];
  logic          valid [DEPTH];

  always_comb begin
    for (int r = 0; r < RD; r++) begin
      rdata_o[r]  = data[raddr_i[r]];
      rvalid_o[r] = valid[raddr_i[r]];
    end
  end

  always_ff @(posedge clk) begin
    for (int w = 0; w < WR; w++)
      if (we_i[w]) data[waddr_i[w]] <= wdata_i[w];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < DEPTH; e++) valid[e] <= 1'b0;
    end else begin
      for (int w = 0; w < WR; w++)
        if (we_i[w]) valid[waddr_i[w]] <= 1'b1;
      for (int w = 0; w < WR; w++)
        if (clr_i[w]) valid[caddr_i[w]] <= 1'b0;
    end
  end

endmodule
