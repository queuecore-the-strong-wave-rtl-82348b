// qc_gpr: the 16 x 32-bit general purpose registers of QueueCore.
//
// Register 0 serves as the base register a0 of loads, stores, lda, jump and
// call. RD asynchronous read ports (one per instruction of the issue group) and
// one synchronous write port, used by setr. All registers reset to zero. The
// document gives only the count (16); ports, reset value and the role of
// register 0 are this design's choice.
module qc_gpr #(
  parameter int unsigned N  = 16,
  parameter int unsigned RD = 4,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] raddr_i [RD],
  output logic [31:0]   rdata_o [RD],
  input  logic          we_i,
  input  logic [AW-1:0] waddr_i,
  input  logic [31:0]   wdata_i
);

  logic [31:0] r [N];

  always_comb
    for (int p = 0; p < RD; p++) rdata_o[p] = r[raddr_i[p]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) r[i] <= '0;
    end else if (we_i) begin
      r[waddr_i] <= wdata_i;
    end
  end

endmodule
