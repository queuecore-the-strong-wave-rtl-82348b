// qc_fetch: instruction fetch unit with a small instruction window buffer (IWB).
//
// Every cycle in which the buffer has room for a whole block, the unit reads
// the aligned 8-byte block at its fetch address (four 16-bit instructions, the
// document's fetch width) and appends it to the buffer. The buffer is a
// DEPTH-entry shift queue: the issue stage sees the N oldest entries
// (win_o[0] is the oldest, whose byte address is head_pc_o) and removes the
// pop_i it issued, in the same cycle as new ones arrive.
// A redirect (branch, call, return, interrupt) empties the buffer, moves the
// fetch address to the aligned block of the target and, for that first block,
// skips the instructions that lie before the target. The redirect takes effect
// at the next clock edge and discards that cycle's pop and fetch; the first
// instruction of the target reaches the window one cycle later.
// The buffer depth and redirect timing are this design's choice; the document
// gives the fetch width (8 bytes) and calls the buffer "small".
module qc_fetch
  import qc_pkg::*;
#(
  parameter int unsigned N     = GROUP,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned CW   = $clog2(DEPTH+1),
  localparam int unsigned NW   = $clog2(N+1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          redirect_i,
  input  pc_t           target_i,
  input  logic [NW-1:0] pop_i,
  output pc_t           faddr_o,     // byte address of the block being fetched
  input  logic [63:0]   fdata_i,     // that block, instruction 0 in bits [15:0]
  output logic [IW-1:0] win_o [N],
  output logic [NW-1:0] avail_o,     // valid entries in win_o (0..N)
  output pc_t           head_pc_o
);

  logic [IW-1:0] buf_q [DEPTH];
  logic [CW-1:0] cnt_q;
  pc_t           fpc_q, head_q;
  logic [1:0]    skip_q;            // instructions to drop from the next block

  assign faddr_o   = {fpc_q[15:3], 3'b000};
  assign head_pc_o = head_q;

  always_comb begin
    for (int k = 0; k < N; k++) win_o[k] = buf_q[k];
    avail_o = (cnt_q >= CW'(N)) ? NW'(N) : NW'(cnt_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q  <= '0;
      fpc_q  <= '0;
      head_q <= '0;
      skip_q <= '0;
      for (int k = 0; k < DEPTH; k++) buf_q[k] <= '0;
    end else if (redirect_i) begin
      cnt_q  <= '0;
      fpc_q  <= {target_i[15:3], 3'b000};
      skip_q <= target_i[2:1];
      head_q <= target_i;
    end else begin
      logic [IW-1:0] nb [DEPTH];
      int unsigned   c, push;
      c = int'(cnt_q) - int'(pop_i);
      for (int k = 0; k < DEPTH; k++)
        nb[k] = (k + int'(pop_i) < DEPTH) ? buf_q[k + int'(pop_i)] : '0;
      push = 0;
      if (int'(cnt_q) + 4 - int'(skip_q) <= DEPTH) begin
        for (int s = 0; s < 4; s++)
          if (s >= int'(skip_q)) begin
            nb[c + push] = fdata_i[16*s +: 16];
            push++;
          end
        fpc_q  <= fpc_q + 16'd8;
        skip_q <= '0;
      end
      for (int k = 0; k < DEPTH; k++) buf_q[k] <= nb[k];
      cnt_q  <= CW'(c + push);
      head_q <= head_q + pc_t'(2 * int'(pop_i));
    end
  end

endmodule
