// qc_stack: the 64 x 32-bit stack of QueueCore that holds the return state of
// calls and interrupts.
//
// A call or an interrupt saves two words at once, a frame: word 0 is the return
// address (PC+2 for a call) and word 1 packs the queue pointers
// {8'b0, LQH, QH, QT}. rfc and the return from interrupt pop the frame. The
// stack therefore holds DEPTH/2 frames. push_i and pop_i act at the clock edge;
// top0_o/top1_o show the newest frame; a push takes priority over a pop in the
// same cycle. A push when full or a pop when empty is
// ignored and raises err_o for that cycle. The depth and width are the
// document's ("Stack 64X32"); the two-word frame is this design's choice.
module qc_stack #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned DW    = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push_i,
  input  logic [DW-1:0] push0_i,
  input  logic [DW-1:0] push1_i,
  input  logic          pop_i,
  output logic [DW-1:0] top0_o,
  output logic [DW-1:0] top1_o,
  output logic          empty_o,
  output logic          full_o,
  output logic          err_o
);

  logic [DW-1:0] mem [DEPTH];
  logic [AW:0]   sp;            // number of words held

  assign empty_o = (sp == '0);
  assign full_o  = (sp > (AW+1)'(DEPTH - 2));
  assign top0_o  = mem[AW'(sp - (AW+1)'(2))];
  assign top1_o  = mem[AW'(sp - (AW+1)'(1))];
  assign err_o   = (push_i && full_o) || (pop_i && !push_i && empty_o);

  always_ff @(posedge clk) begin
    if (push_i && !full_o) begin
      mem[AW'(sp)]                 <= push0_i;
      mem[AW'(sp + (AW+1)'(1))]    <= push1_i;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  sp <= '0;
    else if (push_i && !full_o)  sp <= sp + (AW+1)'(2);
    else if (pop_i && !push_i && !empty_o) sp <= sp - (AW+1)'(2);
  end

endmodule
