// qc_ctrl: control state machine of QueueCore.
//
// States: RUN (issue enabled), DRAIN (a halt instruction has issued; the
// execute stage finishes what is in flight) and HALTED (halted_o high, nothing
// issues until reset). It also decides when an interrupt is taken: in RUN, with
// interrupts enabled and the request high, the issue stage is told to issue
// nothing and the branch unit enters the interrupt instead. The interrupt
// enable flag is set at reset (this design's choice), cleared on interrupt entry
// and set again by reti. The document shows per-stage state machines for
// pipeline synchronization without their states; this single controller is
// this design's simplification of them.
module qc_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic halt_issued_i,   // a halt instruction issued this cycle
  input  logic exe_busy_i,      // execute stage holds instructions
  input  logic irq_i,
  input  logic ie_set_i,
  input  logic ie_clr_i,
  output logic issue_en_o,
  output logic irq_take_o,
  output logic halted_o,
  output logic ie_o
);

  typedef enum logic [1:0] {S_RUN, S_DRAIN, S_HALTED} state_e;
  state_e state_q;

  assign issue_en_o = (state_q == S_RUN) && !irq_take_o;
  assign irq_take_o = (state_q == S_RUN) && irq_i && ie_o;
  assign halted_o   = (state_q == S_HALTED);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_RUN;
      ie_o    <= 1'b1;
    end else begin
      unique case (state_q)
        S_RUN:    if (halt_issued_i) state_q <= S_DRAIN;
        S_DRAIN:  if (!exe_busy_i)   state_q <= S_HALTED;
        default:  state_q <= S_HALTED;
      endcase
      if (ie_clr_i)      ie_o <= 1'b0;
      else if (ie_set_i) ie_o <= 1'b1;
    end
  end

endmodule
