// qc_bru: branch unit of QueueCore (one per core).
//
// Handles the control-transfer instructions at the issue stage and the entry
// into an interrupt. All outputs are combinational; the core applies them at
// the next clock edge.
//   b, beq, blt, ble, bgt, bge : PC-relative, target = PC + 2 + 2*sext(field).
//       The conditional forms test the queue word at QH (consumed) against zero.
//       A taken branch renews the queue pointers: QH and LQH are set to QT, so
//       the next basic block starts on an empty queue.
//   jump : target = a0 + displacement, pointers renewed as for a taken branch.
//   call : target = a0 + displacement (the document's "[a0 + targ] => PC");
//          saves PC+2 and {LQH, QH, QT} on the stack; pointers stay, so the
//          callee sees the caller's queue.
//   rfc  : return from call, restores PC and pointers from the stack.
//   reti : the same for an interrupt, and re-enables interrupts.
//   interrupt entry (irq_take_i): saves the address of the next instruction
//          and the pointers, jumps to IRQ_VECTOR, gives the handler a fresh
//          queue region starting at QT, and disables interrupts.
// What is saved and renewed follows the document's branch, call and interrupt
// handling slides. The condition tests, target arithmetic, vector address and
// the fresh-region reading of "interrupt queue allocation" are this design's.
module qc_bru
  import qc_pkg::*;
#(
  parameter pc_t IRQ_VECTOR = 16'h0100
) (
  input  logic        valid_i,     // a control instruction issues this cycle
  input  logic [7:0]  op_i,
  input  logic [7:0]  fld_i,
  input  pc_t         pc_i,        // address of the control instruction
  input  word_t       cond_i,      // queue word at QH
  input  word_t       base_i,      // a0
  input  logic [15:0] disp_i,      // displacement (convop-extended)
  input  qstate_t     q_after_i,   // pointers after the instruction
  input  word_t       top0_i,      // newest stack frame: return address
  input  word_t       top1_i,      //                     saved pointers
  input  logic        irq_take_i,
  input  pc_t         irq_pc_i,    // next instruction when an interrupt is taken
  input  qstate_t     q_now_i,     // pointers when an interrupt is taken
  output logic        redirect_o,
  output pc_t         target_o,
  output logic        q_load_o,    // replace the pointers with q_new_o
  output qstate_t     q_new_o,
  output logic        push_o,
  output word_t       push0_o,
  output word_t       push1_o,
  output logic        pop_o,
  output logic        ie_set_o,
  output logic        ie_clr_o,
  output logic        taken_o,     // conditional branch taken
  output logic        not_taken_o  // conditional branch not taken
);

  qstate_t renew, saved;
  pc_t     rel;

  assign renew = '{lqh: q_after_i.qt, qh: q_after_i.qt, qt: q_after_i.qt};
  assign saved = '{lqh: top1_i[23:16], qh: top1_i[15:8], qt: top1_i[7:0]};
  assign rel   = pc_i + 16'd2 + (sext8_to16(fld_i) << 1);

  always_comb begin
    logic cond;
    redirect_o  = 1'b0;
    target_o    = '0;
    q_load_o    = 1'b0;
    q_new_o     = q_after_i;
    push_o      = 1'b0;
    push0_o     = '0;
    push1_o     = '0;
    pop_o       = 1'b0;
    ie_set_o    = 1'b0;
    ie_clr_o    = 1'b0;
    taken_o     = 1'b0;
    not_taken_o = 1'b0;
    unique case (op_i)
      OP_BEQ:  cond = (cond_i == '0);
      OP_BLT:  cond = cond_i[31];
      OP_BLE:  cond = cond_i[31] || (cond_i == '0);
      OP_BGT:  cond = !cond_i[31] && (cond_i != '0);
      OP_BGE:  cond = !cond_i[31];
      default: cond = 1'b1;
    endcase
    if (irq_take_i) begin
      redirect_o = 1'b1;
      target_o   = IRQ_VECTOR;
      push_o     = 1'b1;
      push0_o    = {16'd0, irq_pc_i};
      push1_o    = {8'd0, q_now_i.lqh, q_now_i.qh, q_now_i.qt};
      q_load_o   = 1'b1;
      q_new_o    = '{lqh: q_now_i.qt, qh: q_now_i.qt, qt: q_now_i.qt};
      ie_clr_o   = 1'b1;
    end else if (valid_i) begin
      unique case (op_i)
        OP_B, OP_BEQ, OP_BLT, OP_BLE, OP_BGT, OP_BGE: begin
          taken_o     = cond;
          not_taken_o = !cond;
          redirect_o  = cond;
          target_o    = rel;
          q_load_o    = cond;
          q_new_o     = cond ? renew : q_after_i;
        end
        OP_JUMP: begin
          redirect_o = 1'b1;
          target_o   = base_i[15:0] + disp_i;
          q_load_o   = 1'b1;
          q_new_o    = renew;
        end
        OP_CALL: begin
          redirect_o = 1'b1;
          target_o   = base_i[15:0] + disp_i;
          push_o     = 1'b1;
          push0_o    = {16'd0, pc_i + 16'd2};
          push1_o    = {8'd0, q_after_i.lqh, q_after_i.qh, q_after_i.qt};
        end
        OP_RFC, OP_RETI: begin
          redirect_o = 1'b1;
          target_o   = top0_i[15:0];
          pop_o      = 1'b1;
          q_load_o   = 1'b1;
          q_new_o    = saved;
          ie_set_o   = (op_i == OP_RETI);
        end
        default: ;
      endcase
    end
  end

endmodule
