// tb_qc_bru: self-checking test of the branch unit. For random queue words it
// checks the taken/not-taken decision of beq/blt/ble/bgt/bge against signed
// comparisons made here, the PC-relative target, the pointer renewal on a taken
// branch, jump and call targets from a0 + displacement, the call frame, the
// restore of rfc and reti, and the interrupt entry (vector, saved frame, fresh
// queue region, interrupt enable).
module tb_qc_bru;
  import qc_pkg::*;
  logic        valid, irq_take;
  logic [7:0]  op, fld;
  pc_t         pc, irq_pc, target;
  word_t       cond, base, top0, top1, push0, push1;
  logic [15:0] disp;
  qstate_t     q_after, q_now, q_new;
  logic        redirect, q_load, push, pop, ie_set, ie_clr, taken, ntaken;
  int checks = 0, failures = 0;

  qc_bru #(.IRQ_VECTOR(16'h0100)) dut (
    .valid_i(valid), .op_i(op), .fld_i(fld), .pc_i(pc), .cond_i(cond), .base_i(base),
    .disp_i(disp), .q_after_i(q_after), .top0_i(top0), .top1_i(top1), .irq_take_i(irq_take),
    .irq_pc_i(irq_pc), .q_now_i(q_now), .redirect_o(redirect), .target_o(target),
    .q_load_o(q_load), .q_new_o(q_new), .push_o(push), .push0_o(push0), .push1_o(push1),
    .pop_o(pop), .ie_set_o(ie_set), .ie_clr_o(ie_clr), .taken_o(taken), .not_taken_o(ntaken));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(input string s, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s op=%h: %h expected %h", s, op, got, exp); end
  endtask

  task automatic rnd();
    valid = 1; irq_take = 0;
    fld = $urandom; pc = 16'($urandom) & 16'hFFFE; base = $urandom; disp = 16'($urandom);
    q_after = qstate_t'($urandom); q_now = qstate_t'($urandom);
    top0 = $urandom; top1 = $urandom; irq_pc = 16'($urandom);
    cond = ($urandom % 4 == 0) ? 32'd0 : $urandom;
  endtask

  initial begin
    for (int n = 0; n < 400; n++) begin
      logic [7:0] cops [6] = '{OP_B, OP_BEQ, OP_BLT, OP_BLE, OP_BGT, OP_BGE};
      foreach (cops[i]) begin
        logic t;
        rnd(); op = cops[i];
        #1;
        case (op)
          OP_BEQ:  t = (cond == 0);
          OP_BLT:  t = ($signed(cond) < 0);
          OP_BLE:  t = ($signed(cond) <= 0);
          OP_BGT:  t = ($signed(cond) > 0);
          OP_BGE:  t = ($signed(cond) >= 0);
          default: t = 1;
        endcase
        ck("taken", {taken, ntaken, redirect, q_load}, {t, !t, t, t});
        if (t) begin
          ck("target", {48'd0, target}, {48'd0, 16'(int'(pc) + 2 + 2 * int'($signed(fld)))});
          ck("renew", q_new, {q_after.qt, q_after.qt, q_after.qt});
        end
        ck("no stack", {push, pop}, 0);
      end
      rnd(); op = OP_JUMP; #1;
      ck("jump", {redirect, target, q_load, q_new, push}, {1'b1, 16'(base) + disp, 1'b1, q_after.qt, q_after.qt, q_after.qt, 1'b0});
      rnd(); op = OP_CALL; #1;
      ck("call", {redirect, target, push, q_load}, {1'b1, 16'(base) + disp, 1'b1, 1'b0});
      ck("call frame", {push0, push1}, {16'd0, pc + 16'd2, 8'd0, q_after.lqh, q_after.qh, q_after.qt});
      rnd(); op = OP_RFC; #1;
      ck("rfc", {redirect, target, pop, q_load, q_new, ie_set}, {1'b1, top0[15:0], 1'b1, 1'b1, top1[23:0], 1'b0});
      rnd(); op = OP_RETI; #1;
      ck("reti", {redirect, target, pop, q_load, q_new, ie_set}, {1'b1, top0[15:0], 1'b1, 1'b1, top1[23:0], 1'b1});
      rnd(); op = OP_RFC; irq_take = 1; #1;
      ck("irq", {redirect, target, push, pop, q_load, ie_clr}, {1'b1, 16'h0100, 1'b1, 1'b0, 1'b1, 1'b1});
      ck("irq frame", {push0, push1, q_new}, {16'd0, irq_pc, 8'd0, q_now, q_now.qt, q_now.qt, q_now.qt});
      rnd(); valid = 0; op = OP_B; #1;
      ck("idle", {redirect, push, pop, q_load}, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
