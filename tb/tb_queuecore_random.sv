// tb_queuecore_random: random programs on the full core at its default
// parameters, checked against an instruction-level reference model of the
// produced-order queue.
//
// Each run builds a random program of about 700 instructions: ldil, setLL, dup,
// add, sub, and, or, xor, mult, ldw, stw, setr and mv, with forward beq blocks
// and calls mixed in, then halt. Byte 0x100, the interrupt vector, holds a
// handler that adds one to data word 63. Right after it comes a subroutine that
// adds three to data word 62. The subroutine is reached by 'convop 4; call 12'
// (4 * 64 + 12 = 0x10C) and returns with rfc. The main program branches over
// both. Two interrupt requests arrive at random cycles, possibly inside the
// subroutine. The generator tracks only the number of live words, and every
// OFFSET it picks points at a word produced earlier. It caps the number of live
// words; the cap grows from 4 to 37 over the runs, and small caps make a source
// produced inside the same issue group likely. Before each beq it empties the
// queue and produces a 0 or 1 to test. The skipped block also ends with an
// empty queue, so both outcomes continue from the same state. A taken branch
// renews the pointers (QH = LQH = QT). The programs are long enough for QT to
// wrap around the 256-entry queue, so later words reuse entries whose valid
// bits are already set.
//
// The reference model executes the program one instruction at a time: SRC1 =
// QH, SRC2 = QH + OFFSET (the earlier word is the left operand), DEST = QT, QH
// += CN, QT += PN, LQH = QH, with a 64-word data memory and GPRs 1..3. After
// halt the test compares with the model the last 256 produced QREG entries and
// their valid bits, LQH, QH and QT, the 60 data words of the main program, the
// three GPRs, the numbers of taken branches and calls, and both counter words
// (the handler count against the interrupts the core took). The model has no
// notion of groups, timing or fetch, so a mistake in the issue rules (in-group
// dependences, load-after-store order, setr/mv order, operand stalls) or in the
// branch flush shows up as a wrong value. The test also requires that every
// issue-cut reason, 4-wide issue and both branch outcomes occurred.
module tb_queuecore_random;
  import qc_pkg::*;

  localparam int RUNS = 12;
  localparam int LEN  = 700;   // instructions per program, at least, before halt

  logic        clk = 1'b0, rst_n = 1'b0, imem_we = 1'b0;
  logic [10:0] imem_waddr = '0, dbg_addr = '0;
  logic [31:0] imem_wdata = '0, dbg_data;
  logic        halted, overflow, qovf, stack_err;
  qc_events_t  ev;

  queuecore dut (
    .clk, .rst_n, .imem_we_i(imem_we), .imem_waddr_i(imem_waddr), .imem_wdata_i(imem_wdata),
    .dmem_dbg_addr_i(dbg_addr), .dmem_dbg_data_o(dbg_data), .irq_i(irq),
    .halted_o(halted), .overflow_o(overflow), .qovf_o(qovf), .stack_err_o(stack_err), .ev_o(ev)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_barrier = 0, n_operand = 0, n_unit = 0, n_wide4 = 0, n_load = 0, n_store = 0;
  int n_taken = 0, n_ntaken = 0, run_taken = 0;
  int n_irq = 0, run_irq = 0, cyc = 0, irq_at [2], n_calls = 0, run_calls = 0;
  logic irq = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (ev.barrier)        n_barrier++;
    if (ev.stall_operand)  n_operand++;
    if (ev.unit_limit)     n_unit++;
    if (ev.issued == 3'd4) n_wide4++;
    if (ev.mem_load)       n_load++;
    if (ev.mem_store)      n_store++;
    if (ev.br_taken)       begin n_taken++; run_taken++; end
    if (ev.br_not_taken)   n_ntaken++;
    if (ev.irq_taken)      begin n_irq++; run_irq++; end
    if (ev.call)           begin n_calls++; run_calls++; end
    // interrupt requests at two random cycles, held until taken
    cyc++;
    if (cyc == irq_at[0] || cyc == irq_at[1]) irq <= 1'b1;
    else if (ev.irq_taken)                   irq <= 1'b0;
  end

  initial begin
    repeat (RUNS * 6000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string s, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", s, got, exp); end
  endtask

  // program and reference state
  logic [15:0] prog [1024];
  logic [31:0] q [256];
  logic [31:0] mem [64], mem0 [64];
  logic [31:0] gpr [16];
  int          qh, qt, pc, cap, live, n_taken_ref, n_calls_ref;

  task automatic emit(input opcode_e op, input logic [7:0] f);
    prog[pc] = {op, f};
    pc++;
  endtask

  // one random non-branch instruction; the generator only tracks the number of
  // live words, which is the same on every path through the program
  task automatic gen_one();
    int kind, lo, hi, off;
    if (live == 0)        kind = 0;
    else if (live > cap)  kind = ($urandom % 2 != 0) ? 2 : 4;   // consume only
    else                  kind = int'($urandom % 11);
    case (kind)
      0: begin emit(OP_LDIL, 8'($urandom)); live++; end
      1: begin emit(OP_LDW, 8'(4 * ($urandom % 60))); live++; end
      2: begin emit(OP_STW, 8'(4 * ($urandom % 60))); live--; end
      3: emit(OP_SETLL, 8'($urandom));
      4: begin emit(OP_SETR, 8'(1 + $urandom % 3)); live--; end
      5: begin emit(OP_MV, 8'(1 + $urandom % 3)); live++; end
      default: begin
        // QH never drops below 8 after the prologue, so OFFSET -8 is always a
        // word produced earlier
        lo  = -8;
        hi  = (live - 1 < 7) ? live - 1 : 7;
        off = lo + int'($urandom % 32'(hi - lo + 1));
        case (kind)
          6:  emit(OP_ADD, 8'(off));
          7:  emit(OP_SUB, 8'(off));
          8:  emit(OP_XOR, 8'(off));
          9:  emit(($urandom % 2 != 0) ? OP_AND : OP_OR, 8'(off));
          default: begin
            if ($urandom % 2 != 0) emit(OP_MULT, 8'(off));
            else begin emit(OP_DUP, 8'(off)); live++; end
          end
        endcase
      end
    endcase
  endtask

  // drain the queue, test a 0/1 word with beq and skip a random block that
  // itself ends with an empty queue, so both outcomes rejoin in the same state
  task automatic gen_branch();
    int at, n;
    while (live > 0) begin emit(OP_STW, 8'(4 * ($urandom % 60))); live--; end
    emit(OP_LDIL, 8'($urandom % 2));
    at = pc;
    emit(OP_BEQ, 8'h00);
    live = 0;
    n = 1 + int'($urandom % 8);
    for (int i = 0; i < n; i++) gen_one();
    while (live > 0) begin emit(OP_STW, 8'(4 * ($urandom % 60))); live--; end
    prog[at][7:0] = 8'(pc - at - 1);
  endtask

  // interrupt handler at the vector (byte 0x100 = instruction 128): adds one
  // to data word 63 in a queue region of its own and returns; the main program
  // reaches this point by emptying its queue and branching over the handler
  localparam int VEC = 128;
  task automatic gen_skip();
    int at;
    while (live > 0) begin emit(OP_STW, 8'(4 * ($urandom % 60))); live--; end
    at = pc;
    emit(OP_B, 8'(VEC + 12 - at - 1));
    pc = VEC;
    emit(OP_LDW, 8'd252); emit(OP_LDIL, 8'd1); emit(OP_ADD, 8'sd1);
    emit(OP_SETR, 8'd9);  emit(OP_STW, 8'd252); emit(OP_RETI, 8'h00);
    // subroutine at instruction SUB (byte 0x10C): adds three to data word 62
    emit(OP_LDW, 8'd248); emit(OP_LDIL, 8'd3); emit(OP_ADD, 8'sd1);
    emit(OP_SETR, 8'd10); emit(OP_STW, 8'd248); emit(OP_RFC, 8'h00);
  endtask

  // call the subroutine with an empty queue; its byte address 0x10C needs the
  // displacement extension: convop 4, field 12 -> 4 * 64 + 12
  localparam int SUB = VEC + 6;
  task automatic gen_call();
    while (live > 0) begin emit(OP_STW, 8'(4 * ($urandom % 60))); live--; end
    emit(OP_CONVOP, 8'd4);
    emit(OP_CALL, 8'd12);
  endtask

  // instruction-level reference: runs the program from address 0 to halt
  task automatic run_model();
    int          i, off, sp, cvp;
    int          st_i [8], st_qh [8], st_qt [8];
    logic [7:0]  op, f;
    logic [31:0] x, y;
    qh = 0; qt = 0; i = 0; n_taken_ref = 0; n_calls_ref = 0; sp = 0; cvp = -1;
    for (int k = 0; k < 16; k++) gpr[k] = '0;
    forever begin
      {op, f} = prog[i];
      i++;
      off = int'($signed(f));
      if (off < 0) begin x = q[(qh + off) % 256]; y = q[qh % 256]; end
      else         begin x = q[qh % 256];         y = q[(qh + off) % 256]; end
      case (op)
        OP_HALT:  break;
        OP_LDIL:  begin q[qt % 256] = {24'd0, f}; qt++; end
        OP_LDW:   begin q[qt % 256] = mem[f[7:2]]; qt++; end
        OP_STW:   begin mem[f[7:2]] = q[qh % 256]; qh++; end
        OP_SETLL: begin q[qt % 256] = {q[qh % 256][31:8], f}; qh++; qt++; end
        OP_SETR:  begin gpr[f[3:0]] = q[qh % 256]; qh++; end
        OP_MV:    begin q[qt % 256] = gpr[f[3:0]]; qt++; end
        OP_DUP:   begin q[qt % 256] = q[(qh + off) % 256]; qt++; end
        OP_ADD:   begin q[qt % 256] = x + y; qh++; qt++; end
        OP_SUB:   begin q[qt % 256] = x - y; qh++; qt++; end
        OP_XOR:   begin q[qt % 256] = x ^ y; qh++; qt++; end
        OP_AND:   begin q[qt % 256] = x & y; qh++; qt++; end
        OP_OR:    begin q[qt % 256] = x | y; qh++; qt++; end
        OP_MULT:  begin q[qt % 256] = x * y; qh++; qt++; end
        OP_B:     begin i += off; qh = qt; n_taken_ref++; end
        OP_CONVOP: cvp = int'(f);
        OP_CALL: begin
          st_i[sp] = i; st_qh[sp] = qh; st_qt[sp] = qt; sp++;
          i = ((cvp >= 0) ? cvp * 64 + int'(f[5:0]) : int'(f)) / 2;
          cvp = -1; n_calls_ref++;
        end
        OP_RFC: begin sp--; i = st_i[sp]; qh = st_qh[sp]; qt = st_qt[sp]; end
        OP_BEQ: begin
          qh++;
          if (q[(qh - 1) % 256] == 0) begin i += off; qh = qt; n_taken_ref++; end
        end
        default: ;
      endcase
    end
  endtask

  initial begin
    for (int run = 0; run < RUNS; run++) begin
      rst_n = 1'b0;
      // program: a prologue of 8 words produced and consumed, so that QH >= 8,
      // then random instructions and branch blocks
      for (int i = 0; i < 1024; i++) prog[i] = {OP_NOP, 8'h00};
      pc = 0; live = 0; cap = 4 + 3 * run;
      for (int i = 0; i < 8; i++) emit(OP_LDIL, 8'($urandom));
      for (int i = 0; i < 8; i++) emit(OP_STW, 8'(4 * ($urandom % 60)));
      while (pc < LEN)
        if (pc >= 60 && pc < VEC) gen_skip();
        else if (pc > VEC && $urandom % 40 == 0) gen_call();
        else if ($urandom % 24 == 0) gen_branch();
        else gen_one();
      emit(OP_HALT, 8'h00);
      for (int i = 0; i < 64; i++) begin mem[i] = $urandom; mem0[i] = mem[i]; end
      run_model();
      for (int i = 0; i < 2048; i++) dut.u_dmem.mem[i] = '0;
      for (int i = 0; i < 64; i++) dut.u_dmem.mem[i] = mem0[i];
      for (int a = 0; a < 512; a++) begin
        @(negedge clk);
        imem_we = 1'b1; imem_waddr = 11'(a); imem_wdata = {prog[2*a+1], prog[2*a]};
      end
      @(negedge clk); imem_we = 1'b0;
      run_taken = 0; run_irq = 0; run_calls = 0; cyc = 0;
      irq_at[0] = 20 + int'($urandom % 150); irq_at[1] = irq_at[0] + 30 + int'($urandom % 100);
      rst_n = 1'b1;
      wait (halted);
      repeat (3) @(negedge clk);
      for (int k = 1; k <= ((qt < 256) ? qt : 256); k++) begin
        int e;
        e = (qt - k) % 256;
        check($sformatf("run %0d QREG[%0d]", run, e), dut.u_qreg.data[e], q[e]);
        check($sformatf("run %0d QREG[%0d] valid", run, e), 32'(dut.u_qreg.valid[e]), 1);
      end
      check($sformatf("run %0d LQH", run), 32'(dut.q_q.lqh), 32'(qh % 256));
      check($sformatf("run %0d QH", run), 32'(dut.q_q.qh), 32'(qh % 256));
      check($sformatf("run %0d QT", run), 32'(dut.q_q.qt), 32'(qt % 256));
      check($sformatf("run %0d QT wrapped", run), 32'(qt > 256), 1);
      check($sformatf("run %0d taken branches", run), 32'(run_taken), 32'(n_taken_ref));
      for (int i = 0; i < 60; i++) begin
        dbg_addr = 11'(i); #1; check($sformatf("run %0d mem[%0d]", run, i), dbg_data, mem[i]);
      end
      check($sformatf("run %0d interrupts taken", run), 32'(run_irq), 2);
      $display("run %0d: %0d cycles, interrupts at %0d and %0d", run, cyc, irq_at[0], irq_at[1]);
      dbg_addr = 11'd63; #1; check($sformatf("run %0d handler count", run), dbg_data, mem0[63] + 32'(run_irq));
      dbg_addr = 11'd62; #1; check($sformatf("run %0d subroutine count", run), dbg_data, mem0[62] + 32'(3 * n_calls_ref));
      check($sformatf("run %0d calls", run), 32'(run_calls), 32'(n_calls_ref));
      check($sformatf("run %0d stack error", run), 32'(stack_err), 0);
      for (int r = 1; r < 4; r++) check($sformatf("run %0d GPR%0d", run, r), dut.u_gpr.r[r], gpr[r]);
      check($sformatf("run %0d no queue overflow", run), 32'(qovf), 0);
    end
    check("barrier cuts seen",       32'(n_barrier > 0), 1);
    check("operand stalls seen",     32'(n_operand > 0), 1);
    check("unit-limit cuts seen",    32'(n_unit > 0), 1);
    check("4-wide issue seen",       32'(n_wide4 > 0), 1);
    check("loads and stores seen",   32'(n_load > 0 && n_store > 0), 1);
    check("both branch outcomes seen", 32'(n_taken > 0 && n_ntaken > 0), 1);
    check("interrupts seen",           32'(n_irq), 2 * RUNS);
    check("calls seen",                32'(n_calls > 0), 1);
    $display("barrier=%0d operand=%0d unit=%0d wide4=%0d taken=%0d not_taken=%0d calls=%0d",
             n_barrier, n_operand, n_unit, n_wide4, n_taken, n_ntaken, n_calls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
