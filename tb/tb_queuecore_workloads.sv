// tb_queuecore_workloads: runs the grouped-ILP example and two more of the
// benchmark kinds used to evaluate the queue processor, PREFIX and SORT, on the
// full core at its default parameters. The programs are written for this
// design's instruction encoding:
//   GROUPED ILP: the 4-point butterfly "ld a; ld b; ld c; ld d / add +1; sub -1;
//           add +1; sub -1 / add +2; add +2; sub -2; sub -2 / st w; st x; st y;
//           st z". With two LD/ST units the loads take two cycles, so the first
//           add/sub level issues as two pairs (its second pair waits for c and
//           d); the second level then issues as a single group of four, which
//           the test checks by counting 4-wide issue cycles.
//   PREFIX: inclusive prefix sum of 8 words in three breadth-first levels
//           (distance 1, 2, 4). Each level produces 8 words: "or +0" copies the
//           head word (consuming it) and "add -d" adds the word d places behind
//           the head, a live word already consumed, as in the produced-order
//           model.
//   SORT:   4 signed words sorted in memory by a 5-comparator network; each
//           compare-exchange loads the pair, compares with com, moves the extra
//           word to a register with setr and skips the swap with beq.
// Three random data sets are run, with a reset between runs, and every result
// word is compared with a prefix sum and a sort computed here.
module tb_queuecore_workloads;
  import qc_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, imem_we = 1'b0;
  logic [10:0] imem_waddr = '0, dbg_addr = '0;
  logic [31:0] imem_wdata = '0, dbg_data;
  logic        halted, overflow, qovf, stack_err;
  qc_events_t  ev;

  queuecore dut (
    .clk, .rst_n, .imem_we_i(imem_we), .imem_waddr_i(imem_waddr), .imem_wdata_i(imem_wdata),
    .dmem_dbg_addr_i(dbg_addr), .dmem_dbg_data_o(dbg_data), .irq_i(1'b0),
    .halted_o(halted), .overflow_o(overflow), .qovf_o(qovf), .stack_err_o(stack_err), .ev_o(ev)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0, taken = 0, ntaken = 0, wide4 = 0, gdone = 0;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (ev.br_taken)     taken++;
    if (ev.br_not_taken) ntaken++;
    // 4-wide groups issued while the grouped-ILP example runs (before its stores)
    if (ev.issued == 3'd4 && !gdone) wide4++;
    if (ev.mem_store) gdone = 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] prog [1024];
  int pc;
  task automatic I(input opcode_e op, input logic [7:0] f = 8'h00);
    prog[pc] = {op, f};
    pc++;
  endtask

  // compare-exchange of data words at byte addresses i < j: ascending order
  task automatic cex(input int i, input int j);
    I(OP_LDW, 8'(j)); I(OP_LDW, 8'(i)); I(OP_COM, 8'sd1);   // (a_j < a_i)
    I(OP_SETR, 8'd15);                                      // drop a_i
    I(OP_BEQ, 8'd4);                                        // in order: skip swap
    I(OP_LDW, 8'(j)); I(OP_LDW, 8'(i)); I(OP_STW, 8'(i)); I(OP_STW, 8'(j));
  endtask

  task automatic check(input string s, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", s, got, exp); end
  endtask

  initial begin
    logic [31:0] x [8], ps [8], srt [4], t, g [4], l1 [4], l2 [4];
    for (int i = 0; i < 1024; i++) prog[i] = {OP_NOP, 8'h00};
    pc = 0;
    // GROUPED ILP: a..d at bytes 96..108, w..z at 112..124
    for (int i = 0; i < 4; i++) I(OP_LDW, 8'(96 + 4 * i));
    I(OP_ADD, 8'sd1); I(OP_SUB, -8'sd1); I(OP_ADD, 8'sd1); I(OP_SUB, -8'sd1);
    I(OP_ADD, 8'sd2); I(OP_ADD, 8'sd2); I(OP_SUB, -8'sd2); I(OP_SUB, -8'sd2);
    for (int i = 0; i < 4; i++) I(OP_STW, 8'(112 + 4 * i));
    // PREFIX: x at bytes 0..28, result at 32..60
    for (int i = 0; i < 8; i++) I(OP_LDW, 8'(4 * i));
    for (int d = 1; d <= 4; d *= 2)
      for (int i = 0; i < 8; i++)
        if (i < d) I(OP_OR, 8'sd0); else I(OP_ADD, 8'(-d));
    for (int i = 0; i < 8; i++) I(OP_STW, 8'(32 + 4 * i));
    // SORT: 4 words at bytes 64..76
    cex(64, 68); cex(72, 76); cex(64, 72); cex(68, 76); cex(68, 72);
    I(OP_HALT);

    for (int a = 0; a < 512; a++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_waddr = 11'(a); imem_wdata = {prog[2*a+1], prog[2*a]};
    end
    @(negedge clk); imem_we = 1'b0;

    for (int run = 0; run < 3; run++) begin
      rst_n = 1'b0;
      for (int i = 0; i < 8; i++) x[i] = $urandom;
      for (int i = 0; i < 2048; i++) dut.u_dmem.mem[i] = '0;
      for (int i = 0; i < 8; i++) dut.u_dmem.mem[i] = x[i];
      for (int i = 0; i < 4; i++) begin
        srt[i] = (run == 2) ? 32'(3 - i) : $urandom % 2000 - 1000;   // run 2: reversed input
        dut.u_dmem.mem[16 + i] = srt[i];
      end
      for (int i = 0; i < 4; i++) begin g[i] = $urandom; dut.u_dmem.mem[24 + i] = g[i]; end
      repeat (2) @(negedge clk);
      cycles = 0; wide4 = 0; gdone = 0;
      rst_n = 1'b1;
      wait (halted);
      @(negedge clk);
      ps[0] = x[0];
      for (int i = 1; i < 8; i++) ps[i] = ps[i-1] + x[i];
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 3 - i; j++)
          if ($signed(srt[j]) > $signed(srt[j+1])) begin t = srt[j]; srt[j] = srt[j+1]; srt[j+1] = t; end
      for (int i = 0; i < 8; i++) begin
        dbg_addr = 11'(8 + i); #1; check($sformatf("run %0d prefix[%0d]", run, i), dbg_data, ps[i]);
      end
      for (int i = 0; i < 4; i++) begin
        dbg_addr = 11'(16 + i); #1; check($sformatf("run %0d sort[%0d]", run, i), dbg_data, srt[i]);
      end
      l1 = '{g[0] + g[1], g[0] - g[1], g[2] + g[3], g[2] - g[3]};
      l2 = '{l1[0] + l1[2], l1[1] + l1[3], l1[0] - l1[2], l1[1] - l1[3]};
      for (int i = 0; i < 4; i++) begin
        dbg_addr = 11'(28 + i); #1; check($sformatf("run %0d grouped ILP[%0d]", run, i), dbg_data, l2[i]);
      end
      check("second level issued as one group of four", 32'(wide4), 1);
      check("no queue overflow", 32'(qovf), 0);
      $display("run %0d: %0d cycles", run, cycles);
    end
    check("both branch outcomes seen", 32'(taken > 0 && ntaken > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
