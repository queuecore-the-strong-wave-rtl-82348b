// queuecore: the QueueCore (QC-2) produced-order queue processor.
//
// Instead of a register file addressed by the instruction, operands live in a
// 256-entry circular queue register (QREG). Instructions name no registers: an
// instruction reads the word at the queue head QH (and, for two-operand
// instructions, the word at QH+OFFSET), removes CN words from the head and
// appends its PN results at the queue tail QT. Because those addresses follow
// from the instruction order alone, a queue computation unit (QCU) can work
// them out for four instructions at once, and instructions of one level of an
// expression tree, which never depend on each other, issue together.
//
// Organisation (two pipeline stages after fetch):
//   fetch  : qc_fetch reads 8 bytes (4 instructions) per cycle from qc_imem into
//            a small instruction window buffer.
//   issue  : four qc_decode, the qc_qcu address chain, qc_bqu (which picks how
//            many of the four may go), qc_issue (operand reads from qc_qreg and
//            qc_gpr, the convop displacement extension, the issue register)
//            and qc_bru, which resolves every branch, call, return and
//            interrupt entry in this stage. Issuing
//            clears the QREG valid bit of each destination.
//   execute: qc_exe, with per slot one qc_alu and one qc_setu, one shared
//            qc_mlt and two qc_lsu on the two ports of qc_dmem. Results are written to QREG at the end
//            of the cycle and set the valid bit again.
// A consumer therefore issues two cycles after its producer; there is no
// bypass. qc_ctrl stops issue after a halt, drains the execute stage and raises
// halted_o.
//
// convop v: the next load, store, lda, jump or call uses the displacement
// {v, field[5:0]} (v*64 + low six bits of its field) instead of the zero-extended
// 8-bit field. The document's example (convop 62; ld 32 reaching address 4000)
// fixes this arithmetic.
//
// Ports: overflow_o, qovf_o and stack_err_o are sticky error flags (o-variant
// arithmetic overflow, more than 255 live queue words, stack overflow or
// underflow). imem_* loads the program while the core runs from reset (hold rst_n
// low while loading); dmem_dbg_* reads data memory; irq is a level request;
// ev_o reports per-cycle events for monitoring. All flops reset
// asynchronously on rst_n low.
// Following the document: QREG size, 4-wide fetch/decode, unit counts (4 ALU,
// 4 SET, 2 LD/ST, 1 MUL, 1 branch), 16 GPRs, 2048-word memories, 64x32 stack,
// pointer formulas. This design's own: pipeline depth, opcode numbers (except
// ldil, call0, stw0), issue rules, interrupt vector and the separate program
// and data memories. The two floating-point units of the document are not
// built (no floating-point instruction is defined).
module queuecore
  import qc_pkg::*;
#(
  parameter int unsigned MEM_WORDS   = 2048,
  parameter int unsigned IWB_DEPTH   = 8,
  parameter int unsigned STACK_DEPTH = 64,
  parameter pc_t         IRQ_VECTOR  = 16'h0100,
  localparam int unsigned MAW        = $clog2(MEM_WORDS)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           imem_we_i,
  input  logic [MAW-1:0] imem_waddr_i,
  input  logic [31:0]    imem_wdata_i,
  input  logic [MAW-1:0] dmem_dbg_addr_i,
  output logic [31:0]    dmem_dbg_data_o,
  input  logic           irq_i,
  output logic           halted_o,
  output logic           overflow_o,
  output logic           qovf_o,
  output logic           stack_err_o,
  output qc_events_t     ev_o
);

  localparam int unsigned N  = GROUP;
  localparam int unsigned NW = $clog2(N+1);

  // ------------------------------------------------------------------ fetch
  logic          redirect;
  pc_t           target;
  logic [NW-1:0] n_issue;
  pc_t           faddr;
  logic [63:0]   fdata;
  logic [IW-1:0] win [N];
  logic [NW-1:0] avail;
  pc_t           head_pc;

  qc_imem #(.WORDS(MEM_WORDS)) u_imem (
    .clk, .we_i(imem_we_i), .waddr_i(imem_waddr_i), .wdata_i(imem_wdata_i),
    .faddr_i(faddr), .fdata_o(fdata)
  );

  qc_fetch #(.N(N), .DEPTH(IWB_DEPTH)) u_fetch (
    .clk, .rst_n, .redirect_i(redirect), .target_i(target), .pop_i(n_issue),
    .faddr_o(faddr), .fdata_i(fdata), .win_o(win), .avail_o(avail), .head_pc_o(head_pc)
  );

  // ------------------------------------------------------------------ decode
  dec_t dec [N];
  for (genvar k = 0; k < N; k++) begin : g_dec
    qc_decode u_dec (.valid_i(NW'(k) < avail), .instr_i(win[k]), .dec_o(dec[k]));
  end

  // ------------------------------------------------------------------ QCU
  qstate_t q_q, q_next;
  qaddr_t  qaddr [N];
  qstate_t qs    [N+1];

  qc_qcu #(.N(N)) u_qcu (.q_i(q_q), .dec_i(dec), .addr_o(qaddr), .q_o(qs));

  // ------------------------------------------------------------------ QREG
  exe_slot_t exe_q [N];
  qptr_t       rq_addr  [2*N];
  word_t       rq_data  [2*N];
  logic        rq_valid [2*N];
  logic        wq_en [N], cq_en [N];
  logic [7:0]  wq_addr [N], cq_addr [N];
  word_t       wq_data [N];

  qc_qreg #(.DEPTH(256), .DW(DW), .RD(2*N), .WR(N)) u_qreg (
    .clk, .rst_n, .raddr_i(rq_addr), .rdata_o(rq_data), .rvalid_o(rq_valid),
    .we_i(wq_en), .waddr_i(wq_addr), .wdata_i(wq_data), .clr_i(cq_en), .caddr_i(cq_addr)
  );

  // ------------------------------------------------------------------ GPR
  logic [3:0] g_raddr [N];
  word_t      g_rdata [N];
  logic       g_we;
  logic [3:0] g_waddr;
  word_t      g_wdata;

  qc_gpr #(.N(16), .RD(N)) u_gpr (
    .clk, .rst_n, .raddr_i(g_raddr), .rdata_o(g_rdata),
    .we_i(g_we), .waddr_i(g_waddr), .wdata_i(g_wdata)
  );

  // ------------------------------------------------------------------ issue
  logic [15:0] disp [N];
  logic        cv_used [N];

  qc_issue #(.N(N)) u_issue (
    .clk, .rst_n, .dec_i(dec), .addr_i(qaddr), .n_i(n_issue), .flush_i(redirect),
    .rq_addr_o(rq_addr), .rq_data_i(rq_data), .g_raddr_o(g_raddr), .g_rdata_i(g_rdata),
    .cq_en_o(cq_en), .cq_addr_o(cq_addr), .g_we_o(g_we), .g_waddr_o(g_waddr),
    .g_wdata_o(g_wdata), .disp_o(disp), .cv_used_o(cv_used), .slot_o(exe_q)
  );

  // ------------------------------------------------------------------ control
  logic issue_en, irq_take, ie, ie_set, ie_clr, halt_issued, exe_busy;

  qc_ctrl u_ctrl (
    .clk, .rst_n, .halt_issued_i(halt_issued), .exe_busy_i(exe_busy), .irq_i,
    .ie_set_i(ie_set), .ie_clr_i(ie_clr), .issue_en_o(issue_en), .irq_take_o(irq_take),
    .halted_o, .ie_o(ie)
  );

  // ------------------------------------------------------------------ BQU
  logic v1 [N], v2 [N];
  logic cut_empty, cut_barrier, cut_operand, cut_unit, cut_full;

  always_comb
    for (int k = 0; k < N; k++) begin
      v1[k] = rq_valid[2*k];
      v2[k] = rq_valid[2*k+1];
    end

  qc_bqu #(.N(N)) u_bqu (
    .enable_i(issue_en), .count_i(avail), .dec_i(dec), .addr_i(qaddr), .q_i(qs),
    .v1_i(v1), .v2_i(v2), .n_o(n_issue), .empty_o(cut_empty), .barrier_o(cut_barrier),
    .stall_operand_o(cut_operand), .unit_limit_o(cut_unit), .queue_full_o(cut_full)
  );

  // ------------------------------------------------------------------ BRU
  logic        br_valid;
  dec_t        br_dec;
  pc_t         br_pc;
  word_t       br_cond;
  logic [15:0] br_disp;
  qstate_t     br_qnew;
  logic        br_qload, st_push, st_pop, br_taken, br_ntaken;
  word_t       st_push0, st_push1, st_top0, st_top1;
  logic        st_empty, st_full, st_err;

  always_comb begin
    br_valid    = 1'b0;
    br_dec      = '0;
    br_pc       = head_pc;
    br_cond     = '0;
    br_disp     = '0;
    halt_issued = 1'b0;
    for (int k = 0; k < N; k++)
      if (NW'(k + 1) == n_issue) begin
        br_valid    = dec[k].is_ctrl;
        br_dec      = dec[k];
        br_pc       = head_pc + pc_t'(2 * k);
        br_cond     = rq_data[2*k];
        br_disp     = disp[k];
        halt_issued = dec[k].is_halt;
      end
  end

  qc_bru #(.IRQ_VECTOR(IRQ_VECTOR)) u_bru (
    .valid_i(br_valid), .op_i(br_dec.op), .fld_i(br_dec.fld), .pc_i(br_pc),
    .cond_i(br_cond), .base_i(g_rdata[0]), .disp_i(br_disp), .q_after_i(qs[n_issue]),
    .top0_i(st_top0), .top1_i(st_top1), .irq_take_i(irq_take), .irq_pc_i(head_pc),
    .q_now_i(q_q), .redirect_o(redirect), .target_o(target), .q_load_o(br_qload),
    .q_new_o(br_qnew), .push_o(st_push), .push0_o(st_push0), .push1_o(st_push1),
    .pop_o(st_pop), .ie_set_o(ie_set), .ie_clr_o(ie_clr), .taken_o(br_taken),
    .not_taken_o(br_ntaken)
  );

  qc_stack #(.DEPTH(STACK_DEPTH), .DW(32)) u_stack (
    .clk, .rst_n, .push_i(st_push), .push0_i(st_push0), .push1_i(st_push1), .pop_i(st_pop),
    .top0_o(st_top0), .top1_o(st_top1), .empty_o(st_empty), .full_o(st_full), .err_o(st_err)
  );

  // ------------------------------------------------------------------ pointers
  assign q_next = br_qload ? br_qnew : qs[n_issue];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q_q <= '0;
    else        q_q <= q_next;

  // ------------------------------------------------------------------ execute
  logic [15:0]    ls_addr  [2];
  logic           ls_we    [2];
  logic [3:0]     ls_be    [2];
  word_t          ls_wdata [2], ls_rdata [2];
  logic [MAW-1:0] dm_addr  [2];
  logic           exe_ovf;

  qc_exe #(.N(N), .LS(2)) u_exe (
    .slot_i(exe_q), .ls_addr_o(ls_addr), .ls_we_o(ls_we), .ls_be_o(ls_be),
    .ls_wdata_o(ls_wdata), .ls_rdata_i(ls_rdata), .wq_en_o(wq_en), .wq_addr_o(wq_addr),
    .wq_data_o(wq_data), .ovf_o(exe_ovf), .busy_o(exe_busy)
  );

  always_comb
    for (int p = 0; p < 2; p++) dm_addr[p] = ls_addr[p][MAW+1:2];

  qc_dmem #(.WORDS(MEM_WORDS)) u_dmem (
    .clk, .addr_i(dm_addr), .we_i(ls_we), .be_i(ls_be), .wdata_i(ls_wdata),
    .rdata_o(ls_rdata), .dbg_addr_i(dmem_dbg_addr_i), .dbg_data_o(dmem_dbg_data_o)
  );

  // sticky error flags: QREG overflow, stack overflow/underflow and the
  // arithmetic overflow of the o-variant instructions
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      overflow_o  <= 1'b0;
      qovf_o      <= 1'b0;
      stack_err_o <= 1'b0;
    end else begin
      if (cut_full) qovf_o      <= 1'b1;
      if (st_err)   stack_err_o <= 1'b1;
      if (exe_ovf)  overflow_o  <= 1'b1;
    end
  end

  // ------------------------------------------------------------------ events
  always_comb begin
    ev_o               = '0;
    ev_o.issued        = 3'(n_issue);
    ev_o.stall_operand = cut_operand;
    ev_o.barrier       = cut_barrier;
    ev_o.unit_limit    = cut_unit;
    ev_o.queue_full    = cut_full;
    ev_o.fetch_empty   = cut_empty;
    ev_o.br_taken      = br_taken;
    ev_o.br_not_taken  = br_ntaken;
    ev_o.call          = br_valid && br_dec.op == OP_CALL;
    ev_o.rfc           = br_valid && br_dec.op == OP_RFC;
    ev_o.reti          = br_valid && br_dec.op == OP_RETI;
    ev_o.irq_taken     = irq_take;
    for (int k = 0; k < N; k++) begin
      if (NW'(k) < n_issue && cv_used[k]) ev_o.convop_used = 1'b1;
      if (exe_q[k].valid && exe_q[k].d.is_load)  ev_o.mem_load  = 1'b1;
      if (exe_q[k].valid && exe_q[k].d.is_store) ev_o.mem_store = 1'b1;
    end
  end

endmodule
