// tb_qc_issue: self-checking test of the issue unit. Each cycle it presents
// four random decoded instructions (queue instructions with random OFFSETs,
// mv, setr, loads, stores, lda, jump and convop) with random queue addresses
// and a random issue count. QREG and GPR reads are answered by fixed
// functions of the address. The test checks the read addresses, the valid
// clears, the setr write, each slot's displacement and convop use, and, after
// the clock edge, every field of the issue register, including the operand
// swap for negative OFFSETs. A model kept here passes a pending convop along
// the four slots, keeps the state after the last issued slot for the next
// cycle and drops it on a flush.
module tb_qc_issue;
  import qc_pkg::*;

  localparam int N = 4;

  logic        clk = 1'b0, rst_n = 1'b0;
  dec_t        dec [N];
  qaddr_t      addr [N];
  logic [2:0]  n;
  logic        flush;
  qptr_t       rq_addr [2*N];
  word_t       rq_data [2*N];
  logic [3:0]  g_raddr [N];
  word_t       g_rdata [N];
  logic        cq_en [N];
  qptr_t       cq_addr [N];
  logic        g_we;
  logic [3:0]  g_waddr;
  word_t       g_wdata;
  logic [15:0] disp [N];
  logic        cv_used [N];
  exe_slot_t   slot [N];

  qc_issue #(.N(N)) dut (
    .clk, .rst_n, .dec_i(dec), .addr_i(addr), .n_i(n), .flush_i(flush),
    .rq_addr_o(rq_addr), .rq_data_i(rq_data), .g_raddr_o(g_raddr), .g_rdata_i(g_rdata),
    .cq_en_o(cq_en), .cq_addr_o(cq_addr), .g_we_o(g_we), .g_waddr_o(g_waddr),
    .g_wdata_o(g_wdata), .disp_o(disp), .cv_used_o(cv_used), .slot_o(slot)
  );

  // storage models: the word read depends only on the address
  function automatic word_t qword(input qptr_t a);
    return {8'hA5, a, ~a, a ^ 8'h3C};
  endfunction
  function automatic word_t gword(input logic [3:0] r);
    return {28'h1234567, r};
  endfunction
  always_comb begin
    for (int i = 0; i < 2 * N; i++) rq_data[i] = qword(rq_addr[i]);
    for (int k = 0; k < N; k++)     g_rdata[k] = gword(g_raddr[k]);
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(input string s, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", s, got, exp); end
  endtask

  // random decoded instruction; only the fields this unit looks at are set
  function automatic dec_t rand_dec();
    dec_t d;
    int   kind;
    d       = '0;
    d.valid = 1'b1;
    d.fld   = 8'($urandom);
    kind    = int'($urandom % 10);
    case (kind)
      0, 1:    begin d.op = OP_ADD;    d.unit = U_ALU; d.cn = 2'd1; d.pn = 1'b1; d.rd1 = 1'b1; d.rd2 = 1'b1; end
      2:       begin d.op = OP_DUP;    d.unit = U_SET; d.pn = 1'b1; d.rd2 = 1'b1; end
      3:       begin d.op = OP_MV;     d.unit = U_SET; d.pn = 1'b1; d.gpr_rd = 1'b1; end
      4:       begin d.op = OP_SETR;   d.unit = U_SET; d.cn = 2'd1; d.rd1 = 1'b1; d.gpr_wr = 1'b1; end
      5:       begin d.op = OP_LDW;    d.unit = U_LSU; d.pn = 1'b1; d.gpr_rd = 1'b1; d.is_load = 1'b1; end
      6:       begin d.op = OP_STW;    d.unit = U_LSU; d.cn = 2'd1; d.rd1 = 1'b1; d.gpr_rd = 1'b1; d.is_store = 1'b1; end
      7:       begin d.op = OP_LDA;    d.unit = U_ALU; d.pn = 1'b1; d.gpr_rd = 1'b1; end
      8:       begin d.op = OP_JUMP;   d.unit = U_BRU; d.is_ctrl = 1'b1; d.gpr_rd = 1'b1; end
      default: begin d.op = OP_CONVOP; d.is_convop = 1'b1; end
    endcase
    return d;
  endfunction

  initial begin
    logic        pend;       // model: a convop is pending
    logic [7:0]  pval;
    logic [15:0] e_disp [N];
    logic        e_used [N], e_we, p, takes, p_n;
    logic [7:0]  v_n;
    logic [3:0]  e_waddr;
    word_t       e_wdata;
    exe_slot_t   e_slot [N];
    int          n_used, n_swap;
    pend = 1'b0; pval = '0; n_used = 0; n_swap = 0;
    for (int k = 0; k < N; k++) begin dec[k] = '0; addr[k] = '0; end
    n = '0; flush = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      for (int k = 0; k < N; k++) begin
        dec[k]       = rand_dec();
        addr[k].src1 = qptr_t'($urandom);
        addr[k].src2 = qptr_t'($urandom);
        addr[k].dest = qptr_t'($urandom);
      end
      n     = 3'($urandom % (N + 1));
      flush = ($urandom % 8 == 0);
      #1;
      // model of this cycle
      p = pend; e_we = 1'b0; e_waddr = '0; e_wdata = '0;
      for (int k = 0; k < N; k++) begin
        takes     = dec[k].is_load || dec[k].is_store || dec[k].op == OP_LDA ||
                    dec[k].op == OP_JUMP || dec[k].op == OP_CALL;
        e_disp[k] = p ? (16'(pval) << 6) | 16'(dec[k].fld[5:0]) : 16'(dec[k].fld);
        e_used[k] = p && takes;
        if (k == int'(n)) begin p_n = p; v_n = pval; end
        if (dec[k].is_convop) begin p = 1'b1; pval = dec[k].fld; end
        else if (takes)       p = 1'b0;
        if (k < n && dec[k].gpr_wr) begin
          e_we = 1'b1; e_waddr = dec[k].fld[3:0]; e_wdata = qword(addr[k].src1);
        end
        e_slot[k]       = '0;
        e_slot[k].valid = (k < n) && (dec[k].pn || dec[k].is_store);
        e_slot[k].d     = dec[k];
        e_slot[k].dest  = addr[k].dest;
        if (dec[k].rd1 && dec[k].rd2 && dec[k].fld[7]) begin
          e_slot[k].a = qword(addr[k].src2); e_slot[k].b = qword(addr[k].src1);
          if (k < n) n_swap++;
        end else begin
          e_slot[k].a = qword(addr[k].src1); e_slot[k].b = qword(addr[k].src2);
        end
        e_slot[k].g    = gword((dec[k].op == OP_MV) ? dec[k].fld[3:0] : 4'd0);
        e_slot[k].disp = e_disp[k];
        if (e_used[k] && k < n) n_used++;
      end
      if (int'(n) == N) begin p_n = p; v_n = pval; end
      pend = flush ? 1'b0 : p_n;
      pval = v_n;
      for (int k = 0; k < N; k++) begin
        ck($sformatf("t%0d src1 read %0d", t, k), 32'(rq_addr[2*k]), 32'(addr[k].src1));
        ck($sformatf("t%0d src2 read %0d", t, k), 32'(rq_addr[2*k+1]), 32'(addr[k].src2));
        ck($sformatf("t%0d clear %0d", t, k), 32'(cq_en[k]), 32'((k < n) && dec[k].pn));
        ck($sformatf("t%0d clear addr %0d", t, k), 32'(cq_addr[k]), 32'(addr[k].dest));
        ck($sformatf("t%0d disp %0d", t, k), 32'(disp[k]), 32'(e_disp[k]));
        ck($sformatf("t%0d convop used %0d", t, k), 32'(cv_used[k]), 32'(e_used[k]));
      end
      ck($sformatf("t%0d setr", t), 32'(g_we), 32'(e_we));
      if (e_we) begin
        ck($sformatf("t%0d setr reg", t), 32'(g_waddr), 32'(e_waddr));
        ck($sformatf("t%0d setr data", t), g_wdata, e_wdata);
      end
      @(posedge clk); #1;
      for (int k = 0; k < N; k++) begin
        ck($sformatf("t%0d slot %0d valid", t, k), 32'(slot[k].valid), 32'(e_slot[k].valid));
        if (e_slot[k].valid) begin
          ck($sformatf("t%0d slot %0d a", t, k), slot[k].a, e_slot[k].a);
          ck($sformatf("t%0d slot %0d b", t, k), slot[k].b, e_slot[k].b);
          ck($sformatf("t%0d slot %0d g", t, k), slot[k].g, e_slot[k].g);
          ck($sformatf("t%0d slot %0d dest", t, k), 32'(slot[k].dest), 32'(e_slot[k].dest));
          ck($sformatf("t%0d slot %0d disp", t, k), 32'(slot[k].disp), 32'(e_slot[k].disp));
          ck($sformatf("t%0d slot %0d op", t, k), 32'(slot[k].d.op), 32'(e_slot[k].d.op));
        end
      end
    end
    ck("extended displacements used", 32'(n_used > 0), 1);
    ck("operand swaps seen", 32'(n_swap > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
