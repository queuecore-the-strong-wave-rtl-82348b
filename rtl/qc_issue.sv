// qc_issue: issue unit of QueueCore. It turns the decoded group and its queue
// addresses into operand reads, and holds what issued in the issue register
// that feeds the execution stage.
//
// For each of the N slots it sends SRC1 and SRC2 to two QREG read ports and
// the GPR number of mv (otherwise a0, the base register of loads, stores, lda,
// jump and call) to a GPR read port. The first n_i slots issue in this cycle.
// Their destination entries get their QREG valid bit cleared, a setr among
// them writes the word at its QH to its GPR, and they are captured in the
// issue register with their operands. For two-operand instructions with a
// negative OFFSET the operands are swapped, so that the word produced earlier
// is always the left operand.
//
// convop v makes the next load, store, lda, jump or call use the displacement
// {v, field[5:0]} instead of its zero-extended 8-bit field. The pending convop
// is passed along the slots, and across cycles in a register that a control
// transfer (flush_i) clears. disp_o gives each slot's displacement to the
// branch unit; cv_used_o marks the slots that used an extended one.
//
// Timing: everything is combinational except the issue register (slot_o) and
// the pending-convop register, which change at the clock edge. Reset clears
// both.
//
// Following the document: the convop arithmetic (its example reaches address
// 4000 with 'convop 62; ld 32') and a0 as the base register. This design's
// own: the operand swap rule, a0 as the only base register, and setr writing
// at issue.
module qc_issue
  import qc_pkg::*;
#(
  parameter  int unsigned N  = GROUP,
  localparam int unsigned NW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  dec_t          dec_i      [N],
  input  qaddr_t        addr_i     [N],
  input  logic [NW-1:0] n_i,          // slots issued this cycle
  input  logic          flush_i,      // control transfer: drop a pending convop
  output qptr_t         rq_addr_o  [2*N],
  input  word_t         rq_data_i  [2*N],
  output logic [3:0]    g_raddr_o  [N],
  input  word_t         g_rdata_i  [N],
  output logic          cq_en_o    [N],   // clear QREG valid bit of the destination
  output qptr_t         cq_addr_o  [N],
  output logic          g_we_o,           // setr
  output logic [3:0]    g_waddr_o,
  output word_t         g_wdata_o,
  output logic [15:0]   disp_o     [N],
  output logic          cv_used_o  [N],
  output exe_slot_t     slot_o     [N]
);

  // ---------------------------------------------------------- operand reads
  always_comb
    for (int k = 0; k < N; k++) begin
      rq_addr_o[2*k]   = addr_i[k].src1;
      rq_addr_o[2*k+1] = addr_i[k].src2;
      g_raddr_o[k]     = (dec_i[k].op == OP_MV) ? dec_i[k].fld[3:0] : 4'd0;
    end

  // ---------------------------------------------------------- convop chain
  logic       cvp_v_q;
  logic [7:0] cvp_q;
  logic       cv_v [N+1];
  logic [7:0] cv   [N+1];

  always_comb begin
    cv_v[0] = cvp_v_q;
    cv[0]   = cvp_q;
    for (int k = 0; k < N; k++) begin
      logic takes_disp;
      takes_disp   = dec_i[k].is_load || dec_i[k].is_store ||
                     dec_i[k].op inside {OP_LDA, OP_JUMP, OP_CALL};
      disp_o[k]    = cv_v[k] ? {2'b00, cv[k], dec_i[k].fld[5:0]} : {8'd0, dec_i[k].fld};
      cv_used_o[k] = cv_v[k] && takes_disp;
      cv_v[k+1]    = dec_i[k].is_convop ? 1'b1 : (cv_v[k] && !takes_disp);
      cv[k+1]      = dec_i[k].is_convop ? dec_i[k].fld : cv[k];
    end
  end

  // ---------------------------------------------------------- issue side effects
  always_comb begin
    g_we_o    = 1'b0;
    g_waddr_o = '0;
    g_wdata_o = '0;
    for (int k = 0; k < N; k++) begin
      cq_en_o[k]   = (NW'(k) < n_i) && dec_i[k].pn;
      cq_addr_o[k] = addr_i[k].dest;
      if ((NW'(k) < n_i) && dec_i[k].gpr_wr) begin
        g_we_o    = 1'b1;
        g_waddr_o = dec_i[k].fld[3:0];
        g_wdata_o = rq_data_i[2*k];
      end
    end
  end

  // ---------------------------------------------------------- issue register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cvp_v_q <= 1'b0;
      cvp_q   <= '0;
      for (int k = 0; k < N; k++) slot_o[k] <= '0;
    end else begin
      cvp_v_q <= flush_i ? 1'b0 : cv_v[n_i];
      cvp_q   <= cv[n_i];
      for (int k = 0; k < N; k++) begin
        exe_slot_t s;
        logic      swap;
        swap    = dec_i[k].rd1 && dec_i[k].rd2 && dec_i[k].fld[7];
        s.valid = (NW'(k) < n_i) && (dec_i[k].pn || dec_i[k].is_store);
        s.d     = dec_i[k];
        s.dest  = addr_i[k].dest;
        s.a     = swap ? rq_data_i[2*k+1] : rq_data_i[2*k];
        s.b     = swap ? rq_data_i[2*k]   : rq_data_i[2*k+1];
        s.g     = g_rdata_i[k];
        s.disp  = disp_o[k];
        slot_o[k] <= s;
      end
    end
  end

endmodule
