// qc_qcu: queue computation unit.
//
// For the GROUP instructions decoded in one cycle it computes, in program order,
// the queue addresses each one uses and the queue pointers after it:
//   SRC1_n = QH_n, SRC2_n = QH_n + OFFSET_n, DEST_n = QT_n,
//   QH_{n+1} = QH_n + CN_n, QT_{n+1} = QT_n + PN_n, LQH_{n+1} = LQH_n + CN_n.
// These are the document's formulas; as in its drawing, the adders of
// consecutive instructions are chained, so instruction n+1 starts from the
// pointers instruction n leaves. OFFSET is the signed 8-bit field of the
// instruction. All pointer arithmetic wraps modulo the QREG size (2**PTR_W).
//
// q_o[k] is the pointer state before instruction k, so q_o[0] = q_i and q_o[GROUP]
// is the state after the whole group; the issue stage picks q_o[n] when it
// issues n instructions. Purely combinational.
module qc_qcu
  import qc_pkg::*;
#(
  parameter int unsigned N = GROUP
) (
  input  qstate_t q_i,
  input  dec_t    dec_i  [N],
  output qaddr_t  addr_o [N],
  output qstate_t q_o    [N+1]
);

  always_comb begin
    q_o[0] = q_i;
    for (int k = 0; k < N; k++) begin
      addr_o[k].src1 = q_o[k].qh;
      addr_o[k].src2 = q_o[k].qh + qptr_t'($signed(dec_i[k].fld));  // signed OFFSET, wraps
      addr_o[k].dest = q_o[k].qt;
      q_o[k+1].qh    = q_o[k].qh  + qptr_t'(dec_i[k].cn);
      q_o[k+1].lqh   = q_o[k].lqh + qptr_t'(dec_i[k].cn);
      q_o[k+1].qt    = q_o[k].qt  + qptr_t'(dec_i[k].pn);
    end
  end

endmodule
