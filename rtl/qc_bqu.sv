// qc_bqu: barrier queue unit, the issue-group selector of QueueCore.
//
// Of the N decoded instructions at the head of the instruction window it lets
// the longest program-order prefix issue in one cycle, so a whole level of a
// breadth-first expression tree (the document's "grouped ILP", four
// instructions per level) goes out together. Walking the slots in order, it
// stops before the first instruction that
//   - is not in the window (empty),
//   - reads a queue word written by an earlier instruction of the same group,
//     or a GPR written by an earlier setr, or is a load after a store, or a second
//     setr (barrier),
//   - needs a second MLT or a third LD/ST unit (unit_limit; the core has 1 MLT
//     and 2 LD/ST units, and one ALU and SET unit per slot),
//   - reads a queue word whose valid bit is clear because its producer is still
//     executing (stall_operand),
// and it stops after a branch-class instruction or halt, so control transfers
// end a group. queue_full_o does not stop issue: it reports that an issued
// instruction wrapped QT onto LQH, i.e. the program keeps more live words than
// QREG holds (the core turns it into a sticky error flag; nothing in flight
// could free an entry, so stalling would never end). The cut reason of the first blocked slot is reported. The
// document names this unit and the grouping; the rules above are this design's.
// Purely combinational.
module qc_bqu
  import qc_pkg::*;
#(
  parameter int unsigned N = GROUP
) (
  input  logic                 enable_i,
  input  logic [$clog2(N+1)-1:0] count_i,   // instructions present in the window
  input  dec_t                 dec_i  [N],
  input  qaddr_t               addr_i [N],
  input  qstate_t              q_i    [N+1],
  input  logic                 v1_i   [N],  // valid bit of SRC1 entry
  input  logic                 v2_i   [N],  // valid bit of SRC2 entry
  output logic [$clog2(N+1)-1:0] n_o,
  output logic                 empty_o,
  output logic                 barrier_o,
  output logic                 stall_operand_o,
  output logic                 unit_limit_o,
  output logic                 queue_full_o
);

  localparam int unsigned CW = $clog2(N+1);

  always_comb begin
    logic       stop, dep1, dep2, gdep;
    logic       seen_store, seen_gwr;
    int unsigned mlt_used, lsu_used;
    qptr_t      occ;
    n_o             = '0;
    empty_o         = 1'b0;
    barrier_o       = 1'b0;
    stall_operand_o = 1'b0;
    unit_limit_o    = 1'b0;
    queue_full_o    = 1'b0;
    stop            = !enable_i;
    seen_store      = 1'b0;
    seen_gwr        = 1'b0;
    mlt_used        = 0;
    lsu_used        = 0;
    for (int i = 0; i < N; i++) begin
      dep1 = 1'b0;
      dep2 = 1'b0;
      gdep = 1'b0;
      occ  = '0;
      if (!stop) begin
        for (int j = 0; j < i; j++) begin
          if (dec_i[j].pn && dec_i[i].rd1 && addr_i[j].dest == addr_i[i].src1) dep1 = 1'b1;
          if (dec_i[j].pn && dec_i[i].rd2 && addr_i[j].dest == addr_i[i].src2) dep2 = 1'b1;
        end
        gdep = seen_gwr && (dec_i[i].gpr_rd || dec_i[i].gpr_wr);
        occ  = q_i[i].qt - q_i[i].lqh;
        if (CW'(i) >= count_i || !dec_i[i].valid) begin
          stop = 1'b1; empty_o = (i == 0);
        end else if (dep1 || dep2 || gdep || (seen_store && dec_i[i].is_load)) begin
          stop = 1'b1; barrier_o = 1'b1;
        end else if ((dec_i[i].unit == U_MLT && mlt_used >= 1) ||
                     (dec_i[i].unit == U_LSU && lsu_used >= 2)) begin
          stop = 1'b1; unit_limit_o = 1'b1;
        end else if ((dec_i[i].rd1 && !v1_i[i]) || (dec_i[i].rd2 && !v2_i[i])) begin
          stop = 1'b1; stall_operand_o = 1'b1;
        end else begin
          if (dec_i[i].pn && dec_i[i].cn == 2'd0 && occ == '1) queue_full_o = 1'b1;
          n_o = CW'(i + 1);
          if (dec_i[i].unit == U_MLT) mlt_used++;
          if (dec_i[i].unit == U_LSU) lsu_used++;
          if (dec_i[i].is_store) seen_store = 1'b1;
          if (dec_i[i].gpr_wr)   seen_gwr   = 1'b1;
          if (dec_i[i].is_ctrl || dec_i[i].is_halt) stop = 1'b1;
        end
      end
    end
  end

endmodule
