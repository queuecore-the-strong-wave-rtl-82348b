// qc_exe: execution unit of QueueCore, the stage after issue.
//
// It receives the instructions issued in the previous cycle, one per slot,
// with their operands already read. Each slot has its own qc_alu and qc_setu.
// The single qc_mlt is given to the lowest slot holding an MLT instruction.
// The two qc_lsu units are given, in slot order, to the first two slots
// holding a load or store; their address, write enable, byte enables and
// store data go to the two ports of the data memory, and the word read comes
// back in the same cycle. Each slot's result is then picked by the unit its
// instruction belongs to and written, with the slot's destination address, to
// the queue register. The issue rules never send more than one MLT or two
// loads/stores in one group, so the sharing needs no arbitration.
//
// Interface: slot_i[N] from the issue register; ls_*[LS] to the data memory;
// wq_*[N] to the QREG write ports; ovf_o pulses when an o-variant instruction
// overflows in this cycle; busy_o tells the controller that the stage holds
// work. Purely combinational: results are written at the end of the cycle in
// which the slot is present.
//
// Following the document: four ALU and four SET units, one multiply/divide
// unit and two load/store units (its configuration table). This design's own:
// the slot-to-unit assignment and the single-cycle timing of every unit.
module qc_exe
  import qc_pkg::*;
#(
  parameter int unsigned N  = GROUP,   // issue slots
  parameter int unsigned LS = 2        // load/store units and data memory ports
) (
  input  exe_slot_t   slot_i     [N],
  output logic [15:0] ls_addr_o  [LS],   // byte address
  output logic        ls_we_o    [LS],
  output logic [3:0]  ls_be_o    [LS],
  output word_t       ls_wdata_o [LS],
  input  word_t       ls_rdata_i [LS],
  output logic        wq_en_o    [N],
  output qptr_t       wq_addr_o  [N],
  output word_t       wq_data_o  [N],
  output logic        ovf_o,
  output logic        busy_o
);

  word_t alu_res [N], set_res [N];
  logic  alu_ovf [N];
  word_t mlt_res;
  logic  mlt_ovf;
  int    mlt_slot;
  int    lsu_slot [LS];
  logic  lsu_v    [LS];
  word_t ls_ldata [LS];

  // unit assignment: MLT to the lowest MLT slot, LSUs to the first LS slots
  always_comb begin
    int m;
    mlt_slot = 0;
    m        = 0;
    for (int p = 0; p < LS; p++) begin
      lsu_slot[p] = 0;
      lsu_v[p]    = 1'b0;
    end
    for (int k = N - 1; k >= 0; k--)
      if (slot_i[k].valid && slot_i[k].d.unit == U_MLT) mlt_slot = k;
    for (int k = 0; k < N; k++)
      if (slot_i[k].valid && slot_i[k].d.unit == U_LSU && m < LS) begin
        lsu_slot[m] = k;
        lsu_v[m]    = 1'b1;
        m++;
      end
  end

  for (genvar k = 0; k < N; k++) begin : g_slot
    qc_alu u_alu (
      .op_i(slot_i[k].d.op), .x_i(slot_i[k].a), .y_i(slot_i[k].b), .g_i(slot_i[k].g),
      .disp_i(slot_i[k].disp), .res_o(alu_res[k]), .ovf_o(alu_ovf[k])
    );
    qc_setu u_set (
      .op_i(slot_i[k].d.op), .fld_i(slot_i[k].d.fld), .x_i(slot_i[k].a), .y_i(slot_i[k].b),
      .g_i(slot_i[k].g), .res_o(set_res[k])
    );
  end

  qc_mlt u_mlt (
    .op_i(slot_i[mlt_slot].d.op), .x_i(slot_i[mlt_slot].a), .y_i(slot_i[mlt_slot].b),
    .res_o(mlt_res), .ovf_o(mlt_ovf)
  );

  for (genvar p = 0; p < LS; p++) begin : g_lsu
    qc_lsu u_lsu (
      .valid_i(lsu_v[p]), .op_i(slot_i[lsu_slot[p]].d.op), .base_i(slot_i[lsu_slot[p]].g),
      .disp_i(slot_i[lsu_slot[p]].disp), .sdata_i(slot_i[lsu_slot[p]].a),
      .addr_o(ls_addr_o[p]), .we_o(ls_we_o[p]), .be_o(ls_be_o[p]), .wdata_o(ls_wdata_o[p]),
      .rdata_i(ls_rdata_i[p]), .ldata_o(ls_ldata[p])
    );
  end

  // write-back: each slot's result from the unit its instruction went to
  always_comb begin
    for (int k = 0; k < N; k++) begin
      wq_en_o[k]   = slot_i[k].valid && slot_i[k].d.pn;
      wq_addr_o[k] = slot_i[k].dest;
      wq_data_o[k] = '0;
      unique case (slot_i[k].d.unit)
        U_ALU:   wq_data_o[k] = alu_res[k];
        U_SET:   wq_data_o[k] = set_res[k];
        U_MLT:   wq_data_o[k] = mlt_res;
        U_LSU:
          for (int p = 0; p < LS; p++)
            if (lsu_v[p] && lsu_slot[p] == k) wq_data_o[k] = ls_ldata[p];
        default: ;
      endcase
    end
  end

  always_comb begin
    busy_o = 1'b0;
    ovf_o  = slot_i[mlt_slot].valid && slot_i[mlt_slot].d.unit == U_MLT && mlt_ovf;
    for (int k = 0; k < N; k++) begin
      busy_o |= slot_i[k].valid;
      if (slot_i[k].valid && slot_i[k].d.unit == U_ALU && alu_ovf[k]) ovf_o = 1'b1;
    end
  end

endmodule
