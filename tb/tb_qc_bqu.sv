// tb_qc_bqu: self-checking test of the barrier queue unit. Directed groups
// cover each rule: a full independent group, a source produced inside the
// group, a GPR read after setr, a load after a store, the MLT and LD/ST unit
// limits, an invalid source word, a short window, a control instruction ending
// the group, issue disabled, and the queue-full report. Each case checks the
// issue count and the reported reason.
module tb_qc_bqu;
  import qc_pkg::*;
  logic       en;
  logic [2:0] count, n;
  dec_t       dec [4];
  qaddr_t     addr [4];
  qstate_t    q [5];
  logic       v1 [4], v2 [4];
  logic       empty, barrier, stall, unit, full;
  int checks = 0, failures = 0;

  qc_bqu #(.N(4)) dut (.enable_i(en), .count_i(count), .dec_i(dec), .addr_i(addr), .q_i(q),
                       .v1_i(v1), .v2_i(v2), .n_o(n), .empty_o(empty), .barrier_o(barrier),
                       .stall_operand_o(stall), .unit_limit_o(unit), .queue_full_o(full));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic dec_t alu2();   // binary ALU op
    dec_t d = '0;
    d.valid = 1; d.unit = U_ALU; d.op = OP_ADD; d.cn = 1; d.pn = 1; d.rd1 = 1; d.rd2 = 1;
    return d;
  endfunction

  // four independent ALU ops reading 10..17 and writing 20..23
  task automatic base_group();
    en = 1; count = 4;
    for (int k = 0; k < 4; k++) begin
      dec[k] = alu2();
      addr[k] = '{src1: 8'(10 + k), src2: 8'(14 + k), dest: 8'(20 + k)};
      v1[k] = 1; v2[k] = 1;
    end
    for (int k = 0; k < 5; k++) q[k] = '{lqh: 8'(10 + k), qh: 8'(10 + k), qt: 8'(20 + k)};
  endtask

  task automatic expect_n(input string s, input int en_n, input logic [4:0] why);
    #1;
    checks++;
    if (n !== 3'(en_n) || {empty, barrier, stall, unit, full} !== why) begin
      failures++;
      $display("FAIL %s: n=%0d why=%b expected %0d %b", s, n, {empty, barrier, stall, unit, full}, en_n, why);
    end
  endtask

  initial begin
    base_group();                                     expect_n("independent", 4, 5'b00000);
    base_group(); addr[2].src2 = 8'd20;               expect_n("in-group source", 2, 5'b01000);
    base_group(); addr[3].src1 = 8'd22;               expect_n("in-group source 2", 3, 5'b01000);
    base_group(); dec[1].unit = U_MLT; dec[3].unit = U_MLT;
                                                      expect_n("two MLT", 3, 5'b00010);
    base_group(); for (int k = 0; k < 4; k++) begin dec[k].unit = U_LSU; dec[k].is_load = 1; end
                                                      expect_n("three LD/ST", 2, 5'b00010);
    base_group(); dec[0].unit = U_LSU; dec[0].is_store = 1; dec[1].unit = U_LSU; dec[1].is_load = 1;
                                                      expect_n("load after store", 1, 5'b01000);
    base_group(); dec[0].gpr_wr = 1; dec[2].gpr_rd = 1;
                                                      expect_n("GPR after setr", 2, 5'b01000);
    base_group(); v2[1] = 0;                          expect_n("invalid operand", 1, 5'b00100);
    base_group(); v1[0] = 0;                          expect_n("invalid operand slot 0", 0, 5'b00100);
    base_group(); count = 3;                          expect_n("short window", 3, 5'b00000);
    base_group(); count = 0;                          expect_n("empty window", 0, 5'b10000);
    base_group(); dec[1].is_ctrl = 1;                 expect_n("branch ends group", 2, 5'b00000);
    base_group(); dec[0].is_halt = 1;                 expect_n("halt ends group", 1, 5'b00000);
    base_group(); en = 0;                             expect_n("disabled", 0, 5'b00000);
    base_group(); dec[0].cn = 0; q[0] = '{lqh: 8'd21, qh: 8'd21, qt: 8'd20};
                                                      expect_n("queue full report", 4, 5'b00001);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
