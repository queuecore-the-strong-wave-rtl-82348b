// tb_qc_exe: self-checking test of the execution unit. Each trial fills the
// four slots at random with add, xor, subo, ldil, setLL, dup, mult, ldw and
// stw, keeping the issue rules' limits (at most one MLT, at most two
// loads/stores). A small memory model answers the two data memory ports. The
// test checks every slot's write enable, destination and result, and each
// store's address and data on the port it used. It also checks the overflow
// pulse and the busy flag. Expected values are worked out here, operation by
// operation.
module tb_qc_exe;
  import qc_pkg::*;

  localparam int N = 4, LS = 2;

  exe_slot_t   slot [N];
  logic [15:0] ls_addr [LS];
  logic        ls_we [LS];
  logic [3:0]  ls_be [LS];
  word_t       ls_wdata [LS], ls_rdata [LS];
  logic        wq_en [N];
  qptr_t       wq_addr [N];
  word_t       wq_data [N];
  logic        ovf, busy;
  word_t       mem [16];

  qc_exe #(.N(N), .LS(LS)) dut (
    .slot_i(slot), .ls_addr_o(ls_addr), .ls_we_o(ls_we), .ls_be_o(ls_be),
    .ls_wdata_o(ls_wdata), .ls_rdata_i(ls_rdata), .wq_en_o(wq_en), .wq_addr_o(wq_addr),
    .wq_data_o(wq_data), .ovf_o(ovf), .busy_o(busy)
  );

  // data memory model: combinational read of the addressed word
  assign ls_rdata[0] = mem[ls_addr[0][5:2]];
  assign ls_rdata[1] = mem[ls_addr[1][5:2]];

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(input string s, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", s, got, exp); end
  endtask

  initial begin
    word_t exp_res [N];
    logic  exp_pn [N], exp_st [N], exp_ovf, exp_busy, found;
    int    n_mlt, n_ls, kind, n_two_loads;
    n_two_loads = 0;
    for (int i = 0; i < 16; i++) mem[i] = $urandom;
    for (int t = 0; t < 3000; t++) begin
      n_mlt = 0; n_ls = 0; exp_ovf = 1'b0; exp_busy = 1'b0;
      for (int k = 0; k < N; k++) begin
        exe_slot_t s;
        s        = '0;
        s.valid  = ($urandom % 5 != 0);
        s.dest   = qptr_t'($urandom);
        s.a      = (t % 7 == 0) ? 32'h8000_0000 : $urandom;
        s.b      = (t % 7 == 0) ? 32'h0000_0001 : $urandom;
        s.g      = '0;                                   // base register a0
        s.disp   = 16'(4 * ($urandom % 16));
        s.d.fld  = 8'($urandom);
        s.d.valid = s.valid;
        exp_pn[k] = 1'b0; exp_st[k] = 1'b0; exp_res[k] = '0;
        do kind = int'($urandom % 9);
        while ((kind == 6 && n_mlt == 1) || (kind >= 7 && n_ls == LS));
        case (kind)
          0: begin s.d.unit = U_ALU; s.d.op = OP_ADD;   exp_res[k] = s.a + s.b; end
          1: begin s.d.unit = U_ALU; s.d.op = OP_XOR;   exp_res[k] = s.a ^ s.b; end
          2: begin s.d.unit = U_ALU; s.d.op = OP_SUBO;  exp_res[k] = s.a - s.b;
                   if (s.valid && (s.a[31] != s.b[31]) && (exp_res[k][31] != s.a[31])) exp_ovf = 1'b1; end
          3: begin s.d.unit = U_SET; s.d.op = OP_LDIL;  exp_res[k] = {24'd0, s.d.fld}; end
          4: begin s.d.unit = U_SET; s.d.op = OP_SETLL; exp_res[k] = {s.a[31:8], s.d.fld}; end
          5: begin s.d.unit = U_SET; s.d.op = OP_DUP;   exp_res[k] = s.b; end
          6: begin s.d.unit = U_MLT; s.d.op = OP_MULT;  exp_res[k] = s.a * s.b; n_mlt += int'(s.valid); end
          7: begin s.d.unit = U_LSU; s.d.op = OP_LDW;   s.d.is_load = 1'b1;
                   exp_res[k] = mem[s.disp[5:2]]; n_ls += int'(s.valid); end
          default: begin s.d.unit = U_LSU; s.d.op = OP_STW; s.d.is_store = 1'b1;
                   n_ls += int'(s.valid); end
        endcase
        s.d.pn    = (s.d.op != OP_STW);
        exp_pn[k] = s.valid && s.d.pn;
        exp_st[k] = s.valid && s.d.is_store;
        exp_busy |= s.valid;
        slot[k]   = s;
      end
      #1;
      for (int k = 0; k < N; k++) begin
        ck($sformatf("t%0d slot %0d write enable", t, k), 32'(wq_en[k]), 32'(exp_pn[k]));
        if (exp_pn[k]) begin
          ck($sformatf("t%0d slot %0d dest", t, k), 32'(wq_addr[k]), 32'(slot[k].dest));
          ck($sformatf("t%0d slot %0d op %h result", t, k, slot[k].d.op), wq_data[k], exp_res[k]);
        end
        if (exp_st[k]) begin
          found = 1'b0;
          for (int p = 0; p < LS; p++)
            if (ls_we[p] && ls_addr[p] == slot[k].disp && ls_wdata[p] == slot[k].a && ls_be[p] == 4'hF)
              found = 1'b1;
          ck($sformatf("t%0d slot %0d store on a port", t, k), 32'(found), 1);
        end
      end
      ck($sformatf("t%0d overflow", t), 32'(ovf), 32'(exp_ovf));
      ck($sformatf("t%0d busy", t), 32'(busy), 32'(exp_busy));
      begin
        int nl;
        nl = 0;
        for (int k = 0; k < N; k++) if (slot[k].valid && slot[k].d.is_load) nl++;
        if (nl == 2) n_two_loads++;
      end
    end
    ck("trials with two loads in one group", 32'(n_two_loads > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
