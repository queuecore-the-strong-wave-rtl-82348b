// tb_qc_lsu: self-checking test of the load/store unit. For random base,
// displacement and memory word it checks the effective address, the byte
// enables and store data of stb/sts/stw, and the sign- or zero-extended load
// results, with expected values formed byte by byte here.
module tb_qc_lsu;
  import qc_pkg::*;
  logic        valid;
  logic [7:0]  op;
  word_t       base, sdata, wdata, rdata, ldata;
  logic [15:0] disp, addr;
  logic        we;
  logic [3:0]  be;
  int checks = 0, failures = 0;

  qc_lsu dut (.valid_i(valid), .op_i(op), .base_i(base), .disp_i(disp), .sdata_i(sdata),
              .addr_o(addr), .we_o(we), .be_o(be), .wdata_o(wdata), .rdata_i(rdata), .ldata_o(ldata));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(input string s, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s op=%h got %h exp %h", s, op, got, exp); end
  endtask

  logic [7:0] ops [9] = '{OP_LDB, OP_LDBU, OP_LDS, OP_LDSU, OP_LDW, OP_LDWU, OP_STB, OP_STS, OP_STW};
  initial begin
    for (int n = 0; n < 300; n++) begin
      foreach (ops[i]) begin
        logic [15:0] ea;
        logic [7:0]  bt;
        logic [15:0] hw;
        valid = 1'b1; op = ops[i]; base = $urandom; disp = 16'($urandom); sdata = $urandom; rdata = $urandom;
        #1;
        ea = 16'(base) + disp;
        bt = rdata >> (8 * ea[1:0]);
        hw = ea[1] ? rdata[31:16] : rdata[15:0];
        ck("addr", 32'(addr), 32'(ea));
        case (op)
          OP_LDB:  ck("ldb",  ldata, {{24{bt[7]}}, bt});
          OP_LDBU: ck("ldbu", ldata, {24'd0, bt});
          OP_LDS:  ck("lds",  ldata, {{16{hw[15]}}, hw});
          OP_LDSU: ck("ldsu", ldata, {16'd0, hw});
          OP_LDW, OP_LDWU: ck("ldw", ldata, rdata);
          OP_STB: begin
            ck("stb we", 32'(we), 1); ck("stb be", 32'(be), 32'(1 << ea[1:0]));
            ck("stb data", wdata >> (8 * ea[1:0]) & 32'hFF, 32'(sdata[7:0]));
          end
          OP_STS: begin
            ck("sts we", 32'(we), 1); ck("sts be", 32'(be), ea[1] ? 32'hC : 32'h3);
            ck("sts data", (wdata >> (16 * ea[1])) & 32'hFFFF, 32'(sdata[15:0]));
          end
          default: begin
            ck("stw we", 32'(we), 1); ck("stw be", 32'(be), 32'hF); ck("stw data", wdata, sdata);
          end
        endcase
        if (op inside {OP_LDB, OP_LDBU, OP_LDS, OP_LDSU, OP_LDW, OP_LDWU}) ck("load we", 32'(we), 0);
      end
    end
    // an invalid slot never writes
    valid = 1'b0; op = OP_STW; #1; ck("invalid store", 32'(we), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
