// tb_qc_qcu: self-checking test of the queue computation unit. Random groups of
// four instructions (random CN 0..1, PN 0..1 and signed offsets) and random
// starting pointers are applied; a sequential model here walks the group one
// instruction at a time and gives the SRC1/SRC2/DEST addresses and the pointer
// state after each instruction. The document's example "add -2" (CN=1, PN=1,
// second operand at QH-2) is checked directly.
module tb_qc_qcu;
  import qc_pkg::*;
  qstate_t q;
  dec_t    dec [4];
  qaddr_t  addr [4];
  qstate_t qo [5];
  int checks = 0, failures = 0;

  qc_qcu #(.N(4)) dut (.q_i(q), .dec_i(dec), .addr_o(addr), .q_o(qo));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      int h, t, l;
      q = '{lqh: 8'($urandom), qh: 8'($urandom), qt: 8'($urandom)};
      for (int k = 0; k < 4; k++) begin
        dec[k]     = '0;
        dec[k].cn  = 2'($urandom % 2);
        dec[k].pn  = 1'($urandom);
        dec[k].fld = 8'($urandom);
      end
      #1;
      h = q.qh; t = q.qt; l = q.lqh;
      for (int k = 0; k < 4; k++) begin
        int off;
        off = int'($signed(dec[k].fld));
        checks++;
        if (addr[k].src1 !== 8'(h) || addr[k].src2 !== 8'((h + off + 256) % 256) || addr[k].dest !== 8'(t)) begin
          failures++;
          $display("FAIL addresses slot %0d", k);
        end
        h = (h + dec[k].cn) % 256; t = (t + dec[k].pn) % 256; l = (l + dec[k].cn) % 256;
        checks++;
        if (qo[k+1].qh !== 8'(h) || qo[k+1].qt !== 8'(t) || qo[k+1].lqh !== 8'(l)) begin
          failures++;
          $display("FAIL pointers after slot %0d", k);
        end
      end
    end
    // "add -2": QH=10, QT=14 -> SRC1=10, SRC2=8, DEST=14, QH'=11, QT'=15
    q = '{lqh: 8'd6, qh: 8'd10, qt: 8'd14};
    for (int k = 0; k < 4; k++) dec[k] = '0;
    dec[0].cn = 1; dec[0].pn = 1; dec[0].fld = -8'sd2;
    #1;
    checks++;
    if (addr[0].src1 !== 8'd10 || addr[0].src2 !== 8'd8 || addr[0].dest !== 8'd14 ||
        qo[1].qh !== 8'd11 || qo[1].qt !== 8'd15 || qo[4] !== qo[1]) begin
      failures++;
      $display("FAIL add -2 example");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
