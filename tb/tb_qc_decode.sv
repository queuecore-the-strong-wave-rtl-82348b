// tb_qc_decode: self-checking test of the instruction decoder. A table written
// here gives, for every defined opcode, the unit, CN, PN and the read/write
// flags of the produced-order model; each opcode is decoded with random field
// values, and undefined opcodes and invalid slots must decode to nothing.
module tb_qc_decode;
  import qc_pkg::*;
  logic        valid;
  logic [15:0] instr;
  dec_t        d;
  int checks = 0, failures = 0;

  qc_decode dut (.valid_i(valid), .instr_i(instr), .dec_o(d));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected {unit, cn, pn, rd1, rd2, gpr_rd, gpr_wr, load, store, ctrl, convop, halt}
  function automatic logic [15:0] expect_of(input logic [7:0] o);
    unit_e u; logic [1:0] cn; logic pn, r1, r2, gr, gw, ld, st, ct, cv, ht;
    u = U_NONE; cn = 0; pn = 0; r1 = 0; r2 = 0; gr = 0; gw = 0; ld = 0; st = 0; ct = 0; cv = 0; ht = 0;
    if ((o >= 8'h01 && o <= 8'h0E) || (o >= 8'h11 && o <= 8'h14)) begin u = U_ALU; cn = 1; pn = 1; r1 = 1; r2 = 1; end
    else if (o inside {8'h0F, 8'h10, 8'h15}) begin u = U_ALU; cn = 1; pn = 1; r1 = 1; end
    else if (o == 8'h16) begin u = U_ALU; pn = 1; gr = 1; end
    else if (o >= 8'h28 && o <= 8'h31) begin u = U_MLT; cn = 1; pn = 1; r1 = 1; r2 = 1; end
    else if (o == 8'h40) begin u = U_SET; pn = 1; end
    else if (o >= 8'h41 && o <= 8'h44) begin u = U_SET; cn = 1; pn = 1; r1 = 1; end
    else if (o == 8'h45) begin u = U_SET; cn = 1; r1 = 1; gw = 1; end
    else if (o == 8'h46) begin u = U_SET; pn = 1; gr = 1; end
    else if (o == 8'h47) begin u = U_SET; pn = 1; r2 = 1; end
    else if (o >= 8'h70 && o <= 8'h75) begin u = U_LSU; pn = 1; gr = 1; ld = 1; end
    else if (o >= 8'h76 && o <= 8'h78) begin u = U_LSU; cn = 1; r1 = 1; gr = 1; st = 1; end
    else if (o inside {8'h18, 8'h1C, 8'h21}) begin u = U_BRU; ct = 1; end
    else if (o inside {8'h19, 8'h1D, 8'h1E, 8'h1F, 8'h20}) begin u = U_BRU; ct = 1; cn = 1; r1 = 1; end
    else if (o inside {8'h1A, 8'h1B}) begin u = U_BRU; ct = 1; gr = 1; end
    else if (o == 8'h50) cv = 1;
    else if (o == 8'h3F) ht = 1;
    return {u, cn, pn, r1, r2, gr, gw, ld, st, ct, cv, ht};
  endfunction

  initial begin
    for (int o = 0; o < 256; o++) begin
      for (int n = 0; n < 3; n++) begin
        valid = 1'b1;
        instr = {8'(o), 8'($urandom)};
        #1;
        checks++;
        if ({d.unit, d.cn, d.pn, d.rd1, d.rd2, d.gpr_rd, d.gpr_wr, d.is_load, d.is_store,
             d.is_ctrl, d.is_convop, d.is_halt} !== expect_of(8'(o)) ||
            d.op !== 8'(o) || d.fld !== instr[7:0] || d.valid !== 1'b1) begin
          failures++;
          $display("FAIL opcode %h", o);
        end
      end
      valid = 1'b0; #1;
      checks++;
      if (d !== '0) begin failures++; $display("FAIL invalid slot %h", o); end
    end
    // the document's printed encodings
    valid = 1'b1;
    instr = 16'b0100_0000_1111_1110; #1; checks++;
    if (!(d.unit == U_SET && d.pn && d.fld == 8'hFE)) begin failures++; $display("FAIL ldil"); end
    instr = 16'b0001_1011_1111_1110; #1; checks++;
    if (!(d.unit == U_BRU && d.op == OP_CALL)) begin failures++; $display("FAIL call0"); end
    instr = 16'b0111_1000_1110_1110; #1; checks++;
    if (!(d.is_store && d.op == OP_STW && d.fld == 8'hEE)) begin failures++; $display("FAIL stw0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
