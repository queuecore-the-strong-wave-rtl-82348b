// tb_qc_setu: self-checking test of the SET unit: ldil, the four byte-insert
// forms, mv and dup, each with random operands against byte-wise expected
// words assembled here.
module tb_qc_setu;
  import qc_pkg::*;
  logic [7:0] op, fld;
  word_t      x, y, g, res;
  int checks = 0, failures = 0;

  qc_setu dut (.op_i(op), .fld_i(fld), .x_i(x), .y_i(y), .g_i(g), .res_o(res));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      logic [7:0] b [4];
      word_t e;
      fld = $urandom; x = $urandom; y = $urandom; g = $urandom;
      for (int k = 0; k < 4; k++) b[k] = x[8*k +: 8];
      for (int o = 0; o < 7; o++) begin
        case (o)
          0: begin op = OP_LDIL;  e = 32'(fld);                 end
          1: begin op = OP_SETHH; e = {fld, b[2], b[1], b[0]};  end
          2: begin op = OP_SETHL; e = {b[3], fld, b[1], b[0]};  end
          3: begin op = OP_SETLH; e = {b[3], b[2], fld, b[0]};  end
          4: begin op = OP_SETLL; e = {b[3], b[2], b[1], fld};  end
          5: begin op = OP_MV;    e = g;                        end
          default: begin op = OP_DUP; e = y;                    end
        endcase
        #1;
        checks++;
        if (res !== e) begin
          failures++;
          $display("FAIL op=%h fld=%h x=%h: %h expected %h", op, fld, x, res, e);
        end
      end
    end
    // the document's ldil example: 11111110 ends up in bits [7:0]
    op = OP_LDIL; fld = 8'b1111_1110; x = '1; #1;
    checks++;
    if (res !== 32'h0000_00FE) begin failures++; $display("FAIL ldil example"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
