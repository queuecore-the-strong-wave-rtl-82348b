// tb_qc_mlt: self-checking test of the multiply/divide unit. Products come from
// 64-bit multiplication, quotients and remainders from 64-bit signed and
// unsigned division, with the zero-divisor and -2**31/-1 conventions of the
// unit checked explicitly, and the overflow flag of the o variants.
module tb_qc_mlt;
  import qc_pkg::*;
  logic [7:0] op;
  word_t      x, y, res;
  logic       ovf;
  int checks = 0, failures = 0;

  qc_mlt dut (.op_i(op), .x_i(x), .y_i(y), .res_o(res), .ovf_o(ovf));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [7:0] o, input word_t a, input word_t b);
    word_t r; logic v;
    longint sa, sb, ua, ub;
    logic zero, so;
    sa = longint'($signed(a)); sb = longint'($signed(b));
    ua = longint'({32'd0, a}); ub = longint'({32'd0, b});
    zero = (b == 0);
    so   = (a == 32'h8000_0000) && (b == 32'hFFFF_FFFF);
    case (o)
      OP_MULT, OP_MULU: r = 32'(ua * ub);
      OP_DIV, OP_DIVO:  r = zero ? 32'hFFFF_FFFF : 32'(sa / sb);
      OP_DIVU, OP_DIVUO: r = zero ? 32'hFFFF_FFFF : 32'(ua / ub);
      OP_MOD, OP_MODO:  r = zero ? a : 32'(sa % sb);
      OP_MODU, OP_MODUO: r = zero ? a : 32'(ua % ub);
      default: r = 0;
    endcase
    case (o)
      OP_DIVO, OP_MODO:   v = zero | so;
      OP_DIVUO, OP_MODUO: v = zero;
      default:            v = 0;
    endcase
    op = o; x = a; y = b;
    #1;
    checks++;
    if (res !== r || ovf !== v) begin
      failures++;
      $display("FAIL op=%h x=%h y=%h: res=%h ovf=%b expected %h %b", o, a, b, res, ovf, r, v);
    end
  endtask

  logic [7:0] ops [10] = '{OP_MULT, OP_MULU, OP_DIV, OP_DIVO, OP_DIVU, OP_DIVUO,
                           OP_MOD, OP_MODO, OP_MODU, OP_MODUO};
  initial begin
    foreach (ops[i]) begin
      one(ops[i], 32'd100, 32'd7);
      one(ops[i], -32'sd100, 32'd7);
      one(ops[i], 32'd100, -32'sd7);
      one(ops[i], 32'h1234_5678, 32'd0);
      one(ops[i], 32'h8000_0000, 32'hFFFF_FFFF);
      for (int n = 0; n < 200; n++) one(ops[i], $urandom, (n % 3 == 0) ? $urandom % 50 : $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
