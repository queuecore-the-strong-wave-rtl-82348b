// tb_qc_alu: self-checking test of the ALU. For every ALU operation it applies
// directed corner values and random operands and compares the result and the
// overflow flag with a reference written independently here (rotations built
// from a 64-bit doubled word, comparisons and overflow from 33/64-bit
// arithmetic).
module tb_qc_alu;
  import qc_pkg::*;
  logic [7:0]  op;
  word_t       x, y, g, res;
  logic [15:0] disp;
  logic        ovf;
  int checks = 0, failures = 0;

  qc_alu dut (.op_i(op), .x_i(x), .y_i(y), .g_i(g), .disp_i(disp), .res_o(res), .ovf_o(ovf));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void ref_model(input logic [7:0] o, input word_t a, input word_t b,
                                    input word_t base, input logic [15:0] d,
                                    output word_t r, output logic v);
    logic [63:0] dbl;
    longint sa, sb;
    int s;
    s   = int'(b[4:0]);
    dbl = {a, a};
    sa  = longint'($signed(a));
    sb  = longint'($signed(b));
    v   = 0;
    case (o)
      OP_ADD, OP_ADDU: r = a + b;
      OP_SUB, OP_SUBU: r = a - b;
      OP_SUBO:  begin r = a - b; v = ((sa - sb) > 64'sd2147483647) || ((sa - sb) < -64'sd2147483648); end
      OP_SUBUO: begin r = a - b; v = ({1'b0, a} < {1'b0, b}); end
      OP_AND:   r = a & b;
      OP_OR:    r = a | b;
      OP_XOR:   r = a ^ b;
      OP_SRU:   r = 32'({32'd0, a} >> s);
      OP_SLU:   r = 32'({32'd0, a} << s);
      OP_SR:    r = 32'(sa >>> s);
      OP_ROL:   r = dbl[63 - s -: 32];
      OP_ROR:   r = dbl[31 + s -: 32];
      OP_NEG:   r = 32'(-sa);
      OP_NOT:   r = a ^ 32'hFFFF_FFFF;
      OP_INC:   r = a + 1;
      OP_COM:   r = (sa < sb) ? 1 : 0;
      OP_COMU:  r = ({1'b0, a} < {1'b0, b}) ? 1 : 0;
      OP_COMC:  r = (a == b) ? 1 : 0;
      OP_COMCU: r = (a == b) ? 0 : 1;
      OP_LDA:   r = base + 32'(d);
      default:  r = 0;
    endcase
  endfunction

  task automatic one(input logic [7:0] o, input word_t a, input word_t b);
    word_t r; logic v;
    op = o; x = a; y = b; g = $urandom; disp = 16'($urandom);
    #1;
    ref_model(o, a, b, g, disp, r, v);
    checks++;
    if (res !== r || ovf !== v) begin
      failures++;
      $display("FAIL op=%h x=%h y=%h: res=%h ovf=%b expected %h %b", o, a, b, res, ovf, r, v);
    end
  endtask

  logic [7:0] ops [22] = '{OP_ADD, OP_ADDU, OP_SUB, OP_SUBO, OP_SUBU, OP_SUBUO, OP_AND, OP_OR,
                           OP_SRU, OP_SLU, OP_SR, OP_ROL, OP_ROR, OP_XOR, OP_NEG, OP_NOT,
                           OP_COM, OP_COMU, OP_COMC, OP_COMCU, OP_INC, OP_LDA};
  initial begin
    foreach (ops[i]) begin
      one(ops[i], 32'h8000_0000, 32'd1);
      one(ops[i], 32'h7FFF_FFFF, 32'hFFFF_FFFF);
      one(ops[i], 32'd5, 32'd5);
      one(ops[i], 32'd3, 32'd7);
      one(ops[i], 32'hF000_000F, 32'd0);
      one(ops[i], 32'hF000_000F, 32'd31);
      for (int n = 0; n < 200; n++) one(ops[i], $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
