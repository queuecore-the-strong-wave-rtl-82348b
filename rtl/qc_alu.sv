// qc_alu: 32-bit arithmetic and logic unit of QueueCore (four per core).
//
// Executes the document's ALU instruction list. x and y are the two operands in
// queue order: x is the word produced earlier (the issue stage swaps SRC1 and
// SRC2 when OFFSET is negative, so "sub -1" after "add +1" yields the
// butterfly pair x0+x1, x0-x1). The document names the instructions only; their
// exact meaning here is this design's reading of the names:
//   add/addu  x+y            sub/subu   x-y
//   subo      x-y, ovf on signed overflow      subuo  x-y, ovf on borrow
//   and/or/xor               sru/slu/sr logical right, left, arithmetic right by y[4:0]
//   rol/ror   rotate x by y[4:0]               neg -x, not ~x, inc x+1
//   com  (x<y signed)  comu (x<y unsigned)  comc (x==y)  comcu (x!=y), result 1 or 0
//   lda  base + displacement (load address, base register a0 in g)
// Purely combinational.
module qc_alu
  import qc_pkg::*;
(
  input  logic [7:0]  op_i,
  input  word_t       x_i,
  input  word_t       y_i,
  input  word_t       g_i,
  input  logic [15:0] disp_i,
  output word_t       res_o,
  output logic        ovf_o
);

  always_comb begin
    word_t     diff;
    logic [4:0] sh;
    diff  = x_i - y_i;
    sh    = y_i[4:0];
    res_o = '0;
    ovf_o = 1'b0;
    unique case (op_i)
      OP_ADD, OP_ADDU: res_o = x_i + y_i;
      OP_SUB, OP_SUBU: res_o = diff;
      OP_SUBO: begin
        res_o = diff;
        ovf_o = (x_i[31] != y_i[31]) && (diff[31] != x_i[31]);
      end
      OP_SUBUO: begin
        res_o = diff;
        ovf_o = x_i < y_i;
      end
      OP_AND:   res_o = x_i & y_i;
      OP_OR:    res_o = x_i | y_i;
      OP_XOR:   res_o = x_i ^ y_i;
      OP_SRU:   res_o = x_i >> sh;
      OP_SLU:   res_o = x_i << sh;
      OP_SR:    res_o = word_t'($signed(x_i) >>> sh);
      OP_ROL:   res_o = (x_i << sh) | (x_i >> (6'd32 - {1'b0, sh}));
      OP_ROR:   res_o = (x_i >> sh) | (x_i << (6'd32 - {1'b0, sh}));
      OP_NEG:   res_o = -x_i;
      OP_NOT:   res_o = ~x_i;
      OP_INC:   res_o = x_i + 32'd1;
      OP_COM:   res_o = {31'd0, $signed(x_i) < $signed(y_i)};
      OP_COMU:  res_o = {31'd0, x_i < y_i};
      OP_COMC:  res_o = {31'd0, x_i == y_i};
      OP_COMCU: res_o = {31'd0, x_i != y_i};
      OP_LDA:   res_o = g_i + {16'd0, disp_i};
      default:  res_o = '0;
    endcase
  end

endmodule
