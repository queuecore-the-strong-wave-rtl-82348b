// qc_mlt: the multiply/divide unit (MLT) of QueueCore, one per core.
//
// Executes mult, mulu, div, divo, divu, divuo, mod, modo, modu and moduo on two
// 32-bit operands in queue order (x produced before y). The document says only
// "signed 32-bit multiplier divider and mod instructions"; the rest is this
// design's choice:
//   mult/mulu: low 32 bits of the product (identical for both signs).
//   div/mod:   signed quotient and remainder, rounding toward zero.
//   divu/modu: unsigned quotient and remainder.
//   A zero divisor gives an all-ones quotient and the dividend as remainder; the
//   signed overflow case (-2**31 / -1) gives -2**31 and remainder 0.
//   The "o" variants raise ovf_o on a zero divisor or on signed overflow.
// Single-cycle and purely combinational.
module qc_mlt
  import qc_pkg::*;
(
  input  logic [7:0] op_i,
  input  word_t      x_i,
  input  word_t      y_i,
  output word_t      res_o,
  output logic       ovf_o
);

  always_comb begin
    logic  zero, sovf;
    word_t qs, rs, qu, ru;
    zero = (y_i == '0);
    sovf = (x_i == 32'h8000_0000) && (y_i == 32'hFFFF_FFFF);
    qu   = zero ? 32'hFFFF_FFFF : x_i / y_i;
    ru   = zero ? x_i : x_i % y_i;
    if (zero) begin
      qs = 32'hFFFF_FFFF; rs = x_i;
    end else if (sovf) begin
      qs = 32'h8000_0000; rs = '0;
    end else begin
      qs = word_t'($signed(x_i) / $signed(y_i));
      rs = word_t'($signed(x_i) % $signed(y_i));
    end
    res_o = '0;
    ovf_o = 1'b0;
    unique case (op_i)
      OP_MULT, OP_MULU: res_o = x_i * y_i;
      OP_DIV:           res_o = qs;
      OP_DIVO:   begin  res_o = qs; ovf_o = zero | sovf; end
      OP_DIVU:          res_o = qu;
      OP_DIVUO:  begin  res_o = qu; ovf_o = zero;        end
      OP_MOD:           res_o = rs;
      OP_MODO:   begin  res_o = rs; ovf_o = zero | sovf; end
      OP_MODU:          res_o = ru;
      OP_MODUO:  begin  res_o = ru; ovf_o = zero;        end
      default:          res_o = '0;
    endcase
  end

endmodule
