// qc_setu: SET unit of QueueCore (four per core).
//
// Produces the queue word of the SET-class instructions:
//   ldil v   : {24'b0, v}, the 8-bit value stored in bits [7:0] (as the
//              document's ldil drawing states)
//   setHH v  : the word at QH with bits [31:24] replaced by v
//   setHL v  : bits [23:16] replaced,  setLH v : bits [15:8],  setLL v : bits [7:0]
//   mv r     : the value of general register r (read by the issue stage, in g)
//   dup o    : a copy of the queue word at QH+o (in y)
// The byte positions of the four set forms are this design's reading of the
// names H/L (high/low half, then high/low byte). setr, which moves QH into a
// register, is carried out by the issue stage and produces no queue word.
// Purely combinational.
module qc_setu
  import qc_pkg::*;
(
  input  logic [7:0] op_i,
  input  logic [7:0] fld_i,
  input  word_t      x_i,
  input  word_t      y_i,
  input  word_t      g_i,
  output word_t      res_o
);

  always_comb begin
    unique case (op_i)
      OP_LDIL:  res_o = {24'd0, fld_i};
      OP_SETHH: res_o = {fld_i, x_i[23:0]};
      OP_SETHL: res_o = {x_i[31:24], fld_i, x_i[15:0]};
      OP_SETLH: res_o = {x_i[31:16], fld_i, x_i[7:0]};
      OP_SETLL: res_o = {x_i[31:8], fld_i};
      OP_MV:    res_o = g_i;
      OP_DUP:   res_o = y_i;
      default:  res_o = '0;
    endcase
  end

endmodule
