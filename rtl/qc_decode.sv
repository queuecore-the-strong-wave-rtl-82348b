// qc_decode: decoder for one 16-bit QueueCore instruction.
//
// The opcode sits in bits [15:8] and an 8-bit field in bits [7:0], as in the
// document's ldil, call0 and stw0 format drawings. The decoder assigns each
// instruction its execution unit, its consume number CN (queue words removed at
// QH) and produce number PN (words written at QT), and which queue words and
// registers it reads. The CN/PN values follow the produced-order model: a binary
// operation reads QH and QH+OFFSET but consumes only QH (CN=1, PN=1, as printed
// for "add -2"). Loads produce one word, stores and conditional branches consume
// one. Opcodes the design does not define decode as a no-operation; that choice,
// and every opcode number except ldil/call0/stw0, is this design's own.
//
// Purely combinational; four copies decode the 8-byte fetch group in parallel.
module qc_decode
  import qc_pkg::*;
(
  input  logic          valid_i,
  input  logic [IW-1:0] instr_i,
  output dec_t          dec_o
);

  always_comb begin
    dec_t d;
    d           = '0;
    d.valid     = valid_i;
    d.op        = instr_i[15:8];
    d.fld       = instr_i[7:0];
    d.unit      = U_NONE;
    unique case (instr_i[15:8])
      // binary ALU operations: SRC1 = QH, SRC2 = QH + OFFSET
      OP_ADD, OP_ADDU, OP_SUB, OP_SUBO, OP_SUBU, OP_SUBUO, OP_AND, OP_OR,
      OP_SRU, OP_SLU, OP_SR, OP_ROL, OP_ROR, OP_XOR,
      OP_COM, OP_COMU, OP_COMC, OP_COMCU: begin
        d.unit = U_ALU; d.cn = 2'd1; d.pn = 1'b1; d.rd1 = 1'b1; d.rd2 = 1'b1;
      end
      // unary ALU operations
      OP_NEG, OP_NOT, OP_INC: begin
        d.unit = U_ALU; d.cn = 2'd1; d.pn = 1'b1; d.rd1 = 1'b1;
      end
      OP_LDA: begin
        d.unit = U_ALU; d.pn = 1'b1; d.gpr_rd = 1'b1;
      end
      OP_MULT, OP_MULU, OP_DIV, OP_DIVO, OP_DIVU, OP_DIVUO,
      OP_MOD, OP_MODO, OP_MODU, OP_MODUO: begin
        d.unit = U_MLT; d.cn = 2'd1; d.pn = 1'b1; d.rd1 = 1'b1; d.rd2 = 1'b1;
      end
      OP_LDIL: begin
        d.unit = U_SET; d.pn = 1'b1;
      end
      OP_SETHH, OP_SETHL, OP_SETLH, OP_SETLL: begin
        d.unit = U_SET; d.cn = 2'd1; d.pn = 1'b1; d.rd1 = 1'b1;
      end
      OP_SETR: begin
        d.unit = U_SET; d.cn = 2'd1; d.rd1 = 1'b1; d.gpr_wr = 1'b1;
      end
      OP_MV: begin
        d.unit = U_SET; d.pn = 1'b1; d.gpr_rd = 1'b1;
      end
      OP_DUP: begin
        d.unit = U_SET; d.pn = 1'b1; d.rd2 = 1'b1;
      end
      OP_LDB, OP_LDBU, OP_LDS, OP_LDSU, OP_LDW, OP_LDWU: begin
        d.unit = U_LSU; d.pn = 1'b1; d.gpr_rd = 1'b1; d.is_load = 1'b1;
      end
      OP_STB, OP_STS, OP_STW: begin
        d.unit = U_LSU; d.cn = 2'd1; d.rd1 = 1'b1; d.gpr_rd = 1'b1; d.is_store = 1'b1;
      end
      OP_B, OP_RFC, OP_RETI: begin
        d.unit = U_BRU; d.is_ctrl = 1'b1;
      end
      OP_BEQ, OP_BLT, OP_BLE, OP_BGT, OP_BGE: begin
        d.unit = U_BRU; d.is_ctrl = 1'b1; d.cn = 2'd1; d.rd1 = 1'b1;
      end
      OP_JUMP, OP_CALL: begin
        d.unit = U_BRU; d.is_ctrl = 1'b1; d.gpr_rd = 1'b1;
      end
      OP_CONVOP: d.is_convop = 1'b1;
      OP_HALT:   d.is_halt   = 1'b1;
      default: ;  // nop and undefined opcodes
    endcase
    if (!valid_i) begin
      d      = '0;
      d.unit = U_NONE;
    end
    dec_o = d;
  end

endmodule
