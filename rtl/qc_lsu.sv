// qc_lsu: load/store unit of QueueCore (two per core).
//
// The effective byte address is base + displacement, where the base is general
// register a0 (the document's stw0 example stores to MEM(a0+ofst)) and the
// displacement is the instruction's 8-bit field, or the convop-extended value
// formed by the issue stage. Memory is little-endian, one 32-bit word per
// address[12:2]; bytes and halfwords are picked by address[1:0] (halfwords by
// address[1]), and word accesses ignore address[1:0].
//   ldb/lds: sign-extended byte/half,  ldbu/ldsu: zero-extended,  ldw/ldwu: word
//   stb/sts/stw: write the low byte/half/word of the queue word at QH
// The loads' and stores' names are the document's; their widths and the
// little-endian order are this design's reading. Purely combinational: the
// address goes to the data memory and the read word comes back in the same
// cycle.
module qc_lsu
  import qc_pkg::*;
(
  input  logic        valid_i,
  input  logic [7:0]  op_i,
  input  word_t       base_i,
  input  logic [15:0] disp_i,
  input  word_t       sdata_i,     // queue word to store
  output logic [15:0] addr_o,      // byte address
  output logic        we_o,
  output logic [3:0]  be_o,
  output word_t       wdata_o,
  input  word_t       rdata_i,     // word read from memory
  output word_t       ldata_o      // formatted load result
);

  assign addr_o = base_i[15:0] + disp_i;

  always_comb begin
    logic [7:0]  byt;
    logic [15:0] half;
    byt     = rdata_i[8*addr_o[1:0] +: 8];
    half    = addr_o[1] ? rdata_i[31:16] : rdata_i[15:0];
    we_o    = 1'b0;
    be_o    = 4'b0000;
    wdata_o = '0;
    ldata_o = '0;
    unique case (op_i)
      OP_LDB:  ldata_o = {{24{byt[7]}}, byt};
      OP_LDBU: ldata_o = {24'd0, byt};
      OP_LDS:  ldata_o = {{16{half[15]}}, half};
      OP_LDSU: ldata_o = {16'd0, half};
      OP_LDW, OP_LDWU: ldata_o = rdata_i;
      OP_STB: begin
        we_o = valid_i; be_o = 4'b0001 << addr_o[1:0]; wdata_o = {4{sdata_i[7:0]}};
      end
      OP_STS: begin
        we_o = valid_i; be_o = addr_o[1] ? 4'b1100 : 4'b0011; wdata_o = {2{sdata_i[15:0]}};
      end
      OP_STW: begin
        we_o = valid_i; be_o = 4'b1111; wdata_o = sdata_i;
      end
      default: ;
    endcase
  end

endmodule
