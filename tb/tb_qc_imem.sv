// tb_qc_imem: self-checking test of the program memory. Words are written
// through the load port with a pattern computed from the address; every
// aligned 8-byte fetch block must return the two words of that block, the lower
// word in bits [31:0], and the low three address bits must not matter.
module tb_qc_imem;
  logic        clk = 0, we = 0;
  logic [10:0] waddr;
  logic [31:0] wdata;
  logic [15:0] faddr;
  logic [63:0] fdata;
  int checks = 0, failures = 0;

  qc_imem #(.WORDS(2048)) dut (.clk, .we_i(we), .waddr_i(waddr), .wdata_i(wdata),
                               .faddr_i(faddr), .fdata_o(fdata));
  always #5 clk = ~clk;

  function automatic logic [31:0] pat(input int a);
    return 32'(a * 32'h9E37_79B1) ^ 32'(a);
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2048; a++) begin
      @(negedge clk); we = 1; waddr = 11'(a); wdata = pat(a);
    end
    @(negedge clk); we = 0;
    for (int blk = 0; blk < 1024; blk++) begin
      faddr = 16'(blk * 8 + ($urandom % 8));
      #1;
      checks++;
      if (fdata !== {pat(2 * blk + 1), pat(2 * blk)}) begin
        failures++; $display("FAIL block %0d: %h", blk, fdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
