// tb_qc_dmem: self-checking test of the data memory. Random byte-enabled writes
// on both ports (port 1 winning on a shared byte) are mirrored in a shadow
// array, and both access ports and the debug port are read back against it.
module tb_qc_dmem;
  logic        clk = 0;
  logic [10:0] addr [2];
  logic        we [2];
  logic [3:0]  be [2];
  logic [31:0] wdata [2], rdata [2];
  logic [10:0] dbg_addr;
  logic [31:0] dbg_data;
  logic [31:0] sh [2048];
  int checks = 0, failures = 0;

  qc_dmem #(.WORDS(2048)) dut (.clk, .addr_i(addr), .we_i(we), .be_i(be), .wdata_i(wdata),
                               .rdata_o(rdata), .dbg_addr_i(dbg_addr), .dbg_data_o(dbg_data));
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill a window of 64 words with known data
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      addr[0] = 11'(i); we[0] = 1; be[0] = 4'hF; wdata[0] = $urandom; sh[i] = wdata[0];
      addr[1] = 11'(2047 - i); we[1] = 1; be[1] = 4'hF; wdata[1] = $urandom; sh[2047 - i] = wdata[1];
    end
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        addr[p] = 11'($urandom % 64); we[p] = 1'($urandom); be[p] = 4'($urandom); wdata[p] = $urandom;
      end
      @(posedge clk);
      for (int p = 0; p < 2; p++)
        for (int b = 0; b < 4; b++)
          if (we[p] && be[p][b]) sh[addr[p]][8*b +: 8] = wdata[p][8*b +: 8];
      @(negedge clk);
      we[0] = 0; we[1] = 0;
      addr[0] = 11'($urandom % 64); addr[1] = 11'(2047 - $urandom % 64); dbg_addr = 11'($urandom % 64);
      #1;
      checks += 3;
      if (rdata[0] !== sh[addr[0]]) begin failures++; $display("FAIL port0 %0d", addr[0]); end
      if (rdata[1] !== sh[addr[1]]) begin failures++; $display("FAIL port1 %0d", addr[1]); end
      if (dbg_data !== sh[dbg_addr]) begin failures++; $display("FAIL debug %0d", dbg_addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
