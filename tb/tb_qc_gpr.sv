// tb_qc_gpr: self-checking test of the general purpose registers: all zero
// after reset, then random writes checked on four read ports against a shadow
// copy.
module tb_qc_gpr;
  logic        clk = 0, rst_n = 0, we = 0;
  logic [3:0]  raddr [4], waddr;
  logic [31:0] rdata [4], wdata;
  logic [31:0] sh [16];
  int checks = 0, failures = 0;

  qc_gpr #(.N(16), .RD(4)) dut (.clk, .rst_n, .raddr_i(raddr), .rdata_o(rdata),
                                .we_i(we), .waddr_i(waddr), .wdata_i(wdata));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    waddr = 0; wdata = 0;
    #12 rst_n = 1;
    for (int r = 0; r < 16; r++) begin
      sh[r] = 0; raddr[0] = 4'(r); #1; checks++;
      if (rdata[0] !== 0) begin failures++; $display("FAIL reset r%0d", r); end
    end
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 4'($urandom); wdata = $urandom;
      @(posedge clk);
      if (we) sh[waddr] = wdata;
      @(negedge clk);
      we = 0;
      for (int p = 0; p < 4; p++) raddr[p] = 4'($urandom);
      #1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (rdata[p] !== sh[raddr[p]]) begin failures++; $display("FAIL r%0d", raddr[p]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
