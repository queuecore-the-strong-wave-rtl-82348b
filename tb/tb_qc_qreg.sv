// tb_qc_qreg: self-checking test of the circular queue register. After reset
// all valid bits must read 0. Random cycles then write up to four entries,
// clear up to four valid bits and read eight entries, against a shadow copy of
// data and valid bits kept here (clear wins over a same-cycle write).
module tb_qc_qreg;
  logic        clk = 0, rst_n = 0;
  logic [7:0]  raddr [8];
  logic [31:0] rdata [8];
  logic        rvalid [8];
  logic        we [4], clr [4];
  logic [7:0]  waddr [4], caddr [4];
  logic [31:0] wdata [4];
  logic [31:0] sh_d [256];
  logic        sh_v [256];
  int checks = 0, failures = 0;

  qc_qreg #(.DEPTH(256), .DW(32), .RD(8), .WR(4)) dut (
    .clk, .rst_n, .raddr_i(raddr), .rdata_o(rdata), .rvalid_o(rvalid),
    .we_i(we), .waddr_i(waddr), .wdata_i(wdata), .clr_i(clr), .caddr_i(caddr));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin we[k] = 0; clr[k] = 0; waddr[k] = 0; caddr[k] = 0; wdata[k] = 0; end
    for (int r = 0; r < 8; r++) raddr[r] = 0;
    for (int e = 0; e < 256; e++) sh_v[e] = 0;
    #12 rst_n = 1;
    for (int e = 0; e < 256; e += 8) begin
      for (int r = 0; r < 8; r++) raddr[r] = 8'(e + r);
      #1;
      for (int r = 0; r < 8; r++) begin
        checks++;
        if (rvalid[r] !== 1'b0) begin failures++; $display("FAIL valid after reset %0d", e + r); end
      end
    end
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        we[k] = 1'($urandom); waddr[k] = 8'(4 * ($urandom % 64) + k); wdata[k] = $urandom;
        clr[k] = ($urandom % 4 == 0); caddr[k] = 8'($urandom % 64 + 64 * k);
      end
      @(posedge clk);
      for (int k = 0; k < 4; k++) if (we[k]) begin sh_d[waddr[k]] = wdata[k]; sh_v[waddr[k]] = 1; end
      for (int k = 0; k < 4; k++) if (clr[k]) sh_v[caddr[k]] = 0;
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin we[k] = 0; clr[k] = 0; end
      for (int r = 0; r < 8; r++) raddr[r] = 8'($urandom);
      #1;
      for (int r = 0; r < 8; r++) begin
        checks++;
        if (rvalid[r] !== sh_v[raddr[r]] || (sh_v[raddr[r]] && rdata[r] !== sh_d[raddr[r]])) begin
          failures++;
          $display("FAIL entry %0d: %h/%b expected %h/%b", raddr[r], rdata[r], rvalid[r], sh_d[raddr[r]], sh_v[raddr[r]]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
