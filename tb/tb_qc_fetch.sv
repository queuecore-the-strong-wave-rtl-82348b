// tb_qc_fetch: self-checking test of the fetch unit and its instruction window.
// The program memory is modelled so that every 16-bit instruction equals its
// own byte address; then the window must always hold head_pc, head_pc+2, ...
// The test pops random amounts, redirects to random (even) targets, checks the
// window contents and the head address every cycle, and checks that the unit
// sustains four instructions per cycle when all are issued, and that the first
// instructions of a redirect target are in the window two cycles after it.
module tb_qc_fetch;
  import qc_pkg::*;
  logic        clk = 0, rst_n = 0, redirect = 0;
  pc_t         target = '0, faddr, head;
  logic [2:0]  pop = '0, avail;
  logic [63:0] fdata;
  logic [15:0] win [4];
  int checks = 0, failures = 0;

  qc_fetch #(.N(4), .DEPTH(8)) dut (.clk, .rst_n, .redirect_i(redirect), .target_i(target),
                                    .pop_i(pop), .faddr_o(faddr), .fdata_i(fdata), .win_o(win),
                                    .avail_o(avail), .head_pc_o(head));
  always #5 clk = ~clk;

  // memory model: instruction at byte address a is a
  always_comb
    for (int s = 0; s < 4; s++) fdata[16*s +: 16] = faddr + 16'(2 * s);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_window();
    for (int k = 0; k < 4; k++)
      if (k < int'(avail)) begin
        checks++;
        if (win[k] !== head + 16'(2 * k)) begin
          failures++; $display("FAIL win[%0d]=%h head=%h", k, win[k], head);
        end
      end
  endtask

  initial begin
    int total;
    #12 rst_n = 1;
    // random pops and redirects
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      check_window();
      redirect = ($urandom % 10 == 0);
      target   = 16'($urandom) & 16'hFFFE;
      pop      = 3'($urandom % (int'(avail) + 1));
      if (redirect) begin
        @(negedge clk);
        redirect = 0; pop = 0;
        checks++;
        if (head !== target) begin failures++; $display("FAIL head after redirect"); end
        @(negedge clk);
        checks++;
        if (int'(avail) != 4 - int'(target[2:1])) begin
          failures++; $display("FAIL avail %0d after redirect to %h", avail, target);
        end
      end
    end
    // throughput: pop everything available for 100 cycles
    @(negedge clk); redirect = 1; target = 16'h0040; pop = 0;
    @(negedge clk); redirect = 0;
    repeat (3) @(negedge clk);
    total = 0;
    for (int c = 0; c < 100; c++) begin
      pop = avail; total += int'(avail);
      check_window();
      @(negedge clk);
    end
    checks++;
    if (total != 400) begin failures++; $display("FAIL throughput %0d per 100 cycles", total); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
