// tb_qc_ctrl: self-checking test of the control state machine: issue enabled
// after reset, interrupt taken only while enabled and running, enable cleared
// and set by the branch unit's requests, halt waiting for the execute stage to
// drain, and nothing issued or taken once halted.
module tb_qc_ctrl;
  logic clk = 0, rst_n = 0;
  logic halt_issued = 0, exe_busy = 0, irq = 0, ie_set = 0, ie_clr = 0;
  logic issue_en, irq_take, halted, ie;
  int checks = 0, failures = 0;

  qc_ctrl dut (.clk, .rst_n, .halt_issued_i(halt_issued), .exe_busy_i(exe_busy), .irq_i(irq),
               .ie_set_i(ie_set), .ie_clr_i(ie_clr), .issue_en_o(issue_en), .irq_take_o(irq_take),
               .halted_o(halted), .ie_o(ie));
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ck(input string s, input logic [3:0] got, input logic [3:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %b expected %b", s, got, exp); end
  endtask

  initial begin
    #12 rst_n = 1;
    @(negedge clk); ck("run", {issue_en, irq_take, halted, ie}, 4'b1001);
    irq = 1; #1;    ck("irq", {issue_en, irq_take, halted, ie}, 4'b0101);
    ie_clr = 1; @(negedge clk); ie_clr = 0;
    ck("in handler", {issue_en, irq_take, halted, ie}, 4'b1000);
    ie_set = 1; @(negedge clk); ie_set = 0;
    ck("after reti", {issue_en, irq_take, halted, ie}, 4'b0101);
    irq = 0; #1;
    halt_issued = 1; exe_busy = 1; @(negedge clk); halt_issued = 0;
    ck("drain", {issue_en, irq_take, halted, ie}, 4'b0001);
    @(negedge clk); ck("still draining", {issue_en, irq_take, halted, ie}, 4'b0001);
    exe_busy = 0; @(negedge clk);
    ck("halted", {issue_en, irq_take, halted, ie}, 4'b0011);
    irq = 1; @(negedge clk);
    ck("halted irq", {issue_en, irq_take, halted, ie}, 4'b0011);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
