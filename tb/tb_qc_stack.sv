// tb_qc_stack: self-checking test of the 64 x 32 return stack. Random pushes
// and pops of two-word frames are mirrored in a queue-based model here; the
// top frame, empty/full flags and the error flag on overflow and underflow are
// checked every cycle, including filling all 32 frames.
module tb_qc_stack;
  logic        clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [31:0] p0, p1, t0, t1;
  logic        empty, full, err;
  logic [63:0] model [$];
  int checks = 0, failures = 0;

  qc_stack #(.DEPTH(64), .DW(32)) dut (.clk, .rst_n, .push_i(push), .push0_i(p0), .push1_i(p1),
                                       .pop_i(pop), .top0_o(t0), .top1_o(t1), .empty_o(empty),
                                       .full_o(full), .err_o(err));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic pu, input logic po);
    logic exp_err;
    @(negedge clk);
    push = pu; pop = po; p0 = $urandom; p1 = $urandom;
    #1;
    exp_err = (pu && model.size() == 32) || (po && !pu && model.size() == 0);
    checks++;
    if (err !== exp_err) begin failures++; $display("FAIL err flag size=%0d", model.size()); end
    @(posedge clk);
    if (pu && model.size() < 32) model.push_back({p0, p1});
    else if (po && !pu && model.size() > 0) void'(model.pop_back());
    @(negedge clk);
    push = 0; pop = 0;
    #1;
    checks++;
    if (empty !== (model.size() == 0) || full !== (model.size() == 32)) begin
      failures++; $display("FAIL flags size=%0d", model.size());
    end
    if (model.size() > 0) begin
      checks++;
      if ({t0, t1} !== model[$]) begin failures++; $display("FAIL top frame"); end
    end
  endtask

  initial begin
    #12 rst_n = 1;
    step(0, 1);                               // underflow
    for (int i = 0; i < 34; i++) step(1, 0);  // fill and overflow
    for (int i = 0; i < 34; i++) step(0, 1);  // drain and underflow
    for (int i = 0; i < 2000; i++) step(($urandom % 3) != 0, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
