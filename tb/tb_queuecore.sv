// tb_queuecore: end-to-end test of the QueueCore processor at its default
// parameters.
//
// The testbench assembles a program in memory, preloads eight data words,
// releases reset and runs until the core halts. The program contains:
//   - the 8-point butterfly of the breadth-first example (8 loads, three levels
//     of add/sub with offsets +-1, +-2, +-4, 8 stores), checked against a
//     butterfly computed here from the same data;
//   - two MLT operations in one level (mult, divo), a chain of SET operations
//     (ldil, setHH, setLH), dup/setr/mv, a signed-overflow subo;
//   - a store through the convop extension (convop 62; stw 32 -> address 4000);
//   - a taken and a not-taken beq, a call/rfc to a subroutine reached with a
//     convop-extended displacement, and an interrupt raised in the middle of the
//     butterfly whose handler stores a marker and returns with reti.
// Every store target is checked in data memory, and the event outputs are
// counted: each mechanism (operand stall, barrier, unit limit, taken and
// not-taken branch, call, rfc, interrupt, reti, convop, two-wide issue) must
// occur at least once. The core must halt within the watchdog limit.
module tb_queuecore;
  import qc_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        imem_we = 1'b0;
  logic [10:0] imem_waddr = '0;
  logic [31:0] imem_wdata = '0;
  logic [10:0] dbg_addr = '0;
  logic [31:0] dbg_data;
  logic        irq = 1'b0;
  logic        halted, overflow, qovf, stack_err;
  qc_events_t  ev;

  queuecore dut (
    .clk, .rst_n, .imem_we_i(imem_we), .imem_waddr_i(imem_waddr), .imem_wdata_i(imem_wdata),
    .dmem_dbg_addr_i(dbg_addr), .dmem_dbg_data_o(dbg_data), .irq_i(irq),
    .halted_o(halted), .overflow_o(overflow), .qovf_o(qovf), .stack_err_o(stack_err), .ev_o(ev)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------- program
  logic [15:0] prog [1024];
  int          pc;
  task automatic I(input opcode_e op, input logic [7:0] f = 8'h00);
    prog[pc] = {op, f};
    pc++;
  endtask

  logic [31:0] x [8];
  logic [31:0] y [8], z [8], w [8];

  // data memory word index of a byte address
  function automatic int wi(input int byte_addr);
    return byte_addr / 4;
  endfunction

  // ---------------------------------------------------------------- events
  int n_operand = 0, n_barrier = 0, n_unit = 0, n_taken = 0, n_ntaken = 0;
  int n_call = 0, n_rfc = 0, n_irq = 0, n_reti = 0, n_convop = 0, n_wide = 0, n_issued = 0;

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (ev.stall_operand) n_operand++;
    if (ev.barrier)       n_barrier++;
    if (ev.unit_limit)    n_unit++;
    if (ev.br_taken)      n_taken++;
    if (ev.br_not_taken)  n_ntaken++;
    if (ev.call)          n_call++;
    if (ev.rfc)           n_rfc++;
    if (ev.irq_taken)     n_irq++;
    if (ev.reti)          n_reti++;
    if (ev.convop_used)   n_convop++;
    if (ev.issued >= 3'd2) n_wide++;
    n_issued += int'(ev.issued);
  end

  // interrupt: raised during the butterfly, dropped once taken
  always @(posedge clk) begin
    if (cycles == 12) irq <= 1'b1;
    if (ev.irq_taken) irq <= 1'b0;
  end

  // watchdog
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: core did not halt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) prog[i] = {OP_NOP, 8'h00};
    for (int i = 0; i < 8; i++) x[i] = 32'(i * 37 + 5) ^ (32'h1000 << i);
    x[3] = 32'hFFFF_FF00;   // a negative value

    // ---------------- main program at byte address 0
    pc = 0;
    for (int i = 0; i < 8; i++) I(OP_LDW, 8'(4 * i));        // ld x0..x7
    for (int i = 0; i < 4; i++) begin I(OP_ADD, 8'sd1); I(OP_SUB, -8'sd1); end
    for (int i = 0; i < 2; i++) begin
      I(OP_ADD, 8'sd2); I(OP_ADD, 8'sd2); I(OP_SUB, -8'sd2); I(OP_SUB, -8'sd2);
    end
    for (int i = 0; i < 4; i++) I(OP_ADD, 8'sd4);
    for (int i = 0; i < 4; i++) I(OP_SUB, -8'sd4);
    for (int i = 0; i < 8; i++) I(OP_STW, 8'(64 + 4 * i));   // st Y0..Y7
    // MLT: a*b and b/c in one level, then drop c into r15
    I(OP_LDW, 8'd0); I(OP_LDW, 8'd4); I(OP_LDW, 8'd8);
    I(OP_MULT, 8'sd1); I(OP_DIVO, 8'sd1); I(OP_SETR, 8'd15);
    I(OP_STW, 8'd96); I(OP_STW, 8'd100);
    // convop: store 0x5A at 62*64 + 32 = 4000
    I(OP_LDIL, 8'h5A); I(OP_CONVOP, 8'd62); I(OP_STW, 8'd32);
    // SET chain
    I(OP_LDIL, 8'h11); I(OP_SETHH, 8'hAA); I(OP_SETLH, 8'h22); I(OP_STW, 8'd104);
    // taken beq skips two instructions
    I(OP_LDIL, 8'd0); I(OP_BEQ, 8'd2); I(OP_LDIL, 8'hEE); I(OP_STW, 8'd108);
    // not-taken beq
    I(OP_LDIL, 8'd1); I(OP_BEQ, 8'd2); I(OP_LDIL, 8'h77); I(OP_STW, 8'd112);
    // call the subroutine at 8*64 + 0 = 512
    I(OP_CONVOP, 8'd8); I(OP_CALL, 8'd0);
    // dup / setr / mv
    I(OP_LDIL, 8'd5); I(OP_DUP, 8'sd0); I(OP_ADD, 8'sd1); I(OP_SETR, 8'd1);
    I(OP_STW, 8'd128); I(OP_MV, 8'd1); I(OP_STW, 8'd132);
    // subo overflow: 0x80000000 - 1
    I(OP_LDIL, 8'd0); I(OP_SETHH, 8'h80); I(OP_LDIL, 8'd1); I(OP_SUBO, 8'sd1);
    I(OP_SETR, 8'd15); I(OP_STW, 8'd124);
    I(OP_HALT);
    if (pc > 128) $fatal(1, "main program overlaps the interrupt handler");

    // ---------------- interrupt handler at 0x100
    pc = 16'h0100 / 2;
    I(OP_LDIL, 8'h44); I(OP_STW, 8'd120); I(OP_RETI);
    // ---------------- subroutine at 0x200
    pc = 16'h0200 / 2;
    I(OP_LDIL, 8'h33); I(OP_STW, 8'd116); I(OP_RFC);

    // load program (two instructions per word, lower address in bits [15:0])
    for (int a = 0; a < 512; a++) begin
      @(negedge clk);
      imem_we    = 1'b1;
      imem_waddr = 11'(a);
      imem_wdata = {prog[2*a+1], prog[2*a]};
    end
    @(negedge clk);
    imem_we = 1'b0;
    // preload data memory: x0..x7 at 0..28, zeros for the store targets
    for (int i = 0; i < 2048; i++) dut.u_dmem.mem[i] = '0;
    for (int i = 0; i < 8; i++) dut.u_dmem.mem[i] = x[i];

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (halted);
    @(negedge clk);

    // ---------------- reference results
    for (int i = 0; i < 4; i++) begin
      y[2*i]   = x[2*i] + x[2*i+1];
      y[2*i+1] = x[2*i] - x[2*i+1];
    end
    for (int h = 0; h < 2; h++) begin
      z[4*h+0] = y[4*h+0] + y[4*h+2];
      z[4*h+1] = y[4*h+1] + y[4*h+3];
      z[4*h+2] = y[4*h+0] - y[4*h+2];
      z[4*h+3] = y[4*h+1] - y[4*h+3];
    end
    for (int i = 0; i < 4; i++) begin
      w[i]   = z[i] + z[i+4];
      w[i+4] = z[i] - z[i+4];
    end
    for (int i = 0; i < 8; i++) begin
      dbg_addr = 11'(wi(64 + 4 * i)); #1;
      check($sformatf("butterfly Y%0d", i), dbg_data, w[i]);
    end
    dbg_addr = 11'(wi(96));   #1; check("mult", dbg_data, x[0] * x[1]);
    dbg_addr = 11'(wi(100));  #1; check("divo", dbg_data, x[1] / x[2]);
    dbg_addr = 11'(wi(4000)); #1; check("convop store", dbg_data, 32'h5A);
    dbg_addr = 11'(wi(104));  #1; check("set chain", dbg_data, 32'hAA00_2211);
    dbg_addr = 11'(wi(108));  #1; check("taken branch skipped", dbg_data, 32'h0);
    dbg_addr = 11'(wi(112));  #1; check("not-taken branch", dbg_data, 32'h77);
    dbg_addr = 11'(wi(116));  #1; check("subroutine", dbg_data, 32'h33);
    dbg_addr = 11'(wi(120));  #1; check("interrupt handler", dbg_data, 32'h44);
    dbg_addr = 11'(wi(124));  #1; check("subo result", dbg_data, 32'h7FFF_FFFF);
    dbg_addr = 11'(wi(128));  #1; check("dup+add", dbg_data, 32'd10);
    dbg_addr = 11'(wi(132));  #1; check("setr/mv", dbg_data, 32'd5);
    check("overflow flag", 32'(overflow), 32'd1);
    check("no queue overflow", 32'(qovf), 32'd0);
    check("no stack error", 32'(stack_err), 32'd0);

    // ---------------- mechanisms
    check("operand stall seen", 32'(n_operand > 0), 1);
    check("barrier seen",       32'(n_barrier > 0), 1);
    check("unit limit seen",    32'(n_unit > 0), 1);
    check("taken branch",       32'(n_taken), 1);
    check("not-taken branch",   32'(n_ntaken), 1);
    check("call",               32'(n_call), 1);
    check("rfc",                32'(n_rfc), 1);
    check("interrupt",          32'(n_irq), 1);
    check("reti",               32'(n_reti), 1);
    check("convop used",        32'(n_convop), 2);
    check("multi-issue seen",   32'(n_wide > 0), 1);
    $display("cycles=%0d issued=%0d operand=%0d barrier=%0d unit=%0d wide=%0d",
             cycles, n_issued, n_operand, n_barrier, n_unit, n_wide);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
