// tb_global_control_unit: program sequencing. The testbench supplies the
// three phase strobes, a small program array and the instruction register,
// and plays the NPs' condition line. It checks the program counter after
// every instruction against a hand-computed trace: straight-line advance,
// a conditional jump taken and not taken depending on the NP condition, an
// unconditional jump, a conditional END that is skipped, and an END that
// stops the program with a one-clock `done` and the instruction count.
// A second program, started at its own address, ends at once on a
// conditional END that the NPs find true.
module tb_global_control_unit;
  import np_pkg::*;

  logic       clk = 0, rst, gcu_ce, ir_ce, np_ce, start, np_cond;
  logic [7:0] start_addr, pc;
  logic [15:0] ir;
  logic       ir_load, np_exec, busy, done;
  logic [31:0] instr_count;

  global_control_unit dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  logic [15:0] prog [256];
  int ph = 0;
  // phases and instruction register
  always @(posedge clk) begin
    if (rst) ph <= 0; else ph <= (ph + 1) % 3;
    if (ir_load) ir <= prog[pc];
  end
  assign gcu_ce = !rst && ph == 0;
  assign ir_ce  = !rst && ph == 1;
  assign np_ce  = !rst && ph == 2;

  // the NPs find a condition true only for the jump to 40 and for a C END
  assign np_cond = (is_jump(ir) && ir[7:0] == 8'h40) || (is_end(ir) && ir[15:14] == COND_C);

  int trace [$];
  always @(posedge clk) if (np_exec) trace.push_back(int'(pc));

  initial begin
    int exp_trace [$];
    foreach (prog[k]) prog[k] = i_spl(COND_U, FN_NOP);
    // program at 0x10
    prog[8'h10] = i_spl(COND_U, FN_NOP);
    prog[8'h11] = i_jump(J_Z, 8'h40);      // condition true -> 40
    prog[8'h40] = i_jump(J_NZ, 8'h50);     // condition false -> 41
    prog[8'h41] = i_jump(J_ALW, 8'h60);    // unconditional -> 60
    prog[8'h60] = i_spl(COND_Z, FN_END);   // conditional END, no NP true -> 61
    prog[8'h61] = i_spl(COND_U, FN_NOP);
    prog[8'h62] = i_spl(COND_U, FN_END);
    // program at 0xA0
    prog[8'hA0] = i_spl(COND_C, FN_END);   // conditional END, an NP true -> stop
    ir = i_spl(COND_U, FN_NOP);
    rst = 1; start = 0; start_addr = 0;
    repeat (2) @(negedge clk); rst = 0;
    repeat (5) @(negedge clk);
    chk(!busy && !np_exec && !ir_load, "idle after reset");
    start = 1; start_addr = 8'h10;
    @(negedge clk); start = 0;
    chk(busy, "busy after start");
    while (!done) @(negedge clk);
    exp_trace = '{8'h10, 8'h11, 8'h40, 8'h41, 8'h60, 8'h61, 8'h62};
    chk(trace.size() == exp_trace.size(), $sformatf("trace length %0d", trace.size()));
    foreach (exp_trace[k]) if (k < trace.size())
      chk(trace[k] == exp_trace[k], $sformatf("step %0d pc %02h exp %02h", k, trace[k], exp_trace[k]));
    chk(instr_count == 7, $sformatf("instr_count %0d", instr_count));
    @(negedge clk);
    chk(!done && !busy, "done is a pulse, program stopped");
    repeat (9) @(negedge clk);
    chk(!np_exec && !ir_load, "nothing executes after END");
    trace.delete();
    start = 1; start_addr = 8'hA0;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    chk(trace.size() == 1 && trace[0] == 8'hA0, "second program from its own start");
    chk(instr_count == 1, "second program count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
