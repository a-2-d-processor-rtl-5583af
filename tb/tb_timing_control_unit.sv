// tb_timing_control_unit: after reset the strobes come one per clock in the
// order gcu_ce, ir_ce, np_ce, exactly one at a time; they stop while
// `enable` is low and resume in order; sys_rst follows an asynchronous reset
// at once and is released two clocks after it.
module tb_timing_control_unit;
  logic clk = 0, enable, reset;
  logic sys_rst, gcu_ce, ir_ce, np_ce;

  timing_control_unit dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    int expect_ph;
    enable = 1; reset = 1;
    repeat (2) @(negedge clk);
    reset = 0;
    chk(sys_rst, "sys_rst held right after reset");
    @(negedge clk);
    chk(sys_rst, "sys_rst one clock after reset");
    @(negedge clk);
    chk(!sys_rst, "sys_rst released after two clocks");
    expect_ph = 0;
    repeat (300) begin
      if ($urandom_range(0, 3) == 0) enable = 0; else enable = 1;
      #1;
      chk({gcu_ce, ir_ce, np_ce} == (enable ? (3'b100 >> expect_ph) : 3'b000),
          $sformatf("phase %0d en %0b got %b%b%b", expect_ph, enable, gcu_ce, ir_ce, np_ce));
      @(negedge clk);
      if (enable) expect_ph = (expect_ph + 1) % 3;
    end
    // asynchronous reset in mid-clock
    #2 reset = 1; #1;
    chk(sys_rst && !gcu_ce && !ir_ce && !np_ce, "async reset");
    @(negedge clk); reset = 0; enable = 1;
    repeat (2) @(negedge clk);
    chk(gcu_ce, "sequence restarts at gcu_ce");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
