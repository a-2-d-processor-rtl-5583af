// tb_workloads: the image-processing tests on the 2-NP (1 x 2), 12-NP
// (3 x 4) and 256-NP (16 x 16, the most one control unit serves)
// configurations side by side. Each array runs buffer readout,
// invert, horizontal, vertical and total edge detection with its results checked
// pixel by pixel. The sizes are then compared: invert and edge detection
// take the same number of instructions on both arrays, because every NP
// works on its own neighborhood at the same time; readout grows with the
// number of NP rows, since the NPs of a column share one bus (one row
// segment plus the final END per row). The 16 x 16 array reads out with
// the looped readout program, as the unrolled one would not fit.
module tb_workloads;
  logic clk = 0;
  always #5 clk = ~clk;

  int c_s, f_s, r_s, i_s, h_s, v_s, t_s;
  int c_b, f_b, r_b, i_b, h_b, v_b, t_b;
  int c_x, f_x, r_x, i_x, h_x, v_x, t_x;
  bit done_s, done_b, done_x;

  workload_runner #(.ROWS(1), .COLS(2)) u_small (
    .clk, .checks(c_s), .failures(f_s), .n_readout(r_s), .n_invert(i_s),
    .n_hedge(h_s), .n_vedge(v_s), .n_totedge(t_s), .finished(done_s));
  workload_runner #(.ROWS(3), .COLS(4)) u_big (
    .clk, .checks(c_b), .failures(f_b), .n_readout(r_b), .n_invert(i_b),
    .n_hedge(h_b), .n_vedge(v_b), .n_totedge(t_b), .finished(done_b));
  workload_runner #(.ROWS(16), .COLS(16)) u_max (
    .clk, .checks(c_x), .failures(f_x), .n_readout(r_x), .n_invert(i_x),
    .n_hedge(h_x), .n_vedge(v_x), .n_totedge(t_x), .finished(done_x));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int all_checks();
    return checks + c_s + c_b + c_x;
  endfunction
  function automatic int all_failures();
    return failures + f_s + f_b + f_x;
  endfunction

  initial begin
    repeat (1000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", all_checks(), all_failures() + 1);
    $finish;
  end

  initial begin
    wait (done_s && done_b && done_x);
    // processing time does not depend on the array size
    check(i_s == i_b && i_b == i_x, $sformatf("invert: %0d / %0d / %0d instructions", i_s, i_b, i_x));
    check(h_s == h_b && h_b == h_x, $sformatf("hedge: %0d / %0d / %0d instructions", h_s, h_b, h_x));
    check(v_s == v_b && v_b == v_x, $sformatf("vedge: %0d / %0d / %0d instructions", v_s, v_b, v_x));
    check(t_s == t_b && t_b == t_x, $sformatf("totedge: %0d / %0d / %0d instructions", t_s, t_b, t_x));
    // readout time grows with the number of NP rows: 3 rows take 3 times 1 row
    check(r_b - 1 == 3 * (r_s - 1), $sformatf("readout: %0d vs %0d instructions", r_s, r_b));
    $display("readout instructions (clocks): 1x2 %0d (%0d), 3x4 %0d (%0d), 16x16 %0d (%0d)",
             r_s, 3 * r_s, r_b, 3 * r_b, r_x, 3 * r_x);
    $display("TB_RESULT checks=%0d failures=%0d", all_checks(), all_failures());
    $finish;
  end
endmodule
