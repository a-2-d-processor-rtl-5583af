// tb_nr_control: Neighborhood Register write control. Checks reset to zero,
// each single writer, hold without requests, and the fixed priority when
// several neighbours write in the same clock.
module tb_nr_control;
  logic       clk = 0, rst;
  logic [3:0] req;
  logic [7:0] data [4];
  logic [7:0] nr;

  nr_control dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] expv;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; req = 0;
    foreach (data[k]) data[k] = 8'(8'h10 + k);
    @(negedge clk); rst = 0;
    checks++; if (nr !== 8'h00) failures++;
    expv = 0;
    repeat (500) begin
      req = 4'($urandom);
      foreach (data[k]) data[k] = 8'($urandom);
      if (req[0])      expv = data[0];
      else if (req[1]) expv = data[1];
      else if (req[2]) expv = data[2];
      else if (req[3]) expv = data[3];
      @(negedge clk);
      checks++;
      if (nr !== expv) begin
        failures++;
        if (failures < 10) $display("FAIL req %b: %02h exp %02h", req, nr, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
