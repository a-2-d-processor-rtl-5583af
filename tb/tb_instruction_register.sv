// tb_instruction_register: reset value NOP, load on `load`, hold otherwise.
module tb_instruction_register;
  import np_pkg::*;
  logic        clk = 0, rst, load;
  logic [15:0] d, q;

  instruction_register dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [15:0] expv;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; d = 16'hFFFF;
    @(negedge clk); rst = 0;
    checks++; if (q !== 16'b11_01111_010000000) begin failures++; $display("FAIL reset %04h", q); end
    expv = q;
    repeat (500) begin
      load = $urandom_range(0, 1); d = 16'($urandom);
      if (load) expv = d;
      @(negedge clk);
      checks++;
      if (q !== expv) begin failures++; if (failures < 10) $display("FAIL %04h exp %04h", q, expv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
