// tb_program_memory: writes random words to random addresses and reads them
// back through the combinational read port, comparing with a model.
module tb_program_memory;
  logic        clk = 0, we;
  logic [7:0]  waddr, raddr;
  logic [15:0] wdata, rdata;

  program_memory dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [15:0] m [256];
  bit          valid [256];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); we = 1; waddr = 8'(a); wdata = 16'($urandom); m[a] = wdata; valid[a] = 1;
    end
    @(negedge clk); we = 0;
    repeat (3000) begin
      we = $urandom_range(0, 1); waddr = 8'($urandom); wdata = 16'($urandom);
      raddr = 8'($urandom);
      #1;
      checks++;
      if (rdata !== m[raddr]) begin
        failures++;
        if (failures < 10) $display("FAIL %02h: %04h exp %04h", raddr, rdata, m[raddr]);
      end
      @(negedge clk);
      if (we) m[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
