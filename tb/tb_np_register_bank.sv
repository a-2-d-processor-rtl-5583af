// tb_np_register_bank: random instruction writes, host loads and reads of
// the pixel banks against an array model, in and out of nibble mode, plus
// the Row Column Register value after reset, and the priority of a host
// load over an instruction write to the same register.
module tb_np_register_bank;
  import np_pkg::*;

  logic       clk = 0, rst;
  logic [7:0] rc_init = 8'h25;
  logic       nibble_mode;
  logic [7:0] raddr, rdata, waddr, wdata, ld_data, rc;
  logic       we, ld_we;
  logic [1:0] ld_bank;
  logic [5:0] ld_pix;

  np_register_bank dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] m [3][64];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] model_read(input logic [7:0] a, input bit nib);
    case (a[7:6])
      2'b00: return m[0][a[5:0]];
      2'b01: return m[1][a[5:0]];
      2'b10: return nib ? {4'h0, m[2][a[5:0]][3:0]} : m[2][a[5:0]];
      default: return nib ? {4'h0, m[2][a[5:0]][7:4]} : 8'h00;
    endcase
  endfunction

  initial begin
    rst = 1; we = 0; ld_we = 0; nibble_mode = 0;
    raddr = 0; waddr = 0; wdata = 0; ld_data = 0; ld_bank = 0; ld_pix = 0;
    foreach (m[b, p]) m[b][p] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    checks++; if (rc !== 8'h25) begin failures++; $display("FAIL rc %02h", rc); end
    // host loads
    for (int b = 0; b < 3; b++)
      for (int p = 0; p < 64; p++) begin
        ld_we = 1; ld_bank = 2'(b); ld_pix = 6'(p); ld_data = 8'($urandom);
        m[b][p] = ld_data;
        @(negedge clk);
      end
    ld_we = 0;
    // random mixed traffic
    repeat (3000) begin
      nibble_mode = $urandom_range(0, 1);
      we = $urandom_range(0, 1);
      waddr = 8'($urandom); wdata = 8'($urandom);
      raddr = 8'($urandom);
      #1;
      checks++;
      if (rdata !== model_read(raddr, nibble_mode)) begin
        failures++;
        if (failures < 10) $display("FAIL read %02h nib %0b: %02h exp %02h", raddr, nibble_mode,
                                    rdata, model_read(raddr, nibble_mode));
      end
      @(negedge clk);
      if (we) begin
        case (waddr[7:6])
          2'b00: m[0][waddr[5:0]] = wdata;
          2'b01: m[1][waddr[5:0]] = wdata;
          2'b10: if (nibble_mode) m[2][waddr[5:0]][3:0] = wdata[3:0];
                 else             m[2][waddr[5:0]]      = wdata;
          default: if (nibble_mode) m[2][waddr[5:0]][7:4] = wdata[3:0];
        endcase
      end
    end
    // host load and instruction write to the same register in one clock:
    // the host load wins
    nibble_mode = 0;
    repeat (50) begin
      ld_bank = 2'($urandom_range(0, 2)); ld_pix = 6'($urandom); ld_data = 8'($urandom);
      we = 1; waddr = {ld_bank, ld_pix}; wdata = ~ld_data; ld_we = 1;
      @(negedge clk);
      we = 0; ld_we = 0;
      m[ld_bank][ld_pix] = ld_data;
      raddr = {ld_bank, ld_pix};
      #1;
      checks++;
      if (rdata !== ld_data) begin
        failures++;
        $display("FAIL host load priority %02h: %02h exp %02h", raddr, rdata, ld_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
