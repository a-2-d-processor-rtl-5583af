// workload_runner: runs the image-processing workloads on one processor
// array of ROWS x COLS NPs and checks every result image against a model.
//
// Sequence: load programs (readout, invert, horizontal and vertical edge
// detection), load a random image into bank A, then
//   buffer   readout of the untouched image
//   invert   invert, readout
//   hedge    fresh image, horizontal edge detection, readout
//   vedge    fresh image, vertical edge detection, readout
//   totedge  program memory reloaded with readout and total edge detection,
//            fresh image, total edge detection, readout
// Each readout stream is compared pixel by pixel with the model. Clock
// counts are checked against three clocks per instruction. The instruction
// counts are given out so that the caller can compare array sizes.
module workload_runner #(
  parameter int ROWS = 1,
  parameter int COLS = 2
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   n_readout,
  output int   n_invert,
  output int   n_hedge,
  output int   n_vedge,
  output int   n_totedge,
  output bit   finished
);
  import np_pkg::*;
  import np_programs_pkg::*;

  logic        enable, reset, pm_we, start, busy, done, ld_we;
  logic [7:0]  pm_waddr, start_addr, ld_data;
  logic [15:0] pm_wdata;
  logic [31:0] instr_count;
  logic [3:0]  ld_row, ld_col;
  logic [1:0]  ld_bank;
  logic [5:0]  ld_pix;
  logic [7:0]  col_dout [COLS];
  logic        col_dvalid [COLS];

  processor_array_top #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  initial assert (ROWS <= 16 && COLS <= 16) else $fatal(1, "one control unit serves 16 x 16 NPs");

  longint cycles = 0;
  always @(posedge clk) cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL (%0dx%0d): %s", ROWS, COLS, what);
    end
  endtask

  logic [7:0] img [ROWS][COLS][64];
  logic [7:0] outq [COLS][$];
  always @(posedge clk)
    for (int j = 0; j < COLS; j++)
      if (col_dvalid[j]) outq[j].push_back(col_dout[j]);

  int a_readout, a_invert, a_hedge, a_vedge, a_totedge;

  task automatic load_program(input logic [15:0] code [$]);
    $display("%0dx%0d NPs  program memory: %0d words", ROWS, COLS, code.size());
    check(code.size() <= 256, "programs fit in program memory");
    foreach (code[k]) begin
      @(negedge clk);
      pm_we = 1; pm_waddr = 8'(k); pm_wdata = code[k];
    end
    @(negedge clk);
    pm_we = 0;
  endtask

  // unrolled readout up to 8 NP rows, the loop beyond (program memory size)
  localparam bit RD_LOOP = ROWS > 8;
  localparam int RD_INSTR = RD_LOOP ? ROWS * 273 + 3 : ROWS * 268 + 1;
  function automatic void emit_readout();
    if (RD_LOOP) asm_readout_loop(ROWS);
    else         asm_readout(ROWS);
  endfunction

  // pixel of the whole image, zero outside it
  function automatic logic [7:0] gpix(input logic [7:0] im [ROWS][COLS][64],
                                      input int gy, input int gx);
    if (gy >= 8 * ROWS || gx >= 8 * COLS) return 8'h00;
    return im[gy / 8][gx / 8][(gx % 8) * 8 + gy % 8];
  endfunction

  function automatic logic [7:0] absd(input logic [7:0] a, input logic [7:0] b);
    return (a >= b) ? a - b : b - a;
  endfunction

  task automatic load_image();
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++)
        for (int p = 0; p < 64; p++) begin
          img[i][j][p] = 8'($urandom);
          @(negedge clk);
          ld_we = 1; ld_row = 4'(i); ld_col = 4'(j); ld_bank = BANK_A;
          ld_pix = 6'(p); ld_data = img[i][j][p];
        end
    @(negedge clk);
    ld_we = 0;
  endtask

  task automatic run(input int addr, input string name, output int n_instr);
    longint t0, n_clk;
    @(negedge clk);
    start = 1; start_addr = 8'(addr);
    t0 = cycles;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    n_clk   = cycles - t0;
    n_instr = instr_count;
    check(n_clk >= 3 * longint'(n_instr) && n_clk <= 3 * longint'(n_instr) + 6,
          $sformatf("%s: %0d clocks for %0d instructions", name, n_clk, n_instr));
    $display("%0dx%0d NPs  %-8s %5d instructions %6d clocks", ROWS, COLS, name, n_instr, n_clk);
  endtask

  task automatic readout_and_compare(input string name);
    int ni;
    for (int j = 0; j < COLS; j++) outq[j].delete();
    run(a_readout, "readout", ni);
    n_readout = ni;
    check(ni == RD_INSTR, $sformatf("readout: %0d instructions, expected %0d", ni, RD_INSTR));
    for (int j = 0; j < COLS; j++) begin
      check(outq[j].size() == ROWS * 66, $sformatf("%s col %0d: %0d bytes", name, j, outq[j].size()));
      if (outq[j].size() != ROWS * 66) continue;
      for (int i = 0; i < ROWS; i++)
        for (int k = 0; k < 64; k++)
          check(outq[j][i*66 + k] == img[i][j][63 - k],
                $sformatf("%s NP(%0d,%0d) pix %0d: got %02h exp %02h", name, i, j, 63 - k,
                          outq[j][i*66 + k], img[i][j][63 - k]));
    end
  endtask

  initial begin
    logic [7:0] prev [ROWS][COLS][64];
    logic [15:0] code [$], code2 [$];
    checks = 0; failures = 0; finished = 0;
    enable = 0; reset = 1; pm_we = 0; start = 0; ld_we = 0;
    pm_waddr = 0; pm_wdata = 0; start_addr = 0;
    ld_row = 0; ld_col = 0; ld_bank = 0; ld_pix = 0; ld_data = 0;
    repeat (4) @(negedge clk);
    reset = 0; enable = 1;
    repeat (4) @(negedge clk);
    prog.delete();
    a_readout = here(); emit_readout();
    a_invert  = here(); asm_invert();
    a_hedge   = here(); asm_edge(1, S_BL);
    a_vedge   = here(); asm_edge(8, S_TR);
    // the queue is shared by all instances: copy it before the next wait
    code = prog;
    prog.delete();
    void'(here());
    emit_readout();
    a_totedge = here(); asm_total_edge();
    code2 = prog;
    load_program(code);

    load_image();
    readout_and_compare("buffer");

    run(a_invert, "invert", n_invert);
    foreach (img[i, j, p]) img[i][j][p] = ~img[i][j][p];
    readout_and_compare("invert");

    load_image();
    run(a_hedge, "hedge", n_hedge);
    prev = img;
    foreach (img[i, j, p]) begin
      logic [7:0] nb;
      if (p % 8 != 7)     nb = prev[i][j][p + 1];
      else if (i + 1 < ROWS) nb = prev[i+1][j][p - 7];
      else                nb = 8'h00;
      img[i][j][p] = absd(prev[i][j][p], nb);
    end
    readout_and_compare("hedge");

    load_image();
    run(a_vedge, "vedge", n_vedge);
    prev = img;
    foreach (img[i, j, p]) begin
      logic [7:0] nb;
      if (p < 56)            nb = prev[i][j][p + 8];
      else if (j + 1 < COLS) nb = prev[i][j+1][p - 56];
      else                   nb = 8'h00;
      img[i][j][p] = absd(prev[i][j][p], nb);
    end
    readout_and_compare("vedge");

    load_program(code2);
    load_image();
    run(a_totedge, "totedge", n_totedge);
    prev = img;
    foreach (img[i, j, p]) begin
      int gy, gx, sum;
      logic [7:0] c;
      gy = 8 * i + p % 8;
      gx = 8 * j + p / 8;
      c = gpix(prev, gy, gx);
      sum = int'(absd(c, gpix(prev, gy, gx + 1))) + int'(absd(c, gpix(prev, gy + 1, gx)))
          + int'(absd(c, gpix(prev, gy + 1, gx + 1)));
      img[i][j][p] = (sum > 255) ? 8'hFF : 8'(sum);
    end
    readout_and_compare("totedge");
    finished = 1;
  end
endmodule
