// tb_processor_array_top: end-to-end test of the processor array at its
// default size (3 x 4 NPs, 24 x 32 pixels).
//
// The testbench loads a random image into register bank A of every NP and
// runs, from one program memory, the programs below; after each it runs a
// readout program that enables one row of NPs at a time (through the Row
// Column Register and the status register) and streams its 64 pixels, ACCB
// and the status register out over the column-shared Data Out buses. The
// streams are compared with an image model kept in the testbench.
//   invert     every pixel p -> 255 - p, with an indirect-address loop
//   rshift     image moved one NP to the right through the NRs
//   trshift    image moved one NP up and right through the NRs
//   misc       conditional execution on Z, C and N; NP deactivation and
//              FOPN; nibble mode; bottom-left and bottom-right NR transfers;
//              ADC, SBB, shifts with carry; SR-update bit of Type II; RST;
//              Type IV arithmetic; conditional and unconditional jumps
// Each program's instruction count and clock count are checked: one
// instruction per three clocks, and the same count whatever the array size
// except readout, which grows with the number of NP rows. Mechanism
// counters are reported, and one that never fired counts as a failure.
module tb_processor_array_top;
  import np_pkg::*;

  localparam int ROWS = 3;
  localparam int COLS = 4;

  logic        clk = 0;
  logic        enable, reset;
  logic        pm_we;
  logic [7:0]  pm_waddr;
  logic [15:0] pm_wdata;
  logic        start;
  logic [7:0]  start_addr;
  logic        busy, done;
  logic [31:0] instr_count;
  logic        ld_we;
  logic [3:0]  ld_row, ld_col;
  logic [1:0]  ld_bank;
  logic [5:0]  ld_pix;
  logic [7:0]  ld_data;
  logic [7:0]  col_dout [COLS];
  logic        col_dvalid [COLS];

  processor_array_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------------
  // program assembly
  // ------------------------------------------------------------------
  logic [15:0] prog [$];
  function automatic int here();
    return prog.size();
  endfunction
  function automatic void emit(input logic [15:0] w);
    prog.push_back(w);
  endfunction

  localparam logic [8:0] S_SR = 9'h0C0, S_ACCA = 9'h0C1, S_ACCB = 9'h0C2, S_RC = 9'h0C3;
  localparam logic [8:0] S_TL = 9'h0C4, S_TR = 9'h0C5, S_BL = 9'h0C6, S_BR = 9'h0C7;

  function automatic void op_a(input cond_e c, input aluop_e op, input logic [8:0] o);
    emit(i_type1(c, 1'b0, op, o));
  endfunction
  function automatic void op_b(input cond_e c, input aluop_e op, input logic [8:0] o);
    emit(i_type1(c, 1'b1, op, o));
  endfunction
  function automatic void spl(input cond_e c, input logic [8:0] fn);
    emit(i_spl(c, fn));
  endfunction

  // readout: each NP row in turn streams bank A pixels 63..0, then ACCB, then SR
  function automatic void asm_readout();
    int loop;
    for (int r = 0; r < ROWS; r++) begin
      op_a(COND_U, OP_LOAD, S_RC);
      op_a(COND_U, OP_AND, a_imm(8'hF0));
      op_a(COND_U, OP_SUB, a_imm(8'(r << 4)));
      spl(COND_U, FN_CLRB);
      op_b(COND_Z, OP_LOAD, a_imm(8'h60));
      op_b(COND_U, OP_MOV, S_SR);
      op_b(COND_U, OP_LOAD, a_imm(8'h3F));
      loop = here();
      emit(i_iram(COND_U, OP_LOAD, 1'b0, 1'b0));
      spl(COND_U, FN_OUTA);
      op_b(COND_U, OP_SUB, a_imm(8'h01));
      emit(i_jump(J_NN, 8'(loop)));
      spl(COND_U, FN_OUTB);
      spl(COND_U, FN_SROUT);
      spl(COND_U, FN_FOPN);
      op_a(COND_U, OP_LOAD, a_imm(8'h60));
      op_a(COND_U, OP_MOV, S_SR);
    end
    spl(COND_U, FN_END);
  endfunction

  function automatic void asm_invert();
    int loop;
    op_b(COND_U, OP_LOAD, a_imm(8'h3F));
    loop = here();
    emit(i_iram(COND_U, OP_LOAD, 1'b0, 1'b0));
    op_a(COND_U, OP_XOR, a_imm(8'hFF));
    emit(i_iram(COND_U, OP_LOAD, 1'b0, 1'b1));
    op_b(COND_U, OP_SUB, a_imm(8'h01));
    emit(i_jump(J_NN, 8'(loop)));
    spl(COND_U, FN_END);
  endfunction

  // move every pixel to a neighbour NP: write NR `wr`, read NR `rd`
  function automatic void asm_shift(input logic [8:0] wr, input logic [8:0] rd);
    int loop;
    spl(COND_U, FN_CLRA);
    op_a(COND_U, OP_MOV, S_TL);
    op_b(COND_U, OP_LOAD, a_imm(8'h3F));
    loop = here();
    emit(i_iram(COND_U, OP_LOAD, 1'b0, 1'b0));
    op_a(COND_U, OP_MOV, wr);
    op_a(COND_U, OP_LOAD, rd);
    emit(i_iram(COND_U, OP_LOAD, 1'b0, 1'b1));
    op_b(COND_U, OP_SUB, a_imm(8'h01));
    emit(i_jump(J_NN, 8'(loop)));
    spl(COND_U, FN_END);
  endfunction

  function automatic logic [8:0] pa(input int col, input int row);
    return a_pix(BANK_A, col, row);
  endfunction

  function automatic void asm_misc();
    int skip;
    // Row Column value into A(7,7)
    op_a(COND_U, OP_LOAD, S_RC);
    op_a(COND_U, OP_MOV, pa(7, 7));
    // nibble mode: CL(0,0)=F, CH(0,0)=A, read back C(0,0)=AF into A(1,0)
    spl(COND_U, FN_NBEN);
    op_a(COND_U, OP_LOAD, a_imm(8'h1F));
    op_a(COND_U, OP_MOV, a_pix(BANK_C, 0, 0));
    op_a(COND_U, OP_LOAD, a_imm(8'h0A));
    op_a(COND_U, OP_MOV, a_pix(BANK_SPL, 0, 0));
    spl(COND_U, FN_NBDS);
    op_a(COND_U, OP_LOAD, a_pix(BANK_C, 0, 0));
    op_a(COND_U, OP_MOV, pa(1, 0));
    // bottom-right NR: A(2,0) of NP(i,j) = RC of NP(i-1,j-1)
    spl(COND_U, FN_CLRA);
    op_a(COND_U, OP_MOV, S_TL);
    op_a(COND_U, OP_LOAD, S_RC);
    op_a(COND_U, OP_MOV, S_BR);
    op_a(COND_U, OP_LOAD, S_TL);
    op_a(COND_U, OP_MOV, pa(2, 0));
    // bottom-left NR: A(3,0) of NP(i,j) = RC of NP(i-1,j)
    spl(COND_U, FN_CLRA);
    op_a(COND_U, OP_MOV, S_TL);
    op_a(COND_U, OP_LOAD, S_RC);
    op_a(COND_U, OP_MOV, S_BL);
    op_a(COND_U, OP_LOAD, S_TL);
    op_a(COND_U, OP_MOV, pa(3, 0));
    // SR readback: N set -> 0x64 into A(4,0)
    op_a(COND_U, OP_LOAD, a_imm(8'h80));
    op_a(COND_U, OP_LOAD, S_SR);
    op_a(COND_U, OP_MOV, pa(4, 0));
    // ADC: F0+20 = 10 carry; +0+C = 11 into A(5,0)
    op_a(COND_U, OP_LOAD, a_imm(8'hF0));
    op_a(COND_U, OP_ADD, a_imm(8'h20));
    op_a(COND_U, OP_ADC, a_imm(8'h00));
    op_a(COND_U, OP_MOV, pa(5, 0));
    // SBB: 10-20 = F0 borrow; -0-borrow = EF into A(6,0)
    op_a(COND_U, OP_LOAD, a_imm(8'h10));
    op_a(COND_U, OP_SUB, a_imm(8'h20));
    op_a(COND_U, OP_SBB, a_imm(8'h00));
    op_a(COND_U, OP_MOV, pa(6, 0));
    // shifts: 81 SLC(C=0) -> 02 C=1, SRC -> 81 C=0, ASR -> C0 into A(7,0)
    op_a(COND_U, OP_LOAD, a_imm(8'h81));
    emit(i_shift(COND_U, 1'b0, OP_SLC, 1'b1));
    emit(i_shift(COND_U, 1'b0, OP_SRC, 1'b1));
    emit(i_shift(COND_U, 1'b0, OP_ASR, 1'b1));
    op_a(COND_U, OP_MOV, pa(7, 0));
    // RST clears ACCB: A(0,1) = 0
    op_b(COND_U, OP_LOAD, a_imm(8'h55));
    spl(COND_U, FN_RST);
    op_b(COND_U, OP_MOV, pa(0, 1));
    // Z condition: only column 1 loads 77 into A(1,1)
    op_a(COND_U, OP_LOAD, S_RC);
    op_a(COND_U, OP_AND, a_imm(8'h0F));
    op_a(COND_U, OP_SUB, a_imm(8'h01));
    op_b(COND_Z, OP_LOAD, a_imm(8'h77));
    op_b(COND_U, OP_MOV, pa(1, 1));
    // C condition: columns 0 and 1 load 33 into A(2,1)
    op_a(COND_U, OP_LOAD, S_RC);
    op_a(COND_U, OP_AND, a_imm(8'h0F));
    op_a(COND_U, OP_SUB, a_imm(8'h02));
    spl(COND_U, FN_CLRB);
    op_b(COND_C, OP_LOAD, a_imm(8'h33));
    op_b(COND_U, OP_MOV, pa(2, 1));
    // N condition: rows 0 and 1 load 44 into A(3,1)
    op_a(COND_U, OP_LOAD, S_RC);
    op_a(COND_U, OP_SUB, a_imm(8'h20));
    spl(COND_U, FN_CLRB);
    op_b(COND_N, OP_LOAD, a_imm(8'h44));
    op_b(COND_U, OP_MOV, pa(3, 1));
    // only NP(1,2) stays on and writes 99 into A(4,1); then FOPN
    op_a(COND_U, OP_LOAD, S_RC);
    op_a(COND_U, OP_SUB, a_imm(8'h12));
    spl(COND_U, FN_CLRB);
    op_b(COND_Z, OP_LOAD, a_imm(8'h60));
    op_b(COND_U, OP_MOV, S_SR);
    op_a(COND_U, OP_LOAD, a_imm(8'h99));
    op_a(COND_U, OP_MOV, pa(4, 1));
    spl(COND_U, FN_FOPN);
    op_a(COND_U, OP_LOAD, a_imm(8'h60));
    op_a(COND_U, OP_MOV, S_SR);
    // jumps: Z jump taken skips a load, unconditional jump skips a load
    op_a(COND_U, OP_LOAD, a_imm(8'h00));
    skip = here() + 2;
    emit(i_jump(J_Z, 8'(skip)));
    op_a(COND_U, OP_LOAD, a_imm(8'h11));
    op_a(COND_U, OP_MOV, pa(5, 1));          // 00
    skip = here() + 2;
    emit(i_jump(J_ALW, 8'(skip)));
    op_a(COND_U, OP_LOAD, a_imm(8'h22));
    skip = here() + 2;                         // not taken: Z clear after load 0? no, Z still set
    emit(i_jump(J_NZ, 8'(skip)));
    op_a(COND_U, OP_ADD, a_imm(8'h05));
    op_a(COND_U, OP_MOV, pa(6, 1));          // 05
    // SRU off: loads leave flags; Type II with update bit sets N
    op_a(COND_U, OP_LOAD, a_imm(8'h40));
    op_a(COND_U, OP_MOV, S_SR);
    op_a(COND_U, OP_LOAD, a_imm(8'h80));
    op_a(COND_U, OP_LOAD, S_SR);
    op_a(COND_U, OP_MOV, pa(7, 1));          // 40
    emit(i_shift(COND_U, 1'b0, OP_SL, 1'b1));   // 40 -> 80, N
    op_a(COND_U, OP_LOAD, S_SR);
    op_a(COND_U, OP_MOV, pa(0, 2));          // 44
    op_a(COND_U, OP_LOAD, a_imm(8'h60));
    op_a(COND_U, OP_MOV, S_SR);
    // Type IV add: A(0,3) = 5 + A(0,4)
    op_a(COND_U, OP_LOAD, a_imm(8'h05));
    op_b(COND_U, OP_LOAD, a_imm(8'(pa(0, 4))));
    emit(i_iram(COND_U, OP_ADD, 1'b1, 1'b0));
    op_a(COND_U, OP_MOV, pa(0, 3));
    spl(COND_U, FN_END);
  endfunction

  // ------------------------------------------------------------------
  // image model: img[i][j][pix], pix = {col, row}
  // ------------------------------------------------------------------
  logic [7:0] img [ROWS][COLS][64];

  function automatic logic [7:0] rcv(input int i, input int j);
    return {4'(i), 4'(j)};
  endfunction

  function automatic void model_misc();
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++) begin
        logic [7:0] nb = img[i][j][6'(0*8 + 4)];
        img[i][j][6'(7*8 + 7)] = rcv(i, j);
        img[i][j][6'(1*8 + 0)] = 8'hAF;
        img[i][j][6'(2*8 + 0)] = (i > 0 && j > 0) ? rcv(i-1, j-1) : 8'h00;
        img[i][j][6'(3*8 + 0)] = (i > 0) ? rcv(i-1, j) : 8'h00;
        img[i][j][6'(4*8 + 0)] = 8'h64;
        img[i][j][6'(5*8 + 0)] = 8'h11;
        img[i][j][6'(6*8 + 0)] = 8'hEF;
        img[i][j][6'(7*8 + 0)] = 8'hC0;
        img[i][j][6'(0*8 + 1)] = 8'h00;
        img[i][j][6'(1*8 + 1)] = (j == 1) ? 8'h77 : 8'h00;
        img[i][j][6'(2*8 + 1)] = (j < 2) ? 8'h33 : 8'h00;
        img[i][j][6'(3*8 + 1)] = (i < 2) ? 8'h44 : 8'h00;
        if (i == 1 && j == 2) img[i][j][6'(4*8 + 1)] = 8'h99;
        img[i][j][6'(5*8 + 1)] = 8'h00;
        img[i][j][6'(6*8 + 1)] = 8'h05;
        img[i][j][6'(7*8 + 1)] = 8'h40;
        img[i][j][6'(0*8 + 2)] = 8'h44;
        img[i][j][6'(0*8 + 3)] = nb + 8'h05;
      end
  endfunction

  // ------------------------------------------------------------------
  // output capture (the output memory of the test platform)
  // ------------------------------------------------------------------
  logic [7:0] outq [COLS][$];
  always @(posedge clk)
    for (int j = 0; j < COLS; j++)
      if (col_dvalid[j]) outq[j].push_back(col_dout[j]);

  // ------------------------------------------------------------------
  // mechanism counters (observed inside the design)
  // ------------------------------------------------------------------
  int n_jump_taken = 0, n_jump_not = 0, n_cond_skip = 0, n_np_off = 0;
  int n_nibble = 0, n_nr_tl = 0, n_nr_tr = 0, n_nr_bl = 0, n_nr_br = 0;
  int n_indirect = 0, n_fopn = 0, n_rst = 0, n_srout = 0;

  always @(posedge clk) begin
    if (dut.u_gcu.busy && dut.gcu_ce && !dut.u_gcu.first && is_jump(dut.ir)) begin
      if (dut.u_gcu.taken) n_jump_taken++;
      else                 n_jump_not++;
    end
    if (dut.np_exec) begin
      if (dut.ir[13:9] == OPC_IRAM) n_indirect++;
      if (dut.ir[13:9] == OPC_SPL && dut.ir[8:6] == SPL_FOPN) n_fopn++;
      if (dut.ir[13:9] == OPC_SPL && dut.ir[8:6] == SPL_RST) n_rst++;
      if (dut.ir[13:9] == OPC_SPL && dut.ir[8:6] == SPL_SROUT) n_srout++;
    end
  end

  for (genvar i = 0; i < ROWS; i++) begin : g_mr
    for (genvar j = 0; j < COLS; j++) begin : g_mc
      always @(posedge clk) begin
        if (dut.np_exec) begin
          if (!dut.u_array.g_row[i].g_col[j].u_np.sr[SR_NPON]) n_np_off++;
          if (dut.u_array.g_row[i].g_col[j].u_np.u_npcu.sr[SR_NPON] &&
              !dut.u_array.g_row[i].g_col[j].u_np.active) n_cond_skip++;
          if (dut.u_array.g_row[i].g_col[j].u_np.nibble_mode) n_nibble++;
          if (dut.u_array.g_row[i].g_col[j].u_np.nr_wr_tl) n_nr_tl++;
          if (dut.u_array.g_row[i].g_col[j].u_np.nr_wr_tr) n_nr_tr++;
          if (dut.u_array.g_row[i].g_col[j].u_np.nr_wr_bl) n_nr_bl++;
          if (dut.u_array.g_row[i].g_col[j].u_np.nr_wr_br) n_nr_br++;
        end
      end
    end
  end

  // ------------------------------------------------------------------
  // drivers
  // ------------------------------------------------------------------
  int addr_readout, addr_invert, addr_rshift, addr_trshift, addr_misc;

  task automatic load_pm();
    prog.delete();
    addr_readout = here(); asm_readout();
    addr_invert  = here(); asm_invert();
    addr_rshift  = here(); asm_shift(S_TR, S_TL);
    addr_trshift = here(); asm_shift(S_TR, S_BL);
    addr_misc    = here(); asm_misc();
    check(prog.size() <= 256, "programs fit in program memory");
    $display("program memory: %0d words used", prog.size());
    foreach (prog[k]) begin
      @(negedge clk);
      pm_we = 1; pm_waddr = 8'(k); pm_wdata = prog[k];
    end
    @(negedge clk);
    pm_we = 0;
  endtask

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

  task automatic run(input int addr, input string name, output int n_instr, output longint n_clk);
    longint t0;
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
    $display("%-8s %5d instructions %6d clocks", name, n_instr, n_clk);
  endtask

  task automatic readout_and_compare(input string name);
    int ni; longint nc;
    for (int j = 0; j < COLS; j++) outq[j].delete();
    run(addr_readout, "readout", ni, nc);
    check(ni == ROWS * (7 + 64 * 4 + 5) + 1, $sformatf("readout instruction count %0d", ni));
    for (int j = 0; j < COLS; j++) begin
      check(outq[j].size() == ROWS * 66, $sformatf("%s col %0d: %0d bytes out", name, j, outq[j].size()));
      if (outq[j].size() != ROWS * 66) continue;
      for (int i = 0; i < ROWS; i++) begin
        for (int k = 0; k < 64; k++)
          check(outq[j][i*66 + k] == img[i][j][63 - k],
                $sformatf("%s NP(%0d,%0d) pix %0d: got %02h exp %02h", name, i, j, 63 - k,
                          outq[j][i*66 + k], img[i][j][63 - k]));
        check(outq[j][i*66 + 64] == 8'hFF, $sformatf("%s OUTB NP(%0d,%0d)", name, i, j));
        check(outq[j][i*66 + 65] == 8'h65, $sformatf("%s SROUT NP(%0d,%0d) got %02h", name, i, j,
                                                   outq[j][i*66 + 65]));
      end
    end
  endtask

  initial begin
    int ni; longint nc;
    logic [7:0] prev [ROWS][COLS][64];
    enable = 0; reset = 1; pm_we = 0; start = 0; ld_we = 0;
    pm_waddr = 0; pm_wdata = 0; start_addr = 0;
    ld_row = 0; ld_col = 0; ld_bank = 0; ld_pix = 0; ld_data = 0;
    repeat (4) @(negedge clk);
    reset = 0; enable = 1;
    repeat (4) @(negedge clk);
    load_pm();
    load_image();

    readout_and_compare("buffer");

    run(addr_invert, "invert", ni, nc);
    check(ni == 1 + 64 * 5 + 1, $sformatf("invert instruction count %0d", ni));
    foreach (img[i, j, p]) img[i][j][p] = ~img[i][j][p];
    readout_and_compare("invert");

    run(addr_rshift, "rshift", ni, nc);
    prev = img;
    foreach (img[i, j, p]) img[i][j][p] = (j > 0) ? prev[i][j-1][p] : 8'h00;
    readout_and_compare("rshift");

    run(addr_trshift, "trshift", ni, nc);
    prev = img;
    foreach (img[i, j, p]) img[i][j][p] = (j > 0 && i + 1 < ROWS) ? prev[i+1][j-1][p] : 8'h00;
    readout_and_compare("trshift");

    // pause: with enable low nothing advances
    @(negedge clk);
    start = 1; start_addr = 8'(addr_misc);
    enable = 0;
    @(negedge clk);
    start = 0;
    repeat (20) @(negedge clk);
    check(instr_count == 0, "enable low holds the array");
    enable = 1;
    while (!done) @(negedge clk);
    model_misc();
    readout_and_compare("misc");

    $display("mechanisms: jump taken %0d, not taken %0d, condition skip %0d, NP off %0d,",
             n_jump_taken, n_jump_not, n_cond_skip, n_np_off);
    $display("  nibble %0d, NR writes TL %0d TR %0d BL %0d BR %0d, indirect %0d,",
             n_nibble, n_nr_tl, n_nr_tr, n_nr_bl, n_nr_br, n_indirect);
    $display("  FOPN %0d, RST %0d, SROUT %0d", n_fopn, n_rst, n_srout);
    check(n_jump_taken > 0, "jump taken seen");
    check(n_jump_not > 0, "jump not taken seen");
    check(n_cond_skip > 0, "conditional skip seen");
    check(n_np_off > 0, "deactivated NP seen");
    check(n_nibble > 0, "nibble mode seen");
    check(n_nr_tl > 0 && n_nr_tr > 0 && n_nr_bl > 0 && n_nr_br > 0, "all NR directions seen");
    check(n_indirect > 0, "indirect addressing seen");
    check(n_fopn > 0 && n_rst > 0 && n_srout > 0, "FOPN, RST, SROUT seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
