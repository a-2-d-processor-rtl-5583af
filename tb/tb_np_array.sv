// tb_np_array: a 2 x 3 array driven instruction by instruction. Every NP
// writes its Row Column value into one of its four NRs and reads another,
// so each NP learns the value of a chosen neighbour; the result is read out
// one NP row at a time on the column buses (rows are selected by comparing
// the Row Column Register and clearing NP ON in the status register of the
// others). Checks the values, that each column bus carries exactly the
// selected row, the OR of NP conditions towards the global unit, and that
// array-edge NRs read as zero.
module tb_np_array;
  import np_pkg::*;

  localparam int ROWS = 2, COLS = 3;

  logic        clk = 0, rst, exec, ld_we;
  logic [15:0] ir;
  logic [3:0]  ld_row, ld_col;
  logic [1:0]  ld_bank;
  logic [5:0]  ld_pix;
  logic [7:0]  ld_data;
  logic [7:0]  col_dout [COLS];
  logic        col_dvalid [COLS];
  logic        gcu_any;

  np_array #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  localparam logic [8:0] S_SR = 9'h0C0, S_RC = 9'h0C3;
  localparam logic [8:0] S_TL = 9'h0C4, S_TR = 9'h0C5, S_BL = 9'h0C6, S_BR = 9'h0C7;

  logic [7:0] outq [COLS][$];
  always @(posedge clk)
    for (int j = 0; j < COLS; j++) if (col_dvalid[j]) outq[j].push_back(col_dout[j]);

  task automatic x(input logic [15:0] w);
    ir = w; exec = 1;
    @(negedge clk);
    exec = 0;
  endtask

  // one NR transfer: write own RC through `wr`, read `rd` into ACCA, read out
  task automatic transfer(input logic [8:0] wr, input logic [8:0] rd, input int di, input int dj,
                          input string name);
    // clear all NRs first (each NP its own)
    x(i_spl(COND_U, FN_CLRA));
    x(i_type1(COND_U, 0, OP_MOV, S_TL));
    x(i_type1(COND_U, 0, OP_LOAD, S_RC));
    x(i_type1(COND_U, 0, OP_MOV, wr));
    x(i_type1(COND_U, 0, OP_LOAD, rd));
    x(i_type1(COND_U, 0, OP_MOV, a_pix(BANK_A, 0, 0)));
    for (int j = 0; j < COLS; j++) outq[j].delete();
    for (int r = 0; r < ROWS; r++) begin
      x(i_type1(COND_U, 0, OP_LOAD, S_RC));
      x(i_type1(COND_U, 0, OP_AND, a_imm(8'hF0)));
      x(i_type1(COND_U, 0, OP_SUB, a_imm(8'(r << 4))));
      x(i_spl(COND_U, FN_CLRB));
      x(i_type1(COND_Z, 1, OP_LOAD, a_imm(8'h60)));
      x(i_type1(COND_U, 1, OP_MOV, S_SR));
      x(i_type1(COND_U, 0, OP_LOAD, a_pix(BANK_A, 0, 0)));
      x(i_spl(COND_U, FN_OUTA));
      x(i_spl(COND_U, FN_FOPN));
      x(i_type1(COND_U, 0, OP_LOAD, a_imm(8'h60)));
      x(i_type1(COND_U, 0, OP_MOV, S_SR));
    end
    for (int j = 0; j < COLS; j++) begin
      chk(outq[j].size() == ROWS, $sformatf("%s: column %0d bytes", name, j));
      for (int i = 0; i < ROWS && i < outq[j].size(); i++) begin
        int si = i + di, sj = j + dj;
        logic [7:0] e = (si >= 0 && si < ROWS && sj >= 0 && sj < COLS) ? {4'(si), 4'(sj)} : 8'h00;
        chk(outq[j][i] == e, $sformatf("%s NP(%0d,%0d) got %02h exp %02h", name, i, j, outq[j][i], e));
      end
    end
  endtask

  initial begin
    rst = 1; exec = 0; ir = i_spl(COND_U, FN_NOP);
    ld_we = 0; ld_row = 0; ld_col = 0; ld_bank = 0; ld_pix = 0; ld_data = 0;
    repeat (2) @(negedge clk); rst = 0;
    // NP(i,j) receives from NP(i+di, j+dj)
    transfer(S_TR, S_TL, 0, -1, "left to right");
    transfer(S_TL, S_TR, 0, 1, "right to left");
    transfer(S_BL, S_TL, -1, 0, "down");
    transfer(S_TL, S_BL, 1, 0, "up");
    transfer(S_BR, S_TL, -1, -1, "down-right");
    transfer(S_TL, S_BR, 1, 1, "up-left");
    transfer(S_TR, S_BL, 1, -1, "up-right");
    transfer(S_BL, S_TR, -1, 1, "down-left");
    // host load reaches only the addressed NP
    @(negedge clk);
    ld_we = 1; ld_row = 1; ld_col = 2; ld_bank = BANK_A; ld_pix = 0; ld_data = 8'hAB;
    @(negedge clk); ld_we = 0;
    transfer(S_TL, S_TL, 0, 0, "own NR");
    // conditions towards the global unit
    x(i_type1(COND_U, 0, OP_LOAD, S_RC));
    x(i_type1(COND_U, 0, OP_SUB, a_imm(8'h12)));        // Z only in NP(1,2)
    ir = i_jump(J_Z, 8'h00); #1;  chk(gcu_any, "one NP true gives condition");
    ir = i_jump(J_O, 8'h00); #1;  chk(!gcu_any, "no NP true gives none");
    ir = i_jump(J_NZ, 8'h00); #1; chk(gcu_any, "others true");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
