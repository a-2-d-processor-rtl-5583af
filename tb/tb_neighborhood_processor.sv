// tb_neighborhood_processor: one NP driven instruction by instruction.
// Pixels are delivered through the host load port; each instruction is
// executed with a one-clock `exec`, and results are observed on Data Out
// (OUTA / OUTB / SROUT), on the NR write outputs and on the own-NR value.
// Expected values are worked out by hand in the comments.
module tb_neighborhood_processor;
  import np_pkg::*;

  logic        clk = 0, rst, exec;
  logic [15:0] ir;
  logic [7:0]  rc_init = 8'h12;
  logic        ld_we;
  logic [1:0]  ld_bank;
  logic [5:0]  ld_pix;
  logic [7:0]  ld_data;
  logic [2:0]  nr_req_in;
  logic [7:0]  nr_data_in [3];
  logic [7:0]  nr_tl, nr_tr, nr_bl, nr_br, nr_wdata, dout;
  logic        nr_wr_tr, nr_wr_bl, nr_wr_br, dout_valid, gcu_cond;

  neighborhood_processor dut (.*);

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

  localparam logic [8:0] S_SR = 9'h0C0, S_ACCA = 9'h0C1, S_ACCB = 9'h0C2, S_RC = 9'h0C3;
  localparam logic [8:0] S_TL = 9'h0C4, S_TR = 9'h0C5, S_BL = 9'h0C6, S_BR = 9'h0C7;

  bit saw_tr, saw_bl, saw_br;
  always @(posedge clk) begin
    if (nr_wr_tr) saw_tr = 1;
    if (nr_wr_bl) saw_bl = 1;
    if (nr_wr_br) saw_br = 1;
  end

  task automatic x(input logic [15:0] w);
    ir = w; exec = 1;
    @(negedge clk);
    exec = 0;
  endtask

  // execute OUTx and return the output byte
  task automatic out(input logic [8:0] fn, output logic [7:0] v);
    x(i_spl(COND_U, fn));
    chk(dout_valid, "valid after output");
    v = dout;
  endtask

  task automatic ld(input logic [1:0] b, input int col, input int row, input logic [7:0] d);
    ld_we = 1; ld_bank = b; ld_pix = 6'(col * 8 + row); ld_data = d;
    @(negedge clk);
    ld_we = 0;
  endtask

  initial begin
    logic [7:0] v;
    rst = 1; exec = 0; ir = i_spl(COND_U, FN_NOP); ld_we = 0; ld_bank = 0; ld_pix = 0; ld_data = 0;
    nr_req_in = 0; nr_data_in = '{8'h0, 8'h0, 8'h0};
    nr_tr = 8'h11; nr_bl = 8'h22; nr_br = 8'h33;
    repeat (2) @(negedge clk); rst = 0;
    ld(BANK_A, 3, 2, 8'h5A);
    ld(BANK_B, 1, 1, 8'h21);
    ld(BANK_C, 0, 0, 8'hC3);

    x(i_type1(COND_U, 0, OP_LOAD, a_pix(BANK_A, 3, 2)));
    out(FN_OUTA, v); chk(v == 8'h5A, "LOADA pixel A(3,2)");
    x(i_type1(COND_U, 0, OP_ADD, a_pix(BANK_B, 1, 1)));
    out(FN_OUTA, v); chk(v == 8'h7B, "ADDA pixel B(1,1)");
    x(i_type1(COND_U, 1, OP_LOAD, a_pix(BANK_C, 0, 0)));
    out(FN_OUTB, v); chk(v == 8'hC3, "LOADB pixel C(0,0)");
    x(i_type1(COND_U, 0, OP_LOAD, S_RC));
    out(FN_OUTA, v); chk(v == 8'h12, "Row Column Register");
    // MOVA to pixel and back
    x(i_type1(COND_U, 0, OP_LOAD, a_imm(8'hE7)));
    x(i_type1(COND_U, 0, OP_MOV, a_pix(BANK_B, 7, 7)));
    x(i_type1(COND_U, 0, OP_LOAD, a_imm(8'h00)));
    x(i_type1(COND_U, 1, OP_LOAD, a_pix(BANK_B, 7, 7)));
    out(FN_OUTB, v); chk(v == 8'hE7, "MOVA to B(7,7) and LOADB back");
    // indirect: ACCB points to A(3,2); ACCA = 10 - 5A = B6
    x(i_type1(COND_U, 1, OP_LOAD, a_imm(8'(a_pix(BANK_A, 3, 2)))));
    x(i_type1(COND_U, 0, OP_LOAD, a_imm(8'h10)));
    x(i_iram(COND_U, OP_SUB, 1'b0, 1'b0));
    out(FN_OUTA, v); chk(v == 8'hB6, "IRAM SUB");
    out(FN_SROUT, v); chk(v == 8'h65, $sformatf("SR after borrow: %02h", v));
    x(i_iram(COND_U, OP_LOAD, 1'b0, 1'b1));         // MOV B6 to A(3,2)
    x(i_type1(COND_U, 0, OP_LOAD, a_pix(BANK_A, 3, 2)));
    out(FN_OUTA, v); chk(v == 8'hB6, "IRAM MOV");
    // Type IV shifts act on ACCA: B6 SL -> 6C with C set (update bit on),
    // then SRC shifts the carry back in: 6C -> B6
    x(i_iram(COND_U, OP_SL, 1'b1, 1'b0));
    out(FN_OUTA, v); chk(v == 8'h6C, $sformatf("IRAM SL: %02h", v));
    out(FN_SROUT, v); chk(v[SR_C], "IRAM SL carry");
    x(i_iram(COND_U, OP_SRC, 1'b1, 1'b0));
    out(FN_OUTA, v); chk(v == 8'hB6, $sformatf("IRAM SRC: %02h", v));
    // neighbour NRs
    x(i_type1(COND_U, 0, OP_LOAD, S_TR)); out(FN_OUTA, v); chk(v == 8'h11, "read TR NR");
    x(i_type1(COND_U, 0, OP_LOAD, S_BL)); out(FN_OUTA, v); chk(v == 8'h22, "read BL NR");
    x(i_type1(COND_U, 0, OP_LOAD, S_BR)); out(FN_OUTA, v); chk(v == 8'h33, "read BR NR");
    // writes to NRs
    x(i_type1(COND_U, 0, OP_LOAD, a_imm(8'h3C)));
    ir = i_type1(COND_U, 0, OP_MOV, S_TR); exec = 1; #1;
    chk(nr_wr_tr && !nr_wr_bl && !nr_wr_br && nr_wdata == 8'h3C, "MOVA TR request");
    @(negedge clk); exec = 0;
    ir = i_type1(COND_U, 0, OP_MOV, S_BL); exec = 1; #1;
    chk(nr_wr_bl && !nr_wr_tr && !nr_wr_br, "MOVA BL request");
    @(negedge clk); exec = 0;
    ir = i_type1(COND_U, 0, OP_MOV, S_BR); exec = 1; #1;
    chk(nr_wr_br && !nr_wr_tr && !nr_wr_bl, "MOVA BR request");
    @(negedge clk); exec = 0;
    chk(saw_tr && saw_bl && saw_br, "NR write strobes seen");
    x(i_type1(COND_U, 0, OP_MOV, S_TL));
    chk(nr_tl == 8'h3C, "own NR written");
    // a neighbour writes the own NR
    nr_req_in = 3'b010; nr_data_in[1] = 8'h99;
    @(negedge clk); nr_req_in = 0;
    x(i_type1(COND_U, 1, OP_LOAD, S_TL)); out(FN_OUTB, v); chk(v == 8'h99, "neighbour wrote own NR");
    // MOV ACCB to ACCA through the special address
    x(i_type1(COND_U, 1, OP_MOV, S_ACCA)); out(FN_OUTA, v); chk(v == 8'h99, "MOVB to ACCA");
    // nibble mode: CL(0,0) <= 9, CH(0,0) <= 4 -> C(0,0) = 49
    x(i_spl(COND_U, FN_NBEN));
    x(i_type1(COND_U, 0, OP_LOAD, a_imm(8'hA9)));
    x(i_type1(COND_U, 0, OP_MOV, a_pix(BANK_C, 0, 0)));
    x(i_type1(COND_U, 0, OP_LOAD, a_imm(8'h04)));
    x(i_type1(COND_U, 0, OP_MOV, a_pix(BANK_SPL, 0, 0)));
    x(i_type1(COND_U, 1, OP_LOAD, a_pix(BANK_SPL, 0, 0)));
    out(FN_OUTB, v); chk(v == 8'h04, "CH read zero-extended");
    x(i_spl(COND_U, FN_NBDS));
    x(i_type1(COND_U, 1, OP_LOAD, a_pix(BANK_C, 0, 0)));
    out(FN_OUTB, v); chk(v == 8'h49, "nibbles form C");
    // shift with carry: 49 SL -> 92; SR -> 49
    x(i_shift(COND_U, 1, OP_SL, 1'b1)); out(FN_OUTB, v); chk(v == 8'h92, "SL ACCB");
    x(i_shift(COND_U, 1, OP_ASR, 1'b1)); out(FN_OUTB, v); chk(v == 8'hC9, "ASR ACCB");
    // condition gating and the GCU condition
    x(i_type1(COND_U, 0, OP_LOAD, a_imm(8'h00)));   // Z set
    x(i_type1(COND_N, 0, OP_LOAD, a_imm(8'h55)));   // skipped
    out(FN_OUTA, v); chk(v == 8'h00, "N-conditional load skipped");
    ir = i_jump(J_Z, 8'h00); #1; chk(gcu_cond, "jump condition Z true");
    ir = i_jump(J_N, 8'h00); #1; chk(!gcu_cond, "jump condition N false");
    @(negedge clk);
    // CLRB, RST
    x(i_spl(COND_U, FN_CLRB)); out(FN_OUTB, v); chk(v == 8'h00, "CLRB");
    x(i_type1(COND_U, 0, OP_LOAD, a_imm(8'h77)));
    x(i_spl(COND_U, FN_RST)); out(FN_OUTA, v); chk(v == 8'h00, "RST clears ACCA");
    x(i_type1(COND_U, 0, OP_LOAD, a_pix(BANK_A, 3, 2)));
    out(FN_OUTA, v); chk(v == 8'hB6, "RST keeps pixels");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
