// tb_np_control_unit: decode and state of the NP control unit. Each step
// drives one instruction with `exec` for one clock and compares the decoded
// controls and the status register with values worked out by hand from the
// instruction set: condition gating, SRU and the per-instruction SR-update
// bit, MOV to the SR, NP deactivation with FOPN and RST as the only ways
// back, nibble mode, output selection with its one-clock valid, and the
// jump conditions reported to the global control unit.
module tb_np_control_unit;
  import np_pkg::*;

  logic        clk = 0, rst, exec;
  logic [15:0] ir;
  logic [7:0]  accb, mov_data;
  flags_t      alu_flags;
  logic        active, acc_b_sel, wr_acc, mov, clr_a, clr_b, np_reset;
  aluop_e      alu_op;
  logic [8:0]  opnd;
  logic [1:0]  out_sel;
  logic [7:0]  sr;
  logic        nibble_mode, dout_valid, gcu_cond;

  np_control_unit dut (.*);

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
    if (!ok) begin failures++; $display("FAIL %s (sr=%02h)", s, sr); end
  endtask

  // apply an instruction combinationally, then optionally execute it
  task automatic put(input logic [15:0] w);
    ir = w; #1;
  endtask
  task automatic step();
    exec = 1; @(posedge clk); @(negedge clk); exec = 0;
  endtask

  initial begin
    rst = 1; exec = 0; ir = i_spl(COND_U, FN_NOP); accb = 8'h9A; mov_data = 0;
    alu_flags = '0;
    @(negedge clk); rst = 0;
    chk(sr == 8'h60 && !nibble_mode && !dout_valid, "reset state");

    // Type I ADDB immediate, flags written (SRU set)
    alu_flags = '{u:1, z:0, n:1, o:0, c:1};
    put(i_type1(COND_U, 1'b1, OP_ADD, a_imm(8'h33)));
    chk(active && wr_acc && acc_b_sel && alu_op == OP_ADD && opnd == 9'h133 && !mov, "ADDB decode");
    step();
    chk(sr == 8'h75, "flags after ADDB");
    // Z condition false: nothing happens
    alu_flags = '{u:0, z:1, n:0, o:0, c:0};
    put(i_type1(COND_Z, 1'b0, OP_SUB, a_imm(8'h01)));
    chk(!active && !wr_acc, "Z condition false");
    step();
    chk(sr == 8'h75, "no flag change when skipped");
    // C condition true
    put(i_type1(COND_C, 1'b0, OP_SUB, a_imm(8'h01)));
    chk(active && wr_acc && alu_op == OP_SUB, "C condition true");
    step();
    chk(sr == 8'h68, "flags after SUBA");
    // N condition false now
    put(i_type1(COND_N, 1'b0, OP_LOAD, 9'h000));
    chk(!active, "N condition false");
    // MOVA to SR: SRU off
    mov_data = 8'h40;
    put(i_type1(COND_U, 1'b0, OP_MOV, 9'h0C0));
    chk(active && mov && !wr_acc, "MOVA SR decode");
    step();
    chk(sr == 8'h40, "SR written by MOV");
    // Type I with SRU off: flags kept
    alu_flags = '{u:0, z:0, n:1, o:1, c:1};
    put(i_type1(COND_U, 1'b0, OP_ADD, a_imm(8'h01)));
    step();
    chk(sr == 8'h40, "SRU off keeps flags");
    // Type II without update bit: kept; with update bit: written
    put(i_shift(COND_U, 1'b0, OP_SL, 1'b0));
    chk(wr_acc && alu_op == OP_SL && !acc_b_sel, "shift decode");
    step();
    chk(sr == 8'h40, "shift without SR update");
    put(i_shift(COND_U, 1'b1, OP_SRC, 1'b1));
    chk(acc_b_sel && alu_op == OP_SRC, "shift B decode");
    step();
    chk(sr == 8'h47, "shift with SR update");
    // Type IV read with update, and write
    put(i_iram(COND_U, OP_XOR, 1'b1, 1'b0));
    chk(opnd == 9'h09A && alu_op == OP_XOR && wr_acc && !mov, "IRAM read decode");
    alu_flags = '{u:0, z:1, n:0, o:0, c:0};
    step();
    chk(sr == 8'h48, "IRAM with SR update");
    put(i_iram(COND_U, OP_ADD, 1'b0, 1'b1));
    chk(opnd == 9'h09A && mov && !wr_acc, "IRAM write decode");
    // jump conditions toward the GCU (Z set, others clear)
    put(i_jump(J_Z, 8'h10));  chk(gcu_cond, "J_Z");
    put(i_jump(J_NZ, 8'h10)); chk(!gcu_cond, "J_NZ");
    put(i_jump(J_C, 8'h10));  chk(!gcu_cond, "J_C");
    put(i_jump(J_NC, 8'h10)); chk(gcu_cond, "J_NC");
    put(i_jump(J_N, 8'h10));  chk(!gcu_cond, "J_N");
    put(i_jump(J_NN, 8'h10)); chk(gcu_cond, "J_NN");
    put(i_jump(J_O, 8'h10));  chk(!gcu_cond, "J_O");
    put(i_jump(J_Z, 8'h10));
    chk(!wr_acc && !mov && out_sel == 0, "jump has no NP action");
    // outputs
    put(i_spl(COND_U, FN_OUTA)); chk(out_sel == 1, "OUTA");
    step();
    chk(dout_valid, "valid after OUTA");
    @(negedge clk);
    chk(!dout_valid, "valid lasts one clock");
    put(i_spl(COND_U, FN_OUTB));  chk(out_sel == 2, "OUTB");
    put(i_spl(COND_U, FN_SROUT)); chk(out_sel == 3, "SROUT");
    put(i_spl(COND_U, FN_CLRA));  chk(clr_a && !clr_b, "CLRA");
    put(i_spl(COND_U, FN_CLRB));  chk(clr_b && !clr_a, "CLRB");
    put(i_spl(COND_U, FN_NOP));   chk(!clr_a && !clr_b && out_sel == 0 && !np_reset, "NOP");
    // nibble mode; MOV to SR address then reaches CH, not the SR
    put(i_spl(COND_U, FN_NBEN)); step();
    chk(nibble_mode, "NBEN");
    mov_data = 8'h00;
    put(i_type1(COND_U, 1'b0, OP_MOV, 9'h0C0)); step();
    chk(sr == 8'h48, "no SR write in nibble mode");
    put(i_spl(COND_U, FN_NBDS)); step();
    chk(!nibble_mode, "NBDS");
    // deactivate
    put(i_type1(COND_U, 1'b0, OP_MOV, 9'h0C0)); step();
    chk(sr == 8'h00, "NP off");
    put(i_type1(COND_U, 1'b0, OP_LOAD, a_imm(8'h01)));
    chk(!active && !wr_acc, "off NP ignores Type I");
    put(i_jump(J_ALW, 8'h00)); chk(!gcu_cond, "off NP gives no condition");
    put(i_spl(COND_U, FN_OUTA)); chk(out_sel == 0, "off NP does not output");
    put(i_spl(COND_U, FN_FOPN)); chk(active, "FOPN obeyed when off");
    step();
    chk(sr == 8'h40, "FOPN sets NP ON only");
    put(i_type1(COND_U, 1'b0, OP_MOV, 9'h0C0)); step();
    put(i_spl(COND_U, FN_RST)); chk(np_reset && active, "RST obeyed when off");
    step();
    chk(sr == 8'h60, "RST restores SR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
