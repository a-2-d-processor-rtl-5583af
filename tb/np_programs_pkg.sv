// np_programs_pkg: assembler programs for the processor array, used by the
// workload testbenches. Each function appends machine code to `prog` and
// returns nothing; jump targets are absolute program memory addresses.
//
//   readout   one NP row at a time (rows selected through the Row Column
//             Register and NP ON), streams bank A pixels 63..0, then ACCB
//             (FF) and the status register (65) on the column buses
//   readout_loop  the same stream with the NP rows walked by a loop (row
//             counter in C(7,7)): 273 instructions per NP row + 3, but 24
//             words whatever the array size, so that 16 rows fit
//   invert    p -> 255 - p for all pixels, indirect-address loop
//   hedge     horizontal edges: A(x,y) <- |A(x,y) - A(x,y+1)|; the pixel
//             below row 7 comes from the NP below through its NR (zero
//             at the bottom of the array)
//   vedge     vertical edges: A(x,y) <- |A(x,y) - A(x+1,y)|; the pixel right
//             of column 7 comes from the NP to the right through its NR
//             (zero at the right edge)
//   totedge   total edges: A(x,y) <- min(255, |P-P(x+1,y)| + |P-P(x,y+1)|
//             + |P-P(x+1,y+1)|) over the whole image, zero outside it. Bank C
//             gets the image moved up one pixel, bank B the image moved left
//             one pixel and then up one pixel (so the diagonal neighbour
//             arrives through two NR hops), and three local passes sum the
//             differences with saturation.
// The edge programs run with SRU cleared, so only the Type IV subtract
// (with its own SR-update bit) and the loop-control shift set flags; the
// absolute value is taken by complementing and incrementing when the
// subtraction borrowed.
package np_programs_pkg;
  import np_pkg::*;

  logic [15:0] prog [$];

  localparam logic [8:0] S_SR = 9'h0C0, S_ACCA = 9'h0C1, S_ACCB = 9'h0C2, S_RC = 9'h0C3;
  localparam logic [8:0] S_TL = 9'h0C4, S_TR = 9'h0C5, S_BL = 9'h0C6, S_BR = 9'h0C7;

  function automatic int here();
    return prog.size();
  endfunction
  function automatic void emit(input logic [15:0] w);
    prog.push_back(w);
  endfunction
  function automatic void op_a(input cond_e c, input aluop_e op, input logic [8:0] o);
    emit(i_type1(c, 1'b0, op, o));
  endfunction
  function automatic void op_b(input cond_e c, input aluop_e op, input logic [8:0] o);
    emit(i_type1(c, 1'b1, op, o));
  endfunction
  function automatic void spl(input cond_e c, input logic [8:0] fn);
    emit(i_spl(c, fn));
  endfunction

  function automatic void asm_readout(input int rows);
    int loop;
    for (int r = 0; r < rows; r++) begin
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

  function automatic void set_sr(input logic [7:0] v);
    op_a(COND_U, OP_LOAD, a_imm(v));
    op_a(COND_U, OP_MOV, S_SR);
  endfunction

  function automatic void asm_readout_loop(input int rows);
    int row_loop, loop;
    localparam logic [8:0] CNT = 9'h0BF;        // C(7,7)
    op_a(COND_U, OP_LOAD, a_imm(8'h00));
    op_a(COND_U, OP_MOV, CNT);
    row_loop = here();
    op_a(COND_U, OP_LOAD, S_RC);
    op_a(COND_U, OP_AND, a_imm(8'hF0));
    op_a(COND_U, OP_SUB, CNT);
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
    set_sr(8'h60);
    op_a(COND_U, OP_LOAD, CNT);
    op_a(COND_U, OP_ADD, a_imm(8'h10));
    op_a(COND_U, OP_MOV, CNT);
    op_a(COND_U, OP_SUB, a_imm(8'(rows << 4)));
    emit(i_jump(J_NZ, 8'(row_loop)));
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

  // |A - [ACCB]| into ACCA (flags from the subtract only)
  function automatic void abs_diff_indirect();
    emit(i_iram(COND_U, OP_SUB, 1'b1, 1'b0));
    op_a(COND_C, OP_XOR, a_imm(8'hFF));
    op_a(COND_C, OP_ADD, a_imm(8'h01));
  endfunction

  // step = pointer distance to the neighbour pixel (1: below, 8: right);
  // nr = NR through which the neighbour NP's first pixel arrives
  function automatic void asm_edge(input int step, input logic [8:0] nr);
    int loop;
    op_a(COND_U, OP_LOAD, a_imm(8'h40));        // SRU off
    op_a(COND_U, OP_MOV, S_SR);
    op_b(COND_U, OP_LOAD, a_imm(8'h00));
    loop = here();
    // first pixel of this line to the own NR for the neighbour NP
    emit(i_iram(COND_U, OP_LOAD, 1'b0, 1'b0));
    op_a(COND_U, OP_MOV, S_TL);
    for (int k = 0; k < 7; k++) begin
      emit(i_iram(COND_U, OP_LOAD, 1'b0, 1'b0));
      op_b(COND_U, OP_ADD, a_imm(8'(step)));
      abs_diff_indirect();
      op_b(COND_U, OP_SUB, a_imm(8'(step)));
      emit(i_iram(COND_U, OP_LOAD, 1'b0, 1'b1));
      op_b(COND_U, OP_ADD, a_imm(8'(step)));
    end
    // last pixel of the line against the neighbour NP's NR
    emit(i_iram(COND_U, OP_LOAD, 1'b0, 1'b0));
    op_b(COND_U, OP_MOV, a_pix(BANK_C, 0, 0));  // save pointer in C(0,0)
    op_b(COND_U, OP_LOAD, a_imm(nr[7:0]));
    abs_diff_indirect();
    op_b(COND_U, OP_LOAD, a_pix(BANK_C, 0, 0));
    emit(i_iram(COND_U, OP_LOAD, 1'b0, 1'b1));
    if (step == 1) begin
      // next column starts at pointer + 1; done when pointer reaches 40
      op_b(COND_U, OP_ADD, a_imm(8'h01));
      op_b(COND_U, OP_MOV, S_ACCA);
      emit(i_shift(COND_U, 1'b0, OP_SL, 1'b1)); // N = pointer bit 6
    end else begin
      // next row starts at pointer - 37; done when pointer reaches 08
      op_b(COND_U, OP_SUB, a_imm(8'h37));
      op_b(COND_U, OP_MOV, S_ACCA);
      emit(i_shift(COND_U, 1'b0, OP_SL, 1'b0));
      emit(i_shift(COND_U, 1'b0, OP_SL, 1'b0));
      emit(i_shift(COND_U, 1'b0, OP_SL, 1'b0));
      emit(i_shift(COND_U, 1'b0, OP_SL, 1'b1)); // N = pointer bit 3
    end
    emit(i_jump(J_NN, 8'(loop)));
    op_a(COND_U, OP_LOAD, a_imm(8'h60));        // SRU back on
    op_a(COND_U, OP_MOV, S_SR);
    spl(COND_U, FN_END);
  endfunction

  // dst(x,y) <- src(neighbour at pointer distance `step`), the value for the
  // last pixel of each line taken from NR `nr`; runs with SRU set
  function automatic void asm_shift(input logic [7:0] src, input logic [7:0] dst,
                                    input int step, input logic [8:0] nr);
    int loop;
    logic [7:0] d;
    d = dst - src;
    op_b(COND_U, OP_LOAD, a_imm(src));
    loop = here();
    emit(i_iram(COND_U, OP_LOAD, 1'b0, 1'b0));  // first pixel of the line
    op_a(COND_U, OP_MOV, S_TL);                 // to the neighbours
    for (int k = 0; k < 7; k++) begin
      op_b(COND_U, OP_ADD, a_imm(8'(step)));
      emit(i_iram(COND_U, OP_LOAD, 1'b0, 1'b0));
      op_b(COND_U, OP_ADD, a_imm(8'(d - 8'(step))));
      emit(i_iram(COND_U, OP_LOAD, 1'b0, 1'b1));
      op_b(COND_U, OP_SUB, a_imm(8'(d - 8'(step))));
    end
    op_a(COND_U, OP_LOAD, nr);
    if (d != 0) op_b(COND_U, OP_ADD, a_imm(d));
    emit(i_iram(COND_U, OP_LOAD, 1'b0, 1'b1));
    if (d != 0) op_b(COND_U, OP_SUB, a_imm(d));
    if (step == 1) begin
      op_b(COND_U, OP_ADD, a_imm(8'h01));
      op_a(COND_U, OP_LOAD, S_ACCB);
      op_a(COND_U, OP_SUB, a_imm(src + 8'h40));
    end else begin
      op_b(COND_U, OP_SUB, a_imm(8'h37));
      op_a(COND_U, OP_LOAD, S_ACCB);
      op_a(COND_U, OP_SUB, a_imm(src + 8'h08));
    end
    emit(i_jump(J_NZ, 8'(loop)));
  endfunction

  // for every pixel: t = |A - other|; with `acc` set, t = min(255, t + acc
  // bank); dst <- t. Pointer walks bank A from 63 down; runs with SRU clear.
  function automatic void asm_absacc(input logic [7:0] other, input bit acc,
                                     input logic [7:0] acc_bank, input logic [7:0] dst);
    int loop;
    logic [7:0] cur;
    op_b(COND_U, OP_LOAD, a_imm(8'h3F));
    loop = here();
    emit(i_iram(COND_U, OP_LOAD, 1'b0, 1'b0));
    op_b(COND_U, OP_ADD, a_imm(other));
    abs_diff_indirect();
    cur = other;
    if (acc) begin
      op_b(COND_U, OP_ADD, a_imm(acc_bank - cur));
      emit(i_iram(COND_U, OP_ADD, 1'b1, 1'b0));
      op_a(COND_C, OP_LOAD, a_imm(8'hFF));      // saturate
      cur = acc_bank;
    end
    if (dst != cur) op_b(COND_U, OP_ADD, a_imm(dst - cur));
    emit(i_iram(COND_U, OP_LOAD, 1'b0, 1'b1));
    op_b(COND_U, OP_SUB, a_imm(dst + 8'h01));  // next pixel in bank A
    op_b(COND_U, OP_MOV, S_ACCA);
    emit(i_shift(COND_U, 1'b0, OP_SL, 1'b1));   // N = pointer bit 6 (FF: done)
    emit(i_jump(J_NN, 8'(loop)));
  endfunction

  function automatic void asm_total_edge();
    set_sr(8'h60);
    asm_shift(8'h00, 8'h80, 1, S_BL);           // C = image moved up
    set_sr(8'h40);
    asm_absacc(8'h80, 1'b0, 8'h00, 8'h80);      // C = |P - below|
    set_sr(8'h60);
    asm_shift(8'h00, 8'h40, 8, S_TR);           // B = image moved left
    set_sr(8'h40);
    asm_absacc(8'h40, 1'b1, 8'h80, 8'h80);      // C += |P - right|
    set_sr(8'h60);
    asm_shift(8'h40, 8'h40, 1, S_BL);           // B = moved left and up
    set_sr(8'h40);
    asm_absacc(8'h40, 1'b1, 8'h80, 8'h00);      // A = C + |P - diagonal|
    set_sr(8'h60);
    spl(COND_U, FN_END);
  endfunction

endpackage
