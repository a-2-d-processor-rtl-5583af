// tb_np_alu: checks the ALU against a reference written from the flag rules.
// All operations are run on random operands and on the corner values 00, 7F,
// 80 and FF, with carry in 0 and 1. The reference computes results with
// signed/unsigned integer arithmetic rather than the ALU's bit expressions.
module tb_np_alu;
  import np_pkg::*;

  aluop_e     op;
  logic [7:0] acc, data, result;
  logic       c_in;
  flags_t     flags;

  np_alu dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ref_model(input aluop_e o, input int a, input int d, input int ci,
                           output int r, output bit c, output bit ov, output bit un,
                           output bit ar);
    int sa, sd, s;
    sa = (a >= 128) ? a - 256 : a;
    sd = (d >= 128) ? d - 256 : d;
    c = 0; ov = 0; un = 0; ar = 0;
    case (o)
      OP_ADD: begin ar = 1; s = a + d;      r = s % 256; c = s > 255;
                    ov = sa >= 0 && sd >= 0 && r >= 128; un = sa < 0 && sd < 0 && r < 128; end
      OP_ADC: begin ar = 1; s = a + d + ci; r = s % 256; c = s > 255;
                    ov = sa >= 0 && sd >= 0 && r >= 128; un = sa < 0 && sd < 0 && r < 128; end
      OP_SUB: begin ar = 1; s = a - d;      r = (s + 256) % 256; c = s < 0;
                    ov = sa >= 0 && sd < 0 && r >= 128; un = sa < 0 && sd >= 0 && r < 128; end
      OP_SBB: begin ar = 1; s = a - d - ci; r = (s + 512) % 256; c = s < 0;
                    ov = sa >= 0 && sd < 0 && r >= 128; un = sa < 0 && sd >= 0 && r < 128; end
      OP_AND:  r = a & d;
      OP_OR:   r = a | d;
      OP_XOR:  r = a ^ d;
      OP_LOAD: r = d;
      OP_ASR:  begin r = (a / 2) + (a >= 128 ? 128 : 0); c = a % 2; end
      OP_SR:   begin r = a / 2;                         c = a % 2; end
      OP_SRC:  begin r = a / 2 + 128 * ci;              c = a % 2; end
      OP_SL:   begin r = (a * 2) % 256;                 c = a >= 128; end
      OP_SLC:  begin r = (a * 2 + ci) % 256;            c = a >= 128; end
      default: r = a;
    endcase
  endtask

  aluop_e ops [14] = '{OP_ADD, OP_ADC, OP_SUB, OP_SBB, OP_AND, OP_OR, OP_XOR,
                       OP_ASR, OP_SR, OP_SRC, OP_SL, OP_SLC, OP_LOAD, OP_MOV};
  int corner [4] = '{0, 127, 128, 255};

  task automatic one(input aluop_e o, input int a, input int d, input int ci);
    int r; bit c, ov, un, ar;
    op = o; acc = 8'(a); data = 8'(d); c_in = ci[0];
    #1;
    ref_model(o, a, d, ci, r, c, ov, un, ar);
    checks++;
    if (result !== 8'(r) || flags.c !== c || flags.o !== ov || flags.u !== un ||
        flags.n !== (r >= 128) || flags.z !== (r == 0)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%02h d=%02h ci=%0d: got %02h c%0b o%0b u%0b n%0b z%0b exp %02h c%0b o%0b u%0b",
                 o.name(), a, d, ci, result, flags.c, flags.o, flags.u, flags.n, flags.z, r, c, ov, un);
    end
  endtask

  initial begin
    foreach (ops[k]) begin
      foreach (corner[x]) foreach (corner[y]) for (int ci = 0; ci < 2; ci++)
        one(ops[k], corner[x], corner[y], ci);
      repeat (300) one(ops[k], $urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
