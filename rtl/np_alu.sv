// np_alu: 8-bit arithmetic and logic unit of a neighborhood processor.
//
// Combinational. Computes `result = acc <op> data` for the operations of the
// instruction set (add, add with carry, subtract, subtract with borrow, AND,
// OR, XOR, load, and the five single-bit shifts of the accumulator) and the
// five status flags:
//   C  carry out of an addition, borrow out of a subtraction, or the bit
//      shifted out by a shift
//   O  two non-negative operands gave a negative sum (for a subtraction the
//      second operand is taken negated)
//   U  two negative operands gave a non-negative sum (same convention)
//   N  result bit 7
//   Z  result is zero
// The flag rules for addition follow the instruction set description. How
// logic operations, load and shifts set C, O and U is this design's choice:
// shifts put the shifted-out bit in C, all of them clear O and U, and logic
// operations and load clear C. `c_in` is the current carry flag, used by
// ADC, SBB (as borrow), SRC and SLC.
module np_alu
  import np_pkg::*;
(
  input  aluop_e     op,
  input  logic [7:0] acc,
  input  logic [7:0] data,
  input  logic       c_in,
  output logic [7:0] result,
  output flags_t     flags
);

  logic [8:0] sum;
  logic       opb_sign; // sign of the second addend as seen by the adder
  logic       is_arith;

  always_comb begin
    sum      = '0;
    opb_sign = data[7];
    is_arith = 1'b0;
    result   = '0;
    flags    = '0;
    unique case (op)
      OP_ADD: begin
        is_arith = 1'b1;
        sum      = {1'b0, acc} + {1'b0, data};
        result   = sum[7:0];
        flags.c  = sum[8];
      end
      OP_ADC: begin
        is_arith = 1'b1;
        sum      = {1'b0, acc} + {1'b0, data} + {8'b0, c_in};
        result   = sum[7:0];
        flags.c  = sum[8];
      end
      OP_SUB: begin
        is_arith = 1'b1;
        opb_sign = !data[7];
        sum      = {1'b0, acc} - {1'b0, data};
        result   = sum[7:0];
        flags.c  = sum[8];          // borrow
      end
      OP_SBB: begin
        is_arith = 1'b1;
        opb_sign = !data[7];
        sum      = {1'b0, acc} - {1'b0, data} - {8'b0, c_in};
        result   = sum[7:0];
        flags.c  = sum[8];          // borrow
      end
      OP_AND:  result = acc & data;
      OP_OR:   result = acc | data;
      OP_XOR:  result = acc ^ data;
      OP_LOAD: result = data;
      OP_ASR: begin
        result  = {acc[7], acc[7:1]};
        flags.c = acc[0];
      end
      OP_SR: begin
        result  = {1'b0, acc[7:1]};
        flags.c = acc[0];
      end
      OP_SRC: begin
        result  = {c_in, acc[7:1]};
        flags.c = acc[0];
      end
      OP_SL: begin
        result  = {acc[6:0], 1'b0};
        flags.c = acc[7];
      end
      OP_SLC: begin
        result  = {acc[6:0], c_in};
        flags.c = acc[7];
      end
      // MOV passes the accumulator through to the destination
      default: result = acc;
    endcase
    flags.n = result[7];
    flags.z = (result == 8'h00);
    if (is_arith) begin
      flags.o = !acc[7] && !opb_sign &&  result[7];
      flags.u =  acc[7] &&  opb_sign && !result[7];
    end
  end

endmodule
