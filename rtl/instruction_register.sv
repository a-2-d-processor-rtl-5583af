// instruction_register: the globally shared Instruction Register.
//
// Latches the program memory word at the rising edge where `load` is high
// (the instruction-register phase of the timing control unit, gated by the
// global control unit while a program runs) and presents it to every NP and
// to the global control unit. Reset loads a NOP (unconditional special
// instruction with function NOP), so nothing is executed before the first
// fetch.
module instruction_register
  import np_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        load,
  input  logic [15:0] d,
  output logic [15:0] q
);

  always_ff @(posedge clk) begin
    if (rst)       q <= i_spl(COND_U, FN_NOP);
    else if (load) q <= d;
  end

endmodule
