// global_control_unit: program sequencing for the whole array (GCU).
//
// Holds the program counter. A `start` pulse while idle loads `start_addr`
// and runs the program from there. In each instruction, at the `gcu_ce`
// phase, the GCU looks at the instruction that the NPs have just executed
// (still in the instruction register):
//   - a jump is taken when its condition is unconditional (bits 15:14 = 11,
//     toggle 1) or when at least one active NP finds it true (`np_cond`,
//     the OR of the NPs' condition outputs); the PC is then loaded with
//     bits 7:0 of the instruction;
//   - END stops the program when unconditional or when an active NP finds
//     its condition true; `done` pulses for one clock;
//   - otherwise the PC advances by one.
// The GCU enables the instruction-register latch and the NP execute strobe
// only while a program runs. Combining the NPs' conditions by OR is this
// design's choice: every NP holds its own flags and nothing specifies which
// of them a global jump follows. `instr_count` counts executed instructions
// of the current program.
module global_control_unit
  import np_pkg::*;
#(
  parameter int AW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          gcu_ce,
  input  logic          ir_ce,
  input  logic          np_ce,
  input  logic          start,
  input  logic [AW-1:0] start_addr,
  input  logic [15:0]   ir,
  input  logic          np_cond,
  output logic [AW-1:0] pc,
  output logic          ir_load,
  output logic          np_exec,
  output logic          busy,
  output logic          done,
  output logic [31:0]   instr_count
);

  logic first;    // no instruction executed yet

  logic cond_u;
  assign cond_u = is_jump(ir) ? (ir[15:14] == 2'b11 && ir[8]) : (ir[15:14] == 2'b11);

  logic taken;
  assign taken = cond_u || np_cond;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc          <= '0;
      busy        <= 1'b0;
      first       <= 1'b0;
      done        <= 1'b0;
      instr_count <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          pc          <= start_addr;
          busy        <= 1'b1;
          first       <= 1'b1;
          instr_count <= '0;
        end
      end else if (gcu_ce) begin
        if (first) begin
          first <= 1'b0;
        end else if (is_end(ir) && taken) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else if (is_jump(ir) && taken) begin
          pc <= ir[AW-1:0];
        end else begin
          pc <= pc + 1'b1;
        end
      end
      if (np_exec) instr_count <= instr_count + 1;
    end
  end

  // the instruction is latched only after a PC phase of this program
  assign ir_load = busy && !first && ir_ce;
  assign np_exec = busy && !first && np_ce;

endmodule
