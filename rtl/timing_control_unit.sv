// timing_control_unit: reset and phase timing for the whole array.
//
// The design runs from one clock `clk`. The three timing signals that keep the
// global control unit, the instruction register and the NP control units in
// step are produced as clock-enable strobes, each high for one clock in
// turn:
//   gcu_ce  the global control unit chooses the program counter value
//   ir_ce   the instruction register latches the addressed instruction
//   np_ce   the NPs execute the instruction register's content
// so one instruction takes three clocks. The phases advance only while
// `enable` is high. `reset` is an asynchronous, active-high input; it is
// synchronised (asserted at once, released after two clocks) and given out
// as `sys_rst` to every other block, and the phase sequence restarts at
// gcu_ce after it. Building the three clocks as enables of one clock, and
// their order, are this design's choices.
module timing_control_unit (
  input  logic clk,
  input  logic enable,
  input  logic reset,
  output logic sys_rst,
  output logic gcu_ce,
  output logic ir_ce,
  output logic np_ce
);

  logic [1:0] rst_sync;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) rst_sync <= 2'b11;
    else       rst_sync <= {rst_sync[0], 1'b0};
  end

  assign sys_rst = rst_sync[1];

  typedef enum logic [1:0] {PH_GCU, PH_IR, PH_NP} phase_e;
  phase_e phase;

  always_ff @(posedge clk) begin
    if (sys_rst) begin
      phase <= PH_GCU;
    end else if (enable) begin
      unique case (phase)
        PH_GCU:  phase <= PH_IR;
        PH_IR:   phase <= PH_NP;
        default: phase <= PH_GCU;
      endcase
    end
  end

  assign gcu_ce = !sys_rst && enable && (phase == PH_GCU);
  assign ir_ce  = !sys_rst && enable && (phase == PH_IR);
  assign np_ce  = !sys_rst && enable && (phase == PH_NP);

endmodule
