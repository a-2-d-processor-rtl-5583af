// nr_control: a Neighborhood Register (NR) and its write control.
//
// NR(i,j) sits at the top-left corner of NP(i,j) and is shared by the four
// NPs that meet at that corner. It can be written by
//   NP(i,j)     through its top-left NR address      (req[0], own)
//   NP(i,j-1)   through its top-right NR address     (req[1])
//   NP(i-1,j)   through its bottom-left NR address   (req[2])
//   NP(i-1,j-1) through its bottom-right NR address  (req[3])
// and is read by the same four NPs. A write is two steps apart from the read
// that collects it: an NP writes in one instruction, its neighbour reads in a
// later one. When NPs execute the same instruction in lock step only one of
// them addresses a given NR, so the requests never collide; if several
// arrive in the same cycle (possible with indirect addressing) the lowest
// index wins. That priority is this design's choice.
// Write on the rising edge with the request; reset clears the register.
module nr_control (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] req,
  input  logic [7:0] data [4],
  output logic [7:0] nr
);

  always_ff @(posedge clk) begin
    if (rst)         nr <= '0;
    else if (req[0]) nr <= data[0];
    else if (req[1]) nr <= data[1];
    else if (req[2]) nr <= data[2];
    else if (req[3]) nr <= data[3];
  end

endmodule
