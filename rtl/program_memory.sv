// program_memory: instruction store shared by the whole array.
//
// DEPTH words of 16 bits. The host writes programs through the write port
// (`we`, `waddr`, `wdata`, taking effect at the rising edge); several
// programs can be stored side by side and each is started from its own
// start address. The read port is combinational: `rdata` is the word at
// `raddr`, which the instruction register latches. The default depth of 256
// follows from the 8-bit jump target of the instruction set; contents are
// not reset.
module program_memory #(
  parameter int DEPTH = 256,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [15:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [15:0]   rdata
);

  logic [15:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
