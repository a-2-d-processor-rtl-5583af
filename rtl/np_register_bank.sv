// np_register_bank: pixel register bank of one neighborhood processor.
//
// Each of the 8x8 pixels of the neighborhood owns three 8-bit registers A, B
// and C. In nibble mode register C is used as two 4-bit nibbles, CL (bank
// code 10) and CH (bank code 11); a nibble reads zero-extended and a write
// stores the low four bits of the data. Outside nibble mode bank 11 is not a
// pixel bank (it holds the special registers, which live in the NP), and this
// bank neither reads nor writes it. The bank also holds the Row Column
// Register, loaded with a value unique to each NP at reset and read-only to
// programs.
//
// Address: {bank[1:0], column[2:0], row[2:0]}, the low eight bits of the
// instruction's register address.
// Read is combinational. An instruction write (`we`) and a host load (`ld_we`,
// used to deliver an image into the array) take effect at the rising clock
// edge; the host load has priority. Reset clears all pixel registers.
module np_register_bank
  import np_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] rc_init,     // unique Row Column value of this NP
  input  logic       nibble_mode,
  // instruction access
  input  logic [7:0] raddr,
  output logic [7:0] rdata,
  input  logic       we,
  input  logic [7:0] waddr,
  input  logic [7:0] wdata,
  // host load port (pixel index = {column, row})
  input  logic       ld_we,
  input  logic [1:0] ld_bank,
  input  logic [5:0] ld_pix,
  input  logic [7:0] ld_data,
  // Row Column Register
  output logic [7:0] rc
);

  logic [7:0] reg_a [64];
  logic [7:0] reg_b [64];
  logic [7:0] reg_c [64];
  logic [7:0] rc_q;

  assign rc = rc_q;

  logic [1:0] rbank;
  logic [5:0] rpix;
  assign rbank = raddr[7:6];
  assign rpix  = raddr[5:0];

  always_comb begin
    unique case (rbank)
      BANK_A:  rdata = reg_a[rpix];
      BANK_B:  rdata = reg_b[rpix];
      BANK_C:  rdata = nibble_mode ? {4'h0, reg_c[rpix][3:0]} : reg_c[rpix];
      default: rdata = nibble_mode ? {4'h0, reg_c[rpix][7:4]} : 8'h00;
    endcase
  end

  logic [1:0] wbank;
  logic [5:0] wpix;
  assign wbank = waddr[7:6];
  assign wpix  = waddr[5:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 64; i++) begin
        reg_a[i] <= '0;
        reg_b[i] <= '0;
        reg_c[i] <= '0;
      end
      rc_q <= rc_init;
    end else if (ld_we) begin
      unique case (ld_bank)
        BANK_A:  reg_a[ld_pix] <= ld_data;
        BANK_B:  reg_b[ld_pix] <= ld_data;
        default: reg_c[ld_pix] <= ld_data;
      endcase
    end else if (we) begin
      unique case (wbank)
        BANK_A: reg_a[wpix] <= wdata;
        BANK_B: reg_b[wpix] <= wdata;
        BANK_C: begin
          if (nibble_mode) reg_c[wpix][3:0] <= wdata[3:0];
          else             reg_c[wpix]      <= wdata;
        end
        default: begin
          if (nibble_mode) reg_c[wpix][7:4] <= wdata[3:0];
        end
      endcase
    end
  end

endmodule
