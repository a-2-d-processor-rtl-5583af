// neighborhood_processor: one Neighborhood Processor (NP) of the array.
//
// An NP serves an 8x8 pixel neighborhood. It holds the pixel register bank
// (three 8-bit registers per pixel and the Row Column Register), two 8-bit
// accumulators ACCA and ACCB, an ALU, the routing multiplexers, the NP
// control unit with the status register, and the Neighborhood Register (NR)
// at its top-left corner with its write control.
//
// Every instruction reads at most one operand and writes at most one
// destination. The operand is an immediate, a pixel register, or one of the
// special registers SR, ACCA, ACCB, Row Column, and the four NRs around the
// NP (top-left is its own, the other three belong to its right, lower and
// lower-right neighbours). In nibble mode the special-register bank code
// addresses nibble CH instead, so special registers are not reachable then.
// A MOV writes the chosen accumulator to a pixel register, the SR, an
// accumulator, or one of the four NRs; writes to the Row Column Register are
// ignored. An NR write leaves the NP on `nr_wr_*` with `nr_wdata` and is
// performed by the NR's owner.
//
// Timing: the NP executes the instruction register's content in the one
// clock where `exec` is high. Results, including NR writes and Data Out, are
// visible after that edge. `dout` holds the last output value; `dout_valid`
// marks it for one clock and is the NP's share of the column-shared valid
// line (the array combines the column).
// Host load port: `ld_*` writes a pixel register directly, to deliver an
// image; this port is this design's stand-in for the sensor.
module neighborhood_processor
  import np_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        exec,
  input  logic [15:0] ir,
  input  logic [7:0]  rc_init,
  // host pixel load
  input  logic        ld_we,
  input  logic [1:0]  ld_bank,
  input  logic [5:0]  ld_pix,
  input  logic [7:0]  ld_data,
  // own NR: write requests from self and three neighbours
  input  logic [2:0]  nr_req_in,     // from left (TR), upper (BL), upper-left (BR)
  input  logic [7:0]  nr_data_in [3],
  output logic [7:0]  nr_tl,         // own NR value
  // neighbours' NRs
  input  logic [7:0]  nr_tr,
  input  logic [7:0]  nr_bl,
  input  logic [7:0]  nr_br,
  output logic        nr_wr_tr,
  output logic        nr_wr_bl,
  output logic        nr_wr_br,
  output logic [7:0]  nr_wdata,
  // data out
  output logic [7:0]  dout,
  output logic        dout_valid,
  // to the global control unit
  output logic        gcu_cond
);

  logic [7:0] acca, accb;
  logic [7:0] sr, rc;
  logic       nibble_mode;

  logic       active;
  aluop_e     alu_op;
  logic       acc_b_sel;
  logic [8:0] opnd;
  logic       wr_acc, mov, clr_a, clr_b, np_reset;
  logic [1:0] out_sel;
  flags_t     alu_flags;
  logic [7:0] alu_result;
  logic [7:0] acc_sel_val;

  assign acc_sel_val = acc_b_sel ? accb : acca;

  np_control_unit u_npcu (
    .clk, .rst, .exec, .ir, .accb, .alu_flags,
    .mov_data (acc_sel_val),
    .active, .alu_op, .acc_b_sel, .opnd, .wr_acc, .mov,
    .clr_a, .clr_b, .np_reset, .out_sel,
    .sr, .nibble_mode, .dout_valid, .gcu_cond
  );

  // ---------------------------------------------------------------------
  // Operand routing
  // ---------------------------------------------------------------------
  logic       is_spr;        // operand / destination is a special register
  logic [7:0] bank_rdata;
  logic [7:0] spr_rdata;
  logic [7:0] operand;

  assign is_spr = !opnd[8] && !nibble_mode && (opnd[7:6] == BANK_SPL);

  always_comb begin
    unique case (opnd[2:0])
      SPR_SR:   spr_rdata = sr;
      SPR_ACCA: spr_rdata = acca;
      SPR_ACCB: spr_rdata = accb;
      SPR_RC:   spr_rdata = rc;
      SPR_NRTL: spr_rdata = nr_tl;
      SPR_NRTR: spr_rdata = nr_tr;
      SPR_NRBL: spr_rdata = nr_bl;
      default:  spr_rdata = nr_br;
    endcase
  end

  always_comb begin
    if (opnd[8])     operand = opnd[7:0];
    else if (is_spr) operand = spr_rdata;
    else             operand = bank_rdata;
  end

  np_alu u_alu (
    .op (alu_op), .acc (acc_sel_val), .data (operand), .c_in (sr[SR_C]),
    .result (alu_result), .flags (alu_flags)
  );

  // ---------------------------------------------------------------------
  // Register bank
  // ---------------------------------------------------------------------
  logic bank_we;
  assign bank_we = exec && mov && !opnd[8] && !is_spr;

  np_register_bank u_bank (
    .clk, .rst, .rc_init, .nibble_mode,
    .raddr (opnd[7:0]), .rdata (bank_rdata),
    .we (bank_we), .waddr (opnd[7:0]), .wdata (acc_sel_val),
    .ld_we, .ld_bank, .ld_pix, .ld_data,
    .rc
  );

  // ---------------------------------------------------------------------
  // Special register writes by MOV
  // ---------------------------------------------------------------------
  logic spr_we;
  assign spr_we = exec && mov && is_spr;

  logic nr_wr_tl;
  assign nr_wr_tl = spr_we && (opnd[2:0] == SPR_NRTL);
  assign nr_wr_tr = spr_we && (opnd[2:0] == SPR_NRTR);
  assign nr_wr_bl = spr_we && (opnd[2:0] == SPR_NRBL);
  assign nr_wr_br = spr_we && (opnd[2:0] == SPR_NRBR);
  assign nr_wdata = acc_sel_val;

  logic [7:0] nr_data [4];
  assign nr_data[0] = acc_sel_val;
  assign nr_data[1] = nr_data_in[0];
  assign nr_data[2] = nr_data_in[1];
  assign nr_data[3] = nr_data_in[2];

  nr_control u_nr (
    .clk, .rst,
    .req  ({nr_req_in, nr_wr_tl}),
    .data (nr_data),
    .nr   (nr_tl)
  );

  // ---------------------------------------------------------------------
  // Accumulators and Data Out
  // ---------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      acca <= '0;
      accb <= '0;
      dout <= '0;
    end else if (exec) begin
      if (np_reset) begin
        acca <= '0;
        accb <= '0;
      end else begin
        if (wr_acc && !acc_b_sel) acca <= alu_result;
        if (wr_acc &&  acc_b_sel) accb <= alu_result;
        if (spr_we && opnd[2:0] == SPR_ACCA) acca <= acc_sel_val;
        if (spr_we && opnd[2:0] == SPR_ACCB) accb <= acc_sel_val;
        if (clr_a) acca <= '0;
        if (clr_b) accb <= '0;
      end
      unique case (out_sel)
        2'd1:    dout <= acca;
        2'd2:    dout <= accb;
        2'd3:    dout <= sr;
        default: ;
      endcase
    end
  end

  logic unused_active;
  assign unused_active = active;

endmodule
