// processor_array_top: 2-D neighborhood processor array with its global
// modules.
//
// Program memory, global control unit (GCU), instruction register (IR) and
// timing control unit (TCU) are shared by a ROWS x COLS array of
// neighborhood processors (NPs), each serving an 8x8 pixel neighborhood, so
// the array covers an 8*ROWS x 8*COLS pixel image. The default 3 x 4 array
// (24 x 32 pixels, 12 NPs) is the prototype configuration; one GCU serves up
// to 16 x 16 NPs.
//
// Use: reset, write one or more programs into the program memory
// (`pm_we`, `pm_waddr`, `pm_wdata`), load the image through the pixel load
// port (`ld_*`; NP by `ld_row`/`ld_col`, pixel index {column, row} inside the
// neighborhood, register bank A, B or C), then pulse `start` with the
// program's `start_addr`. `busy` is high while the program runs and `done`
// pulses when it executes END. Results leave on the column-shared Data Out
// buses: `col_dout[j]` is valid in the clocks where `col_dvalid[j]` is high.
// Every instruction takes three clocks while `enable` is high.
module processor_array_top
  import np_pkg::*;
#(
  parameter int ROWS     = 3,
  parameter int COLS     = 4,
  parameter int PM_DEPTH = 256
) (
  input  logic        clk,
  input  logic        enable,
  input  logic        reset,
  // program memory load
  input  logic        pm_we,
  input  logic [7:0]  pm_waddr,
  input  logic [15:0] pm_wdata,
  // program control
  input  logic        start,
  input  logic [7:0]  start_addr,
  output logic        busy,
  output logic        done,
  output logic [31:0] instr_count,
  // image load
  input  logic        ld_we,
  input  logic [3:0]  ld_row,
  input  logic [3:0]  ld_col,
  input  logic [1:0]  ld_bank,
  input  logic [5:0]  ld_pix,
  input  logic [7:0]  ld_data,
  // column-shared Data Out buses
  output logic [7:0]  col_dout [COLS],
  output logic        col_dvalid [COLS]
);

  localparam int AW = $clog2(PM_DEPTH);

  logic          sys_rst, gcu_ce, ir_ce, np_ce;
  logic [AW-1:0] pc;
  logic [15:0]   pm_rdata, ir;
  logic          ir_load, np_exec, np_cond;

  timing_control_unit u_tcu (
    .clk, .enable, .reset, .sys_rst, .gcu_ce, .ir_ce, .np_ce
  );

  program_memory #(.DEPTH(PM_DEPTH)) u_pm (
    .clk, .we (pm_we), .waddr (pm_waddr[AW-1:0]), .wdata (pm_wdata),
    .raddr (pc), .rdata (pm_rdata)
  );

  global_control_unit #(.AW(AW)) u_gcu (
    .clk, .rst (sys_rst), .gcu_ce, .ir_ce, .np_ce,
    .start, .start_addr (start_addr[AW-1:0]), .ir, .np_cond,
    .pc, .ir_load, .np_exec, .busy, .done, .instr_count
  );

  instruction_register u_ir (
    .clk, .rst (sys_rst), .load (ir_load), .d (pm_rdata), .q (ir)
  );

  np_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk, .rst (sys_rst), .exec (np_exec), .ir,
    .ld_we, .ld_row, .ld_col, .ld_bank, .ld_pix, .ld_data,
    .col_dout, .col_dvalid, .gcu_any (np_cond)
  );

endmodule
