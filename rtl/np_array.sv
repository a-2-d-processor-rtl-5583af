// np_array: ROWS x COLS grid of neighborhood processors.
//
// All NPs receive the same instruction register and execute strobe and run
// in lock step. Neighbouring NPs talk through the Neighborhood Registers: the
// NR of NP(i,j) sits at its top-left corner and is also the top-right NR of
// NP(i,j-1), the bottom-left NR of NP(i-1,j) and the bottom-right NR of
// NP(i-1,j-1). A transfer in any of the eight directions therefore takes two
// instructions, NP to NR and NR to NP. NR positions outside the array (the
// right column's right neighbours, the bottom row's lower neighbours) do not
// exist in this design: they read as zero and writes to them are dropped.
//
// The NPs of one column share an 8-bit Data Out bus and a 1-bit Data Out
// Valid line. Programs must let at most one NP of a column drive them at a
// time; the bus is built as a multiplexer selected by the valid lines, and an
// assertion checks the rule. Row Column Register value of NP(i,j) is
// {i[3:0], j[3:0]}, which covers the 16x16 NPs one global control unit
// serves. `gcu_any` is the OR over all NPs of their condition outputs.
// Host load: `ld_row`, `ld_col` select the NP, the rest go to its load port.
module np_array
  import np_pkg::*;
#(
  parameter int ROWS = 3,
  parameter int COLS = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        exec,
  input  logic [15:0] ir,
  input  logic        ld_we,
  input  logic [3:0]  ld_row,
  input  logic [3:0]  ld_col,
  input  logic [1:0]  ld_bank,
  input  logic [5:0]  ld_pix,
  input  logic [7:0]  ld_data,
  output logic [7:0]  col_dout [COLS],
  output logic        col_dvalid [COLS],
  output logic        gcu_any
);

  logic [7:0] nr     [ROWS][COLS];
  logic       wr_tr  [ROWS][COLS];
  logic       wr_bl  [ROWS][COLS];
  logic       wr_br  [ROWS][COLS];
  logic [7:0] wdata  [ROWS][COLS];
  logic [7:0] dout   [ROWS][COLS];
  logic       dvalid [ROWS][COLS];
  logic       cond   [ROWS][COLS];

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    for (genvar j = 0; j < COLS; j++) begin : g_col
      logic [2:0] req_in;
      logic [7:0] data_in [3];
      logic [7:0] nr_tr_v, nr_bl_v, nr_br_v;

      // writers of NR(i,j) other than NP(i,j)
      if (j > 0) begin : g_l
        assign req_in[0]  = wr_tr[i][j-1];
        assign data_in[0] = wdata[i][j-1];
      end else begin : g_nl
        assign req_in[0]  = 1'b0;
        assign data_in[0] = '0;
      end
      if (i > 0) begin : g_u
        assign req_in[1]  = wr_bl[i-1][j];
        assign data_in[1] = wdata[i-1][j];
      end else begin : g_nu
        assign req_in[1]  = 1'b0;
        assign data_in[1] = '0;
      end
      if (i > 0 && j > 0) begin : g_ul
        assign req_in[2]  = wr_br[i-1][j-1];
        assign data_in[2] = wdata[i-1][j-1];
      end else begin : g_nul
        assign req_in[2]  = 1'b0;
        assign data_in[2] = '0;
      end

      // NRs read by NP(i,j) besides its own
      if (j + 1 < COLS) begin : g_r
        assign nr_tr_v = nr[i][j+1];
      end else begin : g_nr
        assign nr_tr_v = '0;
      end
      if (i + 1 < ROWS) begin : g_d
        assign nr_bl_v = nr[i+1][j];
      end else begin : g_nd
        assign nr_bl_v = '0;
      end
      if (i + 1 < ROWS && j + 1 < COLS) begin : g_dr
        assign nr_br_v = nr[i+1][j+1];
      end else begin : g_ndr
        assign nr_br_v = '0;
      end

      neighborhood_processor u_np (
        .clk, .rst, .exec, .ir,
        .rc_init    ({4'(i), 4'(j)}),
        .ld_we      (ld_we && ld_row == 4'(i) && ld_col == 4'(j)),
        .ld_bank, .ld_pix, .ld_data,
        .nr_req_in  (req_in),
        .nr_data_in (data_in),
        .nr_tl      (nr[i][j]),
        .nr_tr      (nr_tr_v),
        .nr_bl      (nr_bl_v),
        .nr_br      (nr_br_v),
        .nr_wr_tr   (wr_tr[i][j]),
        .nr_wr_bl   (wr_bl[i][j]),
        .nr_wr_br   (wr_br[i][j]),
        .nr_wdata   (wdata[i][j]),
        .dout       (dout[i][j]),
        .dout_valid (dvalid[i][j]),
        .gcu_cond   (cond[i][j])
      );
    end
  end

  // column-shared Data Out bus and valid line
  always_comb begin
    for (int j = 0; j < COLS; j++) begin
      col_dout[j]   = '0;
      col_dvalid[j] = 1'b0;
      for (int i = 0; i < ROWS; i++) begin
        if (dvalid[i][j]) col_dout[j] = col_dout[j] | dout[i][j];
        col_dvalid[j] = col_dvalid[j] | dvalid[i][j];
      end
    end
  end

  always_comb begin
    gcu_any = 1'b0;
    for (int i = 0; i < ROWS; i++)
      for (int j = 0; j < COLS; j++)
        gcu_any = gcu_any | cond[i][j];
  end

  // at most one NP of a column drives the shared bus
  for (genvar j = 0; j < COLS; j++) begin : g_bus_chk
    logic [ROWS-1:0] v;
    for (genvar i = 0; i < ROWS; i++) begin : g_v
      assign v[i] = dvalid[i][j];
    end
    a_one_driver : assert property (@(posedge clk) disable iff (rst) $onehot0(v))
      else $error("np_array: several NPs drive Data Out bus of column %0d", j);
  end

endmodule
