// imc_bank: one bank of crossbar mats arranged for row-parallel MAGIC operation.
//
// The bank holds MATS crossbar mats, each with its own row/column drivers and sense
// amplifiers, and a row-parallel copying unit between every mat and its right-hand
// neighbour (mat m copies into mat m+1; the last mat has no neighbour inside the bank,
// so a copy issued there is dropped). A global driver passes either the kernel
// micro-operation stream (to all mats) or a host wordline access (to one mat) to the
// mats. Timing: an operation accepted in cycle t acts on the cells at the end of cycle
// t+1; read data appears on rd_data with rd_valid at cycle t+2; a copy lands in the
// neighbour at the end of cycle t+2. err is high when a mat rejected an illegal NOR.
//
// Follows the document: a bank is an array of crossbar mats in a row-parallel
// arrangement with a global driver, and sense amplifiers with RPC units move data into
// neighbouring mats. This design's own choices: the number of mats per bank (4; the
// document gives none), the linear copy chain and the host access path.
module imc_bank
  import imc_pkg::*;
#(
  parameter int unsigned MATS = 4,
  parameter int unsigned ROWS = MAT_ROWS,
  parameter int unsigned COLS = MAT_COLS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            kernel_busy,
  input  logic            kernel_valid,
  input  mop_t            kernel_mop,
  input  logic            host_valid,
  output logic            host_ready,
  input  mop_t            host_mop,
  input  idx_t            host_mat,
  input  logic [COLS-1:0] host_wdata,
  input  logic [COLS-1:0] host_wmask,
  output logic            rd_valid,
  output logic [COLS-1:0] rd_data,
  output logic            err
);

  logic [MATS-1:0] mat_valid;
  mop_t            mop;
  logic [COLS-1:0] wdata, wmask;

  global_driver #(.MATS(MATS), .COLS(COLS)) u_gdrv (
    .clk, .rst_n,
    .kernel_busy, .kernel_valid, .kernel_mop,
    .host_valid, .host_ready, .host_mop, .host_mat, .host_wdata, .host_wmask,
    .mat_valid, .mop, .wdata, .wmask
  );

  logic            nor_en   [MATS];
  logic [COLS-1:0] in_mask  [MATS];
  logic [COLS-1:0] out_mask [MATS];
  logic            copy_en  [MATS];
  idx_t            copy_col [MATS];
  idx_t            copy_dst [MATS];
  logic            row_wr_en[MATS];
  logic            row_rd_en[MATS];
  idx_t            row_idx  [MATS];
  logic [MATS-1:0] drv_err;
  logic [MATS-1:0] m_rd_valid;
  logic [COLS-1:0] m_rd_data  [MATS];
  logic [ROWS-1:0] col_rd_data[MATS];
  logic            col_wr_en  [MATS];
  idx_t            col_wr_idx [MATS];
  logic [ROWS-1:0] col_wr_data[MATS];

  for (genvar m = 0; m < MATS; m++) begin : g_mat
    mat_driver #(.COLS(COLS)) u_drv (
      .mop_valid(mat_valid[m]), .mop,
      .nor_en(nor_en[m]), .in_mask(in_mask[m]), .out_mask(out_mask[m]),
      .copy_en(copy_en[m]), .copy_col(copy_col[m]), .copy_dst(copy_dst[m]),
      .row_wr_en(row_wr_en[m]), .row_rd_en(row_rd_en[m]), .row_idx(row_idx[m]),
      .err(drv_err[m])
    );

    magic_mat #(.ROWS(ROWS), .COLS(COLS)) u_mat (
      .clk, .rst_n,
      .nor_en(nor_en[m]), .in_mask(in_mask[m]), .out_mask(out_mask[m]),
      .row_wr_en(row_wr_en[m]), .row_rd_en(row_rd_en[m]), .row_idx(row_idx[m]),
      .wr_data(wdata), .wr_mask(wmask),
      .rd_valid(m_rd_valid[m]), .rd_data(m_rd_data[m]),
      .col_rd_idx(copy_col[m]), .col_rd_data(col_rd_data[m]),
      .col_wr_en(col_wr_en[m]), .col_wr_idx(col_wr_idx[m]), .col_wr_data(col_wr_data[m])
    );

    if (m + 1 < MATS) begin : g_rpc
      rpc_unit #(.ROWS(ROWS)) u_rpc (
        .clk, .rst_n,
        .copy_en(copy_en[m]), .copy_dst(copy_dst[m]), .src_col_data(col_rd_data[m]),
        .dst_wr_en(col_wr_en[m+1]), .dst_wr_idx(col_wr_idx[m+1]),
        .dst_wr_data(col_wr_data[m+1])
      );
    end
  end

  // The first mat has no left-hand neighbour feeding it.
  assign col_wr_en[0]   = 1'b0;
  assign col_wr_idx[0]  = '0;
  assign col_wr_data[0] = '0;

  always_comb begin
    rd_data = '0;
    for (int m = 0; m < MATS; m++) if (m_rd_valid[m]) rd_data |= m_rd_data[m];
  end
  assign rd_valid = |m_rd_valid;
  assign err      = |drv_err;

endmodule
