// rpc_unit: row-parallel copying unit between a crossbar mat and its right-hand
// neighbour.
//
// A copy moves one column of the source mat, every row at once, into a column of the
// neighbouring mat over the local bus (one wire per row). In the cycle where copy_en is
// high the sense amplifiers present the source column on src_col_data; the unit
// captures it at the clock edge together with the destination column index, and in the
// following cycle drives it onto the neighbour's column write port (dst_wr_en high for
// exactly one cycle). A new copy may be started every cycle; each one arrives two clock
// edges after it was requested.
//
// Follows the document: sense amplifiers plus RPC units transfer data in parallel into
// the neighbouring mat, over a local bus of 256 wires. This design's own choices: the
// two-stage (sense, then drive) timing and the reset of the valid flag only.
module rpc_unit
  import imc_pkg::*;
#(
  parameter int unsigned ROWS = MAT_ROWS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            copy_en,
  input  idx_t            copy_dst,
  input  logic [ROWS-1:0] src_col_data,
  output logic            dst_wr_en,
  output idx_t            dst_wr_idx,
  output logic [ROWS-1:0] dst_wr_data
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dst_wr_en <= 1'b0;
    else        dst_wr_en <= copy_en;
  end

  always_ff @(posedge clk) begin
    if (copy_en) begin
      dst_wr_idx  <= copy_dst;
      dst_wr_data <= src_col_data;
    end
  end

endmodule
