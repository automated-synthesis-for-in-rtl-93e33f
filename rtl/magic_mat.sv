// magic_mat: functional digital model of one MAGIC memristor crossbar mat.
//
// Each cell holds one bit (low resistance = 1, high resistance = 0). A NOR/INV
// operation evaluates, in every wordline at once and in a single cycle, the NOR of the
// cells in the driven input columns (in_mask) and stores it in the grounded output
// column (out_mask) of the same wordline. A wordline can also be written from the host
// (bit mask wr_mask selects the written columns, so one segment of a wordline can be
// loaded without touching the others) and read through the sense amplifiers, whose
// latched value appears on rd_data one cycle after row_rd_en. For row-parallel copying,
// the sensed column col_rd_idx is presented combinationally on col_rd_data (one bit per
// row) and a whole column can be written from the neighbouring mat's copy unit.
//
// Follows the document: 256x256 size, row-parallel NOR/INV between columns with the
// result stored in memory, single-cycle evaluation per operation, sense amplifiers on
// the mat. This design's own choices: the electrical behaviour (voltages, the output
// cell initialisation that real MAGIC needs) is abstracted into a direct write of the
// result; the cells are not reset (a crossbar keeps whatever was written); when several
// requests hit the same cell in one cycle the column write wins over the row write,
// which wins over the NOR.
module magic_mat
  import imc_pkg::*;
#(
  parameter int unsigned ROWS = MAT_ROWS,
  parameter int unsigned COLS = MAT_COLS
) (
  input  logic            clk,
  input  logic            rst_n,   // resets only the read-valid flag, not the cells
  // MAGIC NOR/INV (from the column driver)
  input  logic            nor_en,
  input  logic [COLS-1:0] in_mask,
  input  logic [COLS-1:0] out_mask,
  // wordline access (from the row driver)
  input  logic            row_wr_en,
  input  logic            row_rd_en,
  input  idx_t            row_idx,
  input  logic [COLS-1:0] wr_data,
  input  logic [COLS-1:0] wr_mask,
  output logic            rd_valid,
  output logic [COLS-1:0] rd_data,
  // column transfer (row-parallel copy)
  input  idx_t            col_rd_idx,
  output logic [ROWS-1:0] col_rd_data,
  input  logic            col_wr_en,
  input  idx_t            col_wr_idx,
  input  logic [ROWS-1:0] col_wr_data
);

  logic [COLS-1:0] cells [ROWS];

  always_ff @(posedge clk) begin
    for (int r = 0; r < ROWS; r++) begin
      if (nor_en) begin
        if ((cells[r] & in_mask) == '0) cells[r] <= cells[r] | out_mask;
        else                            cells[r] <= cells[r] & ~out_mask;
      end
    end
    if (row_wr_en) cells[row_idx] <= (cells[row_idx] & ~wr_mask) | (wr_data & wr_mask);
    if (col_wr_en) begin
      for (int r = 0; r < ROWS; r++) cells[r][col_wr_idx] <= col_wr_data[r];
    end
  end

  // Sense amplifiers: latch the selected wordline.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_valid <= 1'b0;
    else        rd_valid <= row_rd_en;
  end

  always_ff @(posedge clk) begin
    if (row_rd_en) rd_data <= cells[row_idx];
  end

  always_comb begin
    for (int r = 0; r < ROWS; r++) col_rd_data[r] = cells[r][col_rd_idx];
  end

  // An output column must be grounded alone and must not also be an input.
  a_out_not_input: assert property (@(posedge clk) nor_en |-> ((in_mask & out_mask) == '0));
  a_one_output:    assert property (@(posedge clk) nor_en |-> $onehot(out_mask));

endmodule
