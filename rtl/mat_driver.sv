// mat_driver: the row driver and column driver of one crossbar mat.
//
// In MAGIC, a NOR is performed by applying the control voltage to the columns that
// hold the inputs and grounding the column that receives the result; an INV is the
// same with a single input column. This block turns one micro-operation into those
// per-column selections: in_mask marks the driven input columns, out_mask the grounded
// output column. For row writes and reads it selects the wordline; for a copy to the
// neighbouring mat it selects the column that the sense amplifiers present to the
// row-parallel copying unit. The decode is purely combinational; the mat acts on it at
// the next clock edge.
//
// Follows the document: NOR with up to three inputs and INV as the MAGIC operations,
// input columns driven and output column grounded, one operation for all rows at once.
// This design's own choices: the micro-operation encoding, and that an operation whose
// output column is one of its inputs, or whose input count is 0, is rejected (err=1)
// and not executed.
module mat_driver
  import imc_pkg::*;
#(
  parameter int unsigned COLS = MAT_COLS
) (
  input  logic            mop_valid,
  input  mop_t            mop,
  // column driver
  output logic            nor_en,       // perform NOR/INV in every row
  output logic [COLS-1:0] in_mask,      // columns under control voltage
  output logic [COLS-1:0] out_mask,     // grounded output column
  output logic            copy_en,      // present column copy_col to the RPC unit
  output idx_t            copy_col,
  output idx_t            copy_dst,
  // row driver
  output logic            row_wr_en,
  output logic            row_rd_en,
  output idx_t            row_idx,
  output logic            err
);

  logic legal_nor;

  always_comb begin
    in_mask  = '0;
    out_mask = '0;
    if (mop.n_in >= 2'd1) in_mask[mop.in0] = 1'b1;
    if (mop.n_in >= 2'd2) in_mask[mop.in1] = 1'b1;
    if (mop.n_in == 2'd3) in_mask[mop.in2] = 1'b1;
    out_mask[mop.out] = 1'b1;
    legal_nor = (mop.n_in != 2'd0) && ((in_mask & out_mask) == '0);
    if (!(mop_valid && mop.op == MOP_NOR && legal_nor)) begin
      in_mask  = '0;
      out_mask = '0;
    end
  end

  assign nor_en    = mop_valid && (mop.op == MOP_NOR) && legal_nor;
  assign err       = mop_valid && (mop.op == MOP_NOR) && !legal_nor;
  assign copy_en   = mop_valid && (mop.op == MOP_COPY);
  assign copy_col  = mop.in0;
  assign copy_dst  = mop.out;
  assign row_wr_en = mop_valid && (mop.op == MOP_WRITE);
  assign row_rd_en = mop_valid && (mop.op == MOP_READ);
  assign row_idx   = mop.row;

endmodule
