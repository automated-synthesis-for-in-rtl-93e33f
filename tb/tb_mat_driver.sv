// tb_mat_driver: self-checking test of the row/column driver decode.
//
// Random micro-operations of every kind, including illegal NORs (no input, or the
// output column among the inputs), are applied. The expected driven and grounded
// columns are worked out from the operation fields column by column.
module tb_mat_driver;
  import imc_pkg::*;

  localparam int COLS = 256;

  logic            mop_valid, nor_en, copy_en, row_wr_en, row_rd_en, err;
  mop_t            mop;
  logic [COLS-1:0] in_mask, out_mask;
  idx_t            copy_col, copy_dst, row_idx;

  mat_driver #(.COLS(COLS)) dut (.*);

  int checks = 0, failures = 0, n_err = 0, n_nor = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: op=%0d n=%0d in=%0d,%0d,%0d out=%0d", what, mop.op, mop.n_in,
               mop.in0, mop.in1, mop.in2, mop.out);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit legal, exp_in, exp_out;
    for (int it = 0; it < 4000; it++) begin
      mop_valid = ($urandom_range(7) != 0);
      mop.op    = mop_e'($urandom_range(4));
      mop.n_in  = 2'($urandom_range(3));
      mop.in0   = idx_t'($urandom_range(15));
      mop.in1   = idx_t'($urandom_range(15));
      mop.in2   = idx_t'($urandom_range(15));
      mop.out   = idx_t'($urandom_range(15));
      mop.row   = idx_t'($urandom);
      #1;
      legal = (mop.n_in != 0) && (mop.out != mop.in0) &&
              !(mop.n_in >= 2 && mop.out == mop.in1) && !(mop.n_in == 3 && mop.out == mop.in2);
      check(nor_en == (mop_valid && mop.op == MOP_NOR && legal), "nor_en");
      check(err == (mop_valid && mop.op == MOP_NOR && !legal), "err");
      check(copy_en == (mop_valid && mop.op == MOP_COPY), "copy_en");
      check(row_wr_en == (mop_valid && mop.op == MOP_WRITE), "row_wr_en");
      check(row_rd_en == (mop_valid && mop.op == MOP_READ), "row_rd_en");
      if (row_wr_en || row_rd_en) check(row_idx == mop.row, "row_idx");
      if (copy_en) check(copy_col == mop.in0 && copy_dst == mop.out, "copy columns");
      for (int k = 0; k < COLS; k++) begin
        exp_in  = nor_en && ((k == mop.in0) || (mop.n_in >= 2 && k == mop.in1) ||
                             (mop.n_in == 3 && k == mop.in2));
        exp_out = nor_en && (k == mop.out);
        if (in_mask[k] != exp_in || out_mask[k] != exp_out) begin
          check(0, $sformatf("mask bit %0d", k));
          break;
        end
      end
      checks++;
      if (err) n_err++;
      if (nor_en) n_nor++;
    end
    check(n_err > 0 && n_nor > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
