// tb_magic_mat: self-checking test of the crossbar mat model.
//
// Random sequences of wordline writes (masked), NOR2/NOR3/INV operations between random
// columns, whole-column writes and wordline reads are applied to a 256x256 mat. A
// reference copy of the cells in the testbench is updated bit by bit from the column
// indices (not from the masks the mat sees). Every read is compared one cycle later,
// and the column read port is compared every cycle.
module tb_magic_mat;
  import imc_pkg::*;

  localparam int ROWS = 256;
  localparam int COLS = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            nor_en, row_wr_en, row_rd_en, col_wr_en, rd_valid;
  logic [COLS-1:0] in_mask, out_mask, wr_data, wr_mask, rd_data;
  idx_t            row_idx, col_rd_idx, col_wr_idx;
  logic [ROWS-1:0] col_rd_data, col_wr_data;

  magic_mat #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  bit [COLS-1:0] model [ROWS];
  int checks = 0, failures = 0;
  int n_nor = 0, n_inv = 0, n_rd = 0, n_colwr = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    nor_en = 0; row_wr_en = 0; row_rd_en = 0; col_wr_en = 0;
    in_mask = '0; out_mask = '0;
  endtask

  initial begin
    int a, b, c, o, n, r;
    bit v;
    bit [COLS-1:0] exp_rd;
    bit exp_pending;
    idle();
    wr_data = '0; wr_mask = '0; row_idx = '0; col_rd_idx = '0; col_wr_idx = '0;
    col_wr_data = '0;
    exp_pending = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // fill every wordline
    for (r = 0; r < ROWS; r++) begin
      @(negedge clk);
      idle();
      row_wr_en = 1; row_idx = idx_t'(r);
      for (int w = 0; w < COLS / 32; w++) wr_data[w*32 +: 32] = $urandom;
      wr_mask = '1;
      model[r] = wr_data;
    end
    @(negedge clk); idle();
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      // check the read issued in the previous cycle
      if (exp_pending) begin
        checks++;
        if (!rd_valid || rd_data !== exp_rd) begin
          failures++;
          $display("read mismatch at iteration %0d", it);
        end
      end
      exp_pending = 0;
      // column read port against the model
      col_rd_idx = idx_t'($urandom_range(COLS - 1));
      #1;
      for (r = 0; r < ROWS; r++) begin
        if (col_rd_data[r] !== model[r][col_rd_idx]) begin
          failures++;
          $display("column read mismatch row %0d col %0d", r, col_rd_idx);
          break;
        end
      end
      checks++;
      idle();
      case ($urandom_range(3))
        0: begin  // NOR / INV
          n = $urandom_range(1, 3);
          a = $urandom_range(COLS - 1);
          do b = $urandom_range(COLS - 1); while (b == a);
          do c = $urandom_range(COLS - 1); while (c == a || c == b);
          do o = $urandom_range(COLS - 1); while (o == a || (n > 1 && o == b) || (n > 2 && o == c));
          nor_en = 1;
          in_mask[a] = 1'b1;
          if (n > 1) in_mask[b] = 1'b1;
          if (n > 2) in_mask[c] = 1'b1;
          out_mask[o] = 1'b1;
          for (r = 0; r < ROWS; r++) begin
            v = model[r][a];
            if (n > 1) v = v | model[r][b];
            if (n > 2) v = v | model[r][c];
            model[r][o] = ~v;
          end
          if (n == 1) n_inv++; else n_nor++;
        end
        1: begin  // masked wordline write
          r = $urandom_range(ROWS - 1);
          row_wr_en = 1; row_idx = idx_t'(r);
          for (int w = 0; w < COLS / 32; w++) begin
            wr_data[w*32 +: 32] = $urandom;
            wr_mask[w*32 +: 32] = $urandom;
          end
          for (int k = 0; k < COLS; k++) if (wr_mask[k]) model[r][k] = wr_data[k];
        end
        2: begin  // wordline read
          r = $urandom_range(ROWS - 1);
          row_rd_en = 1; row_idx = idx_t'(r);
          exp_rd = model[r];
          exp_pending = 1;
          n_rd++;
        end
        default: begin  // column write
          o = $urandom_range(COLS - 1);
          col_wr_en = 1; col_wr_idx = idx_t'(o);
          for (int w = 0; w < ROWS / 32; w++) col_wr_data[w*32 +: 32] = $urandom;
          for (r = 0; r < ROWS; r++) model[r][o] = col_wr_data[r];
          n_colwr++;
        end
      endcase
    end
    @(negedge clk); idle();
    // final sweep of every wordline
    for (r = 0; r < ROWS; r++) begin
      @(negedge clk);
      idle(); row_rd_en = 1; row_idx = idx_t'(r);
      @(negedge clk);
      idle();
      checks++;
      if (!rd_valid || rd_data !== model[r]) begin
        failures++;
        $display("final read mismatch row %0d", r);
      end
    end
    if (n_nor == 0 || n_inv == 0 || n_rd == 0 || n_colwr == 0) failures++;
    $display("NOR=%0d INV=%0d reads=%0d column writes=%0d", n_nor, n_inv, n_rd, n_colwr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
