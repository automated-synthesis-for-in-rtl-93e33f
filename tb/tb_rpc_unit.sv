// tb_rpc_unit: self-checking test of the row-parallel copying unit.
//
// Random copy requests (some back to back) are issued. Each must appear on the
// destination write port exactly one cycle later with the column data and destination
// index captured at the request, and no write may appear without a request.
module tb_rpc_unit;
  import imc_pkg::*;

  localparam int ROWS = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            copy_en, dst_wr_en;
  idx_t            copy_dst, dst_wr_idx;
  logic [ROWS-1:0] src_col_data, dst_wr_data;

  rpc_unit #(.ROWS(ROWS)) dut (.*);

  int checks = 0, failures = 0, n_copy = 0, n_b2b = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit              prev_en;
    idx_t            prev_dst;
    logic [ROWS-1:0] prev_data;
    copy_en = 0; copy_dst = '0; src_col_data = '0;
    prev_en = 0; prev_dst = '0; prev_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      checks++;
      if (dst_wr_en !== prev_en || (prev_en && (dst_wr_idx !== prev_dst ||
                                                dst_wr_data !== prev_data))) begin
        failures++;
        $display("FAIL at %0d: en=%0d exp %0d", it, dst_wr_en, prev_en);
      end
      copy_en = ($urandom_range(2) != 0);
      if (copy_en && prev_en) n_b2b++;
      if (copy_en) n_copy++;
      copy_dst = idx_t'($urandom);
      for (int w = 0; w < ROWS / 32; w++) src_col_data[w*32 +: 32] = $urandom;
      prev_en = copy_en; prev_dst = copy_dst; prev_data = src_col_data;
    end
    checks++;
    if (n_copy == 0 || n_b2b == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
