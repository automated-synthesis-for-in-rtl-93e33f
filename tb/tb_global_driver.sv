// tb_global_driver: self-checking test of the bank-level driver.
//
// Random kernel and host traffic is applied. A kernel operation must reach all mats one
// cycle later; a host operation must reach only its mat, and only when the kernel is
// idle; the host must be stalled while the kernel is busy or issuing.
module tb_global_driver;
  import imc_pkg::*;

  localparam int MATS = 4;
  localparam int COLS = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            kernel_busy, kernel_valid, host_valid, host_ready;
  mop_t            kernel_mop, host_mop, mop;
  idx_t            host_mat;
  logic [COLS-1:0] host_wdata, host_wmask, wdata, wmask;
  logic [MATS-1:0] mat_valid;

  global_driver #(.MATS(MATS), .COLS(COLS)) dut (.*);

  int checks = 0, failures = 0, n_stall = 0, n_host = 0, n_kernel = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MATS-1:0] exp_valid;
    mop_t            exp_mop;
    logic [COLS-1:0] exp_wdata, exp_wmask;
    bit              host_taken;
    kernel_busy = 0; kernel_valid = 0; kernel_mop = MOP_IDLE; host_valid = 0;
    host_mop = MOP_IDLE; host_mat = '0; host_wdata = '0; host_wmask = '0;
    exp_valid = '0; exp_mop = MOP_IDLE; host_taken = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      checks++;
      if (mat_valid !== exp_valid || (exp_valid != '0 && mop !== exp_mop) ||
          (host_taken && (wdata !== exp_wdata || wmask !== exp_wmask))) begin
        failures++;
        $display("FAIL at %0d: valid=%b exp %b", it, mat_valid, exp_valid);
      end
      kernel_busy  = ($urandom_range(2) == 0);
      kernel_valid = kernel_busy && ($urandom_range(1) == 0);
      kernel_mop   = mk_nor(2, $urandom_range(255), $urandom_range(255), 0, $urandom_range(255));
      host_valid   = ($urandom_range(1) == 0);
      host_mop     = MOP_IDLE;
      host_mop.op  = ($urandom_range(1) == 0) ? MOP_WRITE : MOP_READ;
      host_mop.row = idx_t'($urandom);
      host_mat     = idx_t'($urandom_range(MATS - 1));
      for (int w = 0; w < COLS / 32; w++) begin
        host_wdata[w*32 +: 32] = $urandom;
        host_wmask[w*32 +: 32] = $urandom;
      end
      #1;
      checks++;
      if (host_ready !== !(kernel_busy || kernel_valid)) begin
        failures++;
        $display("FAIL host_ready at %0d", it);
      end
      if (host_valid && !host_ready) n_stall++;
      host_taken = 0;
      if (kernel_valid) begin
        exp_valid = '1; exp_mop = kernel_mop; n_kernel++;
      end else if (host_valid && host_ready) begin
        exp_valid = '0; exp_valid[host_mat] = 1'b1; exp_mop = host_mop;
        exp_wdata = host_wdata; exp_wmask = host_wmask; host_taken = 1; n_host++;
      end else begin
        exp_valid = '0;
      end
    end
    checks++;
    if (n_stall == 0 || n_host == 0 || n_kernel == 0) failures++;
    $display("stalls=%0d host=%0d kernel=%0d", n_stall, n_host, n_kernel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
