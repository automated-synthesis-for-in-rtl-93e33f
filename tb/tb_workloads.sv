// tb_workloads: runs the arithmetic kernels whose sizes the evaluation uses on a small
// chip (1 bank x 2 mats of 256x256 cells, full-size kernel memory).
//
// For each configuration every wordline of both mats receives its own random operands,
// the kernel is stored and run, and every wordline's result is compared with the
// product or dot product computed in the testbench:
//   fixed-point multiplication of 8, 16 and 32 bits;
//   dot products of 8-bit operands with 2, 8 and 12 terms, of 16-bit operands with
//   3 terms, and of 32-bit operands with 1 term.
// The operation and cycle counts of each kernel are checked and printed; they are the
// counts of the simple row-wise kernels generated here, not of an optimised library.
module tb_workloads;
  import imc_pkg::*;
  import mul_kernel_pkg::*;

  localparam int BANKS = 1, MATS = 2, ROWS = 256, COLS = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            req_valid, req_ready, rd_valid, busy, done, err;
  host_req_t       req;
  logic [COLS-1:0] wdata, wmask, rd_data;
  logic [15:0]     last_steps;
  logic [16:0]     last_cycles;

  imc_chip #(.BANKS(BANKS), .MATS(MATS), .ROWS(ROWS), .COLS(COLS)) dut (.*);

  logic [COLS-1:0] img [MATS][ROWS];
  int checks = 0, failures = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic send(input host_req_t r, input logic [COLS-1:0] d);
    req_valid = 1; req = r; wdata = d; wmask = '1;
    #1;
    while (!req_ready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    req_valid = 0; req.cmd = HC_NONE;
  endtask

  function automatic logic [127:0] ref_of(input logic [COLS-1:0] row, input int n, input int v);
    logic [127:0] s = 0, a, b;
    for (int k = 0; k < v; k++) begin
      a = 0; b = 0;
      for (int i = 0; i < n; i++) begin
        a[i] = row[2*n*k + i];
        b[i] = row[2*n*k + n + i];
      end
      s += a * b;
    end
    return s;
  endfunction

  task automatic run_cfg(input int n, input int v, input bit is_mul);
    mop_t q[$];
    host_req_t r;
    logic [COLS-1:0] d;
    logic [127:0] got;
    int len, w;
    w = is_mul ? 2 * n : lay_w(n, v);
    for (int m = 0; m < MATS; m++)
      for (int row = 0; row < ROWS; row++) begin
        for (int k = 0; k < COLS / 32; k++) d[k*32 +: 32] = $urandom;
        if (row == 0) for (int k = 0; k < 2*n*v; k++) d[k] = 1'b1;  // largest result
        img[m][row] = d;
        r = '0; r.cmd = HC_WRITE; r.mat = idx_t'(m); r.row = idx_t'(row);
        send(r, d);
      end
    if (is_mul) gen_mul(n, q); else gen_dot(n, v, q);
    len = q.size();
    check(len <= 16384, "kernel fits the kernel memory");
    foreach (q[i]) begin
      r = '0; r.cmd = HC_PROG; r.addr = 16'(i); r.mop = q[i];
      send(r, '0);
    end
    r = '0; r.cmd = HC_RUN; r.addr = 16'd0; r.len = 16'(len);
    send(r, '0);
    while (busy) @(negedge clk);
    check(last_steps == 16'(len) && last_cycles == 17'(len + 1), "operation and cycle count");
    for (int m = 0; m < MATS; m++)
      for (int row = 0; row < ROWS; row++) begin
        r = '0; r.cmd = HC_READ; r.mat = idx_t'(m); r.row = idx_t'(row);
        send(r, '0);
        while (!rd_valid) @(negedge clk);
        got = 0;
        for (int k = 0; k < w; k++) got[k] = rd_data[lay_out(n, is_mul ? 1 : v) + k];
        check(got == ref_of(img[m][row], n, v),
              $sformatf("n=%0d v=%0d mat %0d row %0d got %0h exp %0h", n, v, m, row, got,
                        ref_of(img[m][row], n, v)));
      end
    $display("%s n=%0d terms=%0d: %0d NOR/INV operations, %0d cycles, wordline cells used %0d of %0d",
             is_mul ? "multiplication" : "dot product", n, v, len, last_cycles,
             lay_rx(n, is_mul ? 1 : v), COLS);
  endtask

  initial begin
    req_valid = 0; req = '0; wdata = '0; wmask = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_cfg(8, 1, 1);
    run_cfg(16, 1, 1);
    run_cfg(32, 1, 1);
    run_cfg(8, 2, 0);
    run_cfg(8, 8, 0);
    run_cfg(8, 12, 0);
    run_cfg(16, 3, 0);
    run_cfg(32, 1, 0);
    check(!err, "no illegal operation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
