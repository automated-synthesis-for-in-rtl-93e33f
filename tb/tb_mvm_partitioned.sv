// tb_mvm_partitioned: a matrix-vector product whose dot products are split over the
// mats of a bank and summed through the row-parallel copy chain.
//
// One bank of 4 mats (256x256 cells each) computes y = W x for a 256 x 8 matrix of
// 16-bit values. Wordline i of every mat holds row i of W; mat m holds columns 2m and
// 2m+1 of that row together with x[2m] and x[2m+1], so every part of one dot product
// sits at the same wordline index in neighbouring mats. The kernel, identical in all
// mats, is:
//   P   := two-term dot product of the mat's own operands (35-bit accumulator)
//   ACC := P + RX                       (RX is zero at the start)
//   3 times: copy ACC into RX of the right-hand neighbour, then ACC := P + RX
// After the three steps, ACC of mat m holds the sum of the partial dot products of
// mats 0..m, so ACC of mat 3 is y[i]. Every wordline of every mat is checked against
// that prefix sum, computed in the testbench, and the kernel's cycle count is checked.
module tb_mvm_partitioned;
  import imc_pkg::*;
  import mul_kernel_pkg::*;

  localparam int BANKS = 1, MATS = 4, ROWS = 256, COLS = 256;
  localparam int N = 16, V = 2, W = 35;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            req_valid, req_ready, rd_valid, busy, done, err;
  host_req_t       req;
  logic [COLS-1:0] wdata, wmask, rd_data;
  logic [15:0]     last_steps;
  logic [16:0]     last_cycles;

  imc_chip #(.BANKS(BANKS), .MATS(MATS), .ROWS(ROWS), .COLS(COLS)) dut (.*);

  logic [N-1:0] wm [ROWS][MATS*V];
  logic [N-1:0] xv [MATS*V];
  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
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

  initial begin
    mop_t q[$];
    host_req_t r;
    logic [COLS-1:0] d;
    logic [63:0] prefix, got;
    int p_col, rx_col, acc_col, t, len, ncopy;
    p_col   = lay_out(N, V);
    rx_col  = p_col + W;
    acc_col = rx_col + W;
    t       = lay_t(N, V);
    req_valid = 0; req = '0; wdata = '0; wmask = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < MATS * V; k++) xv[k] = N'($urandom);
    for (int i = 0; i < ROWS; i++)
      for (int k = 0; k < MATS * V; k++) wm[i][k] = (i == 0) ? '1 : N'($urandom);
    xv[0] = '1;  // row 0 with x[0] gives the largest products
    // load: operands, zero copy area
    for (int m = 0; m < MATS; m++)
      for (int i = 0; i < ROWS; i++) begin
        d = '0;
        for (int j = 0; j < V; j++) begin
          d[2*N*j +: N]     = wm[i][V*m + j];
          d[2*N*j + N +: N] = xv[V*m + j];
        end
        r = '0; r.cmd = HC_WRITE; r.mat = idx_t'(m); r.row = idx_t'(i);
        send(r, d);
      end
    // kernel
    gen_dot(N, V, q, W);
    gen_sum(q, t, p_col, rx_col, acc_col, W);
    for (int s = 0; s < MATS - 1; s++) begin
      for (int b = 0; b < W; b++) q.push_back(mk_copy(acc_col + b, rx_col + b));
      gen_sum(q, t, p_col, rx_col, acc_col, W);
    end
    len = q.size();
    ncopy = 0;
    foreach (q[i]) if (q[i].op == MOP_COPY) ncopy++;
    check(len <= 16384 && acc_col + W <= COLS, "kernel and layout fit");
    foreach (q[i]) begin
      r = '0; r.cmd = HC_PROG; r.addr = 16'(i); r.mop = q[i];
      send(r, '0);
    end
    r = '0; r.cmd = HC_RUN; r.len = 16'(len);
    send(r, '0);
    while (busy) @(negedge clk);
    check(last_steps == 16'(len) && last_cycles == 17'(len + ncopy + 1), "cycle count");
    for (int m = 0; m < MATS; m++)
      for (int i = 0; i < ROWS; i++) begin
        r = '0; r.cmd = HC_READ; r.mat = idx_t'(m); r.row = idx_t'(i);
        send(r, '0);
        while (!rd_valid) @(negedge clk);
        prefix = 0;
        for (int k = 0; k < V * (m + 1); k++) prefix += 64'(wm[i][k]) * 64'(xv[k]);
        got = 0;
        for (int b = 0; b < W; b++) got[b] = rd_data[acc_col + b];
        check(got == prefix, $sformatf("mat %0d row %0d: got %0h exp %0h", m, i, got, prefix));
      end
    $display("256 x %0d MVM, %0d-bit: %0d micro-operations (%0d copies), %0d cycles",
             MATS * V, N, len, ncopy, last_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
