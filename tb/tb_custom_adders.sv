// tb_custom_adders: small adder kernels on one chip (1 bank x 1 mat of 256x256 cells).
//
// Three kernels run in every wordline on random bits f0, f1, f2 (columns 0..2):
//   1. a two-bit adder (S, C = f0 + f1) built from 5 NOR/INV operations; it must take
//      exactly 5 issue cycles;
//   2. a three-bit addition covered by three two-bit adders in sequence
//      (S' C' = f0+f1; S C'' = S'+f2; C1 C2 = C'+C''), 15 operations; the extra carry C2
//      must be 0 in every wordline, since three bits never sum to more than 3;
//   3. a three-bit adder written directly as one full adder, 12 operations.
// Results are compared with the sums of the bits; the issue cycle counts are compared
// with the operation counts (kernel busy cycles = operations + 1).
module tb_custom_adders;
  import imc_pkg::*;
  import mul_kernel_pkg::*;

  localparam int BANKS = 1, MATS = 1, ROWS = 256, COLS = 256;
  localparam int T = 100;                       // scratch cells for the adders
  localparam int S1 = 10, C1 = 11;              // kernel 1 outputs
  localparam int SP = 20, CP = 21, S2 = 22, CPP = 23, K1 = 24, K2 = 25;   // kernel 2
  localparam int S3 = 30, C3 = 31;              // kernel 3 outputs

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            req_valid, req_ready, rd_valid, busy, done, err;
  host_req_t       req;
  logic [COLS-1:0] wdata, wmask, rd_data;
  logic [15:0]     last_steps;
  logic [16:0]     last_cycles;

  imc_chip #(.BANKS(BANKS), .MATS(MATS), .ROWS(ROWS), .COLS(COLS), .KDEPTH(256)) dut (.*);

  logic [2:0] f [ROWS];
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic run(input mop_t q[$], input int exp_ops, input string name);
    host_req_t r;
    foreach (q[i]) begin
      r = '0; r.cmd = HC_PROG; r.addr = 16'(i); r.mop = q[i];
      send(r, '0);
    end
    r = '0; r.cmd = HC_RUN; r.len = 16'(q.size());
    send(r, '0);
    while (busy) @(negedge clk);
    check(q.size() == exp_ops && last_steps == 16'(exp_ops) && last_cycles == 17'(exp_ops + 1),
          $sformatf("%s: %0d operations, %0d cycles", name, last_steps, last_cycles));
    $display("%s: %0d NOR/INV operations, issued in %0d cycles", name, last_steps,
             last_cycles - 1);
  endtask

  initial begin
    mop_t q1[$], q2[$], q3[$];
    host_req_t r;
    logic [COLS-1:0] d;
    int sum, c2_ones;
    req_valid = 0; req = '0; wdata = '0; wmask = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int row = 0; row < ROWS; row++) begin
      d = '0;
      f[row] = (row < 8) ? 3'(row) : 3'($urandom);
      d[2:0] = f[row];
      r = '0; r.cmd = HC_WRITE; r.row = idx_t'(row);
      send(r, d);
    end
    half_add(q1, T, 0, 1, S1, C1);
    run(q1, 5, "two-bit adder");
    half_add(q2, T, 0, 1, SP, CP);
    half_add(q2, T, SP, 2, S2, CPP);
    half_add(q2, T, CP, CPP, K1, K2);
    run(q2, 15, "three-bit addition from three two-bit adders");
    full_add(q3, T, 0, 1, 2, S3, C3);
    run(q3, 12, "three-bit adder");
    c2_ones = 0;
    for (int row = 0; row < ROWS; row++) begin
      r = '0; r.cmd = HC_READ; r.row = idx_t'(row);
      send(r, '0);
      while (!rd_valid) @(negedge clk);
      sum = f[row][0] + f[row][1] + f[row][2];
      check({rd_data[C1], rd_data[S1]} == 2'(f[row][0] + f[row][1]), "two-bit adder");
      check({rd_data[K2], rd_data[K1], rd_data[S2]} == 3'(sum), "three two-bit adders");
      check({rd_data[C3], rd_data[S3]} == 2'(sum), "three-bit adder");
      if (rd_data[K2]) c2_ones++;
    end
    check(c2_ones == 0, "the extra carry C2 is never 1");
    $display("rows where the extra carry was 1: %0d of %0d", c2_ones, ROWS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
