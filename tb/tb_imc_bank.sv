// tb_imc_bank: self-checking test of one bank (two 256x256 mats).
//
// Both mats are loaded with random wordlines through the host path. A half adder
// (5 NOR/INV operations) on columns 0 and 1 is then run as a kernel in every wordline
// of both mats, the sum column of mat 0 is copied into column 20 of mat 1, and an
// illegal NOR (output equal to an input) is issued, which must raise err and change
// nothing. Every wordline of both mats is read back and compared with values computed
// in the testbench. A host request during the kernel must be stalled.
module tb_imc_bank;
  import imc_pkg::*;
  import mul_kernel_pkg::*;

  localparam int MATS = 2;
  localparam int ROWS = 256;
  localparam int COLS = 256;
  localparam int S_COL = 10, C_COL = 11, RX_COL = 20, FCT = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            kernel_busy, kernel_valid, host_valid, host_ready, rd_valid, err;
  mop_t            kernel_mop, host_mop;
  idx_t            host_mat;
  logic [COLS-1:0] host_wdata, host_wmask, rd_data;

  imc_bank #(.MATS(MATS), .ROWS(ROWS), .COLS(COLS)) dut (.*);

  logic [COLS-1:0] model [MATS][ROWS];
  int checks = 0, failures = 0, n_stall = 0, n_err = 0;

  always @(posedge clk) if (err) n_err++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_op(input mop_e op, input int m, input int r,
                         input logic [COLS-1:0] d, input logic [COLS-1:0] mk);
    host_valid = 1; host_mop = MOP_IDLE; host_mop.op = op; host_mop.row = idx_t'(r);
    host_mat = idx_t'(m); host_wdata = d; host_wmask = mk;
    do @(negedge clk); while (!host_ready);
    host_valid = 0;
  endtask

  task automatic kop(input mop_t m);
    kernel_valid = 1; kernel_mop = m;
    @(negedge clk);
    kernel_valid = 0;
  endtask

  initial begin
    mop_t q[$];
    logic [COLS-1:0] d;
    bit a, b;
    kernel_busy = 0; kernel_valid = 0; kernel_mop = MOP_IDLE;
    host_valid = 0; host_mop = MOP_IDLE; host_mat = '0; host_wdata = '0; host_wmask = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < MATS; m++)
      for (int r = 0; r < ROWS; r++) begin
        for (int w = 0; w < COLS / 32; w++) d[w*32 +: 32] = $urandom;
        model[m][r] = d;
        host_op(MOP_WRITE, m, r, d, '1);
      end
    // kernel: half adder, copy, illegal NOR
    half_add(q, FCT, 0, 1, S_COL, C_COL);
    q.push_back(mk_copy(S_COL, RX_COL));
    q.push_back(MOP_IDLE);                    // one idle cycle after the copy
    q.push_back(mk_nor(2, 3, 4, 0, 3));       // illegal: rejected
    kernel_busy = 1;
    // a host request during the kernel must wait
    host_valid = 1; host_mop = MOP_IDLE; host_mop.op = MOP_READ; host_mat = '0;
    #1;
    checks++;
    if (host_ready) begin failures++; $display("FAIL host not stalled"); end
    else n_stall++;
    host_valid = 0;
    foreach (q[i]) kop(q[i]);
    kernel_busy = 0;
    repeat (3) @(negedge clk);
    for (int m = 0; m < MATS; m++)
      for (int r = 0; r < ROWS; r++) begin
        a = model[m][r][0]; b = model[m][r][1];
        model[m][r][FCT+XA] = ~a; model[m][r][FCT+XB] = ~b; model[m][r][FCT+T1] = ~(a | b);
        model[m][r][S_COL] = a ^ b; model[m][r][C_COL] = a & b;
      end
    for (int r = 0; r < ROWS; r++) model[1][r][RX_COL] = model[0][r][S_COL];
    for (int m = 0; m < MATS; m++)
      for (int r = 0; r < ROWS; r++) begin
        host_op(MOP_READ, m, r, '0, '0);
        while (!rd_valid) @(negedge clk);
        checks++;
        if (rd_data !== model[m][r]) begin
          failures++;
          if (failures < 5) $display("FAIL mat %0d row %0d", m, r);
        end
      end
    checks++;
    if (n_err != 1) begin failures++; $display("FAIL err pulses %0d", n_err); end
    $display("stalls=%0d illegal=%0d", n_stall, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
