// tb_imc_chip: self-checking test of one chip (2 banks x 2 mats of 256x256 cells).
//
// Every wordline of every mat gets its own two pairs of 8-bit operands. A two-term dot
// product kernel (a0*b0 + a1*b1, 17-bit result) followed by copies of the result columns
// into the neighbouring mat is stored and run. Every wordline is read back and checked;
// the kernel's operation and cycle counts, the done pulse and the stalling of host
// requests during the run are checked as well.
module tb_imc_chip;
  import imc_pkg::*;
  import mul_kernel_pkg::*;

  localparam int BANKS = 2, MATS = 2, ROWS = 256, COLS = 256, KDEPTH = 4096;
  localparam int N = 8, V = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            req_valid, req_ready, rd_valid, busy, done, err;
  host_req_t       req;
  logic [COLS-1:0] wdata, wmask, rd_data;
  logic [15:0]     last_steps;
  logic [16:0]     last_cycles;

  imc_chip #(.BANKS(BANKS), .MATS(MATS), .ROWS(ROWS), .COLS(COLS), .KDEPTH(KDEPTH)) dut (.*);

  logic [COLS-1:0] img [BANKS*MATS][ROWS];
  int checks = 0, failures = 0, n_done = 0, n_stall = 0;

  always @(posedge clk) if (rst_n && done) n_done++;

  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic logic [31:0] dot_of(input logic [COLS-1:0] row);
    logic [31:0] s = 0;
    for (int k = 0; k < V; k++) s += row[2*N*k +: N] * row[2*N*k + N +: N];
    return s;
  endfunction

  initial begin
    mop_t q[$];
    host_req_t r;
    logic [COLS-1:0] d;
    int len, ncopy, id, w;
    req_valid = 0; req = '0; wdata = '0; wmask = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < BANKS; b++)
      for (int m = 0; m < MATS; m++)
        for (int row = 0; row < ROWS; row++) begin
          for (int k = 0; k < COLS / 32; k++) d[k*32 +: 32] = $urandom;
          img[b*MATS+m][row] = d;
          r = '0; r.cmd = HC_WRITE; r.bank = idx_t'(b); r.mat = idx_t'(m); r.row = idx_t'(row);
          send(r, d);
        end
    gen_dot(N, V, q);
    gen_copy(N, V, q);
    len = q.size();
    ncopy = 0;
    foreach (q[i]) if (q[i].op == MOP_COPY) ncopy++;
    foreach (q[i]) begin
      r = '0; r.cmd = HC_PROG; r.addr = 16'(i); r.mop = q[i];
      send(r, '0);
    end
    r = '0; r.cmd = HC_RUN; r.addr = 16'd0; r.len = 16'(len);
    send(r, '0);
    req_valid = 1; req = '0; req.cmd = HC_READ;
    #1;
    check(!req_ready, "read stalled during the kernel");
    if (!req_ready) n_stall++;
    req_valid = 0; req.cmd = HC_NONE;
    while (busy) @(negedge clk);
    check(last_steps == 16'(len), "step count");
    check(last_cycles == 17'(len + ncopy + 1), $sformatf("cycles %0d", last_cycles));
    w = lay_w(N, V);
    for (int b = 0; b < BANKS; b++)
      for (int m = 0; m < MATS; m++)
        for (int row = 0; row < ROWS; row++) begin
          id = b * MATS + m;
          r = '0; r.cmd = HC_READ; r.bank = idx_t'(b); r.mat = idx_t'(m); r.row = idx_t'(row);
          send(r, '0);
          while (!rd_valid) @(negedge clk);
          check(32'(rd_data[lay_out(N, V) +: 17]) == dot_of(img[id][row]),
                $sformatf("bank %0d mat %0d row %0d: got %0d exp %0d", b, m, row,
                          rd_data[lay_out(N, V) +: 17], dot_of(img[id][row])));
          if (m > 0)
            check(32'(rd_data[lay_rx(N, V) +: 17]) == dot_of(img[id-1][row]), "copied result");
          check(rd_data[0 +: 2*N*V] == img[id][row][0 +: 2*N*V], "operands kept");
        end
    check(n_done == 1 && n_stall == 1 && !err, "done pulse, stall, no error");
    $display("dot product kernel: %0d ops, %0d cycles", len, last_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
