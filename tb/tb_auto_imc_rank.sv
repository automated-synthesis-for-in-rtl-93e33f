// tb_auto_imc_rank: end-to-end test of the whole rank at its default size
// (8 chips x 2 banks x 4 mats of 256x256 cells).
//
// Every wordline of every mat gets random background data, then (by a masked write)
// its own pair of 8-bit operands. An 8-bit multiplication kernel made of NOR/INV
// operations, followed by copies of the 16 product columns into the neighbouring mat
// and one illegal NOR, is stored and run on all chips at once. Every wordline is then
// read back and compared with a*b, with the neighbour's product in the copy area, and
// with the untouched background elsewhere. Also checked: the kernel's operation and
// cycle counts (len, len + copies + 1), that host requests and a second run are stalled
// while the kernel runs, and that the illegal operation is flagged. Each of these
// mechanisms is counted and must occur.
module tb_auto_imc_rank;
  import imc_pkg::*;
  import mul_kernel_pkg::*;

  localparam int CHIPS = 8, BANKS = 2, MATS = 4, ROWS = 256, COLS = 256;
  localparam int N = 8;
  localparam int NMAT = CHIPS * BANKS * MATS;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             req_valid, req_ready, rd_valid, busy, err;
  host_req_t        req;
  logic [COLS-1:0]  wdata, wmask, rd_data;
  logic [CHIPS-1:0] done;
  logic [15:0]      last_steps  [CHIPS];
  logic [16:0]      last_cycles [CHIPS];

  auto_imc_rank dut (.*);

  logic [COLS-1:0] bg   [NMAT][ROWS];
  logic [N-1:0]    opa  [NMAT][ROWS];
  logic [N-1:0]    opb  [NMAT][ROWS];

  int checks = 0, failures = 0;
  int n_stall_host = 0, n_stall_run = 0, n_err = 0, n_done = 0, n_bcast = 0;
  int n_masked = 0, n_read = 0, n_copy = 0, n_inv = 0, n_nor2 = 0, n_nor3 = 0;

  always @(posedge clk) begin
    if (rst_n && err) n_err++;
    if (rst_n) n_done += $countones(done);
  end

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

  function automatic int mat_id(int c, int b, int m);
    return (c * BANKS + b) * MATS + m;
  endfunction

  task automatic send(input host_req_t r, input logic [COLS-1:0] d,
                      input logic [COLS-1:0] mk);
    // driven after a falling edge; taken at the next rising edge where req_ready is high
    req_valid = 1; req = r; wdata = d; wmask = mk;
    #1;
    while (!req_ready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    req_valid = 0; req.cmd = HC_NONE;
  endtask

  function automatic host_req_t blank();
    host_req_t r;
    r = '0;
    r.cmd = HC_NONE;
    r.mop = MOP_IDLE;
    return r;
  endfunction

  initial begin
    mop_t q[$];
    host_req_t r;
    logic [COLS-1:0] d, exp_row, chk;
    logic [2*N-1:0] p;
    int id, ncopy, len, t0, cyc;
    req_valid = 0; req = blank(); wdata = '0; wmask = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- load every wordline: background, then operands by masked write
    for (int c = 0; c < CHIPS; c++)
      for (int b = 0; b < BANKS; b++)
        for (int m = 0; m < MATS; m++)
          for (int row = 0; row < ROWS; row++) begin
            id = mat_id(c, b, m);
            for (int w = 0; w < COLS / 32; w++) d[w*32 +: 32] = $urandom;
            bg[id][row] = d;
            opa[id][row] = N'($urandom);
            opb[id][row] = N'($urandom);
            r = blank(); r.cmd = HC_WRITE; r.chip = idx_t'(c); r.bank = idx_t'(b);
            r.mat = idx_t'(m); r.row = idx_t'(row);
            send(r, d, '1);
            d = '0;
            d[N-1:0] = opa[id][row];
            d[2*N-1:N] = opb[id][row];
            send(r, d, {{(COLS-2*N){1'b0}}, {(2*N){1'b1}}});
            bg[id][row][2*N-1:0] = d[2*N-1:0];
            n_masked++;
          end

    // ---- kernel: multiplication, copies to the neighbour, one illegal NOR
    gen_mul(N, q);
    gen_copy(N, 1, q);
    q.push_back(mk_nor(2, 2, 3, 0, 3));
    len = q.size();
    ncopy = 0;
    foreach (q[i]) begin
      if (q[i].op == MOP_COPY) n_copy++;
      if (q[i].op == MOP_COPY) ncopy++;
      else if (q[i].n_in == 1) n_inv++;
      else if (q[i].n_in == 2) n_nor2++;
      else n_nor3++;
    end
    for (int i = 0; i < len; i++) begin
      r = blank(); r.cmd = HC_PROG; r.bcast = 1; r.addr = 16'(100 + i); r.mop = q[i];
      send(r, '0, '0);
    end
    n_bcast++;

    r = blank(); r.cmd = HC_RUN; r.bcast = 1; r.addr = 16'd100; r.len = 16'(len);
    send(r, '0, '0);
    n_bcast++;
    t0 = $time;
    check(busy, "busy after run");
    // a wordline write and a second run must both wait
    req_valid = 1; req = blank(); req.cmd = HC_WRITE; req.chip = 8'd3;
    #1;
    if (!req_ready) n_stall_host++;
    check(!req_ready, "host write stalled during kernel");
    req.cmd = HC_RUN; req.bcast = 1;
    #1;
    if (!req_ready) n_stall_run++;
    check(!req_ready, "second run stalled during kernel");
    req_valid = 0; req = blank();
    while (busy) @(negedge clk);
    cyc = 0;
    for (int c = 0; c < CHIPS; c++) begin
      check(last_steps[c] == 16'(len), $sformatf("chip %0d steps %0d", c, last_steps[c]));
      check(last_cycles[c] == 17'(len + ncopy + 1),
            $sformatf("chip %0d cycles %0d exp %0d", c, last_cycles[c], len + ncopy + 1));
    end
    $display("kernel: %0d micro-operations (%0d NOR/INV for the %0d-bit product), %0d cycles",
             len, len - ncopy - 1, N, last_cycles[0]);
    repeat (3) @(negedge clk);

    // ---- read back and compare
    for (int c = 0; c < CHIPS; c++)
      for (int b = 0; b < BANKS; b++)
        for (int m = 0; m < MATS; m++)
          for (int row = 0; row < ROWS; row++) begin
            id = mat_id(c, b, m);
            r = blank(); r.cmd = HC_READ; r.chip = idx_t'(c); r.bank = idx_t'(b);
            r.mat = idx_t'(m); r.row = idx_t'(row);
            send(r, '0, '0);
            while (!rd_valid) @(negedge clk);
            n_read++;
            exp_row = bg[id][row];
            p = opa[id][row] * opb[id][row];
            exp_row[lay_out(N, 1) +: 2*N] = p;
            if (m > 0) exp_row[lay_rx(N, 1) +: 2*N] = opa[id-1][row] * opb[id-1][row];
            chk = '1;
            for (int k = lay_pp(N, 1); k < lay_out(N, 1); k++) chk[k] = 1'b0;   // scratch cells
            check((rd_data & chk) == (exp_row & chk),
                  $sformatf("chip %0d bank %0d mat %0d row %0d: %0d*%0d got %0d", c, b, m,
                            row, opa[id][row], opb[id][row], rd_data[lay_out(N, 1) +: 2*N]));
          end

    // ---- mechanisms
    check(n_err == 1, $sformatf("illegal NOR flagged in %0d cycles", n_err));
    check(n_done == CHIPS, "done pulses");
    check(n_stall_host > 0 && n_stall_run > 0 && n_bcast > 0 && n_masked > 0 && n_read > 0 &&
          n_copy > 0 && n_inv > 0 && n_nor2 > 0 && n_nor3 > 0, "mechanism coverage");
    $display("host stalls=%0d run stalls=%0d broadcasts=%0d masked writes=%0d reads=%0d",
             n_stall_host, n_stall_run, n_bcast, n_masked, n_read);
    $display("copies=%0d INV=%0d NOR2=%0d NOR3=%0d illegal flagged=%0d done=%0d",
             n_copy, n_inv, n_nor2, n_nor3, n_err, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
