// tb_kernel_sequencer: self-checking test of the kernel sequencer.
//
// A random kernel with NOR operations and COPYs is stored, then runs of various base
// addresses and lengths are started. The issued stream must equal the stored words in
// order, one per cycle, with exactly one idle cycle after every COPY; busy must cover
// the run, done must pulse once, and the counters must report len operations and
// len + copies + 1 cycles.
module tb_kernel_sequencer;
  import imc_pkg::*;

  localparam int DEPTH = 1024;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        prog_we, start, busy, done, mop_valid;
  logic [15:0] prog_addr, base, len, last_steps;
  logic [16:0] last_cycles;
  mop_t        prog_data, mop;

  kernel_sequencer #(.DEPTH(DEPTH)) dut (.*);

  mop_t image [DEPTH];
  int checks = 0, failures = 0, n_bubble = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b, l, ncopy, got, cyc, idle_after_copy;
    bit expect_bubble;
    prog_we = 0; start = 0; prog_addr = '0; base = '0; len = '0; prog_data = MOP_IDLE;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      image[a] = ($urandom_range(4) == 0) ? mk_copy($urandom_range(255), $urandom_range(255))
                 : mk_nor($urandom_range(1, 3), $urandom_range(255), $urandom_range(255),
                          $urandom_range(255), $urandom_range(255));
      prog_we = 1; prog_addr = 16'(a); prog_data = image[a];
      @(negedge clk);
    end
    prog_we = 0;
    for (int run = 0; run < 20; run++) begin
      b = $urandom_range(DEPTH / 2);
      l = (run == 0) ? 1 : $urandom_range(1, DEPTH / 2 - 1);
      ncopy = 0;
      for (int k = 0; k < l; k++) if (image[b + k].op == MOP_COPY) ncopy++;
      base = 16'(b); len = 16'(l); start = 1;
      @(negedge clk);
      start = 0;
      got = 0; cyc = 0; expect_bubble = 0; idle_after_copy = 0;
      check(busy, "busy after start");
      while (!done) begin
        cyc++;
        if (expect_bubble) begin
          check(!mop_valid, "bubble after copy");
          expect_bubble = 0;
          n_bubble++;
        end else if (mop_valid) begin
          check(mop == image[b + got], $sformatf("op %0d of run %0d", got, run));
          expect_bubble = (mop.op == MOP_COPY);
          got++;
        end
        if (cyc > 4 * DEPTH) break;
        @(negedge clk);
      end
      check(got == l, $sformatf("issued %0d of %0d", got, l));
      @(negedge clk);
      check(!busy && !done, "idle after done");
      check(last_steps == 16'(l), "last_steps");
      check(last_cycles == 17'(l + ncopy + 1), $sformatf("last_cycles %0d exp %0d",
                                                         last_cycles, l + ncopy + 1));
    end
    check(n_bubble > 0, "bubble coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
