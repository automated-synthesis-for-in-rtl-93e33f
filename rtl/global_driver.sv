// global_driver: bank-level driver that feeds the micro-operations to the mats.
//
// Two sources compete for the mats of a bank: the kernel sequencer, whose
// micro-operations go to every mat of the bank at once, and the host, which writes or
// reads one wordline of one mat. The kernel has priority: while kernel_busy is high the
// host is stalled (host_ready low) and must hold its request. The chosen operation is
// registered and presented to the mats one cycle later as mat_valid (one bit per mat),
// mop and the write data. The registered host data and mask are held when no host
// request is taken.
//
// Follows the document: a global driver per bank steers the mats. This design's own
// choices: everything about the arbitration, the one-cycle register stage and the
// per-mat valid vector.
module global_driver
  import imc_pkg::*;
#(
  parameter int unsigned MATS = 4,
  parameter int unsigned COLS = MAT_COLS
) (
  input  logic            clk,
  input  logic            rst_n,
  // kernel side (broadcast)
  input  logic            kernel_busy,
  input  logic            kernel_valid,
  input  mop_t            kernel_mop,
  // host side (one mat)
  input  logic            host_valid,
  output logic            host_ready,
  input  mop_t            host_mop,
  input  idx_t            host_mat,
  input  logic [COLS-1:0] host_wdata,
  input  logic [COLS-1:0] host_wmask,
  // to the mats
  output logic [MATS-1:0] mat_valid,
  output mop_t            mop,
  output logic [COLS-1:0] wdata,
  output logic [COLS-1:0] wmask
);

  assign host_ready = !kernel_busy && !kernel_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mat_valid <= '0;
      mop       <= MOP_IDLE;
    end else if (kernel_valid) begin
      mat_valid <= '1;
      mop       <= kernel_mop;
    end else if (host_valid && host_ready) begin
      for (int m = 0; m < MATS; m++) mat_valid[m] <= (host_mat == idx_t'(m));
      mop       <= host_mop;
    end else begin
      mat_valid <= '0;
    end
  end

  always_ff @(posedge clk) begin
    if (host_valid && host_ready) begin
      wdata <= host_wdata;
      wmask <= host_wmask;
    end
  end

endmodule
