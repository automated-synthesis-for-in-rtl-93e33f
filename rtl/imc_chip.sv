// imc_chip: one in-memory computing chip.
//
// The chip holds BANKS banks of crossbar mats and one kernel sequencer. A kernel is
// stored once (HC_PROG) and run (HC_RUN) on every mat of every bank in lockstep, so
// each wordline of each mat executes the same NOR/INV netlist on its own operands.
// Host wordline writes and reads (HC_WRITE/HC_READ) go to one mat of one bank. The
// request interface is valid/ready: req_ready is low while a kernel runs (wordline
// accesses and a second HC_RUN wait; HC_PROG is always accepted). Read data comes back
// on rd_valid/rd_data two cycles after the read was accepted. done pulses when a kernel
// finishes; last_steps and last_cycles report its operation count and cycle count.
//
// Follows the document: chips contain banks of crossbar mats that execute the same
// kernel netlist in all rows in parallel. This design's own choices: the number of
// banks (2; the document gives none), a single sequencer per chip shared by the banks,
// and the command set.
module imc_chip
  import imc_pkg::*;
#(
  parameter int unsigned BANKS  = 2,
  parameter int unsigned MATS   = 4,
  parameter int unsigned ROWS   = MAT_ROWS,
  parameter int unsigned COLS   = MAT_COLS,
  parameter int unsigned KDEPTH = 16384
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            req_valid,
  output logic            req_ready,
  input  host_req_t       req,
  input  logic [COLS-1:0] wdata,
  input  logic [COLS-1:0] wmask,
  output logic            rd_valid,
  output logic [COLS-1:0] rd_data,
  output logic            busy,
  output logic            done,
  output logic [15:0]     last_steps,
  output logic [16:0]     last_cycles,
  output logic            err
);

  logic k_valid;
  mop_t k_mop;
  logic seq_start;

  assign seq_start = req_valid && req_ready && (req.cmd == HC_RUN);

  kernel_sequencer #(.DEPTH(KDEPTH)) u_seq (
    .clk, .rst_n,
    .prog_we(req_valid && (req.cmd == HC_PROG)), .prog_addr(req.addr), .prog_data(req.mop),
    .start(seq_start), .base(req.addr), .len(req.len),
    .busy, .done, .last_steps, .last_cycles,
    .mop_valid(k_valid), .mop(k_mop)
  );

  // Host wordline access as a micro-operation.
  mop_t h_mop;
  always_comb begin
    h_mop     = MOP_IDLE;
    h_mop.op  = (req.cmd == HC_WRITE) ? MOP_WRITE : MOP_READ;
    h_mop.row = req.row;
  end

  logic             h_access;
  logic [BANKS-1:0] b_ready, b_rd_valid, b_err;
  logic [COLS-1:0]  b_rd_data [BANKS];

  assign h_access = req_valid && (req.cmd == HC_WRITE || req.cmd == HC_READ);

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    imc_bank #(.MATS(MATS), .ROWS(ROWS), .COLS(COLS)) u_bank (
      .clk, .rst_n,
      .kernel_busy(busy), .kernel_valid(k_valid), .kernel_mop(k_mop),
      .host_valid(h_access && (req.bank == idx_t'(b))), .host_ready(b_ready[b]),
      .host_mop(h_mop), .host_mat(req.mat), .host_wdata(wdata), .host_wmask(wmask),
      .rd_valid(b_rd_valid[b]), .rd_data(b_rd_data[b]), .err(b_err[b])
    );
  end

  always_comb begin
    case (req.cmd)
      HC_PROG:           req_ready = 1'b1;
      HC_RUN:            req_ready = !busy;
      HC_WRITE, HC_READ: req_ready = &b_ready;
      default:           req_ready = 1'b1;
    endcase
  end

  always_comb begin
    rd_data = '0;
    for (int b = 0; b < BANKS; b++) if (b_rd_valid[b]) rd_data |= b_rd_data[b];
  end
  assign rd_valid = |b_rd_valid;
  assign err      = |b_err;

endmodule
