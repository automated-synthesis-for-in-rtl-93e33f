// auto_imc_rank: one rank of MAGIC in-memory computing chips (top level).
//
// Matrix-vector multiplication is decomposed offline into dot products, and each dot
// product into a netlist of NOR/INV operations that a memristor crossbar can execute
// on its own contents. This top holds CHIPS chips (8 per rank), each with banks of
// 256x256 crossbar mats. A host bus of 32 bytes (one wordline) carries four commands:
// HC_WRITE and HC_READ move one wordline of one mat, HC_PROG stores one micro-operation
// of a kernel, HC_RUN runs a stored kernel. HC_PROG and HC_RUN can be broadcast to all
// chips (bcast=1), so that every wordline of every mat in the rank runs the same kernel
// on its own operands, which is how the row-parallel MVM is executed. The bus is
// valid/ready; req_ready is low while the addressed chip (or, for a broadcast, any
// chip) cannot take the request. Reads return on rd_valid/rd_data two cycles after the
// request is accepted. busy is high while any chip runs a kernel; done[c] pulses when
// chip c finishes one.
//
// Follows the document: ranks of in-memory computing chips, a 32-byte bus, banks of
// 256x256 crossbar mats. This design's own choices: the chips are reached by a plain
// address decode (the on-DIMM network between the chips is only named in the document),
// and the command set.
module auto_imc_rank
  import imc_pkg::*;
#(
  parameter int unsigned CHIPS  = 8,
  parameter int unsigned BANKS  = 2,
  parameter int unsigned MATS   = 4,
  parameter int unsigned ROWS   = MAT_ROWS,
  parameter int unsigned COLS   = BUS_BYTES * 8,
  parameter int unsigned KDEPTH = 16384
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_valid,
  output logic             req_ready,
  input  host_req_t        req,
  input  logic [COLS-1:0]  wdata,
  input  logic [COLS-1:0]  wmask,
  output logic             rd_valid,
  output logic [COLS-1:0]  rd_data,
  output logic             busy,
  output logic [CHIPS-1:0] done,
  output logic [15:0]      last_steps  [CHIPS],
  output logic [16:0]      last_cycles [CHIPS],
  output logic             err
);

  logic [CHIPS-1:0] c_sel, c_ready, c_rd_valid, c_busy, c_err;
  logic [COLS-1:0]  c_rd_data [CHIPS];
  logic             is_bcast;

  assign is_bcast = req.bcast && (req.cmd == HC_PROG || req.cmd == HC_RUN);

  for (genvar c = 0; c < CHIPS; c++) begin : g_chip
    assign c_sel[c] = is_bcast || (req.chip == idx_t'(c));

    imc_chip #(.BANKS(BANKS), .MATS(MATS), .ROWS(ROWS), .COLS(COLS), .KDEPTH(KDEPTH)) u_chip (
      .clk, .rst_n,
      .req_valid(req_valid && req_ready && c_sel[c]), .req_ready(c_ready[c]), .req,
      .wdata, .wmask,
      .rd_valid(c_rd_valid[c]), .rd_data(c_rd_data[c]),
      .busy(c_busy[c]), .done(done[c]),
      .last_steps(last_steps[c]), .last_cycles(last_cycles[c]), .err(c_err[c])
    );
  end

  // Ready when every selected chip is ready (and at least one is selected).
  assign req_ready = (c_sel != '0) && ((c_ready | ~c_sel) == '1);

  always_comb begin
    rd_data = '0;
    for (int c = 0; c < CHIPS; c++) if (c_rd_valid[c]) rd_data |= c_rd_data[c];
  end
  assign rd_valid = |c_rd_valid;
  assign busy     = |c_busy;
  assign err      = |c_err;

endmodule
