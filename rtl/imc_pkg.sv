// imc_pkg: types and constants shared by the MAGIC in-memory computing blocks.
//
// The architecture is a hierarchy rank -> chips -> banks -> crossbar mats. Every mat
// is a 256x256 memristor crossbar (the size of the main configuration) that computes
// NOR and INV between its columns in all rows at once (MAGIC logic style). Work is
// expressed as a stream of micro-operations (mop_t): one NOR/INV, a column copy to the
// neighbouring mat, or a row write/read through the drivers and sense amplifiers.
// The crossbar size and the three-input limit of a NOR follow the document; the
// micro-operation encoding, the field widths and the host command set are this
// design's own choices.
package imc_pkg;

  // Crossbar mat geometry of the main configuration (256x256 crossbar mat).
  localparam int unsigned MAT_ROWS = 256;
  localparam int unsigned MAT_COLS = 256;
  // Host bus width: 32 bytes, exactly one wordline of a 256-column mat.
  localparam int unsigned BUS_BYTES = 32;

  // Index fields are 8 bits wide, enough for up to 256 rows/columns/mats/banks/chips.
  localparam int unsigned IDX_W = 8;
  typedef logic [IDX_W-1:0] idx_t;

  // Micro-operation kinds.
  typedef enum logic [2:0] {
    MOP_NOP   = 3'd0,  // nothing
    MOP_NOR   = 3'd1,  // out = NOR(in0..in[n_in-1]) in every row; n_in = 1 is INV
    MOP_COPY  = 3'd2,  // column in0 of this mat -> column out of the next mat, all rows
    MOP_WRITE = 3'd3,  // write the host data into wordline row (masked)
    MOP_READ  = 3'd4   // sense wordline row onto the read port
  } mop_e;

  typedef struct packed {
    mop_e       op;
    logic [1:0] n_in;   // 1..3 inputs for MOP_NOR (MAGIC supports NOR2/NOR3 and INV)
    idx_t       in0;
    idx_t       in1;
    idx_t       in2;
    idx_t       out;
    idx_t       row;
  } mop_t;

  localparam mop_t MOP_IDLE = '{op: MOP_NOP, n_in: 2'd0, in0: '0, in1: '0, in2: '0,
                                out: '0, row: '0};

  // Host commands of the rank-level bus.
  typedef enum logic [2:0] {
    HC_NONE  = 3'd0,
    HC_WRITE = 3'd1,   // write one (masked) wordline of one mat
    HC_READ  = 3'd2,   // read one wordline of one mat
    HC_PROG  = 3'd3,   // store one micro-operation into the kernel memory
    HC_RUN   = 3'd4    // run a stored kernel
  } hcmd_e;

  typedef struct packed {
    hcmd_e            cmd;
    logic             bcast;  // HC_PROG/HC_RUN: all chips at once
    idx_t             chip;
    idx_t             bank;
    idx_t             mat;
    idx_t             row;
    logic [15:0]      addr;   // HC_PROG: kernel memory address; HC_RUN: first address
    logic [15:0]      len;    // HC_RUN: number of micro-operations
    mop_t             mop;    // HC_PROG: the micro-operation to store
  } host_req_t;

  // Helper for testbenches and programs: build a NOR/INV micro-operation.
  function automatic mop_t mk_nor(input int n, input int a, input int b, input int c,
                                  input int o);
    mop_t m;
    m = MOP_IDLE;
    m.op   = MOP_NOR;
    m.n_in = 2'(n);
    m.in0  = idx_t'(a);
    m.in1  = idx_t'(b);
    m.in2  = idx_t'(c);
    m.out  = idx_t'(o);
    return m;
  endfunction

  function automatic mop_t mk_copy(input int src, input int dst);
    mop_t m;
    m = MOP_IDLE;
    m.op  = MOP_COPY;
    m.in0 = idx_t'(src);
    m.out = idx_t'(dst);
    return m;
  endfunction

endpackage
