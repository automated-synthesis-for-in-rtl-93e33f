// kernel_sequencer: stores kernel netlists and issues them as micro-operations.
//
// A kernel (for example a multiplication or a dot product decomposed into NOR/INV
// operations) is a list of micro-operations held in the kernel memory. The host writes
// it word by word (prog_we). start with base/len runs len micro-operations from address
// base, one per cycle, in order: each is issued on mop_valid/mop and executed by every
// mat of the chip in every row at once. After a COPY the sequencer inserts one idle
// cycle, because the copied column lands in the neighbouring mat two edges after the
// request and the next operation may read it. When the last micro-operation has been
// issued, done pulses for one cycle and busy falls. last_steps reports how many
// micro-operations the last run issued, last_cycles how many cycles it was busy:
// len + (number of COPYs) + 1.
//
// Follows the document: the functional cells execute the kernel netlist as a sequence
// of in-memory operations, one operation per cycle, and the same kernel runs in all
// rows in parallel. This design's own choices: the memory depth (16384, enough for the
// largest operation count the document reports, 15007 for a 32-bit multiplication),
// the start/len interface, the bubble after a copy and the counters.
module kernel_sequencer
  import imc_pkg::*;
#(
  parameter int unsigned DEPTH = 16384
) (
  input  logic        clk,
  input  logic        rst_n,
  // program port
  input  logic        prog_we,
  input  logic [15:0] prog_addr,
  input  mop_t        prog_data,
  // run control
  input  logic        start,
  input  logic [15:0] base,
  input  logic [15:0] len,
  output logic        busy,
  output logic        done,
  output logic [15:0] last_steps,
  output logic [16:0] last_cycles,
  // issued micro-operations
  output logic        mop_valid,
  output mop_t        mop
);

  localparam int unsigned AW = $clog2(DEPTH);

  mop_t        kmem [DEPTH];
  logic [AW-1:0] pc;
  logic [15:0] left;
  logic        bubble;
  logic [15:0] steps;
  logic [16:0] cycles;

  always_ff @(posedge clk) begin
    if (prog_we) kmem[prog_addr[AW-1:0]] <= prog_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      pc          <= '0;
      left        <= '0;
      bubble      <= 1'b0;
      mop_valid   <= 1'b0;
      mop         <= MOP_IDLE;
      steps       <= '0;
      cycles      <= '0;
      last_steps  <= '0;
      last_cycles <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        mop_valid <= 1'b0;
        if (start) begin
          busy   <= 1'b1;
          pc     <= base[AW-1:0];
          left   <= len;
          bubble <= 1'b0;
          steps  <= '0;
          cycles <= '0;
        end
      end else begin
        cycles <= cycles + 17'd1;
        if (bubble) begin
          bubble    <= 1'b0;
          mop_valid <= 1'b0;
        end else if (left != 16'd0) begin
          mop       <= kmem[pc];
          mop_valid <= 1'b1;
          bubble    <= (kmem[pc].op == MOP_COPY);
          pc        <= pc + AW'(1);
          left      <= left - 16'd1;
          steps     <= steps + 16'd1;
        end else begin
          mop_valid   <= 1'b0;
          busy        <= 1'b0;
          done        <= 1'b1;
          last_steps  <= steps;
          last_cycles <= cycles + 17'd1;
        end
      end
    end
  end

  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                          busy |-> !start);

endmodule
