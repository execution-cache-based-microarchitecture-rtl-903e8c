// ec_fill_buffer_wr: the fill buffer in trace-build mode.
//
// While the front end is running, every issue group that leaves the issue
// window is sent to the execution units and, in parallel, appended here.  The
// buffer holds two data-array blocks (2 x 8 instructions).  Each accepted
// group is one issue unit: its instructions get the same sequence-id bit and
// the bit toggles for the next group, so the unit boundaries survive in the
// stored trace.  As soon as more than one block's worth of instructions is
// present, the oldest eight are written to the data array as one block; the
// next block of the same trace goes to the next set.  Holding a full block back
// until the next instruction or the close arrives lets the last block of a
// trace always be written with type "last".
//
// Interface:
//   start       begin a trace: first block goes to start_set, all blocks carry
//               trace_id.  Drops anything left over.
//   in_valid/in_instr  one issue group per cycle (up to W instructions, any
//               slots valid); never back-pressured: at most 8 are held after a
//               write, plus at most 8 new ones fit the 16 entries.
//   close       the trace ends: the remaining instructions are written as the
//               last block (or a single block), then closed pulses.  empty
//               tells that the trace had no instruction at all.
//   cancel       drop the trace being built (nothing more is written).
//   wr_en/wr_set/wr_block  block write to the data array (driven from
//               registers, one block per cycle).
//   n_instr     instructions accepted since start (the trace length).
//   next_set    set after the last block written.
//
// Follows the published fill buffer of two blocks that writes a block when it
// has enough instructions, and the sequence-id toggle between issue units.
// Own choices: unused slots of the last block are left empty (opcode 0), the
// number-of-issue-units field counts units that end inside the block
// (saturating at 7), and the hold-back of a full block described above.
module ec_fill_buffer_wr
  import ec_pkg::*;
#(
  parameter int W    = 8,
  parameter int SETS = 168,
  localparam int SW  = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int B   = BLOCK_INSTR,
  localparam int CAP = 2 * BLOCK_INSTR,
  localparam int CW  = $clog2(CAP + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [SW-1:0]         start_set,
  input  logic [TRACE_ID_W-1:0] trace_id,
  input  logic [W-1:0]          in_valid,
  input  ec_instr_t [W-1:0]     in_instr,
  input  logic                  close,
  input  logic                  cancel,
  output logic                  wr_en,
  output logic [SW-1:0]         wr_set,
  output ec_block_t             wr_block,
  output logic                  closed,
  output logic                  empty,
  output logic [9:0]            n_instr,
  output logic [SW-1:0]         next_set
);

  ec_instr_t [CAP-1:0]       buf_q;
  logic [CW-1:0]  cnt_q;
  logic                      active_q, closing_q, first_q, seq_q;
  logic [SW-1:0]             set_q;
  logic [TRACE_ID_W-1:0]     tid_q;
  logic [9:0]                len_q;

  // a block leaves this cycle: more than a block held, or closing
  logic write_now, last_now;
  assign write_now = active_q && (32'(cnt_q) > B || (closing_q && cnt_q != 0));
  assign last_now  = write_now && closing_q && 32'(cnt_q) <= B;

  // compact the incoming group
  ec_instr_t [W-1:0]     in_c;
  logic [$clog2(W+1)-1:0] in_n;
  always_comb begin
    in_c = '0;
    in_n = '0;
    for (int i = 0; i < W; i++)
      if (in_valid[i]) begin
        in_c[in_n]     = in_instr[i];
        in_c[in_n].seq = seq_q;
        in_n           = in_n + 1'b1;
      end
  end

  // block being written
  always_comb begin
    logic [NIU_W:0] ends;
    wr_block = '0;
    ends     = '0;
    for (int i = 0; i < B; i++)
      if (32'(cnt_q) > i) begin
        wr_block.slot[i] = buf_q[i];
        // a unit ends at slot i if the next held instruction has the other
        // sequence bit, or if slot i is the very last instruction of the trace
        if ((32'(cnt_q) > i + 1) ? (buf_q[i+1].seq != buf_q[i].seq) : last_now)
          if (ends != (NIU_W+1)'(7)) ends = ends + 1'b1;
      end
    wr_block.n_iu     = NIU_W'(ends);
    wr_block.trace_id = tid_q;
    wr_block.btype    = first_q ? (last_now ? BT_SINGLE : BT_FIRST)
                                : (last_now ? BT_LAST   : BT_MIDDLE);
  end

  assign wr_en    = write_now;
  assign wr_set   = set_q;
  assign n_instr  = len_q;
  assign next_set = set_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q     <= '0;
      cnt_q     <= '0;
      active_q  <= 1'b0;
      closing_q <= 1'b0;
      first_q   <= 1'b0;
      seq_q     <= 1'b0;
      set_q     <= '0;
      tid_q     <= '0;
      len_q     <= '0;
      closed    <= 1'b0;
      empty     <= 1'b0;
    end else begin
      closed <= 1'b0;
      if (start) begin
        cnt_q     <= '0;
        active_q  <= 1'b1;
        closing_q <= 1'b0;
        first_q   <= 1'b1;
        seq_q     <= 1'b0;
        set_q     <= start_set;
        tid_q     <= trace_id;
        len_q     <= '0;
      end else if (cancel) begin
        cnt_q     <= '0;
        active_q  <= 1'b0;
        closing_q <= 1'b0;
      end else if (active_q) begin
        // shift out a written block, then append the new group
        ec_instr_t [CAP-1:0] nb;
        logic [CW-1:0] nc;
        nb = buf_q;
        nc = cnt_q;
        if (write_now) begin
          for (int i = 0; i < CAP; i++)
            nb[i] = (i + B < CAP) ? buf_q[i+B] : '0;
          nc = (32'(cnt_q) > B) ? cnt_q - CW'(B) : '0;
          first_q <= 1'b0;
          set_q   <= (32'(set_q) == SETS - 1) ? '0 : set_q + 1'b1;
        end
        if (!closing_q && in_n != 0) begin
          for (int i = 0; i < W; i++)
            if (i < 32'(in_n)) nb[32'(nc) + i] = in_c[i];
          nc    = nc + in_n;
          seq_q <= ~seq_q;
          len_q <= len_q + 10'(in_n);
        end
        buf_q <= nb;
        cnt_q <= nc;
        if (close) closing_q <= 1'b1;
        // the trace is finished once the closing buffer has drained
        if ((closing_q || close) && ((write_now && last_now) ||
                                     (closing_q && cnt_q == 0))) begin
          active_q  <= 1'b0;
          closing_q <= 1'b0;
          closed    <= 1'b1;
          empty     <= (len_q == 0);
        end
      end
    end
  end

endmodule
