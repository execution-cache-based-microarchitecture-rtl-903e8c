// ec_fill_buffer_rd: the fill buffer in trace-replay mode.
//
// When a trace is found in the tag array, its blocks are read from the data
// array one after another (the first from the set the tag array gave, each
// next one from the following set) into this two-block buffer, and the buffer
// hands the execution units one issue unit per cycle: the run of instructions
// at its head that share one sequence-id bit.  A unit is handed out only when
// it is known to be complete: an instruction with the other sequence bit
// follows it in the buffer, the trace's last block has been loaded, or it
// already has W instructions.  A unit that continues into the next block thus
// waits for that block.  A new block is requested whenever one block of space
// is free, so reads run ahead of issue and their latency is mostly hidden.
//
// Interface:
//   start/start_set/trace_id  begin replaying a trace; the first block is
//               requested in the same cycle, so with the one-cycle tag-array
//               look-up before it the first issue unit is ready two cycles
//               after the look-up result.
//   cancel      stop (mispredict): the buffer is emptied, no more reads.
//   rd_en/rd_set/rd_trace_id/rd_first  read request to the data array
//               (rd_first marks the first block of the trace);
//               rd_valid/rd_hit/rd_block its answer one cycle later.
//   out_valid/out_mask/out_instr  the issue unit at the head, instructions in
//               slots 0..n-1; it is consumed when out_ready is high.
//   done        pulses once the last block has been loaded and emptied.
//   miss        pulses when a block of the trace was not found (evicted);
//               replay stops.
//
// Follows the published read mechanism (one issue unit at a time, a block
// read when there is space for it in the buffer) and the end-of-trace marker
// (the block type).  Own choices: at most one read in flight, so a block can
// be loaded every other cycle; empty slots are dropped on load.
module ec_fill_buffer_rd
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
  input  logic                  cancel,
  output logic                  rd_en,
  output logic [SW-1:0]         rd_set,
  output logic [TRACE_ID_W-1:0] rd_trace_id,
  output logic                  rd_first,
  input  logic                  rd_valid,
  input  logic                  rd_hit,
  input  ec_block_t             rd_block,
  output logic                  out_valid,
  output logic [W-1:0]          out_mask,
  output ec_instr_t [W-1:0]     out_instr,
  input  logic                  out_ready,
  output logic                  done,
  output logic                  miss
);

  ec_instr_t [CAP-1:0]   buf_q;
  logic [CW-1:0]         cnt_q;
  logic                  active_q, pend_q, last_q, first_q;
  logic [SW-1:0]         set_q;
  logic [TRACE_ID_W-1:0] tid_q;

  // the first block is requested in the start cycle itself
  assign rd_en       = start || (active_q && !cancel && !pend_q && !last_q &&
                                 32'(cnt_q) <= B);
  assign rd_set      = start ? start_set : set_q;
  assign rd_trace_id = start ? trace_id  : tid_q;
  assign rd_first    = start || first_q;

  // the issue unit at the head of the buffer
  logic [CW-1:0] un;
  logic          ucomplete;
  always_comb begin
    logic run;
    un  = '0;
    run = 1'b1;
    for (int i = 0; i < CAP; i++)
      if (run && i < 32'(cnt_q) && i < W && buf_q[i].seq == buf_q[0].seq)
        un = un + 1'b1;
      else
        run = 1'b0;
    ucomplete = (cnt_q != 0) && (un < cnt_q || last_q || 32'(un) == W);
  end

  assign out_valid = active_q && ucomplete;
  always_comb begin
    for (int i = 0; i < W; i++) begin
      out_mask[i]  = i < 32'(un);
      out_instr[i] = out_mask[i] ? buf_q[i] : '0;
    end
  end

  // non-empty slots of the arriving block, compacted
  ec_instr_t [B-1:0] blk_c;
  logic [CW-1:0]     blk_n;
  always_comb begin
    blk_c = '0;
    blk_n = '0;
    for (int i = 0; i < B; i++)
      if (!is_empty_slot(rd_block.slot[i])) begin
        blk_c[blk_n[$clog2(B)-1:0]] = rd_block.slot[i];
        blk_n = blk_n + 1'b1;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q    <= '0;
      cnt_q    <= '0;
      active_q <= 1'b0;
      pend_q   <= 1'b0;
      last_q   <= 1'b0;
      first_q  <= 1'b0;
      set_q    <= '0;
      tid_q    <= '0;
      done     <= 1'b0;
      miss     <= 1'b0;
    end else begin
      done <= 1'b0;
      miss <= 1'b0;
      if (start) begin
        cnt_q    <= '0;
        active_q <= 1'b1;
        pend_q   <= 1'b1;
        last_q   <= 1'b0;
        first_q  <= 1'b0;
        set_q    <= (32'(start_set) == SETS - 1) ? '0 : start_set + 1'b1;
        tid_q    <= trace_id;
      end else if (cancel) begin
        cnt_q    <= '0;
        active_q <= 1'b0;
        pend_q   <= 1'b0;
      end else if (active_q) begin
        ec_instr_t [CAP-1:0] nb;
        logic [CW-1:0] nc;
        nb = buf_q;
        nc = cnt_q;
        if (out_valid && out_ready) begin
          for (int i = 0; i < CAP; i++)
            nb[i] = (i + 32'(un) < CAP) ? buf_q[i + 32'(un)] : '0;
          nc = cnt_q - un;
        end
        if (rd_en) begin
          pend_q  <= 1'b1;
          first_q <= 1'b0;
          set_q   <= (32'(set_q) == SETS - 1) ? '0 : set_q + 1'b1;
        end
        if (rd_valid && pend_q) begin
          pend_q <= 1'b0;
          if (rd_hit && rd_block.trace_id == tid_q) begin
            for (int i = 0; i < B; i++)
              if (i < 32'(blk_n)) nb[32'(nc) + i] = blk_c[i];
            nc = nc + blk_n;
            if (rd_block.btype inside {BT_LAST, BT_SINGLE}) last_q <= 1'b1;
          end else begin
            active_q <= 1'b0;
            miss     <= 1'b1;
          end
        end
        buf_q <= nb;
        cnt_q <= nc;
        if (last_q && nc == 0 && !pend_q) begin
          active_q <= 1'b0;
          done     <= 1'b1;
        end
      end
    end
  end

endmodule
