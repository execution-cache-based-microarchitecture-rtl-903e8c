// ec_tag_array: the tag array (TA) of the execution cache.
//
// The TA finds a trace by the address of its first instruction.  It is a
// SETS x WAYS set-associative array; an entry holds a valid bit, the 64-bit
// start address, the data-array set where the trace's first block lives
// (SET_ID), the trace id that tags every block of the trace, and a 2-bit count
// of consecutive mispredicts seen while replaying the trace.  Replacement is
// LRU within a set.
//
// One operation per cycle, selected by op (ec_pkg::ta_op_e):
//   TA_LOOKUP   search for pc; the result (rsp_valid, rsp_hit, rsp_set_id,
//               rsp_trace_id) appears one cycle later -- the one-cycle TA access.
//   TA_INSERT   record a new trace (pc, set_id, trace_id); an entry with the
//               same pc is overwritten, otherwise an invalid or the LRU way.
//   TA_MISPRED  the trace at pc was left on a mispredict: count it; when the
//               count reaches M the entry is invalidated (inval_evt pulses).
//   TA_SUCCESS  the trace at pc ran to its end: clear its count.
//   TA_INVAL    drop the trace at pc.
//
// Follows the published entry format and the replace-after-M-consecutive-
// mispredicts policy (M of two or three was evaluated; two is the default
// here).  The 4 KB, 4-way array is 256 entries of 14 bytes: 64 sets of 4.
// Own choices: set index from pc[7:2] (4-byte instructions), true LRU with
// per-way age counters, and the one-operation-per-cycle interface.
module ec_tag_array
  import ec_pkg::*;
#(
  parameter int SETS = 64,
  parameter int WAYS = 4,
  parameter int M    = 2,
  localparam int SW  = $clog2(SETS),
  localparam int AGW = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  ta_op_e                op,
  input  logic [PC_W-1:0]       pc,
  input  logic [SETID_W-1:0]    set_id,
  input  logic [TRACE_ID_W-1:0] trace_id,
  output logic                  rsp_valid,
  output logic                  rsp_hit,
  output logic [SETID_W-1:0]    rsp_set_id,
  output logic [TRACE_ID_W-1:0] rsp_trace_id,
  output logic [MCNT_W-1:0]     rsp_mcnt,
  output logic                  inval_evt
);

  ta_entry_t          ent_q [SETS][WAYS];
  logic [AGW-1:0]     age_q [SETS][WAYS];   // 0 = most recently used

  logic [SW-1:0]      set;
  logic [WAYS-1:0]    match;
  logic               hit;
  logic [AGW-1:0]     hway, vway, uway;

  assign set = pc[2 +: SW];

  always_comb begin
    hit  = 1'b0;
    hway = '0;
    for (int w = 0; w < WAYS; w++) begin
      match[w] = ent_q[set][w].valid && (ent_q[set][w].pc == pc);
      if (match[w] && !hit) begin
        hit  = 1'b1;
        hway = AGW'(w);
      end
    end
    // victim: first invalid way, else the least recently used one
    vway = '0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (age_q[set][w] == AGW'(WAYS - 1)) vway = AGW'(w);
    for (int w = WAYS - 1; w >= 0; w--)
      if (!ent_q[set][w].valid) vway = AGW'(w);
    uway = hit ? hway : vway;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) begin
          ent_q[s][w] <= '0;
          age_q[s][w] <= AGW'(w);
        end
      rsp_valid    <= 1'b0;
      rsp_hit      <= 1'b0;
      rsp_set_id   <= '0;
      rsp_trace_id <= '0;
      rsp_mcnt     <= '0;
      inval_evt    <= 1'b0;
    end else begin
      rsp_valid <= (op == TA_LOOKUP);
      inval_evt <= 1'b0;
      if (op == TA_LOOKUP) begin
        rsp_hit      <= hit;
        rsp_set_id   <= ent_q[set][hway].set_id;
        rsp_trace_id <= ent_q[set][hway].trace_id;
        rsp_mcnt     <= ent_q[set][hway].mcnt;
      end
      // LRU update on a lookup hit or an insert
      if ((op == TA_LOOKUP && hit) || op == TA_INSERT)
        for (int w = 0; w < WAYS; w++)
          if (AGW'(w) == uway)
            age_q[set][w] <= '0;
          else if (age_q[set][w] < age_q[set][uway])
            age_q[set][w] <= age_q[set][w] + 1'b1;
      unique case (op)
        TA_INSERT: ent_q[set][uway] <= '{valid: 1'b1, pc: pc, set_id: set_id,
                                         trace_id: trace_id, mcnt: '0};
        TA_MISPRED: if (hit) begin
          if (32'(ent_q[set][hway].mcnt) + 1 >= M) begin
            ent_q[set][hway].valid <= 1'b0;
            ent_q[set][hway].mcnt  <= '0;
            inval_evt              <= 1'b1;
          end else begin
            ent_q[set][hway].mcnt <= ent_q[set][hway].mcnt + 1'b1;
          end
        end
        TA_SUCCESS: if (hit) ent_q[set][hway].mcnt <= '0;
        TA_INVAL:   if (hit) ent_q[set][hway].valid <= 1'b0;
        default: ;
      endcase
    end
  end

endmodule
