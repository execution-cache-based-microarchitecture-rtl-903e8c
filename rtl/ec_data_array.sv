// ec_data_array: the data array (DA) of the execution cache.
//
// Traces are stored as chains of blocks: the first block of a trace sits in
// the set named by the tag array, and every following block sits in one of
// the ways of the next set (modulo SETS), so after the first access the set of
// the next access is known in advance.  A block is found inside its set by
// comparing the trace id stored with each way; a block carries eight
// instructions in issue order plus the trace id, the number of issue units
// and the block type (first, middle, last).
//
// The sets are split over BANKS banks of consecutive sets.  Because the next
// set is known, a continuing access needs only one bank; only the first access
// of a trace, which follows the tag-array look-up, enables every bank.
// bank_en reports, for the current cycle, which banks are powered; a bank not
// named there can be clock- or supply-gated.
//
// Interface:
//   rd_en/rd_set/rd_trace_id/rd_first  read request; one cycle later
//                 rd_valid pulses with rd_hit and rd_block.
//   wr_en/wr_set/wr_block  write a block into a free way of the set, else
//                 into its least recently used way (a read hit or a write
//                 makes a way most recently used).
//   A read and a write in the same cycle are not supported (the trace-build
//   and replay phases never overlap); the write wins.
//
// Follows the published organisation: 4-way sets, 4 banks, eight instructions
// per block, trace-id match per way, LRU replacement, next-set chaining.  The
// 50 KB array holds 672 blocks of 76 bytes: 168 sets of 4 ways, 42 sets per
// bank.  Own choices: separate valid bits, bank = set / (SETS/BANKS).
module ec_data_array
  import ec_pkg::*;
#(
  parameter int SETS  = 168,
  parameter int WAYS  = 4,
  parameter int BANKS = 4,
  localparam int SW   = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int AGW  = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  rd_en,
  input  logic [SW-1:0]         rd_set,
  input  logic [TRACE_ID_W-1:0] rd_trace_id,
  input  logic                  rd_first,
  output logic                  rd_valid,
  output logic                  rd_hit,
  output ec_block_t             rd_block,
  input  logic                  wr_en,
  input  logic [SW-1:0]         wr_set,
  input  ec_block_t             wr_block,
  output logic [BANKS-1:0]      bank_en
);
  localparam int SPB = SETS / BANKS;   // sets per bank

  ec_block_t             mem   [SETS][WAYS];
  logic [TRACE_ID_W-1:0] tid_q [SETS][WAYS];
  logic                  vld_q [SETS][WAYS];
  logic [AGW-1:0]        age_q [SETS][WAYS];

  logic [SW-1:0]   aset;
  logic            hit;
  logic [AGW-1:0]  hway, vway, uway;

  assign aset = wr_en ? wr_set : rd_set;

  always_comb begin
    hit  = 1'b0;
    hway = '0;
    for (int w = 0; w < WAYS; w++)
      if (vld_q[aset][w] && tid_q[aset][w] == rd_trace_id && !hit) begin
        hit  = 1'b1;
        hway = AGW'(w);
      end
    vway = '0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (age_q[aset][w] == AGW'(WAYS - 1)) vway = AGW'(w);
    for (int w = WAYS - 1; w >= 0; w--)
      if (!vld_q[aset][w]) vway = AGW'(w);
    uway = wr_en ? vway : hway;
  end

  // bank gating: which banks this cycle's access powers
  always_comb begin
    bank_en = '0;
    if (wr_en || rd_en) begin
      if (rd_en && !wr_en && rd_first) bank_en = '1;
      else
        for (int b = 0; b < BANKS; b++)
          if (32'(aset) / SPB == b) bank_en[b] = 1'b1;
    end
  end

  // block storage: no reset, guarded by the valid bits
  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_set][vway] <= wr_block;
    if (rd_en && !wr_en) rd_block <= mem[rd_set][hway];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) begin
          vld_q[s][w] <= 1'b0;
          tid_q[s][w] <= '0;
          age_q[s][w] <= AGW'(w);
        end
      rd_valid <= 1'b0;
      rd_hit   <= 1'b0;
    end else begin
      rd_valid <= rd_en && !wr_en;
      rd_hit   <= rd_en && !wr_en && hit;
      if (wr_en) begin
        vld_q[wr_set][vway] <= 1'b1;
        tid_q[wr_set][vway] <= wr_block.trace_id;
      end
      if (wr_en || (rd_en && hit))
        for (int w = 0; w < WAYS; w++)
          if (AGW'(w) == uway)
            age_q[aset][w] <= '0;
          else if (age_q[aset][w] < age_q[aset][uway])
            age_q[aset][w] <= age_q[aset][w] + 1'b1;
    end
  end

endmodule
