// tb_ec_fill_buffer_rd: self-checking test of the trace-replay fill buffer.
//
// Random traces (issue units of 1..8 instructions) are packed into blocks the
// way the build side does and placed in a small behavioural data array that
// answers one cycle after a request.  The replay must hand out exactly the
// recorded issue units, in order, under random back-pressure, request the
// first block in the start cycle (first unit ready two cycles later), read
// consecutive sets, flag the first access only, pulse done at the end, stop
// with miss when a block has been evicted, and stop reading after cancel.
module tb_ec_fill_buffer_rd;
  import ec_pkg::*;
  localparam int SETS = 168;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, cancel, rd_en, rd_first, rd_valid, rd_hit, out_valid, out_ready;
  logic done, miss;
  logic [7:0] start_set, rd_set; logic [31:0] trace_id, rd_trace_id;
  ec_block_t rd_block; logic [7:0] out_mask; ec_instr_t [7:0] out_instr;

  ec_fill_buffer_rd dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // behavioural data array: one block per set is enough here
  ec_block_t mem [SETS]; bit present [SETS];
  always @(posedge clk) begin
    rd_valid <= rd_en;
    rd_hit   <= rd_en && present[rd_set] && mem[rd_set].trace_id == rd_trace_id;
    rd_block <= mem[rd_set];
  end

  // expected issue units
  typedef ec_instr_t unit_t [$];
  ec_instr_t units [$][$];
  int nblocks;

  task automatic make_trace(int s0, int tid, int nunits);
    ec_instr_t all [$];
    int serial;
    units.delete();
    serial = 1;
    for (int u = 0; u < nunits; u++) begin
      ec_instr_t one [$];
      int n = $urandom_range(1, 8);
      for (int k = 0; k < n; k++) begin
        ec_instr_t ins = '0;
        ins.dec.op = 6'(1 + serial % 60); ins.dec.imm = 26'(serial);
        ins.ttag = 10'(serial); ins.seq = u[0];
        serial++;
        one.push_back(ins); all.push_back(ins);
      end
      units.push_back(one);
    end
    nblocks = (all.size() + 7) / 8;
    for (int s = 0; s < SETS; s++) present[s] = 0;
    for (int b = 0; b < nblocks; b++) begin
      ec_block_t blk = '0;
      for (int i = 0; i < 8; i++)
        if (b * 8 + i < all.size()) blk.slot[i] = all[b * 8 + i];
      blk.trace_id = 32'(tid);
      blk.btype = (nblocks == 1) ? BT_SINGLE : (b == 0) ? BT_FIRST :
                  (b == nblocks - 1) ? BT_LAST : BT_MIDDLE;
      mem[(s0 + b) % SETS] = blk; present[(s0 + b) % SETS] = 1;
    end
  endtask

  int nreads, nfirst, lastset;
  bit seqok;
  always @(posedge clk) if (rd_en) begin
    nreads++;
    if (rd_first) nfirst++;
    if (nreads > 1 && int'(rd_set) != (lastset + 1) % SETS) seqok = 0;
    lastset = int'(rd_set);
  end

  task automatic replay(int s0, int tid, int kill_block, bit do_cancel);
    int u, cyc, first_cyc;
    bit got_done, got_miss;
    nreads = 0; nfirst = 0; seqok = 1;
    start = 1; start_set = 8'(s0); trace_id = 32'(tid);
    #1 chk(rd_en && rd_first && rd_set == 8'(s0), "first block requested in the start cycle");
    @(posedge clk); #1 start = 0;
    u = 0; cyc = 0; first_cyc = -1; got_done = 0; got_miss = 0;
    while (cyc < 2000 && !got_done && !got_miss) begin
      out_ready = ($urandom_range(0, 3) != 0);
      if (do_cancel && u == 2) cancel = 1;
      #1;
      if (out_valid && out_ready && !cancel) begin
        if (first_cyc < 0) first_cyc = cyc;
        if (u < units.size()) begin
          bit same = 1;
          for (int i = 0; i < 8; i++)
            if (i < units[u].size()) same &= out_mask[i] && out_instr[i] == units[u][i];
            else same &= !out_mask[i];
          chk(same, $sformatf("issue unit %0d", u));
        end else chk(0, "extra issue unit");
        u++;
      end
      @(posedge clk); #1;
      if (cancel) begin
        cancel = 0;
        repeat (3) begin
          #1 chk(!rd_en && !out_valid, "idle after cancel");
          @(posedge clk);
        end
        return;
      end
      got_done = done; got_miss = miss; cyc++;
    end
    out_ready = 0;
    if (kill_block >= 0) begin
      chk(got_miss && !got_done, "evicted block: miss");
    end else begin
      chk(got_done, "done pulse");
      chk(u == units.size(), $sformatf("%0d of %0d units handed out", u, units.size()));
      chk(nreads == nblocks && nfirst == 1, "one read per block, first flagged once");
      chk(seqok, "consecutive sets read");
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; cancel = 0; out_ready = 0; start_set = 0; trace_id = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;

    // latency: with out_ready high the first unit is ready 2 cycles after start
    make_trace(10, 5, 3);
    start = 1; start_set = 10; trace_id = 5;
    @(posedge clk); #1 start = 0; out_ready = 1;
    chk(!out_valid, "no unit one cycle after start");
    @(posedge clk); #1;
    chk(out_valid, "first unit two cycles after start");
    while (!done) @(posedge clk);
    @(posedge clk); #1 out_ready = 0;

    for (int t = 0; t < 30; t++) begin
      int s0;
      s0 = $urandom_range(0, SETS - 1);
      make_trace(s0, 100 + t, $urandom_range(1, 60));
      replay(s0, 100 + t, -1, 0);
    end

    // an evicted middle block ends the replay with a miss
    make_trace(160, 300, 40);
    present[(160 + 2) % SETS] = 0;
    replay(160, 300, 2, 0);

    // cancel in the middle
    make_trace(0, 301, 40);
    replay(0, 301, -1, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
