// tb_ec_fill_buffer_wr: self-checking test of the trace-build fill buffer.
//
// Feeds issue groups of random sizes, closes the trace and compares every
// block written to the data array with a model: instructions in issue order,
// eight per block, sequence bit = parity of the issue group, block types
// first/middle/last (single for a one-block trace), unused slots empty, the
// number of issue units that end in each block, consecutive sets with
// wrap-around, the trace id in every block.  Also checks a cancelled build
// writes nothing more, an empty trace, and that a block is written one cycle
// after the instruction that overfills it (never back-pressured).
module tb_ec_fill_buffer_wr;
  import ec_pkg::*;
  localparam int SETS = 168;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, close, cancel, wr_en, closed, empty;
  logic [7:0] start_set, wr_set, next_set; logic [31:0] trace_id;
  logic [7:0] in_valid; ec_instr_t [7:0] in_instr; ec_block_t wr_block;
  logic [9:0] n_instr;

  ec_fill_buffer_wr dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // captured writes
  ec_block_t got_b [$]; int got_s [$];
  always @(posedge clk) if (wr_en) begin got_b.push_back(wr_block); got_s.push_back(int'(wr_set)); end

  // model
  ec_instr_t exp_i [$]; bit exp_end [$];

  task automatic idle();
    start = 0; close = 0; cancel = 0; in_valid = '0; in_instr = '0;
  endtask

  task automatic begin_trace(int set, int tid);
    start = 1; start_set = 8'(set); trace_id = 32'(tid);
    @(posedge clk); #1; idle();
    exp_i.delete(); exp_end.delete(); got_b.delete(); got_s.delete();
  endtask

  int serial = 1;
  task automatic group(int n, int gidx);
    int slot;
    // spread the n instructions over random slots of the group
    slot = 0;
    for (int k = 0; k < n; k++) begin
      ec_instr_t ins;
      ins = '0;
      ins.dec.op  = 6'(1 + serial % 60);
      ins.dec.imm = 26'(serial);
      ins.ttag    = 10'(serial);
      ins.ren     = 6'($urandom);
      serial++;
      while (slot < 8 && $urandom_range(0, 3) == 0 && (8 - slot) > (n - k)) slot++;
      in_valid[slot] = 1; in_instr[slot] = ins;
      ins.seq = gidx[0];
      exp_i.push_back(ins); exp_end.push_back(k == n - 1);
      slot++;
    end
    @(posedge clk); #1; idle();
  endtask

  task automatic finish_trace(int set, int tid);
    int nb, ends, cyc;
    close = 1; @(posedge clk); #1; idle();
    cyc = 0;
    while (!closed && cyc < 20) begin @(posedge clk); #1; cyc++; end
    chk(closed, "closed pulse");
    chk(empty == (exp_i.size() == 0), "empty flag");
    chk(int'(n_instr) == exp_i.size(), "trace length");
    nb = (exp_i.size() + 7) / 8;
    chk(got_b.size() == nb, $sformatf("%0d blocks written, expected %0d", got_b.size(), nb));
    for (int b = 0; b < nb && b < got_b.size(); b++) begin
      blk_type_e t;
      t = (nb == 1) ? BT_SINGLE : (b == 0) ? BT_FIRST : (b == nb - 1) ? BT_LAST : BT_MIDDLE;
      chk(got_b[b].btype == t, $sformatf("block %0d type %s", b, got_b[b].btype.name()));
      chk(got_s[b] == (set + b) % SETS, $sformatf("block %0d set %0d", b, got_s[b]));
      chk(got_b[b].trace_id == 32'(tid), "trace id in block");
      ends = 0;
      for (int i = 0; i < 8; i++) begin
        int k = b * 8 + i;
        if (k < exp_i.size()) begin
          chk(got_b[b].slot[i] == exp_i[k], $sformatf("block %0d slot %0d", b, i));
          if (exp_end[k] && ends < 7) ends++;
        end else
          chk(is_empty_slot(got_b[b].slot[i]), "unused slot empty");
      end
      chk(int'(got_b[b].n_iu) == ends, $sformatf("block %0d issue units %0d exp %0d",
          b, got_b[b].n_iu, ends));
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle(); start_set = 0; trace_id = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;

    // fixed trace crossing the last set
    begin_trace(166, 7);
    begin
      int sz [7] = '{3, 5, 2, 8, 1, 4, 6};
      for (int g = 0; g < 7; g++) group(sz[g], g);
    end
    finish_trace(166, 7);

    // a block leaves one cycle after it is overfilled
    begin_trace(20, 8);
    group(8, 0);
    chk(got_b.size() == 0, "a full block is held until more arrives");
    group(1, 1);
    #0 chk(wr_en, "block write right after the ninth instruction");
    finish_trace(20, 8);

    // single-block and exactly-two-block traces
    begin_trace(40, 9);  group(8, 0); finish_trace(40, 9);
    begin_trace(41, 10); group(8, 0); group(8, 1); finish_trace(41, 10);

    // random traces
    for (int t = 0; t < 20; t++) begin
      int ng, s0;
      s0 = $urandom_range(0, SETS - 1);
      ng = $urandom_range(0, 40);
      begin_trace(s0, 100 + t);
      for (int g = 0; g < ng; g++) begin
        group($urandom_range(1, 8), g);
        if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
      end
      finish_trace(s0, 100 + t);
    end

    // cancel: nothing is written after it
    begin_trace(60, 200);
    group(8, 0); group(4, 1);
    cancel = 1; @(posedge clk); #1; idle();
    begin
      int n0;
      n0 = got_b.size();
      repeat (5) @(posedge clk);
      #1 chk(got_b.size() == n0 && !closed, "no write after cancel");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
