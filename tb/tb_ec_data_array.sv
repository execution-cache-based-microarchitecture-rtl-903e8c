// tb_ec_data_array: self-checking test of the EC data array.
//
// Writes blocks of several traces, reads them back by (set, trace id) and
// compares whole blocks, checks the one-cycle read latency, misses on a wrong
// trace id, the bank enables (all four banks for the first block of a trace,
// only the bank holding the set otherwise, 42 sets per bank), and LRU
// replacement inside a set.
module tb_ec_data_array;
  import ec_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rd_en, rd_first, rd_valid, rd_hit, wr_en;
  logic [7:0] rd_set, wr_set; logic [31:0] rd_trace_id;
  ec_block_t rd_block, wr_block; logic [3:0] bank_en;

  ec_data_array dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic ec_block_t mk(int tid, int salt);
    ec_block_t b;
    for (int i = 0; i < 8; i++) begin
      b.slot[i] = '0;
      b.slot[i].dec.op  = 6'(1 + i);
      b.slot[i].dec.imm = 26'(salt * 16 + i);
      b.slot[i].ttag    = 10'(salt + i);
      b.slot[i].seq     = i[1];
    end
    b.n_iu = 3'd4; b.trace_id = 32'(tid); b.btype = BT_MIDDLE;
    return b;
  endfunction

  task automatic write(int set, ec_block_t b, logic [3:0] exp_bank);
    wr_en = 1; wr_set = 8'(set); wr_block = b;
    #1 chk(bank_en == exp_bank, $sformatf("write bank enable %b", bank_en));
    @(posedge clk); #1; wr_en = 0;
  endtask

  task automatic read(int set, int tid, bit first, logic [3:0] exp_bank,
                      output logic hit, output ec_block_t b);
    rd_en = 1; rd_set = 8'(set); rd_trace_id = 32'(tid); rd_first = first;
    #1 chk(bank_en == exp_bank, $sformatf("read bank enable %b exp %b", bank_en, exp_bank));
    @(posedge clk); #1; rd_en = 0;
    chk(rd_valid, "read answered one cycle later");
    hit = rd_hit; b = rd_block;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic h; ec_block_t b;
  initial begin
    rd_en = 0; wr_en = 0; rd_first = 0; rd_set = 0; wr_set = 0;
    rd_trace_id = 0; wr_block = '0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;

    write(3, mk(1, 1), 4'b0001);
    write(50, mk(1, 2), 4'b0010);
    write(167, mk(2, 3), 4'b1000);
    read(3, 1, 1, 4'b1111, h, b);   chk(h && b == mk(1, 1), "first block back, all banks on");
    read(50, 1, 0, 4'b0010, h, b);  chk(h && b == mk(1, 2), "next block, one bank");
    read(167, 2, 0, 4'b1000, h, b); chk(h && b == mk(2, 3), "set in bank 3");
    read(3, 2, 0, 4'b0001, h, b);   chk(!h, "wrong trace id misses");
    read(4, 1, 0, 4'b0001, h, b);   chk(!h, "empty set misses");

    // LRU inside set 100: traces 10..13, touch 10, then 14 evicts 11
    for (int k = 0; k < 4; k++) write(100, mk(10 + k, 20 + k), 4'b0100);
    read(100, 10, 0, 4'b0100, h, b); chk(h && b == mk(10, 20), "trace 10 block");
    write(100, mk(14, 24), 4'b0100);
    read(100, 11, 0, 4'b0100, h, b); chk(!h, "LRU block (trace 11) replaced");
    for (int k = 0; k < 5; k++)
      if (k != 1) begin
        read(100, 10 + k, 0, 4'b0100, h, b);
        chk(h && b == mk(10 + k, 20 + k), $sformatf("trace %0d kept", 10 + k));
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
