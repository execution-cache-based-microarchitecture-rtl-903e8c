// tb_reg_pool: self-checking test of one architected-register pool.
//
// Replays the register r3 of the worked renaming example (two writes per
// trace, r3.1 then r3.2, so IDX = 2 at the trace end), checks the XOR
// checkpoint (physical entry 2 becomes logical position 0, the newest value is
// then read through tag 0), the V/S bit handling, the allocation stall when
// every non-committed slot is speculative, and the rollback to the last
// committed slot.  Expected values are worked out by hand from the algorithm.
module tb_reg_pool;
  localparam int N = 4, X = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] alloc_en; logic [1:0][1:0] alloc_tag;
  logic [1:0] wb_en;    logic [1:0][1:0] wb_tag; logic [1:0][X-1:0] wb_data;
  logic [1:0] rt_en;    logic [1:0][1:0] rt_tag;
  logic rollback, checkpoint;
  logic [1:0] idx, cidx;
  logic [N-1:0] tag_free, v_by_tag, s_by_tag;
  logic [N-1:0][X-1:0] val_by_tag;
  logic [N-1:0][1:0] pos_q;

  reg_pool #(.NPHYS(N), .XLEN(X), .NA(2), .NWB(2), .NRT(2)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic idle();
    alloc_en = '0; wb_en = '0; rt_en = '0; rollback = 0; checkpoint = 0;
    alloc_tag = '0; wb_tag = '0; wb_data = '0; rt_tag = '0;
  endtask

  task automatic step(); @(posedge clk); #1; idle(); endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle();
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    chk(pos_q == {2'd3, 2'd2, 2'd1, 2'd0}, "POS reset to 0..N-1");
    chk(idx == 0 && cidx == 0, "IDX reset");
    chk(tag_free == 4'b1110, "only the committed slot 0 is not free");

    // r3.1 <- 0x0011
    alloc_en[0] = 1; alloc_tag[0] = 2'd1; step();
    chk(idx == 1, "IDX incremented to 1");
    chk(v_by_tag[1] == 0 && s_by_tag[1] == 1, "alloc clears V, sets S");
    wb_en[0] = 1; wb_tag[0] = 1; wb_data[0] = 16'h0011; step();
    chk(v_by_tag[1] == 1 && val_by_tag[1] == 16'h0011, "write back sets V");
    rt_en[0] = 1; rt_tag[0] = 1; step();
    chk(s_by_tag[1] == 0 && cidx == 1, "retire clears S");
    chk(tag_free == 4'b1101, "slot 1 committed, slot 0 free again");
    // r3.2 <- 0x0022, allocated, written and retired in one go
    alloc_en[0] = 1; alloc_tag[0] = 2'd2; step();
    wb_en[1] = 1; wb_tag[1] = 2; wb_data[1] = 16'h0022;
    rt_en[1] = 1; rt_tag[1] = 2; step();
    chk(idx == 2 && cidx == 2, "IDX = 2 at trace end");

    // checkpoint: POS ^= 2 -> entries 0..3 get 2,3,0,1
    checkpoint = 1; step();
    chk(pos_q == {2'd1, 2'd0, 2'd3, 2'd2}, "XOR checkpoint of POS");
    chk(idx == 0 && cidx == 0, "IDX back to 0");
    chk(val_by_tag[0] == 16'h0022, "newest value now at tag 0");
    chk(val_by_tag[3] == 16'h0011, "older value at tag 3");

    // fill every free slot: allocation must then be refused
    alloc_en = 2'b11; alloc_tag[0] = 1; alloc_tag[1] = 2; step();
    alloc_en[0] = 1; alloc_tag[0] = 3; step();
    chk(idx == 3, "IDX follows the last allocation");
    chk(tag_free == 4'b0000, "no slot free: rename must stall");
    // write back the first one only, then roll back
    wb_en[0] = 1; wb_tag[0] = 1; wb_data[0] = 16'hBEEF; step();
    rollback = 1; step();
    chk(idx == 0, "rollback returns IDX to the committed slot");
    chk(s_by_tag == 4'b0000, "rollback clears S");
    chk(tag_free == 4'b1110, "slots free after rollback");
    chk(val_by_tag[0] == 16'h0022, "committed value kept");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
