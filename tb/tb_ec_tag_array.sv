// tb_ec_tag_array: self-checking test of the EC tag array.
//
// Checks the one-cycle look-up (result one cycle after the request), insert
// and hit data, the mispredict counter (cleared by a clean trace end, entry
// dropped at the M-th consecutive mispredict, inval_evt pulse), the explicit
// invalidate, and LRU replacement among five start addresses that fall into
// the same set.
module tb_ec_tag_array;
  import ec_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ta_op_e op; logic [63:0] pc; logic [7:0] set_id; logic [31:0] trace_id;
  logic rsp_valid, rsp_hit, inval_evt; logic [7:0] rsp_set_id;
  logic [31:0] rsp_trace_id; logic [1:0] rsp_mcnt;

  ec_tag_array dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_op(ta_op_e o, logic [63:0] a, logic [7:0] s = 0, logic [31:0] t = 0);
    op = o; pc = a; set_id = s; trace_id = t;
    @(posedge clk); #1;
    op = TA_NOP;
  endtask

  task automatic lookup(logic [63:0] a, output logic hit, output logic [7:0] s,
                        output logic [31:0] t, output logic [1:0] m);
    op = TA_LOOKUP; pc = a;
    @(posedge clk); #1;
    op = TA_NOP;
    chk(rsp_valid, "response one cycle after the look-up");
    hit = rsp_hit; s = rsp_set_id; t = rsp_trace_id; m = rsp_mcnt;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic h; logic [7:0] s; logic [31:0] t; logic [1:0] m; logic ev;
  localparam logic [63:0] A = 64'h0000_1234_0000_0040;
  initial begin
    op = TA_NOP; pc = '0; set_id = '0; trace_id = '0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;

    lookup(A, h, s, t, m);  chk(!h, "empty array misses");
    do_op(TA_INSERT, A, 8'd5, 32'd10);
    lookup(A, h, s, t, m);
    chk(h && s == 5 && t == 10 && m == 0, "hit returns set id and trace id");
    lookup(A + 4, h, s, t, m); chk(!h, "other address misses");

    do_op(TA_MISPRED, A);
    lookup(A, h, s, t, m); chk(h && m == 1, "one mispredict counted");
    do_op(TA_SUCCESS, A);
    lookup(A, h, s, t, m); chk(h && m == 0, "clean end clears the count");
    do_op(TA_MISPRED, A);
    op = TA_MISPRED; pc = A; @(posedge clk); #1; op = TA_NOP;
    ev = inval_evt;
    chk(ev, "second consecutive mispredict drops the trace");
    lookup(A, h, s, t, m); chk(!h, "dropped trace misses");

    do_op(TA_INSERT, A, 8'd7, 32'd11);
    do_op(TA_INVAL, A);
    lookup(A, h, s, t, m); chk(!h, "explicit invalidate");

    // five addresses in one set (set index = pc[7:2])
    for (int i = 0; i < 4; i++)
      do_op(TA_INSERT, A + 64'(i) * 256, 8'(i), 32'(100 + i));
    lookup(A, h, s, t, m);          chk(h && t == 100, "way 0 hit, now MRU");
    do_op(TA_INSERT, A + 4 * 256, 8'd4, 32'd104);
    lookup(A + 256, h, s, t, m);    chk(!h, "LRU entry (second) evicted");
    lookup(A, h, s, t, m);          chk(h && t == 100, "first kept");
    lookup(A + 2 * 256, h, s, t, m); chk(h && t == 102, "third kept");
    lookup(A + 3 * 256, h, s, t, m); chk(h && t == 103, "fourth kept");
    lookup(A + 4 * 256, h, s, t, m); chk(h && t == 104 && s == 4, "fifth inserted");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
