// tb_ec_controller: self-checking test of the EC mode controller.
//
// Plays the part of the pipeline, the tag array and both fill-buffer sides
// and walks the controller through every path: look-up miss -> build, build
// ended by the length limit (512 instructions = 64 groups of 8), drain, close,
// tag-array insert, checkpoint with look-up, hit -> replay, clean end
// (count cleared), replay mispredicts (count incremented), build ended
// by a hard-to-predict instruction, builds dropped after a mispredict, and a
// replay ended by an evicted block.
module tb_ec_controller;
  import ec_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pipe_empty, mispredict, ren_fire, fe_trace_end, ren_allow;
  logic [63:0] arch_next_pc, fe_restart_pc, ta_pc;
  logic [3:0] ren_n;
  logic fe_enable, fe_restart;
  ta_op_e ta_op; logic [7:0] ta_set_id, ta_rsp_set_id;
  logic [31:0] ta_trace_id, ta_rsp_trace_id;
  logic ta_rsp_valid, ta_rsp_hit, ta_inval_evt;
  logic bld_start, bld_close, bld_cancel, bld_closed, bld_empty;
  logic [7:0] bld_set, bld_next_set, rdr_set; logic [31:0] bld_trace_id, rdr_trace_id;
  logic rdr_start, rdr_cancel, rdr_done, rdr_miss, rf_checkpoint, rf_rollback;
  mode_e mode;

  ec_controller dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (mode %s)", what, mode.name()); end
  endtask

  task automatic idle();
    mispredict = 0; ren_fire = 0; ren_n = 0; fe_trace_end = 0;
    ta_rsp_valid = 0; ta_rsp_hit = 0; ta_inval_evt = 0;
    bld_closed = 0; bld_empty = 0; rdr_done = 0; rdr_miss = 0;
  endtask
  task automatic step(); @(posedge clk); #1; idle(); endtask

  // from M_CKPT: look up pc, answer hit/miss
  task automatic lookup(logic [63:0] pc, bit hit, int set, int tid);
    arch_next_pc = pc; #1;
    chk(mode == M_CKPT && rf_checkpoint, "checkpoint at trace boundary");
    chk(ta_op == TA_LOOKUP && ta_pc == pc, "tag-array look-up of next pc");
    step();
    chk(mode == M_LRESP, "waiting for look-up");
    ta_rsp_valid = 1; ta_rsp_hit = hit; ta_rsp_set_id = 8'(set); ta_rsp_trace_id = 32'(tid);
    #1;
    if (hit) chk(rdr_start && rdr_set == 8'(set) && rdr_trace_id == 32'(tid) && !fe_restart,
                 "hit starts replay");
    else     chk(bld_start && fe_restart && fe_restart_pc == pc, "miss restarts front end");
    step();
    chk(mode == (hit ? M_EC : M_BUILD), "mode after look-up");
    chk(fe_enable == !hit, "front end power follows the mode");
  endtask

  // from M_DRAIN with the pipeline empty: expect one tag-array operation
  task automatic drain_expect(ta_op_e op);
    pipe_empty = 0; step(); step();
    chk(mode == M_DRAIN && ta_op == TA_NOP, "drain waits for empty pipeline");
    pipe_empty = 1; #1;
    chk(ta_op == op, $sformatf("tag-array op %s", ta_op.name()));
    step();
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int groups;
  initial begin
    idle(); pipe_empty = 0; arch_next_pc = 64'h100; bld_next_set = 0;
    ta_rsp_set_id = 0; ta_rsp_trace_id = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    chk(mode == M_DRAIN, "reset in drain");
    step();
    chk(mode == M_DRAIN, "drain waits for the pipeline");
    pipe_empty = 1; step();

    // ---- miss: build trace 1 until the length limit
    lookup(64'h100, 0, 0, 0);
    groups = 0;
    while (ren_allow && groups < 100) begin
      ren_fire = 1; ren_n = 8; step(); groups++;
    end
    chk(groups == 64, $sformatf("512-instruction limit after %0d groups", groups));
    step();
    chk(mode == M_DRAIN && fe_enable, "drain after build, front end still on");
    pipe_empty = 1; #1;
    chk(bld_close, "close the build");
    step();
    chk(!bld_close, "close only once");
    bld_closed = 1; bld_next_set = 8'd64; #1;
    chk(ta_op == TA_INSERT && ta_pc == 64'h100 && ta_set_id == 0 && ta_trace_id == 1,
        "insert trace 1 at its start set");
    step();

    // ---- hit: replay, clean end
    lookup(64'h100, 1, 0, 1);
    repeat (3) step();
    rdr_done = 1; step();
    drain_expect(TA_SUCCESS);

    // ---- replay with a mispredict, twice; the second drops the trace
    lookup(64'h100, 1, 0, 1);
    mispredict = 1; #1;
    chk(rdr_cancel && rf_rollback, "mispredict cancels replay and rolls back");
    step();
    drain_expect(TA_MISPRED);
    lookup(64'h100, 1, 0, 1);
    mispredict = 1; step();
    drain_expect(TA_MISPRED);
    ta_inval_evt = 1; arch_next_pc = 64'h200; #1;   // drop reported by the tag array
    chk(mode == M_CKPT && ta_op == TA_LOOKUP && ta_pc == 64'h200, "look-up after the drop");
    step();

    // ---- miss: build trace 2 in the next free set, ended by a hard-to-predict instr
    ta_rsp_valid = 1; ta_rsp_hit = 0; #1;
    chk(bld_start && bld_set == 64 && bld_trace_id == 2, "build in next set with new id");
    step();
    ren_fire = 1; ren_n = 5; step();
    ren_fire = 1; ren_n = 3; fe_trace_end = 1; step();
    chk(mode == M_DRAIN, "hard-to-predict instruction ends the build");
    pipe_empty = 0; step();
    mispredict = 1; #1;
    chk(bld_cancel, "mispredict while draining drops the build");
    step();
    pipe_empty = 1; #1;
    chk(!bld_close && ta_op == TA_NOP, "dropped build is neither closed nor inserted");
    step();

    // ---- build interrupted by a mispredict
    lookup(64'h300, 0, 0, 0);
    ren_fire = 1; ren_n = 8; step();
    mispredict = 1; #1;
    chk(bld_cancel && rf_rollback, "mispredict during build");
    step();
    chk(mode == M_DRAIN, "drain after build mispredict");
    pipe_empty = 1; #1; chk(ta_op == TA_NOP, "nothing recorded"); step();

    // ---- replay ending on an evicted block
    lookup(64'h100, 1, 7, 9);
    rdr_miss = 1; step();
    drain_expect(TA_INVAL);

    // ---- another clean replay
    lookup(64'h400, 1, 3, 4);
    rdr_done = 1; step();
    drain_expect(TA_SUCCESS);
    chk(mode == M_CKPT, "next boundary");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
