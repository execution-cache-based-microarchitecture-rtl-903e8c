// tb_queue_regfile: self-checking test of the queue register file.
//
// Runs the worked loop example (two unrolled iterations of
//   mov r1,#5; mov r2,r0; add r3,r1,r0; sub r2,r3,r1; xor r1,r1,r2; jmp)
// twice.  The first pass renames it in two groups and must produce exactly the
// tags of the example (r1.1, r2.1 <- r0.0, r3.1 <- r1.1 + r0.0, ... ,
// r2.0 <- r3.2 - r1.3, r1.0 <- r1.3 ^ r2.0).  Each instruction is then
// executed through the read/write-back ports and retired.  After the
// checkpoint the same trace is replayed with the recorded tags
// (explicit mode), as the execution cache does, and the architected values
// are checked against a plain sequential model.  A group that would need a
// fifth copy of r2 must stall, and a rollback must undo its allocation.
module tb_queue_regfile;
  localparam int X = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] ren_valid, ren_wr; logic [7:0][4:0] ren_rd, ren_rs1, ren_rs2;
  logic ren_explicit, ren_go, ren_ok;
  logic [7:0][1:0] ren_dst_in, ren_dst, ren_src1, ren_src2;
  logic [15:0][4:0] rd_arch; logic [15:0][1:0] rd_tag;
  logic [15:0][X-1:0] rd_data; logic [15:0] rd_v;
  logic [7:0] wb_en; logic [7:0][4:0] wb_arch; logic [7:0][1:0] wb_tag;
  logic [7:0][X-1:0] wb_data;
  logic [7:0] rt_en; logic [7:0][4:0] rt_arch; logic [7:0][1:0] rt_tag;
  logic rollback, checkpoint;
  logic [31:0][1:0] idx_all, cidx_all; logic [31:0][3:0] s_all;
  logic [31:0][3:0][1:0] pos_all;

  queue_regfile #(.XLEN(X)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef enum {MOVI, MOV, ADD, SUB, XOR, JMP} op_e;
  typedef struct { op_e op; int rd, rs1, rs2, imm; int td, t1, t2; } ins_t;
  ins_t prog [12];
  int   arch [4];

  initial begin
    // op, rd, rs1, rs2, imm, expected dst/src1/src2 tags from the example
    prog[0]  = '{MOVI, 1, 0, 0, 5, 1, 0, 0};
    prog[1]  = '{MOV,  2, 0, 0, 0, 1, 0, 0};
    prog[2]  = '{ADD,  3, 1, 0, 0, 1, 1, 0};
    prog[3]  = '{SUB,  2, 3, 1, 0, 2, 1, 1};
    prog[4]  = '{XOR,  1, 1, 2, 0, 2, 1, 2};
    prog[5]  = '{JMP,  0, 0, 0, 0, 0, 0, 0};
    prog[6]  = '{MOVI, 1, 0, 0, 5, 3, 0, 0};
    prog[7]  = '{MOV,  2, 0, 0, 0, 3, 0, 0};
    prog[8]  = '{ADD,  3, 1, 0, 0, 2, 3, 0};
    prog[9]  = '{SUB,  2, 3, 1, 0, 0, 2, 3};
    prog[10] = '{XOR,  1, 1, 2, 0, 0, 3, 0};
    prog[11] = '{JMP,  0, 0, 0, 0, 0, 0, 0};
  end

  function automatic int alu(op_e op, int a, int b, int imm);
    case (op)
      MOVI: return imm;
      MOV:  return a;
      ADD:  return a + b;
      SUB:  return a - b;
      XOR:  return a ^ b;
      default: return 0;
    endcase
  endfunction

  task automatic idle();
    ren_valid = '0; ren_wr = '0; ren_rd = '0; ren_rs1 = '0; ren_rs2 = '0;
    ren_explicit = 0; ren_go = 0; ren_dst_in = '0;
    rd_arch = '0; rd_tag = '0; wb_en = '0; wb_arch = '0; wb_tag = '0;
    wb_data = '0; rt_en = '0; rt_arch = '0; rt_tag = '0;
    rollback = 0; checkpoint = 0;
  endtask
  task automatic step(); @(posedge clk); #1; idle(); endtask

  // execute and retire instruction k with tags (td, t1, t2)
  task automatic exec(int k);
    int a, b, r;
    if (prog[k].op == JMP) return;
    rd_arch[0] = 5'(prog[k].rs1); rd_tag[0] = 2'(prog[k].t1);
    rd_arch[1] = 5'(prog[k].rs2); rd_tag[1] = 2'(prog[k].t2);
    #1;
    chk(rd_v[0] && rd_v[1], $sformatf("operands of %0d valid", k));
    a = int'(rd_data[0]); b = int'(rd_data[1]);
    r = alu(prog[k].op, a, b, prog[k].imm);
    wb_en[0] = 1; wb_arch[0] = 5'(prog[k].rd); wb_tag[0] = 2'(prog[k].td);
    wb_data[0] = X'(r);
    rt_en[0] = 1; rt_arch[0] = 5'(prog[k].rd); rt_tag[0] = 2'(prog[k].td);
    step();
  endtask

  // rename instructions lo..hi as one group
  task automatic rename(int lo, int hi, bit explicit_tags);
    for (int k = lo; k <= hi; k++) begin
      ren_valid[k-lo] = 1;
      ren_wr[k-lo]    = prog[k].op != JMP;
      ren_rd[k-lo]    = 5'(prog[k].rd);
      ren_rs1[k-lo]   = 5'(prog[k].rs1);
      ren_rs2[k-lo]   = 5'(prog[k].rs2);
      ren_dst_in[k-lo] = 2'(prog[k].td);
    end
    ren_explicit = explicit_tags;
    ren_go = 1;
    #1;
    chk(ren_ok, $sformatf("group %0d..%0d renamed without stall", lo, hi));
    for (int k = lo; k <= hi; k++)
      if (prog[k].op != JMP) begin
        chk(ren_dst[k-lo] == 2'(prog[k].td),
            $sformatf("instr %0d dst tag %0d exp %0d", k, ren_dst[k-lo], prog[k].td));
        if (prog[k].op inside {MOV, ADD, SUB, XOR})
          chk(ren_src1[k-lo] == 2'(prog[k].t1), $sformatf("instr %0d src1 tag", k));
        if (prog[k].op inside {ADD, SUB, XOR})
          chk(ren_src2[k-lo] == 2'(prog[k].t2), $sformatf("instr %0d src2 tag", k));
      end
    step();
  endtask

  task automatic run_trace(bit explicit_tags);
    rename(0, 5, explicit_tags);
    for (int k = 0; k <= 5; k++) exec(k);
    rename(6, 11, explicit_tags);
    for (int k = 6; k <= 11; k++) exec(k);
  endtask

  task automatic check_arch(string when);
    for (int r = 0; r < 4; r++) begin
      rd_arch[r] = 5'(r); rd_tag[r] = idx_all[r];
    end
    #1;
    for (int r = 0; r < 4; r++)
      chk(int'(rd_data[r]) == arch[r], $sformatf("%s: r%0d = %0d exp %0d",
          when, r, int'(rd_data[r]), arch[r]));
    idle();
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle();
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    // an earlier trace leaves r0 = 7 in r0.1, then the checkpoint
    ren_valid[0] = 1; ren_wr[0] = 1; ren_rd[0] = 0; ren_go = 1; step();
    wb_en[0] = 1; wb_arch[0] = 0; wb_tag[0] = 1; wb_data[0] = 7;
    rt_en[0] = 1; rt_arch[0] = 0; rt_tag[0] = 1; step();
    checkpoint = 1; step();
    chk(idx_all[0] == 0 && pos_all[0][1] == 0, "r0 checkpointed: entry 1 is POS 0");

    // sequential model of one trace run
    arch = '{7, 2, 7, 12};

    run_trace(1'b0);
    chk(idx_all[1] == 0 && idx_all[2] == 0 && idx_all[3] == 2 && idx_all[0] == 0,
        "IDX at trace end: r0 0, r1 0, r2 0, r3 2");
    check_arch("after build pass");
    checkpoint = 1; step();
    chk(pos_all[3] == {2'd1, 2'd0, 2'd3, 2'd2}, "r3 POS after XOR with 2");
    check_arch("after checkpoint");

    run_trace(1'b1);
    check_arch("after replay");
    checkpoint = 1; step();

    // four writes to r2 in one group with nothing retired: must stall
    for (int s = 0; s < 4; s++) begin
      ren_valid[s] = 1; ren_wr[s] = 1; ren_rd[s] = 2;
    end
    #1;
    chk(!ren_ok, "fourth in-flight copy of r2 stalls rename");
    idle();
    for (int s = 0; s < 3; s++) begin
      ren_valid[s] = 1; ren_wr[s] = 1; ren_rd[s] = 2;
    end
    ren_go = 1; #1;
    chk(ren_ok, "three in-flight copies of r2 are allowed");
    step();
    chk(idx_all[2] == 3 && s_all[2] != 0, "three copies allocated");
    rollback = 1; step();
    chk(idx_all[2] == 0 && s_all[2] == 0, "rollback frees the copies");
    check_arch("after rollback");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
