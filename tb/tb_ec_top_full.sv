// tb_ec_top_full: end-to-end test of the execution-cache back end at its
// default size.
//
// The same processor model, program and checks as tb_ec_top (see there for
// how the model works), with ec_top instantiated with no parameters:
// eight-wide, 32 x 4 queue register file, 168-set 4-way 4-bank data array
// (about 50 KB), 64-set 4-way tag array (4 KB), 512-instruction traces, a trace
// dropped after 2 mispredicts.  At this size no block is evicted during the
// run, so that one mechanism is not required here; all others are.
module tb_ec_top_full;
  import ec_pkg::*;
  localparam bit FULL = 1'b1;
  localparam int W = 8;
  localparam int NPROG = 64;
  localparam int RETIRE_GOAL = FULL ? 14000 : 9000;
  localparam logic [9:0] WRONG = 10'h3ff;   // address field of wrong-path junk

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ------------------------------------------------------------ DUT
  logic [W-1:0] dec_valid, ren_valid, iss_valid, exe_mask, wb_en, rt_en;
  ec_instr_t [W-1:0] dec_instr, ren_instr, iss_instr, exe_instr;
  logic dec_trace_end, dec_ready, exe_valid, exe_from_ec, exe_ready;
  logic [2*W-1:0][AREG_W-1:0] rd_arch; logic [2*W-1:0][PTAG_W-1:0] rd_tag;
  logic [2*W-1:0][63:0] rd_data; logic [2*W-1:0] rd_v;
  logic [W-1:0][AREG_W-1:0] wb_arch, rt_arch; logic [W-1:0][PTAG_W-1:0] wb_tag, rt_tag;
  logic [W-1:0][63:0] wb_data;
  logic mispredict, pipe_empty; logic [63:0] arch_next_pc;
  logic fe_enable, fe_restart; logic [63:0] fe_restart_pc;
  mode_e mode; logic [3:0] da_bank_en;

  if (1) begin : g_dut
    ec_top dut (.*);
  end

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ------------------------------------------------------------ program
  localparam logic [5:0] OP_ADD = 1, OP_ADDI = 2, OP_XOR = 3, OP_BR = 4, OP_JR = 5;
  // immediate layout: [25:16] address, [15] predicted taken,
  // branches: [14:7] target, [6] taken-if value, [5:0] bit tested; addi: [11:0]
  dec_t prog [NPROG];

  function automatic dec_t mk(logic [5:0] op, int rd, int rs1, int rs2, int imm);
    dec_t d;
    d.op = op; d.wr = (op inside {OP_ADD, OP_ADDI, OP_XOR});
    d.rd = 5'(rd); d.rs1 = 5'(rs1); d.rs2 = 5'(rs2); d.imm = 26'(imm);
    return d;
  endfunction
  function automatic dec_t br(int rs1, int bitn, int val, int target);
    return mk(OP_BR, 0, rs1, 0, (target << 7) | (val << 6) | bitn);
  endfunction

  task automatic load_program();
    for (int i = 0; i < NPROG; i++) prog[i] = mk(OP_ADDI, 13, 13, 0, 1);
    prog[0]  = mk(OP_ADDI, 29, 0, 0, 2);         // loop head address
    prog[1]  = mk(OP_ADDI, 1, 0, 0, 7);
    prog[2]  = mk(OP_ADD, 2, 1, 30, 0);          // head
    prog[3]  = mk(OP_XOR, 3, 2, 1, 0);
    prog[4]  = mk(OP_ADDI, 4, 3, 0, 5);
    prog[5]  = mk(OP_ADD, 5, 4, 2, 0);
    prog[6]  = mk(OP_ADDI, 6, 30, 0, 3);
    prog[7]  = mk(OP_XOR, 7, 6, 5, 0);
    prog[8]  = mk(OP_ADD, 8, 7, 8, 0);
    prog[9]  = mk(OP_ADDI, 9, 9, 0, 1);
    prog[10] = mk(OP_ADD, 10, 9, 8, 0);
    prog[11] = mk(OP_XOR, 11, 10, 3, 0);
    prog[12] = mk(OP_ADD, 12, 11, 12, 0);
    prog[13] = mk(OP_ADDI, 1, 1, 0, 3);
    prog[14] = br(30, 2, 1, 20);                 // flips every 4 passes
    prog[15] = mk(OP_ADD, 2, 2, 12, 0);
    prog[16] = mk(OP_XOR, 3, 3, 2, 0);
    prog[17] = mk(OP_ADDI, 4, 4, 0, 9);
    prog[18] = mk(OP_ADD, 5, 5, 4, 0);
    prog[19] = mk(OP_ADDI, 6, 6, 0, 2);
    prog[20] = mk(OP_ADD, 7, 7, 1, 0);
    prog[21] = mk(OP_XOR, 8, 8, 7, 0);
    prog[22] = mk(OP_ADDI, 10, 10, 0, 4);
    prog[23] = mk(OP_ADD, 11, 11, 10, 0);
    prog[24] = mk(OP_ADD, 12, 12, 9, 0);
    prog[25] = br(30, 3, 1, 30);                 // flips every 8 passes
    prog[26] = mk(OP_ADDI, 2, 2, 0, 1);
    prog[27] = mk(OP_ADD, 3, 3, 2, 0);
    prog[28] = mk(OP_XOR, 4, 4, 3, 0);
    prog[29] = mk(OP_ADDI, 5, 5, 0, 7);
    prog[30] = mk(OP_ADDI, 30, 30, 0, 1);
    prog[31] = br(30, 4, 1, 33);                 // second phase in passes 16..31
    prog[32] = mk(OP_JR, 0, 29, 0, 0);
    prog[33] = mk(OP_ADDI, 28, 0, 0, 0);
    prog[34] = mk(OP_ADDI, 13, 0, 0, 1);         // inner loop: three versions
    prog[35] = mk(OP_ADDI, 13, 0, 0, 2);         // of r13 per pass, so a pass
    prog[36] = mk(OP_ADDI, 13, 1, 0, 3);         // reuses the slots of the one
    prog[37] = mk(OP_ADDI, 28, 28, 0, 1);        // two issue units earlier
    prog[38] = mk(OP_ADD, 6, 6, 13, 0);
    prog[39] = br(28, FULL ? 7 : 6, 0, 34);      // 128 or 64 passes
    prog[40] = mk(OP_XOR, 5, 5, 6, 0);
    prog[41] = mk(OP_ADD, 1, 1, 5, 0);
    prog[42] = mk(OP_JR, 0, 29, 0, 0);
  endtask

  function automatic logic [63:0] alu(dec_t d, logic [63:0] a, logic [63:0] b);
    case (d.op)
      OP_ADD:  return a + b;
      OP_ADDI: return a + 64'(d.imm[11:0]);
      OP_XOR:  return a ^ b;
      default: return '0;
    endcase
  endfunction
  function automatic bit br_taken(dec_t d, logic [63:0] a);
    return a[d.imm[5:0]] == d.imm[6];
  endfunction

  // ------------------------------------------------------------ reference model
  logic [63:0] greg [32];
  int gpc, retired;

  // ------------------------------------------------------------ front end
  logic [63:0] freg [32];
  int fpc; bit fwrong; bit pred [NPROG];
  // the group offered this cycle and the state after it
  logic [63:0] nreg [32];
  int npc; bit nwrong; bit npred [NPROG];

  task automatic fetch_peek();
    nreg = freg; npc = fpc; nwrong = fwrong; npred = pred;
    dec_valid = '0; dec_instr = '0; dec_trace_end = 0;
    if (!fe_enable) return;
    for (int k = 0; k < W; k++) begin
      ec_instr_t ins;
      ins = '0;
      if (nwrong) begin
        ins.dec = mk(OP_ADDI, 1 + (k % 12), 1 + (k % 12), 0, 1);
        ins.dec.imm[25:16] = WRONG;
        dec_valid[k] = 1; dec_instr[k] = ins;
        continue;
      end
      ins.dec = prog[npc];
      ins.dec.imm[25:16] = 10'(npc);
      ins.ttag = 10'(npc);
      if (ins.dec.op == OP_BR) begin
        bit act, p;
        act = br_taken(ins.dec, nreg[ins.dec.rs1]);
        p = npred[npc];
        npred[npc] = act;
        ins.dec.imm[15] = p;
        dec_valid[k] = 1; dec_instr[k] = ins;
        if (p != act) begin nwrong = 1; break; end
        npc = act ? int'(ins.dec.imm[14:7]) : npc + 1;
        if (act) break;
      end else if (ins.dec.op == OP_JR) begin
        npc = int'(nreg[ins.dec.rs1] % 64'(NPROG));
        dec_valid[k] = 1; dec_instr[k] = ins;
        dec_trace_end = 1;
        break;
      end else begin
        if (ins.dec.wr) nreg[ins.dec.rd] = alu(ins.dec, nreg[ins.dec.rs1], nreg[ins.dec.rs2]);
        npc = npc + 1;
        dec_valid[k] = 1; dec_instr[k] = ins;
      end
    end
  endtask

  // ------------------------------------------------------------ issue window and pipeline
  typedef struct {
    bit                 v;
    logic [W-1:0]       m;
    ec_instr_t [W-1:0]  ins;
    logic [W-1:0][63:0] res;
    logic [W-1:0]       tkn;
  } grp_t;
  ec_instr_t iq [$];
  grp_t ex_g, wb_g, rt_g;
  bit misp_q, squash;

  task automatic issue_peek();
    logic [31:0] wr;
    iss_valid = '0; iss_instr = '0;
    if (mode == M_EC || squash) return;
    wr = '0;
    for (int k = 0; k < W && k < iq.size(); k++) begin
      dec_t d;
      d = iq[k].dec;
      if (wr[d.rs1] || wr[d.rs2]) break;
      iss_valid[k] = 1; iss_instr[k] = iq[k];
      if (d.wr) wr[d.rd] = 1;
    end
  endtask

  always_comb begin
    for (int k = 0; k < W; k++) begin
      rd_arch[2*k] = exe_instr[k].dec.rs1;   rd_tag[2*k] = exe_instr[k].ren.src1;
      rd_arch[2*k+1] = exe_instr[k].dec.rs2; rd_tag[2*k+1] = exe_instr[k].ren.src2;
    end
  end

  // retire stage: check against the reference model
  task automatic retire();
    rt_en = '0; rt_arch = '0; rt_tag = '0;
    if (!rt_g.v) return;
    for (int k = 0; k < W; k++) if (rt_g.m[k]) begin
      dec_t d; logic [63:0] g;
      d = rt_g.ins[k].dec;
      chk(int'(d.imm[25:16]) == gpc,
          $sformatf("retired address %0d, expected %0d", d.imm[25:16], gpc));
      if (d.wr) begin
        g = alu(d, greg[d.rs1], greg[d.rs2]);
        chk(rt_g.res[k] == g, $sformatf("result of instruction %0d: %h, expected %h",
                                        gpc, rt_g.res[k], g));
        greg[d.rd] = g;
        rt_en[k] = 1; rt_arch[k] = d.rd; rt_tag[k] = rt_g.ins[k].ren.dst;
        gpc++;
      end else if (d.op == OP_BR) begin
        bit act;
        act = br_taken(d, greg[d.rs1]);
        chk(rt_g.tkn[k] == act, "branch condition from renamed operand");
        gpc = act ? int'(d.imm[14:7]) : gpc + 1;
        if (act != d.imm[15]) begin
          squash = 1;
          retired++;
          break;
        end
      end else begin
        gpc = int'(greg[d.rs1] % 64'(NPROG));
      end
      retired++;
    end
  endtask

  // ------------------------------------------------------------ mechanism counters
  int n_build, n_hit, n_miss, n_units, n_done, n_len_end, n_hard_end;
  int n_misp_build, n_misp_ec, n_inval, n_da_miss, n_ckpt, n_rollback;
  int n_stall_build, n_stall_ec, n_one_bank, n_all_bank, n_fe_off, n_insert;
  int n_ec_instr, n_instr;
  mode_e mode_prev;

  // ------------------------------------------------------------ main loop
  int cyc, idle_cyc;
  initial begin
    load_program();
    for (int i = 0; i < 32; i++) begin greg[i] = '0; freg[i] = '0; end
    for (int i = 0; i < NPROG; i++) pred[i] = 0;
    gpc = 0; fpc = 0; fwrong = 0; retired = 0;
    wb_g = '{default: '0}; rt_g = '{default: '0};
    misp_q = 0; squash = 0;
    dec_valid = '0; dec_instr = '0; dec_trace_end = 0; iss_valid = '0; iss_instr = '0;
    wb_en = '0; wb_arch = '0; wb_tag = '0; wb_data = '0; rt_en = '0; rt_arch = '0; rt_tag = '0;
    mispredict = 0; pipe_empty = 0; arch_next_pc = '0; exe_ready = 1;
    mode_prev = M_DRAIN; idle_cyc = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    for (cyc = 0; retired < RETIRE_GOAL && cyc < 200000 && idle_cyc < 2000; cyc++) begin
      @(posedge clk); #1;
      // ---- phase 1: drive this cycle's inputs
      squash = 0;
      mispredict = misp_q;
      misp_q = 0;
      for (int k = 0; k < W; k++) begin
        wb_en[k] = wb_g.v && wb_g.m[k] && wb_g.ins[k].dec.wr;
        wb_arch[k] = wb_g.ins[k].dec.rd; wb_tag[k] = wb_g.ins[k].ren.dst;
        wb_data[k] = wb_g.res[k];
      end
      if (mispredict) begin
        rt_en = '0;
      end else begin
        retire();
      end
      if (squash || mispredict) iq.delete();
      if (squash || mispredict) begin dec_valid = '0; dec_instr = '0; dec_trace_end = 0; end
      else fetch_peek();
      issue_peek();
      exe_ready = ($urandom_range(0, 7) != 0);
      pipe_empty = (iq.size() == 0) && !wb_g.v && !rt_g.v && !squash && !mispredict;
      arch_next_pc = 64'(gpc) * 4;
      #1;
      // ---- phase 2: what happens at the coming edge
      if (squash) misp_q = 1;
      if (fe_restart) begin
        chk(fe_restart_pc == arch_next_pc, "front end restarts at the next address");
        freg = greg; fpc = gpc; fwrong = 0;
      end else if (!squash && dec_ready && dec_valid != '0) begin
        freg = nreg; fpc = npc; fwrong = nwrong; pred = npred;
        for (int k = 0; k < W; k++) if (ren_valid[k]) iq.push_back(ren_instr[k]);
        if (dec_trace_end && mode == M_BUILD) n_hard_end++;
      end
      if (iss_valid != '0) for (int k = 0; k < W; k++) if (iss_valid[k]) void'(iq.pop_front());
      // execute, with the result of the group now being written back bypassed
      ex_g = '{default: '0};
      if (exe_valid && !squash) begin
        ex_g.v = 1; ex_g.m = exe_mask; ex_g.ins = exe_instr;
        for (int k = 0; k < W; k++) if (exe_mask[k]) begin
          dec_t d;
          logic [63:0] a, b;
          bit va, vb;
          d = exe_instr[k].dec;
          a = rd_data[2*k]; va = rd_v[2*k];
          b = rd_data[2*k+1]; vb = rd_v[2*k+1];
          for (int j = 0; j < W; j++) if (wb_en[j]) begin
            if (wb_arch[j] == d.rs1 && wb_tag[j] == exe_instr[k].ren.src1) begin
              a = wb_data[j]; va = 1;
            end
            if (wb_arch[j] == d.rs2 && wb_tag[j] == exe_instr[k].ren.src2) begin
              b = wb_data[j]; vb = 1;
            end
          end
          chk(va && (d.op == OP_ADDI || d.op == OP_BR || d.op == OP_JR || vb),
              "operands available when read");
          ex_g.res[k] = alu(d, a, b);
          ex_g.tkn[k] = br_taken(d, a);
          n_instr++;
          if (exe_from_ec) n_ec_instr++;
        end
        if (exe_from_ec) n_units++;
      end
      rt_g = squash ? '{default: '0} : wb_g;
      wb_g = squash ? '{default: '0} : ex_g;
      // mechanisms
      if (g_dut.dut.u_ctl.bld_start) n_build++;
      if (g_dut.dut.ta_rsp_valid && g_dut.dut.ta_rsp_hit && mode == M_LRESP) n_hit++;
      if (g_dut.dut.ta_rsp_valid && !g_dut.dut.ta_rsp_hit && mode == M_LRESP) n_miss++;
      if (g_dut.dut.rdr_done) n_done++;
      if (g_dut.dut.rdr_miss) n_da_miss++;
      if (g_dut.dut.ta_inval_evt) n_inval++;
      if (g_dut.dut.ta_op == TA_INSERT) n_insert++;
      if (mode == M_BUILD && !g_dut.dut.ren_allow) n_len_end++;
      if (mispredict && (mode == M_BUILD || (mode == M_DRAIN && fe_enable))) n_misp_build++;
      if (mispredict && mode == M_EC) n_misp_ec++;
      if (mispredict) n_rollback++;
      if (mode == M_CKPT) begin
        n_ckpt++;
        chk(g_dut.dut.rf_checkpoint && pipe_empty, "checkpoint only with an empty pipeline");
      end
      if (mode == M_BUILD && dec_valid != '0 && g_dut.dut.ren_allow && !mispredict &&
          !g_dut.dut.rf_ok) n_stall_build++;
      if (mode == M_EC && g_dut.dut.ec_valid && !mispredict && !g_dut.dut.rf_ok) n_stall_ec++;
      if (g_dut.dut.da_rd_en) begin
        if (g_dut.dut.da_rd_first) begin
          n_all_bank++;
          chk(da_bank_en == 4'b1111, "first block: all banks");
        end else begin
          n_one_bank++;
          chk($countones(da_bank_en) == 1, "later block: one bank");
        end
      end
      if (mode == M_EC) chk(!fe_enable, "front end off while replaying");
      if (!fe_enable) n_fe_off++;
      idle_cyc = (rt_en != '0 || rt_g.v) ? 0 : idle_cyc + 1;
    end

    chk(retired >= RETIRE_GOAL, $sformatf("retired %0d instructions in %0d cycles",
                                           retired, cyc));
    $display("retired %0d in %0d cycles, %0d executed, %0d from the execution cache",
             retired, cyc, n_instr, n_ec_instr);
    $display("builds %0d  inserts %0d  hits %0d  misses %0d  units %0d  replays done %0d",
             n_build, n_insert, n_hit, n_miss, n_units, n_done);
    $display("length ends %0d  jump ends %0d  misp build %0d  misp EC %0d  dropped %0d",
             n_len_end, n_hard_end, n_misp_build, n_misp_ec, n_inval);
    $display("evicted %0d  checkpoints %0d  rollbacks %0d  stalls %0d/%0d  banks 1:%0d all:%0d",
             n_da_miss, n_ckpt, n_rollback, n_stall_build, n_stall_ec, n_one_bank, n_all_bank);
    $display("front end off %0d cycles", n_fe_off);
    chk(n_build > 0,      "trace build happened");
    chk(n_insert > 0,     "trace recorded in the tag array");
    chk(n_hit > 0,        "tag-array hit happened");
    chk(n_miss > 0,       "tag-array miss happened");
    chk(n_units > 0,      "issue units replayed from the execution cache");
    chk(n_done > 0,       "replay ran to the end of a trace");
    chk(n_len_end > 0,    "trace ended by the length limit");
    chk(n_hard_end > 0,   "trace ended by a hard-to-predict instruction");
    chk(n_misp_build > 0, "mispredict while building");
    chk(n_misp_ec > 0,    "mispredict while replaying");
    chk(n_inval > 0,      "trace dropped after repeated mispredicts");
    chk(FULL || n_da_miss > 0, "replay found an evicted block");
    chk(n_ckpt > 0,       "checkpoint happened");
    chk(n_rollback > 0,   "rollback happened");
    chk(n_stall_build > 0, "rename stall while building");
    chk(n_stall_ec > 0,   "rename stall while replaying");
    chk(n_one_bank > 0,   "single-bank data-array read");
    chk(n_all_bank > 0,   "all-bank data-array read");
    chk(n_fe_off > 0,     "front end switched off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (250000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
