// ec_top: back end of a superscalar processor with an execution cache (EC).
//
// The EC sits after the issue stage.  While a trace is being built, decoded
// instructions are renamed here in the queue register file, leave for the
// issue window, and come back as issue groups; each group goes straight to
// the execution units and, in parallel, into the fill buffer, which packs the
// groups into data-array blocks.  When execution later reaches the start
// address of a stored trace, the front end is switched off and the stored
// issue units, already decoded, renamed and scheduled, are sent to the
// execution units directly: the processor then behaves like a VLIW machine
// fed from the EC.  At each trace boundary the pipeline drains, the register
// file is checkpointed (POS ^= IDX in every pool) so the next trace starts
// with IDX = 0 everywhere, and the tag array is searched for the next trace.
//
//   decode --dec_*--> [rename: queue_regfile] --ren_*--> issue window (outside)
//   issue window --iss_*--> exe_* (build mode)   and --> ec_fill_buffer_wr
//   ec_data_array --> ec_fill_buffer_rd --> [dest allocation] --> exe_* (EC mode)
//   ec_tag_array, ec_controller: look-up, mode and trace-boundary control
//
// The fetch/decode stages, the issue window, the execution units and the
// retire stage are outside this module; their connections are ports:
//   dec_valid/dec_instr/dec_trace_end  a decoded group (up to W, program order)
//                 and whether it ends with a hard-to-predict instruction; it
//                 is accepted when dec_ready is high.  ren_valid/ren_instr is
//                 the same group renamed, in the same cycle.
//   iss_valid/iss_instr  an issue group from the issue window (one issue unit).
//   exe_valid/exe_mask/exe_instr/exe_from_ec  instructions to execute; from
//                 the EC they wait for exe_ready, from the issue window they
//                 are passed straight through.
//   rd_*, wb_*, rt_*  register-file read, write-back and retire ports, by
//                 (architected register, physical tag).
//   mispredict    branch mispredict (or interrupt) found at write back: the
//                 register file rolls back and the current trace ends.
//   pipe_empty    no instruction in flight; arch_next_pc is then the address
//                 of the next instruction in program order.
//   fe_enable     the front end may be powered; fe_restart/fe_restart_pc
//                 restart fetch after a look-up miss.
//   da_bank_en    data-array banks in use this cycle (the rest can be gated).
//
// Rename stalls (a destination slot still speculative) hold dec_ready low; in
// EC mode the same check holds the EC stream.  A whole decode group is renamed
// or stalled together, so a group may write one architected register at most
// NPHYS-1 (3) times; the front end has to split a group that writes it more
// often, or rename would wait for ever.  The retire position of an
// instruction is its index in the retire buffer, which is empty at every trace
// start, so it is counted from zero per trace (mod 64).  Parameter defaults are
// the evaluated configuration: eight-way, 32 registers x 4, a 50 KB 4-way
// 4-bank data array, a 4 KB 4-way tag array, 512-instruction traces, M = 2.
module ec_top
  import ec_pkg::*;
#(
  parameter int W        = ISSUE_W,
  parameter int XLEN     = 64,
  parameter int DA_SETS  = 168,
  parameter int DA_WAYS  = 4,
  parameter int DA_BANKS = 4,
  parameter int TA_SETS  = 64,
  parameter int TA_WAYS  = 4,
  parameter int M        = 2,
  parameter int MAX_LEN  = MAX_TRACE_LEN,
  localparam int NRD     = 2 * W,
  localparam int SW      = (DA_SETS > 1) ? $clog2(DA_SETS) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // decode -> rename
  input  logic [W-1:0]                  dec_valid,
  input  ec_instr_t [W-1:0]             dec_instr,
  input  logic                          dec_trace_end,
  output logic                          dec_ready,
  // rename -> issue window
  output logic [W-1:0]                  ren_valid,
  output ec_instr_t [W-1:0]             ren_instr,
  // issue window -> EC / execution
  input  logic [W-1:0]                  iss_valid,
  input  ec_instr_t [W-1:0]             iss_instr,
  // to the execution units
  output logic                          exe_valid,
  output logic [W-1:0]                  exe_mask,
  output ec_instr_t [W-1:0]             exe_instr,
  output logic                          exe_from_ec,
  input  logic                          exe_ready,
  // register file ports
  input  logic [NRD-1:0][AREG_W-1:0]    rd_arch,
  input  logic [NRD-1:0][PTAG_W-1:0]    rd_tag,
  output logic [NRD-1:0][XLEN-1:0]      rd_data,
  output logic [NRD-1:0]                rd_v,
  input  logic [W-1:0]                  wb_en,
  input  logic [W-1:0][AREG_W-1:0]      wb_arch,
  input  logic [W-1:0][PTAG_W-1:0]      wb_tag,
  input  logic [W-1:0][XLEN-1:0]        wb_data,
  input  logic [W-1:0]                  rt_en,
  input  logic [W-1:0][AREG_W-1:0]      rt_arch,
  input  logic [W-1:0][PTAG_W-1:0]      rt_tag,
  // pipeline status
  input  logic                          mispredict,
  input  logic                          pipe_empty,
  input  logic [PC_W-1:0]               arch_next_pc,
  // front-end control and status
  output logic                          fe_enable,
  output logic                          fe_restart,
  output logic [PC_W-1:0]               fe_restart_pc,
  output mode_e                         mode,
  output logic [DA_BANKS-1:0]           da_bank_en
);

  // ------------------------------------------------------------ wires
  ta_op_e                ta_op;
  logic [PC_W-1:0]       ta_pc;
  logic [SETID_W-1:0]    ta_set_id, ta_rsp_set_id;
  logic [TRACE_ID_W-1:0] ta_trace_id, ta_rsp_trace_id;
  logic                  ta_rsp_valid, ta_rsp_hit, ta_inval_evt;
  logic [MCNT_W-1:0]     ta_rsp_mcnt;

  logic                  bld_start, bld_close, bld_cancel, bld_closed, bld_empty;
  logic [SW-1:0]         bld_set, bld_next_set;
  logic [TRACE_ID_W-1:0] bld_trace_id;
  logic                  bwr_en;
  logic [SW-1:0]         bwr_set;
  ec_block_t             bwr_block;
  logic [9:0]            bld_len;

  logic                  rdr_start, rdr_cancel, rdr_done, rdr_miss;
  logic [SW-1:0]         rdr_set;
  logic [TRACE_ID_W-1:0] rdr_trace_id;
  logic                  da_rd_en, da_rd_first, da_rd_valid, da_rd_hit;
  logic [SW-1:0]         da_rd_set;
  logic [TRACE_ID_W-1:0] da_rd_tid;
  ec_block_t             da_rd_block;
  logic                  ec_valid, ec_ready;
  logic [W-1:0]          ec_mask;
  ec_instr_t [W-1:0]     ec_instr;

  logic                  ren_allow, rf_checkpoint, rf_rollback;
  logic                  ren_fire;
  logic [$clog2(W+1)-1:0] ren_n;

  logic [W-1:0]              rf_valid, rf_wr;
  logic [W-1:0][AREG_W-1:0]  rf_rd, rf_rs1, rf_rs2;
  logic [W-1:0][PTAG_W-1:0]  rf_dst_in, rf_dst, rf_src1, rf_src2;
  logic                      rf_explicit, rf_go, rf_ok;

  logic [RPOS_W-1:0]         rpos_q;

  // ------------------------------------------------------------ rename / allocation
  // Build mode: the decoded group is renamed.  EC mode: the replayed issue
  // unit carries its tags; only its destinations are claimed.
  always_comb begin
    rf_explicit = (mode == M_EC);
    for (int i = 0; i < W; i++) begin
      if (rf_explicit) begin
        rf_valid[i]  = ec_mask[i];
        rf_wr[i]     = ec_instr[i].dec.wr;
        rf_rd[i]     = ec_instr[i].dec.rd;
        rf_rs1[i]    = ec_instr[i].dec.rs1;
        rf_rs2[i]    = ec_instr[i].dec.rs2;
        rf_dst_in[i] = ec_instr[i].ren.dst;
      end else begin
        rf_valid[i]  = dec_valid[i];
        rf_wr[i]     = dec_instr[i].dec.wr;
        rf_rd[i]     = dec_instr[i].dec.rd;
        rf_rs1[i]    = dec_instr[i].dec.rs1;
        rf_rs2[i]    = dec_instr[i].dec.rs2;
        rf_dst_in[i] = '0;
      end
    end
  end

  assign dec_ready = ren_allow && rf_ok && !mispredict;
  assign ren_fire  = dec_ready && (dec_valid != '0);
  assign ec_ready  = rf_explicit && rf_ok && exe_ready && !mispredict;
  assign rf_go     = rf_explicit ? (ec_valid && ec_ready) : ren_fire;

  always_comb begin
    logic [RPOS_W-1:0] rp;
    rp    = rpos_q;
    ren_n = '0;
    for (int i = 0; i < W; i++) begin
      ren_valid[i] = dec_valid[i] && ren_fire;
      ren_instr[i] = dec_instr[i];
      ren_instr[i].ren  = '{dst: rf_dst[i], src1: rf_src1[i], src2: rf_src2[i]};
      ren_instr[i].rpos = rp;
      ren_instr[i].seq  = 1'b0;
      if (dec_valid[i]) begin
        rp    = rp + 1'b1;
        ren_n = ren_n + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         rpos_q <= '0;
    else if (bld_start) rpos_q <= '0;
    else if (ren_fire)  rpos_q <= rpos_q + RPOS_W'(ren_n);
  end

  queue_regfile #(
    .NARCH(NARCH), .NPHYS(NPHYS), .XLEN(XLEN), .W(W), .NRD(NRD), .NWB(W), .NRT(W)
  ) u_rf (
    .clk, .rst_n,
    .ren_valid (rf_valid),  .ren_wr (rf_wr), .ren_rd (rf_rd),
    .ren_rs1 (rf_rs1), .ren_rs2 (rf_rs2),
    .ren_explicit (rf_explicit), .ren_dst_in (rf_dst_in), .ren_go (rf_go),
    .ren_dst (rf_dst), .ren_src1 (rf_src1), .ren_src2 (rf_src2), .ren_ok (rf_ok),
    .rd_arch, .rd_tag, .rd_data, .rd_v,
    .wb_en, .wb_arch, .wb_tag, .wb_data,
    .rt_en, .rt_arch, .rt_tag,
    .rollback (rf_rollback), .checkpoint (rf_checkpoint),
    .idx_all (), .cidx_all (), .s_all (), .pos_all ()
  );

  // ------------------------------------------------------------ execution feed
  always_comb begin
    exe_from_ec = (mode == M_EC);
    if (exe_from_ec) begin
      exe_valid = ec_valid && ec_ready;
      exe_mask  = ec_mask;
      exe_instr = ec_instr;
    end else begin
      exe_valid = (iss_valid != '0);
      exe_mask  = iss_valid;
      exe_instr = iss_instr;
    end
  end

  // ------------------------------------------------------------ EC
  ec_tag_array #(.SETS(TA_SETS), .WAYS(TA_WAYS), .M(M)) u_ta (
    .clk, .rst_n,
    .op (ta_op), .pc (ta_pc), .set_id (ta_set_id), .trace_id (ta_trace_id),
    .rsp_valid (ta_rsp_valid), .rsp_hit (ta_rsp_hit), .rsp_set_id (ta_rsp_set_id),
    .rsp_trace_id (ta_rsp_trace_id), .rsp_mcnt (ta_rsp_mcnt),
    .inval_evt (ta_inval_evt)
  );

  ec_fill_buffer_wr #(.W(W), .SETS(DA_SETS)) u_fbw (
    .clk, .rst_n,
    .start (bld_start), .start_set (bld_set), .trace_id (bld_trace_id),
    .in_valid (iss_valid), .in_instr (iss_instr),
    .close (bld_close), .cancel (bld_cancel),
    .wr_en (bwr_en), .wr_set (bwr_set), .wr_block (bwr_block),
    .closed (bld_closed), .empty (bld_empty), .n_instr (bld_len),
    .next_set (bld_next_set)
  );

  ec_data_array #(.SETS(DA_SETS), .WAYS(DA_WAYS), .BANKS(DA_BANKS)) u_da (
    .clk, .rst_n,
    .rd_en (da_rd_en), .rd_set (da_rd_set), .rd_trace_id (da_rd_tid),
    .rd_first (da_rd_first),
    .rd_valid (da_rd_valid), .rd_hit (da_rd_hit), .rd_block (da_rd_block),
    .wr_en (bwr_en), .wr_set (bwr_set), .wr_block (bwr_block),
    .bank_en (da_bank_en)
  );

  ec_fill_buffer_rd #(.W(W), .SETS(DA_SETS)) u_fbr (
    .clk, .rst_n,
    .start (rdr_start), .start_set (rdr_set), .trace_id (rdr_trace_id),
    .cancel (rdr_cancel),
    .rd_en (da_rd_en), .rd_set (da_rd_set), .rd_trace_id (da_rd_tid),
    .rd_first (da_rd_first),
    .rd_valid (da_rd_valid), .rd_hit (da_rd_hit), .rd_block (da_rd_block),
    .out_valid (ec_valid), .out_mask (ec_mask), .out_instr (ec_instr),
    .out_ready (ec_ready),
    .done (rdr_done), .miss (rdr_miss)
  );

  ec_controller #(.W(W), .SETS(DA_SETS), .MAX_LEN(MAX_LEN)) u_ctl (
    .clk, .rst_n,
    .pipe_empty, .arch_next_pc, .mispredict,
    .ren_fire, .ren_n, .fe_trace_end (dec_trace_end), .ren_allow,
    .fe_enable, .fe_restart, .fe_restart_pc,
    .ta_op, .ta_pc, .ta_set_id, .ta_trace_id,
    .ta_rsp_valid, .ta_rsp_hit, .ta_rsp_set_id, .ta_rsp_trace_id, .ta_inval_evt,
    .bld_start, .bld_set, .bld_trace_id, .bld_close, .bld_cancel,
    .bld_closed, .bld_empty, .bld_next_set,
    .rdr_start, .rdr_set, .rdr_trace_id, .rdr_cancel, .rdr_done, .rdr_miss,
    .rf_checkpoint, .rf_rollback,
    .mode
  );

  // an EC issue unit never mixes with an issue-window group
  assert property (@(posedge clk) disable iff (!rst_n)
    (mode == M_EC) |-> (iss_valid == '0));

endmodule
