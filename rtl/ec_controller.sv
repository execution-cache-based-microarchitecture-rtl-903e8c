// ec_controller: operating-mode control of the execution-cache processor.
//
// The processor runs either in trace-build mode (front end on, instructions
// renamed and issued normally and copied into the fill buffer) or in EC mode
// (front end off, issue units replayed from the execution cache straight into
// the execution units).  Between two traces the controller always goes through
// the same steps:
//   M_DRAIN  wait until the pipeline holds no instruction of the old trace.  A
//            finished build is closed (last block written) and recorded in the
//            tag array; a replayed trace updates its mispredict count (cleared
//            on a clean end, incremented on a mispredict, the trace dropped when
//            a block was missing).
//   M_CKPT   register-file checkpoint (every POS ^= IDX) and, in the same cycle,
//            the tag-array look-up of the address where execution continues.
//   M_LRESP  look-up result: on a hit start replaying (M_EC), on a miss restart
//            the front end at that address and start building (M_BUILD).
// A trace being built ends after a hard-to-predict instruction (fe_trace_end),
// when it reaches MAX_LEN instructions, or on a mispredict; a built trace
// that saw a mispredict is dropped, because wrong-path instructions may already
// be in it.  A replayed trace ends at its end-of-trace block, on a mispredict,
// or when one of its blocks has been evicted.
//
// Follows the published flow (build in parallel with issue, look-up at trace
// end, front-end restart on a miss, checkpoint before the next trace, trace
// dropped after M consecutive mispredicts, 512-instruction maximum).  Own
// choices: the drop of a build that saw a mispredict, the start set of a new
// trace (the set after the previous built trace), trace ids from a counter,
// the single-cycle states, and a look-up that starts only after the drain
// (the look-up is not started early).  rdr_set/rdr_trace_id are the tag-array
// answer passed on unchanged, and rf_rollback is the mispredict input itself:
// these outputs are wires, kept so that all trace-boundary control leaves
// from one module.
module ec_controller
  import ec_pkg::*;
#(
  parameter int W       = 8,
  parameter int SETS    = 168,
  parameter int MAX_LEN = MAX_TRACE_LEN,
  localparam int SW     = (SETS > 1) ? $clog2(SETS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // pipeline status
  input  logic                  pipe_empty,
  input  logic [PC_W-1:0]       arch_next_pc,
  input  logic                  mispredict,
  // rename stage
  input  logic                  ren_fire,
  input  logic [$clog2(W+1)-1:0] ren_n,
  input  logic                  fe_trace_end,
  output logic                  ren_allow,
  // front end
  output logic                  fe_enable,
  output logic                  fe_restart,
  output logic [PC_W-1:0]       fe_restart_pc,
  // tag array
  output ta_op_e                ta_op,
  output logic [PC_W-1:0]       ta_pc,
  output logic [SETID_W-1:0]    ta_set_id,
  output logic [TRACE_ID_W-1:0] ta_trace_id,
  input  logic                  ta_rsp_valid,
  input  logic                  ta_rsp_hit,
  input  logic [SETID_W-1:0]    ta_rsp_set_id,
  input  logic [TRACE_ID_W-1:0] ta_rsp_trace_id,
  input  logic                  ta_inval_evt,
  // fill buffer, build side
  output logic                  bld_start,
  output logic [SW-1:0]         bld_set,
  output logic [TRACE_ID_W-1:0] bld_trace_id,
  output logic                  bld_close,
  output logic                  bld_cancel,
  input  logic                  bld_closed,
  input  logic                  bld_empty,
  input  logic [SW-1:0]         bld_next_set,
  // fill buffer, replay side
  output logic                  rdr_start,
  output logic [SW-1:0]         rdr_set,
  output logic [TRACE_ID_W-1:0] rdr_trace_id,
  output logic                  rdr_cancel,
  input  logic                  rdr_done,
  input  logic                  rdr_miss,
  // register file
  output logic                  rf_checkpoint,
  output logic                  rf_rollback,
  // status
  output mode_e                 mode
);

  typedef enum logic [2:0] {
    E_NONE    = 3'd0,   // nothing to record (reset)
    E_BUILT   = 3'd1,   // build ended normally: close and insert
    E_DROP    = 3'd2,   // build saw a mispredict: discard
    E_OK      = 3'd3,   // replay ran to its end
    E_MISP    = 3'd4,   // replay left on a mispredict
    E_MISS    = 3'd5    // replay found a block missing
  } end_e;

  mode_e                 mode_q;
  end_e                  end_q;
  logic                  close_sent_q;
  logic [PC_W-1:0]       tpc_q;       // start address of the current trace
  logic [TRACE_ID_W-1:0] tid_q, next_tid_q;
  logic [SW-1:0]         next_set_q;
  logic [9:0]            len_q;
  logic [SW-1:0]         bstart_q;    // set the trace being built starts in

  assign mode        = mode_q;
  assign rf_rollback = mispredict;
  assign fe_enable   = (mode_q == M_BUILD) ||
                       (mode_q == M_DRAIN && end_q inside {E_BUILT, E_DROP});
  assign ren_allow   = (mode_q == M_BUILD) && (32'(len_q) + W <= MAX_LEN);

  always_comb begin
    ta_op         = TA_NOP;
    ta_pc         = tpc_q;
    ta_set_id     = SETID_W'(0);
    ta_trace_id   = tid_q;
    bld_start     = 1'b0;
    bld_set       = next_set_q;
    bld_trace_id  = next_tid_q;
    bld_close     = 1'b0;
    bld_cancel    = 1'b0;
    rdr_start     = 1'b0;
    rdr_set       = SW'(ta_rsp_set_id);
    rdr_trace_id  = ta_rsp_trace_id;
    rdr_cancel    = 1'b0;
    rf_checkpoint = 1'b0;
    fe_restart    = 1'b0;
    fe_restart_pc = tpc_q;
    unique case (mode_q)
      M_DRAIN: begin
        if (mispredict) begin
          bld_cancel = (end_q == E_BUILT);
          rdr_cancel = 1'b1;
        end else if (pipe_empty) begin
          unique case (end_q)
            E_BUILT: begin
              bld_close = !close_sent_q;
              if (bld_closed && !bld_empty) begin
                ta_op     = TA_INSERT;
                ta_set_id = SETID_W'(bstart_q);
              end
            end
            E_OK:   ta_op = TA_SUCCESS;
            E_MISP: ta_op = TA_MISPRED;
            E_MISS: ta_op = TA_INVAL;
            default: ;
          endcase
        end
      end
      M_CKPT: begin
        rf_checkpoint = 1'b1;
        ta_op         = TA_LOOKUP;
        ta_pc         = arch_next_pc;
      end
      M_LRESP: begin
        if (ta_rsp_valid && ta_rsp_hit) begin
          rdr_start = 1'b1;
        end else if (ta_rsp_valid) begin
          bld_start  = 1'b1;
          fe_restart = 1'b1;
        end
      end
      M_BUILD: if (mispredict) bld_cancel = 1'b1;
      M_EC:    if (mispredict) rdr_cancel = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q       <= M_DRAIN;
      end_q        <= E_NONE;
      close_sent_q <= 1'b0;
      tpc_q        <= '0;
      tid_q        <= '0;
      next_tid_q   <= TRACE_ID_W'(1);
      next_set_q   <= '0;
      bstart_q     <= '0;
      len_q        <= '0;
    end else begin
      unique case (mode_q)
        M_DRAIN: begin
          if (mispredict) begin
            if (end_q == E_BUILT) end_q <= E_DROP;
            if (end_q == E_OK)    end_q <= E_MISP;
          end else if (pipe_empty) begin
            if (end_q == E_BUILT) begin
              close_sent_q <= 1'b1;
              if (bld_closed) begin
                next_set_q <= bld_next_set;
                mode_q     <= M_CKPT;
              end
            end else begin
              mode_q <= M_CKPT;
            end
          end
        end
        M_CKPT: begin
          tpc_q  <= arch_next_pc;
          mode_q <= M_LRESP;
        end
        M_LRESP: if (ta_rsp_valid) begin
          if (ta_rsp_hit) begin
            tid_q  <= ta_rsp_trace_id;
            end_q  <= E_OK;
            mode_q <= M_EC;
          end else begin
            tid_q        <= next_tid_q;
            next_tid_q   <= next_tid_q + 1'b1;
            bstart_q     <= next_set_q;
            len_q        <= '0;
            end_q        <= E_BUILT;
            close_sent_q <= 1'b0;
            mode_q       <= M_BUILD;
          end
        end
        M_BUILD: begin
          if (ren_fire) len_q <= len_q + 10'(ren_n);
          if (mispredict) begin
            end_q  <= E_DROP;
            mode_q <= M_DRAIN;
          end else if ((ren_fire && fe_trace_end) || !ren_allow) begin
            mode_q <= M_DRAIN;
          end
        end
        M_EC: begin
          if (mispredict) begin
            end_q  <= E_MISP;
            mode_q <= M_DRAIN;
          end else if (rdr_miss) begin
            end_q  <= E_MISS;
            mode_q <= M_DRAIN;
          end else if (rdr_done) begin
            end_q  <= E_OK;
            mode_q <= M_DRAIN;
          end
        end
        default: mode_q <= M_DRAIN;
      endcase
    end
  end

endmodule
