// reg_pool: one architected register of the queue register file.
//
// Each architected register owns a small circular queue of NPHYS physical
// registers.  Renaming never leaves the pool: the k-th write after a trace
// start goes to logical slot k (mod NPHYS), so the renaming of a trace is the
// same every time the trace starts with IDX = 0, and renaming bits recorded in
// the execution cache stay valid for every later execution of the trace.
//
// Every physical entry p holds a value, a POS tag (its logical position in the
// queue), a V bit (value has been written back) and an S bit (value is
// speculative, i.e. its producer has not retired).  All accesses are by
// logical tag: the entry whose POS equals the tag is selected, so the queue can
// be "rotated" without moving data.  IDX is the logical position of the most
// recently allocated entry.  At the end of a trace, the checkpoint XORs every
// POS with IDX: the entry that holds the newest value gets POS = 0 and IDX
// returns to 0, which is the state every trace expects at its start.
//
// Interface (all updates on the rising clock edge, reads are combinational):
//   alloc_en/alloc_tag  mark a logical slot as the destination of a new
//                       instruction: S set, V cleared, IDX moved to the tag.
//                       Several slots may be allocated in one cycle; the last
//                       enabled one becomes IDX.
//   wb_en/wb_tag/wb_data  write a result, set V.
//   rt_en/rt_tag        retire the producer of a slot: S cleared, the slot
//                       becomes the last committed value.
//   rollback            mispredict/interrupt: IDX returns to the last committed
//                       slot and all S bits are cleared (every in-flight
//                       instruction is squashed).
//   checkpoint          POS ^= IDX for every entry, IDX and committed index
//                       return to 0.
//   tag_free[t]         logical slot t may be allocated: its S bit is clear
//                       and it is not the last committed value.
//
// Follows the published structure: circular queue, POS tags initialised to
// 0..N-1, V/S bits, IDX incremented per write, XOR checkpoint, rollback to the
// last committed value.  Own choices: the committed slot is never handed out
// again (this keeps the "at least one committed value" rule), a rollback
// squashes all in-flight writers of the register, and the reset value is 0
// with V set.
module reg_pool #(
  parameter int NPHYS = 4,
  parameter int XLEN  = 64,
  parameter int NA    = 8,   // allocation slots per cycle
  parameter int NWB   = 8,   // write-back ports
  parameter int NRT   = 8,   // retire ports
  localparam int TW   = (NPHYS > 1) ? $clog2(NPHYS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NA-1:0]            alloc_en,
  input  logic [NA-1:0][TW-1:0]    alloc_tag,
  input  logic [NWB-1:0]           wb_en,
  input  logic [NWB-1:0][TW-1:0]   wb_tag,
  input  logic [NWB-1:0][XLEN-1:0] wb_data,
  input  logic [NRT-1:0]           rt_en,
  input  logic [NRT-1:0][TW-1:0]   rt_tag,
  input  logic                     rollback,
  input  logic                     checkpoint,
  output logic [TW-1:0]            idx,
  output logic [TW-1:0]            cidx,
  output logic [NPHYS-1:0]         tag_free,
  output logic [NPHYS-1:0][XLEN-1:0] val_by_tag,
  output logic [NPHYS-1:0]         v_by_tag,
  output logic [NPHYS-1:0]         s_by_tag,
  output logic [NPHYS-1:0][TW-1:0] pos_q
);
  logic [NPHYS-1:0][XLEN-1:0] val_q;
  logic [NPHYS-1:0]           v_q, s_q;
  logic [TW-1:0]              idx_q, cidx_q;

  // logical tag -> one-hot physical entry ("Select Physical Register")
  logic [NPHYS-1:0][NPHYS-1:0] sel;
  always_comb begin
    for (int t = 0; t < NPHYS; t++)
      for (int p = 0; p < NPHYS; p++)
        sel[t][p] = (pos_q[p] == TW'(t));
  end

  always_comb begin
    for (int t = 0; t < NPHYS; t++) begin
      val_by_tag[t] = '0;
      v_by_tag[t]   = 1'b0;
      s_by_tag[t]   = 1'b0;
      for (int p = 0; p < NPHYS; p++)
        if (sel[t][p]) begin
          val_by_tag[t] = val_q[p];
          v_by_tag[t]   = v_q[p];
          s_by_tag[t]   = s_q[p];
        end
      tag_free[t] = !s_by_tag[t] && (TW'(t) != cidx_q);
    end
  end

  assign idx  = idx_q;
  assign cidx = cidx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPHYS; p++) begin
        pos_q[p] <= TW'(p);
        val_q[p] <= '0;
      end
      v_q    <= '1;
      s_q    <= '0;
      idx_q  <= '0;
      cidx_q <= '0;
    end else if (rollback) begin
      idx_q <= cidx_q;
      s_q   <= '0;
      // squashed writers will never write back: their slots read as stale
      for (int p = 0; p < NPHYS; p++)
        if (s_q[p]) v_q[p] <= 1'b1;
    end else if (checkpoint) begin
      for (int p = 0; p < NPHYS; p++)
        pos_q[p] <= pos_q[p] ^ idx_q;
      idx_q  <= '0;
      cidx_q <= cidx_q ^ idx_q;
    end else begin
      for (int a = 0; a < NA; a++)
        if (alloc_en[a]) begin
          idx_q <= alloc_tag[a];
          for (int p = 0; p < NPHYS; p++)
            if (sel[alloc_tag[a]][p]) begin
              s_q[p] <= 1'b1;
              v_q[p] <= 1'b0;
            end
        end
      for (int w = 0; w < NWB; w++)
        if (wb_en[w])
          for (int p = 0; p < NPHYS; p++)
            if (sel[wb_tag[w]][p]) begin
              val_q[p] <= wb_data[w];
              v_q[p]   <= 1'b1;
            end
      for (int r = 0; r < NRT; r++)
        if (rt_en[r]) begin
          cidx_q <= rt_tag[r];
          for (int p = 0; p < NPHYS; p++)
            if (sel[rt_tag[r]][p]) s_q[p] <= 1'b0;
        end
    end
  end

endmodule
