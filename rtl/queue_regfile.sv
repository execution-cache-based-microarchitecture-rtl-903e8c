// queue_regfile: the queue-based register file with its rename logic.
//
// NARCH architected registers, each a reg_pool of NPHYS physical registers
// used as a circular queue.  Because each architected register is renamed
// only inside its own pool, in a fixed order, the rename result of a trace
// depends only on the trace itself, provided every trace starts with all
// IDX = 0.  The execution cache can therefore store renamed instructions and
// replay them without renaming again.
//
// Rename (combinational, applied on the clock edge when ren_go is high and
// ren_ok is reported):
//   * a source gets the current IDX of its architected register, taking into
//     account writes by older slots of the same group;
//   * a destination gets IDX + 1 (mod NPHYS), or, with ren_explicit set, the
//     tag carried by the instruction (instructions replayed from the EC);
//   * if any destination slot is not free (its S bit is set, or it holds the
//     last committed value) the whole group stalls: ren_ok = 0 and nothing
//     changes.
// Read ports select the physical entry by (architected register, tag) and
// return its value and V bit.  Write-back ports set V; retire ports clear S.
// rollback and checkpoint act on every pool at once (see reg_pool).
//
// Sizes follow the evaluated configuration: 32 architected registers with 4
// physical registers each, eight-way rename.  The 64-bit data width, 16 read
// ports (two per issued instruction) and all-or-nothing stall of a rename
// group are own choices.
module queue_regfile #(
  parameter int NARCH = 32,
  parameter int NPHYS = 4,
  parameter int XLEN  = 64,
  parameter int W     = 8,    // rename / allocation width
  parameter int NRD   = 16,   // register read ports
  parameter int NWB   = 8,    // write-back ports
  parameter int NRT   = 8,    // retire ports
  localparam int AW   = $clog2(NARCH),
  localparam int TW   = (NPHYS > 1) ? $clog2(NPHYS) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // rename / allocation
  input  logic [W-1:0]              ren_valid,
  input  logic [W-1:0]              ren_wr,
  input  logic [W-1:0][AW-1:0]      ren_rd,
  input  logic [W-1:0][AW-1:0]      ren_rs1,
  input  logic [W-1:0][AW-1:0]      ren_rs2,
  input  logic                      ren_explicit,
  input  logic [W-1:0][TW-1:0]      ren_dst_in,
  input  logic                      ren_go,
  output logic [W-1:0][TW-1:0]      ren_dst,
  output logic [W-1:0][TW-1:0]      ren_src1,
  output logic [W-1:0][TW-1:0]      ren_src2,
  output logic                      ren_ok,
  // operand reads
  input  logic [NRD-1:0][AW-1:0]    rd_arch,
  input  logic [NRD-1:0][TW-1:0]    rd_tag,
  output logic [NRD-1:0][XLEN-1:0]  rd_data,
  output logic [NRD-1:0]            rd_v,
  // write back
  input  logic [NWB-1:0]            wb_en,
  input  logic [NWB-1:0][AW-1:0]    wb_arch,
  input  logic [NWB-1:0][TW-1:0]    wb_tag,
  input  logic [NWB-1:0][XLEN-1:0]  wb_data,
  // retire
  input  logic [NRT-1:0]            rt_en,
  input  logic [NRT-1:0][AW-1:0]    rt_arch,
  input  logic [NRT-1:0][TW-1:0]    rt_tag,
  // recovery and trace boundary
  input  logic                      rollback,
  input  logic                      checkpoint,
  // state, for observation
  output logic [NARCH-1:0][TW-1:0]  idx_all,
  output logic [NARCH-1:0][TW-1:0]  cidx_all,
  output logic [NARCH-1:0][NPHYS-1:0] s_all,
  output logic [NARCH-1:0][NPHYS-1:0][TW-1:0] pos_all
);

  logic [NARCH-1:0][NPHYS-1:0]            free_all;
  logic [NARCH-1:0][NPHYS-1:0][XLEN-1:0]  val_all;
  logic [NARCH-1:0][NPHYS-1:0]            v_all;

  // ---------------------------------------------------------------- rename
  logic [NARCH-1:0][TW-1:0]    idx_l;
  logic [NARCH-1:0][NPHYS-1:0] used_l;
  logic [TW-1:0]               t;

  always_comb begin
    idx_l  = idx_all;
    used_l = '0;
    ren_ok = 1'b1;
    t      = '0;
    for (int s = 0; s < W; s++) begin
      ren_src1[s] = idx_l[ren_rs1[s]];
      ren_src2[s] = idx_l[ren_rs2[s]];
      ren_dst[s]  = '0;
      if (ren_valid[s] && ren_wr[s]) begin
        t = ren_explicit ? ren_dst_in[s] : TW'(idx_l[ren_rd[s]] + 1'b1);
        if (!free_all[ren_rd[s]][t] || used_l[ren_rd[s]][t])
          ren_ok = 1'b0;
        used_l[ren_rd[s]][t] = 1'b1;
        idx_l[ren_rd[s]]     = t;
        ren_dst[s]           = t;
      end
    end
  end

  // ---------------------------------------------------------------- pools
  for (genvar r = 0; r < NARCH; r++) begin : g_pool
    logic [W-1:0]           a_en;
    logic [W-1:0][TW-1:0]   a_tag;
    logic [NWB-1:0]         w_en;
    logic [NRT-1:0]         r_en;

    always_comb begin
      for (int s = 0; s < W; s++) begin
        a_en[s]  = ren_go && ren_ok && ren_valid[s] && ren_wr[s] &&
                   (ren_rd[s] == AW'(r));
        a_tag[s] = ren_dst[s];
      end
      for (int w = 0; w < NWB; w++) w_en[w] = wb_en[w] && (wb_arch[w] == AW'(r));
      for (int k = 0; k < NRT; k++) r_en[k] = rt_en[k] && (rt_arch[k] == AW'(r));
    end

    reg_pool #(.NPHYS(NPHYS), .XLEN(XLEN), .NA(W), .NWB(NWB), .NRT(NRT)) u_pool (
      .clk        (clk),
      .rst_n      (rst_n),
      .alloc_en   (a_en),
      .alloc_tag  (a_tag),
      .wb_en      (w_en),
      .wb_tag     (wb_tag),
      .wb_data    (wb_data),
      .rt_en      (r_en),
      .rt_tag     (rt_tag),
      .rollback   (rollback),
      .checkpoint (checkpoint),
      .idx        (idx_all[r]),
      .cidx       (cidx_all[r]),
      .tag_free   (free_all[r]),
      .val_by_tag (val_all[r]),
      .v_by_tag   (v_all[r]),
      .s_by_tag   (s_all[r]),
      .pos_q      (pos_all[r])
    );
  end

  // ---------------------------------------------------------------- reads
  always_comb begin
    for (int k = 0; k < NRD; k++) begin
      rd_data[k] = val_all[rd_arch[k]][rd_tag[k]];
      rd_v[k]    = v_all[rd_arch[k]][rd_tag[k]];
    end
  end

  // a pool must never hand out its committed slot
  for (genvar r = 0; r < NARCH; r++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
      !free_all[r][cidx_all[r]]);
  end

endmodule
