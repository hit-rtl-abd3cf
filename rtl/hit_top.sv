// hit_top: HiT, a sparsity-adaptive FP32 matrix multiplication accelerator.
//
// N_CLUSTERS Compute Clusters (4) of NROWS Compute Rows (32), each Row with 4
// Compute Groups of 32 multipliers and 32 adders: 16384 FP32 MACs at the
// default size, with a 16 MB multi-banked Global Memory (4 MB per Cluster)
// and a 12 KiB Local Buffer per Row. One of three dataflows is selected by
// the host through config_ctrl:
//   HSparse (highly sparse A): outer product; A column tiles per Row, psums
//     routed over the per-Cluster rings to the Row owning the C row and
//     accumulated there (compressed binned storage for HS x HS, direct
//     storage otherwise).
//   MSparse (moderately sparse): outer product; A row tiles per Row, B groups
//     broadcast to all Rows of a Cluster, psums accumulated in the same Row.
//   Dense: the Rows of all Clusters form a 128-deep weight-stationary
//     systolic array; C rows leave the last Row on dense_valid/dense_out.
// Host interface: write the Global Memory (refill port), the Row and
// broadcast descriptors, select the mode, pulse start, wait for done, then
// read the Local Buffers through the drain port and collect spilled psums
// from the spill port. All ports are synchronous to clk; rst_n is an
// asynchronous active-low reset.
module hit_top
  import hit_pkg::*;
#(
  parameter int unsigned N_CLUSTERS = 4,
  parameter int unsigned NROWS      = 32,
  parameter int unsigned CW  = (N_CLUSTERS > 1) ? $clog2(N_CLUSTERS) : 1,
  parameter int unsigned RSW = (NROWS > 1) ? $clog2(NROWS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // dataflow selection
  input  logic              cfg_valid,
  input  mode_e             cfg_mode,
  output logic              cfg_busy,
  // descriptors
  input  logic              desc_wr,
  input  logic [CW-1:0]     desc_cluster,
  input  logic [RSW-1:0]    desc_row,
  input  desc_t             desc,
  input  logic              bdesc_wr,
  input  logic [CW-1:0]     bdesc_cluster,
  input  bdesc_t            bdesc,
  // run
  input  logic              start,
  output logic              done,
  // Global Memory refill (HBM side)
  input  logic                        gm_wr_en,
  input  logic [CW-1:0]               gm_wr_cluster,
  input  logic [$clog2(4*NROWS)-1:0]  gm_wr_bank,
  input  logic [GM_AW-1:0]            gm_wr_addr,
  input  logic [BANK_W-1:0]           gm_wr_data,
  // Local Buffer drain
  input  logic                        drain_en,
  input  logic [CW-1:0]               drain_cluster,
  input  logic [RSW-1:0]              drain_row,
  input  logic [LB_ROW_W-1:0]         drain_addr,
  output lb_entry_t [LB_ENTRIES-1:0]  drain_data,
  // overflow spill
  output logic              spill_valid,
  output logic [CW-1:0]     spill_cluster,
  output pvec_t             spill_vec,
  input  logic              spill_ready,
  // dense results from the last Row
  output logic [NGROUP-1:0]                  dense_valid,
  output logic [NGROUP-1:0][NMULT-1:0][31:0] dense_out,
  output evt_t              evt
);
  localparam int unsigned ROWW = $clog2(N_CLUSTERS * NROWS + 1);

  gate_t gate;
  mode_e mode;
  logic  lb_clear, switched;

  config_ctrl u_cfg (
    .clk, .rst_n, .cfg_valid, .cfg_mode, .busy(cfg_busy), .mode, .gate,
    .lb_clear, .switched);

  logic [N_CLUSTERS:0][NGROUP-1:0][NMULT-1:0][31:0] ps;
  logic [N_CLUSTERS-1:0][NGROUP-1:0]                ps_v;
  logic  [N_CLUSTERS-1:0] c_done, c_sp_valid, c_sp_ready;
  pvec_t [N_CLUSTERS-1:0] c_sp_vec;
  lb_entry_t [N_CLUSTERS-1:0][LB_ENTRIES-1:0] c_drain;
  evt_t  [N_CLUSTERS-1:0] c_evt;
  logic  [CW-1:0]         drain_sel;

  assign ps[0] = '0;

  for (genvar c = 0; c < N_CLUSTERS; c++) begin : g_cl
    compute_cluster #(.NROWS(NROWS), .ROWW(ROWW)) u_cl (
      .clk, .rst_n, .gate, .lb_clear, .first_row_id(ROWW'(c * NROWS)),
      .desc_wr(desc_wr && desc_cluster == CW'(c)), .desc_row, .desc_in(desc),
      .bdesc_wr(bdesc_wr && bdesc_cluster == CW'(c)), .bdesc_in(bdesc),
      .start, .done(c_done[c]),
      .gm_wr_en(gm_wr_en && gm_wr_cluster == CW'(c)), .gm_wr_bank, .gm_wr_addr, .gm_wr_data,
      .psum_in(ps[c]), .psum_out_valid(ps_v[c]), .psum_out(ps[c+1]),
      .spill_valid(c_sp_valid[c]), .spill_vec(c_sp_vec[c]), .spill_ready(c_sp_ready[c]),
      .drain_en(drain_en && drain_cluster == CW'(c)), .drain_row, .drain_addr,
      .drain_data(c_drain[c]), .evt(c_evt[c]));
  end

  assign dense_out   = ps[N_CLUSTERS];
  assign dense_valid = ps_v[N_CLUSTERS-1];

  always_comb begin
    spill_valid   = 1'b0;
    spill_cluster = '0;
    spill_vec     = c_sp_vec[0];
    c_sp_ready    = '0;
    for (int c = N_CLUSTERS - 1; c >= 0; c--) begin
      if (c_sp_valid[c]) begin
        spill_valid   = 1'b1;
        spill_cluster = CW'(c);
        spill_vec     = c_sp_vec[c];
      end
    end
    for (int c = 0; c < N_CLUSTERS; c++) begin
      if (c_sp_valid[c]) begin
        c_sp_ready[c] = spill_ready;
        break;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        drain_sel <= '0;
    else if (drain_en) drain_sel <= drain_cluster;
  end
  assign drain_data = c_drain[drain_sel];

  always_comb begin
    evt = '0;
    for (int c = 0; c < N_CLUSTERS; c++) evt = evt | c_evt[c];
    evt.mode_switch = switched;
  end

  // a run is only started with a settled configuration
  a_start_cfg : assert property (@(posedge clk) disable iff (!rst_n) start |-> !cfg_busy);

  assign done = (&c_done) && !cfg_busy;
endmodule
