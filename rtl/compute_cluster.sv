// compute_cluster: one Compute Cluster: NROWS Compute Rows (32 by default),
// the Cluster's Global Memory and the MSparse B broadcaster.
//
// Wiring:
//  * 4 rings, one per Group index: Row r's down link feeds Row r+1's up
//    input and Row r's up link feeds Row r-1's down input, the last and first
//    Rows closing the ring. Free-entry counts travel back beside each link.
//  * every Row has its dedicated Global Memory channel; the broadcaster has
//    the broadcast channel and sees the AND of all Rows' need_next.
//  * dense mode: partial sums enter Row 0 from the previous Cluster and leave
//    the last Row towards the next Cluster, so the Clusters form one column
//    of 4 x NROWS Rows.
//  * overflow spills of the Rows are merged (lowest Row first) onto one port;
//    the Local Buffer drain port reads the row of the selected Row one cycle
//    after drain_en.
// done is high when every Row and the broadcaster have finished.
module compute_cluster
  import hit_pkg::*;
#(
  parameter int unsigned NROWS = 32,
  parameter int unsigned ROWW  = 8,
  parameter int unsigned RSW   = (NROWS > 1) ? $clog2(NROWS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  gate_t             gate,
  input  logic              lb_clear,
  input  logic [ROWW-1:0]   first_row_id,   // global index of Row 0
  // host set-up
  input  logic              desc_wr,
  input  logic [RSW-1:0]    desc_row,
  input  desc_t             desc_in,
  input  logic              bdesc_wr,
  input  bdesc_t            bdesc_in,
  input  logic              start,
  output logic              done,
  // Global Memory refill
  input  logic                        gm_wr_en,
  input  logic [$clog2(4*NROWS)-1:0]  gm_wr_bank,
  input  logic [GM_AW-1:0]            gm_wr_addr,
  input  logic [BANK_W-1:0]           gm_wr_data,
  // dense chain
  input  logic [NGROUP-1:0][NMULT-1:0][31:0] psum_in,
  output logic [NGROUP-1:0]                  psum_out_valid,
  output logic [NGROUP-1:0][NMULT-1:0][31:0] psum_out,
  // spill
  output logic              spill_valid,
  output pvec_t             spill_vec,
  input  logic              spill_ready,
  // drain
  input  logic              drain_en,
  input  logic [RSW-1:0]    drain_row,
  input  logic [LB_ROW_W-1:0] drain_addr,
  output lb_entry_t [LB_ENTRIES-1:0] drain_data,
  output evt_t              evt
);
  bdesc_t bdesc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        bdesc <= '0;
    else if (bdesc_wr) bdesc <= bdesc_in;
  end

  // memory channels
  logic [NROWS-1:0]             rd_req, rd_gnt;
  logic [NROWS-1:0][GM_AW-1:0]  rd_addr;
  logic [NROWS-1:0][LINE_W-1:0] rd_data;
  logic                         bgm_req;
  logic [4:0]                   bgm_grp;
  logic [GM_AW-1:0]             bgm_addr;
  logic [LINE_W-1:0]            bgm_data;

  global_memory #(.NROWS(NROWS)) u_gm (
    .clk, .rst_n, .wr_en(gm_wr_en), .wr_bank(gm_wr_bank), .wr_addr(gm_wr_addr),
    .wr_data(gm_wr_data), .rd_req, .rd_addr, .rd_gnt, .rd_data,
    .bc_req(bgm_req), .bc_grp(bgm_grp), .bc_addr(bgm_addr), .bc_data(bgm_data));

  // broadcast
  logic             bc_valid, bc_new, bc_done, sync_evt;
  coo_t [NB-1:0]    bc_b;
  logic [IDX_W-1:0] bc_hi;
  logic [NROWS-1:0] need_next, r_done;

  b_broadcast u_bcast (
    .clk, .rst_n, .en(gate.bcast_en), .start, .desc(bdesc), .all_need(&need_next),
    .gm_req(bgm_req), .gm_grp(bgm_grp), .gm_addr(bgm_addr), .gm_data(bgm_data),
    .bc_valid, .bc_new, .bc_done, .bc_b, .bc_hi, .sync_evt);

  // rings
  logic  [NROWS-1:0][NGROUP-1:0]      up_in_valid, dn_in_valid, dn_out_valid, up_out_valid;
  pvec_t [NROWS-1:0][NGROUP-1:0]      up_in_vec, dn_in_vec, dn_out_vec, up_out_vec;
  logic  [NROWS-1:0][NGROUP-1:0][2:0] up_in_free, dn_in_free, dn_nb_free, up_nb_free;
  // dense chain
  logic [NROWS:0][NGROUP-1:0][NMULT-1:0][31:0] ps;
  logic [NROWS-1:0][NGROUP-1:0]                ps_v;
  // spill and drain
  logic  [NROWS-1:0]               sp_valid, sp_ready;
  pvec_t [NROWS-1:0]               sp_vec;
  lb_entry_t [NROWS-1:0][LB_ENTRIES-1:0] dr_data;
  evt_t  [NROWS-1:0]               r_evt;
  logic  [RSW-1:0]                 drain_sel;

  assign ps[0] = psum_in;

  for (genvar r = 0; r < NROWS; r++) begin : g_row
    localparam int unsigned RN = (r + 1) % NROWS;          // Row below
    localparam int unsigned RP = (r + NROWS - 1) % NROWS;  // Row above
    assign up_in_valid[r] = dn_out_valid[RP];
    assign up_in_vec[r]   = dn_out_vec[RP];
    assign dn_in_valid[r] = up_out_valid[RN];
    assign dn_in_vec[r]   = up_out_vec[RN];
    assign dn_nb_free[r]  = up_in_free[RN];
    assign up_nb_free[r]  = dn_in_free[RP];

    compute_row #(.NROWS(NROWS), .ROWW(ROWW)) u_row (
      .clk, .rst_n, .gate, .lb_clear,
      .my_row($clog2(NROWS+1)'(r)), .row_id(first_row_id + ROWW'(r)),
      .desc_wr(desc_wr && desc_row == RSW'(r)), .desc_in, .start, .done(r_done[r]),
      .rd_req(rd_req[r]), .rd_addr(rd_addr[r]), .rd_gnt(rd_gnt[r]), .rd_data(rd_data[r]),
      .bc_valid, .bc_new, .bc_done, .bc_b, .bc_hi, .need_next(need_next[r]),
      .up_in_valid(up_in_valid[r]), .up_in_vec(up_in_vec[r]), .up_in_free(up_in_free[r]),
      .dn_in_valid(dn_in_valid[r]), .dn_in_vec(dn_in_vec[r]), .dn_in_free(dn_in_free[r]),
      .dn_out_valid(dn_out_valid[r]), .dn_out_vec(dn_out_vec[r]), .dn_nb_free(dn_nb_free[r]),
      .up_out_valid(up_out_valid[r]), .up_out_vec(up_out_vec[r]), .up_nb_free(up_nb_free[r]),
      .psum_in(ps[r]), .psum_out_valid(ps_v[r]), .psum_out(ps[r+1]),
      .spill_valid(sp_valid[r]), .spill_vec(sp_vec[r]), .spill_ready(sp_ready[r]),
      .drain_en(drain_en && drain_row == RSW'(r)), .drain_addr, .drain_data(dr_data[r]),
      .evt(r_evt[r]));
  end

  assign psum_out       = ps[NROWS];
  assign psum_out_valid = ps_v[NROWS-1];

  always_comb begin
    spill_valid = 1'b0;
    spill_vec   = sp_vec[0];
    sp_ready    = '0;
    for (int r = NROWS - 1; r >= 0; r--) begin
      if (sp_valid[r]) begin
        spill_valid = 1'b1;
        spill_vec   = sp_vec[r];
      end
    end
    for (int r = 0; r < NROWS; r++) begin
      if (sp_valid[r]) begin
        sp_ready[r] = spill_ready;
        break;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        drain_sel <= '0;
    else if (drain_en) drain_sel <= drain_row;
  end
  assign drain_data = dr_data[drain_sel];

  always_comb begin
    evt = '0;
    for (int r = 0; r < NROWS; r++) evt = evt | r_evt[r];
    evt.bcast_sync = sync_evt;
  end

  assign done = (&r_done) && (!gate.bcast_en || bc_done);
endmodule
