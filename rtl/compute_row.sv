// compute_row: one Compute Row: a stream controller, 4 Compute Groups (128
// multipliers and 128 adders), the multi-banked Local Buffer and the
// arbitration around it.
//
// The stream controller issues one beat per cycle: up to 4 A elements (one
// per Group) and a shared group of 64 B elements; a beat is issued only when
// all 4 PIDUs can take it. Each Group reaches the Local Buffer through its
// own port; when two Groups want the same Local Buffer row in one cycle the
// lower-numbered Group goes first and the other waits (a DMAccum stall).
// Overflowed psum vectors of the 4 Groups are drained one per cycle, lowest
// Group first, to the Row's spill port (to Global Memory for a later
// accumulation pass). Dense mode: the stationary weights come from the
// stream controller, the A value passes Group 0 -> 3 one cycle apart, and the
// 4 x 32 partial sums enter from the Row above and leave, registered, to the
// Row below. The ring ports of the 4 routers are brought out per Group.
// The Row holds its stream descriptor, written by the host before 'start'.
module compute_row
  import hit_pkg::*;
#(
  parameter int unsigned NROWS = 32,   // Rows on the ring of this Cluster
  parameter int unsigned ROWW  = 8     // width of the global Row index
) (
  input  logic              clk,
  input  logic              rst_n,
  input  gate_t             gate,
  input  logic              lb_clear,
  input  logic [$clog2(NROWS+1)-1:0] my_row,
  input  logic [ROWW-1:0]   row_id,
  input  logic              desc_wr,
  input  desc_t             desc_in,
  input  logic              start,
  output logic              done,       // stream finished and every Group idle
  // dedicated Global Memory channel
  output logic              rd_req,
  output logic [GM_AW-1:0]  rd_addr,
  input  logic              rd_gnt,
  input  logic [LINE_W-1:0] rd_data,
  // Cluster broadcast
  input  logic              bc_valid,
  input  logic              bc_new,
  input  logic              bc_done,
  input  coo_t [NB-1:0]     bc_b,
  input  logic [IDX_W-1:0]  bc_hi,
  output logic              need_next,
  // ring links, one per Group
  input  logic  [NGROUP-1:0] up_in_valid,
  input  pvec_t [NGROUP-1:0] up_in_vec,
  output logic  [NGROUP-1:0][2:0] up_in_free,
  input  logic  [NGROUP-1:0] dn_in_valid,
  input  pvec_t [NGROUP-1:0] dn_in_vec,
  output logic  [NGROUP-1:0][2:0] dn_in_free,
  output logic  [NGROUP-1:0] dn_out_valid,
  output pvec_t [NGROUP-1:0] dn_out_vec,
  input  logic  [NGROUP-1:0][2:0] dn_nb_free,
  output logic  [NGROUP-1:0] up_out_valid,
  output pvec_t [NGROUP-1:0] up_out_vec,
  input  logic  [NGROUP-1:0][2:0] up_nb_free,
  // dense systolic partial sums
  input  logic [NGROUP-1:0][NMULT-1:0][31:0] psum_in,
  output logic [NGROUP-1:0]                  psum_out_valid,
  output logic [NGROUP-1:0][NMULT-1:0][31:0] psum_out,
  // overflow spill
  output logic              spill_valid,
  output pvec_t             spill_vec,
  input  logic              spill_ready,
  // Local Buffer drain
  input  logic              drain_en,
  input  logic [LB_ROW_W-1:0] drain_addr,
  output lb_entry_t [LB_ENTRIES-1:0] drain_data,
  output evt_t              evt
);
  desc_t desc;
  logic  s_done;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       desc <= '0;
    else if (desc_wr) desc <= desc_in;
  end

  logic              beat_valid, beat_ready;
  logic [NGROUP-1:0] beat_lane, g_ready, g_idle;
  beat_t             beat;
  logic [NGROUP-1:0] w_load;
  logic [NGROUP-1:0][NMULT-1:0][31:0] w_data;
  logic [NGROUP:0]   da_v;
  logic [NGROUP:0][31:0] da;

  stream_ctrl #(.ROWW(ROWW)) u_stream (
    .clk, .rst_n, .gate, .row_id, .start, .desc, .done(s_done),
    .rd_req, .rd_addr, .rd_gnt, .rd_data,
    .bc_valid, .bc_new, .bc_done, .bc_b, .bc_hi, .need_next,
    .beat_valid, .beat_lane, .beat, .beat_ready,
    .w_load, .w_data, .da_valid(da_v[0]), .da(da[0]));

  assign beat_ready = &g_ready;

  // Local Buffer ports
  logic [NGROUP-1:0]                  lb_req, lb_gnt, lb_we;
  logic [NGROUP-1:0][LB_ROW_W-1:0]    lb_addr;
  lb_entry_t [NGROUP-1:0][LB_ENTRIES-1:0] lb_rd, lb_wd;
  logic [NGROUP-1:0]                  ovf_valid, ovf_pop;
  pvec_t [NGROUP-1:0]                 ovf_vec;
  evt_t [NGROUP-1:0]                  g_evt;

  always_comb begin
    for (int g = 0; g < NGROUP; g++) begin
      lb_gnt[g] = lb_req[g];
      for (int h = 0; h < g; h++) begin
        if (lb_req[h] && lb_addr[h] == lb_addr[g]) lb_gnt[g] = 1'b0;
      end
    end
  end

  local_buffer u_lb (
    .clk, .rst_n, .clear(lb_clear), .en(gate.lb_en),
    .rd_addr(lb_addr), .rd_data(lb_rd),
    .wr_en(lb_we), .wr_addr(lb_addr), .wr_data(lb_wd),
    .drain_en, .drain_addr, .drain_data);

  for (genvar g = 0; g < NGROUP; g++) begin : g_grp
    compute_group #(.NROWS(NROWS)) u_grp (
      .clk, .rst_n, .gate, .my_row,
      .in_valid(beat_valid && beat_ready), .in_ready(g_ready[g]),
      .a_in(beat_lane[g] ? beat.a[g] : '0), .b_in(beat.b),
      .w_load(w_load[g]), .w_in(w_data[g]),
      .da_valid_in(da_v[g]), .da_in(da[g]), .da_valid_out(da_v[g+1]), .da_out(da[g+1]),
      .psum_in(psum_in[g]), .psum_out_valid(psum_out_valid[g]), .psum_out(psum_out[g]),
      .up_in_valid(up_in_valid[g]), .up_in_vec(up_in_vec[g]), .up_in_free(up_in_free[g]),
      .dn_in_valid(dn_in_valid[g]), .dn_in_vec(dn_in_vec[g]), .dn_in_free(dn_in_free[g]),
      .dn_out_valid(dn_out_valid[g]), .dn_out_vec(dn_out_vec[g]), .dn_nb_free(dn_nb_free[g]),
      .up_out_valid(up_out_valid[g]), .up_out_vec(up_out_vec[g]), .up_nb_free(up_nb_free[g]),
      .lb_req(lb_req[g]), .lb_addr(lb_addr[g]), .lb_gnt(lb_gnt[g]), .lb_rd(lb_rd[g]),
      .lb_we(lb_we[g]), .lb_wd(lb_wd[g]),
      .ovf_valid(ovf_valid[g]), .ovf_vec(ovf_vec[g]), .ovf_pop(ovf_pop[g]),
      .idle(g_idle[g]), .evt(g_evt[g]));
  end

  // overflow drain, lowest Group first
  always_comb begin
    spill_valid = 1'b0;
    spill_vec   = ovf_vec[0];
    ovf_pop     = '0;
    for (int g = NGROUP - 1; g >= 0; g--) begin
      if (ovf_valid[g]) begin
        spill_valid = 1'b1;
        spill_vec   = ovf_vec[g];
      end
    end
    for (int g = 0; g < NGROUP; g++) begin
      if (ovf_valid[g]) begin
        ovf_pop[g] = spill_ready;
        break;
      end
    end
  end

  always_comb begin
    evt = '0;
    for (int g = 0; g < NGROUP; g++) evt = evt | g_evt[g];
  end

  assign done = s_done && (&g_idle);
endmodule
