// compute_group: one Compute Group of a Compute Row: a PIDU, 32 FP32
// multipliers, a PSum Router and a DMAccum (32 FP32 adders).
//
// HSparse (router_en): PIDU -> multipliers -> router. The router sends each
//   psum vector to the DMAccum of the Row owning its C row, here or over the
//   ring; the local DMAccum takes vectors from the router.
// MSparse (pidu_en, router off): PIDU -> multipliers -> DMAccum directly,
//   bypassing the router, since all psums of a Row stay in the Row.
// Dense (systolic_en): the PIDU is bypassed. Each multiplier holds one
//   stationary B value; the A value enters a register, is multiplied by all
//   32 weights and passed to the next Group one cycle later; the DMAccum
//   adders add the products to the partial sums of the Row above.
// The multiplier stage is registered (stage M). Back-pressure: a full
// multiplier ring buffer (HSparse) or a busy DMAccum (MSparse) freezes the
// PIDU and stage M; the Row then stops issuing beats.
// Latency: 4 PIDU stages + 1 multiplier stage from beat to psum vector;
// dense mode: A register, product register, sum register (1 cycle per Row).
module compute_group
  import hit_pkg::*;
#(
  parameter int unsigned NROWS = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  gate_t       gate,
  input  logic [$clog2(NROWS+1)-1:0] my_row,
  // sparse beat: this Group's A element and the Row's shared B group
  input  logic        in_valid,
  output logic        in_ready,
  input  coo_t        a_in,
  input  coo_t [NB-1:0] b_in,
  // dense: stationary weights and the A value chain between Groups
  input  logic        w_load,
  input  logic [NMULT-1:0][31:0] w_in,
  input  logic        da_valid_in,
  input  logic [31:0] da_in,
  output logic        da_valid_out,
  output logic [31:0] da_out,
  input  logic [NMULT-1:0][31:0] psum_in,
  output logic        psum_out_valid,
  output logic [NMULT-1:0][31:0] psum_out,
  // ring links
  input  logic        up_in_valid,
  input  pvec_t       up_in_vec,
  output logic [2:0]  up_in_free,
  input  logic        dn_in_valid,
  input  pvec_t       dn_in_vec,
  output logic [2:0]  dn_in_free,
  output logic        dn_out_valid,
  output pvec_t       dn_out_vec,
  input  logic [2:0]  dn_nb_free,
  output logic        up_out_valid,
  output pvec_t       up_out_vec,
  input  logic [2:0]  up_nb_free,
  // Local Buffer port
  output logic                       lb_req,
  output logic [LB_ROW_W-1:0]        lb_addr,
  input  logic                       lb_gnt,
  input  lb_entry_t [LB_ENTRIES-1:0] lb_rd,
  output logic                       lb_we,
  output lb_entry_t [LB_ENTRIES-1:0] lb_wd,
  // overflow buffer
  output logic        ovf_valid,
  output pvec_t       ovf_vec,
  input  logic        ovf_pop,
  output logic        idle,
  output evt_t        evt
);
  logic              adv, p_valid, p_split, p_busy;
  logic [IDX_W-1:0]  p_row;
  logic [31:0]       p_a;
  lane_t [NMULT-1:0] p_b;
  logic [NMULT-1:0][31:0] mul_a, mul_b, mul_y;
  logic              m_valid;
  pvec_t             m_vec;
  logic              mul_full, r_idle, r_hop;
  logic              r_acc_valid, r_acc_pop;
  pvec_t             r_acc_vec;
  logic              dm_valid, dm_ready;
  pvec_t             dm_vec;
  logic              ev_hit, ev_insert, ev_ovf, ev_conf;
  logic [NMULT-1:0][31:0] w;
  logic              da_v;
  logic [NMULT-1:0][31:0] m_prod;
  logic [31:0]       da;

  // ---------------- PIDU
  pidu u_pidu (
    .clk, .rst_n, .adv(adv && gate.pidu_en), .in_valid(in_valid && gate.pidu_en), .in_ready,
    .a_in, .b_in, .out_valid(p_valid), .out_row(p_row), .out_a(p_a), .out_b(p_b),
    .split(p_split), .busy(p_busy));

  // ---------------- multipliers (shared by the sparse and dense datapaths)
  always_comb begin
    for (int i = 0; i < NMULT; i++) begin
      mul_a[i] = gate.systolic_en ? da   : p_a;
      mul_b[i] = gate.systolic_en ? w[i] : p_b[i].val;
    end
  end
  for (genvar i = 0; i < NMULT; i++) begin : g_mul
    fp32_mul u_mul (.a(mul_a[i]), .b(mul_b[i]), .y(mul_y[i]));
  end

  // stage M and back-pressure
  always_comb begin
    if (gate.systolic_en)    adv = 1'b1;
    else if (gate.router_en) adv = !(m_valid && mul_full);
    else                     adv = !(m_valid && !dm_ready);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid <= 1'b0;
      m_vec   <= '0;
      w       <= '0;
      da_v    <= 1'b0;
      da      <= '0;
    end else begin
      if (gate.systolic_en) begin
        m_valid <= da_v;
        for (int i = 0; i < NMULT; i++) begin
          m_vec.lane[i] <= '{valid: da_v, col: '0, val: mul_y[i]};
        end
        da_v <= da_valid_in;
        da   <= da_valid_in ? da_in : 32'd0;
      end else if (adv) begin
        m_valid   <= p_valid;
        m_vec.row <= p_row;
        for (int i = 0; i < NMULT; i++) begin
          m_vec.lane[i] <= '{valid: p_b[i].valid, col: p_b[i].col, val: mul_y[i]};
        end
        da_v <= 1'b0;
      end
      if (w_load) w <= w_in;
    end
  end

  assign da_valid_out = da_v;
  assign da_out       = da;

  // ---------------- PSum Router
  psum_router #(.NROWS(NROWS)) u_router (
    .clk, .rst_n, .my_row,
    .mul_valid(gate.router_en && m_valid && !mul_full), .mul_vec(m_vec), .mul_full,
    .up_in_valid, .up_in_vec, .up_in_free, .dn_in_valid, .dn_in_vec, .dn_in_free,
    .dn_out_valid, .dn_out_vec, .dn_nb_free, .up_out_valid, .up_out_vec, .up_nb_free,
    .acc_valid(r_acc_valid), .acc_vec(r_acc_vec), .acc_pop(r_acc_pop),
    .idle(r_idle), .hop(r_hop));

  // ---------------- DMAccum input selection
  always_comb begin
    for (int i = 0; i < NMULT; i++) m_prod[i] = m_vec.lane[i].val;
    if (gate.router_en) begin
      dm_valid = r_acc_valid;
      dm_vec   = r_acc_vec;
    end else begin
      dm_valid = m_valid && !gate.systolic_en;
      dm_vec   = m_vec;
    end
  end
  assign r_acc_pop = gate.router_en && r_acc_valid && dm_ready;

  dmaccum u_dmaccum (
    .clk, .rst_n, .compressed(gate.compressed), .dense(gate.systolic_en),
    .in_valid(dm_valid), .in_vec(dm_vec), .in_ready(dm_ready),
    .lb_req, .lb_addr, .lb_gnt, .lb_rd, .lb_we, .lb_wd,
    .ovf_valid, .ovf_vec, .ovf_pop,
    .prod_valid(m_valid && gate.systolic_en),
    .prod(m_prod), .psum_in, .psum_out_valid, .psum_out,
    .ev_hit, .ev_insert, .ev_overflow(ev_ovf), .ev_conflict(ev_conf));

  assign idle = !p_busy && !m_valid && r_idle && !ovf_valid && !da_v;

  always_comb begin
    evt              = '0;
    evt.pidu_split   = p_split;
    evt.ring_hop     = r_hop;
    evt.router_stall = gate.router_en && m_valid && mul_full;
    evt.lb_conflict  = ev_conf;
    evt.acc_hit      = ev_hit;
    evt.acc_insert   = ev_insert;
    evt.acc_overflow = ev_ovf;
  end
endmodule
