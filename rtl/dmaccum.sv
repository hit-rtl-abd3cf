// dmaccum: Dual-mode Accumulator of one Compute Group (32 FP32 adders).
//
// Sparse modes: each accepted psum vector (one C row, 32 lanes) is merged
// into the Local Buffer row (row mod LB_ROWS) in a single read-modify-write
// cycle, once the Row's arbiter grants that row.
//   * Compressed mode (HS x HS), binning-compare-update: lane i goes to bin
//     col mod 8, i.e. one bank of the row; its column is compared with the 16
//     entries of that bin only (16 x 32 = 512 comparators). On a match the
//     psum is added to the entry; otherwise it takes an empty slot of the bin,
//     lanes of the same bin being served in lane order (priority encoding);
//     when the bin is full the psum goes to the overflow buffer, from which
//     it is drained for a later accumulation pass.
//   * Direct mode (all other sparse products): column c is stored at bank
//     c mod 8, slot (c / 8) mod 16, and the psum is added there.
// Dense (systolic) mode: the adders add the 32 multiplier products to the 32
// partial sums from the Compute Row above; the result is registered and sent
// to the Row below (one cycle per Row).
// The binning scheme, the three outcomes and the adder reuse follow the
// design; the one-cycle read-modify-write, the dense-mode address map and the
// overflow buffer depth (OVF_DEPTH vectors, the whole vector stalls while it
// is full) are choices of this implementation.
module dmaccum
  import hit_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       compressed,   // binning mode
  input  logic                       dense,        // systolic mode
  // sparse psum input
  input  logic                       in_valid,
  input  pvec_t                      in_vec,
  output logic                       in_ready,
  // Local Buffer port and arbitration
  output logic                       lb_req,
  output logic [LB_ROW_W-1:0]        lb_addr,
  input  logic                       lb_gnt,
  input  lb_entry_t [LB_ENTRIES-1:0] lb_rd,
  output logic                       lb_we,
  output lb_entry_t [LB_ENTRIES-1:0] lb_wd,
  // overflow buffer, drained by the Row
  output logic                       ovf_valid,
  output pvec_t                      ovf_vec,
  input  logic                       ovf_pop,
  // dense systolic datapath
  input  logic                       prod_valid,
  input  logic [NMULT-1:0][31:0]     prod,
  input  logic [NMULT-1:0][31:0]     psum_in,
  output logic                       psum_out_valid,
  output logic [NMULT-1:0][31:0]     psum_out,
  // events
  output logic                       ev_hit,
  output logic                       ev_insert,
  output logic                       ev_overflow,
  output logic                       ev_conflict
);
  localparam int unsigned SW = $clog2(LB_SLOTS);

  logic [NMULT-1:0][31:0] add_a, add_b, add_y;
  logic [NMULT-1:0]       lane_ok, lane_hit, lane_ovf;
  logic [NMULT-1:0][$clog2(LB_ENTRIES)-1:0] tgt;
  pvec_t                  ovf_in;
  logic                   any_ovf, ovf_full, ovf_empty, do_acc;
  logic [$clog2(OVF_DEPTH+1)-1:0] ovf_free;  // not needed: the full flag suffices

  for (genvar i = 0; i < NMULT; i++) begin : g_add
    fp32_add u_add (.a(add_a[i]), .b(add_b[i]), .y(add_y[i]));
  end

  assign lb_req  = in_valid && !dense;
  assign lb_addr = LB_ROW_W'(in_vec.row % LB_ROWS);

  // slot selection: first the compares of every lane against its bin, then
  // the empty-slot assignment in lane order
  logic [NMULT-1:0][SW-1:0] hit_slot;
  always_comb begin
    tgt = '0;
    for (int i = 0; i < NMULT; i++) begin
      int unsigned bin;
      bin = int'(in_vec.lane[i].col) % LB_BANKS;
      lane_hit[i] = 1'b0;
      hit_slot[i] = '0;
      for (int s = 0; s < LB_SLOTS; s++) begin
        if (lb_rd[bin * LB_SLOTS + s].valid && lb_rd[bin * LB_SLOTS + s].col == in_vec.lane[i].col) begin
          lane_hit[i] = in_vec.lane[i].valid;
          hit_slot[i] = SW'(s);
        end
      end
    end
    for (int i = 0; i < NMULT; i++) begin
      int unsigned bin, slot, rank, cnt;
      logic found;
      rank = 0;
      cnt = 0;
      found = 1'b0;
      bin = int'(in_vec.lane[i].col) % LB_BANKS;
      lane_ok[i]  = 1'b0;
      lane_ovf[i] = 1'b0;
      if (compressed) begin
        slot = int'(hit_slot[i]);
        if (lane_hit[i]) begin
          lane_ok[i] = 1'b1;
        end else begin
          rank = 0;
          for (int j = 0; j < i; j++) begin
            if (in_vec.lane[j].valid && !lane_hit[j] &&
                (int'(in_vec.lane[j].col) % LB_BANKS) == bin) rank++;
          end
          cnt = 0;
          found = 1'b0;
          for (int s = 0; s < LB_SLOTS; s++) begin
            if (!lb_rd[bin * LB_SLOTS + s].valid) begin
              if (cnt == rank && !found) begin
                slot = s;
                found = 1'b1;
              end
              cnt++;
            end
          end
          lane_ok[i]  = in_vec.lane[i].valid && found;
          lane_ovf[i] = in_vec.lane[i].valid && !found;
        end
      end else begin
        slot = (int'(in_vec.lane[i].col) / LB_BANKS) % LB_SLOTS;
        lane_ok[i] = in_vec.lane[i].valid;
      end
      tgt[i] = $clog2(LB_ENTRIES)'(bin * LB_SLOTS + slot);
    end
    if (!compressed) begin
      for (int i = 0; i < NMULT; i++) lane_hit[i] = in_vec.lane[i].valid && lb_rd[tgt[i]].valid;
    end
  end

  // adder operands: stored value (or zero) plus psum, or product plus psum from above
  always_comb begin
    for (int i = 0; i < NMULT; i++) begin
      if (dense) begin
        add_a[i] = prod[i];
        add_b[i] = psum_in[i];
      end else begin
        add_a[i] = lane_hit[i] ? lb_rd[tgt[i]].val : 32'd0;
        add_b[i] = in_vec.lane[i].val;
      end
    end
  end

  always_comb begin
    any_ovf = |lane_ovf;
    ovf_in  = in_vec;
    for (int i = 0; i < NMULT; i++) ovf_in.lane[i].valid = lane_ovf[i];
    in_ready = !dense && lb_gnt && !(any_ovf && ovf_full);
    do_acc   = in_valid && in_ready;
    lb_we    = do_acc;
    lb_wd    = lb_rd;
    for (int i = 0; i < NMULT; i++) begin
      if (lane_ok[i]) begin
        lb_wd[tgt[i]]    = '{valid: 1'b1, col: in_vec.lane[i].col, val: add_y[i]};
      end
    end
  end

  sync_fifo #(.T(pvec_t), .DEPTH(OVF_DEPTH)) u_ovf (
    .clk, .rst_n, .push(do_acc && any_ovf), .din(ovf_in), .pop(ovf_pop),
    .dout(ovf_vec), .empty(ovf_empty), .full(ovf_full), .free(ovf_free));
  assign ovf_valid = !ovf_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      psum_out_valid <= 1'b0;
      psum_out       <= '0;
    end else if (dense) begin
      psum_out_valid <= prod_valid;
      psum_out       <= add_y;
    end else begin
      psum_out_valid <= 1'b0;
    end
  end

  assign ev_hit      = do_acc && compressed && |lane_hit;
  assign ev_insert   = do_acc && compressed && |(lane_ok & ~lane_hit);
  assign ev_overflow = do_acc && any_ovf;
  assign ev_conflict = in_valid && !dense && !lb_gnt;
endmodule
