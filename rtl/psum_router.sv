// psum_router: PSum Router of one Compute Group, a node of the bidirectional
// ring that links the Groups of the same index in neighbouring Compute Rows
// of a Cluster (with a wrap-around link from the last Row to the first).
//
// A psum vector (one C row, 32 column/value lanes) belongs to the Row that
// owns its C row in the Local Buffers: owner = (row / LB_ROWS) mod NROWS.
// The router has 3 inputs (multiplier, up link, down link) and 3 outputs
// (up link, down link, DMAccum), each input and the DMAccum output backed by
// a ring buffer: 6 entries for each incoming link, 4 for the multiplier and
// 6 towards the DMAccum, as in the design. Each cycle:
//   * the DMAccum buffer takes one vector addressed to this Row (priority:
//     traffic from up, from down, then the multiplier);
//   * the down link forwards transit traffic from up, or else injects a
//     multiplier vector whose shorter way is downward; the up link likewise.
// Vectors keep their direction of travel. In-transit traffic needs one free
// entry downstream, injected traffic two (bubble rule, this implementation's
// choice to keep the ring free of deadlock). When the multiplier buffer is
// full the Group stalls. Priorities and the bubble rule are not specified by
// the design; directions follow the shortest way round the ring.
module psum_router
  import hit_pkg::*;
#(
  parameter int unsigned NROWS = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [$clog2(NROWS+1)-1:0] my_row,  // Row index in the Cluster
  // from the multipliers
  input  logic        mul_valid,
  input  pvec_t       mul_vec,
  output logic        mul_full,               // multiplier ring buffer full
  // ring, incoming from the Row above (travelling down) and below (travelling up)
  input  logic        up_in_valid,
  input  pvec_t       up_in_vec,
  output logic [2:0]  up_in_free,
  input  logic        dn_in_valid,
  input  pvec_t       dn_in_vec,
  output logic [2:0]  dn_in_free,
  // ring, outgoing
  output logic        dn_out_valid,           // to the Row below (its up_in)
  output pvec_t       dn_out_vec,
  input  logic [2:0]  dn_nb_free,             // free entries at that input
  output logic        up_out_valid,           // to the Row above (its dn_in)
  output pvec_t       up_out_vec,
  input  logic [2:0]  up_nb_free,
  // to the DMAccum
  output logic        acc_valid,
  output pvec_t       acc_vec,
  input  logic        acc_pop,
  output logic        idle,
  output logic        hop                     // a vector left over a ring link
);
  localparam int unsigned RW = $clog2(NROWS + 1);

  pvec_t upq_d, dnq_d, mq_d, aq_d;
  logic  upq_e, dnq_e, mq_e, aq_e, upq_f, dnq_f, aq_f;
  logic [2:0] upq_free, dnq_free, aq_free;
  logic [2:0] mq_free;
  logic  upq_pop, dnq_pop, mq_pop, aq_push;
  pvec_t aq_in;

  function automatic logic [RW-1:0] owner(input logic [IDX_W-1:0] row);
    return RW'((int'(row) / LB_ROWS) % NROWS);
  endfunction

  // shortest direction for a vector injected here: 1 = down (towards my_row+1)
  function automatic logic go_down(input logic [RW-1:0] dst, input logic [RW-1:0] me);
    int dd;
    dd = (int'(dst) - int'(me) + NROWS) % NROWS;
    return dd <= NROWS / 2;
  endfunction

  sync_fifo #(.T(pvec_t), .DEPTH(6)) u_upq (
    .clk, .rst_n, .push(up_in_valid), .din(up_in_vec), .pop(upq_pop),
    .dout(upq_d), .empty(upq_e), .full(upq_f), .free(upq_free));
  sync_fifo #(.T(pvec_t), .DEPTH(6)) u_dnq (
    .clk, .rst_n, .push(dn_in_valid), .din(dn_in_vec), .pop(dnq_pop),
    .dout(dnq_d), .empty(dnq_e), .full(dnq_f), .free(dnq_free));
  sync_fifo #(.T(pvec_t), .DEPTH(4)) u_mq (
    .clk, .rst_n, .push(mul_valid), .din(mul_vec), .pop(mq_pop),
    .dout(mq_d), .empty(mq_e), .full(mul_full), .free(mq_free));
  sync_fifo #(.T(pvec_t), .DEPTH(6)) u_aq (
    .clk, .rst_n, .push(aq_push), .din(aq_in), .pop(acc_pop),
    .dout(aq_d), .empty(aq_e), .full(aq_f), .free(aq_free));

  assign up_in_free = upq_free;
  assign dn_in_free = dnq_free;
  assign acc_valid  = !aq_e;
  assign acc_vec    = aq_d;

  logic up_local, dn_local, m_local, m_down;

  always_comb begin
    up_local = !upq_e && (owner(upq_d.row) == my_row);
    dn_local = !dnq_e && (owner(dnq_d.row) == my_row);
    m_local  = !mq_e  && (owner(mq_d.row)  == my_row);
    m_down   = go_down(owner(mq_d.row), my_row);

    upq_pop = 1'b0; dnq_pop = 1'b0; mq_pop = 1'b0;
    aq_push = 1'b0; aq_in = upq_d;
    dn_out_valid = 1'b0; dn_out_vec = upq_d;
    up_out_valid = 1'b0; up_out_vec = dnq_d;

    // ejection into the DMAccum buffer
    if (!aq_f) begin
      if (up_local) begin
        aq_push = 1'b1; aq_in = upq_d; upq_pop = 1'b1;
      end else if (dn_local) begin
        aq_push = 1'b1; aq_in = dnq_d; dnq_pop = 1'b1;
      end else if (m_local) begin
        aq_push = 1'b1; aq_in = mq_d; mq_pop = 1'b1;
      end
    end
    // down link
    if (!upq_e && !up_local) begin
      if (dn_nb_free >= 3'd1) begin
        dn_out_valid = 1'b1; dn_out_vec = upq_d; upq_pop = 1'b1;
      end
    end else if (!mq_e && !m_local && m_down && !mq_pop) begin
      if (dn_nb_free >= 3'd2) begin
        dn_out_valid = 1'b1; dn_out_vec = mq_d; mq_pop = 1'b1;
      end
    end
    // up link
    if (!dnq_e && !dn_local) begin
      if (up_nb_free >= 3'd1) begin
        up_out_valid = 1'b1; up_out_vec = dnq_d; dnq_pop = 1'b1;
      end
    end else if (!mq_e && !m_local && !m_down && !mq_pop) begin
      if (up_nb_free >= 3'd2) begin
        up_out_valid = 1'b1; up_out_vec = mq_d; mq_pop = 1'b1;
      end
    end
  end

  assign idle = upq_e && dnq_e && mq_e && aq_e;
  assign hop  = dn_out_valid || up_out_valid;
endmodule
