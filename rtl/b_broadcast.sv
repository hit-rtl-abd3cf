// b_broadcast: MSparse B broadcaster of one Compute Cluster.
//
// It reads B groups of 64 COO elements (two lines) from the bank group named
// in its descriptor over the cluster broadcast channel and presents the same
// group to all Compute Rows, with the highest B row it holds (bc_hi). The
// Rows work through their own A elements against it; the broadcaster moves
// on only when every Row reports that it is done with the group (need_next),
// which is the partial synchronisation of the Rows of a Cluster described
// for MSparse. bc_new pulses for one cycle when a group becomes valid and
// bc_done rises once the last group has been used.
// A group read takes two cycles plus one cycle of read latency.
module b_broadcast
  import hit_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,          // MSparse mode
  input  logic              start,
  input  bdesc_t            desc,
  input  logic              all_need,    // every Row is done with the group
  output logic              gm_req,
  output logic [4:0]        gm_grp,
  output logic [GM_AW-1:0]  gm_addr,
  input  logic [LINE_W-1:0] gm_data,
  output logic              bc_valid,
  output logic              bc_new,
  output logic              bc_done,
  output coo_t [NB-1:0]     bc_b,
  output logic [IDX_W-1:0]  bc_hi,
  output logic              sync_evt     // the group advanced on all_need
);
  typedef enum logic [2:0] {B_IDLE, B_REQ0, B_REQ1, B_WAIT, B_VALID, B_DONE} bstate_e;
  bstate_e        st;
  logic [GM_AW:0] lines;     // lines read so far
  logic           rq_v, rq_hi, last_single;

  assign gm_grp  = desc.grp;
  assign gm_req  = (st == B_REQ0 || st == B_REQ1);
  assign gm_addr = desc.b_base + GM_AW'(lines);
  assign bc_valid = (st == B_VALID);
  assign bc_done  = (st == B_DONE);
  assign sync_evt = (st == B_VALID) && !bc_new && all_need && (lines < desc.b_lines);

  always_comb begin
    bc_hi = '0;
    for (int i = 0; i < NB; i++) begin
      if (bc_b[i].valid && bc_b[i].row > bc_hi) bc_hi = bc_b[i].row;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= B_IDLE; lines <= '0; rq_v <= 1'b0; rq_hi <= 1'b0; last_single <= 1'b0;
      bc_b <= '0; bc_new <= 1'b0;
    end else begin
      rq_v   <= gm_req;
      rq_hi  <= (st == B_REQ1);
      bc_new <= 1'b0;
      if (rq_v) begin
        for (int e = 0; e < LINE_ELEMS; e++) begin
          if (rq_hi) bc_b[LINE_ELEMS + e] <= coo_t'(gm_data[64 * e +: 64]);
          else       bc_b[e]              <= coo_t'(gm_data[64 * e +: 64]);
        end
        if (!rq_hi) begin
          for (int e = LINE_ELEMS; e < NB; e++) bc_b[e] <= '0;
        end
      end
      case (st)
        B_IDLE, B_DONE: if (en && start) begin
          lines <= '0;
          st    <= (desc.b_lines == 0) ? B_DONE : B_REQ0;
        end
        B_REQ0: begin
          lines <= lines + 1'b1;
          last_single <= (lines + 1'b1 >= desc.b_lines);
          st    <= (lines + 1'b1 >= desc.b_lines) ? B_WAIT : B_REQ1;
        end
        B_REQ1: begin
          lines <= lines + 1'b1;
          st    <= B_WAIT;
        end
        B_WAIT: if (!rq_v || !rq_hi || last_single) begin
          // no second line still on its way
          st     <= B_VALID;
          bc_new <= 1'b1;
        end
        B_VALID: if (!bc_new && all_need) begin
          st <= (lines < desc.b_lines) ? B_REQ0 : B_DONE;
        end
        default: st <= B_IDLE;
      endcase
    end
  end
endmodule
