// stream_ctrl: stream controller of one Compute Row. It turns the Row's data
// in Global Memory into the beats the Compute Groups consume.
//
// Memory is read a line at a time over the Row's dedicated channel: one line
// is the same word of the Row's 4 banks (4 x 64 B), i.e. 32 COO elements or
// 64 dense FP32 values; a granted request returns its line one cycle later.
// Sparse modes (HSparse, MSparse) walk the outer product as a merge of two
// sorted streams. A elements (ordered by column) come from A lines; B
// elements (ordered by row) form a B group of 64 elements, two lines, either
// read from the Row's own banks (HSparse) or taken from the Cluster broadcast
// (MSparse). Each beat carries up to 4 consecutive A elements, one per Group,
// whose column does not exceed the highest B row of the current group; the
// host lays out B groups so that a B row never straddles two groups. When the
// next A element lies beyond the group, the next B group is loaded
// (HSparse) or the Row reports that it is done with the group and waits for
// the broadcast to advance (MSparse partial synchronisation). A lines are
// prefetched into a second line register. An invalid A element ends a line.
// Dense mode: the two lines at b_base are loaded as the Row's 128 stationary
// B values (32 per Group), then, starting exactly SKEW0 + row_id cycles after
// 'start', dense_m A values (one A column) are fed one per cycle to Group 0;
// with no A lines the Row feeds zeros, so that it passes partial sums on.
// The merge order, line layout and skew start are this implementation's
// reading of the design's statements on COO order, streaming and the
// systolic mapping.
module stream_ctrl
  import hit_pkg::*;
#(
  parameter int unsigned ROWW = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  gate_t             gate,
  input  logic [ROWW-1:0]   row_id,       // global Row index (dense skew)
  input  logic              start,
  input  desc_t             desc,
  output logic              done,
  // dedicated channel
  output logic              rd_req,
  output logic [GM_AW-1:0]  rd_addr,
  input  logic              rd_gnt,
  input  logic [LINE_W-1:0] rd_data,
  // Cluster broadcast (MSparse)
  input  logic              bc_valid,
  input  logic              bc_new,       // a new group was just loaded
  input  logic              bc_done,      // no further groups
  input  coo_t [NB-1:0]     bc_b,
  input  logic [IDX_W-1:0]  bc_hi,
  output logic              need_next,    // finished with the current group
  // beats to the Groups
  output logic              beat_valid,
  output logic [NGROUP-1:0] beat_lane,    // which Groups get an A element
  output beat_t             beat,
  input  logic              beat_ready,
  // dense mode
  output logic [NGROUP-1:0] w_load,
  output logic [NGROUP-1:0][NMULT-1:0][31:0] w_data,
  output logic              da_valid,
  output logic [31:0]       da
);
  localparam int unsigned SKEW0 = 4;

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_DW, S_DRUN, S_DONE} state_e;
  typedef enum logic [1:0] {K_A, K_B0, K_B1, K_W} kind_e;

  state_e state;
  logic   dense, ms;
  assign dense = gate.systolic_en;
  assign ms    = gate.bcast_en;

  // outstanding read (one cycle)
  logic       rq_v;
  kind_e      rq_k;
  logic       rq_w1;        // weight line index

  // B group (HSparse copy)
  coo_t [NB-1:0]    bg;
  logic [IDX_W-1:0] bg_hi;
  logic             bg_v;
  logic [1:0]       bg_fill;   // lines requested for the group being loaded
  logic [GM_AW:0]   b_done_lines;
  logic             ms_wait;

  // A lines
  logic [LINE_W-1:0] a_cur, a_nxt;
  logic              a_cur_v, a_nxt_v;
  logic [6:0]        ptr;
  logic [GM_AW:0]    a_req_lines;
  logic [15:0]       d_cnt;
  logic [15:0]       skew_cnt;
  logic [1:0]        w_req;

  coo_t [NB-1:0]    cur_b;
  logic [IDX_W-1:0] cur_hi;
  logic             cur_bv;

  // highest B row held in a line, starting from a previous maximum
  function automatic logic [IDX_W-1:0] line_hi(input logic [LINE_W-1:0] l, input logic [IDX_W-1:0] h0);
    logic [IDX_W-1:0] h;
    coo_t x;
    h = h0;
    for (int e = 0; e < LINE_ELEMS; e++) begin
      x = coo_t'(l[64 * e +: 64]);
      if (x.valid && x.row > h) h = x.row;
    end
    return h;
  endfunction

  function automatic coo_t line_coo(input logic [LINE_W-1:0] l, input int e);
    return coo_t'(l[64 * e +: 64]);
  endfunction

  always_comb begin
    if (ms) begin
      cur_b = bc_b; cur_hi = bc_hi; cur_bv = bc_valid && !ms_wait;
    end else begin
      cur_b = bg;   cur_hi = bg_hi; cur_bv = bg_v;
    end
  end

  // ---------------- beat formation
  logic [2:0] take;
  logic       line_end, grp_end;
  always_comb begin
    logic ok;
    beat       = '0;
    beat_lane  = '0;
    take       = '0;
    ok         = (state == S_RUN) && a_cur_v && cur_bv;
    beat.b     = cur_b;
    for (int j = 0; j < NGROUP; j++) begin
      coo_t e;
      e = (int'(ptr) + j < LINE_ELEMS) ? line_coo(a_cur, int'(ptr) + j) : '0;
      if (ok && e.valid && (e.col <= CIDX_W'(cur_hi))) begin
        beat.a[j]    = e;
        beat_lane[j] = 1'b1;
        take         = take + 3'd1;
      end else begin
        ok = 1'b0;
      end
    end
    beat_valid = (take != 0);
    // nothing could be taken: the line ended or the A element is past the group
    line_end = (state == S_RUN) && a_cur_v &&
               ((int'(ptr) >= LINE_ELEMS) || !line_coo(a_cur, int'(ptr) < LINE_ELEMS ? int'(ptr) : 0).valid);
    grp_end  = (state == S_RUN) && a_cur_v && cur_bv && !line_end && (take == 0);
  end

  // ---------------- memory requests
  logic a_more, b_more, want_b, want_a;
  always_comb begin
    a_more = (a_req_lines < desc.a_lines);
    b_more = (b_done_lines < desc.b_lines);
    want_b = (state == S_RUN) && !ms && !bg_v && b_more && (bg_fill < 2'd2) &&
             !(bg_fill == 2'd1 && b_done_lines + 1 >= desc.b_lines);
    want_a = (state == S_RUN || state == S_DRUN || state == S_DW) && a_more &&
             !a_nxt_v && !(rq_v && rq_k == K_A) && !(a_cur_v == 1'b0 && 1'b0);
    rd_req  = 1'b0;
    rd_addr = '0;
    if (state == S_DW && w_req < 2'd2 && desc.b_lines != 0) begin
      rd_req  = 1'b1;
      rd_addr = desc.b_base + GM_AW'(w_req);
    end else if (want_b) begin
      rd_req  = 1'b1;
      rd_addr = desc.b_base + GM_AW'(b_done_lines) + GM_AW'(bg_fill);
    end else if (want_a) begin
      rd_req  = 1'b1;
      rd_addr = desc.a_base + GM_AW'(a_req_lines);
    end
  end

  // ---------------- dense outputs
  always_comb begin
    for (int g = 0; g < NGROUP; g++) begin
      w_load[g] = rq_v && rq_k == K_W && (rq_w1 == g[1]);
      for (int i = 0; i < NMULT; i++) w_data[g][i] = rd_data[32 * ((g % 2) * NMULT + i) +: 32];
    end
    da_valid = (state == S_DRUN);
    da       = (state == S_DRUN && a_cur_v && desc.a_lines != 0) ? a_cur[32 * int'(ptr[5:0]) +: 32] : 32'd0;
  end

  assign need_next = ms && (ms_wait || state == S_DONE || state == S_IDLE);
  assign done      = (state == S_DONE);

  // ---------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      rq_v <= 1'b0; rq_k <= K_A; rq_w1 <= 1'b0;
      bg <= '0; bg_hi <= '0; bg_v <= 1'b0; bg_fill <= '0; b_done_lines <= '0;
      ms_wait <= 1'b0;
      a_cur <= '0; a_nxt <= '0; a_cur_v <= 1'b0; a_nxt_v <= 1'b0; ptr <= '0;
      a_req_lines <= '0; d_cnt <= '0; skew_cnt <= '0; w_req <= '0;
    end else begin
      logic       a_cur_v_n, a_nxt_v_n;
      logic [LINE_W-1:0] nxt_d;
      nxt_d     = a_nxt;
      a_cur_v_n = a_cur_v;
      a_nxt_v_n = a_nxt_v;
      rq_v <= rd_req && rd_gnt;
      if (rd_req && rd_gnt) begin
        if (state == S_DW && w_req < 2'd2 && desc.b_lines != 0) begin
          rq_k <= K_W; rq_w1 <= w_req[0]; w_req <= w_req + 2'd1;
        end else if (want_b) begin
          rq_k <= (bg_fill == 2'd0) ? K_B0 : K_B1; bg_fill <= bg_fill + 2'd1;
        end else begin
          rq_k <= K_A; a_req_lines <= a_req_lines + 1'b1;
        end
      end
      // returning lines
      if (rq_v) begin
        case (rq_k)
          K_B0: begin
            for (int e = 0; e < LINE_ELEMS; e++) bg[e] <= line_coo(rd_data, e);
            for (int e = LINE_ELEMS; e < NB; e++) bg[e] <= '0;
            bg_hi <= line_hi(rd_data, '0);
            if (b_done_lines + 1 >= desc.b_lines) begin   // group of a single line
              bg_v <= 1'b1; bg_fill <= '0; b_done_lines <= b_done_lines + 1'b1;
            end
          end
          K_B1: begin
            for (int e = 0; e < LINE_ELEMS; e++) bg[LINE_ELEMS + e] <= line_coo(rd_data, e);
            bg_hi <= line_hi(rd_data, bg_hi);
            bg_v <= 1'b1; bg_fill <= '0; b_done_lines <= b_done_lines + (GM_AW+1)'(2);
          end
          K_A: begin
            if (!a_cur_v_n) begin a_cur <= rd_data; a_cur_v_n = 1'b1; end
            else            begin a_nxt <= rd_data; nxt_d = rd_data; a_nxt_v_n = 1'b1; end
          end
          default: ;
        endcase
      end

      case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            bg_v <= 1'b0; bg_fill <= '0; b_done_lines <= '0; ms_wait <= 1'b0;
            a_cur_v_n = 1'b0; a_nxt_v_n = 1'b0; ptr <= '0; a_req_lines <= '0;
            d_cnt <= '0; skew_cnt <= '0; w_req <= '0;
            state <= dense ? S_DW : S_RUN;
          end
        end
        S_RUN: begin
          if (beat_valid && beat_ready) begin
            ptr <= ptr + 7'(take);
          end else if (line_end) begin
            a_cur_v_n = 1'b0;
            ptr <= '0;
          end else if (grp_end) begin
            if (ms) ms_wait <= 1'b1;
            else    bg_v <= 1'b0;
          end
          if (ms && bc_new) ms_wait <= 1'b0;
          // end of work
          if (!a_cur_v && !a_nxt_v && !a_more && !rq_v) state <= S_DONE;
          if (!ms && !bg_v && !b_more && bg_fill == 2'd0 && !(rq_v && rq_k != K_A)) state <= S_DONE;
          if (ms && bc_done) state <= S_DONE;
        end
        S_DW: begin
          skew_cnt <= skew_cnt + 1'b1;
          if (skew_cnt == 16'(SKEW0) + 16'(row_id)) begin
            state <= (desc.dense_m != 0) ? S_DRUN : S_DONE;
            ptr <= '0;
          end
        end
        S_DRUN: begin
          d_cnt <= d_cnt + 1'b1;
          if (ptr == 7'(DLINE_ELEMS - 1)) begin
            ptr <= '0;
            a_cur_v_n = 1'b0;
          end else begin
            ptr <= ptr + 1'b1;
          end
          if (d_cnt + 1'b1 == desc.dense_m) state <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
      // promote the prefetched line
      if (!a_cur_v_n && a_nxt_v_n) begin
        a_cur     <= nxt_d;
        a_cur_v_n = 1'b1;
        a_nxt_v_n = 1'b0;
      end
      a_cur_v <= a_cur_v_n;
      a_nxt_v <= a_nxt_v_n;
    end
  end

  // the dense A stream never runs dry once it has started
  a_dense_fed : assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_DRUN && desc.a_lines != 0) |-> a_cur_v);
endmodule
