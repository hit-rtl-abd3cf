// pidu: Parallel Intersection & Distribution Unit of one Compute Group.
//
// Each accepted input is one A element (column index k) and a group of 64 B
// elements with their row indices. Four pipeline stages:
//   S1  64 parallel comparators: match[i] = b[i].valid && b[i].row == a.col
//   S2  leading-zero count of the match mask (counted from lane 0) and pass
//       splitting: the lanes [lzc, lzc+32) go to S3; if matches remain beyond
//       that window the entry stays in S2 with those lanes cleared, and new A
//       elements are held back until all matches are issued
//   S3  shifter: the B lanes and the mask are shifted down by lzc so that the
//       matched elements line up with multipliers 0..31
//   S4  output register: 32 (a, b) pairs with valid bits for the multipliers
// Because B elements arrive ordered by row, the matches of one A element are
// contiguous, so one shift packs them onto the multipliers; a non-contiguous
// mask is still handled correctly, only with empty multiplier slots.
// The stage structure, comparator count, shifter and stall rule follow the
// design; the exact split of work between the stages is this implementation's.
//
// Handshake: in_valid/in_ready on the input; 'adv' from the Group freezes
// every stage (downstream back-pressure). The output carries, per lane, the
// A value, the B value, the C row (= A row) and the C column (= B column).
module pidu
  import hit_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              adv,         // downstream can take S4
  input  logic              in_valid,
  output logic              in_ready,
  input  coo_t              a_in,
  input  coo_t [NB-1:0]     b_in,
  output logic              out_valid,
  output logic [IDX_W-1:0]  out_row,     // C row of all pairs
  output logic [31:0]       out_a,       // A value shared by all pairs
  output lane_t [NMULT-1:0] out_b,       // matched B value and C column per multiplier
  output logic              split,       // S2 holds its entry for another pass
  output logic              busy         // some stage holds an element
);
  // ---------------- S1: compare
  logic          s1_v;
  coo_t          s1_a;
  coo_t [NB-1:0] s1_b;
  logic [NB-1:0] s1_m;
  // ---------------- S2: leading zeros / pass split
  logic          s2_v;
  coo_t          s2_a;
  coo_t [NB-1:0] s2_b;
  logic [NB-1:0] s2_m;
  logic [6:0]    s2_lz;
  logic [NB-1:0] s2_win, s2_rest;
  // ---------------- S3: shift
  logic          s3_v;
  coo_t          s3_a;
  coo_t [NB-1:0] s3_b;
  logic [NB-1:0] s3_m;
  logic [6:0]    s3_lz;
  // ---------------- S4: output
  logic              s4_v;
  logic [IDX_W-1:0]  s4_row;
  logic [31:0]       s4_a;
  lane_t [NMULT-1:0] s4_b;
  lane_t [NMULT-1:0] s3_sel;

  logic s2_hold, s1_load, s2_load;

  // leading-zero count from lane 0
  always_comb begin
    s2_lz = 7'(NB);
    for (int i = NB - 1; i >= 0; i--) begin
      if (s2_m[i]) s2_lz = 7'(i);
    end
    for (int i = 0; i < NB; i++) begin
      s2_win[i] = (i >= int'(s2_lz)) && (i < int'(s2_lz) + NMULT);
    end
    s2_rest = s2_m & ~s2_win;
  end

  assign s2_hold  = s2_v && (s2_rest != '0);
  assign split    = s2_hold && adv;
  assign s2_load  = adv && !s2_hold;          // S2 takes S1
  assign s1_load  = s2_load;                  // S1 takes the input
  assign in_ready = s1_load;

  // shifter: lanes of S3 moved down by lzc
  always_comb begin
    for (int j = 0; j < NMULT; j++) begin
      s3_sel[j] = '0;
      if (int'(s3_lz) + j < NB) begin
        s3_sel[j].valid = s3_m[int'(s3_lz) + j];
        s3_sel[j].col   = s3_b[int'(s3_lz) + j].col;
        s3_sel[j].val   = s3_b[int'(s3_lz) + j].val;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s2_v <= 1'b0; s3_v <= 1'b0; s4_v <= 1'b0;
      s1_a <= '0; s1_b <= '0; s1_m <= '0;
      s2_a <= '0; s2_b <= '0; s2_m <= '0;
      s3_a <= '0; s3_b <= '0; s3_m <= '0; s3_lz <= '0;
      s4_row <= '0; s4_a <= '0; s4_b <= '0;
    end else if (adv) begin
      // S1
      if (s1_load) begin
        s1_v <= in_valid;
        s1_a <= a_in;
        s1_b <= b_in;
        for (int i = 0; i < NB; i++) begin
          s1_m[i] <= in_valid && a_in.valid && b_in[i].valid &&
                     (CIDX_W'(b_in[i].row) == a_in.col);
        end
      end
      // S2
      if (s2_load) begin
        s2_v <= s1_v;
        s2_a <= s1_a;
        s2_b <= s1_b;
        s2_m <= s1_m;
      end else begin
        s2_m <= s2_rest;                      // next pass
      end
      // S3
      s3_v  <= s2_v && (s2_m != '0);
      s3_a  <= s2_a;
      s3_b  <= s2_b;
      s3_m  <= s2_m & s2_win;
      s3_lz <= s2_lz;
      // S4
      s4_v   <= s3_v;
      s4_row <= s3_a.row;
      s4_a   <= s3_a.val;
      s4_b   <= s3_sel;
    end
  end

  assign busy      = s1_v || s2_v || s3_v || s4_v;
  assign out_valid = s4_v;
  assign out_row   = s4_row;
  assign out_a     = s4_a;
  assign out_b     = s4_b;
endmodule
