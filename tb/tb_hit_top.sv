// tb_hit_top: end-to-end test of the accelerator at a reduced size
// (2 Clusters x 4 Rows, all other sizes as designed).
//
// It runs three workloads through the host interface and checks every result
// against products computed here from the same generated matrices:
//  1. HSparse, compressed output (HS x HS): column tiles of A per Row, psums
//     routed over the rings; one B row of 40 same-bin columns forces PIDU
//     pass splitting and Local Buffer bin overflow (spilled psums are added
//     back to the drained Local Buffer contents); most C rows belong to Row 0
//     so that rings congest and Local Buffer rows are contended.
//  2. MSparse: row tiles of A per Row, B broadcast per Cluster.
//  3. Dense systolic inner product: K = 8 Rows, 128 columns, M = 20 rows;
//     results must leave the last Row one row per cycle per Group.
// Each mechanism (pass split, ring hop, router stall, Local Buffer conflict,
// accumulate hit, insert, overflow, broadcast sync, mode switch) must occur.
module tb_hit_top;
  import hit_pkg::*;

  localparam int NC = 2;
  localparam int NR = 4;
  localparam int CW = 1;
  localparam int RSW = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic cfg_valid = 0; mode_e cfg_mode = MODE_HS_COMP; logic cfg_busy;
  logic desc_wr = 0; logic [CW-1:0] desc_cluster = 0; logic [RSW-1:0] desc_row = 0; desc_t desc = '0;
  logic bdesc_wr = 0; logic [CW-1:0] bdesc_cluster = 0; bdesc_t bdesc = '0;
  logic start = 0, done;
  logic gm_wr_en = 0; logic [CW-1:0] gm_wr_cluster = 0; logic [$clog2(4*NR)-1:0] gm_wr_bank = 0;
  logic [GM_AW-1:0] gm_wr_addr = 0; logic [BANK_W-1:0] gm_wr_data = 0;
  logic drain_en = 0; logic [CW-1:0] drain_cluster = 0; logic [RSW-1:0] drain_row = 0;
  logic [LB_ROW_W-1:0] drain_addr = 0; lb_entry_t [LB_ENTRIES-1:0] drain_data;
  logic spill_valid; logic [CW-1:0] spill_cluster; pvec_t spill_vec;
  logic [NGROUP-1:0] dense_valid; logic [NGROUP-1:0][NMULT-1:0][31:0] dense_out;
  evt_t evt;

  hit_top #(.N_CLUSTERS(NC), .NROWS(NR)) dut (
    .clk, .rst_n, .cfg_valid, .cfg_mode, .cfg_busy, .desc_wr, .desc_cluster, .desc_row, .desc,
    .bdesc_wr, .bdesc_cluster, .bdesc, .start, .done, .gm_wr_en, .gm_wr_cluster, .gm_wr_bank,
    .gm_wr_addr, .gm_wr_data, .drain_en, .drain_cluster, .drain_row, .drain_addr, .drain_data,
    .spill_valid, .spill_cluster, .spill_vec, .spill_ready(1'b1), .dense_valid, .dense_out, .evt);

  int checks = 0, failures = 0;
  int cycle = 0;
  int ev_cnt [NEVT];
  always @(posedge clk) begin
    cycle <= cycle + 1;
    for (int i = 0; i < NEVT; i++) if (evt[i]) ev_cnt[i]++;
  end

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- helpers
  function automatic logic [31:0] i2f(input int v);
    logic [63:0] d;
    if (v == 0) return 32'd0;
    d = $realtobits(real'(v));
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction
  function automatic int f2i(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:0] == 0) return 0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return int'($bitstoreal(d));
  endfunction

  task automatic write_line(input int c, input int r, input int addr, input logic [LINE_W-1:0] l);
    for (int j = 0; j < 4; j++) begin
      @(negedge clk);
      gm_wr_en = 1; gm_wr_cluster = CW'(c); gm_wr_bank = $bits(gm_wr_bank)'(4 * r + j);
      gm_wr_addr = GM_AW'(addr); gm_wr_data = l[BANK_W * j +: BANK_W];
    end
    @(negedge clk) gm_wr_en = 0;
  endtask

  task automatic set_desc(input int c, input int r, input desc_t d);
    @(negedge clk); desc_wr = 1; desc_cluster = CW'(c); desc_row = RSW'(r); desc = d;
    @(negedge clk); desc_wr = 0;
  endtask

  task automatic configure(input mode_e m);
    @(negedge clk); cfg_valid = 1; cfg_mode = m;
    @(negedge clk); cfg_valid = 0;
    while (cfg_busy) @(negedge clk);
  endtask

  task automatic run(output int cycles);
    int t0;
    @(negedge clk); start = 1; t0 = cycle;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    cycles = cycle - t0;
  endtask

  // element lists: key = {c, row, col}
  int  A_row[$], A_col[$], A_val[$], A_cl[$], A_cr[$];   // A elements with owner cluster / Row
  int  B_row[$], B_col[$], B_val[$], B_cl[$], B_cr[$];
  int  exp_c [string];
  int  got_c [string];

  function automatic string key(input int c, input int r, input int n);
    return $sformatf("%0d_%0d_%0d", c, r, n);
  endfunction

  // write sorted A elements (by col, row) of one Row as lines; returns #lines
  task automatic put_a(input int c, input int r, input int base, output int nlines);
    int idx[$];
    logic [LINE_W-1:0] l;
    int e;
    for (int i = 0; i < A_row.size(); i++) if (A_cl[i] == c && A_cr[i] == r) idx.push_back(i);
    idx.sort() with (A_col[item] * 65536 + A_row[item]);
    nlines = 0; l = '0; e = 0;
    foreach (idx[q]) begin
      coo_t x;
      x = '{valid: 1'b1, row: IDX_W'(A_row[idx[q]]), col: CIDX_W'(A_col[idx[q]]), val: i2f(A_val[idx[q]])};
      l[64 * e +: 64] = x;
      e++;
      if (e == LINE_ELEMS) begin write_line(c, r, base + nlines, l); nlines++; l = '0; e = 0; end
    end
    if (e != 0) begin write_line(c, r, base + nlines, l); nlines++; end
  endtask

  // write B elements of the given rows list as 2-line groups, no B row split
  task automatic put_b(input int c, input int r, input int base, input int sel_r, output int nlines);
    int idx[$], rows[$], grp[$];
    int cnt;
    for (int i = 0; i < B_row.size(); i++) if (B_cl[i] == c && B_cr[i] == sel_r) idx.push_back(i);
    idx.sort() with (B_row[item] * 65536 + B_col[item]);
    nlines = 0;
    cnt = 0;
    for (int q = 0; q <= idx.size(); q++) begin
      // close the group when the next B row would not fit
      if (q == idx.size() || (B_row[idx[q]] != (q > 0 ? B_row[idx[q-1]] : -1) &&
          cnt + count_row(idx, q) > NB)) begin
        if (grp.size() != 0) begin
          logic [LINE_W-1:0] l0, l1;
          l0 = '0; l1 = '0;
          foreach (grp[z]) begin
            coo_t x;
            x = '{valid: 1'b1, row: IDX_W'(B_row[grp[z]]), col: CIDX_W'(B_col[grp[z]]), val: i2f(B_val[grp[z]])};
            if (z < LINE_ELEMS) l0[64 * z +: 64] = x; else l1[64 * (z - LINE_ELEMS) +: 64] = x;
          end
          write_line(c, r, base + nlines, l0);
          write_line(c, r, base + nlines + 1, l1);
          nlines += 2;
        end
        grp.delete();
        cnt = 0;
      end
      if (q < idx.size()) begin grp.push_back(idx[q]); cnt++; end
    end
  endtask

  function automatic int count_row(ref int idx[$], input int q);
    int n = 0;
    for (int z = q; z < idx.size() && B_row[idx[z]] == B_row[idx[q]]; z++) n++;
    return n;
  endfunction

  task automatic drain_all(input int rows_per_owner_base);
    for (int c = 0; c < NC; c++) begin
      for (int r = 0; r < NR; r++) begin
        for (int a = 0; a < LB_ROWS; a++) begin
          @(negedge clk); drain_en = 1; drain_cluster = CW'(c); drain_row = RSW'(r); drain_addr = LB_ROW_W'(a);
          @(negedge clk); drain_en = 0;
          #1;
          for (int e = 0; e < LB_ENTRIES; e++) begin
            if (drain_data[e].valid) begin
              string k;
              k = key(c, rows_per_owner_base ? r * LB_ROWS + a : r * 100 + a, int'(drain_data[e].col));
              got_c[k] = (got_c.exists(k) ? got_c[k] : 0) + f2i(drain_data[e].val);
            end
          end
        end
      end
    end
  endtask

  // spills are collected while the run goes
  int spilled = 0;
  always @(posedge clk) begin
    if (rst_n && spill_valid) begin
      for (int i = 0; i < NMULT; i++) begin
        if (spill_vec.lane[i].valid) begin
          string k;
          k = key(int'(spill_cluster), int'(spill_vec.row), int'(spill_vec.lane[i].col));
          got_c[k] = (got_c.exists(k) ? got_c[k] : 0) + f2i(spill_vec.lane[i].val);
          spilled++;
        end
      end
    end
  end

  task automatic compare(input string what);
    int bad = 0;
    foreach (exp_c[k]) begin
      checks++;
      if (!got_c.exists(k) || got_c[k] != exp_c[k]) begin
        bad++;
        if (bad < 6) $display("%s: C[%s] got %0d expected %0d", what, k, got_c.exists(k) ? got_c[k] : -999, exp_c[k]);
      end
    end
    foreach (got_c[k]) begin
      if (!exp_c.exists(k) && got_c[k] != 0) begin
        checks++; bad++;
        if (bad < 6) $display("%s: unexpected C[%s] = %0d", what, k, got_c[k]);
      end
    end
    failures += bad;
    $display("%s: %0d results compared, %0d wrong", what, exp_c.size(), bad);
  endtask

  // ---------------------------------------------------------- main
  initial begin
    int cyc, na, nb;
    for (int i = 0; i < NEVT; i++) ev_cnt[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ================= 1. HSparse, compressed output
    configure(MODE_HS_COMP);
    // A: Row r of cluster c owns columns k in [8r, 8r+8); B rows likewise
    for (int c = 0; c < NC; c++) begin
      for (int r = 0; r < NR; r++) begin
        for (int k = 8 * r; k < 8 * r + 8; k++) begin
          for (int t = 0; t < 6; t++) begin
            int row;
            row = ($urandom % 4 == 0) ? int'($urandom % (NR * LB_ROWS)) : int'($urandom % LB_ROWS);
            // unique (row, k)
            if (t == 0 || !has_a(c, row, k)) begin
              if (!has_a(c, row, k)) begin
                A_row.push_back(row); A_col.push_back(k); A_val.push_back(1 + $urandom % 3);
                A_cl.push_back(c); A_cr.push_back(r);
              end
            end
          end
          if (c == 0 && r == 1 && k == 8) begin
            // 40 columns of one bin: > 32 matches and > 16 entries per bin
            for (int j = 0; j < 40; j++) begin
              B_row.push_back(k); B_col.push_back(8 * j); B_val.push_back(1 + $urandom % 3);
              B_cl.push_back(c); B_cr.push_back(r);
            end
          end else begin
            for (int n = 0; n < 64; n++) begin
              if ($urandom % 5 == 0) begin
                B_row.push_back(k); B_col.push_back(n); B_val.push_back(1 + $urandom % 3);
                B_cl.push_back(c); B_cr.push_back(r);
              end
            end
          end
        end
      end
    end
    build_expected(0);
    for (int c = 0; c < NC; c++) begin
      for (int r = 0; r < NR; r++) begin
        desc_t d;
        put_a(c, r, 0, na);
        put_b(c, r, 100, r, nb);
        d = '0; d.a_base = 0; d.a_lines = (GM_AW+1)'(na); d.b_base = 100; d.b_lines = (GM_AW+1)'(nb);
        set_desc(c, r, d);
      end
    end
    run(cyc);
    $display("HSparse run: %0d cycles", cyc);
    drain_all(1);
    compare("HSparse");
    checks++;
    if (spilled == 0) begin failures++; $display("no psum was spilled"); end

    // ================= 2. MSparse
    clear_lists();
    configure(MODE_MS);
    for (int c = 0; c < NC; c++) begin
      bdesc_t bd;
      for (int k = 0; k < 24; k++) begin
        for (int n = 0; n < 128; n++) begin
          if ($urandom % 3 == 0) begin
            B_row.push_back(k); B_col.push_back(n); B_val.push_back(1 + $urandom % 3);
            B_cl.push_back(c); B_cr.push_back(0);
          end
        end
      end
      for (int r = 0; r < NR; r++) begin
        for (int row = 0; row < LB_ROWS; row++) begin
          for (int k = 0; k < 24; k++) begin
            if ($urandom % 3 == 0) begin
              A_row.push_back(row); A_col.push_back(k); A_val.push_back(1 + $urandom % 3);
              A_cl.push_back(c); A_cr.push_back(r);
            end
          end
        end
      end
      for (int r = 0; r < NR; r++) begin
        desc_t d;
        put_a(c, r, 300, na);
        d = '0; d.a_base = 300; d.a_lines = (GM_AW+1)'(na);
        set_desc(c, r, d);
      end
      put_b(c, 0, 200, 0, nb);
      bd = '0; bd.grp = 5'd0; bd.b_base = 200; bd.b_lines = (GM_AW+1)'(nb);
      @(negedge clk); bdesc_wr = 1; bdesc_cluster = CW'(c); bdesc = bd;
      @(negedge clk); bdesc_wr = 0;
    end
    build_expected(1);
    run(cyc);
    $display("MSparse run: %0d cycles", cyc);
    drain_all(0);
    compare("MSparse");

    // ================= 3. Dense systolic
    dense_test();

    // ================= mechanisms
    begin
      string names [NEVT];
      names = '{"pidu_split", "ring_hop", "router_stall", "lb_conflict", "acc_hit",
                "acc_insert", "acc_overflow", "bcast_sync", "mode_switch"};
      for (int i = 0; i < NEVT; i++) begin
        checks++;
        $display("mechanism %-13s happened in %0d cycles", names[i], ev_cnt[NEVT - 1 - i]);
        if (ev_cnt[NEVT - 1 - i] == 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit has_a(input int c, input int row, input int k);
    for (int i = 0; i < A_row.size(); i++)
      if (A_cl[i] == c && A_row[i] == row && A_col[i] == k) return 1;
    return 0;
  endfunction

  function automatic void clear_lists();
    A_row.delete(); A_col.delete(); A_val.delete(); A_cl.delete(); A_cr.delete();
    B_row.delete(); B_col.delete(); B_val.delete(); B_cl.delete(); B_cr.delete();
    exp_c.delete(); got_c.delete();
  endfunction

  // ms = 0: C row global in the cluster; ms = 1: C rows per Row (key row = r*100 + row)
  function automatic void build_expected(input bit ms);
    for (int i = 0; i < A_row.size(); i++) begin
      for (int j = 0; j < B_row.size(); j++) begin
        if (B_cl[j] == A_cl[i] && B_row[j] == A_col[i] && (ms || B_cr[j] == A_cr[i])) begin
          string k;
          k = key(A_cl[i], ms ? A_cr[i] * 100 + A_row[i] : A_row[i], B_col[j]);
          exp_c[k] = (exp_c.exists(k) ? exp_c[k] : 0) + A_val[i] * B_val[j];
        end
      end
    end
  endfunction

  task automatic dense_test();
    localparam int M = 20;
    localparam int K = NC * NR;
    int Am [M][K];
    int Bm [K][128];
    int outs [NGROUP];
    int first_cyc [NGROUP], last_cyc [NGROUP];
    int bad = 0, t0, cyc;
    configure(MODE_DENSE);
    for (int m = 0; m < M; m++) for (int k = 0; k < K; k++) Am[m][k] = $urandom % 4;
    for (int k = 0; k < K; k++) for (int n = 0; n < 128; n++) Bm[k][n] = $urandom % 4;
    for (int k = 0; k < K; k++) begin
      logic [LINE_W-1:0] l;
      desc_t d;
      int c, r;
      c = k / NR; r = k % NR;
      for (int h = 0; h < 2; h++) begin
        l = '0;
        for (int v = 0; v < 64; v++) l[32 * v +: 32] = i2f(Bm[k][64 * h + v]);
        write_line(c, r, 400 + h, l);
      end
      l = '0;
      for (int m = 0; m < M; m++) l[32 * m +: 32] = i2f(Am[m][k]);
      write_line(c, r, 410, l);
      d = '0; d.a_base = 410; d.a_lines = 1; d.b_base = 400; d.b_lines = 2; d.dense_m = 16'(M);
      set_desc(c, r, d);
    end
    for (int g = 0; g < NGROUP; g++) begin outs[g] = 0; first_cyc[g] = -1; last_cyc[g] = -1; end
    @(negedge clk); start = 1; t0 = cycle;
    @(negedge clk); start = 0;
    while (!(outs[0] == M && outs[1] == M && outs[2] == M && outs[3] == M) && cycle - t0 < 2000) begin
      @(posedge clk); #1;
      for (int g = 0; g < NGROUP; g++) begin
        if (dense_valid[g] && outs[g] < M) begin
          for (int i = 0; i < NMULT; i++) begin
            int e = 0;
            for (int k = 0; k < K; k++) e += Am[outs[g]][k] * Bm[k][32 * g + i];
            checks++;
            if (f2i(dense_out[g][i]) != e) begin
              bad++;
              if (bad < 6) $display("dense C[%0d][%0d] got %0d expected %0d", outs[g], 32 * g + i, f2i(dense_out[g][i]), e);
            end
          end
          if (first_cyc[g] < 0) first_cyc[g] = cycle;
          last_cyc[g] = cycle;
          outs[g]++;
        end
      end
    end
    while (!done) @(negedge clk);
    failures += bad;
    cyc = cycle - t0;
    $display("Dense run: %0d cycles, %0d wrong", cyc, bad);
    // one C row per cycle per Group, Group g one cycle after Group g-1
    for (int g = 0; g < NGROUP; g++) begin
      checks++;
      if (outs[g] != M || last_cyc[g] - first_cyc[g] != M - 1 || (g > 0 && first_cyc[g] != first_cyc[g-1] + 1)) begin
        failures++;
        $display("dense timing group %0d: %0d rows, cycles %0d..%0d", g, outs[g], first_cyc[g], last_cyc[g]);
      end
    end
  endtask
endmodule
