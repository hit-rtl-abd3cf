// tb_pidu: checks the intersection unit. Random A elements are matched against
// random B groups of 64 elements sorted by row (sometimes with more than 32
// matches, forcing several passes). Every (C row, A value, C column, B value)
// pair that should reach a multiplier is computed here and compared, in
// order, with the pairs the unit emits while the downstream 'adv' signal is
// toggled at random. It also checks the pipeline latency (the output register
// is loaded on the fourth clock edge of an element, counting the one that
// accepts it) and that the split flag is seen for every element with more
// than 32 matches.
module tb_pidu;
  import hit_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic adv = 1, in_valid = 0, in_ready, out_valid, split, busy;
  coo_t a_in = '0; coo_t [NB-1:0] b_in = '0;
  logic [IDX_W-1:0] out_row; logic [31:0] out_a; lane_t [NMULT-1:0] out_b;
  int checks = 0, failures = 0, splits = 0, want_splits = 0;
  logic [IDX_W+32+CIDX_W+32-1:0] q[$];

  pidu dut (.clk, .rst_n, .adv, .in_valid, .in_ready, .a_in, .b_in, .out_valid, .out_row, .out_a,
            .out_b, .split, .busy);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output side: compare every valid lane with the model queue
  always @(posedge clk) begin
    if (rst_n && adv && split) splits++;
    if (rst_n && adv && out_valid) begin
      for (int j = 0; j < NMULT; j++) begin
        if (out_b[j].valid) begin
          checks++;
          if (q.size() == 0 || q[0] != {out_row, out_a, out_b[j].col, out_b[j].val}) begin
            failures++;
            if (failures < 10) $display("lane %0d: unexpected pair row %0d col %0d", j, out_row, out_b[j].col);
          end
          if (q.size() != 0) void'(q.pop_front());
        end
      end
    end
  end

  task automatic make_input(input int nmatch_hint);
    int k, rows[NB];
    k = 5 + $urandom % 4;
    a_in = '{valid: 1'b1, row: IDX_W'($urandom), col: CIDX_W'(k), val: $urandom};
    // sorted B rows 0..15 with a chosen number equal to k
    for (int i = 0; i < NB; i++) rows[i] = 0;
    begin
      int lo, n;
      n  = nmatch_hint;
      lo = $urandom % (NB - n + 1);
      for (int i = 0; i < NB; i++) rows[i] = (i < lo) ? ($urandom % k) : (i < lo + n) ? k : k + 1 + $urandom % 4;
      rows.sort();
    end
    for (int i = 0; i < NB; i++)
      b_in[i] = '{valid: ($urandom % 16 != 0), row: IDX_W'(rows[i]), col: CIDX_W'($urandom), val: $urandom};
  endtask

  initial begin
    int t_acc, lat;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // latency of one element with few matches in an empty pipeline
    make_input(3);
    b_in[0] = '{valid: 1'b1, row: IDX_W'(a_in.col), col: 16'd7, val: 32'h1234};
    in_valid = 1'b1;
    @(posedge clk); t_acc = 0;
    for (int i = 0; i < NB; i++) if (b_in[i].valid && b_in[i].row == a_in.col) q.push_back({a_in.row, a_in.val, b_in[i].col, b_in[i].val});
    @(negedge clk); in_valid = 1'b0;
    lat = 1;
    while (!out_valid && lat < 20) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 4) begin failures++; $display("latency %0d cycles, expected 4", lat); end
    repeat (3) @(negedge clk);
    // random traffic
    for (int n = 0; n < 600; n++) begin
      int nm;
      nm = ($urandom % 4 == 0) ? 33 + $urandom % 31 : $urandom % 33;
      make_input(nm);
      in_valid = 1'b1;
      adv = ($urandom % 4 != 0);
      #1;
      while (!(in_ready && adv)) begin
        @(negedge clk);
        adv = ($urandom % 4 != 0);
        #1;
      end
      @(posedge clk);
      begin
        int m;
        m = 0;
        for (int i = 0; i < NB; i++) if (b_in[i].valid && b_in[i].row == a_in.col) begin
          q.push_back({a_in.row, a_in.val, b_in[i].col, b_in[i].val});
          m++;
        end
        // a pass covers 32 lanes counted from the first match
        begin
          int first, last;
          first = -1; last = -1;
          for (int i = 0; i < NB; i++) if (b_in[i].valid && b_in[i].row == a_in.col) begin
            if (first < 0) first = i;
            last = i;
          end
          if (first >= 0 && last - first >= NMULT) want_splits++;
        end
      end
      @(negedge clk);
      in_valid = 1'b0;
      adv = ($urandom % 4 != 0);
    end
    adv = 1'b1;
    repeat (40) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d pairs never came out", q.size()); end
    checks++;
    if (splits < want_splits) begin failures++; $display("split seen %0d times, expected at least %0d", splits, want_splits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
