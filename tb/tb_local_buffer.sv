// tb_local_buffer: checks the Local Buffer against an array model. Each cycle
// up to four ports write whole rows (never two to the same row, as the Row's
// arbiter guarantees), four ports read rows combinationally and the drain
// port reads one row a cycle later. It also checks that the clear makes every
// row read as empty and that writes are ignored while the buffer is gated off.
module tb_local_buffer;
  import hit_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clear = 0, en = 1, drain_en = 0;
  logic [NGROUP-1:0][LB_ROW_W-1:0] rd_addr = '0, wr_addr = '0;
  lb_entry_t [NGROUP-1:0][LB_ENTRIES-1:0] rd_data, wr_data;
  logic [NGROUP-1:0] wr_en = '0;
  logic [LB_ROW_W-1:0] drain_addr = '0;
  lb_entry_t [LB_ENTRIES-1:0] drain_data, model [LB_ROWS], drain_exp;
  int checks = 0, failures = 0;

  local_buffer dut (.clk, .rst_n, .clear, .en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data,
                    .drain_en, .drain_addr, .drain_data);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic lb_entry_t [LB_ENTRIES-1:0] rnd_row();
    lb_entry_t [LB_ENTRIES-1:0] r;
    for (int e = 0; e < LB_ENTRIES; e++) r[e] = '{valid: 1'($urandom), col: CIDX_W'($urandom), val: $urandom};
    return r;
  endfunction

  initial begin
    bit drained;
    wr_data = '0;
    for (int r = 0; r < LB_ROWS; r++) model[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    drained = 0;
    for (int i = 0; i < 2000; i++) begin
      logic [LB_ROWS-1:0] used;
      // reads (combinational)
      for (int g = 0; g < NGROUP; g++) rd_addr[g] = LB_ROW_W'($urandom);
      #1;
      for (int g = 0; g < NGROUP; g++) begin
        checks++;
        if (rd_data[g] != model[rd_addr[g]]) begin
          failures++;
          if (failures < 10) $display("cycle %0d port %0d row %0d read wrong", i, g, rd_addr[g]);
        end
      end
      if (drained) begin
        checks++;
        if (drain_data != drain_exp) begin failures++; if (failures < 10) $display("cycle %0d drain wrong", i); end
      end
      // writes, drain and clear for this cycle
      used = '0;
      en = ($urandom % 16 != 0);
      clear = ($urandom % 200 == 0);
      for (int g = 0; g < NGROUP; g++) begin
        wr_addr[g] = LB_ROW_W'($urandom);
        wr_en[g] = ($urandom % 2 == 0) && !used[wr_addr[g]];
        if (wr_en[g]) used[wr_addr[g]] = 1'b1;
        wr_data[g] = rnd_row();
      end
      drain_en = ($urandom % 2 == 0);
      drain_addr = LB_ROW_W'($urandom);
      drained = drain_en;
      drain_exp = model[drain_addr];
      @(posedge clk);
      if (clear) begin
        for (int r = 0; r < LB_ROWS; r++) model[r] = '0;
      end else if (en) begin
        for (int g = 0; g < NGROUP; g++) if (wr_en[g]) model[wr_addr[g]] = wr_data[g];
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
