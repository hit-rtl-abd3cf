// local_buffer: multi-banked, multi-ported register-file Local Buffer of one
// Compute Row. It holds the C rows owned by the Row while they accumulate.
//
// Organisation: LB_ROWS rows; each row spans the 8 banks and each bank row
// holds LB_SLOTS entries {valid, column, value}. In the compressed (HS x HS)
// mode a bank row is one bin of the binning-compare-update scheme; in the
// direct mode column c lives in bank c mod 8, slot (c / 8) mod LB_SLOTS.
// There is one read/write port per Compute Group (4 reads and 4 writes per
// bank per cycle, as the design states). A port reads a whole row
// combinationally and writes the whole updated row on the clock edge, so a
// read-modify-write completes in one cycle; the Row's arbiter keeps two
// Groups from writing the same row in the same cycle. A fifth, registered
// read port lets results be drained. 'clear' initialises the buffer in one
// cycle by marking every row empty (a row reads as all-invalid until it is
// next written). With 16 rows x 128 entries x 49 bits the buffer holds
// 12.25 KiB against the 11.4 KB of the design; the entry count per bank row
// (which sets 16 comparators per psum, 512 per Group) and the row count are
// this implementation's choices.
module local_buffer
  import hit_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic                         en,          // powered (not dense mode)
  input  logic [NGROUP-1:0][LB_ROW_W-1:0] rd_addr,
  output lb_entry_t [NGROUP-1:0][LB_ENTRIES-1:0] rd_data,
  input  logic [NGROUP-1:0]            wr_en,
  input  logic [NGROUP-1:0][LB_ROW_W-1:0] wr_addr,
  input  lb_entry_t [NGROUP-1:0][LB_ENTRIES-1:0] wr_data,
  input  logic                         drain_en,
  input  logic [LB_ROW_W-1:0]          drain_addr,
  output lb_entry_t [LB_ENTRIES-1:0]   drain_data   // one cycle after drain_en
);
  lb_entry_t [LB_ENTRIES-1:0] mem [LB_ROWS];
  logic [LB_ROWS-1:0]         live;   // row written since the last clear

  always_ff @(posedge clk) begin
    for (int g = 0; g < NGROUP; g++) begin
      if (en && wr_en[g]) mem[wr_addr[g]] <= wr_data[g];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      live <= '0;
    end else if (clear) begin
      live <= '0;
    end else begin
      for (int g = 0; g < NGROUP; g++) begin
        if (en && wr_en[g]) live[wr_addr[g]] <= 1'b1;
      end
    end
  end

  always_comb begin
    for (int g = 0; g < NGROUP; g++) rd_data[g] = live[rd_addr[g]] ? mem[rd_addr[g]] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        drain_data <= '0;
    else if (drain_en) drain_data <= live[drain_addr] ? mem[drain_addr] : '0;
  end

  // two Groups never write the same row in one cycle (the Row arbitrates)
  for (genvar g = 0; g < NGROUP; g++) begin : g_chk
    for (genvar h = g + 1; h < NGROUP; h++) begin : g_pair
      a_one_writer : assert property (@(posedge clk) disable iff (!rst_n)
        !(wr_en[g] && wr_en[h] && wr_addr[g] == wr_addr[h]));
    end
  end
endmodule
