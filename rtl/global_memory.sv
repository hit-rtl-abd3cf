// global_memory: the multi-banked Global Memory of one Compute Cluster.
//
// NBANKS = 4 x NROWS single-read-port banks of 64-byte words (128 banks of
// GM_DEPTH = 512 words, 4 MB, per Cluster at the default size; 512 banks and
// 16 MB for the 4 Clusters). Row r owns banks 4r..4r+3 and reads them as one
// 256-byte line through its dedicated channel. The cluster broadcast channel
// reads the line of a chosen bank group and hands it to the broadcaster;
// when it reads the banks of Row r in the same cycle as Row r's own channel,
// the broadcast wins and Row r's request is not granted (rd_gnt low).
// Reads return on the cycle after a granted request. A write port, 64 bytes
// per cycle, stands for the HBM refill path. Bank count, word width and
// capacity follow the design; the port arrangement is this implementation's.
module global_memory
  import hit_pkg::*;
#(
  parameter int unsigned NROWS = 32,
  parameter int unsigned DEPTH = GM_DEPTH
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // refill (HBM side)
  input  logic                          wr_en,
  input  logic [$clog2(4*NROWS)-1:0]    wr_bank,
  input  logic [GM_AW-1:0]              wr_addr,
  input  logic [BANK_W-1:0]             wr_data,
  // dedicated Row channels
  input  logic [NROWS-1:0]              rd_req,
  input  logic [NROWS-1:0][GM_AW-1:0]   rd_addr,
  output logic [NROWS-1:0]              rd_gnt,
  output logic [NROWS-1:0][LINE_W-1:0]  rd_data,
  // broadcast channel
  input  logic                          bc_req,
  input  logic [4:0]                    bc_grp,
  input  logic [GM_AW-1:0]              bc_addr,
  output logic [LINE_W-1:0]             bc_data
);
  localparam int unsigned NBANKS = 4 * NROWS;

  logic [BANK_W-1:0] mem [NBANKS][DEPTH];

  always_comb begin
    for (int r = 0; r < NROWS; r++) begin
      rd_gnt[r] = rd_req[r] && !(bc_req && int'(bc_grp) == r);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_bank][wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_data <= '0;
      bc_data <= '0;
    end else begin
      for (int r = 0; r < NROWS; r++) begin
        if (rd_gnt[r]) begin
          for (int j = 0; j < BANKS_PER_ROW; j++)
            rd_data[r][BANK_W * j +: BANK_W] <= mem[BANKS_PER_ROW * r + j][rd_addr[r]];
        end
      end
      if (bc_req) begin
        for (int j = 0; j < BANKS_PER_ROW; j++)
          bc_data[BANK_W * j +: BANK_W] <= mem[BANKS_PER_ROW * int'(bc_grp) + j][bc_addr];
      end
    end
  end
endmodule
