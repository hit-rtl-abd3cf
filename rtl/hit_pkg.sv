// hit_pkg: types and constants shared by the HiT sparsity-adaptive matrix
// multiplication accelerator.
//
// Numbers that come from the design description: 4 Compute Clusters of 32
// Compute Rows, 4 Compute Groups per Row, 32 FP32 multipliers and 32 FP32
// adders per Group, 64 comparators per PIDU, 8 Local Buffer banks, 128 Global
// Memory banks of 64-byte words per Cluster and 4 dedicated banks per Row.
// Choices of this implementation: 15-bit row and 16-bit column tile-relative
// indices, a 64-bit on-chip COO element {valid, row, col, value}, 16 entries
// per Local Buffer bank row and 16 Local Buffer rows.
package hit_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned IDX_W       = 15;  // tile-relative row index bits
  localparam int unsigned CIDX_W      = 16;  // tile-relative column index bits
  localparam int unsigned NGROUP      = 4;   // Compute Groups per Row
  localparam int unsigned NMULT       = 32;  // multipliers (and adders) per Group
  localparam int unsigned NB          = 64;  // B elements compared per cycle (PIDU lanes)
  localparam int unsigned LB_BANKS    = 8;   // Local Buffer banks (= bins)
  localparam int unsigned LB_SLOTS    = 16;  // entries of one bank row (= one bin)
  localparam int unsigned LB_ROWS     = 16;  // Local Buffer rows (C rows owned by a Row)
  localparam int unsigned LB_ENTRIES  = LB_BANKS * LB_SLOTS;  // entries per LB row
  localparam int unsigned LB_ROW_W    = $clog2(LB_ROWS);
  localparam int unsigned LINE_ELEMS  = 32;  // COO elements per 4-bank line (4 x 64 B)
  localparam int unsigned DLINE_ELEMS = 64;  // dense FP32 values per 4-bank line
  localparam int unsigned BANK_W      = 512; // 64-byte Global Memory word
  localparam int unsigned BANKS_PER_ROW = 4;
  localparam int unsigned LINE_W      = BANK_W * BANKS_PER_ROW;
  localparam int unsigned GM_DEPTH    = 512; // words per bank: 128 x 512 x 64 B = 4 MB per Cluster
  localparam int unsigned GM_AW       = $clog2(GM_DEPTH);
  localparam int unsigned OVF_DEPTH   = 4;   // overflow buffer vectors per DMAccum

  // ---------------------------------------------------------------- modes
  // HS_COMP  : HSparse, compressed (binned) output, for HS x HS
  // HS_DIRECT: HSparse, dense output storage, for HS x MS and HS x D
  // MS       : MSparse, B broadcast in the Cluster, dense output storage
  // DENSE    : inner-product systolic array
  typedef enum logic [1:0] {
    MODE_HS_COMP   = 2'd0,
    MODE_HS_DIRECT = 2'd1,
    MODE_MS        = 2'd2,
    MODE_DENSE     = 2'd3
  } mode_e;

  // Per-mode enable flags; they stand for the clock and power gates.
  typedef struct packed {
    logic  pidu_en;      // PIDU and sparse stream path active (HS, MS)
    logic  router_en;    // PSum Routers and ring active (HS only)
    logic  lb_en;        // Local Buffer powered (HS, MS)
    logic  compressed;   // DMAccum binning mode (HS x HS only)
    logic  systolic_en;  // systolic links active (dense only)
    logic  bcast_en;     // cluster B broadcast used (MS only)
  } gate_t;

  // On-chip COO element: indices packed together with the value.
  typedef struct packed {
    logic              valid;
    logic [IDX_W-1:0]  row;
    logic [CIDX_W-1:0] col;
    logic [31:0]       val;
  } coo_t;  // 64 bits

  // One lane of a psum vector: column index and value; the row is shared.
  typedef struct packed {
    logic              valid;
    logic [CIDX_W-1:0] col;
    logic [31:0]       val;
  } lane_t;

  // Psum vector carried by multiplier outputs, ring links and the
  // DMAccum input: all lanes come from one A element and so share a C row.
  typedef struct packed {
    logic [IDX_W-1:0]   row;
    lane_t [NMULT-1:0]  lane;
  } pvec_t;

  // Local Buffer entry.
  typedef struct packed {
    logic              valid;
    logic [CIDX_W-1:0] col;
    logic [31:0]       val;
  } lb_entry_t;

  // Beat issued by the stream controller to the 4 Groups of a Row.
  typedef struct packed {
    coo_t [NGROUP-1:0] a;   // one A element per Group
    coo_t [NB-1:0]     b;   // the shared B group
  } beat_t;

  // Per-row stream descriptor written by the host.
  typedef struct packed {
    logic [GM_AW-1:0] a_base;   // first A line
    logic [GM_AW:0]   a_lines;  // number of A lines
    logic [GM_AW-1:0] b_base;   // first B line (HSparse) / stationary B row (dense)
    logic [GM_AW:0]   b_lines;  // number of B lines
    logic [15:0]      dense_m;  // dense mode: A column length (rows of A)
  } desc_t;

  // Broadcast descriptor of a Cluster (MSparse).
  typedef struct packed {
    logic [4:0]       grp;      // bank group (Row channel) the B lines are read from
    logic [GM_AW-1:0] b_base;
    logic [GM_AW:0]   b_lines;
  } bdesc_t;

  // Event flags, high in a cycle in which the mechanism happened somewhere.
  typedef struct packed {
    logic pidu_split;    // more than 32 matches: A held for another pass
    logic ring_hop;      // a psum vector left a router over a ring link
    logic router_stall;  // a Group stalled on a full multiplier ring buffer
    logic lb_conflict;   // a DMAccum waited for a Local Buffer row another Group held
    logic acc_hit;       // compressed mode: psum matched a stored column
    logic acc_insert;    // compressed mode: psum inserted in an empty slot
    logic acc_overflow;  // compressed mode: bin full, psum sent to overflow buffer
    logic bcast_sync;    // MSparse: broadcast advanced after all Rows finished a group
    logic mode_switch;   // reconfiguration took place
  } evt_t;

  localparam int unsigned NEVT = $bits(evt_t);

endpackage
