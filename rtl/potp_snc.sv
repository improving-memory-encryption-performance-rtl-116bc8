// potp_snc: the sequence number cache (SNC).
//
// Holds the 16-bit sequence numbers of recently written L2 lines, tagged
// by virtual line number, with LRU replacement. The default is the
// document's main configuration: 64 KB of 2-byte numbers (32K entries),
// fully associative (WAYS = ENTRIES). Setting WAYS = 32 gives the 32-way
// set-associative variant the document also evaluates.
//
// One request per cycle; the result is registered and valid the next
// cycle:
//   SNC_LOOKUP  (query): rsp_hit and rsp_sn; a hit makes the entry MRU.
//   SNC_WRITE   (update/install): on a hit the number is overwritten and
//               the entry's dirty bit is ORed with req_dirty; on a miss
//               the number is installed in an invalid way of the set, or
//               else in the LRU way, and the displaced entry is reported
//               on evict_* so that a dirty one can be written to memory.
// "Dirty" means the on-chip number differs from the copy in memory.
//
// LRU is exact: each way holds its rank in its set (0 = most recently
// used); touching a way moves it to rank 0 and ages every way ranked
// above it. Ranks start as a permutation at reset and stay one.
// The whole tag is the virtual line number, so SETS = 1 needs no index.
// LRU ranks, the dirty bit and the full-line tag are this design's own
// choices; the capacity, the number width and LRU itself are the
// document's.
module potp_snc
  import potp_pkg::*;
#(
  parameter int unsigned ENTRIES = 32768,
  parameter int unsigned WAYS    = 32768
) (
  input  logic    clk,
  input  logic    rst_n,
  input  snc_op_e req_op,
  input  vline_t  req_vline,
  input  sn_t     req_sn,
  input  logic    req_dirty,
  output logic    rsp_valid,
  output logic    rsp_hit,
  output sn_t     rsp_sn,
  output logic    evict_valid,
  output vline_t  evict_vline,
  output sn_t     evict_sn,
  output logic    evict_dirty
);

  localparam int unsigned SETS   = ENTRIES / WAYS;
  localparam int unsigned SET_W  = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned RANK_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned WAY_W  = RANK_W;
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  initial assert (SETS * WAYS == ENTRIES)
    else $error("ENTRIES must be a multiple of WAYS");

  logic              valid [ENTRIES];
  logic              dirty [ENTRIES];
  vline_t            tag   [ENTRIES];
  sn_t               sn    [ENTRIES];
  logic [RANK_W-1:0] rank  [ENTRIES];

  // ------------------------------------------------------ lookup
  logic [SET_W-1:0] set_idx;
  int unsigned      base;
  logic             hit;
  logic [WAY_W-1:0] hit_way, free_way, lru_way, vic_way;
  logic             have_free;

  always_comb begin
    set_idx   = (SETS > 1) ? SET_W'(req_vline) : '0;
    base      = int'(set_idx) * WAYS;
    hit       = 1'b0;
    hit_way   = '0;
    have_free = 1'b0;
    free_way  = '0;
    lru_way   = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid[base + w] && tag[base + w] == req_vline) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
      if (!valid[base + w] && !have_free) begin
        have_free = 1'b1;
        free_way  = WAY_W'(w);
      end
      if (rank[base + w] == RANK_W'(WAYS - 1)) lru_way = WAY_W'(w);
    end
    vic_way = have_free ? free_way : lru_way;
  end

  // Absolute entry numbers of the hit way and the replacement way.
  logic [IDX_W-1:0] hit_idx, vic_idx;
  assign hit_idx = IDX_W'(base) + IDX_W'(hit_way);
  assign vic_idx = IDX_W'(base) + IDX_W'(vic_way);

  // ------------------------------------------------------ update
  logic             touch;
  logic [IDX_W-1:0] touch_idx;
  assign touch     = (req_op == SNC_LOOKUP && hit) || (req_op == SNC_WRITE);
  assign touch_idx = hit ? hit_idx : vic_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        valid[i] <= 1'b0;
        dirty[i] <= 1'b0;
        rank[i]  <= RANK_W'(i % WAYS);
      end
      rsp_valid   <= 1'b0;
      rsp_hit     <= 1'b0;
      rsp_sn      <= '0;
      evict_valid <= 1'b0;
      evict_vline <= '0;
      evict_sn    <= '0;
      evict_dirty <= 1'b0;
    end else begin
      rsp_valid   <= (req_op != SNC_NOP);
      rsp_hit     <= hit;
      rsp_sn      <= hit ? sn[hit_idx] : '0;
      evict_valid <= 1'b0;
      if (touch) begin
        for (int w = 0; w < WAYS; w++)
          if (rank[base + w] < rank[touch_idx]) rank[base + w] <= rank[base + w] + 1'b1;
        rank[touch_idx] <= '0;
      end
      if (req_op == SNC_WRITE) begin
        if (hit) begin
          sn[hit_idx]    <= req_sn;
          dirty[hit_idx] <= dirty[hit_idx] | req_dirty;
        end else begin
          evict_valid <= valid[vic_idx];
          evict_vline <= tag[vic_idx];
          evict_sn    <= sn[vic_idx];
          evict_dirty <= dirty[vic_idx];
          valid[vic_idx] <= 1'b1;
          dirty[vic_idx] <= req_dirty;
          tag[vic_idx]   <= req_vline;
          sn[vic_idx]    <= req_sn;
        end
      end
    end
  end

endmodule
