// potp_top: pseudo-one-time-pad memory encryption between an L2 cache and
// main memory.
//
// Lines leave the chip as plaintext ^ AES_KEY(seed) and come back through
// the same XOR, where the seed of each 128-bit segment is its virtual
// address plus the line's 16-bit sequence number. Because the pad does not
// depend on the data, it is computed while the memory access (reads) or
// the write-buffer wait (writes) is in progress, taking the cipher off the
// read critical path.
//
// Blocks: potp_ctrl (request sequencing), potp_snc (sequence number cache,
// 64 KB, fully associative, LRU), potp_pad_engine (pipelined AES-128 with
// the 50-cycle crypto delay), potp_write_buffer (8 entries, data and pad
// sections, lazy FIFO retirement) and potp_mem_arbiter (one memory bus).
//
// Interface: the L2 side issues read misses (rd_*; answered on rsp_*) and
// evictions (ev_*) with both addresses of the line; the memory side is a
// single-transaction bus (mem_*) that carries line reads and writes and
// sequence-number reads and writes, and answers reads on mem_rsp_*.
// `key` is the program's secret key; `system_timer` is the timer added to
// a sequence number on every write. Event pulses are brought out for
// performance counting.
module potp_top
  import potp_pkg::*;
#(
  parameter int unsigned SNC_ENTRIES = 32768,
  parameter int unsigned SNC_WAYS    = 32768,
  parameter int unsigned WB_ENTRIES  = 8,
  parameter int unsigned WB_HWM      = 4,
  parameter int unsigned CRYPTO_LAT  = 50,
  parameter pa_t         A_SN        = 32'h3000_0000,
  parameter va_t         MEM_ADDR0   = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [127:0] key,
  input  sn_t          system_timer,
  // L2 read misses
  input  logic         rd_valid,
  output logic         rd_ready,
  input  va_t          rd_va,
  input  pa_t          rd_pa,
  input  rd_kind_e     rd_kind,
  output logic         rsp_valid,
  output line_t        rsp_data,
  // L2 evictions
  input  logic         ev_valid,
  output logic         ev_ready,
  input  va_t          ev_va,
  input  pa_t          ev_pa,
  input  line_t        ev_data,
  input  logic         ev_plain,
  // main memory
  output logic         mem_req_valid,
  input  logic         mem_req_ready,
  output mem_req_t     mem_req,
  input  logic         mem_rsp_valid,
  input  line_t        mem_rsp_data,
  // status and events
  output potp_events_t events,
  output logic         wb_full,
  output logic         wb_head_pad_wait,
  output logic         wb_retire_urgent,
  output logic         wb_retire_lazy
);

  localparam int unsigned WIW = $clog2(WB_ENTRIES);

  snc_op_e  snc_op;
  vline_t   snc_vline, snc_evict_vline;
  sn_t      snc_sn, snc_rsp_sn, snc_evict_sn;
  logic     snc_dirty, snc_rsp_valid, snc_rsp_hit, snc_evict_valid, snc_evict_dirty;

  logic     wb_alloc_valid, wb_alloc_ready, wb_alloc_plain, wb_lk_hit;
  pa_t      wb_alloc_pa, wb_lk_pa, wb_wr_pa;
  line_t    wb_alloc_data, wb_lk_data, wb_wr_data;
  logic [WIW-1:0] wb_alloc_idx;
  logic     wb_wr_valid, wb_wr_ready;
  logic [WIW:0] wb_count;

  logic     seed_valid, pad_valid;
  seg_t     seed, pad;
  pad_tag_t seed_tag, pad_tag;

  logic     ctl_mem_valid, ctl_mem_ready;
  mem_req_t ctl_mem_req;

  potp_ctrl #(.A_SN(A_SN), .MEM_ADDR0(MEM_ADDR0), .WB_ENTRIES(WB_ENTRIES)) u_ctrl (
    .clk, .rst_n, .system_timer,
    .rd_valid, .rd_ready, .rd_va, .rd_pa, .rd_kind, .rsp_valid, .rsp_data,
    .ev_valid, .ev_ready, .ev_va, .ev_pa, .ev_data, .ev_plain,
    .snc_op, .snc_vline, .snc_sn, .snc_dirty, .snc_rsp_hit, .snc_rsp_sn,
    .snc_evict_valid, .snc_evict_vline, .snc_evict_sn, .snc_evict_dirty,
    .wb_alloc_valid, .wb_alloc_ready, .wb_alloc_pa, .wb_alloc_data, .wb_alloc_plain,
    .wb_alloc_idx, .wb_lk_pa, .wb_lk_hit, .wb_lk_data,
    .seed_valid, .seed, .seed_tag, .pad_valid, .pad, .pad_tag,
    .mem_valid(ctl_mem_valid), .mem_ready(ctl_mem_ready), .mem_req(ctl_mem_req),
    .mem_rsp_valid, .mem_rsp_data,
    .events
  );

  potp_snc #(.ENTRIES(SNC_ENTRIES), .WAYS(SNC_WAYS)) u_snc (
    .clk, .rst_n,
    .req_op(snc_op), .req_vline(snc_vline), .req_sn(snc_sn), .req_dirty(snc_dirty),
    .rsp_valid(snc_rsp_valid), .rsp_hit(snc_rsp_hit), .rsp_sn(snc_rsp_sn),
    .evict_valid(snc_evict_valid), .evict_vline(snc_evict_vline),
    .evict_sn(snc_evict_sn), .evict_dirty(snc_evict_dirty)
  );

  potp_pad_engine #(.CRYPTO_LAT(CRYPTO_LAT)) u_pad (
    .clk, .rst_n, .key,
    .seed_valid, .seed, .seed_tag,
    .pad_valid, .pad, .pad_tag
  );

  potp_write_buffer #(.ENTRIES(WB_ENTRIES), .HWM(WB_HWM)) u_wb (
    .clk, .rst_n,
    .alloc_valid(wb_alloc_valid), .alloc_ready(wb_alloc_ready), .alloc_pa(wb_alloc_pa),
    .alloc_data(wb_alloc_data), .alloc_plain(wb_alloc_plain), .alloc_idx(wb_alloc_idx),
    .pad_valid(pad_valid && pad_tag.to_wb), .pad_idx(pad_tag.idx[WIW-1:0]),
    .pad_seg(pad_tag.seg), .pad_data(pad),
    .lk_pa(wb_lk_pa), .lk_hit(wb_lk_hit), .lk_data(wb_lk_data),
    .wr_valid(wb_wr_valid), .wr_ready(wb_wr_ready), .wr_pa(wb_wr_pa), .wr_data(wb_wr_data),
    .full(wb_full), .head_pad_wait(wb_head_pad_wait), .count(wb_count)
  );

  potp_mem_arbiter u_arb (
    .ctl_valid(ctl_mem_valid), .ctl_ready(ctl_mem_ready), .ctl_req(ctl_mem_req),
    .wb_valid(wb_wr_valid), .wb_ready(wb_wr_ready), .wb_pa(wb_wr_pa), .wb_data(wb_wr_data),
    .wb_full,
    .mem_req_valid, .mem_req_ready, .mem_req,
    .grant_wb_urgent(wb_retire_urgent), .grant_wb_lazy(wb_retire_lazy)
  );

  // The SNC answers every request the cycle after it; the controller reads
  // the answer by state, so the valid flag is only checked here.
  a_snc_rsp: assert property (@(posedge clk) disable iff (!rst_n)
    (snc_op != SNC_NOP) |=> snc_rsp_valid);

  logic unused;
  assign unused = ^{wb_count, pad_tag.idx};

endmodule
