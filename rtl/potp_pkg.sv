// potp_pkg: shared constants, types and AES helper functions for the
// pseudo-one-time-pad (POTP) memory encryption engine.
//
// The engine sits between an L2 cache and main memory. A line written to
// memory is XORed with pads AES_K(seed); a line read from memory is XORed
// with the same pads, which are computed while the memory access is in
// flight. The seed of each 128-bit segment is its virtual address plus the
// line's sequence number.
//
// Sizes that follow the document: 128-byte L2 lines, 128-bit AES segments
// (eight per line), 16-bit (2-byte) sequence numbers, a 48-bit virtual
// address. The 32-bit physical address is this design's own choice.
//
// The AES S-box is computed (multiplicative inverse in GF(2^8) followed by
// the FIPS-197 affine transform) rather than tabulated.
package potp_pkg;

  localparam int unsigned VA_W       = 48;   // virtual address bits
  localparam int unsigned PA_W       = 32;   // physical address bits
  localparam int unsigned LINE_BYTES = 128;  // L2 line size
  localparam int unsigned LINE_W     = LINE_BYTES * 8;
  localparam int unsigned SEG_W      = 128;  // AES block = one segment
  localparam int unsigned NSEG       = LINE_W / SEG_W;
  localparam int unsigned SEG_IDX_W  = $clog2(NSEG);
  localparam int unsigned LINE_OFS_W = $clog2(LINE_BYTES);
  localparam int unsigned VLINE_W    = VA_W - LINE_OFS_W;  // virtual line number
  localparam int unsigned SN_W       = 16;   // sequence number bits
  localparam int unsigned SN_BYTES   = SN_W / 8;

  typedef logic [LINE_W-1:0]  line_t;
  typedef logic [SEG_W-1:0]   seg_t;
  typedef logic [VA_W-1:0]    va_t;
  typedef logic [PA_W-1:0]    pa_t;
  typedef logic [VLINE_W-1:0] vline_t;
  typedef logic [SN_W-1:0]    sn_t;

  // Kind of an L2 read miss.
  typedef enum logic [1:0] {
    RD_DATA  = 2'd0,  // data line: seed = segment VA + sequence number
    RD_INSTR = 2'd1,  // instruction line: seed = segment VA (constant)
    RD_PLAIN = 2'd2   // plaintext region (shared library, program input)
  } rd_kind_e;

  // Main-memory bus operations.
  typedef enum logic [1:0] {
    MEM_RD_LINE = 2'd0,
    MEM_WR_LINE = 2'd1,
    MEM_RD_SN   = 2'd2,
    MEM_WR_SN   = 2'd3
  } mem_op_e;

  typedef struct packed {
    mem_op_e op;
    pa_t     addr;
    line_t   data;   // line data, or a sequence number in bits [SN_W-1:0]
  } mem_req_t;

  // SNC request operations.
  typedef enum logic [1:0] {
    SNC_NOP    = 2'd0,
    SNC_LOOKUP = 2'd1,  // query: report hit and sequence number
    SNC_WRITE  = 2'd2   // update or install, may evict the LRU entry
  } snc_op_e;

  // Destination of a pad leaving the encryption unit.
  typedef struct packed {
    logic                 to_wb;  // 1: write-buffer pad section, 0: read path
    logic [2:0]           idx;    // write-buffer entry
    logic [SEG_IDX_W-1:0] seg;    // segment within the line
  } pad_tag_t;

  // One-cycle event pulses, for performance counting.
  typedef struct packed {
    logic query_hit;
    logic query_miss;
    logic update_hit;
    logic update_miss;
    logic sn_victim_wb;    // dirty SNC victim written to memory
    logic wb_read_hit;     // L2 read miss served by the write buffer
    logic instr_read;
    logic plain_access;
    logic read_done;
  } potp_events_t;

  // ---------------------------------------------------------------- AES
  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // S-box: inverse in GF(2^8) (as a^254) followed by the affine transform.
  function automatic logic [7:0] sbox_calc(input logic [7:0] a);
    logic [7:0] inv, sq, r;
    inv = 8'h01;
    sq  = a;
    for (int i = 0; i < 8; i++) begin       // 254 = 0b11111110
      sq = gmul(sq, sq);
      if (i < 7) inv = gmul(inv, sq);
    end
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  typedef logic [7:0] sbox_t [256];

  function automatic sbox_t sbox_table();
    sbox_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_calc(8'(i));
    return t;
  endfunction

endpackage
