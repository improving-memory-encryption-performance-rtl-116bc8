// potp_write_buffer: the write buffer with a data section and a pad
// section.
//
// Dirty L2 lines evicted towards memory wait here in plaintext, each with
// room for its eight 128-bit pads. Pads arrive from the encryption unit
// while the line waits; the line can leave only once all of them are in,
// and it leaves as data ^ pad, so memory only ever sees ciphertext. Lines
// marked plain (regions kept in plaintext) need no pads.
//
// Retirement follows the document: FIFO order, oldest entry only, "lazy"
// retirement once the number of occupied entries exceeds the high-water
// mark HWM and the bus is free; when the buffer is full it asks the bus
// for top priority (`full`), still one entry at a time. An L2 read miss
// can hit here: lk_pa is compared with every entry and the youngest match
// is returned in plaintext the same cycle.
//
// Interface:
//   alloc_*  : enqueue a line; alloc_idx is the entry it will occupy and
//              is valid in the same cycle (it is the tail pointer).
//   pad_*    : store one pad segment into entry pad_idx.
//   wr_*     : retirement request towards the bus arbiter; the entry leaves
//              in the cycle wr_valid && wr_ready.
// The depth (8 entries) is the document's; HWM = 4 is this design's choice
// (the document names the threshold but not its value).
module potp_write_buffer
  import potp_pkg::*;
#(
  parameter int unsigned ENTRIES = 8,
  parameter int unsigned HWM     = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // enqueue
  input  logic                     alloc_valid,
  output logic                     alloc_ready,
  input  pa_t                      alloc_pa,
  input  line_t                    alloc_data,
  input  logic                     alloc_plain,
  output logic [$clog2(ENTRIES)-1:0] alloc_idx,
  // pads from the encryption unit
  input  logic                     pad_valid,
  input  logic [$clog2(ENTRIES)-1:0] pad_idx,
  input  logic [SEG_IDX_W-1:0]     pad_seg,
  input  seg_t                     pad_data,
  // read-miss lookup
  input  pa_t                      lk_pa,
  output logic                     lk_hit,
  output line_t                    lk_data,
  // retirement
  output logic                     wr_valid,
  input  logic                     wr_ready,
  output pa_t                      wr_pa,
  output line_t                    wr_data,
  output logic                     full,
  output logic                     head_pad_wait,
  output logic [$clog2(ENTRIES):0] count
);

  localparam int unsigned IW = $clog2(ENTRIES);

  initial assert (ENTRIES == 2**IW) else $error("ENTRIES must be a power of two");

  logic              vld  [ENTRIES];
  pa_t               pa   [ENTRIES];
  line_t             data [ENTRIES];
  line_t             pad  [ENTRIES];
  logic [NSEG-1:0]   have [ENTRIES];
  logic [IW-1:0]     head, tail;

  assign full        = (count == (IW+1)'(ENTRIES));
  assign alloc_ready = !full;
  assign alloc_idx   = tail;

  logic head_ready;
  assign head_ready    = vld[head] && (&have[head]);
  assign head_pad_wait = vld[head] && !(&have[head]) && (count > (IW+1)'(HWM));
  assign wr_valid      = head_ready && (count > (IW+1)'(HWM));
  assign wr_pa         = pa[head];
  assign wr_data       = data[head] ^ pad[head];

  // Youngest matching entry wins: scan from the head so later ones overwrite.
  always_comb begin
    logic [IW-1:0] e;
    lk_hit  = 1'b0;
    lk_data = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      e = head + IW'(i);
      if (vld[e] && pa[e] == lk_pa) begin
        lk_hit  = 1'b1;
        lk_data = data[e];
      end
    end
  end

  logic do_alloc, do_retire;
  assign do_alloc  = alloc_valid && alloc_ready;
  assign do_retire = wr_valid && wr_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        vld[i]  <= 1'b0;
        have[i] <= '0;
        pa[i]   <= '0;
        data[i] <= '0;
        pad[i]  <= '0;
      end
    end else begin
      if (pad_valid) begin
        pad[pad_idx][pad_seg*SEG_W +: SEG_W] <= pad_data;
        have[pad_idx][pad_seg]               <= 1'b1;
      end
      if (do_retire) begin
        vld[head] <= 1'b0;
        head      <= head + 1'b1;
      end
      if (do_alloc) begin
        vld[tail]  <= 1'b1;
        pa[tail]   <= alloc_pa;
        data[tail] <= alloc_data;
        pad[tail]  <= '0;
        have[tail] <= alloc_plain ? '1 : '0;
        tail       <= tail + 1'b1;
      end
      count <= count + (IW+1)'(do_alloc) - (IW+1)'(do_retire);
    end
  end

  // A pad may only be written into an entry that is waiting for it.
  a_pad_expected: assert property (@(posedge clk) disable iff (!rst_n)
    pad_valid |-> vld[pad_idx] && !have[pad_idx][pad_seg])
    else $error("pad for entry %0d segment %0d not expected", pad_idx, pad_seg);

  // Nothing leaves the buffer before its pads are complete.
  a_retire_padded: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid |-> &have[head]);

endmodule
