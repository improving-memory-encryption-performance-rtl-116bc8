// tb_potp_write_buffer: random enqueues, pad deliveries in random order,
// read lookups and bus grants, compared every cycle with a queue model:
// occupancy, full flag, the lazy-retirement condition (head padded and
// occupancy above HWM), the ciphertext leaving (data ^ pad), FIFO order
// and the youngest-match lookup. Plain lines must leave unpadded.
module tb_potp_write_buffer;
  import potp_pkg::*;

  localparam int unsigned N = 8, HWM = 4;

  typedef struct { pa_t pa; line_t data; line_t pad; logic [NSEG-1:0] have; int idx; } ent_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_retire = 0, n_full = 0, n_lkhit = 0, n_padwait = 0, n_plain = 0;

  logic alloc_valid, alloc_ready, alloc_plain;
  pa_t alloc_pa, lk_pa, wr_pa;
  line_t alloc_data, lk_data, wr_data;
  logic [2:0] alloc_idx, pad_idx;
  logic pad_valid;
  logic [SEG_IDX_W-1:0] pad_seg;
  seg_t pad_data;
  logic lk_hit, wr_valid, wr_ready, full, head_pad_wait;
  logic [3:0] count;

  potp_write_buffer #(.ENTRIES(N), .HWM(HWM)) dut (.*);

  ent_t q [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic line_t rnd_line();
    line_t l;
    for (int i = 0; i < LINE_W / 32; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  initial begin
    alloc_valid = 0; alloc_plain = 0; alloc_pa = '0; alloc_data = '0;
    pad_valid = 0; pad_idx = '0; pad_seg = '0; pad_data = '0;
    lk_pa = '0; wr_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int pick, s, yi;
      logic exp_hit, exp_wr;
      line_t exp_lk;
      @(negedge clk);
      // stimulus
      alloc_valid = ($urandom_range(0, 3) == 0);
      alloc_plain = ($urandom_range(0, 7) == 0);
      alloc_pa    = pa_t'($urandom_range(0, 5)) << 7;
      alloc_data  = rnd_line();
      wr_ready    = ($urandom_range(0, 2) == 0);
      lk_pa       = pa_t'($urandom_range(0, 7)) << 7;
      pad_valid   = 1'b0;
      // deliver one missing pad of a random entry
      if (q.size() > 0 && $urandom_range(0, 1) == 0) begin
        pick = $urandom_range(0, q.size() - 1);
        if (q[pick].have != '1) begin
          do s = $urandom_range(0, NSEG - 1); while (q[pick].have[s]);
          pad_valid = 1'b1;
          pad_idx   = 3'(q[pick].idx);
          pad_seg   = SEG_IDX_W'(s);
          pad_data  = {$urandom, $urandom, $urandom, $urandom};
        end
      end
      #1;
      // expected combinational outputs
      checks++;
      if (count !== 4'(q.size()) || full !== (q.size() == N) || alloc_ready !== (q.size() != N)) begin
        failures++;
        $display("t=%0d count %0d full %0d, model %0d", t, count, full, q.size());
      end
      exp_wr = (q.size() > 0) && (q[0].have == '1) && (q.size() > HWM);
      checks++;
      if (wr_valid !== exp_wr) begin
        failures++;
        $display("t=%0d wr_valid %0d expected %0d", t, wr_valid, exp_wr);
      end
      if (exp_wr) begin
        checks++;
        if (wr_pa !== q[0].pa || wr_data !== (q[0].data ^ q[0].pad)) begin
          failures++;
          $display("t=%0d retired line wrong", t);
        end
      end
      if ((q.size() > HWM) && q[0].have != '1) n_padwait++;
      checks++;
      if (head_pad_wait !== ((q.size() > HWM) && q[0].have != '1)) failures++;
      exp_hit = 0; exp_lk = '0;
      foreach (q[i]) if (q[i].pa == lk_pa) begin exp_hit = 1; exp_lk = q[i].data; end
      checks++;
      if (lk_hit !== exp_hit || (exp_hit && lk_data !== exp_lk)) begin
        failures++;
        $display("t=%0d lookup wrong", t);
      end
      if (exp_hit) n_lkhit++;
      if (full) n_full++;
      if (alloc_valid && alloc_ready) begin
        checks++;
        if (q.size() > 0 && 32'(alloc_idx) != (q[q.size()-1].idx + 1) % N) failures++;
      end
      // model update at the edge
      @(posedge clk);
      if (pad_valid) begin
        foreach (q[i]) if (q[i].idx == int'(pad_idx)) begin
          q[i].pad[pad_seg*SEG_W +: SEG_W] = pad_data;
          q[i].have[pad_seg] = 1'b1;
        end
      end
      yi = int'(alloc_idx);
      if (wr_valid && wr_ready) begin void'(q.pop_front()); n_retire++; end
      if (alloc_valid && alloc_ready) begin
        q.push_back('{pa: alloc_pa, data: alloc_data, pad: '0, have: alloc_plain ? '1 : '0, idx: yi});
        if (alloc_plain) n_plain++;
      end
    end
    checks++;
    if (n_retire == 0 || n_full == 0 || n_lkhit == 0 || n_padwait == 0 || n_plain == 0) failures++;
    $display("retired %0d full %0d lookup hits %0d pad waits %0d plain %0d", n_retire, n_full, n_lkhit, n_padwait, n_plain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
