// tb_potp_top: end-to-end test of potp_top, with the SNC reduced to 16 fully associative
// entries so that it overflows and LRU victims are written back.
//
// An L2-side driver issues a random mix of data read misses, evictions of
// dirty lines (with a fresh system_timer value each), instruction reads and
// plaintext-region traffic over a pool of 48 lines. A scoreboard keeps
// the plaintext and the expected sequence number of every line and checks:
// every line returned to L2; every ciphertext line that reaches memory, in
// FIFO order, against plaintext ^ AES(segment VA + sequence number) from an
// independent AES model; every sequence number written back to its slot;
// and the read-miss latency on SNC query hits with a free bus. Each
// mechanism must occur at least once: SNC query hit and miss, update hit
// and miss, dirty SNC victims written back, write-buffer read hit, lazy and full-priority
// retirement, eviction stall on a full buffer, a retirement waiting for its
// pads, instruction reads and plaintext lines.
module tb_potp_top;
  import potp_pkg::*;
  import aes_ref_pkg::*;

  localparam int unsigned MEM_LAT = 100;
  localparam int unsigned CLAT    = 50;   // pad latency of the design under test
  // SNC-hit read miss: lookup, bus request, memory and XOR, unless the
  // eighth pad (issued 8 cycles after the lookup) comes later.
  localparam int unsigned HIT_LAT = (MEM_LAT + 3 > CLAT + 11) ? MEM_LAT + 3 : CLAT + 11;
  localparam int unsigned NL      = 48;    // data lines in the pool
  localparam int unsigned NOPS    = 1500;
  localparam pa_t A_SN      = 32'h3000_0000;   // top defaults
  localparam va_t MEM_ADDR0 = '0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [127:0] key = 128'h000102030405060708090a0b0c0d0e0f;
  sn_t system_timer;
  logic rd_valid, rd_ready, rsp_valid, ev_valid, ev_ready, ev_plain;
  va_t rd_va, ev_va;
  pa_t rd_pa, ev_pa;
  rd_kind_e rd_kind;
  line_t rsp_data, ev_data, mem_rsp_data;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  mem_req_t mem_req;
  potp_events_t events;
  logic wb_full, wb_head_pad_wait, wb_retire_urgent, wb_retire_lazy;

  potp_top #(.SNC_ENTRIES(16), .SNC_WAYS(16)) dut (.*);

  potp_mem_model #(.LAT(MEM_LAT)) u_mem (
    .clk, .rst_n, .mem_req_valid, .mem_req_ready, .mem_req, .mem_rsp_valid, .mem_rsp_data);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired: state %0d wb count %0d full %0d rd_valid %0d ev_valid %0d busy %0d sg %0d", dut.u_ctrl.state, dut.u_wb.count, wb_full, rd_valid, ev_valid, u_mem.busy, dut.u_ctrl.sg_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  line_t pt  [NL];
  sn_t   sn  [NL];
  typedef struct { pa_t pa; line_t ct; } wr_t;
  wr_t   wrq [$];

  function automatic va_t va_of(int i);  return MEM_ADDR0 + va_t'(i) * 128 + 48'h0001_0000_0000; endfunction
  function automatic pa_t pa_of(int i);  return pa_t'(32'h0010_0000 + i * 128); endfunction
  function automatic pa_t slot_of(int i);
    return A_SN + pa_t'((va_of(i) - MEM_ADDR0) >> 7) * 2;
  endfunction
  function automatic line_t rnd_line();
    line_t l;
    for (int k = 0; k < LINE_W / 32; k++) l[k*32 +: 32] = $urandom;
    return l;
  endfunction

  // plaintext region and instruction lines
  localparam pa_t PLAIN_PA = 32'h0080_0000;
  localparam va_t INSTR_VA = 48'h0000_0040_0000;
  localparam pa_t INSTR_PA = 32'h0090_0000;
  line_t plain_pt, instr_pt [4];

  // ---------------------------------------------------------------- bus monitor
  int n_lwr = 0, n_snwr = 0;
  always @(posedge clk) begin
    if (mem_req_valid && mem_req_ready && mem_req.op == MEM_WR_LINE) begin
      n_lwr++;
      checks++;
      if (wrq.size() == 0) begin
        failures++;
        $display("unexpected line write to %h", mem_req.addr);
      end else begin
        wr_t w;
        w = wrq.pop_front();
        if (w.pa !== mem_req.addr || w.ct !== mem_req.data) begin
          failures++;
          $display("line write to %h: wrong address or ciphertext", mem_req.addr);
        end
      end
    end
    if (mem_req_valid && mem_req_ready && mem_req.op == MEM_WR_SN) begin
      int f;
      n_snwr++;
      checks++;
      f = -1;
      for (int i = 0; i < NL; i++) if (slot_of(i) == mem_req.addr) f = i;
      if (f < 0 || sn[f] !== mem_req.data[SN_W-1:0]) begin
        failures++;
        $display("number %h written to %h does not match", mem_req.data[SN_W-1:0], mem_req.addr);
      end
    end
  end

  // ---------------------------------------------------------------- mechanism counters
  int c_qhit = 0, c_qmiss = 0, c_uhit = 0, c_umiss = 0, c_vic = 0, c_wbhit = 0;
  int c_instr = 0, c_plain = 0, c_urgent = 0, c_lazy = 0, c_stall = 0, c_padwait = 0, c_timed = 0;
  always @(posedge clk) if (rst_n) begin
    c_qhit    += int'(events.query_hit);
    c_qmiss   += int'(events.query_miss);
    c_uhit    += int'(events.update_hit);
    c_umiss   += int'(events.update_miss);
    c_vic     += int'(events.sn_victim_wb);
    c_wbhit   += int'(events.wb_read_hit);
    c_instr   += int'(events.instr_read);
    c_plain   += int'(events.plain_access);
    c_urgent  += int'(wb_retire_urgent);
    c_lazy    += int'(wb_retire_lazy);
    c_stall   += int'(ev_valid && !ev_ready && wb_full);
    c_padwait += int'(wb_head_pad_wait);
  end

  // ---------------------------------------------------------------- L2 driver
  task automatic do_read(input va_t va, input pa_t pa, input rd_kind_e k, input line_t exp_pt);
    @(negedge clk);
    rd_valid = 1; rd_va = va; rd_pa = pa; rd_kind = k;
    while (!rd_ready) @(negedge clk);
    @(negedge clk);
    rd_valid = 0;
    while (!rsp_valid) @(negedge clk);
    checks++;
    if (rsp_data !== exp_pt) begin
      failures++;
      $display("read of VA %h returned wrong plaintext", va);
    end
  endtask

  task automatic do_evict(input va_t va, input pa_t pa, input line_t d, input logic plain);
    @(negedge clk);
    ev_valid = 1; ev_va = va; ev_pa = pa; ev_data = d; ev_plain = plain;
    while (!ev_ready) @(negedge clk);
    @(negedge clk);
    ev_valid = 0;
    @(negedge clk);
    while (dut.u_ctrl.state != dut.u_ctrl.S_IDLE) @(negedge clk);
  endtask

  // Let the previous request (and its victim write-back) finish before the
  // model moves a sequence number on.
  task automatic wait_ctrl_idle();
    @(negedge clk);
    while (dut.u_ctrl.state != dut.u_ctrl.S_IDLE) @(negedge clk);
  endtask

  // Timed read: wait for a quiet bus; if the read then hits the SNC it must
  // take HIT_LAT cycles.
  task automatic timed_read(input int i);
    int t0, pre_hits;
    @(negedge clk);
    while (!rd_ready || u_mem.busy != 0 || mem_req_valid) @(negedge clk);
    pre_hits = c_qhit;
    rd_valid = 1; rd_va = va_of(i); rd_pa = pa_of(i); rd_kind = RD_DATA;
    #1;
    if (dut.u_wb.lk_hit) begin
      @(negedge clk);
      rd_valid = 0;
      while (!rsp_valid) @(negedge clk);
      return;
    end
    t0 = cycle;
    @(negedge clk);
    rd_valid = 0;
    while (!rsp_valid) @(negedge clk);
    checks++;
    if (rsp_data !== pt[i]) failures++;
    if (c_qhit > pre_hits) begin
      c_timed++;
      checks++;
      if (cycle - t0 != HIT_LAT) begin
        failures++;
        $display("SNC-hit read miss took %0d cycles, expected %0d", cycle - t0, HIT_LAT);
      end
    end
  endtask

  initial begin
    rd_valid = 0; ev_valid = 0; ev_plain = 0; rd_va = '0; rd_pa = '0; rd_kind = RD_DATA;
    ev_va = '0; ev_pa = '0; ev_data = '0; system_timer = '0;
    for (int i = 0; i < NL; i++) begin
      pt[i] = rnd_line();
      sn[i] = '0;
      u_mem.poke_line(pa_of(i), pt[i] ^ line_pad(key, va_of(i), 16'h0));
    end
    for (int j = 0; j < 4; j++) begin
      instr_pt[j] = rnd_line();
      u_mem.poke_line(INSTR_PA + pa_t'(j * 128), instr_pt[j] ^ line_pad(key, INSTR_VA + va_t'(j * 128), 16'h0));
    end
    plain_pt = rnd_line();
    u_mem.poke_line(PLAIN_PA, plain_pt);
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Cold start: one data line followed at once by plaintext lines pushes
    // the occupancy over the mark before the head's pads are ready.
    system_timer = 16'h1234;
    sn[0] = sn[0] + system_timer;
    wrq.push_back('{pa: pa_of(0), ct: pt[0] ^ line_pad(key, va_of(0), sn[0])});
    do_evict(va_of(0), pa_of(0), pt[0], 1'b0);
    for (int b = 0; b < 5; b++) begin
      plain_pt = rnd_line();
      wrq.push_back('{pa: PLAIN_PA, ct: plain_pt});
      do_evict(48'h0000_7000_0000, PLAIN_PA, plain_pt, 1'b1);
    end

    for (int op = 0; op < NOPS; op++) begin
      int r, i, burst;
      r = $urandom_range(0, 99);
      i = $urandom_range(0, NL - 1);
      if (r < 35) begin
        do_read(va_of(i), pa_of(i), RD_DATA, pt[i]);
      end else if (r < 45) begin
        // burst of evictions: fills the write buffer
        burst = $urandom_range(1, 10);
        for (int b = 0; b < burst; b++) begin
          i = $urandom_range(0, NL - 1);
          wait_ctrl_idle();
          system_timer = sn_t'($urandom);
          pt[i] = rnd_line();
          sn[i] = sn[i] + system_timer;
          wrq.push_back('{pa: pa_of(i), ct: pt[i] ^ line_pad(key, va_of(i), sn[i])});
          do_evict(va_of(i), pa_of(i), pt[i], 1'b0);
          if ($urandom_range(0, 3) == 0) begin
            plain_pt = rnd_line();
            wrq.push_back('{pa: PLAIN_PA, ct: plain_pt});
            do_evict(48'h0000_7000_0000, PLAIN_PA, plain_pt, 1'b1);
          end
        end
      end else if (r < 75) begin
        wait_ctrl_idle();
        system_timer = sn_t'($urandom);
        pt[i] = rnd_line();
        sn[i] = sn[i] + system_timer;
        wrq.push_back('{pa: pa_of(i), ct: pt[i] ^ line_pad(key, va_of(i), sn[i])});
        do_evict(va_of(i), pa_of(i), pt[i], 1'b0);
      end else if (r < 85) begin
        int j;
        j = $urandom_range(0, 3);
        do_read(INSTR_VA + va_t'(j * 128), INSTR_PA + pa_t'(j * 128), RD_INSTR, instr_pt[j]);
      end else if (r < 90) begin
        do_read(48'h0000_7000_0000, PLAIN_PA, RD_PLAIN, plain_pt);
      end else begin
        timed_read(i);
      end
    end

    $display("query hit %0d miss %0d, update hit %0d miss %0d, number write-backs %0d",
             c_qhit, c_qmiss, c_uhit, c_umiss, c_vic);
    $display("wb read hits %0d, lazy retire %0d, full-priority retire %0d, full stalls %0d, pad waits %0d",
             c_wbhit, c_lazy, c_urgent, c_stall, c_padwait);
    $display("instruction reads %0d, plain accesses %0d, timed SNC-hit reads %0d, line writes %0d",
             c_instr, c_plain, c_timed, n_lwr);
    checks++;
    if (c_qhit == 0 || c_qmiss == 0 || c_uhit == 0 || c_umiss == 0 || c_vic == 0 || c_wbhit == 0 ||
        c_lazy == 0 || c_urgent == 0 || c_stall == 0 || c_padwait == 0 || c_instr == 0 ||
        c_plain == 0 || c_timed == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
