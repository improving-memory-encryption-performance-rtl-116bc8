// tb_potp_ctrl: directed test of the POTP controller, wired to a 2-entry
// SNC, the pad engine, the write buffer, the bus arbiter and the memory
// model. It walks through each case of the request sequencing:
// instruction read (seed = VA), SNC query miss (number fetched from its
// slot at A_SN), update hit and update misses (number + system_timer),
// dirty SNC victims written back to their slots, lazy write-buffer
// retirement of ciphertext, a write-buffer read hit, an SNC query hit and
// plaintext lines. Results are compared with an independent AES model;
// read-miss latencies are checked cycle-exactly.
module tb_potp_ctrl;
  import potp_pkg::*;
  import aes_ref_pkg::*;

  localparam int unsigned MEM_LAT = 100, CRYPTO_LAT = 50;
  localparam pa_t A_SN = 32'h3000_0000;
  localparam va_t MEM_ADDR0 = 48'h0000_4000_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [127:0] key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  sn_t system_timer;
  logic rd_valid, rd_ready, rsp_valid, ev_valid, ev_ready, ev_plain;
  va_t rd_va, ev_va;
  pa_t rd_pa, ev_pa;
  rd_kind_e rd_kind;
  line_t rsp_data, ev_data;
  potp_events_t events;

  snc_op_e snc_op; vline_t snc_vline, snc_evict_vline; sn_t snc_sn, snc_rsp_sn, snc_evict_sn;
  logic snc_dirty, snc_rsp_valid, snc_rsp_hit, snc_evict_valid, snc_evict_dirty;
  logic wb_alloc_valid, wb_alloc_ready, wb_alloc_plain, wb_lk_hit, wb_wr_valid, wb_wr_ready;
  logic wb_full, wb_head_pad_wait;
  pa_t wb_alloc_pa, wb_lk_pa, wb_wr_pa;
  line_t wb_alloc_data, wb_lk_data, wb_wr_data;
  logic [2:0] wb_alloc_idx;
  logic [3:0] wb_count;
  logic seed_valid, pad_valid;
  seg_t seed, pad;
  pad_tag_t seed_tag, pad_tag;
  logic ctl_valid, ctl_ready, mem_req_valid, mem_req_ready, mem_rsp_valid, g_urg, g_lazy;
  mem_req_t ctl_req, mem_req;
  line_t mem_rsp_data;

  potp_ctrl #(.A_SN(A_SN), .MEM_ADDR0(MEM_ADDR0), .WB_ENTRIES(8)) dut (
    .clk, .rst_n, .system_timer,
    .rd_valid, .rd_ready, .rd_va, .rd_pa, .rd_kind, .rsp_valid, .rsp_data,
    .ev_valid, .ev_ready, .ev_va, .ev_pa, .ev_data, .ev_plain,
    .snc_op, .snc_vline, .snc_sn, .snc_dirty, .snc_rsp_hit, .snc_rsp_sn,
    .snc_evict_valid, .snc_evict_vline, .snc_evict_sn, .snc_evict_dirty,
    .wb_alloc_valid, .wb_alloc_ready, .wb_alloc_pa, .wb_alloc_data, .wb_alloc_plain,
    .wb_alloc_idx, .wb_lk_pa, .wb_lk_hit, .wb_lk_data,
    .seed_valid, .seed, .seed_tag, .pad_valid, .pad, .pad_tag,
    .mem_valid(ctl_valid), .mem_ready(ctl_ready), .mem_req(ctl_req),
    .mem_rsp_valid, .mem_rsp_data, .events);

  potp_snc #(.ENTRIES(2), .WAYS(2)) u_snc (
    .clk, .rst_n, .req_op(snc_op), .req_vline(snc_vline), .req_sn(snc_sn), .req_dirty(snc_dirty),
    .rsp_valid(snc_rsp_valid), .rsp_hit(snc_rsp_hit), .rsp_sn(snc_rsp_sn),
    .evict_valid(snc_evict_valid), .evict_vline(snc_evict_vline), .evict_sn(snc_evict_sn),
    .evict_dirty(snc_evict_dirty));

  potp_pad_engine #(.CRYPTO_LAT(CRYPTO_LAT)) u_pad (
    .clk, .rst_n, .key, .seed_valid, .seed, .seed_tag, .pad_valid, .pad, .pad_tag);

  potp_write_buffer #(.ENTRIES(8), .HWM(4)) u_wb (
    .clk, .rst_n, .alloc_valid(wb_alloc_valid), .alloc_ready(wb_alloc_ready),
    .alloc_pa(wb_alloc_pa), .alloc_data(wb_alloc_data), .alloc_plain(wb_alloc_plain),
    .alloc_idx(wb_alloc_idx), .pad_valid(pad_valid && pad_tag.to_wb), .pad_idx(pad_tag.idx),
    .pad_seg(pad_tag.seg), .pad_data(pad), .lk_pa(wb_lk_pa), .lk_hit(wb_lk_hit), .lk_data(wb_lk_data),
    .wr_valid(wb_wr_valid), .wr_ready(wb_wr_ready), .wr_pa(wb_wr_pa), .wr_data(wb_wr_data),
    .full(wb_full), .head_pad_wait(wb_head_pad_wait), .count(wb_count));

  potp_mem_arbiter u_arb (
    .ctl_valid, .ctl_ready, .ctl_req, .wb_valid(wb_wr_valid), .wb_ready(wb_wr_ready),
    .wb_pa(wb_wr_pa), .wb_data(wb_wr_data), .wb_full, .mem_req_valid, .mem_req_ready, .mem_req,
    .grant_wb_urgent(g_urg), .grant_wb_lazy(g_lazy));

  potp_mem_model #(.LAT(MEM_LAT)) u_mem (
    .clk, .rst_n, .mem_req_valid, .mem_req_ready, .mem_req, .mem_rsp_valid, .mem_rsp_data);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- helpers
  function automatic line_t rnd_line();
    line_t l;
    for (int i = 0; i < LINE_W / 32; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  function automatic pa_t slot(va_t va);
    return A_SN + pa_t'((va - MEM_ADDR0) >> 7) * 2;
  endfunction

  // Count every sequence-number write-back and check it lands in its slot.
  sn_t exp_slot [pa_t];
  int  n_snwr = 0;
  always @(posedge clk)
    if (mem_req_valid && mem_req_ready && mem_req.op == MEM_WR_SN) begin
      n_snwr++;
      checks++;
      if (!exp_slot.exists(mem_req.addr) || exp_slot[mem_req.addr] !== mem_req.data[15:0]) begin
        failures++;
        $display("unexpected number %h written to %h", mem_req.data[15:0], mem_req.addr);
      end
    end

  task automatic read_line(input va_t va, input pa_t pa, input rd_kind_e k,
                           input line_t expect_data, input int exp_lat, input string what);
    int t0;
    @(negedge clk);
    rd_valid = 1; rd_va = va; rd_pa = pa; rd_kind = k;
    while (!rd_ready) @(negedge clk);
    t0 = cycle;
    @(negedge clk);
    rd_valid = 0;
    while (!rsp_valid) @(negedge clk);
    checks++;
    if (rsp_data !== expect_data) begin
      failures++;
      $display("%s: wrong plaintext", what);
    end
    if (exp_lat > 0) begin
      checks++;
      if (cycle - t0 != exp_lat) begin
        failures++;
        $display("%s: latency %0d, expected %0d", what, cycle - t0, exp_lat);
      end
    end
    $display("%s: latency %0d", what, cycle - t0);
  endtask

  // Let the bus drain so that a timed read finds it free.
  task automatic wait_bus_idle();
    @(negedge clk);
    while (dut.state != dut.S_IDLE || u_mem.busy != 0 || mem_req_valid) @(negedge clk);
  endtask

  task automatic evict_line(input va_t va, input pa_t pa, input line_t d, input logic plain);
    @(negedge clk);
    ev_valid = 1; ev_va = va; ev_pa = pa; ev_data = d; ev_plain = plain;
    while (!ev_ready) @(negedge clk);
    @(negedge clk);
    ev_valid = 0;
    repeat (2) @(negedge clk);
    while (dut.state != dut.S_IDLE) @(negedge clk);
  endtask

  // ---------------------------------------------------------------- test
  va_t   va [6];
  pa_t   pa [6];
  line_t pt [6];
  sn_t   sn [6];
  int    n_qhit = 0, n_qmiss = 0, n_uhit = 0, n_umiss = 0, n_wbhit = 0;
  always @(posedge clk) begin
    n_qhit  += int'(events.query_hit);
    n_qmiss += int'(events.query_miss);
    n_uhit  += int'(events.update_hit);
    n_umiss += int'(events.update_miss);
    n_wbhit += int'(events.wb_read_hit);
  end

  initial begin
    line_t instr;
    rd_valid = 0; ev_valid = 0; ev_plain = 0; rd_va = '0; rd_pa = '0; rd_kind = RD_DATA;
    ev_va = '0; ev_pa = '0; ev_data = '0; system_timer = 16'h0137;
    for (int i = 0; i < 6; i++) begin
      va[i] = MEM_ADDR0 + va_t'(i * 3 + 1) * 128;
      pa[i] = pa_t'(32'h0010_0000 + i * 128);
      pt[i] = rnd_line();
      sn[i] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. instruction line, constant seed = VA
    instr = rnd_line();
    u_mem.poke_line(32'h0008_0000, instr ^ line_pad(key, 48'h0000_0040_0000, 16'h0));
    read_line(48'h0000_0040_0000, 32'h0008_0000, RD_INSTR, instr, MEM_LAT + 2, "instruction read");

    // 2. data line 0, never written by this run: SNC query miss, number 0 from its slot
    u_mem.poke_line(pa[0], pt[0] ^ line_pad(key, va[0], 16'h0));
    read_line(va[0], pa[0], RD_DATA, pt[0], 2 * MEM_LAT + 4, "query miss");
    checks++;
    if (u_mem.n_sn_rd != 1) failures++;

    // 3. evict line 0 (update hit), then lines 1..4 (update misses). Each
    //    install in the 2-entry SNC pushes out a dirty victim.
    for (int i = 0; i < 5; i++) begin
      system_timer = system_timer + 16'h0101 * 16'(i + 1);
      pt[i] = rnd_line();
      sn[i] = sn[i] + system_timer;
      exp_slot[slot(va[i])] = sn[i];
      evict_line(va[i], pa[i], pt[i], 1'b0);
    end
    checks++;
    if (n_uhit != 1 || n_umiss != 4) begin
      failures++;
      $display("update hits %0d misses %0d", n_uhit, n_umiss);
    end
    // 4. five entries > HWM 4: line 0 retires lazily as ciphertext
    repeat (MEM_LAT + 20) @(negedge clk);
    checks++;
    if (u_mem.peek_line(pa[0]) !== (pt[0] ^ line_pad(key, va[0], sn[0]))) begin
      failures++;
      $display("ciphertext of line 0 wrong");
    end
    checks++;
    if (u_mem.n_line_wr != 1 || n_snwr != 3) begin
      failures++;
      $display("line writes %0d, number write-backs %0d", u_mem.n_line_wr, n_snwr);
    end
    // 5. read miss on line 3 still waiting in the write buffer
    read_line(va[3], pa[3], RD_DATA, pt[3], 1, "write-buffer hit");
    // 6. read line 0 back from memory: its number was pushed out of the SNC
    //    and comes from its slot (query miss), the data must decrypt
    wait_bus_idle();
    read_line(va[0], pa[0], RD_DATA, pt[0], 2 * MEM_LAT + 4, "read back after retirement");
    // 7. and again: now a query hit, answered in MEM_LAT + 3 cycles
    wait_bus_idle();
    read_line(va[0], pa[0], RD_DATA, pt[0], MEM_LAT + 3, "query hit");
    // 8. plaintext region: evicted and read back with no pads
    evict_line(va[5], pa[5], pt[5], 1'b1);
    u_mem.poke_line(32'h0009_0000, pt[5]);
    wait_bus_idle();
    read_line(48'h0000_7000_0000, 32'h0009_0000, RD_PLAIN, pt[5], MEM_LAT + 2, "plain read");
    checks++;
    if (n_qhit != 1 || n_qmiss != 2 || n_wbhit != 1) begin
      failures++;
      $display("query hits %0d misses %0d wb hits %0d", n_qhit, n_qmiss, n_wbhit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
