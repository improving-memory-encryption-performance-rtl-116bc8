// tb_potp_snc: random queries and writes against two SNC instances, one
// 2-set x 4-way and one fully associative with 4 entries, each compared
// with a list-based LRU model: hit/miss, returned sequence numbers, and the
// victim (valid, tag, number, dirty) reported on every install.
module tb_potp_snc;
  import potp_pkg::*;

  typedef struct { vline_t vl; sn_t sn; logic dirty; } ent_t;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_hit = 0, n_evict_dirty = 0;

  snc_op_e op;
  vline_t  vl;
  sn_t     sn;
  logic    dty;

  logic   rv [2], rh [2], ev [2], ed [2];
  sn_t    rs [2], es [2];
  vline_t evl [2];

  potp_snc #(.ENTRIES(8), .WAYS(4)) dut_sa (
    .clk, .rst_n, .req_op(op), .req_vline(vl), .req_sn(sn), .req_dirty(dty),
    .rsp_valid(rv[0]), .rsp_hit(rh[0]), .rsp_sn(rs[0]),
    .evict_valid(ev[0]), .evict_vline(evl[0]), .evict_sn(es[0]), .evict_dirty(ed[0]));
  potp_snc #(.ENTRIES(4), .WAYS(4)) dut_fa (
    .clk, .rst_n, .req_op(op), .req_vline(vl), .req_sn(sn), .req_dirty(dty),
    .rsp_valid(rv[1]), .rsp_hit(rh[1]), .rsp_sn(rs[1]),
    .evict_valid(ev[1]), .evict_vline(evl[1]), .evict_sn(es[1]), .evict_dirty(ed[1]));

  ent_t model [2][2][$];   // [instance][set] list, MRU first

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int d, input snc_op_e o, input vline_t v, input sn_t s, input logic dr);
    int set, f;
    ent_t e, victim;
    logic exp_hit, exp_ev;
    set = (d == 0) ? int'(v[0]) : 0;
    f = -1;
    foreach (model[d][set][i]) if (model[d][set][i].vl == v) f = i;
    exp_hit = (f >= 0);
    exp_ev  = 1'b0;
    victim  = '{vl: '0, sn: '0, dirty: 1'b0};
    checks++;
    if (rh[d] !== exp_hit || !rv[d]) begin
      failures++;
      $display("inst %0d: hit %0d expected %0d for %h", d, rh[d], exp_hit, v);
    end
    if (exp_hit) begin
      e = model[d][set][f];
      model[d][set].delete(f);
      checks++;
      if (rs[d] !== e.sn) begin
        failures++;
        $display("inst %0d: sn %h expected %h", d, rs[d], e.sn);
      end
      if (o == SNC_WRITE) begin e.sn = s; e.dirty = e.dirty | dr; end
      model[d][set].push_front(e);
    end else if (o == SNC_WRITE) begin
      if (model[d][set].size() == 4) begin
        exp_ev = 1'b1;
        victim = model[d][set].pop_back();
      end
      model[d][set].push_front('{vl: v, sn: s, dirty: dr});
    end
    if (o == SNC_WRITE && !exp_hit) begin
      checks++;
      if (ev[d] !== exp_ev || (exp_ev && (evl[d] !== victim.vl || es[d] !== victim.sn || ed[d] !== victim.dirty))) begin
        failures++;
        $display("inst %0d: victim %0d %h %h %0d expected %0d %h %h %0d", d, ev[d], evl[d], es[d], ed[d],
                 exp_ev, victim.vl, victim.sn, victim.dirty);
      end
      if (exp_ev && victim.dirty && d == 0) n_evict_dirty++;
    end
    if (exp_hit && d == 0) n_hit++;
  endtask

  initial begin
    snc_op_e o;
    vline_t  v;
    sn_t     s;
    logic    dr;
    op = SNC_NOP; vl = '0; sn = '0; dty = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      o  = ($urandom_range(0, 1) == 0) ? SNC_LOOKUP : SNC_WRITE;
      v  = vline_t'($urandom_range(0, 11));
      s  = sn_t'($urandom);
      dr = 1'($urandom);
      op = o; vl = v; sn = s; dty = dr;
      @(negedge clk);
      op = SNC_NOP;
      check(0, o, v, s, dr);
      check(1, o, v, s, dr);
    end
    checks++;
    if (n_hit == 0 || n_evict_dirty == 0) begin
      failures++;
      $display("coverage: hits %0d dirty victims %0d", n_hit, n_evict_dirty);
    end
    $display("hits %0d dirty victims %0d", n_hit, n_evict_dirty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
