// potp_ctrl: the POTP controller between the L2 cache, the sequence number
// cache (SNC), the encryption unit, the write buffer and the memory bus.
//
// It serves one L2 request at a time.
//
// L2 read miss (rd_*), after a write-buffer check that can answer at once:
//   data line  : query the SNC. Hit: the eight seeds (segment VA + sequence
//                number) go to the encryption unit while the line is read
//                from memory. Miss: the sequence number is first read from
//                its slot in the memory region at A_SN, then as for a hit;
//                after the reply the number is installed in the SNC and a
//                dirty victim is written back to its own slot.
//   instruction: seeds are the segment VAs alone (sequence number 0).
//   plain      : the line is returned as read, without pads.
//   The reply (rsp_valid, one cycle) is ciphertext ^ pads, registered.
// L2 eviction (ev_*): the line enters the write buffer at once. The SNC is
//   queried (on a miss the number is read from memory), the number is
//   advanced by system_timer, written back to the SNC as dirty (installing
//   it, with a victim write-back if needed), and the seeds are issued
//   tagged with the write-buffer entry so the pads land in its pad section.
//   Plain lines skip all of this.
//
// Only sequence numbers travel in mem_req.data from here (lines are written
// by the write buffer), so the upper data bits of this port are constant
// zero, as are the seed bits above the virtual address width.
//
// Seeds are issued one per cycle, NSEG in a row; a new request is accepted
// only after the previous seed burst has left. With a 100-cycle memory and
// a 50-cycle pad engine, an SNC-hit read miss is answered 103 cycles after
// it is accepted: SNC lookup, bus request, memory, then the XOR cycle.
//
// The sequencing follows the document's Algorithm 1 and its sequence-number
// rules (4)-(8) and the slot address formula; one request at a time, the
// write-buffer check first and the virtual line address as the address
// that indexes the sequence-number region are this design's own choices.
module potp_ctrl
  import potp_pkg::*;
#(
  parameter pa_t         A_SN       = 32'h3000_0000,  // base of the sequence-number region
  parameter va_t         MEM_ADDR0  = '0,             // first address of user memory
  parameter int unsigned WB_ENTRIES = 8
) (
  input  logic         clk,
  input  logic         rst_n,
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
  // sequence number cache
  output snc_op_e      snc_op,
  output vline_t       snc_vline,
  output sn_t          snc_sn,
  output logic         snc_dirty,
  input  logic         snc_rsp_hit,
  input  sn_t          snc_rsp_sn,
  input  logic         snc_evict_valid,
  input  vline_t       snc_evict_vline,
  input  sn_t          snc_evict_sn,
  input  logic         snc_evict_dirty,
  // write buffer
  output logic         wb_alloc_valid,
  input  logic         wb_alloc_ready,
  output pa_t          wb_alloc_pa,
  output line_t        wb_alloc_data,
  output logic         wb_alloc_plain,
  input  logic [$clog2(WB_ENTRIES)-1:0] wb_alloc_idx,
  output pa_t          wb_lk_pa,
  input  logic         wb_lk_hit,
  input  line_t        wb_lk_data,
  // encryption unit
  output logic         seed_valid,
  output seg_t         seed,
  output pad_tag_t     seed_tag,
  input  logic         pad_valid,
  input  seg_t         pad,
  input  pad_tag_t     pad_tag,
  // memory bus (through the arbiter)
  output logic         mem_valid,
  input  logic         mem_ready,
  output mem_req_t     mem_req,
  input  logic         mem_rsp_valid,
  input  line_t        mem_rsp_data,
  // event pulses
  output potp_events_t events
);

  localparam int unsigned WIW = $clog2(WB_ENTRIES);

  initial assert (WIW <= 3) else $error("pad tags carry at most 8 write-buffer entries");

  typedef enum logic [3:0] {
    S_IDLE, S_WB_RSP,
    S_RD_LOOK, S_RD_SNREQ, S_RD_SNWAIT, S_RD_MEM, S_RD_WAIT, S_RD_RSP,
    S_EV_LOOK, S_EV_SNREQ, S_EV_SNWAIT, S_EV_WRITE,
    S_INST, S_VIC
  } state_e;

  state_e  state;
  va_t     va_q;
  pa_t     pa_q;
  sn_t     sn_q;
  logic    need_inst;
  logic [WIW-1:0] wbidx_q;
  line_t   line_q;
  line_t   data_q;
  logic    have_data;
  line_t   rpad;
  logic [NSEG-1:0] rmask;
  vline_t  vic_vline;
  sn_t     vic_sn;

  // seed burst
  logic                 sg_busy;
  logic [SEG_IDX_W-1:0] sg_cnt;
  va_t                  sg_va;
  sn_t                  sg_sn;
  logic                 sg_to_wb;
  logic [WIW-1:0]       sg_idx;
  logic                 sg_start;
  va_t                  sg_start_va;
  sn_t                  sg_start_sn;
  logic                 sg_start_wb;

  function automatic va_t line_of(input vline_t vl);
    return {vl, {LINE_OFS_W{1'b0}}};
  endfunction

  // Address of the memory slot holding the sequence number of a line; the
  // slot region is addressed modulo the physical address space.
  function automatic pa_t sn_addr(input vline_t vl);
    return A_SN + (PA_W'(vl) - PA_W'(MEM_ADDR0[VA_W-1:LINE_OFS_W])) * PA_W'(SN_BYTES);
  endfunction

  logic ev_go, rd_go;
  assign rd_ready = (state == S_IDLE) && !sg_busy;
  assign rd_go    = rd_valid && rd_ready;
  assign ev_ready = (state == S_IDLE) && !sg_busy && !rd_valid && wb_alloc_ready;
  assign ev_go    = ev_valid && ev_ready;

  assign wb_alloc_valid = ev_go;
  assign wb_alloc_pa    = ev_pa;
  assign wb_alloc_data  = ev_data;
  assign wb_alloc_plain = ev_plain;
  assign wb_lk_pa       = rd_pa;

  // ------------------------------------------------------ combinational control
  always_comb begin
    snc_op      = SNC_NOP;
    snc_vline   = (state == S_IDLE) ? (rd_valid ? rd_va[VA_W-1:LINE_OFS_W] : ev_va[VA_W-1:LINE_OFS_W])
                                    : va_q[VA_W-1:LINE_OFS_W];
    snc_sn      = sn_q;
    snc_dirty   = 1'b0;
    mem_valid   = 1'b0;
    mem_req     = '{op: MEM_RD_LINE, addr: pa_q, data: '0};
    sg_start    = 1'b0;
    sg_start_va = va_q;
    sg_start_sn = sn_q;
    sg_start_wb = 1'b0;
    events      = '0;
    unique case (state)
      S_IDLE: begin
        if (rd_go) begin
          if (wb_lk_hit) events.wb_read_hit = 1'b1;
          else if (rd_kind == RD_DATA) snc_op = SNC_LOOKUP;
          else if (rd_kind == RD_INSTR) begin
            events.instr_read = 1'b1;
            sg_start    = 1'b1;
            sg_start_va = line_of(rd_va[VA_W-1:LINE_OFS_W]);
            sg_start_sn = '0;
          end else events.plain_access = 1'b1;
        end else if (ev_go) begin
          if (ev_plain) events.plain_access = 1'b1;
          else snc_op = SNC_LOOKUP;
        end
      end
      S_RD_LOOK: begin
        if (snc_rsp_hit) begin
          events.query_hit = 1'b1;
          sg_start    = 1'b1;
          sg_start_sn = snc_rsp_sn;
        end else events.query_miss = 1'b1;
      end
      S_RD_SNREQ, S_EV_SNREQ: begin
        mem_valid = 1'b1;
        mem_req   = '{op: MEM_RD_SN, addr: sn_addr(va_q[VA_W-1:LINE_OFS_W]), data: '0};
      end
      S_RD_SNWAIT: begin
        if (mem_rsp_valid) begin
          sg_start    = 1'b1;
          sg_start_sn = mem_rsp_data[SN_W-1:0];
        end
      end
      S_RD_MEM: begin
        mem_valid = 1'b1;
        mem_req   = '{op: MEM_RD_LINE, addr: pa_q, data: '0};
      end
      S_RD_RSP: begin
        events.read_done = 1'b1;
        if (need_inst) snc_op = SNC_WRITE;   // clean install of the fetched number
      end
      S_EV_LOOK: begin
        if (snc_rsp_hit) events.update_hit = 1'b1;
        else             events.update_miss = 1'b1;
      end
      S_EV_WRITE: begin
        snc_op      = SNC_WRITE;
        snc_dirty   = 1'b1;
        sg_start    = 1'b1;
        sg_start_wb = 1'b1;
      end
      S_VIC: begin
        mem_valid = 1'b1;
        mem_req   = '{op: MEM_WR_SN, addr: sn_addr(vic_vline), data: LINE_W'(vic_sn)};
        if (mem_ready) events.sn_victim_wb = 1'b1;
      end
      default: ;
    endcase
  end

  // ------------------------------------------------------ state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      va_q      <= '0;
      pa_q      <= '0;
      sn_q      <= '0;
      need_inst <= 1'b0;
      wbidx_q   <= '0;
      line_q    <= '0;
      data_q    <= '0;
      have_data <= 1'b0;
      rpad      <= '0;
      rmask     <= '0;
      vic_vline <= '0;
      vic_sn    <= '0;
    end else begin
      if (pad_valid && !pad_tag.to_wb) begin
        rpad[pad_tag.seg*SEG_W +: SEG_W] <= pad;
        rmask[pad_tag.seg]               <= 1'b1;
      end
      unique case (state)
        S_IDLE: begin
          if (rd_go) begin
            va_q      <= line_of(rd_va[VA_W-1:LINE_OFS_W]);
            pa_q      <= rd_pa;
            need_inst <= 1'b0;
            have_data <= 1'b0;
            rpad      <= '0;
            rmask     <= (rd_kind == RD_PLAIN) ? '1 : '0;
            line_q    <= wb_lk_data;
            if (wb_lk_hit)              state <= S_WB_RSP;
            else if (rd_kind == RD_DATA) state <= S_RD_LOOK;
            else                         state <= S_RD_MEM;
          end else if (ev_go) begin
            va_q    <= line_of(ev_va[VA_W-1:LINE_OFS_W]);
            pa_q    <= ev_pa;
            wbidx_q <= wb_alloc_idx;
            if (!ev_plain) state <= S_EV_LOOK;
          end
        end
        S_WB_RSP: state <= S_IDLE;
        S_RD_LOOK: begin
          if (snc_rsp_hit) begin
            sn_q  <= snc_rsp_sn;
            state <= S_RD_MEM;
          end else begin
            need_inst <= 1'b1;
            state     <= S_RD_SNREQ;
          end
        end
        S_RD_SNREQ:  if (mem_ready) state <= S_RD_SNWAIT;
        S_RD_SNWAIT: if (mem_rsp_valid) begin
          sn_q  <= mem_rsp_data[SN_W-1:0];
          state <= S_RD_MEM;
        end
        S_RD_MEM: if (mem_ready) state <= S_RD_WAIT;
        S_RD_WAIT: begin
          if (mem_rsp_valid) begin
            data_q    <= mem_rsp_data;
            have_data <= 1'b1;
          end
          if ((have_data || mem_rsp_valid) && (&rmask)) begin
            line_q <= (have_data ? data_q : mem_rsp_data) ^ rpad;
            state  <= S_RD_RSP;
          end
        end
        S_RD_RSP: state <= need_inst ? S_INST : S_IDLE;
        S_EV_LOOK: begin
          if (snc_rsp_hit) begin
            sn_q  <= snc_rsp_sn + system_timer;          // rule (4)
            state <= S_EV_WRITE;
          end else state <= S_EV_SNREQ;
        end
        S_EV_SNREQ:  if (mem_ready) state <= S_EV_SNWAIT;
        S_EV_SNWAIT: if (mem_rsp_valid) begin
          sn_q  <= mem_rsp_data[SN_W-1:0] + system_timer;
          state <= S_EV_WRITE;
        end
        S_EV_WRITE: state <= S_INST;
        S_INST: begin
          vic_vline <= snc_evict_vline;
          vic_sn    <= snc_evict_sn;
          state     <= (snc_evict_valid && snc_evict_dirty) ? S_VIC : S_IDLE;
        end
        S_VIC: if (mem_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------ seed burst
  // seed_k = (segment virtual address) + sequence number, rule (5)/(7).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sg_busy  <= 1'b0;
      sg_cnt   <= '0;
      sg_va    <= '0;
      sg_sn    <= '0;
      sg_to_wb <= 1'b0;
      sg_idx   <= '0;
    end else if (sg_start) begin
      sg_busy  <= 1'b1;
      sg_cnt   <= '0;
      sg_va    <= sg_start_va;
      sg_sn    <= sg_start_sn;
      sg_to_wb <= sg_start_wb;
      sg_idx   <= wbidx_q;
    end else if (sg_busy) begin
      sg_cnt <= sg_cnt + 1'b1;
      if (sg_cnt == SEG_IDX_W'(NSEG - 1)) sg_busy <= 1'b0;
    end
  end

  assign seed_valid = sg_busy;
  assign seed       = SEG_W'(sg_va + VA_W'({sg_cnt, 4'b0000})) + SEG_W'(sg_sn);
  assign seed_tag   = '{to_wb: sg_to_wb, idx: 3'(sg_idx), seg: sg_cnt};

  assign rsp_valid = (state == S_RD_RSP) || (state == S_WB_RSP);
  assign rsp_data  = line_q;

  // The write-buffer index of a pad matters only to the write buffer.
  logic unused_tag;
  assign unused_tag = ^pad_tag.idx;

  a_one_burst: assert property (@(posedge clk) disable iff (!rst_n) sg_start |-> !sg_busy);

endmodule
