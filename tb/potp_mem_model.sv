// potp_mem_model: behavioural model of main memory and its bus, for the
// testbenches only (not synthesizable).
//
// One transaction at a time: mem_req_ready is high while idle; an accepted
// request keeps the bus busy for LAT cycles. A read's data appear on
// mem_rsp_valid/mem_rsp_data in the LAT-th cycle after acceptance (so a
// registered consumer captures them LAT edges after the request edge).
// Lines and sequence numbers live in sparse associative arrays; an
// unwritten line reads as init_line(addr) and an unwritten number as 0,
// the initial sequence number.
module potp_mem_model
  import potp_pkg::*;
#(
  parameter int unsigned LAT = 100
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     mem_req_valid,
  output logic     mem_req_ready,
  input  mem_req_t mem_req,
  output logic     mem_rsp_valid,
  output line_t    mem_rsp_data
);

  line_t lines [pa_t];
  sn_t   sns   [pa_t];
  int    busy;
  logic  pend_rd;
  line_t pend_data;

  int n_line_rd = 0, n_line_wr = 0, n_sn_rd = 0, n_sn_wr = 0;

  // Content of a line never written: what the vendor or loader placed there.
  function automatic line_t init_line(pa_t a);
    line_t l;
    for (int i = 0; i < LINE_W / 32; i++) l[i*32 +: 32] = a ^ (32'h9e3779b9 * (i + 1));
    return l;
  endfunction

  function automatic line_t peek_line(pa_t a);
    return lines.exists(a) ? lines[a] : init_line(a);
  endfunction

  function automatic sn_t peek_sn(pa_t a);
    return sns.exists(a) ? sns[a] : '0;
  endfunction

  function automatic void poke_line(pa_t a, line_t d);
    lines[a] = d;
  endfunction

  assign mem_req_ready = rst_n && (busy == 0);

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy          <= 0;
      pend_rd       <= 1'b0;
      pend_data     <= '0;
      mem_rsp_valid <= 1'b0;
      mem_rsp_data  <= '0;
    end else begin
      mem_rsp_valid <= 1'b0;
      if (busy > 0) begin
        busy <= busy - 1;
        if (busy == 2 && pend_rd) begin
          mem_rsp_valid <= 1'b1;
          mem_rsp_data  <= pend_data;
        end
      end
      if (mem_req_valid && mem_req_ready) begin
        busy    <= LAT;
        pend_rd <= 1'b0;
        unique case (mem_req.op)
          MEM_RD_LINE: begin pend_rd <= 1'b1; pend_data <= peek_line(mem_req.addr); n_line_rd++; end
          MEM_RD_SN:   begin pend_rd <= 1'b1; pend_data <= LINE_W'(peek_sn(mem_req.addr)); n_sn_rd++; end
          MEM_WR_LINE: begin lines[mem_req.addr] = mem_req.data; n_line_wr++; end
          MEM_WR_SN:   begin sns[mem_req.addr] = mem_req.data[SN_W-1:0]; n_sn_wr++; end
          default: ;
        endcase
      end
    end
  end

endmodule
