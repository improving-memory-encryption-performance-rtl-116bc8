// tb_potp_mem_arbiter: exhaustive check of the bus arbiter over all
// combinations of controller request, write-buffer request, write-buffer
// full and memory ready: who is granted, what reaches the bus, and the
// urgent/lazy retirement flags.
module tb_potp_mem_arbiter;
  import potp_pkg::*;

  int checks = 0, failures = 0;
  logic ctl_valid, ctl_ready, wb_valid, wb_ready, wb_full, mem_req_valid, mem_req_ready;
  logic grant_wb_urgent, grant_wb_lazy;
  mem_req_t ctl_req, mem_req;
  pa_t wb_pa;
  line_t wb_data;

  potp_mem_arbiter dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ewb, ectl;
    ctl_req = '{op: MEM_RD_SN, addr: 32'h3000_0042, data: LINE_W'(16'h1234)};
    wb_pa   = 32'h0000_1f80;
    wb_data = {32{32'hcafef00d}};
    for (int v = 0; v < 16; v++) begin
      {ctl_valid, wb_valid, wb_full, mem_req_ready} = 4'(v);
      #1;
      // full buffer first, then the controller, then a free bus for the buffer
      ewb  = wb_valid && (wb_full || !ctl_valid);
      ectl = ctl_valid && !ewb;
      checks++;
      if (mem_req_valid !== (ewb || ectl) || wb_ready !== (ewb && mem_req_ready) ||
          ctl_ready !== (!ewb && mem_req_ready)) begin
        failures++;
        $display("case %b: grants wrong", 4'(v));
      end
      if (ewb) begin
        checks++;
        if (mem_req.op !== MEM_WR_LINE || mem_req.addr !== wb_pa || mem_req.data !== wb_data) failures++;
      end else if (ectl) begin
        checks++;
        if (mem_req !== ctl_req) failures++;
      end
      checks++;
      if (grant_wb_urgent !== (ewb && mem_req_ready && wb_full) ||
          grant_wb_lazy !== (ewb && mem_req_ready && !wb_full)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
