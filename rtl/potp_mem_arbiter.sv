// potp_mem_arbiter: shares the single main-memory bus between the
// controller (line reads, sequence-number reads and write-backs) and the
// write buffer (retiring ciphertext lines).
//
// Policy, after the document's write-buffer model: a full write buffer gets
// the highest priority; otherwise the controller goes first, and the write
// buffer retires only when the bus is free, i.e. when the controller is not
// asking for it. The memory takes one transaction at a time and shows it
// with mem_req_ready. Read data go back to the controller, the only reader,
// so responses need no routing. Combinational: grants are given in the
// cycle the memory is ready.
module potp_mem_arbiter
  import potp_pkg::*;
(
  // controller
  input  logic     ctl_valid,
  output logic     ctl_ready,
  input  mem_req_t ctl_req,
  // write buffer
  input  logic     wb_valid,
  output logic     wb_ready,
  input  pa_t      wb_pa,
  input  line_t    wb_data,
  input  logic     wb_full,
  // memory
  output logic     mem_req_valid,
  input  logic     mem_req_ready,
  output mem_req_t mem_req,
  // which requester won (for event counting)
  output logic     grant_wb_urgent,
  output logic     grant_wb_lazy
);

  logic pick_wb;
  assign pick_wb = wb_valid && (wb_full || !ctl_valid);

  assign mem_req_valid = pick_wb || ctl_valid;
  assign mem_req       = pick_wb ? '{op: MEM_WR_LINE, addr: wb_pa, data: wb_data} : ctl_req;
  assign wb_ready      = pick_wb && mem_req_ready;
  assign ctl_ready     = !pick_wb && mem_req_ready;

  assign grant_wb_urgent = wb_ready && wb_full;
  assign grant_wb_lazy   = wb_ready && !wb_full;

endmodule
