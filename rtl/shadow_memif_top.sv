// shadow_memif_top: MEMIF shadowing for a pair of hardware threads.
//
// In a hybrid multi-core, a hardware thread (HWT) in a reconfigurable slot reaches main
// memory through the memory interface (MEMIF). To check a thread for errors, a copy of it,
// the shadowing thread (ST), runs next to the thread under observation (TUO) in a second
// slot, and their memory traffic (request type, address and all data) is compared. The ST
// must read exactly what the TUO reads, and its writes must never reach memory.
// This block sits between the two slots and the memory controller and holds the two
// arbiters that do this:
//   - memif_arbiter_dlat: the threads run in lock step, errors are found at once;
//   - memif_arbiter_perf: the TUO runs ahead, buffered by a 32 KB log, errors are found
//     when the ST catches up.
// arb_sel picks the arbiter (0 = dlat, 1 = perf); the other one sees idle inputs. The
// published system builds one arbiter or the other into the FPGA; having both behind a
// run-time select is this design's choice, so that one netlist offers both trade-offs.
// arb_sel must only change while busy is low. Mismatches go to error_reporter, which
// queues messages for the CPU and raises irq.
// The OS interface of each slot (OS calls, checked by software on the CPU) does not pass
// through this block.
//
// Interface: valid/ready word streams; a word moves when both are high at a rising edge.
// A request word, once offered, must stay offered and unchanged until taken (asserted
// here for both threads and for the memory side). A read word offered to a thread may
// be withdrawn before it is taken: in lock step it waits for the other thread as well.
// Timing: see the two arbiters; the select adds no register stage.
module shadow_memif_top
  import memif_pkg::*;
#(
  parameter int unsigned LOG_DEPTH = 8192,   // perf log: 32 KB of 32-bit words
  parameter int unsigned ERR_DEPTH = 16      // queued error messages
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     arb_sel,
  // TUO slot
  input  word_t    tuo_req_data,
  input  logic     tuo_req_valid,
  output logic     tuo_req_ready,
  output word_t    tuo_rsp_data,
  output logic     tuo_rsp_valid,
  input  logic     tuo_rsp_ready,
  // ST slot
  input  word_t    st_req_data,
  input  logic     st_req_valid,
  output logic     st_req_ready,
  output word_t    st_rsp_data,
  output logic     st_rsp_valid,
  input  logic     st_rsp_ready,
  // memory controller
  output word_t    mem_req_data,
  output logic     mem_req_valid,
  input  logic     mem_req_ready,
  input  word_t    mem_rsp_data,
  input  logic     mem_rsp_valid,
  output logic     mem_rsp_ready,
  // CPU
  output err_msg_t err_msg,
  output logic     err_msg_valid,
  input  logic     err_msg_pop,
  input  logic     err_clear,
  output logic     err_irq,
  output logic     err_overflow,
  output logic [31:0] err_count,
  // status
  output logic [$clog2(LOG_DEPTH+1)-1:0] log_level,
  output logic     log_full,
  output logic     busy
);

  // one set of arbiter-side signals per arbiter: index 0 = dlat, 1 = perf
  word_t    a_tuo_rsp_data [2], a_st_rsp_data [2], a_mem_req_data [2];
  logic     a_tuo_req_ready[2], a_tuo_rsp_valid[2];
  logic     a_st_req_ready [2], a_st_rsp_valid [2];
  logic     a_mem_req_valid[2], a_mem_rsp_ready[2];
  logic     a_err_valid    [2], a_busy[2];
  err_msg_t a_err_msg      [2];
  logic     sel_d, sel_p;

  assign sel_d = !arb_sel;
  assign sel_p = arb_sel;

  memif_arbiter_dlat u_dlat (
    .clk, .rst_n,
    .tuo_req_data (tuo_req_data),
    .tuo_req_valid(tuo_req_valid && sel_d),
    .tuo_req_ready(a_tuo_req_ready[0]),
    .tuo_rsp_data (a_tuo_rsp_data[0]),
    .tuo_rsp_valid(a_tuo_rsp_valid[0]),
    .tuo_rsp_ready(tuo_rsp_ready && sel_d),
    .st_req_data  (st_req_data),
    .st_req_valid (st_req_valid && sel_d),
    .st_req_ready (a_st_req_ready[0]),
    .st_rsp_data  (a_st_rsp_data[0]),
    .st_rsp_valid (a_st_rsp_valid[0]),
    .st_rsp_ready (st_rsp_ready && sel_d),
    .mem_req_data (a_mem_req_data[0]),
    .mem_req_valid(a_mem_req_valid[0]),
    .mem_req_ready(mem_req_ready && sel_d),
    .mem_rsp_data (mem_rsp_data),
    .mem_rsp_valid(mem_rsp_valid && sel_d),
    .mem_rsp_ready(a_mem_rsp_ready[0]),
    .err_valid    (a_err_valid[0]),
    .err_msg      (a_err_msg[0]),
    .busy         (a_busy[0])
  );

  memif_arbiter_perf #(.LOG_DEPTH(LOG_DEPTH)) u_perf (
    .clk, .rst_n,
    .tuo_req_data (tuo_req_data),
    .tuo_req_valid(tuo_req_valid && sel_p),
    .tuo_req_ready(a_tuo_req_ready[1]),
    .tuo_rsp_data (a_tuo_rsp_data[1]),
    .tuo_rsp_valid(a_tuo_rsp_valid[1]),
    .tuo_rsp_ready(tuo_rsp_ready && sel_p),
    .st_req_data  (st_req_data),
    .st_req_valid (st_req_valid && sel_p),
    .st_req_ready (a_st_req_ready[1]),
    .st_rsp_data  (a_st_rsp_data[1]),
    .st_rsp_valid (a_st_rsp_valid[1]),
    .st_rsp_ready (st_rsp_ready && sel_p),
    .mem_req_data (a_mem_req_data[1]),
    .mem_req_valid(a_mem_req_valid[1]),
    .mem_req_ready(mem_req_ready && sel_p),
    .mem_rsp_data (mem_rsp_data),
    .mem_rsp_valid(mem_rsp_valid && sel_p),
    .mem_rsp_ready(a_mem_rsp_ready[1]),
    .err_valid    (a_err_valid[1]),
    .err_msg      (a_err_msg[1]),
    .log_level    (log_level),
    .log_full     (log_full),
    .busy         (a_busy[1])
  );

  logic idx;
  assign idx = arb_sel;

  assign tuo_req_ready = a_tuo_req_ready[idx];
  assign tuo_rsp_data  = a_tuo_rsp_data [idx];
  assign tuo_rsp_valid = a_tuo_rsp_valid[idx];
  assign st_req_ready  = a_st_req_ready [idx];
  assign st_rsp_data   = a_st_rsp_data  [idx];
  assign st_rsp_valid  = a_st_rsp_valid [idx];
  assign mem_req_data  = a_mem_req_data [idx];
  assign mem_req_valid = a_mem_req_valid[idx];
  assign mem_rsp_ready = a_mem_rsp_ready[idx];
  assign busy          = a_busy[0] || a_busy[1];

  // an arbiter only reports while it is selected; both are merged into one queue
  error_reporter #(.DEPTH(ERR_DEPTH)) u_err (
    .clk, .rst_n,
    .err_valid(a_err_valid[idx]),
    .err_msg  (a_err_msg[idx]),
    .msg      (err_msg),
    .msg_valid(err_msg_valid),
    .msg_pop  (err_msg_pop),
    .clear    (err_clear),
    .irq      (err_irq),
    .overflow (err_overflow),
    .err_count(err_count)
  );

  a_sel_stable: assert property (@(posedge clk) disable iff (!rst_n)
    $changed(arb_sel) |-> !$past(busy));

  // request streams: a word offered stays offered, unchanged, until it is taken
  a_tuo_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (tuo_req_valid && !tuo_req_ready) |=> (tuo_req_valid && $stable(tuo_req_data)));
  a_st_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (st_req_valid && !st_req_ready) |=> (st_req_valid && $stable(st_req_data)));
  a_mem_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (mem_req_valid && !mem_req_ready && $stable(arb_sel)) |=>
      (mem_req_valid && $stable(mem_req_data)));

endmodule
