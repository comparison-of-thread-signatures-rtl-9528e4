// error_reporter: queue of error messages from the MEMIF shadowing arbiter to the CPU.
//
// When the arbiter finds that the shadowing thread's memory traffic differs from that of
// the thread under observation, it produces a message with the kind of error and its
// position in the data stream. Such messages are to reach the CPU; how is not described,
// so this block is this design's choice: a small FIFO (shadow_fifo) of err_msg_t that the
// CPU reads one by one, an interrupt line that is high while a message waits, a count of
// all errors seen and a sticky overflow flag for messages lost because the queue was full.
//
// Interface: err_valid/err_msg come in as one-cycle pulses. msg/msg_valid show the oldest
// message; msg_pop removes it. clear resets err_count and overflow (not the queue).
// Timing: a message is readable the cycle after its pulse.
module error_reporter
  import memif_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        err_valid,
  input  err_msg_t    err_msg,
  output err_msg_t    msg,
  output logic        msg_valid,
  input  logic        msg_pop,
  input  logic        clear,
  output logic        irq,
  output logic        overflow,
  output logic [31:0] err_count
);

  logic                 full, empty;
  logic [ERR_MSG_W-1:0] rd_bits;
  logic [$clog2(DEPTH+1)-1:0] level;

  shadow_fifo #(.WIDTH(ERR_MSG_W), .DEPTH(DEPTH)) u_queue (
    .clk, .rst_n,
    .wr_en  (err_valid && !full),
    .wr_data(err_msg),
    .rd_en  (msg_pop && !empty),
    .rd_data(rd_bits),
    .full   (full),
    .empty  (empty),
    .level  (level)
  );

  assign msg       = err_msg_t'(rd_bits);
  assign msg_valid = !empty;
  assign irq       = !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      overflow  <= 1'b0;
      err_count <= '0;
    end else if (clear) begin
      overflow  <= 1'b0;
      err_count <= '0;
    end else if (err_valid) begin
      err_count <= err_count + 32'd1;
      if (full) overflow <= 1'b1;
    end
  end

endmodule
