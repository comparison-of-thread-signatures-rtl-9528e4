// tb_error_reporter: self-checking test of the error message queue.
// Sends error pulses, reads them back in order, checks irq, err_count, the sticky overflow
// flag when more messages arrive than the queue holds, and clear.
module tb_error_reporter;
  import memif_pkg::*;

  localparam int unsigned DEPTH = 4;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        err_valid = 1'b0, msg_pop = 1'b0, clear = 1'b0;
  err_msg_t    err_msg = '0, msg;
  logic        msg_valid, irq, overflow;
  logic [31:0] err_count;

  int unsigned checks = 0, failures = 0;

  error_reporter #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic err_msg_t mk(int unsigned i);
    err_kind_t k;
    k = err_kind_t'(3'(1 + i % 4));
    return '{kind: k, pkt: PKT_W'(i * 7), pos: wcount_t'(i * 3 + 1)};
  endfunction

  task automatic report(err_msg_t m);
    err_valid = 1'b1; err_msg = m;
    @(negedge clk);
    err_valid = 1'b0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!irq && !msg_valid && !overflow && err_count == 0, "idle after reset");
    // two messages, read back in order
    report(mk(0));
    check(irq && msg_valid && msg == mk(0), "first message visible next cycle");
    report(mk(1));
    check(err_count == 2, "count 2");
    for (int i = 0; i < 2; i++) begin
      check(msg_valid && msg == mk(i), $sformatf("message %0d", i));
      msg_pop = 1'b1; @(negedge clk); msg_pop = 1'b0;
    end
    check(!irq && !msg_valid, "queue empty");
    // overflow: DEPTH+2 messages, only the first DEPTH kept
    for (int i = 0; i < DEPTH + 2; i++) report(mk(10 + i));
    check(overflow, "overflow flagged");
    check(err_count == 2 + DEPTH + 2, "count includes lost messages");
    for (int i = 0; i < DEPTH; i++) begin
      check(msg_valid && msg == mk(10 + i), $sformatf("kept message %0d", i));
      msg_pop = 1'b1; @(negedge clk); msg_pop = 1'b0;
    end
    check(!msg_valid, "lost messages not queued");
    check(overflow, "overflow sticky");
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    check(!overflow && err_count == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
