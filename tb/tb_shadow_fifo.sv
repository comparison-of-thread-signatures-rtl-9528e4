// tb_shadow_fifo: self-checking test of the first-word-fall-through FIFO.
// Random pushes and pops (never into full / out of empty) are compared against a queue
// model: head word, level, full and empty every cycle. The FIFO is filled to full and
// drained to empty at least once, and a word pushed into an empty FIFO must be visible
// one cycle later.
module tb_shadow_fifo;
  localparam int unsigned WIDTH = 20;
  localparam int unsigned DEPTH = 16;

  logic             clk = 1'b0, rst_n = 1'b0;
  logic             wr_en = 1'b0, rd_en = 1'b0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic             full, empty;
  logic [$clog2(DEPTH+1)-1:0] level;

  int unsigned checks = 0, failures = 0, fulls = 0, empties = 0;
  logic [WIDTH-1:0] model[$];

  shadow_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(empty && !full && level == '0, "empty after reset");
    // latency: push one word, visible next cycle
    wr_en = 1'b1; wr_data = 20'h5a5a5;
    @(negedge clk);
    wr_en = 1'b0;
    model.push_back(20'h5a5a5);
    check(!empty && rd_data == 20'h5a5a5, "one-cycle fall-through");
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int unsigned bias;
      bias = ((cyc / 400) % 2 == 0) ? 70 : 30;   // alternate filling and draining phases
      wr_en   = !full  && (($urandom % 100) < bias);
      rd_en   = !empty && (($urandom % 100) < (100 - bias));
      wr_data = WIDTH'($urandom);
      @(negedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
      check(int'(level) == model.size(), "level");
      check(full == (model.size() == DEPTH), "full flag");
      check(empty == (model.size() == 0), "empty flag");
      if (model.size() != 0) check(rd_data == model[0], "head word");
      if (full) fulls++;
      if (empty) empties++;
    end
    check(fulls > 0, "reached full");
    check(empties > 0, "reached empty");
    $display("full seen %0d cycles, empty seen %0d cycles", fulls, empties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
