// tb_hwt_model: behavioural model of a hardware thread's memory interface (testbench only).
//
// Testbenches call its tasks to issue MEMIF packets: write_pkt sends a header (write bit,
// length in bytes, address) and the data words; read_pkt sends a header and collects the
// returned words. Request words are driven after a falling clock edge and count as sent
// once the handshake was seen at a rising edge. stall_pct inserts random idle cycles
// between words and random gaps in rsp_ready. stalled_cycles counts cycles in which the
// model offered a word and the arbiter did not take it.
module tb_hwt_model
  import memif_pkg::*;
(
  input  logic  clk,
  output word_t req_data,
  output logic  req_valid,
  input  logic  req_ready,
  input  word_t rsp_data,
  input  logic  rsp_valid,
  output logic  rsp_ready
);

  int unsigned stall_pct = 0;
  int unsigned stalled_cycles = 0;
  logic        req_fire_q = 1'b0;
  logic        rsp_fire_q = 1'b0;
  word_t       rsp_data_q = '0;

  initial begin
    req_data  = '0;
    req_valid = 1'b0;
    rsp_ready = 1'b0;
  end

  always @(posedge clk) begin
    req_fire_q <= req_valid && req_ready;
    rsp_fire_q <= rsp_valid && rsp_ready;
    if (rsp_valid && rsp_ready) rsp_data_q <= rsp_data;
    if (req_valid && !req_ready) stalled_cycles <= stalled_cycles + 1;
  end

  task automatic idle_gap();
    while (stall_pct != 0 && ($urandom % 100) < stall_pct) @(negedge clk);
  endtask

  // must be called right after a falling edge
  task automatic send_word(word_t w);
    idle_gap();
    req_data  = w;
    req_valid = 1'b1;
    do @(negedge clk); while (!req_fire_q);
    req_valid = 1'b0;
  endtask

  task automatic recv_word(output word_t w);
    rsp_ready = 1'b1;
    forever begin
      @(negedge clk);
      if (rsp_fire_q) break;
      rsp_ready = !(stall_pct != 0 && ($urandom % 100) < stall_pct);
    end
    rsp_ready = 1'b0;
    w = rsp_data_q;
  endtask

  task automatic write_pkt(word_t addr, word_t data[$]);
    send_word({1'b1, 7'd0, 24'(data.size() * 4)});
    send_word(addr);
    foreach (data[i]) send_word(data[i]);
  endtask

  task automatic read_pkt(word_t addr, int unsigned nwords, output word_t data[$]);
    word_t w;
    data = {};
    send_word({1'b0, 7'd0, 24'(nwords * 4)});
    send_word(addr);
    repeat (nwords) begin
      recv_word(w);
      data.push_back(w);
    end
  endtask

endmodule
