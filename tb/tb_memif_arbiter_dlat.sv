// tb_memif_arbiter_dlat: self-checking test of the lock-step shadowing arbiter.
// Two thread models (TUO, ST) and a memory model are attached. Checked: both threads get
// the memory's data on a read; a write reaches memory once, with the TUO's data; the TUO
// waits for a late ST (lock step) and memory is untouched until then; a write data
// mismatch is reported with its position and the write completes; type, length and
// address mismatches are reported and nothing reaches memory; a streamed write runs at
// one word per cycle; random stalls on every side change none of this.
module tb_memif_arbiter_dlat;
  import memif_pkg::*;

  localparam int unsigned MWORDS = 4096;

  logic clk = 1'b0, rst_n = 1'b0;
  word_t tuo_req_data, tuo_rsp_data, st_req_data, st_rsp_data, mem_req_data, mem_rsp_data;
  logic tuo_req_valid, tuo_req_ready, tuo_rsp_valid, tuo_rsp_ready;
  logic st_req_valid, st_req_ready, st_rsp_valid, st_rsp_ready;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid, mem_rsp_ready;
  logic err_valid, busy;
  err_msg_t err_msg;

  memif_arbiter_dlat dut (.*);

  tb_hwt_model u_tuo (.clk, .req_data(tuo_req_data), .req_valid(tuo_req_valid),
    .req_ready(tuo_req_ready), .rsp_data(tuo_rsp_data), .rsp_valid(tuo_rsp_valid),
    .rsp_ready(tuo_rsp_ready));
  tb_hwt_model u_st (.clk, .req_data(st_req_data), .req_valid(st_req_valid),
    .req_ready(st_req_ready), .rsp_data(st_rsp_data), .rsp_valid(st_rsp_valid),
    .rsp_ready(st_rsp_ready));
  tb_mem_model #(.WORDS(MWORDS)) u_mem (.clk, .rst_n, .req_data(mem_req_data),
    .req_valid(mem_req_valid), .req_ready(mem_req_ready), .rsp_data(mem_rsp_data),
    .rsp_valid(mem_rsp_valid), .rsp_ready(mem_rsp_ready));

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0, pkts = 0;
  err_msg_t    errs[$];

  always @(posedge clk) if (err_valid) errs.push_back(err_msg);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic word_t pat(int unsigned i, int unsigned seed);
    return word_t'(i * 32'h9e3779b1 + seed * 32'h7f4a7c15);
  endfunction

  task automatic expect_err(err_kind_t k, int unsigned pos, string what);
    repeat (2) @(negedge clk);
    check(errs.size() == 1, {what, ": one message"});
    if (errs.size() != 0) begin
      check(errs[0].kind == k,                 {what, ": kind"});
      check(errs[0].pos == wcount_t'(pos),     {what, ": position"});
      check(errs[0].pkt == PKT_W'(pkts),       {what, ": packet number"});
    end
    errs = {};
  endtask

  task automatic expect_no_err(string what);
    repeat (2) @(negedge clk);
    check(errs.size() == 0, {what, ": no error"});
    errs = {};
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t d[$], e[$], rt[$], rs[$];
    int unsigned t0, t1, stall0;
    for (int i = 0; i < MWORDS; i++) u_mem.mem[i] = pat(i, 1);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1: read, both get memory's data
    fork
      u_tuo.read_pkt(32'h400, 16, rt);
      u_st.read_pkt(32'h400, 16, rs);
    join
    for (int i = 0; i < 16; i++) begin
      check(rt[i] == pat(256 + i, 1), "TUO read data");
      check(rs[i] == pat(256 + i, 1), "ST read data");
    end
    expect_no_err("read");
    check(u_mem.reads == 1, "one memory read for two threads");
    pkts++;

    // 2: matching write, streamed at one word per cycle
    d = {};
    for (int i = 0; i < 64; i++) d.push_back(pat(i, 2));
    t0 = 32'($time / 10);
    fork
      u_tuo.write_pkt(32'h800, d);
      u_st.write_pkt(32'h800, d);
    join
    t1 = 32'($time / 10);
    check(t1 - t0 <= 64 + 2 + 4, $sformatf("write rate: %0d cycles for 66 words", t1 - t0));
    repeat (2) @(negedge clk);
    for (int i = 0; i < 64; i++) check(u_mem.mem[512 + i] == pat(i, 2), "written data");
    check(u_mem.writes == 1, "one memory write for two threads");
    expect_no_err("write");
    pkts++;

    // 3: lock step, ST arrives 50 cycles late; nothing reaches memory before it
    d = {};
    for (int i = 0; i < 8; i++) d.push_back(pat(i, 3));
    stall0 = u_tuo.stalled_cycles;
    fork
      u_tuo.write_pkt(32'h1000, d);
      begin
        repeat (40) @(negedge clk);
        check(u_mem.mem[1024] == pat(1024, 1), "memory untouched while ST is late");
        check(u_mem.writes == 1, "no write issued while ST is late");
        repeat (10) @(negedge clk);
        u_st.write_pkt(32'h1000, d);
      end
    join
    check(u_tuo.stalled_cycles - stall0 >= 40, "TUO held in lock step");
    repeat (2) @(negedge clk);
    check(u_mem.mem[1024 + 7] == pat(7, 3), "late write completed");
    expect_no_err("late ST");
    pkts++;

    // 4: write data mismatch at word 3, write still completes with TUO data
    d = {}; e = {};
    for (int i = 0; i < 8; i++) d.push_back(pat(i, 4));
    e = d;
    e[3] = e[3] ^ 32'h0000_0100;
    e[5] = e[5] ^ 32'h8000_0000;
    fork
      u_tuo.write_pkt(32'h1100, d);
      u_st.write_pkt(32'h1100, e);
    join
    repeat (2) @(negedge clk);
    for (int i = 0; i < 8; i++) check(u_mem.mem[1088 + i] == pat(i, 4), "TUO data written");
    expect_err(ERR_WDATA, 3, "data mismatch");
    pkts++;

    // 5: address mismatch, nothing reaches memory
    fork
      u_tuo.write_pkt(32'h1200, d);
      u_st.write_pkt(32'h1204, d);
    join
    repeat (2) @(negedge clk);
    check(u_mem.mem[1152] == pat(1152, 1) && u_mem.mem[1153] == pat(1153, 1),
          "no write on address mismatch");
    check(u_mem.writes == 3, "write count after address mismatch");
    expect_err(ERR_ADDR, 1, "address mismatch");
    pkts++;

    // 6: length mismatch on a read
    fork
      u_tuo.read_pkt(32'h40, 4, rt);
      u_st.read_pkt(32'h40, 6, rs);
    join
    check(u_mem.reads == 1, "no read on length mismatch");
    check(rs.size() == 6 && rs[5] == '0, "ST read closed with zero words");
    expect_err(ERR_LEN, 0, "length mismatch");
    pkts++;

    // 7: type mismatch
    fork
      u_tuo.write_pkt(32'h80, d);
      u_st.read_pkt(32'h80, 8, rs);
    join
    check(u_mem.writes == 3 && u_mem.reads == 1, "no access on type mismatch");
    expect_err(ERR_TYPE, 0, "type mismatch");
    pkts++;

    // 8: random stalls everywhere, mixed traffic
    u_tuo.stall_pct = 30; u_st.stall_pct = 30; u_mem.stall_pct = 30;
    for (int p = 0; p < 20; p++) begin
      int unsigned n, a;
      n = 1 + $urandom % 20;
      a = 4 * (2048 + ($urandom % 1024));
      if (p % 2 == 0) begin
        d = {};
        for (int i = 0; i < n; i++) d.push_back(pat(i, 100 + p));
        fork
          u_tuo.write_pkt(a, d);
          u_st.write_pkt(a, d);
        join
      end else begin
        fork
          u_tuo.read_pkt(a, n, rt);
          u_st.read_pkt(a, n, rs);
        join
        check(rt == rs, "stalled read: same data to both");
        check(rt[0] == u_mem.mem[a / 4], "stalled read: memory data");
      end
      pkts++;
    end
    expect_no_err("random stalls");
    check(!busy, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
