// tb_memif_arbiter_perf: self-checking test of the decoupled shadowing arbiter.
// Two thread models (TUO, ST) and a memory model are attached; the log is made small
// (LOG_DEPTH = 64) so that it fills. Checked: the TUO completes reads and writes while the
// ST has not started, and every word is logged; the ST later gets the TUO's read data
// from the log and its matching writes give no error; the TUO is held only when the log
// is full; the ST's writes never reach memory; mismatches of write data, address, length
// and type are reported only once the ST reaches them, with kind, packet and position;
// after a rejected packet the log and ST stay in step; random stalls with the two
// threads running independently change none of this.
module tb_memif_arbiter_perf;
  import memif_pkg::*;

  localparam int unsigned MWORDS    = 4096;
  localparam int unsigned LOG_DEPTH = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  word_t tuo_req_data, tuo_rsp_data, st_req_data, st_rsp_data, mem_req_data, mem_rsp_data;
  logic tuo_req_valid, tuo_req_ready, tuo_rsp_valid, tuo_rsp_ready;
  logic st_req_valid, st_req_ready, st_rsp_valid, st_rsp_ready;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid, mem_rsp_ready;
  logic err_valid, busy, log_full;
  logic [$clog2(LOG_DEPTH+1)-1:0] log_level;
  err_msg_t err_msg;

  memif_arbiter_perf #(.LOG_DEPTH(LOG_DEPTH)) dut (.*);

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

  int unsigned checks = 0, failures = 0, pkts = 0, full_cycles = 0;
  err_msg_t    errs[$];

  always @(posedge clk) begin
    if (err_valid) errs.push_back(err_msg);
    if (log_full) full_cycles++;
  end

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
      check(errs[0].kind == k,             {what, ": kind"});
      check(errs[0].pos == wcount_t'(pos), {what, ": position"});
      check(errs[0].pkt == PKT_W'(pkts),   {what, ": packet number"});
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
    int unsigned stall0, w0;
    for (int i = 0; i < MWORDS; i++) u_mem.mem[i] = pat(i, 1);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1: TUO runs ahead alone: a read and a write, all logged
    d = {};
    for (int i = 0; i < 8; i++) d.push_back(pat(i, 2));
    u_tuo.read_pkt(32'h400, 16, rt);
    u_tuo.write_pkt(32'h800, d);
    repeat (3) @(negedge clk);
    for (int i = 0; i < 16; i++) check(rt[i] == pat(256 + i, 1), "TUO read data");
    for (int i = 0; i < 8; i++)  check(u_mem.mem[512 + i] == pat(i, 2), "TUO write reached memory");
    check(log_level == 2 + 16 + 2 + 8, $sformatf("logged words: %0d", log_level));
    check(u_tuo.stalled_cycles == 0, "TUO not held while log has room");

    // 2: ST replays later, read data from the log, not from memory
    for (int i = 0; i < 16; i++) u_mem.mem[256 + i] = 32'hdead_0000 + i;
    u_st.read_pkt(32'h400, 16, rs);
    for (int i = 0; i < 16; i++) check(rs[i] == pat(256 + i, 1), "ST read data from log");
    pkts++;
    u_st.write_pkt(32'h800, d);
    pkts++;
    expect_no_err("replay");
    check(log_level == 0, "log drained");
    check(u_mem.writes == 1 && u_mem.reads == 1, "ST never reaches memory");

    // 3: log fills, TUO held until the ST drains it
    d = {};
    for (int i = 0; i < 80; i++) d.push_back(pat(i, 3));
    stall0 = u_tuo.stalled_cycles;
    fork
      u_tuo.write_pkt(32'h1000, d);
      begin
        repeat (200) @(negedge clk);
        check(log_full, "log full while ST is absent");
        check(u_mem.mem[1024 + 61] == pat(61, 3) && u_mem.mem[1024 + 62] == pat(1086, 1),
              "TUO advanced exactly as far as the log allows");
        u_st.write_pkt(32'h1000, d);
      end
    join
    check(u_tuo.stalled_cycles - stall0 >= 100, "TUO held on a full log");
    repeat (2) @(negedge clk);
    check(u_mem.mem[1024 + 79] == pat(79, 3), "long write completed");
    expect_no_err("log full");
    pkts++;

    // 4: write data mismatch at word 5, found only when the ST gets there
    d = {};
    for (int i = 0; i < 8; i++) d.push_back(pat(i, 4));
    e = d;
    e[5] = e[5] ^ 32'h0001_0000;
    u_tuo.write_pkt(32'h1100, d);
    repeat (20) @(negedge clk);
    check(errs.size() == 0, "no error before the ST arrives");
    u_st.write_pkt(32'h1100, e);
    for (int i = 0; i < 8; i++) check(u_mem.mem[1088 + i] == pat(i, 4), "TUO data in memory");
    expect_err(ERR_WDATA, 5, "data mismatch");
    pkts++;

    // 5: address mismatch; ST write never reaches memory; next packet in step again
    w0 = u_mem.writes;
    u_tuo.write_pkt(32'h1200, d);
    u_st.write_pkt(32'h1300, d);
    repeat (2) @(negedge clk);
    check(u_mem.writes == w0 + 1, "only the TUO write reached memory");
    check(u_mem.mem[1216] == pat(1216, 1), "ST address untouched");
    expect_err(ERR_ADDR, 1, "address mismatch");
    pkts++;

    // 6: length mismatch on a read; ST gets zeros; then a matching read is in step
    u_tuo.read_pkt(32'h40, 4, rt);
    u_st.read_pkt(32'h40, 7, rs);
    check(rs.size() == 7 && rs[0] == '0 && rs[6] == '0, "ST read closed with zero words");
    expect_err(ERR_LEN, 0, "length mismatch");
    pkts++;
    u_tuo.read_pkt(32'h80, 4, rt);
    u_st.read_pkt(32'h80, 4, rs);
    check(rt == rs && rt[0] == pat(32, 1), "in step after a rejected packet");
    expect_no_err("after rejected packet");
    pkts++;

    // 7: type mismatch
    u_tuo.write_pkt(32'h80, d);
    u_st.read_pkt(32'h80, 8, rs);
    expect_err(ERR_TYPE, 0, "type mismatch");
    pkts++;
    check(log_level == 0, "log empty after mismatches");

    // 8: random stalls, threads running independently, ST starting late
    u_tuo.stall_pct = 30; u_st.stall_pct = 30; u_mem.stall_pct = 30;
    fork
      for (int p = 0; p < 20; p++) begin
        word_t dd[$], r[$];
        dd = {};
        for (int i = 0; i < 1 + p - p % 2; i++) dd.push_back(pat(i, 100 + p - p % 2));
        if (p % 2 == 0) u_tuo.write_pkt(4 * (2048 + 32 * p), dd);
        else begin
          u_tuo.read_pkt(4 * (2048 + 32 * (p - 1)), dd.size(), r);
          check(r == dd, "TUO reads back its write");
        end
      end
      begin
        repeat (150) @(negedge clk);
        for (int p = 0; p < 20; p++) begin
          word_t dd[$], r[$];
          dd = {};
          for (int i = 0; i < 1 + p - p % 2; i++) dd.push_back(pat(i, 100 + p - p % 2));
          if (p % 2 == 0) u_st.write_pkt(4 * (2048 + 32 * p), dd);
          else begin
            u_st.read_pkt(4 * (2048 + 32 * (p - 1)), dd.size(), r);
            check(r == dd, "ST reads the TUO's data");
          end
        end
      end
    join
    expect_no_err("random stalls");
    repeat (2) @(negedge clk);
    check(!busy && log_level == 0, "idle at end");
    check(full_cycles > 0, "log full at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
