// tb_shadow_memif_top: end-to-end test of the MEMIF shadowing subsystem at its default
// sizes (32 KB log, 16-entry error queue).
//
// A TUO and an ST thread model run the same program: the memory traffic of one
// computation cycle of each benchmark thread (reads and writes per cycle, bytes read and
// written per cycle), i.e. matrixmul (132 reads / 128 KiB, 128 writes / 64 KiB), sort
// (1 read / 8 KiB, 1 write / 8 KiB) and gsm (4 reads / 1144 B, 2 writes / 888 B). The
// words a thread writes are computed from the words it read, so the ST's output is only
// right if it was given exactly the TUO's read data. Every workload runs with both
// arbiters; the ST starts late, so the dlat arbiter must hold the TUO in lock step and
// the perf arbiter must let it run ahead until its log is full. Then faults are injected
// into the ST (a wrong write word, a wrong address) and the error queue is overrun.
// Checked: memory contents after each run against a reference computed here, error
// messages (kind, position), and that each mechanism happened at least once.
module tb_shadow_memif_top;
  import memif_pkg::*;

  localparam int unsigned MWORDS = 65536;          // 256 KiB of modelled memory
  localparam word_t       IN_BASE  = 32'h0000_0000;
  localparam word_t       OUT_BASE = 32'h0002_0000; // 128 KiB

  logic clk = 1'b0, rst_n = 1'b0, arb_sel = 1'b0;
  word_t tuo_req_data, tuo_rsp_data, st_req_data, st_rsp_data, mem_req_data, mem_rsp_data;
  logic tuo_req_valid, tuo_req_ready, tuo_rsp_valid, tuo_rsp_ready;
  logic st_req_valid, st_req_ready, st_rsp_valid, st_rsp_ready;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid, mem_rsp_ready;
  err_msg_t err_msg;
  logic err_msg_valid, err_msg_pop = 1'b0, err_clear = 1'b0, err_irq, err_overflow;
  logic [31:0] err_count;
  logic [$clog2(8192+1)-1:0] log_level;
  logic log_full, busy;

  shadow_memif_top dut (.*);

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

  // ------------------------------------------------------------ bookkeeping
  int unsigned checks = 0, failures = 0;
  int unsigned n_lockstep = 0, n_logfull = 0, n_runahead = 0, n_switch = 0;
  int unsigned n_hdr_err = 0, n_data_err = 0, n_overflow = 0, n_log_reads = 0;
  logic        tuo_done, st_started;

  always @(posedge clk) begin
    if (!arb_sel && dut.u_dlat.t_hcnt == 2'd2 && dut.u_dlat.s_hcnt != 2'd2) n_lockstep++;
    if (log_full) n_logfull++;
    if (arb_sel && st_rsp_valid && st_rsp_ready) n_log_reads++;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ------------------------------------------------------------ workloads
  typedef struct {
    string       name;
    int unsigned reads, writes, rd_words, wr_words;
  } workload_t;

  workload_t wl[3] = '{
    '{"matrixmul", 132, 128, 32768, 16384},
    '{"sort",        1,   1,  2048,  2048},
    '{"gsm",         4,   2,   286,   222}
  };

  function automatic word_t in_word(int unsigned i, int unsigned seed);
    return word_t'(i * 32'h9e3779b1 ^ (seed + 1) * 32'h85ebca6b);
  endfunction

  // what the thread program writes: word j of the output from the words it read
  function automatic word_t out_word(word_t rd[$], int unsigned j);
    return rd[j % rd.size()] ^ word_t'(j * 32'h0100_0193);
  endfunction

  function automatic int unsigned share(int unsigned total, int unsigned parts, int unsigned k);
    return total / parts + ((k < total % parts) ? 1 : 0);
  endfunction

  typedef enum {F_NONE, F_DATA, F_ADDR} fault_t;

  // one computation cycle of thread program w on one thread model
  task automatic run_thread(bit st, workload_t w, fault_t f);
    word_t rd[$], part[$], wr[$];
    int unsigned a, j;
    rd = {};
    a = IN_BASE;
    for (int k = 0; k < w.reads; k++) begin
      int unsigned n;
      n = share(w.rd_words, w.reads, k);
      if (st) u_st.read_pkt(a, n, part);
      else    u_tuo.read_pkt(a, n, part);
      rd = {rd, part};
      a += 4 * n;
    end
    a = OUT_BASE;
    j = 0;
    for (int k = 0; k < w.writes; k++) begin
      int unsigned n;
      word_t       wa;
      n = share(w.wr_words, w.writes, k);
      wr = {};
      for (int i = 0; i < n; i++) wr.push_back(out_word(rd, j + i));
      wa = a;
      if (st && k == 0 && f == F_DATA) wr[n / 2] = wr[n / 2] ^ 32'h0000_0040;
      if (st && k == 0 && f == F_ADDR) wa = a + 4;
      if (st) u_st.write_pkt(wa, wr);
      else    u_tuo.write_pkt(wa, wr);
      a += 4 * n;
      j += n;
    end
  endtask

  task automatic init_mem(int unsigned seed);
    for (int i = 0; i < MWORDS; i++) u_mem.mem[i] = (i < OUT_BASE / 4) ? in_word(i, seed) : '0;
  endtask

  task automatic check_out(workload_t w, int unsigned seed, string what);
    word_t rd[$];
    int unsigned bad = 0;
    for (int i = 0; i < w.rd_words; i++) rd.push_back(in_word(IN_BASE / 4 + i, seed));
    for (int j = 0; j < w.wr_words; j++)
      if (u_mem.mem[OUT_BASE / 4 + j] != out_word(rd, j)) bad++;
    check(bad == 0, $sformatf("%s %s: %0d wrong output words", what, w.name, bad));
  endtask

  task automatic select(logic s);
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
    if (arb_sel != s) n_switch++;
    arb_sel = s;
    @(negedge clk);
  endtask

  // TUO and ST run the same program; the ST starts st_delay cycles late
  task automatic run_pair(workload_t w, int unsigned st_delay, fault_t f);
    tuo_done = 1'b0;
    st_started = 1'b0;
    fork
      begin
        run_thread(1'b0, w, F_NONE);
        tuo_done = 1'b1;
      end
      begin
        repeat (st_delay) @(negedge clk);
        if (tuo_done) n_runahead++;
        st_started = 1'b1;
        run_thread(1'b1, w, f);
      end
    join
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  task automatic pop_all(output err_msg_t msgs[$]);
    msgs = {};
    while (err_msg_valid) begin
      msgs.push_back(err_msg);
      err_msg_pop = 1'b1;
      @(negedge clk);
      err_msg_pop = 1'b0;
    end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    err_msg_t msgs[$];
    u_mem.stall_pct = 10;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // ---- clean runs, both arbiters, all workloads
    for (int s = 0; s < 2; s++) begin
      select(s[0]);
      for (int k = 0; k < 3; k++) begin
        int unsigned delay;
        init_mem(10 * s + k);
        // dlat: ST a little late; perf: ST far behind (beyond the log for matrixmul)
        delay = (s == 0) ? 200 : ((k == 0) ? 20000 : 30000);
        run_pair(wl[k], delay, F_NONE);
        check_out(wl[k], 10 * s + k, (s != 0) ? "perf" : "dlat");
        check(err_count == 0, $sformatf("no error on clean %s run", wl[k].name));
        check(u_mem.writes == wl[k].writes && u_mem.reads == wl[k].reads,
              $sformatf("%s: memory sees the TUO's packets only", wl[k].name));
        u_mem.writes = 0;
        u_mem.reads  = 0;
      end
    end

    // ---- fault in the ST's write data, both arbiters
    for (int s = 0; s < 2; s++) begin
      select(s[0]);
      init_mem(40 + s);
      run_pair(wl[1], 100, F_DATA);
      check_out(wl[1], 40 + s, "data fault: TUO output intact");
      pop_all(msgs);
      check(msgs.size() == 1 && msgs[0].kind == ERR_WDATA && msgs[0].pos == wcount_t'(1024),
            "data fault reported at word 1024");
      if (msgs.size() == 1 && msgs[0].kind == ERR_WDATA) n_data_err++;
    end

    // ---- fault in the ST's write address, both arbiters (gsm: later packets stay in step)
    for (int s = 0; s < 2; s++) begin
      select(s[0]);
      init_mem(50 + s);
      run_pair(wl[2], 100, F_ADDR);
      pop_all(msgs);
      check(msgs.size() == 1 && msgs[0].kind == ERR_ADDR && msgs[0].pos == wcount_t'(1),
            "address fault reported");
      if (msgs.size() == 1 && msgs[0].kind == ERR_ADDR) n_hdr_err++;
      // dlat drops the TUO's first write packet; perf lets it through
      begin
        automatic word_t rd[$] = {};
        automatic int unsigned bad = 0;
        for (int i = 0; i < wl[2].rd_words; i++) rd.push_back(in_word(i, 50 + s));
        for (int j = 111; j < 222; j++) if (u_mem.mem[OUT_BASE / 4 + j] != out_word(rd, j)) bad++;
        check(bad == 0, $sformatf("arbiter %0d: packets after the address fault complete (%0d bad)", s, bad));
        check((u_mem.mem[OUT_BASE / 4] == '0) == (s == 0),
              (s != 0) ? "perf: TUO write reached memory" : "dlat: mismatched write held back");
      end
    end

    // ---- error queue overrun: 20 mismatching one-word writes, nothing popped
    select(1'b0);
    err_clear = 1'b1; @(negedge clk); err_clear = 1'b0;
    for (int i = 0; i < 20; i++) begin
      word_t a[$], b[$];
      a = '{word_t'(i)};
      b = '{word_t'(i) ^ 32'h1};
      fork
        u_tuo.write_pkt(OUT_BASE + 4 * i, a);
        u_st.write_pkt(OUT_BASE + 4 * i, b);
      join
    end
    repeat (3) @(negedge clk);
    check(err_irq, "interrupt raised");
    check(err_overflow, "error queue overflow flagged");
    check(err_count == 20, $sformatf("all 20 errors counted (%0d)", err_count));
    if (err_overflow) n_overflow++;
    pop_all(msgs);
    check(msgs.size() == 16, "16 messages kept");
    foreach (msgs[i]) check(msgs[i].kind == ERR_WDATA && msgs[i].pos == '0, "queued message");
    err_clear = 1'b1; @(negedge clk); err_clear = 1'b0;
    check(!err_overflow && !err_irq, "cleared");

    // ---- every mechanism seen
    $display("lock-step waits %0d, log-full cycles %0d, TUO ran ahead %0d, mode switches %0d",
             n_lockstep, n_logfull, n_runahead, n_switch);
    $display("ST reads served from log %0d, header errors %0d, data errors %0d, overflows %0d",
             n_log_reads, n_hdr_err, n_data_err, n_overflow);
    check(n_lockstep > 0, "lock step happened");
    check(n_logfull > 0, "log full happened");
    check(n_runahead > 0, "TUO finished before the ST started");
    check(n_switch > 0, "arbiter switched");
    check(n_log_reads > 0, "ST read data served from the log");
    check(n_hdr_err == 2, "header errors detected");
    check(n_data_err == 2, "data errors detected");
    check(n_overflow > 0, "error queue overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
