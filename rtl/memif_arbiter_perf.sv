// memif_arbiter_perf: decoupled MEMIF shadowing arbiter, built so that the thread under
// observation (TUO) is slowed down as little as possible.
//
// The TUO is served by memory directly. Every word of its traffic, the request header,
// the write data and the read data returned by memory, is also pushed into a log FIFO
// (shadow_fifo, 32 KB = 8192 words of 32 bits by default). The shadowing thread (ST) never
// reaches memory: its requests are checked against the log instead. The ST's header is
// compared with the logged header; on a write each ST data word is compared with the
// logged TUO word; on a read the logged read data is sent to the ST. The FIFO lets the TUO
// run ahead of the ST until the log is full; only then is the TUO held back. The price is
// that an error is found only when the ST reaches the point where it occurs.
// If the headers differ, the logged packet is skipped and the ST's packet is closed on
// its own terms (write data discarded, a read answered with zero words). Each error
// message carries the kind, the ST's packet number and the position in the data stream;
// only the first data mismatch of a packet is reported.
//
// What follows the description of this arbiter: the FIFO between TUO and ST holding all
// requests and all read and written data, comparison when the ST issues its request,
// read data for the ST taken from the FIFO, a 32 KB buffer in distributed memory. This
// design's own choices: the packet format (memif_pkg), the valid/ready streams, how a
// rejected packet is closed, and one message per packet.
//
// Interface: valid/ready streams as in memif_arbiter_dlat; log_level is the number of
// words in the log. Timing: a TUO word moves in the cycle memory accepts it if the log
// has room; the ST takes one cycle per header word, one cycle to compare the header,
// then one cycle per data word when the log holds it.
module memif_arbiter_perf
  import memif_pkg::*;
#(
  parameter int unsigned LOG_DEPTH = 8192
) (
  input  logic     clk,
  input  logic     rst_n,
  // TUO
  input  word_t    tuo_req_data,
  input  logic     tuo_req_valid,
  output logic     tuo_req_ready,
  output word_t    tuo_rsp_data,
  output logic     tuo_rsp_valid,
  input  logic     tuo_rsp_ready,
  // ST
  input  word_t    st_req_data,
  input  logic     st_req_valid,
  output logic     st_req_ready,
  output word_t    st_rsp_data,
  output logic     st_rsp_valid,
  input  logic     st_rsp_ready,
  // memory controller side
  output word_t    mem_req_data,
  output logic     mem_req_valid,
  input  logic     mem_req_ready,
  input  word_t    mem_rsp_data,
  input  logic     mem_rsp_valid,
  output logic     mem_rsp_ready,
  // error messages
  output logic     err_valid,
  output err_msg_t err_msg,
  // status
  output logic [$clog2(LOG_DEPTH+1)-1:0] log_level,
  output logic     log_full,
  output logic     busy
);

  // ---------------------------------------------------------------- log FIFO
  logic  log_wr, log_rd, log_empty;
  word_t log_wdata, log_rdata;

  shadow_fifo #(.WIDTH(WORD_W), .DEPTH(LOG_DEPTH)) u_log (
    .clk, .rst_n,
    .wr_en  (log_wr),
    .wr_data(log_wdata),
    .rd_en  (log_rd),
    .rd_data(log_rdata),
    .full   (log_full),
    .empty  (log_empty),
    .level  (log_level)
  );

  // ---------------------------------------------------------------- TUO side
  typedef enum logic [1:0] {T_H0, T_H1, T_WR, T_RD} tstate_t;
  tstate_t tstate;
  word_t   t_h0;
  wcount_t t_left;

  logic t_fwd, t_ret;   // a request word / a read word moves
  always_comb begin
    mem_req_data  = tuo_req_data;
    mem_req_valid = 1'b0;
    tuo_req_ready = 1'b0;
    mem_rsp_ready = 1'b0;
    tuo_rsp_valid = 1'b0;
    tuo_rsp_data  = mem_rsp_data;
    if (tstate == T_RD) begin
      mem_rsp_ready = tuo_rsp_ready && !log_full;
      tuo_rsp_valid = mem_rsp_valid && !log_full;
    end else begin
      mem_req_valid = tuo_req_valid && !log_full;
      tuo_req_ready = mem_req_ready && !log_full;
    end
  end
  assign t_fwd     = mem_req_valid && mem_req_ready;
  assign t_ret     = mem_rsp_valid && mem_rsp_ready;
  assign log_wr    = t_fwd || t_ret;
  assign log_wdata = (tstate == T_RD) ? mem_rsp_data : tuo_req_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate <= T_H0;
      t_h0   <= '0;
      t_left <= '0;
    end else begin
      unique case (tstate)
        T_H0: if (t_fwd) begin
          t_h0   <= tuo_req_data;
          tstate <= T_H1;
        end
        T_H1: if (t_fwd) begin
          t_left <= hdr_words(t_h0);
          if (hdr_words(t_h0) == '0) tstate <= T_H0;
          else                       tstate <= hdr_is_write(t_h0) ? T_WR : T_RD;
        end
        T_WR: if (t_fwd) begin
          t_left <= t_left - 1'b1;
          if (t_left == wcount_t'(1)) tstate <= T_H0;
        end
        T_RD: if (t_ret) begin
          t_left <= t_left - 1'b1;
          if (t_left == wcount_t'(1)) tstate <= T_H0;
        end
        default: tstate <= T_H0;
      endcase
    end
  end

  // ---------------------------------------------------------------- ST side
  typedef enum logic [2:0] {S_H0, S_H1, S_CHK, S_WR, S_RD, S_SKIP} sstate_t;
  sstate_t          sstate;
  word_t            s_h0, s_h1, l_h0, l_h1;
  wcount_t          s_left, l_left, idx;
  logic [PKT_W-1:0] pkt;
  logic             data_err_seen;
  err_kind_t        hdr_err;

  assign hdr_err = hdr_compare(l_h0, l_h1, s_h0, s_h1);

  always_comb begin
    st_req_ready = 1'b0;
    st_rsp_valid = 1'b0;
    st_rsp_data  = log_rdata;
    log_rd       = 1'b0;
    unique case (sstate)
      S_H0, S_H1, S_WR: begin
        st_req_ready = !log_empty;
        log_rd       = st_req_valid && !log_empty;
      end
      S_RD: begin
        st_rsp_valid = !log_empty;
        log_rd       = st_rsp_ready && !log_empty;
      end
      S_SKIP: begin
        st_rsp_data = '0;
        log_rd      = (l_left != '0) && !log_empty;
        if (s_left != '0) begin
          if (hdr_is_write(s_h0)) st_req_ready = 1'b1;
          else                    st_rsp_valid = 1'b1;
        end
      end
      default: ;
    endcase
  end

  logic s_fire, s_ret, s_step;
  assign s_fire = st_req_valid && st_req_ready;
  assign s_ret  = st_rsp_valid && st_rsp_ready;
  assign s_step = hdr_is_write(s_h0) ? s_fire : s_ret;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sstate        <= S_H0;
      s_h0          <= '0;
      s_h1          <= '0;
      l_h0          <= '0;
      l_h1          <= '0;
      s_left        <= '0;
      l_left        <= '0;
      idx           <= '0;
      pkt           <= '0;
      data_err_seen <= 1'b0;
      err_valid     <= 1'b0;
      err_msg       <= '0;
    end else begin
      err_valid <= 1'b0;
      unique case (sstate)
        S_H0: if (s_fire) begin
          s_h0   <= st_req_data;
          l_h0   <= log_rdata;
          sstate <= S_H1;
        end
        S_H1: if (s_fire) begin
          s_h1   <= st_req_data;
          l_h1   <= log_rdata;
          sstate <= S_CHK;
        end
        S_CHK: begin
          idx           <= '0;
          data_err_seen <= 1'b0;
          l_left        <= hdr_words(l_h0);
          s_left        <= hdr_words(s_h0);
          if (hdr_err != ERR_NONE) begin
            sstate    <= S_SKIP;
            err_valid <= 1'b1;
            err_msg   <= '{kind: hdr_err, pkt: pkt,
                           pos: (hdr_err == ERR_ADDR) ? wcount_t'(1) : wcount_t'(0)};
          end else if (hdr_words(l_h0) == '0) begin
            sstate <= S_H0;
            pkt    <= pkt + 1'b1;
          end else begin
            sstate <= hdr_is_write(l_h0) ? S_WR : S_RD;
          end
        end
        S_WR: if (s_fire) begin
          if (st_req_data != log_rdata && !data_err_seen) begin
            data_err_seen <= 1'b1;
            err_valid     <= 1'b1;
            err_msg       <= '{kind: ERR_WDATA, pkt: pkt, pos: idx};
          end
          idx    <= idx + 1'b1;
          l_left <= l_left - 1'b1;
          if (l_left == wcount_t'(1)) begin
            sstate <= S_H0;
            pkt    <= pkt + 1'b1;
          end
        end
        S_RD: if (s_ret) begin
          idx    <= idx + 1'b1;
          l_left <= l_left - 1'b1;
          if (l_left == wcount_t'(1)) begin
            sstate <= S_H0;
            pkt    <= pkt + 1'b1;
          end
        end
        S_SKIP: begin
          if (log_rd) l_left <= l_left - 1'b1;
          if (s_left != '0 && s_step) s_left <= s_left - 1'b1;
          if ((l_left == '0 || (l_left == wcount_t'(1) && log_rd)) &&
              (s_left == '0 || (s_left == wcount_t'(1) && s_step))) begin
            sstate <= S_H0;
            pkt    <= pkt + 1'b1;
          end
        end
        default: sstate <= S_H0;
      endcase
    end
  end

  assign busy = (tstate != T_H0) || (sstate != S_H0) || !log_empty;

  // the ST never reaches memory: memory traffic only ever comes from the TUO side
  a_st_not_ahead: assert property (@(posedge clk) disable iff (!rst_n)
    (s_fire && sstate != S_SKIP) |-> !log_empty);

endmodule
