// memif_arbiter_dlat: lock-step MEMIF shadowing arbiter, built for the lowest error
// detection latency.
//
// The thread under observation (TUO) and the shadowing thread (ST) are synchronised on
// every memory access. The arbiter collects the two-word header of both threads and
// compares type, length and address before anything reaches memory. If the headers agree,
// the TUO's header goes to memory and
//   - a write streams TUO and ST data together, word by word: the TUO word goes to
//     memory, the ST word is compared with it and is dropped. A data mismatch is reported
//     as it passes and the write still completes;
//   - a read returns every memory word to both threads in the same cycle, so the ST sees
//     exactly the data the TUO sees.
// If the headers differ, the request is not sent to memory: an ERR_TYPE/ERR_LEN/ERR_ADDR
// message is reported, and each thread's packet is closed on its own terms (write data
// is taken and discarded, a read is answered with zero words) so that neither thread
// hangs.
// Each message carries the kind of error, the packet number and the position in the data
// stream; only the first data mismatch of a packet is reported.
//
// What follows the description of this arbiter: synchronisation on every access, header
// errors caught before memory, data errors caught in flight with the write completed,
// an error message with kind and position. This design's own choices: the packet format
// (memif_pkg), the valid/ready streams, how a rejected packet is closed, and one message
// per packet.
//
// Interface: every stream is valid/ready; a word moves when both are high at a rising
// clock edge. tuo_req/st_req are the threads' request streams, tuo_rsp/st_rsp their read
// data, mem_req/mem_rsp the side towards the memory controller. err_valid is a one-cycle
// pulse with err_msg, one cycle after the mismatch is seen. A read word is offered to a
// thread only while the other thread is ready for it too, so it may be withdrawn before
// it is taken; the threads' ready must not wait for valid.
// Timing: when both headers are complete the decision takes no cycle; forwarding the
// header takes two cycles, then one data word per cycle when all sides are ready.
module memif_arbiter_dlat
  import memif_pkg::*;
(
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
  output logic     busy
);

  typedef enum logic [2:0] {S_HDR, S_FWD0, S_FWD1, S_WR, S_RD, S_DRAIN} state_t;

  state_t           state;
  word_t            t_h0, t_h1, s_h0, s_h1;
  logic [1:0]       t_hcnt, s_hcnt;
  wcount_t          t_left, s_left, idx;
  logic [PKT_W-1:0] pkt;
  logic             data_err_seen;

  logic      hdr_done;
  err_kind_t hdr_err;
  assign hdr_done = (t_hcnt == 2'd2) && (s_hcnt == 2'd2);
  assign hdr_err  = hdr_compare(t_h0, t_h1, s_h0, s_h1);

  logic t_fire, s_fire, m_fire, r_fire;
  assign t_fire = tuo_req_valid && tuo_req_ready;
  assign s_fire = st_req_valid  && st_req_ready;
  assign m_fire = mem_req_valid && mem_req_ready;
  assign r_fire = mem_rsp_valid && mem_rsp_ready;

  // stream steering
  always_comb begin
    tuo_req_ready = 1'b0;
    st_req_ready  = 1'b0;
    tuo_rsp_valid = 1'b0;
    st_rsp_valid  = 1'b0;
    tuo_rsp_data  = mem_rsp_data;
    st_rsp_data   = mem_rsp_data;
    mem_req_valid = 1'b0;
    mem_req_data  = tuo_req_data;
    mem_rsp_ready = 1'b0;
    unique case (state)
      S_HDR: begin
        tuo_req_ready = (t_hcnt != 2'd2);
        st_req_ready  = (s_hcnt != 2'd2);
      end
      S_FWD0: begin
        mem_req_valid = 1'b1;
        mem_req_data  = t_h0;
      end
      S_FWD1: begin
        mem_req_valid = 1'b1;
        mem_req_data  = t_h1;
      end
      S_WR: begin
        mem_req_valid = tuo_req_valid && st_req_valid;
        tuo_req_ready = st_req_valid  && mem_req_ready;
        st_req_ready  = tuo_req_valid && mem_req_ready;
      end
      S_RD: begin
        mem_rsp_ready = tuo_rsp_ready && st_rsp_ready;
        tuo_rsp_valid = mem_rsp_valid && st_rsp_ready;
        st_rsp_valid  = mem_rsp_valid && tuo_rsp_ready;
      end
      S_DRAIN: begin
        tuo_rsp_data = '0;
        st_rsp_data  = '0;
        if (t_left != '0) begin
          if (hdr_is_write(t_h0)) tuo_req_ready = 1'b1;
          else                    tuo_rsp_valid = 1'b1;
        end
        if (s_left != '0) begin
          if (hdr_is_write(s_h0)) st_req_ready = 1'b1;
          else                    st_rsp_valid = 1'b1;
        end
      end
      default: ;
    endcase
  end

  logic t_drain_step, s_drain_step;
  assign t_drain_step = hdr_is_write(t_h0) ? t_fire : (tuo_rsp_valid && tuo_rsp_ready);
  assign s_drain_step = hdr_is_write(s_h0) ? s_fire : (st_rsp_valid && st_rsp_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_HDR;
      t_h0          <= '0;
      t_h1          <= '0;
      s_h0          <= '0;
      s_h1          <= '0;
      t_hcnt        <= '0;
      s_hcnt        <= '0;
      t_left        <= '0;
      s_left        <= '0;
      idx           <= '0;
      pkt           <= '0;
      data_err_seen <= 1'b0;
      err_valid     <= 1'b0;
      err_msg       <= '0;
    end else begin
      err_valid <= 1'b0;
      unique case (state)
        S_HDR: begin
          if (t_fire) begin
            if (t_hcnt == 2'd0) t_h0 <= tuo_req_data;
            else                t_h1 <= tuo_req_data;
            t_hcnt <= t_hcnt + 2'd1;
          end
          if (s_fire) begin
            if (s_hcnt == 2'd0) s_h0 <= st_req_data;
            else                s_h1 <= st_req_data;
            s_hcnt <= s_hcnt + 2'd1;
          end
          if (hdr_done) begin
            t_hcnt        <= '0;
            s_hcnt        <= '0;
            idx           <= '0;
            data_err_seen <= 1'b0;
            t_left        <= hdr_words(t_h0);
            s_left        <= hdr_words(s_h0);
            if (hdr_err == ERR_NONE) begin
              state <= S_FWD0;
            end else begin
              state     <= S_DRAIN;
              err_valid <= 1'b1;
              err_msg   <= '{kind: hdr_err, pkt: pkt,
                             pos: (hdr_err == ERR_ADDR) ? wcount_t'(1) : wcount_t'(0)};
            end
          end
        end
        S_FWD0: if (m_fire) state <= S_FWD1;
        S_FWD1: if (m_fire) begin
          if (t_left == '0) begin
            state <= S_HDR;
            pkt   <= pkt + 1'b1;
          end else begin
            state <= hdr_is_write(t_h0) ? S_WR : S_RD;
          end
        end
        S_WR: if (m_fire) begin
          if (tuo_req_data != st_req_data && !data_err_seen) begin
            data_err_seen <= 1'b1;
            err_valid     <= 1'b1;
            err_msg       <= '{kind: ERR_WDATA, pkt: pkt, pos: idx};
          end
          idx    <= idx + 1'b1;
          t_left <= t_left - 1'b1;
          if (t_left == wcount_t'(1)) begin
            state <= S_HDR;
            pkt   <= pkt + 1'b1;
          end
        end
        S_RD: if (r_fire) begin
          idx    <= idx + 1'b1;
          t_left <= t_left - 1'b1;
          if (t_left == wcount_t'(1)) begin
            state <= S_HDR;
            pkt   <= pkt + 1'b1;
          end
        end
        S_DRAIN: begin
          if (t_left != '0 && t_drain_step) t_left <= t_left - 1'b1;
          if (s_left != '0 && s_drain_step) s_left <= s_left - 1'b1;
          if ((t_left == '0 || (t_left == wcount_t'(1) && t_drain_step)) &&
              (s_left == '0 || (s_left == wcount_t'(1) && s_drain_step))) begin
            state <= S_HDR;
            pkt   <= pkt + 1'b1;
          end
        end
        default: state <= S_HDR;
      endcase
    end
  end

  assign busy = (state != S_HDR) || (t_hcnt != '0) || (s_hcnt != '0);

  // the memory never sees a packet whose headers disagree, nor ST data
  a_hdr_before_mem: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_FWD0) |-> (hdr_compare(t_h0, t_h1, s_h0, s_h1) == ERR_NONE));
  a_wr_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_WR && t_fire) |-> s_fire);

endmodule
