// tb_mem_model: behavioural model of the memory controller and main memory as seen by
// the MEMIF arbiter (testbench only).
//
// It takes MEMIF packets from req (header word with write bit and byte length, address
// word, then write data) and answers reads on rsp, one word per cycle. The memory is an
// array of WORDS 32-bit words, addressed by (byte address / 4) modulo WORDS. stall_pct
// drops req_ready and rsp_valid at random to model a busy bus. writes/reads count the
// packets seen.
module tb_mem_model
  import memif_pkg::*;
#(
  parameter int unsigned WORDS = 65536
) (
  input  logic  clk,
  input  logic  rst_n,
  input  word_t req_data,
  input  logic  req_valid,
  output logic  req_ready,
  output word_t rsp_data,
  output logic  rsp_valid,
  input  logic  rsp_ready
);

  word_t       mem [WORDS];
  int unsigned stall_pct = 0;
  int unsigned writes = 0, reads = 0;

  typedef enum {M_H0, M_H1, M_WR, M_RD} mstate_t;
  mstate_t     st;
  word_t       h0;
  int unsigned addr, left;
  logic        gate_req, gate_rsp;

  initial foreach (mem[i]) mem[i] = '0;

  assign req_ready = (st != M_RD) && gate_req;
  assign rsp_valid = (st == M_RD) && gate_rsp;
  assign rsp_data  = mem[addr % WORDS];

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= M_H0;
      gate_req <= 1'b1;
      gate_rsp <= 1'b1;
      addr     <= 0;
      left     <= 0;
      h0       <= '0;
    end else begin
      gate_req <= !(stall_pct != 0 && ($urandom % 100) < stall_pct);
      gate_rsp <= !(stall_pct != 0 && ($urandom % 100) < stall_pct);
      case (st)
        M_H0: if (req_valid && req_ready) begin
          h0 <= req_data;
          st <= M_H1;
        end
        M_H1: if (req_valid && req_ready) begin
          addr <= req_data / 4;
          left <= int'(hdr_words(h0));
          if (hdr_is_write(h0)) writes <= writes + 1;
          else                  reads  <= reads + 1;
          if (hdr_words(h0) == '0) st <= M_H0;
          else                     st <= hdr_is_write(h0) ? M_WR : M_RD;
        end
        M_WR: if (req_valid && req_ready) begin
          mem[addr % WORDS] <= req_data;
          addr <= addr + 1;
          left <= left - 1;
          if (left == 1) st <= M_H0;
        end
        M_RD: if (rsp_valid && rsp_ready) begin
          addr <= addr + 1;
          left <= left - 1;
          if (left == 1) st <= M_H0;
        end
      endcase
    end
  end

endmodule
