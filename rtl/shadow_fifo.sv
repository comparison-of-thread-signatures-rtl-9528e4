// shadow_fifo: synchronous first-word-fall-through FIFO.
//
// It is the buffer that lets the thread under observation (TUO) run ahead of the
// shadowing thread (ST) in the decoupled arbiter, where it holds 32 KB of MEMIF
// traffic (8192 words of 32 bits), and it also queues error messages for the CPU.
// The storage is an array written on the clock and read without a clock at the read
// pointer, which maps onto distributed (LUT) memory, as the 32 KB buffer of the
// decoupled arbiter is described to use.
//
// Interface: push with wr_en when !full; the head word is on rd_data whenever !empty
// and is removed by rd_en. Pushing into a full FIFO or popping an empty one is ignored
// (and flagged by the assertions). level is the number of stored words.
// Timing: a word pushed in cycle n is visible on rd_data in cycle n+1. Reset empties the
// FIFO; the storage itself is not reset.
module shadow_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 8192
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  logic do_wr, do_rd;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  assign full    = (level == ($clog2(DEPTH+1))'(DEPTH));
  assign empty   = (level == '0);
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      level  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   level <= level + 1'b1;
        2'b01:   level <= level - 1'b1;
        default: level <= level;
      endcase
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));

endmodule
