// memif_pkg: types and helpers shared by the MEMIF shadowing arbiters.
//
// A MEMIF request is a packet of 32-bit words sent by a hardware thread:
//   word 0  header: bit 31 = 1 for a write, 0 for a read; bits 23:0 = length in bytes
//   word 1  start address (byte address)
//   word 2+ for a write, the ceil(length/4) data words
// The data of a read comes back on the thread's response stream, ceil(length/4) words.
// That a header holds the type, the length and the address, and that write data follow
// it, is the packet format this design shadows; the exact bit positions are this
// design's choice.
//
// An error message names the kind of mismatch, the number of the packet (counted from
// reset by the arbiter) and the position: the data word index for data errors, the
// header word index for header errors.
package memif_pkg;

  localparam int unsigned WORD_W = 32;
  localparam int unsigned LEN_W  = 24;             // length field, bytes
  localparam int unsigned CNT_W  = LEN_W - 1;      // data words per packet, up to 2^22
  localparam int unsigned PKT_W  = 16;             // packet number in error messages

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [CNT_W-1:0]  wcount_t;

  typedef enum logic [2:0] {
    ERR_NONE  = 3'd0,
    ERR_TYPE  = 3'd1,   // ST read where TUO wrote, or the reverse
    ERR_LEN   = 3'd2,   // request lengths differ
    ERR_ADDR  = 3'd3,   // start addresses differ
    ERR_WDATA = 3'd4    // a write data word differs
  } err_kind_t;

  typedef struct packed {
    err_kind_t        kind;
    logic [PKT_W-1:0] pkt;
    wcount_t          pos;
  } err_msg_t;

  localparam int unsigned ERR_MSG_W = $bits(err_msg_t);

  function automatic logic hdr_is_write(word_t h0);
    return h0[31];
  endfunction

  // number of data words a packet carries (length rounded up to whole words)
  function automatic wcount_t hdr_words(word_t h0);
    logic [LEN_W:0] len;
    len = {1'b0, h0[LEN_W-1:0]} + (LEN_W+1)'(3);
    return wcount_t'(len >> 2);
  endfunction

  // compare two headers; the first differing field wins (type, length, address)
  function automatic err_kind_t hdr_compare(word_t a0, word_t a1, word_t b0, word_t b1);
    if (a0[31] != b0[31])                 return ERR_TYPE;
    if (a0[LEN_W-1:0] != b0[LEN_W-1:0])   return ERR_LEN;
    if (a1 != b1)                         return ERR_ADDR;
    return ERR_NONE;
  endfunction

endpackage
