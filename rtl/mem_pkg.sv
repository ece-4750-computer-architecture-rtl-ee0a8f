// mem_pkg: types and constants shared by the caches and the main memory.
//
// A cache request carries a type (read or write), a 32-bit byte address and
// 32 bits of write data; every request is one aligned 4-byte word. A cache
// response carries the type and, for a read, the word read. Requests and
// responses move on a val/rdy handshake: a transfer happens in a cycle where
// both are high, and the sender holds its message steady while rdy is low.
//
// Main-memory requests are either a line read (16 bytes, address aligned to
// the line) or a word write (4 bytes). The memory answers a line read in the
// same cycle. The 4-byte requests, 16-byte lines and combinational memory
// follow the lecture; the field layout and the handshake are this design's.
package mem_pkg;

  localparam int unsigned ADDR_W         = 32;
  localparam int unsigned WORD_W         = 32;
  localparam int unsigned LINE_BYTES     = 16;
  localparam int unsigned WORDS_PER_LINE = LINE_BYTES / 4;
  localparam int unsigned LINE_W         = LINE_BYTES * 8;
  localparam int unsigned OFFSET_W       = $clog2(LINE_BYTES);

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [LINE_W-1:0] line_t;

  typedef enum logic {
    REQ_READ  = 1'b0,
    REQ_WRITE = 1'b1
  } req_type_e;

  typedef struct packed {
    req_type_e typ;
    addr_t     addr;
    word_t     data;
  } cache_req_t;

  typedef struct packed {
    req_type_e typ;
    word_t     data;
  } cache_resp_t;

  typedef enum logic {
    MEM_RD_LINE = 1'b0,
    MEM_WR_WORD = 1'b1
  } mem_op_e;

  typedef struct packed {
    mem_op_e op;
    addr_t   addr;
    word_t   data;
  } mem_req_t;

  // Address with the four offset bits cleared: the line address ("z4b").
  function automatic addr_t line_addr(addr_t a);
    return a & ~addr_t'(LINE_BYTES - 1);
  endfunction

  // The 32-bit request word copied into every word slot of a line ("repl").
  function automatic line_t repl_word(word_t w);
    return {WORDS_PER_LINE{w}};
  endfunction

  // Word-in-line number: address bits [3:2].
  typedef logic [OFFSET_W-3:0] wsel_t;

  // Word enables for one word of a line.
  function automatic logic [WORDS_PER_LINE-1:0] word_onehot(wsel_t w);
    return (WORDS_PER_LINE)'(1) << w;
  endfunction

  // One word taken out of a line.
  function automatic word_t pick_word(line_t l, wsel_t w);
    return l[w*WORD_W +: WORD_W];
  endfunction

endpackage
