// fsm_cache_dpath: datapath of the FSM cache.
//
// The cache holds four 16-byte lines as two ways of two sets. An address
// splits into a 4-bit line offset (bits 3:0, word select in bits 3:2), a
// 1-bit set index (bit 4) and a 27-bit tag (bits 31:5). Each way has its own
// tag array (tarray0, tarray1); one data array (darray) holds all four lines
// at entry {index, way}. All three are single-ported combinational SRAMs.
//
// The control unit steps the datapath through the transaction and drives
// every enable and mux select:
//  - req_sel picks the incoming request (in state MT) or the request register
//    (later states); reqreg_en captures the incoming request.
//  - two comparators report whether each way's tag matches (tag_match0/1);
//    the valid bits live in the control unit.
//  - z4b_sel clears the low four address bits for a line refill; otherwise
//    the memory request carries the word address for a write-through.
//  - darray_sel chooses the refill line or the request word replicated four
//    times ("repl"); worden_sel chooses all four word enables (refill) or the
//    single word the offset names (write hit).
//  - refill_en captures the line the memory returns, to be written in R1.
// The read word is taken from the data array output with the offset and
// sent as the response. The signal names follow the lecture's control table;
// the request register and the refill register are this design's choices.
// All paths are combinational: outputs change in the cycle the controls do.
module fsm_cache_dpath
  import mem_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // request and response messages
  input  cache_req_t  cachereq_msg,
  output cache_resp_t cacheresp_msg,
  output mem_req_t    memreq_msg,
  input  line_t       memresp_line,
  // control signals
  input  logic        req_sel,
  input  logic        reqreg_en,
  input  logic        refill_en,
  input  logic        tarray0_en,
  input  logic        tarray0_wen,
  input  logic        tarray1_en,
  input  logic        tarray1_wen,
  input  logic        darray_en,
  input  logic        darray_wen,
  input  logic        darray_sel,   // 1: refill line, 0: replicated word
  input  logic        worden_sel,   // 1: all words, 0: one word
  input  logic        z4b_sel,      // 1: line address, 0: word address
  input  logic        way_sel,
  input  mem_op_e     memreq_op,
  // status signals
  output logic        tag_match0,
  output logic        tag_match1,
  output req_type_e   req_type,
  output logic        req_idx
);

  localparam int unsigned TAG_W = ADDR_W - OFFSET_W - 1;

  cache_req_t reqreg, cur;
  line_t      refill_reg;

  always_ff @(posedge clk) begin
    if (rst) begin
      reqreg     <= '0;
      refill_reg <= '0;
    end else begin
      if (reqreg_en) reqreg <= cachereq_msg;
      if (refill_en) refill_reg <= memresp_line;
    end
  end

  assign cur = req_sel ? cachereq_msg : reqreg;

  logic [TAG_W-1:0] cur_tag, tag0, tag1;
  assign cur_tag  = cur.addr[ADDR_W-1 -: TAG_W];
  assign req_idx  = cur.addr[OFFSET_W];
  assign req_type = cur.typ;

  comb_sram #(.WIDTH(TAG_W), .DEPTH(2), .NSEG(1)) tarray0 (
    .clk, .rst, .en(tarray0_en), .wen(tarray0_wen), .addr(req_idx),
    .wben(1'b1), .wdata(cur_tag), .rdata(tag0)
  );

  comb_sram #(.WIDTH(TAG_W), .DEPTH(2), .NSEG(1)) tarray1 (
    .clk, .rst, .en(tarray1_en), .wen(tarray1_wen), .addr(req_idx),
    .wben(1'b1), .wdata(cur_tag), .rdata(tag1)
  );

  assign tag_match0 = (tag0 == cur_tag);
  assign tag_match1 = (tag1 == cur_tag);

  line_t                     darray_wdata, darray_rdata;
  logic [WORDS_PER_LINE-1:0] worden;

  assign darray_wdata = darray_sel ? refill_reg : repl_word(cur.data);
  assign worden       = worden_sel ? '1 : word_onehot(cur.addr[3:2]);

  comb_sram #(.WIDTH(LINE_W), .DEPTH(4), .NSEG(WORDS_PER_LINE)) darray (
    .clk, .rst, .en(darray_en), .wen(darray_wen), .addr({req_idx, way_sel}),
    .wben(worden), .wdata(darray_wdata), .rdata(darray_rdata)
  );

  assign cacheresp_msg.typ  = cur.typ;
  assign cacheresp_msg.data = (cur.typ == REQ_READ) ? pick_word(darray_rdata, cur.addr[3:2]) : '0;

  assign memreq_msg.op   = memreq_op;
  assign memreq_msg.addr = z4b_sel ? line_addr(cur.addr) : cur.addr;
  assign memreq_msg.data = cur.data;

endmodule
