// fsm_cache: the lecture's FSM cache, a control unit and a datapath.
//
// Four 16-byte lines, two-way set-associative, LRU replacement,
// write-through with no write allocate; 4-byte requests. The cache takes a
// request on cachereq (val/rdy), answers on cacheresp (val/rdy) and talks to
// a combinational main memory through memreq/memresp_line: a line read comes
// back in the same cycle, a word write is taken at the clock edge.
// Timing: a read hit takes two cycles (MT, MRD), a read miss four (MT, R0,
// R1, MRD), and every write two (MT, MWD); the cache handles one request at a
// time. See fsm_cache_ctrl and fsm_cache_dpath for the details.
module fsm_cache
  import mem_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        cachereq_val,
  output logic        cachereq_rdy,
  input  cache_req_t  cachereq_msg,
  output logic        cacheresp_val,
  input  logic        cacheresp_rdy,
  output cache_resp_t cacheresp_msg,
  output logic        memreq_val,
  output mem_req_t    memreq_msg,
  input  line_t       memresp_line
);

  logic      req_sel, reqreg_en, refill_en;
  logic      tarray0_en, tarray0_wen, tarray1_en, tarray1_wen;
  logic      darray_en, darray_wen, darray_sel, worden_sel, z4b_sel, way_sel;
  mem_op_e   memreq_op;
  logic      tag_match0, tag_match1, req_idx;
  req_type_e req_type;

  fsm_cache_ctrl ctrl (.*);
  fsm_cache_dpath dpath (.*);

endmodule
