// mem_system_top: the three cache designs side by side, each in front of its
// own combinational main memory.
//
//  - fsm:  fsm_cache, two-way set-associative, one request at a time under an
//          FSM; read hit 2 cycles, read miss 4, write 2.
//  - pipe: pipe_cache, direct-mapped, two-stage pipeline with two-cycle hits,
//          one request per cycle on hits; read misses stall in M0 to refill.
//  - pr:   pipe_cache_pr, direct-mapped, single-cycle reads and write acks,
//          writes finished in M1, duplicated data-array port with a bypass.
//  - opt:  a second pipe_cache whose memory path has the two memory-side
//          optimisations of the lecture: a next-line prefetcher with a
//          prefetch buffer, then a write buffer that lets reads go ahead of
//          buffered writes. Putting both behind the two-cycle pipelined cache
//          is this design's composition.
// All caches hold four 16-byte lines and are write-through with no write
// allocate. Each has its own cache request/response port pair with val/rdy
// handshakes (types in mem_pkg); the memories are internal. The designs share
// only clock and reset. pr_bypass pulses when pipe_cache_pr serves a read
// through its write-to-read bypass; opt_pf_hit when the prefetch buffer
// serves a refill; opt_wb_count is the number of buffered writes.
module mem_system_top
  import mem_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 65536
) (
  input  logic        clk,
  input  logic        rst,
  // FSM cache
  input  logic        fsm_req_val,
  output logic        fsm_req_rdy,
  input  cache_req_t  fsm_req_msg,
  output logic        fsm_resp_val,
  input  logic        fsm_resp_rdy,
  output cache_resp_t fsm_resp_msg,
  // pipelined cache, two-cycle hits
  input  logic        pipe_req_val,
  output logic        pipe_req_rdy,
  input  cache_req_t  pipe_req_msg,
  output logic        pipe_resp_val,
  input  logic        pipe_resp_rdy,
  output cache_resp_t pipe_resp_msg,
  // pipelined cache, parallel read and pipelined write
  input  logic        pr_req_val,
  output logic        pr_req_rdy,
  input  cache_req_t  pr_req_msg,
  output logic        pr_resp_val,
  input  logic        pr_resp_rdy,
  output cache_resp_t pr_resp_msg,
  output logic        pr_bypass,
  // pipelined cache with prefetcher and write buffer
  input  logic        opt_req_val,
  output logic        opt_req_rdy,
  input  cache_req_t  opt_req_msg,
  output logic        opt_resp_val,
  input  logic        opt_resp_rdy,
  output cache_resp_t opt_resp_msg,
  output logic        opt_pf_hit,
  output logic [2:0]  opt_wb_count
);

  logic     fsm_memreq_val, pipe_memreq_val, pr_memreq_val;
  mem_req_t fsm_memreq, pipe_memreq, pr_memreq;
  line_t    fsm_memresp, pipe_memresp, pr_memresp;

  fsm_cache u_fsm (
    .clk, .rst,
    .cachereq_val(fsm_req_val),   .cachereq_rdy(fsm_req_rdy),   .cachereq_msg(fsm_req_msg),
    .cacheresp_val(fsm_resp_val), .cacheresp_rdy(fsm_resp_rdy), .cacheresp_msg(fsm_resp_msg),
    .memreq_val(fsm_memreq_val),  .memreq_msg(fsm_memreq),      .memresp_line(fsm_memresp)
  );
  comb_mem #(.SIZE_BYTES(MEM_BYTES)) u_fsm_mem (
    .clk, .rst, .req_val(fsm_memreq_val), .req(fsm_memreq), .resp_line(fsm_memresp)
  );

  pipe_cache u_pipe (
    .clk, .rst,
    .cachereq_val(pipe_req_val),   .cachereq_rdy(pipe_req_rdy),   .cachereq_msg(pipe_req_msg),
    .cacheresp_val(pipe_resp_val), .cacheresp_rdy(pipe_resp_rdy), .cacheresp_msg(pipe_resp_msg),
    .memreq_val(pipe_memreq_val),  .memreq_msg(pipe_memreq),      .memresp_line(pipe_memresp)
  );
  comb_mem #(.SIZE_BYTES(MEM_BYTES)) u_pipe_mem (
    .clk, .rst, .req_val(pipe_memreq_val), .req(pipe_memreq), .resp_line(pipe_memresp)
  );

  pipe_cache_pr u_pr (
    .clk, .rst,
    .cachereq_val(pr_req_val),   .cachereq_rdy(pr_req_rdy),   .cachereq_msg(pr_req_msg),
    .cacheresp_val(pr_resp_val), .cacheresp_rdy(pr_resp_rdy), .cacheresp_msg(pr_resp_msg),
    .memreq_val(pr_memreq_val),  .memreq_msg(pr_memreq),      .memresp_line(pr_memresp),
    .bypass(pr_bypass)
  );
  comb_mem #(.SIZE_BYTES(MEM_BYTES)) u_pr_mem (
    .clk, .rst, .req_val(pr_memreq_val), .req(pr_memreq), .resp_line(pr_memresp)
  );

  logic     opt_memreq_val, opt_pf_val, opt_wb_val, opt_pf_issue;
  mem_req_t opt_memreq, opt_pf_req, opt_wb_req;
  line_t    opt_memresp, opt_pf_resp, opt_wb_resp;

  pipe_cache u_opt (
    .clk, .rst,
    .cachereq_val(opt_req_val),   .cachereq_rdy(opt_req_rdy),   .cachereq_msg(opt_req_msg),
    .cacheresp_val(opt_resp_val), .cacheresp_rdy(opt_resp_rdy), .cacheresp_msg(opt_resp_msg),
    .memreq_val(opt_memreq_val),  .memreq_msg(opt_memreq),      .memresp_line(opt_memresp)
  );
  prefetcher u_opt_pf (
    .clk, .rst,
    .up_val(opt_memreq_val), .up_req(opt_memreq), .up_line(opt_memresp),
    .dn_val(opt_pf_val),     .dn_req(opt_pf_req), .dn_line(opt_pf_resp),
    .pf_hit(opt_pf_hit),     .pf_issue(opt_pf_issue)
  );
  write_buffer #(.DEPTH(4)) u_opt_wb (
    .clk, .rst,
    .up_val(opt_pf_val), .up_req(opt_pf_req), .up_line(opt_pf_resp),
    .dn_val(opt_wb_val), .dn_req(opt_wb_req), .dn_line(opt_wb_resp),
    .count(opt_wb_count)
  );
  comb_mem #(.SIZE_BYTES(MEM_BYTES)) u_opt_mem (
    .clk, .rst, .req_val(opt_wb_val), .req(opt_wb_req), .resp_line(opt_wb_resp)
  );

endmodule
