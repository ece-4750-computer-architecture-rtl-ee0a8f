// prefetcher: next-line hardware prefetcher with a one-line prefetch buffer,
// placed between a cache and its main memory.
//
// It watches the cache's miss (line read) stream and predicts that the next
// miss will be to the following line, which is what streaming accesses do.
//  - A line read from the cache that matches the prefetch buffer is answered
//    from the buffer, without a memory access (pf_hit pulses).
//    Any other line read goes to memory as usual.
//  - Either way, the line after the one read becomes the pending prefetch.
//  - In a cycle with no cache request, a pending prefetch is read from
//    memory into the prefetch buffer.
//  - A word write from the cache passes through to memory and also updates
//    the buffered line if it holds that word, so the buffer never goes stale.
// Upstream (up_*) and downstream (dn_*) both follow the combinational memory
// interface: line reads answer in the same cycle. That the prefetcher
// watches the miss stream, predicts the next miss and keeps a prefetch
// buffer follows the lecture; next-line prediction, a single buffer entry
// and prefetching only in idle cycles are this design's choices.
module prefetcher
  import mem_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     up_val,
  input  mem_req_t up_req,
  output line_t    up_line,
  output logic     dn_val,
  output mem_req_t dn_req,
  input  line_t    dn_line,
  output logic     pf_hit,    // a line read was served from the buffer
  output logic     pf_issue   // a prefetch read went to memory
);

  logic  buf_val, pend_val;
  addr_t buf_addr, pend_addr;
  line_t buf_line;
  logic  rd, wr, wr_in_buf;

  assign rd        = up_val && up_req.op == MEM_RD_LINE;
  assign wr        = up_val && up_req.op == MEM_WR_WORD;
  assign pf_hit    = rd && buf_val && buf_addr == line_addr(up_req.addr);
  assign pf_issue  = !up_val && pend_val;
  assign wr_in_buf = wr && buf_val && buf_addr == line_addr(up_req.addr);

  always_comb begin
    dn_val = (up_val && !pf_hit) || pf_issue;
    dn_req = up_req;
    if (pf_issue) begin
      dn_req.op   = MEM_RD_LINE;
      dn_req.addr = pend_addr;
    end
    up_line = pf_hit ? buf_line : rd ? dn_line : '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      buf_val   <= 1'b0;
      pend_val  <= 1'b0;
      buf_addr  <= '0;
      pend_addr <= '0;
      buf_line  <= '0;
    end else begin
      if (rd) begin
        pend_val  <= 1'b1;
        pend_addr <= line_addr(up_req.addr) + addr_t'(LINE_BYTES);
      end else if (pf_issue) begin
        pend_val  <= 1'b0;
        buf_val   <= 1'b1;
        buf_addr  <= pend_addr;
        buf_line  <= dn_line;
      end
      if (wr_in_buf)
        buf_line[up_req.addr[OFFSET_W-1:2]*WORD_W +: WORD_W] <= up_req.data;
    end
  end

endmodule
