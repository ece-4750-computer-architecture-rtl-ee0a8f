// pipe_cache_pr: pipelined cache with parallel read and pipelined write.
//
// Same organisation as pipe_cache (four 16-byte lines, direct-mapped,
// write-through, no write allocate, 4-byte requests), but reads finish in a
// single cycle:
//   M0  the tag array and the data array are read in parallel; a read hit
//       answers in the same cycle it is presented. A write checks its tag
//       and is acknowledged in M0, then moves on to M1.
//   M1  the write goes to memory (write-through) and, if M0 found a hit,
//       into the data array.
// The data array has a duplicated port, one read port for M0 and one write
// port for M1, so a read in M0 and a write in M1 never compete for it (the
// structural hazard is removed by duplication). That opens a read-after-
// write hazard: a read in M0 of the word the write in M1 is writing would
// see the old value, so the write data is bypassed to the response when the
// word addresses match and the write hit.
//
// Miss path: a read miss stalls in M0, waits for M1 to be empty (the write
// port and the memory port are in use while it holds a write), reads the
// line from memory and writes line, tag and valid bit in one cycle; the
// request then hits. cachereq_rdy is high in exactly the cycles where the
// response is sent, so a request and its response share one handshake cycle.
//
// Single-cycle reads, M0 write acknowledgement, port duplication and the
// bypass follow the lecture; handshake, refill timing and reset to
// all-invalid are this design's.
module pipe_cache_pr
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
  input  line_t       memresp_line,
  output logic        bypass        // high in a cycle where the bypass is used
);

  localparam int unsigned NLINES = 4;
  localparam int unsigned IDX_W  = $clog2(NLINES);
  localparam int unsigned TAG_W  = ADDR_W - OFFSET_W - IDX_W;

  typedef enum logic {M0_TAGCHK, M0_REFILL} m0_state_e;

  m0_state_e         m0_state;
  logic [IDX_W-1:0]  idx0;
  logic [TAG_W-1:0]  tag0, tag_rd;
  logic [NLINES-1:0] valid;
  logic              hit0, miss0, refill_go, go0;
  line_t             line_rd;

  logic       m1_val, m1_hit;
  cache_req_t m1_req;

  assign idx0 = cachereq_msg.addr[OFFSET_W +: IDX_W];
  assign tag0 = cachereq_msg.addr[ADDR_W-1 -: TAG_W];

  assign refill_go = (m0_state == M0_REFILL) && !m1_val;

  logic tarray_en;
  assign tarray_en = (m0_state == M0_TAGCHK) || refill_go;

  comb_sram #(.WIDTH(TAG_W), .DEPTH(NLINES), .NSEG(1)) tarray (
    .clk, .rst, .en(tarray_en), .wen(refill_go), .addr(idx0),
    .wben(1'b1), .wdata(tag0), .rdata(tag_rd)
  );

  assign hit0  = valid[idx0] && (tag_rd == tag0);
  assign miss0 = (cachereq_msg.typ == REQ_READ) && !hit0;

  // Data array: read port for M0, write port for the M1 write and the refill.
  logic                      dw_en;
  logic [IDX_W-1:0]          dw_addr;
  logic [WORDS_PER_LINE-1:0] dw_ben;
  line_t                     dw_data;

  always_comb begin
    if (refill_go) begin
      dw_en   = 1'b1;
      dw_addr = idx0;
      dw_ben  = '1;
      dw_data = memresp_line;
    end else begin
      dw_en   = m1_val && m1_hit;
      dw_addr = m1_req.addr[OFFSET_W +: IDX_W];
      dw_ben  = word_onehot(m1_req.addr[3:2]);
      dw_data = repl_word(m1_req.data);
    end
  end

  comb_sram_1r1w #(.WIDTH(LINE_W), .DEPTH(NLINES), .NSEG(WORDS_PER_LINE)) darray (
    .clk, .rst,
    .ren(m0_state == M0_TAGCHK), .raddr(idx0), .rdata(line_rd),
    .wen(dw_en), .waddr(dw_addr), .wben(dw_ben), .wdata(dw_data)
  );

  // Response in M0.
  assign bypass = cachereq_val && (m0_state == M0_TAGCHK) && hit0
               && (cachereq_msg.typ == REQ_READ)
               && m1_val && m1_hit
               && (m1_req.addr[ADDR_W-1:2] == cachereq_msg.addr[ADDR_W-1:2]);

  assign cacheresp_val      = cachereq_val && (m0_state == M0_TAGCHK) && !miss0;
  assign cachereq_rdy       = (m0_state == M0_TAGCHK) && !miss0 && cacheresp_rdy;
  assign cacheresp_msg.typ  = cachereq_msg.typ;
  assign cacheresp_msg.data = (cachereq_msg.typ == REQ_WRITE) ? '0
                            : bypass ? m1_req.data
                            : pick_word(line_rd, cachereq_msg.addr[3:2]);
  assign go0 = cachereq_val && cachereq_rdy;

  always_ff @(posedge clk) begin
    if (rst) begin
      m0_state <= M0_TAGCHK;
      valid    <= '0;
      m1_val   <= 1'b0;
      m1_hit   <= 1'b0;
      m1_req   <= '0;
    end else begin
      unique case (m0_state)
        M0_TAGCHK: if (cachereq_val && miss0) m0_state <= M0_REFILL;
        M0_REFILL: if (refill_go) begin
                     m0_state    <= M0_TAGCHK;
                     valid[idx0] <= 1'b1;
                   end
        default:   m0_state <= M0_TAGCHK;
      endcase
      // M1 holds only writes; it always finishes in one cycle.
      m1_val <= go0 && (cachereq_msg.typ == REQ_WRITE);
      if (go0) begin
        m1_req <= cachereq_msg;
        m1_hit <= hit0;
      end
    end
  end

  // Memory port: the M0 refill or the M1 write-through, never both.
  always_comb begin
    memreq_val      = 1'b0;
    memreq_msg.op   = MEM_RD_LINE;
    memreq_msg.addr = line_addr(cachereq_msg.addr);
    memreq_msg.data = m1_req.data;
    if (refill_go) begin
      memreq_val = 1'b1;
    end else if (m1_val) begin
      memreq_val      = 1'b1;
      memreq_msg.op   = MEM_WR_WORD;
      memreq_msg.addr = m1_req.addr;
    end
  end

  // A held request must not change while it waits.
  cache_req_t req_q;
  logic       wait_q;
  always_ff @(posedge clk) begin
    wait_q <= !rst && cachereq_val && !cachereq_rdy;
    req_q  <= cachereq_msg;
  end
  a_hold: assert property (@(posedge clk) disable iff (rst)
    wait_q |-> (cachereq_val && cachereq_msg == req_q));

endmodule
