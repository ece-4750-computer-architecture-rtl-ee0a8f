// pipe_cache: pipelined cache with a two-cycle hit latency.
//
// Four 16-byte lines, direct-mapped, write-through with no write allocate,
// 4-byte requests. An address splits into a 4-bit offset (word in bits 3:2),
// a 2-bit index (bits 5:4) and a 26-bit tag (bits 31:6). Tag array and data
// array are single-ported combinational SRAMs; valid bits are flip-flops.
//
// Hit path, two stages:
//   M0  the request on cachereq is checked against the tag array in the
//       cycle it is presented, and moves into M1 when accepted.
//   M1  a read reads the data array and answers; a write writes the word to
//       memory (write-through), writes it into the data array if M0 found a
//       hit, and answers with a write acknowledgement.
// A read hit answers in the cycle after it is accepted, and a new request
// can be accepted every cycle.
//
// Miss path (hybrid pipeline/FSM): a read miss stalls in M0 (cachereq_rdy
// low). M0 moves to a refill step, waits there until M1 is empty (M1 may be
// using the data array or the memory port), then reads the line from memory,
// and writes line, tag and valid bit in one cycle. The request is then
// checked again and hits. A read miss with M1 empty takes four cycles from
// first presentation to response; a write miss costs nothing extra.
// M1 holds its response while cacheresp_rdy is low, stalling M0 behind it.
//
// Two-cycle hits, stalling in M0 for refills, direct mapping, the sizes and
// the write policy follow the lecture; the handshake, the one-cycle refill
// (memory is combinational) and reset to all-invalid are this design's.
module pipe_cache
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

  localparam int unsigned NLINES = 4;
  localparam int unsigned IDX_W  = $clog2(NLINES);
  localparam int unsigned TAG_W  = ADDR_W - OFFSET_W - IDX_W;

  typedef enum logic {M0_TAGCHK, M0_REFILL} m0_state_e;

  // ---- M0: tag check ----
  m0_state_e        m0_state;
  logic [IDX_W-1:0] idx0;
  logic [TAG_W-1:0] tag0, tag_rd;
  logic [NLINES-1:0] valid;
  logic             hit0, miss0, refill_go, stall1, go0;

  assign idx0 = cachereq_msg.addr[OFFSET_W +: IDX_W];
  assign tag0 = cachereq_msg.addr[ADDR_W-1 -: TAG_W];

  // ---- M1 pipeline register ----
  logic       m1_val, m1_hit;
  cache_req_t m1_req;

  assign stall1    = m1_val && !cacheresp_rdy;
  assign refill_go = (m0_state == M0_REFILL) && !m1_val;

  logic tarray_en, tarray_wen;
  assign tarray_en  = (m0_state == M0_TAGCHK) || refill_go;
  assign tarray_wen = refill_go;

  comb_sram #(.WIDTH(TAG_W), .DEPTH(NLINES), .NSEG(1)) tarray (
    .clk, .rst, .en(tarray_en), .wen(tarray_wen), .addr(idx0),
    .wben(1'b1), .wdata(tag0), .rdata(tag_rd)
  );

  assign hit0  = valid[idx0] && (tag_rd == tag0);
  assign miss0 = (cachereq_msg.typ == REQ_READ) && !hit0;

  assign cachereq_rdy = (m0_state == M0_TAGCHK) && !miss0 && !stall1;
  assign go0          = cachereq_val && cachereq_rdy;

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
      if (!stall1) begin
        m1_val <= go0;
        if (go0) begin
          m1_req <= cachereq_msg;
          m1_hit <= hit0;
        end
      end
    end
  end

  // ---- M1: data access ----
  logic [IDX_W-1:0]          idx1;
  logic                      darray_en, darray_wen;
  logic [IDX_W-1:0]          darray_addr;
  logic [WORDS_PER_LINE-1:0] darray_wben;
  line_t                     darray_wdata, darray_rdata;

  assign idx1 = m1_req.addr[OFFSET_W +: IDX_W];

  // The data array is shared by M1 (read, write hit) and the M0 refill;
  // the refill only runs while M1 is empty.
  always_comb begin
    darray_en    = 1'b0;
    darray_wen   = 1'b0;
    darray_addr  = idx1;
    darray_wben  = word_onehot(m1_req.addr[3:2]);
    darray_wdata = repl_word(m1_req.data);
    if (refill_go) begin
      darray_en    = 1'b1;
      darray_wen   = 1'b1;
      darray_addr  = idx0;
      darray_wben  = '1;
      darray_wdata = memresp_line;
    end else if (m1_val) begin
      darray_en  = (m1_req.typ == REQ_READ) || m1_hit;
      darray_wen = (m1_req.typ == REQ_WRITE);
    end
  end

  comb_sram #(.WIDTH(LINE_W), .DEPTH(NLINES), .NSEG(WORDS_PER_LINE)) darray (
    .clk, .rst, .en(darray_en), .wen(darray_wen), .addr(darray_addr),
    .wben(darray_wben), .wdata(darray_wdata), .rdata(darray_rdata)
  );

  assign cacheresp_val      = m1_val;
  assign cacheresp_msg.typ  = m1_req.typ;
  assign cacheresp_msg.data = (m1_req.typ == REQ_READ) ? pick_word(darray_rdata, m1_req.addr[3:2]) : '0;

  // Memory port: the M0 refill or the M1 write-through, never both.
  always_comb begin
    memreq_val      = 1'b0;
    memreq_msg.op   = MEM_RD_LINE;
    memreq_msg.addr = line_addr(cachereq_msg.addr);
    memreq_msg.data = m1_req.data;
    if (refill_go) begin
      memreq_val = 1'b1;
    end else if (m1_val && m1_req.typ == REQ_WRITE) begin
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
