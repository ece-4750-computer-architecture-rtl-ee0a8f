// write_buffer: write buffer between a write-through cache and main memory
// that lets reads go ahead of buffered writes.
//
// Upstream (up_*) it looks like the combinational memory: a line read is
// answered in the same cycle and a word write is taken at the clock edge,
// always. Downstream (dn_*) it drives a combinational memory.
//  - A word write is put in a FIFO of DEPTH entries instead of going to
//    memory. If the FIFO is full, the oldest entry is written to memory in
//    the same cycle to make room, so the cache never waits.
//  - A line read goes to memory at once, ahead of any buffered writes. The
//    buffer compares every buffered word address with the line and patches
//    the matching words into the returned line, oldest first so the newest
//    write wins: the read sees every earlier write (the "check write buffer
//    addresses and bypass" choice, rather than waiting for the buffer to
//    empty).
//  - In a cycle with no request, the oldest buffered write drains to memory.
// count tells how many writes are buffered. The prioritised reads and the
// address check with bypass follow the lecture; DEPTH = 4, the drain policy
// and the make-room-when-full rule are this design's choices.
module write_buffer
  import mem_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  localparam int unsigned PW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          up_val,
  input  mem_req_t      up_req,
  output line_t         up_line,
  output logic          dn_val,
  output mem_req_t      dn_req,
  input  line_t         dn_line,
  output logic [CW-1:0] count
);

  typedef struct packed {
    logic [ADDR_W-3:0] waddr;   // word address
    word_t             data;
  } entry_t;

  entry_t        fifo [DEPTH];
  logic [PW-1:0] head, tail;
  logic          push, pop, full, rd;

  assign full = (count == CW'(DEPTH));
  assign rd   = up_val && up_req.op == MEM_RD_LINE;
  assign push = up_val && up_req.op == MEM_WR_WORD;
  assign pop  = (count != '0) && (!up_val || (push && full));

  // Downstream port: a read passes straight through; otherwise the oldest
  // buffered write drains.
  always_comb begin
    dn_val = rd || pop;
    dn_req = up_req;
    if (!rd) begin
      dn_req.op   = MEM_WR_WORD;
      dn_req.addr = {fifo[head].waddr, 2'b00};
      dn_req.data = fifo[head].data;
    end
  end

  // Read bypass: patch buffered words of the requested line into it.
  always_comb begin
    up_line = dn_line;
    for (int k = 0; k < DEPTH; k++) begin
      logic [PW-1:0] i;
      i = PW'(head + PW'(k));
      if (rd && CW'(k) < count && fifo[i].waddr[ADDR_W-3:2] == up_req.addr[ADDR_W-1:OFFSET_W])
        up_line[fifo[i].waddr[1:0]*WORD_W +: WORD_W] = fifo[i].data;
    end
    if (!rd) up_line = '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (push) begin
        fifo[tail] <= '{waddr: up_req.addr[ADDR_W-1:2], data: up_req.data};
        tail       <= PW'(tail + 1'b1);
      end
      if (pop) head <= PW'(head + 1'b1);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst) count <= CW'(DEPTH));

endmodule
