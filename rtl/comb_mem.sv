// comb_mem: main memory that answers at once, as the lecture's
// "unrealistic combinational main memory".
//
// A request with op MEM_RD_LINE returns the 16-byte line holding addr on
// resp_line in the same cycle (the low four address bits are ignored). A
// request with op MEM_WR_WORD writes the 32-bit data to the word at addr at
// the rising clock edge. The memory holds SIZE_BYTES bytes; higher address
// bits wrap around. req_val marks a request; the memory is always ready.
// A word that has not been written since reset reads as zero: one written
// flag per word is cleared by reset, so the array itself needs no reset.
// The size and the read-as-zero rule are this design's choices (the lecture
// gives no size).
module comb_mem
  import mem_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 65536,
  localparam int unsigned NLINES    = SIZE_BYTES / LINE_BYTES,
  localparam int unsigned LIDX_W    = $clog2(NLINES)
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     req_val,
  input  mem_req_t req,
  output line_t    resp_line
);

  line_t                     mem [NLINES];
  logic [WORDS_PER_LINE-1:0] written [NLINES];

  logic [LIDX_W-1:0]         lidx;
  logic [WORDS_PER_LINE-1:0] wsel;

  assign lidx = req.addr[OFFSET_W +: LIDX_W];
  assign wsel = word_onehot(req.addr[3:2]);

  always_ff @(posedge clk) begin
    if (req_val && req.op == MEM_WR_WORD) begin
      for (int w = 0; w < WORDS_PER_LINE; w++)
        if (wsel[w]) mem[lidx][w*WORD_W +: WORD_W] <= req.data;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) written <= '{default: '0};
    else if (req_val && req.op == MEM_WR_WORD) written[lidx] <= written[lidx] | wsel;
  end

  always_comb begin
    resp_line = '0;
    if (req_val && req.op == MEM_RD_LINE)
      for (int w = 0; w < WORDS_PER_LINE; w++)
        if (written[lidx][w]) resp_line[w*WORD_W +: WORD_W] = mem[lidx][w*WORD_W +: WORD_W];
  end

endmodule
