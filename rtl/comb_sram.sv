// comb_sram: single-ported SRAM with a combinational read and a clocked write.
//
// This is the storage the caches use for their tag arrays and data arrays.
// One port serves either a read or a write in a cycle: with en high and wen
// low, rdata shows the entry at addr in the same cycle; with en and wen high,
// the entry at addr takes wdata at the rising clock edge, but only in the
// NSEG segments whose bit in wben is set (a data array uses four 32-bit
// segments so one word of a line can be written). With en low the port is
// idle and rdata is zero. The combinational read and single port follow the
// lecture's assumptions; the word-enable layout and the zero output when
// idle are this design's choices. Contents are cleared by reset so that a
// two-state simulation starts from known values.
module comb_sram #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 4,
  parameter int unsigned NSEG  = 4,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned SEGW = WIDTH / NSEG
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             wen,
  input  logic [AW-1:0]    addr,
  input  logic [NSEG-1:0]  wben,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (en && wen) begin
      for (int s = 0; s < NSEG; s++)
        if (wben[s]) mem[addr][s*SEGW +: SEGW] <= wdata[s*SEGW +: SEGW];
    end
  end

  always_comb rdata = (en && !wen) ? mem[addr] : '0;

endmodule
