// comb_sram_1r1w: SRAM with one combinational read port and one clocked
// write port, used where a cache duplicates its data-array port so that a
// read and a write can happen in the same cycle.
//
// rdata shows the entry at raddr in the cycle ren is high (zero otherwise).
// With wen high, the entry at waddr takes wdata at the rising clock edge in
// the segments whose wben bit is set. A read and a write of the same entry in
// one cycle returns the old contents; the cache in front of it bypasses the
// new data itself. Contents are cleared by reset.
module comb_sram_1r1w #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 4,
  parameter int unsigned NSEG  = 4,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned SEGW = WIDTH / NSEG
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ren,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             wen,
  input  logic [AW-1:0]    waddr,
  input  logic [NSEG-1:0]  wben,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (wen) begin
      for (int s = 0; s < NSEG; s++)
        if (wben[s]) mem[waddr][s*SEGW +: SEGW] <= wdata[s*SEGW +: SEGW];
    end
  end

  always_comb rdata = ren ? mem[raddr] : '0;

endmodule
