// comb_sram_tb: self-checking test of the single-ported combinational SRAM.
//
// Uses the data-array shape (four 128-bit entries in four 32-bit segments).
// Random reads and writes with random segment enables are compared with a
// reference array; the test also checks that a read answers in the same
// cycle, that nothing is written while en is low, that rdata is zero while
// the port is idle or writing, and that reset clears the contents.
`timescale 1ns/1ps
module comb_sram_tb;
  localparam int W = 128, D = 4, S = 4;

  logic         clk = 1'b0, rst, en, wen;
  logic [1:0]   addr;
  logic [S-1:0] wben;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  comb_sram #(.WIDTH(W), .DEPTH(D), .NSEG(S)) dut (.*);

  function automatic logic [W-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    rst = 1'b1; en = 1'b0; wen = 1'b0; addr = '0; wben = '0; wdata = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < D; i++) model[i] = '0;
    for (int i = 0; i < D; i++) begin
      en = 1'b1; addr = 2'(i); #1;
      checks++; if (rdata != '0) begin failures++; $display("FAIL: not cleared"); end
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en    = ($urandom_range(0, 5) != 0);
      wen   = 1'($urandom_range(0, 1));
      addr  = 2'($urandom_range(0, D - 1));
      wben  = 4'($urandom);
      wdata = rnd();
      #1;
      checks++;
      if (en && !wen) begin
        if (rdata != model[addr]) begin
          failures++; $display("FAIL read %0d: %h vs %h", addr, rdata, model[addr]);
        end
      end else if (rdata != '0) begin
        failures++; $display("FAIL: rdata not zero while idle or writing");
      end
      if (en && wen)
        for (int s = 0; s < S; s++) if (wben[s]) model[addr][s*32 +: 32] = wdata[s*32 +: 32];
    end
    @(negedge clk);
    rst = 1'b1; en = 1'b0;
    @(negedge clk);
    rst = 1'b0; en = 1'b1; wen = 1'b0;
    for (int i = 0; i < D; i++) begin
      addr = 2'(i); #1;
      checks++; if (rdata != '0) begin failures++; $display("FAIL: reset did not clear"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
