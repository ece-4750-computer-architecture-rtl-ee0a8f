// comb_mem_tb: self-checking test of the combinational main memory.
//
// Random word writes and line reads over the whole 64 KB are compared with a
// reference (an associative array, unwritten words reading as zero). A line
// read must answer in the cycle it is requested, ignore the low four address
// bits, and a write must change only its own word. Reset must make every
// word read as zero again.
`timescale 1ns/1ps
module comb_mem_tb;
  import mem_pkg::*;

  logic     clk = 1'b0, rst, req_val;
  mem_req_t req;
  line_t    resp_line;
  word_t    model [addr_t];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  comb_mem dut (.clk, .rst, .req_val, .req, .resp_line);

  function automatic line_t exp_line(addr_t a);
    line_t l;
    for (int w = 0; w < 4; w++) begin
      addr_t wa;
      wa = line_addr(a) + addr_t'(4 * w);
      l[w*32 +: 32] = model.exists(wa) ? model[wa] : '0;
    end
    return l;
  endfunction

  addr_t hot [16];

  initial begin
    rst = 1'b1; req_val = 1'b0; req = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 16; i++) hot[i] = addr_t'({$urandom_range(0, 4095), 4'h0});
    for (int n = 0; n < 3000; n++) begin
      addr_t a;
      @(negedge clk);
      a = hot[$urandom_range(0, 15)] | addr_t'($urandom_range(0, 15));
      if ($urandom_range(0, 3) == 0) a = addr_t'($urandom_range(0, 65535));
      req_val  = ($urandom_range(0, 7) != 0);
      req.op   = mem_op_e'($urandom_range(0, 1));
      req.addr = a;
      req.data = $urandom;
      #1;
      checks++;
      if (req_val && req.op == MEM_RD_LINE) begin
        if (resp_line != exp_line(a)) begin
          failures++; $display("FAIL read %h: %h vs %h", a, resp_line, exp_line(a));
        end
      end else if (resp_line != '0) begin
        failures++; $display("FAIL: response without a read");
      end
      if (req_val && req.op == MEM_WR_WORD) model[{a[31:2], 2'b00}] = req.data;
    end
    @(negedge clk);
    req_val = 1'b0; rst = 1'b1;
    @(negedge clk);
    rst = 1'b0; req_val = 1'b1; req.op = MEM_RD_LINE;
    for (int i = 0; i < 16; i++) begin
      req.addr = hot[i]; #1;
      checks++; if (resp_line != '0) begin failures++; $display("FAIL: reset left data"); end
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
