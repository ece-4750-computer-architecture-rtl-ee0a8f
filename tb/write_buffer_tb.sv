// write_buffer_tb: self-checking test of the write buffer in front of the
// combinational main memory.
//
// Random line reads, word writes and idle cycles are sent upstream. Every
// line read must return what a plain memory would (all earlier writes
// included, even those still in the buffer), must go downstream in the same
// cycle and must not drain the buffer. The test tracks the expected number of
// buffered writes (writes add one, idle cycles drain one, a write into a full
// buffer drains one as it adds one) and checks count each cycle. At the end
// idle cycles must empty the buffer into memory. Bypasses from the buffer
// into a read and writes into a full buffer are counted and must happen.
`timescale 1ns/1ps
module write_buffer_tb;
  import mem_pkg::*;

  localparam int DEPTH = 4;

  logic       clk = 1'b0, rst;
  logic       up_val, dn_val;
  mem_req_t   up_req, dn_req;
  line_t      up_line, dn_line;
  logic [2:0] count;

  always #5 clk = ~clk;

  write_buffer #(.DEPTH(DEPTH)) dut (.*);
  comb_mem mem (.clk, .rst, .req_val(dn_val), .req(dn_req), .resp_line(dn_line));

  int checks = 0, failures = 0, n_bypass = 0, n_full = 0, exp_count = 0;
  word_t model [addr_t];

  function automatic line_t model_line(addr_t a);
    line_t l;
    for (int w = 0; w < 4; w++) begin
      addr_t wa;
      wa = line_addr(a) + addr_t'(4 * w);
      l[w*32 +: 32] = model.exists(wa) ? model[wa] : '0;
    end
    return l;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst = 1'b1; up_val = 1'b0; up_req = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      int    kind;
      addr_t a;
      @(negedge clk);
      check($sformatf("count %0d vs %0d", count, exp_count), int'(count) == exp_count);
      kind = $urandom_range(0, 9);
      a = {26'd0, 2'($urandom_range(0, 3)), 2'($urandom_range(0, 3)), 2'b00};
      up_val   = (kind < 8);
      up_req.op   = (kind < 4) ? MEM_WR_WORD : MEM_RD_LINE;
      up_req.addr = a;
      up_req.data = $urandom;
      #1;
      if (up_val && up_req.op == MEM_RD_LINE) begin
        check("read goes straight to memory", dn_val && dn_req.op == MEM_RD_LINE);
        check($sformatf("read line %h", a), up_line == model_line(a));
        if (dn_line != up_line) n_bypass++;
      end else if (up_val) begin
        if (exp_count == DEPTH) begin
          n_full++;
          check("full buffer makes room", dn_val && dn_req.op == MEM_WR_WORD);
        end else begin
          check("write is buffered", !dn_val);
          exp_count++;
        end
        model[a] = up_req.data;
      end else begin
        check("idle cycle drains", dn_val == (exp_count != 0));
        if (exp_count != 0) exp_count--;
      end
    end
    @(negedge clk);
    up_val = 1'b0;
    repeat (DEPTH + 1) @(negedge clk);
    check("drained", count == 0);
    // memory alone now holds everything
    for (int l = 0; l < 4; l++) begin
      up_val = 1'b1; up_req.op = MEM_RD_LINE; up_req.addr = addr_t'(16 * l);
      #1;
      check("memory after drain", dn_line == model_line(addr_t'(16 * l)));
      @(negedge clk);
    end
    $display("bypasses=%0d writes_into_full=%0d", n_bypass, n_full);
    check("bypass happened", n_bypass > 0);
    check("full buffer happened", n_full > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
