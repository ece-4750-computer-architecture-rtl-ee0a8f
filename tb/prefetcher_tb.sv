// prefetcher_tb: self-checking test of the next-line prefetcher in front of
// the combinational main memory.
//
// Part 1 streams line reads through consecutive lines with an idle cycle
// after each: after the first, every read must be served from the prefetch
// buffer (pf_hit high, no memory access), and every returned line must match
// the reference memory. Part 2 mixes random line reads, word writes and idle
// cycles over a few lines, checking every line read against the reference,
// so that writes to a prefetched line must reach the buffer too.
`timescale 1ns/1ps
module prefetcher_tb;
  import mem_pkg::*;

  logic     clk = 1'b0, rst;
  logic     up_val, dn_val, pf_hit, pf_issue;
  mem_req_t up_req, dn_req;
  line_t    up_line, dn_line;

  always #5 clk = ~clk;

  prefetcher dut (.*);
  comb_mem mem (.clk, .rst, .req_val(dn_val), .req(dn_req), .resp_line(dn_line));

  int checks = 0, failures = 0, n_hit = 0, n_issue = 0;
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

  task automatic op(mem_op_e o, addr_t a, word_t d, logic v);
    @(negedge clk);
    up_val = v; up_req = '{op: o, addr: a, data: d};
    #1;
    if (pf_issue) n_issue++;
    if (v && o == MEM_RD_LINE) begin
      check($sformatf("line %h", a), up_line == model_line(a));
      if (pf_hit) begin n_hit++; check("hit uses no memory access", !dn_val); end
    end
    if (v && o == MEM_WR_WORD) model[{a[31:2], 2'b00}] = d;
  endtask

  initial begin
    rst = 1'b1; up_val = 1'b0; up_req = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // fill some data
    for (int i = 0; i < 128; i++) op(MEM_WR_WORD, 32'h3000 + 4*i, 32'h7000_0000 + i, 1'b1);
    // Part 1: streaming reads
    for (int l = 0; l < 32; l++) begin
      int h0;
      h0 = n_hit;
      op(MEM_RD_LINE, 32'h3000 + 16*l + 4*(l % 4), '0, 1'b1);
      if (l > 0) check($sformatf("stream line %0d served by prefetch", l), n_hit == h0 + 1);
      op(MEM_RD_LINE, '0, '0, 1'b0);
    end
    // Part 2: random traffic
    for (int n = 0; n < 3000; n++) begin
      int k;
      addr_t a;
      k = $urandom_range(0, 5);
      a = 32'h3000 + addr_t'(16 * $urandom_range(0, 5) + 4 * $urandom_range(0, 3));
      if (k < 2)      op(MEM_WR_WORD, a, $urandom, 1'b1);
      else if (k < 4) op(MEM_RD_LINE, a, '0, 1'b1);
      else            op(MEM_RD_LINE, '0, '0, 1'b0);
    end
    $display("prefetch hits=%0d prefetch reads=%0d", n_hit, n_issue);
    check("prefetch hits", n_hit > 31);
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
