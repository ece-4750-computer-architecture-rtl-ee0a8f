// pipe_cache_pr_tb: self-checking test of the parallel-read, pipelined-write
// cache.
//
// Part 1 sends requests one at a time and checks data against a reference
// memory and latency against a reference model of the direct-mapped tags:
// read hit 1 cycle, read miss 3, write 1 (counted from the cycle a request
// is first presented to the cycle its response is taken, inclusive).
// Part 2 streams requests back to back, with a separate process checking the
// responses in order; a run of hits must sustain one request per cycle, and
// a write followed at once by a read of the same word must return the new
// data through the write-to-read bypass (counted on the bypass output). Part 3 holds the response with cacheresp_rdy low and checks that the
// pipeline stalls without losing or repeating anything. Part 4 runs the
// lecture's copy workload (64 elements) and checks its cycle count.
`timescale 1ns/1ps
module pipe_cache_pr_tb;
  import mem_pkg::*;

  localparam int LAT_HIT = 1, LAT_MISS = 3, LAT_WR = 1;

  logic        clk = 1'b0;
  logic        rst;
  logic        cachereq_val, cachereq_rdy, cacheresp_val, cacheresp_rdy;
  cache_req_t  cachereq_msg;
  cache_resp_t cacheresp_msg;
  logic        memreq_val;
  mem_req_t    memreq_msg;
  line_t       memresp_line;
  logic        bypass;

  always #5 clk = ~clk;

  pipe_cache_pr dut (.*);
  comb_mem #(.SIZE_BYTES(65536)) mem (
    .clk, .rst, .req_val(memreq_val), .req(memreq_msg), .resp_line(memresp_line)
  );

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_wr = 0, n_stall_cycles = 0, n_bypass = 0;

  word_t       ref_mem [addr_t];
  logic [25:0] m_tag [4];
  logic        m_val [4];

  function automatic word_t ref_rd(addr_t a);
    return ref_mem.exists(a) ? ref_mem[a] : '0;
  endfunction

  function automatic int model_access(req_type_e t, addr_t a);
    int i;
    i = int'(a[5:4]);
    if (t == REQ_WRITE) begin n_wr++; return LAT_WR; end
    if (m_val[i] && m_tag[i] == a[31:6]) begin n_hit++; return LAT_HIT; end
    n_miss++;
    m_val[i] = 1'b1;
    m_tag[i] = a[31:6];
    return LAT_MISS;
  endfunction

  // Expected responses of streamed requests, in order.
  cache_resp_t exp_q [$];
  int          n_resp;

  always @(negedge clk) begin
    #2;
    if (!rst && cacheresp_val && cacheresp_rdy) begin
      cache_resp_t e;
      n_resp++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL: unexpected response");
      end else begin
        e = exp_q.pop_front();
        if (cacheresp_msg.typ != e.typ || (e.typ == REQ_READ && cacheresp_msg.data != e.data)) begin
          failures++;
          $display("FAIL stream: got %s %h expected %s %h", cacheresp_msg.typ.name(),
                   cacheresp_msg.data, e.typ.name(), e.data);
        end
      end
    end
    if (!rst && cachereq_val && !cachereq_rdy) n_stall_cycles++;
    if (!rst && bypass && cachereq_rdy) n_bypass++;
  end

  // Presents one request until it is taken; records the expected response.
  task automatic issue(input req_type_e t, input addr_t a, input word_t d);
    cachereq_val = 1'b1;
    cachereq_msg = '{typ: t, addr: a, data: d};
    exp_q.push_back('{typ: t, data: ref_rd(a)});
    void'(model_access(t, a));
    if (t == REQ_WRITE) ref_mem[a] = d;
    #1;
    while (!cachereq_rdy) begin @(negedge clk); #1; end
    @(negedge clk);
    cachereq_val = 1'b0;
  endtask

  // One request at a time; checks the latency.
  task automatic xact(input req_type_e t, input addr_t a, input word_t d);
    int lat, exp_lat, start;
    exp_lat = 0;
    @(negedge clk);
    start = n_resp;
    // model latency, computed before issue() updates the model
    if (t == REQ_WRITE) exp_lat = LAT_WR;
    else if (m_val[int'(a[5:4])] && m_tag[int'(a[5:4])] == a[31:6]) exp_lat = LAT_HIT;
    else exp_lat = LAT_MISS;
    lat = 1;
    fork
      issue(t, a, d);
      begin
        #3;
        while (n_resp == start) begin lat++; @(negedge clk); #3; end
      end
    join
    checks++;
    if (lat != exp_lat) begin
      failures++;
      $display("FAIL latency: %s addr=%h took %0d expected %0d", t.name(), a, lat, exp_lat);
    end
  endtask

  task automatic do_reset();
    rst = 1'b1;
    cachereq_val = 1'b0;
    cachereq_msg = '0;
    cacheresp_rdy = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    ref_mem.delete();
    exp_q.delete();
    for (int i = 0; i < 4; i++) begin m_val[i] = 1'b0; m_tag[i] = '0; end
  endtask

  function automatic addr_t rand_addr();
    return {24'd0, 4'($urandom_range(0, 11)), 2'($urandom_range(0, 3)), 2'd0};
  endfunction

  time t0;
  int  b0;
  int  total;

  initial begin
    n_resp = 0;
    do_reset();

    // Part 1: one at a time.
    for (int i = 0; i < 8; i++) xact(REQ_WRITE, 32'h200 + 4*i, 32'hC000_0000 + i);
    for (int i = 0; i < 8; i++) xact(REQ_READ, 32'h200 + 4*i, '0);
    xact(REQ_WRITE, 32'h204, 32'h1234_5678);   // write hit
    xact(REQ_READ, 32'h204, '0);
    xact(REQ_READ, 32'h604, '0);               // conflict miss, same index
    xact(REQ_READ, 32'h204, '0);
    for (int i = 0; i < 200; i++)
      if ($urandom_range(0, 2) == 0) xact(REQ_WRITE, rand_addr(), $urandom);
      else                           xact(REQ_READ, rand_addr(), '0);

    // Part 2: streaming. Warm four lines, then 64 hits back to back.
    for (int i = 0; i < 4; i++) xact(REQ_READ, 32'h200 + 16*i, '0);
    @(negedge clk);
    t0 = $time;
    for (int i = 0; i < 64; i++) issue(REQ_READ, 32'h200 + 4*(i % 16), '0);
    total = int'(($time - t0) / 10);
    checks++;
    if (total != 64) begin failures++; $display("FAIL: 64 hits took %0d issue cycles", total); end
    // write then read of the same word, back to back: the read is served
    // by the bypass from M1
    b0 = n_bypass;
    for (int i = 0; i < 16; i++) begin
      issue(REQ_WRITE, 32'h200 + 4*i, 32'h5A00_0000 + i);
      issue(REQ_READ, 32'h200 + 4*i, '0);
    end
    checks++;
    if (n_bypass - b0 != 16) begin failures++; $display("FAIL: %0d bypasses, expected 16", n_bypass - b0); end
    // random stream
    for (int i = 0; i < 300; i++)
      if ($urandom_range(0, 2) == 0) issue(REQ_WRITE, rand_addr(), $urandom);
      else                           issue(REQ_READ, rand_addr(), '0);
    repeat (4) @(negedge clk);

    // Part 3: back-pressure on responses.
    fork
      for (int i = 0; i < 100; i++)
        if ($urandom_range(0, 2) == 0) issue(REQ_WRITE, rand_addr(), $urandom);
        else                           issue(REQ_READ, rand_addr(), '0);
      repeat (300) begin @(posedge clk); #2 cacheresp_rdy = ($urandom_range(0, 2) != 0); end
    join_any
    wait (exp_q.size() == 0);
    disable fork;
    cacheresp_rdy = 1'b1;
    @(negedge clk);

    // Part 4: copy workload on a cold cache.
    do_reset();
    @(negedge clk);
    t0 = $time;
    for (int i = 0; i < 64; i++) begin
      issue(REQ_READ,  32'h1000 + 4*i, '0);
      issue(REQ_WRITE, 32'h2000 + 4*i, i);
    end
    wait (exp_q.size() == 0);
    total = int'(($time - t0) / 10);
    $display("copy workload: 128 accesses, %0d cycles", total);
    // Each of the 16 source lines misses once and stalls M0 for 2 cycles;
    // all other requests take one cycle each.
    checks++;
    if (total < 128 + 2*16 || total > 128 + 2*16 + 2) begin
      failures++; $display("FAIL: copy took %0d cycles", total);
    end
    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL: responses missing"); end

    $display("events: hits=%0d misses=%0d writes=%0d stall_cycles=%0d bypasses=%0d", n_hit, n_miss, n_wr, n_stall_cycles, n_bypass);
    checks++; if (n_hit == 0 || n_miss == 0 || n_stall_cycles == 0 || n_bypass == 0) begin failures++; $display("FAIL: event missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
