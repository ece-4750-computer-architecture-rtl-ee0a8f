// fsm_cache_tb: self-checking test of the FSM cache with its main memory.
//
// Requests go one at a time. A reference memory (an associative array) gives
// the data every read must return, and a reference model of the cache's
// state (two ways per set, valid bits, use bits, victim = least recently
// used way) gives the latency every request must take: read hit 2 cycles,
// read miss 4, write 2. Latency counts cycles from the one where the request
// is first presented to the one where the response is taken, inclusive.
// The test covers write misses (no allocate), read misses and refills, LRU
// replacement in a set, write hits, random traffic, and the lecture's two
// array workloads (copy and increment of 64 four-byte elements), whose
// total cycle count is checked against the reference model.
`timescale 1ns/1ps
module fsm_cache_tb;
  import mem_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic        cachereq_val, cachereq_rdy, cacheresp_val, cacheresp_rdy;
  cache_req_t  cachereq_msg;
  cache_resp_t cacheresp_msg;
  logic        memreq_val;
  mem_req_t    memreq_msg;
  line_t       memresp_line;

  always #5 clk = ~clk;

  fsm_cache dut (.*);
  comb_mem #(.SIZE_BYTES(65536)) mem (
    .clk, .rst, .req_val(memreq_val), .req(memreq_msg), .resp_line(memresp_line)
  );

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_evict = 0, n_wr = 0;

  // ---- reference model ----
  word_t       ref_mem [addr_t];
  logic [26:0] m_tag [2][2];
  logic        m_val [2][2];
  logic        m_use [2];

  function automatic word_t ref_rd(addr_t a);
    return ref_mem.exists(a) ? ref_mem[a] : '0;
  endfunction

  function automatic void model_reset();
    for (int s = 0; s < 2; s++) begin
      m_use[s] = 1'b0;
      for (int w = 0; w < 2; w++) begin m_val[s][w] = 1'b0; m_tag[s][w] = '0; end
    end
  endfunction

  // Returns the expected latency and updates the model.
  function automatic int model_access(req_type_e t, addr_t a);
    int s, way;
    logic hit;
    s = int'(a[4]);
    hit = 1'b0; way = 0;
    for (int w = 0; w < 2; w++)
      if (m_val[s][w] && m_tag[s][w] == a[31:5]) begin hit = 1'b1; way = w; end
    if (t == REQ_WRITE) begin
      n_wr++;
      if (hit) m_use[s] = way[0];
      return 2;
    end
    if (hit) begin
      n_hit++;
      m_use[s] = way[0];
      return 2;
    end
    n_miss++;
    way = m_use[s] ? 0 : 1;
    if (m_val[s][way]) n_evict++;
    m_val[s][way] = 1'b1;
    m_tag[s][way] = a[31:5];
    m_use[s] = way[0];
    return 4;
  endfunction

  // ---- one request, waiting for its response ----
  task automatic xact(input req_type_e t, input addr_t a, input word_t d, output int lat);
    bit accepted, got;
    cache_resp_t r;
    int exp_lat;
    word_t exp_d;
    exp_d = ref_rd(a);
    exp_lat = model_access(t, a);
    if (t == REQ_WRITE) ref_mem[a] = d;
    @(negedge clk);
    cachereq_val = 1'b1;
    cachereq_msg = '{typ: t, addr: a, data: d};
    lat = 0; accepted = 0; got = 0;
    while (!got) begin
      #1;
      lat++;
      if (cachereq_val && cachereq_rdy) accepted = 1;
      if (cacheresp_val) begin got = 1; r = cacheresp_msg; end
      @(negedge clk);
      if (accepted) cachereq_val = 1'b0;
    end
    checks++;
    if (r.typ != t || (t == REQ_READ && r.data != exp_d)) begin
      failures++;
      $display("FAIL data: %s addr=%h got %h expected %h", t.name(), a, r.data, exp_d);
    end
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
    model_reset();
  endtask

  // Runs a request stream and returns the total cycles it took.
  int lat, total;

  initial begin
    do_reset();

    // Write misses only reach memory; then read misses and hits.
    for (int i = 0; i < 8; i++) xact(REQ_WRITE, 32'h100 + 4*i, 32'hA000_0000 + i, lat);
    for (int i = 0; i < 8; i++) xact(REQ_READ, 32'h100 + 4*i, '0, lat);

    // LRU in set 0: A, B, A, C evicts B; then A hits, B misses.
    xact(REQ_WRITE, 32'h0000_0400, 32'h1111_1111, lat);
    xact(REQ_WRITE, 32'h0000_0800, 32'h2222_2222, lat);
    xact(REQ_WRITE, 32'h0000_0C00, 32'h3333_3333, lat);
    xact(REQ_READ, 32'h0000_0400, '0, lat);
    xact(REQ_READ, 32'h0000_0800, '0, lat);
    xact(REQ_READ, 32'h0000_0400, '0, lat);
    xact(REQ_READ, 32'h0000_0C00, '0, lat);
    xact(REQ_READ, 32'h0000_0400, '0, lat);
    checks++; if (lat != 2) begin failures++; $display("FAIL: LRU kept the wrong line"); end
    xact(REQ_READ, 32'h0000_0800, '0, lat);
    checks++; if (lat != 4) begin failures++; $display("FAIL: LRU victim still present"); end

    // Write hit updates the cached line and memory.
    xact(REQ_WRITE, 32'h0000_0804, 32'hBEEF_0001, lat);
    xact(REQ_READ, 32'h0000_0804, '0, lat);

    // Random traffic over 16 lines.
    for (int i = 0; i < 400; i++) begin
      addr_t a;
      a = {24'd0, 4'($urandom_range(0, 15)), 2'($urandom_range(0, 3)), 2'd0};
      if ($urandom_range(0, 2) == 0) xact(REQ_WRITE, a, $urandom, lat);
      else                           xact(REQ_READ, a, '0, lat);
    end

    // Back-pressure on the response: the cache must hold it.
    @(negedge clk);
    cachereq_val = 1'b1;
    cachereq_msg = '{typ: REQ_READ, addr: 32'h100, data: '0};
    cacheresp_rdy = 1'b0;
    @(negedge clk);
    cachereq_val = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (!cacheresp_val || cacheresp_msg.data != ref_rd(32'h100)) begin
      failures++; $display("FAIL: response not held under back-pressure");
    end
    cacheresp_rdy = 1'b1;
    @(negedge clk);
    checks++; if (cacheresp_val) begin failures++; $display("FAIL: response repeated"); end
    void'(model_access(REQ_READ, 32'h100));

    // Copy workload: rd src[i], wr dst[i], 64 elements.
    do_reset();
    total = 0;
    for (int i = 0; i < 64; i++) begin
      xact(REQ_READ,  32'h1000 + 4*i, '0, lat); total += lat;
      xact(REQ_WRITE, 32'h2000 + 4*i, i, lat);  total += lat;
    end
    $display("copy workload: %0d accesses, %0d cycles", 128, total);
    // Per line of four elements: read miss 4 + 3 read hits 2 + 4 writes 2.
    checks++; if (total != 16 * 18) begin failures++; $display("FAIL: copy took %0d cycles", total); end

    // Increment workload: rd a[i], wr a[i], 64 elements.
    do_reset();
    total = 0;
    for (int i = 0; i < 64; i++) begin
      xact(REQ_READ,  32'h1000 + 4*i, '0, lat);    total += lat;
      xact(REQ_WRITE, 32'h1000 + 4*i, i + 1, lat); total += lat;
    end
    $display("increment workload: %0d accesses, %0d cycles", 128, total);
    checks++; if (total != 16 * 18) begin failures++; $display("FAIL: increment took %0d cycles", total); end
    for (int i = 0; i < 64; i += 9) xact(REQ_READ, 32'h1000 + 4*i, '0, lat);

    $display("events: hits=%0d misses=%0d evictions=%0d writes=%0d", n_hit, n_miss, n_evict, n_wr);
    checks++; if (n_evict == 0 || n_hit == 0 || n_miss == 0) begin failures++; $display("FAIL: event missing"); end
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
