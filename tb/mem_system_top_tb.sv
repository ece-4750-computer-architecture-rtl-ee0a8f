// mem_system_top_tb: end-to-end test of the three caches at full size.
//
// One cache_agent drives each of the four caches. All four run the same programs at the
// same time, and every response is checked against the agent's reference
// memory. The programs:
//   1. random reads and writes over 12 lines (three lines per index, so
//      conflicts, LRU replacement and refills are frequent), with random
//      back-pressure on the responses;
//   2. the array copy workload, rd src[i] / wr dst[i] for 64 four-byte
//      elements, on cold caches; cycle counts are checked and the average
//      memory access latency printed;
//   3. the array increment workload, rd a[i] / wr a[i], likewise;
//   4. write-then-read pairs to the same word, back to back.
// The test counts how often each mechanism of the designs happens: FSM
// refills, LRU evictions and write hits; pipelined refills, M0 stalls and M1
// back-pressure stalls; bypasses in the parallel-read cache; write-throughs;
// prefetch reads and prefetch-buffer hits, write-buffer bypasses into a
// refill and writes into a full write buffer behind the fourth cache, whose
// cycle counts must equal those of the plain pipelined cache.
// A mechanism that never happens counts as a failure.
`timescale 1ns/1ps
module mem_system_top_tb;
  import mem_pkg::*;

  logic        clk = 1'b0, rst;
  logic        fsm_req_val, fsm_req_rdy, fsm_resp_val, fsm_resp_rdy;
  cache_req_t  fsm_req_msg;
  cache_resp_t fsm_resp_msg;
  logic        pipe_req_val, pipe_req_rdy, pipe_resp_val, pipe_resp_rdy;
  cache_req_t  pipe_req_msg;
  cache_resp_t pipe_resp_msg;
  logic        pr_req_val, pr_req_rdy, pr_resp_val, pr_resp_rdy, pr_bypass;
  cache_req_t  pr_req_msg;
  cache_resp_t pr_resp_msg;
  logic        opt_req_val, opt_req_rdy, opt_resp_val, opt_resp_rdy, opt_pf_hit;
  cache_req_t  opt_req_msg;
  cache_resp_t opt_resp_msg;
  logic [2:0]  opt_wb_count;

  always #5 clk = ~clk;

  mem_system_top dut (.*);

  cache_agent a_fsm (.clk, .rst, .req_val(fsm_req_val), .req_rdy(fsm_req_rdy), .req_msg(fsm_req_msg),
                     .resp_val(fsm_resp_val), .resp_rdy(fsm_resp_rdy), .resp_msg(fsm_resp_msg));
  cache_agent a_pipe (.clk, .rst, .req_val(pipe_req_val), .req_rdy(pipe_req_rdy), .req_msg(pipe_req_msg),
                      .resp_val(pipe_resp_val), .resp_rdy(pipe_resp_rdy), .resp_msg(pipe_resp_msg));
  cache_agent a_pr (.clk, .rst, .req_val(pr_req_val), .req_rdy(pr_req_rdy), .req_msg(pr_req_msg),
                    .resp_val(pr_resp_val), .resp_rdy(pr_resp_rdy), .resp_msg(pr_resp_msg));
  cache_agent a_opt (.clk, .rst, .req_val(opt_req_val), .req_rdy(opt_req_rdy), .req_msg(opt_req_msg),
                     .resp_val(opt_resp_val), .resp_rdy(opt_resp_rdy), .resp_msg(opt_resp_msg));

  int checks = 0, failures = 0;

  // ---- mechanism counters ----
  int fsm_refill = 0, fsm_evict = 0, fsm_wr_hit = 0, fsm_wt = 0;
  int pipe_refill = 0, pipe_m0_stall = 0, pipe_m1_stall = 0, pipe_wt = 0;
  int pr_refill = 0, pr_bypasses = 0, pr_wt = 0;
  int opt_pf_hits = 0, opt_pf_reads = 0, opt_wb_bypass = 0, opt_wb_full = 0;

  always @(negedge clk) if (!rst) begin
    if (dut.u_fsm.refill_en) begin
      fsm_refill++;
      if (dut.u_fsm.ctrl.victim ? dut.u_fsm.ctrl.valid1[dut.u_fsm.req_idx]
                                : dut.u_fsm.ctrl.valid0[dut.u_fsm.req_idx]) fsm_evict++;
    end
    if (dut.u_fsm.darray_wen && !dut.u_fsm.darray_sel) fsm_wr_hit++;
    if (dut.fsm_memreq_val && dut.fsm_memreq.op == MEM_WR_WORD) fsm_wt++;
    if (dut.u_pipe.refill_go) pipe_refill++;
    if (pipe_req_val && !pipe_req_rdy) pipe_m0_stall++;
    if (dut.u_pipe.stall1) pipe_m1_stall++;
    if (dut.pipe_memreq_val && dut.pipe_memreq.op == MEM_WR_WORD) pipe_wt++;
    if (dut.u_pr.refill_go) pr_refill++;
    if (pr_bypass && pr_req_rdy) pr_bypasses++;
    if (dut.pr_memreq_val && dut.pr_memreq.op == MEM_WR_WORD) pr_wt++;
    if (opt_pf_hit) opt_pf_hits++;
    if (dut.opt_pf_issue) opt_pf_reads++;
    if (dut.opt_pf_val && dut.opt_pf_req.op == MEM_RD_LINE && dut.opt_pf_resp != dut.opt_wb_resp) opt_wb_bypass++;
    if (dut.opt_pf_val && dut.opt_pf_req.op == MEM_WR_WORD && opt_wb_count == 3'd4) opt_wb_full++;
  end

  task automatic do_reset();
    rst = 1'b1;
    repeat (2) @(negedge clk);
    a_fsm.clear(); a_pipe.clear(); a_pr.clear(); a_opt.clear();
    rst = 1'b0;
  endtask

  // The same random program for all three, from one list.
  req_type_e p_t [];
  addr_t     p_a [];
  word_t     p_d [];

  task automatic run_all(output int c_fsm, output int c_pipe, output int c_pr);
    int c_opt;
    time t0;
    @(negedge clk);
    t0 = $time;
    c_fsm = 0; c_pipe = 0; c_pr = 0;
    fork
      begin
        foreach (p_t[i]) a_fsm.issue(p_t[i], p_a[i], p_d[i]);
        a_fsm.drain(); c_fsm = int'(($time - t0) / 10);
      end
      begin
        foreach (p_t[i]) a_pipe.issue(p_t[i], p_a[i], p_d[i]);
        a_pipe.drain(); c_pipe = int'(($time - t0) / 10);
      end
      begin
        foreach (p_t[i]) a_pr.issue(p_t[i], p_a[i], p_d[i]);
        a_pr.drain(); c_pr = int'(($time - t0) / 10);
      end
      begin
        foreach (p_t[i]) a_opt.issue(p_t[i], p_a[i], p_d[i]);
        a_opt.drain(); c_opt = int'(($time - t0) / 10);
      end
    join
    // The memory-side optimisations do not change the cache's own timing
    // with a combinational memory: opt must match pipe cycle for cycle.
    if (!a_pipe.backpressure) begin
      checks++;
      if (c_opt != c_pipe) begin failures++; $display("FAIL: opt took %0d cycles, pipe %0d", c_opt, c_pipe); end
    end
  endtask

  task automatic check_range(string what, int got, int lo, int hi);
    checks++;
    if (got < lo || got > hi) begin
      failures++; $display("FAIL %s: %0d cycles, expected %0d..%0d", what, got, lo, hi);
    end
  endtask

  task automatic check_seen(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL: %s never happened", what); end
  endtask

  int c_fsm, c_pipe, c_pr;

  initial begin
    rst = 1'b1;
    do_reset();

    // 1. random program with back-pressure
    p_t = new[600]; p_a = new[600]; p_d = new[600];
    foreach (p_t[i]) begin
      p_t[i] = ($urandom_range(0, 2) == 0) ? REQ_WRITE : REQ_READ;
      p_a[i] = {16'd0, 2'($urandom_range(0, 2)), 8'd0, 2'($urandom_range(0, 3)),
                2'($urandom_range(0, 3)), 2'b00};
      p_d[i] = $urandom;
    end
    a_fsm.backpressure = 1; a_pipe.backpressure = 1; a_pr.backpressure = 1; a_opt.backpressure = 1;
    run_all(c_fsm, c_pipe, c_pr);
    a_fsm.backpressure = 0; a_pipe.backpressure = 0; a_pr.backpressure = 0; a_opt.backpressure = 0;
    $display("random: %0d requests; cycles fsm=%0d pipe=%0d pr=%0d", p_t.size(), c_fsm, c_pipe, c_pr);

    // 2. copy workload
    do_reset();
    p_t = new[128]; p_a = new[128]; p_d = new[128];
    for (int i = 0; i < 64; i++) begin
      p_t[2*i] = REQ_READ;  p_a[2*i] = 32'h1000 + 4*i;   p_d[2*i] = '0;
      p_t[2*i+1] = REQ_WRITE; p_a[2*i+1] = 32'h2000 + 4*i; p_d[2*i+1] = i;
    end
    run_all(c_fsm, c_pipe, c_pr);
    $display("copy: 128 accesses; cycles fsm=%0d pipe=%0d pr=%0d; AMAL fsm=%0.3f pipe=%0.3f pr=%0.3f",
             c_fsm, c_pipe, c_pr, c_fsm / 128.0, c_pipe / 128.0, c_pr / 128.0);
    // FSM: per line 4 (read miss) + 3*2 (read hits) + 4*2 (writes) = 18 cycles.
    check_range("fsm copy", c_fsm, 16 * 18, 16 * 18 + 1);
    // Pipelined: one cycle per access plus 2 stall cycles per read miss.
    check_range("pipe copy", c_pipe, 128 + 2 * 16, 128 + 2 * 16 + 2);
    check_range("pr copy", c_pr, 128 + 2 * 16, 128 + 2 * 16 + 2);

    // 3. increment workload
    do_reset();
    for (int i = 0; i < 64; i++) begin
      p_t[2*i] = REQ_READ;  p_a[2*i] = 32'h1000 + 4*i;   p_d[2*i] = '0;
      p_t[2*i+1] = REQ_WRITE; p_a[2*i+1] = 32'h1000 + 4*i; p_d[2*i+1] = i + 1;
    end
    run_all(c_fsm, c_pipe, c_pr);
    $display("increment: 128 accesses; cycles fsm=%0d pipe=%0d pr=%0d; AMAL fsm=%0.3f pipe=%0.3f pr=%0.3f",
             c_fsm, c_pipe, c_pr, c_fsm / 128.0, c_pipe / 128.0, c_pr / 128.0);
    check_range("fsm increment", c_fsm, 16 * 18, 16 * 18 + 1);
    check_range("pipe increment", c_pipe, 128 + 2 * 16, 128 + 2 * 16 + 2);
    check_range("pr increment", c_pr, 128 + 2 * 16, 128 + 2 * 16 + 2);
    // read the incremented array back
    p_t = new[64]; p_a = new[64]; p_d = new[64];
    for (int i = 0; i < 64; i++) begin p_t[i] = REQ_READ; p_a[i] = 32'h1000 + 4*i; p_d[i] = '0; end
    run_all(c_fsm, c_pipe, c_pr);

    // 4. write then read of the same word, back to back
    for (int i = 0; i < 32; i++) begin
      p_t[2*i] = REQ_WRITE; p_a[2*i] = 32'h10F0 + 4*(i % 4); p_d[2*i] = 32'hF00D_0000 + i;
      p_t[2*i+1] = REQ_READ; p_a[2*i+1] = 32'h10F0 + 4*(i % 4); p_d[2*i+1] = '0;
    end
    run_all(c_fsm, c_pipe, c_pr);

    $display("fsm:  refills=%0d evictions=%0d write_hits=%0d write_throughs=%0d",
             fsm_refill, fsm_evict, fsm_wr_hit, fsm_wt);
    $display("pipe: refills=%0d m0_stall_cycles=%0d m1_stall_cycles=%0d write_throughs=%0d",
             pipe_refill, pipe_m0_stall, pipe_m1_stall, pipe_wt);
    $display("pr:   refills=%0d bypasses=%0d write_throughs=%0d", pr_refill, pr_bypasses, pr_wt);
    $display("opt:  prefetch_hits=%0d prefetch_reads=%0d wb_bypasses=%0d writes_into_full_wb=%0d",
             opt_pf_hits, opt_pf_reads, opt_wb_bypass, opt_wb_full);
    check_seen("opt prefetch hit", opt_pf_hits);
    check_seen("opt prefetch read", opt_pf_reads);
    check_seen("opt write-buffer bypass", opt_wb_bypass);
    check_seen("opt write into full write buffer", opt_wb_full);
    check_seen("fsm refill", fsm_refill);
    check_seen("fsm LRU eviction", fsm_evict);
    check_seen("fsm write hit", fsm_wr_hit);
    check_seen("fsm write-through", fsm_wt);
    check_seen("pipe refill", pipe_refill);
    check_seen("pipe M0 stall", pipe_m0_stall);
    check_seen("pipe M1 stall", pipe_m1_stall);
    check_seen("pipe write-through", pipe_wt);
    check_seen("pr refill", pr_refill);
    check_seen("pr bypass", pr_bypasses);
    check_seen("pr write-through", pr_wt);

    checks   += a_fsm.checks + a_pipe.checks + a_pr.checks + a_opt.checks;
    failures += a_fsm.failures + a_pipe.failures + a_pr.failures + a_opt.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
