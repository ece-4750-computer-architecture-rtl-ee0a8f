// cache_agent: testbench driver and checker for one cache port.
//
// The agent presents requests on a val/rdy request port and checks every
// response, in order, against a reference memory it keeps itself (an
// associative array; words never written read as zero). Requests are issued
// back to back: a new one is presented in the cycle after the previous one
// was taken. With backpressure set, the response ready is dropped at random.
// Tasks: clear() forgets the reference memory (call it with the cache's
// reset), issue() sends one request (called at a falling edge), drain() waits for all responses.
`timescale 1ns/1ps
module cache_agent
  import mem_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  output logic        req_val,
  input  logic        req_rdy,
  output cache_req_t  req_msg,
  input  logic        resp_val,
  output logic        resp_rdy,
  input  cache_resp_t resp_msg
);

  int  checks = 0, failures = 0, n_resp = 0;
  bit  backpressure = 0;

  word_t       ref_mem [addr_t];
  cache_resp_t exp_q [$];

  initial begin
    req_val  = 1'b0;
    req_msg  = '0;
    resp_rdy = 1'b1;
  end

  always @(posedge clk) begin
    #2;
    resp_rdy = backpressure ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  always @(negedge clk) begin
    #2;
    if (!rst && resp_val && resp_rdy) begin
      cache_resp_t e;
      n_resp++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL %m: unexpected response");
      end else begin
        e = exp_q.pop_front();
        if (resp_msg.typ != e.typ || (e.typ == REQ_READ && resp_msg.data != e.data)) begin
          failures++;
          $display("FAIL %m: got %s %h expected %s %h", resp_msg.typ.name(), resp_msg.data,
                   e.typ.name(), e.data);
        end
      end
    end
  end

  function automatic void clear();
    ref_mem.delete();
    exp_q.delete();
  endfunction

  // Call at a falling clock edge; returns at the falling edge after the
  // request was taken, so calls in a row present requests back to back.
  task automatic issue(input req_type_e t, input addr_t a, input word_t d);
    req_val = 1'b1;
    req_msg = '{typ: t, addr: a, data: d};
    exp_q.push_back('{typ: t, data: ref_mem.exists(a) ? ref_mem[a] : '0});
    if (t == REQ_WRITE) ref_mem[a] = d;
    #1;
    while (!req_rdy) begin @(negedge clk); #1; end
    @(negedge clk);
    req_val = 1'b0;
  endtask

  task automatic drain();
    while (exp_q.size() != 0) @(negedge clk);
  endtask

endmodule
