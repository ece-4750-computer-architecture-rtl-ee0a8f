// fsm_cache_dpath_tb: self-checking test of the FSM cache datapath.
//
// The testbench plays the control unit and the memory. It drives the control
// signals the way each state would and checks the datapath's outputs:
// tag comparison in both ways (MT), the line address with the low four bits
// cleared for a refill (z4b, R0), refill of a whole line and its tag into a
// chosen way (R1), selection of the addressed word on a read (MRD), and a
// write hit changing exactly one word, with the word address and data sent
// to memory (MWD). It also checks that the request register keeps the
// request once the incoming message changes.
`timescale 1ns/1ps
module fsm_cache_dpath_tb;
  import mem_pkg::*;

  logic        clk = 1'b0, rst;
  cache_req_t  cachereq_msg;
  cache_resp_t cacheresp_msg;
  mem_req_t    memreq_msg;
  line_t       memresp_line;
  logic        req_sel, reqreg_en, refill_en, tarray0_en, tarray0_wen, tarray1_en, tarray1_wen;
  logic        darray_en, darray_wen, darray_sel, worden_sel, z4b_sel, way_sel;
  mem_op_e     memreq_op;
  logic        tag_match0, tag_match1, req_idx;
  req_type_e   req_type;

  always #5 clk = ~clk;

  fsm_cache_dpath dut (.*);

  int checks = 0, failures = 0;
  line_t lines [4];   // reference data array, entry {idx, way}

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic idle();
    req_sel = 1'b0; reqreg_en = 1'b0; refill_en = 1'b0;
    tarray0_en = 1'b0; tarray0_wen = 1'b0; tarray1_en = 1'b0; tarray1_wen = 1'b0;
    darray_en = 1'b0; darray_wen = 1'b0; darray_sel = 1'b0; worden_sel = 1'b0;
    z4b_sel = 1'b0; way_sel = 1'b0; memreq_op = MEM_RD_LINE;
  endtask

  // MT: take the request and compare tags.
  task automatic mt(req_type_e t, addr_t a, word_t d, output logic m0, output logic m1);
    @(negedge clk);
    idle();
    cachereq_msg = '{typ: t, addr: a, data: d};
    req_sel = 1'b1; reqreg_en = 1'b1; tarray0_en = 1'b1; tarray1_en = 1'b1;
    #1;
    m0 = tag_match0; m1 = tag_match1;
    check("req_idx", req_idx == a[4]);
    check("req_type", req_type == t);
    @(negedge clk);
    idle();
    cachereq_msg = '{typ: REQ_READ, addr: 32'hFFFF_FFF0, data: 32'hDEAD_DEAD};  // junk
  endtask

  // R0 then R1: refill the line into the way.
  task automatic refill(addr_t a, logic way, line_t l);
    z4b_sel = 1'b1; refill_en = 1'b1; memreq_op = MEM_RD_LINE;
    memresp_line = l;
    #1;
    check("z4b line address", memreq_msg.addr == {a[31:4], 4'h0} && memreq_msg.op == MEM_RD_LINE);
    @(negedge clk);
    idle();
    memresp_line = '0;
    tarray0_en = !way; tarray0_wen = !way; tarray1_en = way; tarray1_wen = way;
    darray_en = 1'b1; darray_wen = 1'b1; darray_sel = 1'b1; worden_sel = 1'b1; way_sel = way;
    lines[{a[4], way}] = l;
    @(negedge clk);
    idle();
  endtask

  // MRD: read the word.
  task automatic mrd(addr_t a, logic way);
    darray_en = 1'b1; way_sel = way;
    #1;
    check($sformatf("read word %h", a), cacheresp_msg.data == lines[{a[4], way}][a[3:2]*32 +: 32]);
    @(negedge clk);
    idle();
  endtask

  // MWD: write-through, and write the word on a hit.
  task automatic mwd(addr_t a, word_t d, logic hit, logic way);
    memreq_op = MEM_WR_WORD; darray_en = hit; darray_wen = hit; way_sel = way;
    #1;
    check("write-through request", memreq_msg.op == MEM_WR_WORD && memreq_msg.addr == a
                                   && memreq_msg.data == d);
    if (hit) lines[{a[4], way}][a[3:2]*32 +: 32] = d;
    @(negedge clk);
    idle();
  endtask

  logic m0, m1;

  initial begin
    rst = 1'b1; idle(); cachereq_msg = '0; memresp_line = '0;
    for (int i = 0; i < 4; i++) lines[i] = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;

    for (int n = 0; n < 50; n++) begin
      addr_t a, b;
      line_t l;
      logic  way;
      word_t d;
      a   = $urandom & 32'h0000_FFFC;
      d   = $urandom;
      way = 1'($urandom);
      l   = {$urandom, $urandom, $urandom, $urandom};
      // read miss: no way matches a fresh tag (tags differ from a's line)
      mt(REQ_READ, a, '0, m0, m1);
      refill(a, way, l);
      // the same line now matches in that way only, unless the other way
      // happens to hold the same tag
      mt(REQ_READ, a, '0, m0, m1);
      check("tag match in refilled way", way ? m1 : m0);
      mrd(a, way);
      // another word of the same line
      b = {a[31:4], 2'($urandom), 2'b00};
      mt(REQ_READ, b, '0, m0, m1);
      mrd(b, way);
      // write hit to one word, then read all four words
      mt(REQ_WRITE, b, d, m0, m1);
      mwd(b, d, 1'b1, way);
      for (int w = 0; w < 4; w++) begin
        addr_t c;
        c = {a[31:4], 2'(w), 2'b00};
        mt(REQ_READ, c, '0, m0, m1);
        mrd(c, way);
      end
      // a different tag in the same set does not match the refilled way
      mt(REQ_READ, a ^ 32'h0001_0000, '0, m0, m1);
      check("no match for other tag", !(way ? m1 : m0));
    end

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
