// fsm_cache_ctrl_tb: self-checking test of the FSM cache control unit.
//
// The datapath is replaced by the testbench, which drives the status inputs
// (tag matches, request type, set index) and checks, cycle by cycle, the row
// of the control signal table the unit puts out: request ready, response
// valid, memory request valid and op, request and refill register enables,
// the enables of both tag arrays and the data array, the data-array and
// word-enable selects, z4b and the way select. The scenarios walk through a
// read miss (MT, R0, R1, MRD), a read hit (MT, MRD), LRU victim choice in a
// set, a match on an invalid line, write hit and write miss (MT, MWD), and
// a held response.
`timescale 1ns/1ps
module fsm_cache_ctrl_tb;
  import mem_pkg::*;

  logic      clk = 1'b0, rst;
  logic      cachereq_val, cachereq_rdy, cacheresp_val, cacheresp_rdy, memreq_val;
  logic      tag_match0, tag_match1, req_idx;
  req_type_e req_type;
  logic      req_sel, reqreg_en, refill_en, tarray0_en, tarray0_wen, tarray1_en, tarray1_wen;
  logic      darray_en, darray_wen, darray_sel, worden_sel, z4b_sel, way_sel;
  mem_op_e   memreq_op;

  always #5 clk = ~clk;

  fsm_cache_ctrl dut (.*);

  int checks = 0, failures = 0;

  // One table row:
  // rdy respv memv op reqen refen t0en t0wen t1en t1wen den dwen dsel wsel z4b way
  typedef logic [15:0] row_t;

  function automatic row_t row();
    return {cachereq_rdy, cacheresp_val, memreq_val, memreq_op == MEM_WR_WORD,
            reqreg_en, refill_en, tarray0_en, tarray0_wen, tarray1_en, tarray1_wen,
            darray_en, darray_wen, darray_sel, worden_sel, z4b_sel, way_sel};
  endfunction

  // Expected rows; "way" and the register enables are filled in per use.
  function automatic row_t r_mt(logic val);
    return {1'b1, 1'b0, 1'b0, 1'b0, val, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0,
            1'b0, 1'b0, 1'b0, 1'b0, 1'b0, way_sel};  // way is don't-care in MT
  endfunction
  function automatic row_t r_mrd(logic way);
    return {1'b0, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0,
            1'b1, 1'b0, 1'b0, 1'b0, 1'b0, way};
  endfunction
  function automatic row_t r_r0();
    return {1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0,
            1'b0, 1'b0, 1'b0, 1'b0, 1'b1, way_sel};
  endfunction
  function automatic row_t r_r1(logic victim);
    return {1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, !victim, !victim, victim, victim,
            1'b1, 1'b1, 1'b1, 1'b1, 1'b0, victim};
  endfunction
  function automatic row_t r_mwd(logic hit, logic way);
    return {1'b0, 1'b1, 1'b1, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b0,
            hit, hit, 1'b0, 1'b0, 1'b0, hit ? way : way_sel};
  endfunction

  task automatic expect_row(string what, row_t e);
    #1;
    checks++;
    if (row() !== e) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, row(), e);
    end
  endtask

  // Presents a request in MT with the given status inputs.
  task automatic present(req_type_e t, logic idx, logic m0, logic m1);
    @(negedge clk);
    cachereq_val = 1'b1; req_type = t; req_idx = idx; tag_match0 = m0; tag_match1 = m1;
    expect_row("MT", r_mt(1'b1));
    @(negedge clk);
    cachereq_val = 1'b0; tag_match0 = 1'b0; tag_match1 = 1'b0;
  endtask

  task automatic read_miss(logic idx, logic victim);
    present(REQ_READ, idx, 1'b0, 1'b0);
    expect_row("R0", r_r0());
    @(negedge clk); expect_row("R1", r_r1(victim));
    @(negedge clk); expect_row("MRD after refill", r_mrd(victim));
  endtask

  task automatic read_hit(logic idx, logic way);
    present(REQ_READ, idx, !way, way);
    expect_row("MRD", r_mrd(way));
  endtask

  initial begin
    rst = 1'b1; cachereq_val = 1'b0; cacheresp_rdy = 1'b1;
    tag_match0 = 1'b0; tag_match1 = 1'b0; req_idx = 1'b0; req_type = REQ_READ;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    expect_row("idle MT", r_mt(1'b0));

    read_miss(1'b0, 1'b1);        // use[0] = 0 after reset, victim way 1
    read_hit(1'b0, 1'b1);
    read_miss(1'b0, 1'b0);        // way 1 used last, victim way 0
    read_hit(1'b0, 1'b1);         // now way 1 is most recent
    read_miss(1'b0, 1'b0);        // so way 0 is the victim again
    read_hit(1'b0, 1'b0);
    read_miss(1'b0, 1'b1);        // way 0 used last, victim way 1
    // set 1 is still empty: a tag match on an invalid line is a miss
    present(REQ_READ, 1'b1, 1'b1, 1'b1);
    expect_row("R0 on invalid match", r_r0());
    @(negedge clk); expect_row("R1", r_r1(1'b1));
    @(negedge clk); expect_row("MRD", r_mrd(1'b1));

    // write hit in way 1 of set 1, then write miss
    present(REQ_WRITE, 1'b1, 1'b0, 1'b1);
    expect_row("MWD hit", r_mwd(1'b1, 1'b1));
    present(REQ_WRITE, 1'b1, 1'b0, 1'b0);
    expect_row("MWD miss", r_mwd(1'b0, 1'b0));

    // held response
    present(REQ_READ, 1'b1, 1'b0, 1'b1);
    cacheresp_rdy = 1'b0;
    expect_row("MRD held", r_mrd(1'b1));
    @(negedge clk); expect_row("MRD still held", r_mrd(1'b1));
    cacheresp_rdy = 1'b1;
    @(negedge clk); expect_row("back to MT", r_mt(1'b0));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
