// fsm_cache_ctrl: control unit of the FSM cache.
//
// A finite-state machine steps each request through the lecture's states:
//   MT   check tag: accept a request and compare both ways' tags
//   MRD  read the data array and send the read response
//   R0   send a line read to memory (refill) and capture the line
//   R1   write the refill line and its tag into the victim way
//   MWD  write the word to memory (write-through); on a hit also write it
//        into the data array; send the write acknowledgement
// Read hit: MT, MRD (two cycles). Read miss: MT, R0, R1, MRD (four cycles).
// Write hit or miss: MT, MWD (two cycles); a write miss allocates nothing.
//
// The unit keeps one valid bit per line and one use bit per set. The use bit
// names the way used last in that set and is updated on every hit and every
// refill; the victim on a miss is the other way (victim = !use[idx]), which is
// LRU for two ways. A response waits in MRD or MWD until cacheresp_rdy. The
// states, valid and use bits and the victim rule follow the lecture; the
// handshake, reset to state MT with all lines invalid, and the registered hit
// way are this design's choices.
module fsm_cache_ctrl
  import mem_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      cachereq_val,
  output logic      cachereq_rdy,
  output logic      cacheresp_val,
  input  logic      cacheresp_rdy,
  output logic      memreq_val,
  // status from the datapath
  input  logic      tag_match0,
  input  logic      tag_match1,
  input  req_type_e req_type,
  input  logic      req_idx,
  // controls to the datapath
  output logic      req_sel,
  output logic      reqreg_en,
  output logic      refill_en,
  output logic      tarray0_en,
  output logic      tarray0_wen,
  output logic      tarray1_en,
  output logic      tarray1_wen,
  output logic      darray_en,
  output logic      darray_wen,
  output logic      darray_sel,
  output logic      worden_sel,
  output logic      z4b_sel,
  output logic      way_sel,
  output mem_op_e   memreq_op
);

  typedef enum logic [2:0] {ST_MT, ST_MRD, ST_R0, ST_R1, ST_MWD} state_e;

  state_e     state, state_next;
  logic [1:0] valid0, valid1;   // one valid bit per line, indexed by set
  logic [1:0] use_bit;          // last used way, per set
  logic       hit_r, way_r;     // hit and hit way found in MT
  logic       hit0, hit1, hit, victim;

  assign hit0   = tag_match0 && valid0[req_idx];
  assign hit1   = tag_match1 && valid1[req_idx];
  assign hit    = hit0 || hit1;
  assign victim = !use_bit[req_idx];

  always_comb begin
    state_next = state;
    unique case (state)
      ST_MT:  if (cachereq_val) begin
                if (req_type == REQ_WRITE) state_next = ST_MWD;
                else if (hit)              state_next = ST_MRD;
                else                       state_next = ST_R0;
              end
      ST_R0:  state_next = ST_R1;
      ST_R1:  state_next = ST_MRD;
      ST_MRD, ST_MWD: if (cacheresp_rdy) state_next = ST_MT;
      default: state_next = ST_MT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= ST_MT;
      valid0  <= '0;
      valid1  <= '0;
      use_bit <= '0;
      hit_r   <= 1'b0;
      way_r   <= 1'b0;
    end else begin
      state <= state_next;
      if (state == ST_MT && cachereq_val) begin
        hit_r <= hit;
        way_r <= hit1;
        if (hit) use_bit[req_idx] <= hit1;
      end
      if (state == ST_R1) begin
        if (victim) valid1[req_idx] <= 1'b1;
        else        valid0[req_idx] <= 1'b1;
        use_bit[req_idx] <= victim;
        way_r            <= victim;
      end
    end
  end

  // The request register is bypassed while the tag check reads the request.
  assign req_sel = (state == ST_MT);

  // Control signal table, one row per state.
  always_comb begin
    cachereq_rdy  = 1'b0;
    cacheresp_val = 1'b0;
    memreq_val    = 1'b0;
    memreq_op     = MEM_RD_LINE;
    reqreg_en     = 1'b0;
    refill_en     = 1'b0;
    tarray0_en    = 1'b0;
    tarray0_wen   = 1'b0;
    tarray1_en    = 1'b0;
    tarray1_wen   = 1'b0;
    darray_en     = 1'b0;
    darray_wen    = 1'b0;
    darray_sel    = 1'b0;
    worden_sel    = 1'b0;
    z4b_sel       = 1'b0;
    way_sel       = way_r;
    unique case (state)
      ST_MT: begin
        cachereq_rdy = 1'b1;
        reqreg_en    = cachereq_val;
        tarray0_en   = 1'b1;
        tarray1_en   = 1'b1;
      end
      ST_MRD: begin
        darray_en     = 1'b1;
        cacheresp_val = 1'b1;
      end
      ST_R0: begin
        memreq_val = 1'b1;
        memreq_op  = MEM_RD_LINE;
        z4b_sel    = 1'b1;
        refill_en  = 1'b1;
      end
      ST_R1: begin
        tarray0_en  = !victim;
        tarray0_wen = !victim;
        tarray1_en  = victim;
        tarray1_wen = victim;
        darray_en   = 1'b1;
        darray_wen  = 1'b1;
        darray_sel  = 1'b1;
        worden_sel  = 1'b1;
        way_sel     = victim;
      end
      ST_MWD: begin
        memreq_val    = 1'b1;
        memreq_op     = MEM_WR_WORD;
        darray_en     = hit_r;
        darray_wen    = hit_r;
        cacheresp_val = 1'b1;
      end
      default: ;
    endcase
  end

endmodule
