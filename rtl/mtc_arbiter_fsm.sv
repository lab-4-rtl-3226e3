// mtc_arbiter_fsm: next-state decoding logic and state memory of the memory
// traffic controller.
//
// A three-state Moore machine whose state says which master unit owns the
// memory: the fetch unit, the data path or the I/O unit. Every clock it
// looks at the three request lines and picks the next owner:
//   1. the current owner, while its request stays active (an owner is never
//      pre-empted, so a unit keeps the memory for as many back-to-back
//      operations as it holds its request for);
//   2. otherwise the fetch unit, then the data path, then the I/O unit;
//   3. with no request at all, the fetch unit (it is the most frequent
//      user, so parking there lets its next access start without a
//      switch cycle).
// Reset puts the machine in the fetch state. These rules and the priority
// order are the design's; the two-bit encoding (see mtc_pkg), the
// asynchronous active-high reset and the recovery from the unused fourth
// code (back to the fetch state) are this implementation's choices.
//
// Interface: req_fetch, req_dp and req_io are the units' request lines;
// state is the registered current state.
// Timing: a change of owner takes effect on the clock edge after the
// request pattern that causes it; state is a flip-flop output.
module mtc_arbiter_fsm
  import mtc_pkg::*;
(
  input  logic   clk,
  input  logic   rst,        // asynchronous, active high
  input  logic   req_fetch,
  input  logic   req_dp,
  input  logic   req_io,
  output state_e state
);

  state_e state_q, state_d;

  // Next state decoding logic.
  always_comb begin
    unique case (state_q)
      S_SERVE_DP: begin
        if      (req_dp)    state_d = S_SERVE_DP;
        else if (req_fetch) state_d = S_SERVE_FETCH;
        else if (req_io)    state_d = S_SERVE_IO;
        else                state_d = S_SERVE_FETCH;  // no request: park
      end
      S_SERVE_IO: begin
        if      (req_io)    state_d = S_SERVE_IO;
        else if (req_fetch) state_d = S_SERVE_FETCH;
        else if (req_dp)    state_d = S_SERVE_DP;
        else                state_d = S_SERVE_FETCH;  // no request: park
      end
      default: begin  // S_SERVE_FETCH, and the unused code
        if      (req_fetch) state_d = S_SERVE_FETCH;
        else if (req_dp)    state_d = S_SERVE_DP;
        else if (req_io)    state_d = S_SERVE_IO;
        else                state_d = S_SERVE_FETCH;
      end
    endcase
  end

  // State memory.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) state_q <= S_SERVE_FETCH;
    else     state_q <= state_d;
  end

  assign state = state_q;

  // The owner is only ever left when its own request is inactive.
  a_no_preempt_dp: assert property (@(posedge clk) disable iff (rst)
      (state_q == S_SERVE_DP && req_dp) |=> state_q == S_SERVE_DP);
  a_no_preempt_io: assert property (@(posedge clk) disable iff (rst)
      (state_q == S_SERVE_IO && req_io) |=> state_q == S_SERVE_IO);
  a_no_preempt_fetch: assert property (@(posedge clk) disable iff (rst)
      (state_q == S_SERVE_FETCH && req_fetch) |=> state_q == S_SERVE_FETCH);

endmodule : mtc_arbiter_fsm
