// tb_mtc_arbiter_fsm: self-checking test of the arbiter FSM.
//
// From each of the three states it applies every one of the eight request
// patterns and checks the state after the next clock edge against a table
// of the arbitration rules (owner first, then fetch, data path, I/O; idle
// parks on fetch). Each state is reached from reset by a short request
// sequence, so all 24 (state, pattern) pairs are covered, and the reset
// state itself is checked. A random phase then compares the FSM with the
// same table for many cycles. Any change of state must take exactly one
// clock edge.
module tb_mtc_arbiter_fsm;
  import mtc_pkg::*;

  logic   clk = 1'b0;
  logic   rst;
  logic   req_fetch, req_dp, req_io;
  state_e state;
  int     checks = 0, failures = 0;

  mtc_arbiter_fsm dut (.*);

  always #5 clk = ~clk;

  // Expected next state, written as the table of the state diagram:
  // pattern {io, dp, fetch} -> next, per current state.
  function automatic state_e expect_next(state_e cur, logic [2:0] r);
    logic f, d, i;
    {i, d, f} = r;
    case (cur)
      S_SERVE_FETCH: return f ? S_SERVE_FETCH : d ? S_SERVE_DP : i ? S_SERVE_IO : S_SERVE_FETCH;
      S_SERVE_DP:    return d ? S_SERVE_DP : f ? S_SERVE_FETCH : i ? S_SERVE_IO : S_SERVE_FETCH;
      S_SERVE_IO:    return i ? S_SERVE_IO : f ? S_SERVE_FETCH : d ? S_SERVE_DP : S_SERVE_FETCH;
      default:       return S_SERVE_FETCH;
    endcase
  endfunction

  task automatic check(state_e exp, string what);
    checks++;
    if (state !== exp) begin
      failures++;
      $display("FAIL %s: state=%0d expected=%0d", what, state, exp);
    end
  endtask

  task automatic apply(logic [2:0] r);
    {req_io, req_dp, req_fetch} = r;
    @(posedge clk);
    #1;
  endtask

  task automatic go_to(state_e s);
    rst = 1'b1; apply(3'b000); rst = 1'b0;
    case (s)
      S_SERVE_DP: apply(3'b010);
      S_SERVE_IO: apply(3'b100);
      default:    apply(3'b000);
    endcase
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    state_e cur, exp;
    rst = 1'b1;
    {req_io, req_dp, req_fetch} = 3'b111;
    repeat (2) @(posedge clk);
    #1;
    check(S_SERVE_FETCH, "reset state");
    rst = 1'b0;

    // Directed: every pattern from every state.
    for (int s = 0; s < 3; s++) begin
      for (int p = 0; p < 8; p++) begin
        go_to(state_e'(s));
        check(state_e'(s), "reach state");
        exp = expect_next(state_e'(s), 3'(p));
        apply(3'(p));
        check(exp, $sformatf("state %0d pattern %03b", s, p));
      end
    end

    // Random: long run against the table.
    rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      logic [2:0] r;
      cur = state;
      r = 3'($urandom_range(0, 7));
      exp = expect_next(cur, r);
      apply(r);
      check(exp, "random");
    end

    // Asynchronous reset takes effect without a clock edge.
    go_to(S_SERVE_IO);
    {req_io, req_dp, req_fetch} = 3'b100;
    @(negedge clk);
    rst = 1'b1;
    #1;
    check(S_SERVE_FETCH, "asynchronous reset");
    rst = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_mtc_arbiter_fsm
