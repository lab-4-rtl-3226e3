// tb_mem_traffic_ctrl: end-to-end test of the memory traffic controller at
// its default parameters.
//
// Three unit models (fetch unit: reads only, short gaps; data path and I/O
// unit: reads and writes, longer gaps, sometimes back-to-back) share a
// memory model with a random wait of 0..3 cycles per operation through the
// controller. Every cycle the testbench checks, against its own reference
// arbiter and its own copy of the memory contents:
//   - the served unit (serving) equals the reference arbiter's choice, so
//     every change of owner happens on exactly the expected clock edge;
//   - the memory port carries the served unit's request, read, write,
//     address and write data;
//   - ready reaches the served unit only, and read data returned to it
//     matches the reference memory.
// It counts each arc of the arbitration state diagram (holding the owner,
// each priority choice, the return to fetch when idle), operations held
// back-to-back by one owner, cycles in which a requesting unit was made to
// wait while another was served, and arbitration among several waiting
// units; any of these that never happened counts as a failure.
module tb_mem_traffic_ctrl;
  import mtc_pkg::*;

  localparam int unsigned AW = 16;  // the controller's default widths
  localparam int unsigned DW = 16;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic          fetch_req, fetch_rd, fetch_wr, fetch_ready;
  logic [AW-1:0] fetch_addr;
  logic [DW-1:0] fetch_rdata, fetch_wdata;
  logic          dp_req, dp_rd, dp_wr, dp_ready;
  logic [AW-1:0] dp_addr;
  logic [DW-1:0] dp_wdata, dp_rdata;
  logic          io_req, io_rd, io_wr, io_ready;
  logic [AW-1:0] io_addr;
  logic [DW-1:0] io_wdata, io_rdata;
  logic          mem_req, mem_rd, mem_wr, mem_ready;
  logic [AW-1:0] mem_addr;
  logic [DW-1:0] mem_wdata, mem_rdata;
  logic [1:0]    serving;
  logic          fetch_done, dp_done, io_done;
  int unsigned   fetch_ops, dp_ops, io_ops;

  mem_traffic_ctrl dut (
    .clk, .rst,
    .fetch_req, .fetch_rd, .fetch_addr, .fetch_rdata, .fetch_ready,
    .dp_req, .dp_rd, .dp_wr, .dp_addr, .dp_wdata, .dp_rdata, .dp_ready,
    .io_req, .io_rd, .io_wr, .io_addr, .io_wdata, .io_rdata, .io_ready,
    .mem_req, .mem_rd, .mem_wr, .mem_addr, .mem_wdata, .mem_rdata, .mem_ready,
    .serving
  );

  mtc_mem_model #(.ADDR_W(AW), .DATA_W(DW), .MAX_WAIT(3)) u_mem (
    .clk, .req(mem_req), .rd(mem_rd), .wr(mem_wr), .addr(mem_addr),
    .wdata(mem_wdata), .rdata(mem_rdata), .ready(mem_ready)
  );

  mtc_unit_model #(.ADDR_W(AW), .DATA_W(DW), .WRITES(1'b0), .MAX_GAP(3),
                   .B2B_ONE_IN(3), .OPS(1500)) u_fetch (
    .clk, .rst, .ready(fetch_ready), .req(fetch_req), .rd(fetch_rd),
    .wr(fetch_wr), .addr(fetch_addr), .wdata(fetch_wdata),
    .done(fetch_done), .ops_done(fetch_ops)
  );
  mtc_unit_model #(.ADDR_W(AW), .DATA_W(DW), .WRITES(1'b1), .MAX_GAP(6),
                   .B2B_ONE_IN(3), .OPS(800)) u_dp (
    .clk, .rst, .ready(dp_ready), .req(dp_req), .rd(dp_rd), .wr(dp_wr),
    .addr(dp_addr), .wdata(dp_wdata), .done(dp_done), .ops_done(dp_ops)
  );
  mtc_unit_model #(.ADDR_W(AW), .DATA_W(DW), .WRITES(1'b1), .MAX_GAP(10),
                   .B2B_ONE_IN(3), .OPS(500)) u_io (
    .clk, .rst, .ready(io_ready), .req(io_req), .rd(io_rd), .wr(io_wr),
    .addr(io_addr), .wdata(io_wdata), .done(io_done), .ops_done(io_ops)
  );

  int checks = 0, failures = 0;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------------------
  // Reference arbiter: the owner keeps the memory while it requests;
  // otherwise the first requester in the order fetch, data path, I/O;
  // otherwise fetch.
  int ref_state, ref_next;
  logic [DW-1:0] ref_mem [2**AW];
  initial for (int a = 0; a < 2**AW; a++) ref_mem[a] = DW'(a ^ 32'h0000_A5A5);

  function automatic int arbitrate(int owner, logic [2:0] r);
    if (r[owner]) return owner;
    for (int u = 0; u < 3; u++) if (r[u]) return u;
    return 0;
  endfunction

  always @(posedge clk or posedge rst)
    if (rst) ref_state <= 0;
    else     ref_state <= ref_next;

  // Coverage counters.
  // arcs[from][k]: k = 0 hold (fetch: fetch request), 1..3 move to unit
  // k-1 on its request, 4 return to fetch with no request at all.
  int arcs [3][5];
  int back_to_back = 0, made_to_wait = 0, contested = 0;
  int reads [3], writes [3];
  int last_ready_unit = -1;

  logic [2:0]          r;
  logic [2:0]          rdy;
  logic [2:0]          rdv, wrv;
  logic [2:0][AW-1:0]  av;
  logic [2:0][DW-1:0]  wv, rv;

  always @(negedge clk) if (!rst) begin
    r   = {io_req, dp_req, fetch_req};
    rdy = {io_ready, dp_ready, fetch_ready};
    rdv = {io_rd, dp_rd, fetch_rd};
    wrv = {io_wr, dp_wr, 1'b0};
    av  = {io_addr, dp_addr, fetch_addr};
    wv  = {io_wdata, dp_wdata, {DW{1'b0}}};
    rv  = {io_rdata, dp_rdata, fetch_rdata};

    chk(int'(serving) == ref_state, $sformatf("serving=%0d expected %0d", serving, ref_state));
    // Memory port carries the owner's signals.
    chk(mem_req == r[ref_state] && mem_rd == rdv[ref_state] && mem_wr == wrv[ref_state]
        && mem_addr == av[ref_state] && mem_wdata == wv[ref_state], "memory port = owner");
    // Ready to the owner only.
    for (int u = 0; u < 3; u++)
      chk(rdy[u] == (u == ref_state && mem_ready), $sformatf("ready of unit %0d", u));

    // Scoreboard on completion.
    if (mem_ready) begin
      if (rdv[ref_state]) begin
        chk(rv[ref_state] == ref_mem[av[ref_state]],
            $sformatf("read data unit %0d addr %0h: %0h expected %0h", ref_state,
                      av[ref_state], rv[ref_state], ref_mem[av[ref_state]]));
        reads[ref_state]++;
      end else begin
        ref_mem[av[ref_state]] = wv[ref_state];
        writes[ref_state]++;
      end
    end

    // Coverage of the arbitration rules.
    if (last_ready_unit == ref_state && r[ref_state]) back_to_back++;
    last_ready_unit = mem_ready ? ref_state : -1;
    for (int u = 0; u < 3; u++) if (u != ref_state && r[u] && mem_ready) made_to_wait++;
    if (!r[ref_state] && ($countones(r) >= 2)) contested++;

    ref_next = arbitrate(ref_state, r);
    if (r == 3'b000)                  arcs[ref_state][4]++;
    else if (ref_next == ref_state)   arcs[ref_state][0]++;
    else                              arcs[ref_state][ref_next + 1]++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static string nm [3] = '{"fetch", "data path", "I/O"};
    ref_next = 0;
    repeat (3) @(posedge clk);
    #2 rst = 1'b0;
    wait (fetch_done && dp_done && io_done);
    repeat (5) @(posedge clk);
    chk(fetch_ops == 1500 && dp_ops == 800 && io_ops == 500, "all operations completed");

    // Every arc of the state diagram must have been taken.
    for (int s = 0; s < 3; s++) begin
      for (int k = 0; k < 5; k++) begin
        // From fetch, "move to fetch" is the hold arc itself.
        if (s == 0 && k == 1) continue;
        // A move to the own state is the hold arc.
        if (k >= 1 && k <= 3 && k - 1 == s) continue;
        $display("arc from %-9s %s: %0d", nm[s],
                 k == 0 ? "hold" : k == 4 ? "idle -> fetch" : $sformatf("-> %s", nm[k-1]),
                 arcs[s][k]);
        chk(arcs[s][k] > 0, $sformatf("arc %0d/%0d never taken", s, k));
      end
    end
    $display("back-to-back holds %0d, waits %0d, contested choices %0d",
             back_to_back, made_to_wait, contested);
    chk(back_to_back > 0, "back-to-back hold never happened");
    chk(made_to_wait > 0, "no unit was ever made to wait");
    chk(contested > 0, "no contested arbitration");
    for (int u = 0; u < 3; u++) begin
      $display("%-9s reads %0d writes %0d", nm[u], reads[u], writes[u]);
      chk(reads[u] > 0, "unit never read");
      if (u != 0) chk(writes[u] > 0, "unit never wrote");
    end
    chk(writes[0] == 0, "fetch unit wrote");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_mem_traffic_ctrl
