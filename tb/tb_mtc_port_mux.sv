// tb_mtc_port_mux: self-checking test of the three-port multiplexer.
//
// For each select value (the three states) and many random input sets it
// checks that the memory port carries exactly the served unit's request,
// read, write, address and write data, that only the served unit receives
// ready and read data, and that the others see ready low and data zero.
// The unused select code must leave the memory port idle.
module tb_mtc_port_mux;
  import mtc_pkg::*;

  localparam int unsigned AW = 16;
  localparam int unsigned DW = 16;

  state_e                             sel;
  logic [NUM_UNITS-1:0]               unit_req, unit_rd, unit_wr, unit_ready;
  logic [NUM_UNITS-1:0][AW-1:0]       unit_addr;
  logic [NUM_UNITS-1:0][DW-1:0]       unit_wdata, unit_rdata;
  logic                               mem_req, mem_rd, mem_wr, mem_ready;
  logic [AW-1:0]                      mem_addr;
  logic [DW-1:0]                      mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  mtc_port_mux #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (sel=%0d)", what, sel);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      int s;
      s = n % 3;
      sel = state_e'(s);
      for (int u = 0; u < 3; u++) begin
        unit_req[u]   = 1'($urandom);
        unit_rd[u]    = 1'($urandom);
        unit_wr[u]    = 1'($urandom);
        unit_addr[u]  = AW'($urandom);
        unit_wdata[u] = DW'($urandom);
      end
      mem_ready = 1'($urandom);
      mem_rdata = DW'($urandom);
      #1;
      chk(mem_req   == unit_req[s],   "mem_req");
      chk(mem_rd    == unit_rd[s],    "mem_rd");
      chk(mem_wr    == unit_wr[s],    "mem_wr");
      chk(mem_addr  == unit_addr[s],  "mem_addr");
      chk(mem_wdata == unit_wdata[s], "mem_wdata");
      for (int u = 0; u < 3; u++) begin
        chk(unit_ready[u] == ((u == s) ? mem_ready : 1'b0), $sformatf("ready of unit %0d", u));
        chk(unit_rdata[u] == ((u == s) ? mem_rdata : '0), $sformatf("rdata of unit %0d", u));
      end
    end
    // Unused code: idle memory port, no ready anywhere.
    sel = state_e'(2'd3);
    unit_req = '1; unit_rd = '1; unit_wr = '1; mem_ready = 1'b1;
    #1;
    chk(!mem_req && !mem_rd && !mem_wr, "unused select idles the memory");
    chk(unit_ready == '0, "unused select gives no ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_mtc_port_mux
