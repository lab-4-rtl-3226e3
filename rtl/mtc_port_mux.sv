// mtc_port_mux: output decoding logic of the memory traffic controller, a
// three-port multiplexer between the master units and the memory.
//
// The select is the arbiter state, so every output is set by the state
// alone (Moore outputs), while the selected unit's signals pass through
// combinationally. In a given state the served unit's request, read, write,
// address and write data drive the memory port; the memory's ready is
// passed back to the served unit only, and every other unit sees ready
// low, which keeps its request pending. Read data goes to the served unit
// and is held at zero towards the others. Steering ready only to the
// served unit is the design's rule; zeroing the read data of the units not
// served is this implementation's choice (the data bus of a unit is
// modelled as separate read and write buses instead of a tri-state bus).
//
// Interface: one entry per unit in each unit_* array, indexed by
// mtc_pkg::unit_e (0 fetch, 1 data path, 2 I/O). The fetch unit only
// reads: its unit_wr and unit_wdata entries are tied low by the parent.
// Timing: purely combinational.
module mtc_port_mux
  import mtc_pkg::*;
#(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned DATA_W = 16
) (
  input  state_e                                sel,
  // master side
  input  logic [NUM_UNITS-1:0]                  unit_req,
  input  logic [NUM_UNITS-1:0]                  unit_rd,
  input  logic [NUM_UNITS-1:0]                  unit_wr,
  input  logic [NUM_UNITS-1:0][ADDR_W-1:0]      unit_addr,
  input  logic [NUM_UNITS-1:0][DATA_W-1:0]      unit_wdata,
  output logic [NUM_UNITS-1:0]                  unit_ready,
  output logic [NUM_UNITS-1:0][DATA_W-1:0]      unit_rdata,
  // memory side
  output logic                                  mem_req,
  output logic                                  mem_rd,
  output logic                                  mem_wr,
  output logic [ADDR_W-1:0]                     mem_addr,
  output logic [DATA_W-1:0]                     mem_wdata,
  input  logic                                  mem_ready,
  input  logic [DATA_W-1:0]                     mem_rdata
);

  logic [1:0] idx;
  assign idx = sel;

  always_comb begin
    // Towards the memory: the served unit only. The unused select code
    // never occurs (the arbiter leaves it on the next edge) and drives an
    // idle memory port.
    mem_req   = 1'b0;
    mem_rd    = 1'b0;
    mem_wr    = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    if (idx < 2'(NUM_UNITS)) begin
      mem_req   = unit_req[idx];
      mem_rd    = unit_rd[idx];
      mem_wr    = unit_wr[idx];
      mem_addr  = unit_addr[idx];
      mem_wdata = unit_wdata[idx];
    end
    // Towards the units: ready and data to the served unit only.
    for (int u = 0; u < NUM_UNITS; u++) begin
      unit_ready[u] = (idx == 2'(u)) && mem_ready;
      unit_rdata[u] = (idx == 2'(u)) ? mem_rdata : '0;
    end
  end

  // At most one unit ever sees ready.
  always_comb a_one_ready: assert ($onehot0(unit_ready));

endmodule : mtc_port_mux
