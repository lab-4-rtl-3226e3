// mem_traffic_ctrl: memory traffic controller. One memory is shared by
// three master units (the CPU's instruction fetch unit, the CPU's data
// path and a DMA-capable I/O unit); the controller lets exactly one of
// them reach the memory at a time.
//
// It is a Moore machine in two parts: mtc_arbiter_fsm holds the state
// (which unit is served) and decides the next one, and mtc_port_mux
// decodes the state into the multiplexer setting. A unit asks for memory by
// raising its request and holds it until it sees its ready; the memory's
// ready reaches only the served unit, so the others simply wait. There is
// no separate grant signal. Arbitration: the served unit keeps the memory
// while its request is active; after that the fetch unit wins, then the
// data path, then the I/O unit; with no request the controller parks on the
// fetch unit.
//
// Interface (signal sets as in the design's block diagram): the fetch unit
// has request, read, address, read data and ready; the data path and the
// I/O unit have request, read, write, address, write data, read data and
// ready; the memory port has request, read, write, address, write data,
// read data and ready. Each bidirectional data bus of the diagram appears
// here as a read bus and a write bus. serving reports the current state
// (0 fetch, 1 data path, 2 I/O). Widths are parameters; the 16-bit
// defaults are this implementation's choice.
// Timing: a unit already being served (including the fetch unit while the
// controller is parked) reaches the memory in the same cycle; any other
// unit reaches it one clock edge after its request is seen with the
// current owner's request low. Reset is asynchronous and active high.
module mem_traffic_ctrl
  import mtc_pkg::*;
#(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  // fetch unit (read only)
  input  logic              fetch_req,
  input  logic              fetch_rd,
  input  logic [ADDR_W-1:0] fetch_addr,
  output logic [DATA_W-1:0] fetch_rdata,
  output logic              fetch_ready,
  // data path
  input  logic              dp_req,
  input  logic              dp_rd,
  input  logic              dp_wr,
  input  logic [ADDR_W-1:0] dp_addr,
  input  logic [DATA_W-1:0] dp_wdata,
  output logic [DATA_W-1:0] dp_rdata,
  output logic              dp_ready,
  // I/O unit
  input  logic              io_req,
  input  logic              io_rd,
  input  logic              io_wr,
  input  logic [ADDR_W-1:0] io_addr,
  input  logic [DATA_W-1:0] io_wdata,
  output logic [DATA_W-1:0] io_rdata,
  output logic              io_ready,
  // memory
  output logic              mem_req,
  output logic              mem_rd,
  output logic              mem_wr,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata,
  input  logic              mem_ready,
  // observability
  output logic [1:0]        serving
);

  state_e state;

  logic [NUM_UNITS-1:0]             unit_req, unit_rd, unit_wr, unit_ready;
  logic [NUM_UNITS-1:0][ADDR_W-1:0] unit_addr;
  logic [NUM_UNITS-1:0][DATA_W-1:0] unit_wdata, unit_rdata;

  assign unit_req   = {io_req, dp_req, fetch_req};
  assign unit_rd    = {io_rd, dp_rd, fetch_rd};
  assign unit_wr    = {io_wr, dp_wr, 1'b0};
  assign unit_addr  = {io_addr, dp_addr, fetch_addr};
  assign unit_wdata = {io_wdata, dp_wdata, {DATA_W{1'b0}}};

  mtc_arbiter_fsm u_fsm (
    .clk       (clk),
    .rst       (rst),
    .req_fetch (fetch_req),
    .req_dp    (dp_req),
    .req_io    (io_req),
    .state     (state)
  );

  mtc_port_mux #(
    .ADDR_W (ADDR_W),
    .DATA_W (DATA_W)
  ) u_mux (
    .sel        (state),
    .unit_req   (unit_req),
    .unit_rd    (unit_rd),
    .unit_wr    (unit_wr),
    .unit_addr  (unit_addr),
    .unit_wdata (unit_wdata),
    .unit_ready (unit_ready),
    .unit_rdata (unit_rdata),
    .mem_req    (mem_req),
    .mem_rd     (mem_rd),
    .mem_wr     (mem_wr),
    .mem_addr   (mem_addr),
    .mem_wdata  (mem_wdata),
    .mem_ready  (mem_ready),
    .mem_rdata  (mem_rdata)
  );

  assign fetch_ready = unit_ready[UNIT_FETCH];
  assign dp_ready    = unit_ready[UNIT_DP];
  assign io_ready    = unit_ready[UNIT_IO];
  assign fetch_rdata = unit_rdata[UNIT_FETCH];
  assign dp_rdata    = unit_rdata[UNIT_DP];
  assign io_rdata    = unit_rdata[UNIT_IO];
  assign serving     = state;

endmodule : mem_traffic_ctrl
