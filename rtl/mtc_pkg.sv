// mtc_pkg: types and constants shared by the memory traffic controller.
//
// The controller serves one of three master units at a time. The state of
// its arbitration FSM names the unit being served, and the same encoding is
// used as the select of the port multiplexer (a Moore machine: the
// multiplexer setting is a function of the state alone). The three state
// names follow the state diagram of the design; the two-bit binary encoding
// is this design's own choice.
package mtc_pkg;

  // Number of master units sharing the memory: fetch unit, data path, I/O.
  localparam int unsigned NUM_UNITS = 3;

  // Unit index, also used as the index into the per-unit port arrays.
  typedef enum logic [1:0] {
    UNIT_FETCH = 2'd0,
    UNIT_DP    = 2'd1,
    UNIT_IO    = 2'd2
  } unit_e;

  // Arbiter state: which unit the controller is serving. The encoding is
  // deliberately the unit index, so the state drives the multiplexer
  // select without further decoding.
  typedef enum logic [1:0] {
    S_SERVE_FETCH = 2'd0,
    S_SERVE_DP    = 2'd1,
    S_SERVE_IO    = 2'd2
  } state_e;

endpackage : mtc_pkg
