// mtc_mem_model: behavioural model of the shared memory, for simulation
// only (kind: behavioural model, not synthesizable intent).
//
// A word-addressed memory of 2**ADDR_W words. A memory operation starts
// when request is high together with read or write, and completes after a
// random wait of 0..MAX_WAIT cycles: ready is then high for one cycle,
// with the read word on rdata for a read, and a write takes effect at the
// end of that cycle. If request stays high the next operation begins on
// the following cycle. Dropping request abandons the operation. Initial
// contents follow init_word(a) = a ^ 16'hA5A5 (truncated or extended to
// DATA_W), so a checker can compute any unwritten word itself.
module mtc_mem_model #(
  parameter int unsigned ADDR_W   = 16,
  parameter int unsigned DATA_W   = 16,
  parameter int unsigned MAX_WAIT = 3
) (
  input  logic              clk,
  input  logic              req,
  input  logic              rd,
  input  logic              wr,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  output logic              ready
);
  logic [DATA_W-1:0] mem [2**ADDR_W];
  int unsigned cnt = 0;
  int unsigned wait_cycles = 0;

  function automatic logic [DATA_W-1:0] init_word(int unsigned a);
    return DATA_W'(a ^ 32'h0000_A5A5);
  endfunction

  initial for (int a = 0; a < 2**ADDR_W; a++) mem[a] = init_word(a);

  assign ready = req && (rd || wr) && (cnt == wait_cycles);
  assign rdata = (ready && rd) ? mem[addr] : '0;

  always @(posedge clk) begin
    if (ready) begin
      if (wr) mem[addr] <= wdata;
      cnt         <= 0;
      wait_cycles <= $urandom_range(0, MAX_WAIT);
    end else if (req && (rd || wr)) begin
      cnt <= cnt + 1;
    end else begin
      cnt <= 0;
    end
  end
endmodule : mtc_mem_model
