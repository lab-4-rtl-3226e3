// mtc_unit_model: behavioural model of one master unit, for simulation
// only.
//
// It issues a stream of random memory operations to the controller: it
// raises request with read or write, an address and write data, and holds
// them until it sees ready. Then, one time in B2B_ONE_IN, it starts the next
// operation at once without dropping request (back-to-back accesses);
// otherwise it drops request for a random gap of 0..MAX_GAP cycles. A
// read-only unit (WRITES = 0) never writes. Addresses are drawn from a small
// window of ADDR_SPAN words so that the units' reads and writes overlap. The
// unit stops after OPS operations and raises done.
module mtc_unit_model #(
  parameter int unsigned ADDR_W     = 16,
  parameter int unsigned DATA_W     = 16,
  parameter bit          WRITES     = 1'b1,
  parameter int unsigned MAX_GAP    = 6,
  parameter int unsigned B2B_ONE_IN = 4,
  parameter int unsigned ADDR_SPAN  = 32,
  parameter int unsigned ADDR_BASE  = 0,
  parameter int unsigned OPS        = 100
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ready,
  output logic              req,
  output logic              rd,
  output logic              wr,
  output logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] wdata,
  output logic              done,
  output int unsigned       ops_done
);
  int unsigned gap;

  task automatic new_op();
    logic w;
    w = WRITES && ($urandom_range(0, 1) == 1);
    req   <= 1'b1;
    wr    <= w;
    rd    <= !w;
    addr  <= ADDR_W'(ADDR_BASE + $urandom_range(0, ADDR_SPAN - 1));
    wdata <= DATA_W'($urandom);
  endtask

  always @(posedge clk or posedge rst) begin
    if (rst) begin
      req <= 1'b0; rd <= 1'b0; wr <= 1'b0; addr <= '0; wdata <= '0;
      gap <= $urandom_range(0, MAX_GAP);
      ops_done <= 0;
    end else if (req) begin
      if (ready) begin
        ops_done <= ops_done + 1;
        if (ops_done + 1 < OPS && $urandom_range(1, B2B_ONE_IN) == 1) begin
          new_op();
        end else begin
          req <= 1'b0; rd <= 1'b0; wr <= 1'b0;
          gap <= $urandom_range(0, MAX_GAP);
        end
      end
    end else if (ops_done < OPS) begin
      if (gap == 0) new_op();
      else gap <= gap - 1;
    end
  end

  // A read is any operation that is not a write.
  always @(posedge clk) if (req && !rst) assert (rd == !wr);

  assign done = (ops_done >= OPS) && !req;
endmodule : mtc_unit_model
