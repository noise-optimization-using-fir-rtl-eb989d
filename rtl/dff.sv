// dff: WIDTH-bit positive-edge D flip-flop with synchronous reset, built from
// two gated D latches in master-slave arrangement.
//
// The master latch is transparent while clk is 0 and takes the next value;
// the slave latch is transparent while clk is 1 and passes the master's held
// value to q. q therefore changes only after a rising clock edge, and then
// equals what d was just before it (q_next = d). When rst is 1 the master is
// fed RESET_VALUE instead of d, so q takes RESET_VALUE on the next rising
// edge. Used for every delay element of the filter and for the carry of the
// digit-serial subtractor. The two latches are intended and show up as
// latches, not as flip-flops, in synthesis. Because a lint tool sees a latch
// as combinational logic, a path that leaves q and comes back to d through
// logic is reported as a combinational loop; it is broken in time by the two
// latches never being transparent together (master on clk = 0, slave on
// clk = 1), so that report stands. For constant data bits (low product bits
// that are always 0) a tool may report that a latch reduces to a constant.
module dff #(
  parameter int unsigned     WIDTH       = 1,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] m_d, m_q;
  logic             clk_n;

  assign clk_n = ~clk;
  assign m_d   = rst ? RESET_VALUE : d;

  d_latch #(.WIDTH(WIDTH)) u_master (
    .en (clk_n),
    .d  (m_d),
    .q  (m_q),
    .q_n()
  );

  d_latch #(.WIDTH(WIDTH)) u_slave (
    .en (clk),
    .d  (m_q),
    .q  (q),
    .q_n()
  );
endmodule
