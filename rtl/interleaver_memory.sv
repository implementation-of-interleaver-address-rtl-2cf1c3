// interleaver_memory: ping-pong bit memory of the block interleaver.
//
// Two bit RAMs, one inverter and three muxes. While one RAM is written with the
// incoming coded bits at the (permuted) write addresses, the other is read at
// the (sequential) read addresses, and SEL swaps the roles after each block.
// With SEL = 0, Ram 1 receives the read address and Ram 2 the write address
// together with the write enable; with SEL = 1 it is the other way round. The
// address muxes, the inverter on the Ram 2 write enable and the output mux
// follow the published memory. Because the RAM read takes one clock, the
// output mux uses SEL delayed by one clock, so the last bit of a block still
// comes from the right RAM after SEL has toggled (this design's choice).
//
// Interface: clk; sel, we, wr_addr, rd_addr, din in the same cycle;
// dout = contents of rd_addr in the RAM being read, one clock later.
module interleaver_memory #(
  parameter int unsigned DEPTH  = 576,
  parameter int unsigned ADDR_W = 10
) (
  input  logic              clk,
  input  logic              sel,
  input  logic              we,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [ADDR_W-1:0] rd_addr,
  input  logic              din,
  output logic              dout
);

  logic              sel_n, sel_q;
  logic [ADDR_W-1:0] addr1, addr2;
  logic              we1, we2, q1, q2;

  assign sel_n = ~sel;                       // inverter
  assign addr1 = sel ? wr_addr : rd_addr;    // address mux, Ram 1
  assign addr2 = sel ? rd_addr : wr_addr;    // address mux, Ram 2
  assign we1   = we & sel;
  assign we2   = we & sel_n;

  bit_ram #(.DEPTH(DEPTH), .ADDR_W(ADDR_W)) u_ram1 (
    .clk, .we(we1), .addr(addr1), .d(din), .q(q1)
  );
  bit_ram #(.DEPTH(DEPTH), .ADDR_W(ADDR_W)) u_ram2 (
    .clk, .we(we2), .addr(addr2), .d(din), .q(q2)
  );

  always_ff @(posedge clk) sel_q <= sel;

  assign dout = sel_q ? q2 : q1;             // output mux

endmodule
