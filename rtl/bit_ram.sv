// bit_ram: single-port, bit-addressable synchronous RAM (Ram 1 / Ram 2 of the
// interleaver memory).
//
// One bit per address. On a clock edge with we high, d is written to mem[addr].
// The read is synchronous: q shows mem[addr] one clock after addr is applied
// (the old contents when the same edge writes). Contents are not reset. The
// one-clock read latency and the read-first behaviour are this design's
// choices; they map onto an FPGA block RAM.
//
// Interface: clk, we, addr, d in; q registered out.
module bit_ram #(
  parameter int unsigned DEPTH  = 576,            // largest interleaver depth
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic              d,
  output logic              q
);

  logic mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)
      mem[addr] <= d;
    q <= mem[addr];
  end

endmodule
