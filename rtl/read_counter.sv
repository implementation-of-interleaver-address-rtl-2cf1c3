// read_counter: the ten-bit up counter that produces the read addresses.
//
// The counter starts at zero after CLR and counts up by one on every enabled
// clock. When it reaches the terminal count of the selected mode (Ncbps-1,
// given on last_val) it returns to zero on the next enabled clock, so it
// sweeps the interleaver memory in order once per block. A count above
// last_val (possible only if last_val shrinks mid-block) also wraps to zero.
// Synchronous clear is this design's choice.
//
// Interface: count is registered; tc is high while count equals last_val.
module read_counter
  import intlv_pkg::*;
(
  input  logic  clk,
  input  logic  clr,
  input  logic  en,
  input  addr_t last_val,
  output addr_t count,
  output logic  tc
);

  assign tc = (count == last_val);

  always_ff @(posedge clk) begin
    if (clr)
      count <= '0;
    else if (en)
      count <= (count >= last_val) ? '0 : count + addr_t'(1);
  end

endmodule
