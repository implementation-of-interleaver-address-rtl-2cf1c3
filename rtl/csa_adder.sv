// csa_adder: low power carry select adder, the adder of the address generator
// (accumulator + zero-padded increment).
//
// The operands are split into groups of BLK bits. The lowest group is a plain
// ripple carry adder. Every higher group computes its sum once, with carry in
// 0, in a ripple carry adder, and derives the carry-in-1 result from it with a
// binary-to-excess-1 converter (BEC: add one by an incrementer chain) instead
// of a second ripple carry adder. The carry out of the group below then selects
// between the two results. Using a BEC in place of the duplicated adder is the
// usual low power / low area form of the carry select adder; the exact group
// sizes are this design's choice.
//
// Interface: purely combinational, sum = a + b + cin, cout is the carry out.
module csa_adder #(
  parameter int unsigned W   = 10,  // operand width (ten-bit addresses)
  parameter int unsigned BLK = 4    // bits per carry-select group
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned NGRP = (W + BLK - 1) / BLK;

  // carry into each group; c[NGRP] is the final carry out
  logic [NGRP:0] c;
  assign c[0] = cin;

  for (genvar g = 0; g < NGRP; g++) begin : g_grp
    localparam int unsigned LO = g * BLK;
    localparam int unsigned GW = ((LO + BLK) > W) ? (W - LO) : BLK;

    // ripple carry adder with the group's own carry in (group 0) or 0
    logic [GW-1:0] s0;
    logic [GW:0]   rc;
    assign rc[0] = (g == 0) ? cin : 1'b0;
    for (genvar i = 0; i < GW; i++) begin : g_fa
      assign s0[i]   = a[LO+i] ^ b[LO+i] ^ rc[i];
      assign rc[i+1] = (a[LO+i] & b[LO+i]) | (rc[i] & (a[LO+i] ^ b[LO+i]));
    end

    if (g == 0) begin : g_rca
      assign sum[LO +: GW] = s0;
      assign c[1]          = rc[GW];
    end else begin : g_sel
      // binary to excess-1 converter: s1 = {rc[GW], s0} + 1
      logic [GW-1:0] s1;
      logic [GW:0]   t;      // t[i]: all of s0[i-1:0] are one
      assign t[0] = 1'b1;
      for (genvar i = 0; i < GW; i++) begin : g_bec
        assign s1[i]  = s0[i] ^ t[i];
        assign t[i+1] = t[i] & s0[i];
      end
      assign sum[LO +: GW] = c[g] ? s1 : s0;
      assign c[g+1]        = c[g] ? (rc[GW] | t[GW]) : rc[GW];
    end
  end

  assign cout = c[NGRP];

endmodule
