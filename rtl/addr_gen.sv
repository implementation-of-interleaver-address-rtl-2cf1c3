// addr_gen: interleaver address generator for all IEEE 802.16e modulation
// types and depths (BPSK 48; QPSK 96..576; 16-QAM 192..576; 64-QAM 288..576).
//
// Write addresses are the interleaved positions j_k, produced one per clock in
// order of k without any multiplier or divider. The increment mux network
// (incr_mux) picks the step for the mode and the phase given by the FSM's
// T flip-flop and MOD-3 counter. The step is zero padded to ten bits and added
// to the accumulator (ACC) by a carry select adder; ACC holds the previous
// address and takes the sum on each clock. After 16 addresses the FSM presets
// ACC to the start of the next iteration (1, 2, ...), and to 0 after the last
// iteration of a block. Read addresses come from a ten-bit up counter that
// runs 0..Ncbps-1. Both sequences wrap on the same clock, at the block end,
// where `sel` toggles to swap the two interleaver RAMs.
// Structure follows the published generator; the enable input and the
// block-boundary mode change are this design's choices.
//
// Interface: clk, synchronous active-high clr, en (advance one address).
// wr_addr, rd_addr are registered and valid while `valid` is high
// (run && en); blk_last marks the last address pair of a block. A new
// mod_type/id is taken one clock after clr and then at each block end.
module addr_gen
  import intlv_pkg::*;
(
  input  logic       clk,
  input  logic       clr,
  input  logic       en,
  input  logic [1:0] mod_type,
  input  logic [2:0] id,
  output addr_t      wr_addr,
  output addr_t      rd_addr,
  output logic       valid,
  output logic       blk_last,
  output logic       sel,
  output cfg_t       cfg
);

  cfg_t              cfg_in;
  logic              run, reload, tff;
  logic [3:0]        q;
  logic [ITER_W-1:0] r;
  logic [1:0]        mod3;
  addr_t             next_start;

  assign cfg_in = '{mod: mod_t'(mod_type), id: id};

  addr_fsm u_fsm (
    .clk, .clr, .en, .cfg_in, .cfg, .run, .q, .r, .tff, .mod3,
    .reload, .blk_last, .next_start, .sel
  );

  inc_t  incr;
  addr_t sum;
  logic  cout;

  incr_mux u_mux (
    .mod_type (cfg.mod),
    .id       (cfg.id),
    .tff,
    .mod3,
    .incr
  );

  csa_adder #(.W(ADDR_W)) u_add (
    .a    (wr_addr),
    .b    ({{(ADDR_W-INC_W){1'b0}}, incr}),  // zero padding
    .cin  (1'b0),
    .sum,
    .cout
  );

  // accumulator with preset
  always_ff @(posedge clk) begin
    if (clr)
      wr_addr <= '0;
    else if (run && en)
      wr_addr <= reload ? next_start : sum;
  end

  logic tc;
  read_counter u_rd (
    .clk, .clr,
    .en       (run && en),
    .last_val (ncbps(cfg) - addr_t'(1)),
    .count    (rd_addr),
    .tc
  );

  assign valid = run && en;

  // The read counter reaches its terminal count exactly at the block end,
  // and no address leaves the block.
  a_tc_sync: assert property (@(posedge clk) disable iff (clr)
    run |-> (tc == blk_last));
  a_in_range: assert property (@(posedge clk) disable iff (clr)
    run |-> (wr_addr < ncbps(cfg)) && !cout);
  // Every iteration r starts at address r, and r stays inside the block.
  a_iter_start: assert property (@(posedge clk) disable iff (clr)
    run && (q == 4'd0) |-> (wr_addr == addr_t'(r)) && (r < iterations(cfg)));

endmodule
