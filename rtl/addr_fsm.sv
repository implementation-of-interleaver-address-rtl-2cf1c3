// addr_fsm: control of the interleaver address generator.
//
// After CLR the FSM sits one clock in ST_INIT, then moves to the state of the
// modulation type on cfg_in (BPSK, QPSK, 16-QAM or 64-QAM) and latches the
// depth code; together they fix the interleaver depth Ncbps. A 4-bit counter
// (q) counts the 16 addresses of one iteration and an iteration counter (r)
// counts the Ncbps/16 iterations of one block. On the 16th address of an
// iteration `reload` is high: the accumulator is then preset to the first
// address of the next iteration, which is r+1 (next_start), or 0 after the last
// iteration of the block. At that block end the configuration on cfg_in is
// taken again, so a new modulation type or depth takes effect on a block
// boundary, and the ping-pong select `sel` toggles.
//
// The T flip-flop (16-QAM) and the MOD-3 counter (64-QAM) give the phase of the
// unequal increments. With address j(q) in iteration r, the step to j(q+1) is
// the larger one when (q+r) is even for 16-QAM, and when (r-q) mod 3 = 0 for
// 64-QAM. So tff holds (q+r) mod 2: it toggles on each increment and holds on
// a reload. mod3 holds (r-q) mod 3: it counts down on each increment and up on
// a reload. Both restart at 0 with each block.
// The state split, counters and preset follow the published FSM; block-boundary
// mode switching and the phase bookkeeping above are this design's choices.
//
// Interface: synchronous, active-high clr; en advances one address per clock.
// `run` is high once the FSM has left ST_INIT. Outputs are registered except
// reload, blk_last and next_start, which decode the counters.
module addr_fsm
  import intlv_pkg::*;
(
  input  logic              clk,
  input  logic              clr,
  input  logic              en,
  input  cfg_t              cfg_in,
  output cfg_t              cfg,         // configuration of the current block
  output logic              run,
  output logic [3:0]        q,           // address index within the iteration
  output logic [ITER_W-1:0] r,           // iteration index within the block
  output logic              tff,
  output logic [1:0]        mod3,
  output logic              reload,      // last address of an iteration
  output logic              blk_last,    // last address of the block
  output addr_t             next_start,  // accumulator preset value
  output logic              sel          // ping-pong memory select
);

  typedef enum logic [2:0] {
    ST_INIT  = 3'd0,
    ST_BPSK  = 3'd1,
    ST_QPSK  = 3'd2,
    ST_QAM16 = 3'd3,
    ST_QAM64 = 3'd4
  } state_t;

  state_t state;

  function automatic state_t mod_state(mod_t m);
    unique case (m)
      MOD_BPSK:  return ST_BPSK;
      MOD_QPSK:  return ST_QPSK;
      MOD_QAM16: return ST_QAM16;
      default:   return ST_QAM64;
    endcase
  endfunction

  logic [ITER_W-1:0] iter_last;
  assign iter_last  = iterations(cfg) - ITER_W'(1);

  assign run        = (state != ST_INIT);
  assign reload     = run && (q == 4'd15);
  assign blk_last   = reload && (r == iter_last);
  assign next_start = blk_last ? '0 : addr_t'(r) + addr_t'(1);

  always_ff @(posedge clk) begin
    if (clr) begin
      state <= ST_INIT;
      cfg   <= cfg_in;
      q     <= '0;
      r     <= '0;
      tff   <= 1'b0;
      mod3  <= 2'd0;
      sel   <= 1'b0;
    end else if (state == ST_INIT) begin
      state <= mod_state(cfg_in.mod);
      cfg   <= cfg_in;
    end else if (en) begin
      if (reload) begin
        q <= '0;
        if (blk_last) begin
          r     <= '0;
          tff   <= 1'b0;
          mod3  <= 2'd0;
          sel   <= ~sel;
          state <= mod_state(cfg_in.mod);
          cfg   <= cfg_in;
        end else begin
          r    <= r + ITER_W'(1);
          mod3 <= (mod3 == 2'd2) ? 2'd0 : mod3 + 2'd1;
        end
      end else begin
        q    <= q + 4'd1;
        tff  <= ~tff;
        mod3 <= (mod3 == 2'd0) ? 2'd2 : mod3 - 2'd1;
      end
    end
  end

  // The modulation state and the latched configuration always agree.
  a_state_cfg: assert property (@(posedge clk) disable iff (clr)
    run |-> state == mod_state(cfg.mod));

endmodule
