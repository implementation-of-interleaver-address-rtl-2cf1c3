// incr_mux: the three-stage multiplexer network that picks the address
// increment for the selected modulation type and interleaver depth.
//
// Stage 1: eight 2:1 muxes. Four of them (one per 16-QAM depth) choose between
// the larger and the smaller 16-QAM step under the T flip-flop; the other four
// (one per 64-QAM depth) choose between the larger and smaller 64-QAM step
// under the MOD-3 counter (larger step when the counter is zero).
// Stage 2: three muxes on the 3-bit depth code ID. The first holds the eight
// equally spaced QPSK steps, the second the four 16-QAM stage-1 outputs, the
// third the four 64-QAM stage-1 outputs (these two use ID[1:0]).
// Stage 3: a 4:1 mux on MOD_TYPE between the BPSK step (3) and the three
// stage-2 outputs.
// The structure follows the published address generator; the polarity of the
// T flip-flop and MOD-3 selects is this design's choice and matches addr_fsm.
//
// Interface: combinational. tff = 0 selects the larger 16-QAM step, mod3 = 0
// selects the larger 64-QAM step. The output is the unpadded 6-bit step.
module incr_mux
  import intlv_pkg::*;
(
  input  mod_t       mod_type,
  input  depth_id_t  id,
  input  logic       tff,
  input  logic [1:0] mod3,
  output inc_t       incr
);

  inc_t stage1_q16 [4];
  inc_t stage1_q64 [4];
  inc_t st2_qpsk, st2_q16, st2_q64;

  // stage 1
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      stage1_q16[i] = tff           ? QAM16_SMALL[i] : QAM16_BIG[i];
      stage1_q64[i] = (mod3 == 2'd0) ? QAM64_BIG[i]   : QAM64_SMALL[i];
    end
  end

  // stage 2
  always_comb begin
    st2_qpsk = QPSK_INC[id];
    st2_q16  = stage1_q16[id[1:0]];
    st2_q64  = stage1_q64[id[1:0]];
  end

  // stage 3
  always_comb begin
    unique case (mod_type)
      MOD_BPSK:  incr = BPSK_INC;
      MOD_QPSK:  incr = st2_qpsk;
      MOD_QAM16: incr = st2_q16;
      default:   incr = st2_q64;
    endcase
  end

endmodule
