// intlv_pkg: types and constants shared by the IEEE 802.16e multimode
// interleaver address generator and its interleaver memory.
//
// The block interleaver permutes each block of Ncbps coded bits in two steps
// (d = 16 columns, s = Ncpc/2):
//   m_k = (Ncbps/d)*(k mod d) + floor(k/d)
//   j_k = s*floor(m_k/s) + (m_k + Ncbps - floor(d*m_k/Ncbps)) mod s
// Written in order of k, j_k climbs by a fixed step inside each run of 16
// addresses. For BPSK and QPSK the step is Ncbps/16. For 16-QAM it alternates
// between Ncbps/16+1 and Ncbps/16-1, for 64-QAM it cycles through
// Ncbps/16+2, Ncbps/16-1, Ncbps/16-1. The constants below are those steps for
// every supported depth, selected by a 2-bit modulation type and a 3-bit depth
// code (ID). The codes and values follow the standard's depth table; for
// 16-QAM and 64-QAM only ID[1:0] is used, ID[2] is ignored.
package intlv_pkg;

  localparam int unsigned ADDR_W    = 10;   // bit address width (ten-bit counter)
  localparam int unsigned NCBPS_MAX = 576;  // largest interleaver depth
  localparam int unsigned INC_W     = 6;    // width of an increment value (max 38)
  localparam int unsigned ITER_W    = 6;    // iteration counter width (max 36 iterations)

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [INC_W-1:0]  inc_t;

  typedef enum logic [1:0] {
    MOD_BPSK  = 2'b00,
    MOD_QPSK  = 2'b01,
    MOD_QAM16 = 2'b10,
    MOD_QAM64 = 2'b11
  } mod_t;

  typedef logic [2:0] depth_id_t;

  // One interleaver configuration: modulation type and depth code.
  typedef struct packed {
    mod_t      mod;
    depth_id_t id;
  } cfg_t;

  // Increment values (address step inside one 16-address iteration).
  localparam inc_t BPSK_INC = 6'd3;
  localparam inc_t QPSK_INC    [8] = '{6'd6, 6'd9, 6'd12, 6'd18, 6'd24, 6'd27, 6'd30, 6'd36};
  localparam inc_t QAM16_BIG   [4] = '{6'd13, 6'd19, 6'd25, 6'd37};
  localparam inc_t QAM16_SMALL [4] = '{6'd11, 6'd17, 6'd23, 6'd35};
  localparam inc_t QAM64_BIG   [4] = '{6'd20, 6'd26, 6'd29, 6'd38};
  localparam inc_t QAM64_SMALL [4] = '{6'd17, 6'd23, 6'd26, 6'd35};

  // Number of 16-address iterations in one block, Ncbps/16.
  function automatic logic [ITER_W-1:0] iterations(cfg_t c);
    logic [ITER_W-1:0] n;
    unique case (c.mod)
      MOD_BPSK:  n = 6'd3;
      MOD_QPSK: begin
        unique case (c.id)
          3'd0: n = 6'd6;
          3'd1: n = 6'd9;
          3'd2: n = 6'd12;
          3'd3: n = 6'd18;
          3'd4: n = 6'd24;
          3'd5: n = 6'd27;
          3'd6: n = 6'd30;
          default: n = 6'd36;
        endcase
      end
      MOD_QAM16: begin
        unique case (c.id[1:0])
          2'd0: n = 6'd12;
          2'd1: n = 6'd18;
          2'd2: n = 6'd24;
          default: n = 6'd36;
        endcase
      end
      default: begin
        unique case (c.id[1:0])
          2'd0: n = 6'd18;
          2'd1: n = 6'd24;
          2'd2: n = 6'd27;
          default: n = 6'd36;
        endcase
      end
    endcase
    return n;
  endfunction

  // Interleaver depth Ncbps = 16 * iterations.
  function automatic addr_t ncbps(cfg_t c);
    return {iterations(c), 4'b0000};
  endfunction

endpackage
