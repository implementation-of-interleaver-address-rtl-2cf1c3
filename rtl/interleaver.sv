// interleaver: multimode IEEE 802.16e block interleaver built from the
// interleaver address generator and a ping-pong interleaver memory.
//
// Coded bits arrive one per enabled clock. Bit k of a block is written at the
// interleaved address j_k produced by addr_gen into the RAM currently being
// written, while the other RAM, holding the previous block, is read in address
// order by the read counter. Output bit i of a block therefore equals the input
// bit k with j_k = i. Modulation type and depth code are sampled one clock
// after clr and at every block end.
//
// Timing: the first bit of block b leaves N+1 enabled clocks after the first
// bit of block b entered (N = Ncbps; one block of buffering plus the RAM read).
// dout_valid marks output bits; it stays low for the first block after clr and
// for the first block after a change of mode or depth, because the RAM being
// read then does not hold a complete block of the current size (this flag is
// this design's choice). The write and read addresses and the memory select
// are brought out for observation.
module interleaver
  import intlv_pkg::*;
(
  input  logic       clk,
  input  logic       clr,
  input  logic       en,
  input  logic [1:0] mod_type,
  input  logic [2:0] id,
  input  logic       din,
  output logic       dout,
  output logic       dout_valid,
  output addr_t      wr_addr,
  output addr_t      rd_addr,
  output logic       sel,
  output logic       blk_last
);

  logic valid;
  cfg_t cfg;

  addr_gen u_agen (
    .clk, .clr, .en, .mod_type, .id,
    .wr_addr, .rd_addr, .valid, .blk_last, .sel, .cfg
  );

  interleaver_memory #(.DEPTH(NCBPS_MAX), .ADDR_W(ADDR_W)) u_mem (
    .clk, .sel, .we(valid), .wr_addr, .rd_addr, .din, .dout
  );

  // filled: the RAM being read holds a complete block of the current mode
  logic filled;
  always_ff @(posedge clk) begin
    if (clr) begin
      filled     <= 1'b0;
      dout_valid <= 1'b0;
    end else begin
      if (valid && blk_last)
        filled <= ({mod_type, id} == cfg);
      dout_valid <= valid && filled;
    end
  end

endmodule
