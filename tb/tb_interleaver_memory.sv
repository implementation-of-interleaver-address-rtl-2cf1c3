// tb_interleaver_memory: self-checking testbench for the ping-pong interleaver
// memory. Eight blocks of 576 random bits are written, each at a random
// permutation of the addresses, while the block before it is read back in
// address order from the other RAM; SEL toggles after every block. Each bit
// read must appear one clock after its read address, including across the SEL
// toggle, and equal the bit written to that address one block earlier,
// although the other RAM is being written at the same addresses meanwhile.
module tb_interleaver_memory;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 576;
  logic       sel, we, din, dout;
  logic [9:0] wr_addr, rd_addr;

  interleaver_memory dut (.clk, .sel, .we, .wr_addr, .rd_addr, .din, .dout);

  logic prev_blk [N];    // contents expected in the RAM being read
  logic cur_blk  [N];
  int   perm     [N];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_bit, have_exp;
    sel = 1'b0; we = 1'b0; din = 1'b0; wr_addr = '0; rd_addr = '0;
    have_exp = 0; exp_bit = 0;
    @(posedge clk); #1;
    for (int b = 0; b < 8; b++) begin
      for (int a = 0; a < N; a++) perm[a] = a;
      perm.shuffle();
      for (int t = 0; t < N; t++) begin
        we = 1'b1;
        wr_addr = 10'(perm[t]);
        din = 1'($urandom);
        cur_blk[perm[t]] = din;
        rd_addr = 10'(t);
        #1;
        // the bit read on the previous clock, sampled just before the next
        // edge, i.e. after SEL may have toggled
        if (have_exp != 0) begin
          checks++;
          if (dout != 1'(exp_bit)) begin
            failures++;
            if (failures < 10) $display("FAIL block %0d addr %0d", b, t - 1);
          end
        end
        @(posedge clk); #1;
        have_exp = (b > 0) ? 1 : 0;
        exp_bit  = int'(prev_blk[t]);
      end
      prev_blk = cur_blk;
      sel = ~sel;
    end
    // last bit of the final read block, after the toggle
    we = 1'b0;
    #1;
    checks++;
    if (dout != 1'(exp_bit)) begin failures++; $display("FAIL final bit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
