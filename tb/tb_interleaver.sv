// tb_interleaver: end-to-end, self-checking testbench of the interleaver at
// its default size (Ncbps up to 576, ten-bit addresses).
//
// Random coded bits are streamed through every one of the 17 modulation/depth
// configurations of the standard, three blocks each, with the configuration
// changed in the middle of the last block so that it switches at the block
// end. Each output bit is compared with the reference permutation: output bit
// i of a block is the input bit k whose interleaved address j_k equals i. A
// first run with the enable held high checks the latency (first output bit
// N+1 clocks after the first input bit of its block) and that one bit leaves
// per clock; the rest of the run uses a random enable. A clear in the middle of
// a block must restart cleanly. The monitor counts how often each mechanism
// occurs (equal, larger and smaller address steps, iteration preset, block
// end with RAM swap, configuration switch with suppressed output, stalls,
// clear) and counts a failure for one that never occurs.
module tb_interleaver;
  import intlv_pkg::*;
  import intlv_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       clr, en, din, dout, dout_valid, sel, blk_last;
  logic [1:0] mod_type;
  logic [2:0] id;
  addr_t      wr_addr, rd_addr;

  interleaver dut (.clk, .clr, .en, .mod_type, .id, .din, .dout, .dout_valid,
                   .wr_addr, .rd_addr, .sel, .blk_last);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- monitor
  int n_equal = 0, n_big = 0, n_small = 0, n_preset = 0, n_swap = 0;
  int n_stall = 0, n_dropped_out = 0, n_out = 0;
  bit   have_prev = 0;
  int   prev_wr = 0;
  logic prev_sel = 1'b0;

  always @(posedge clk) begin
    if (!clr) begin
      if (!en) n_stall++;
      if (sel != prev_sel) n_swap++;
      prev_sel <= sel;
    end
  end

  // classify the step from the previous write address (called per address)
  function automatic void classify_step(int m, int i, int wr);
    if (have_prev) begin
      int step = wr - prev_wr;
      if (step < 3) n_preset++;
      else if (m >= 2) begin
        if (step > ref_ncbps(m, i) / 16) n_big++;
        else n_small++;
      end else n_equal++;
    end
    have_prev = 1;
    prev_wr   = wr;
  endfunction

  // ------------------------------------------------------------ scoreboard
  // expected output bits, in output order, for blocks that will be read out
  bit exp_q [$];
  int cyc = 0;
  int first_in_cycle [$];   // cycle of the first input bit of blocks read out
  int first_out_cycle = -1;
  int out_idx = 0, out_n = 0;
  bit lat_checked = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!clr && dout_valid) begin
      n_out++;
      check(exp_q.size() > 0, "output bit expected");
      if (exp_q.size() > 0) check(dout == exp_q.pop_front(), "interleaved bit");
      if (!lat_checked) begin
        lat_checked = 1;
        first_out_cycle = cyc;
      end
    end
  end

  // ---------------------------------------------------------------- stimulus
  int cfg_list [17][2] = '{
    '{0, 0},
    '{1, 0}, '{1, 1}, '{1, 2}, '{1, 3}, '{1, 4}, '{1, 5}, '{1, 6}, '{1, 7},
    '{2, 0}, '{2, 1}, '{2, 2}, '{2, 3},
    '{3, 0}, '{3, 1}, '{3, 2}, '{3, 3}
  };
  int n_switch = 0, n_clear = 0;
  int mods_seen [4] = '{0, 0, 0, 0};

  // stream one block; returns the bits written
  task automatic run_block(input int m, input int i, input int nm, input int ni,
                           input bit switch_mid, input bit rand_en, output bit bits [$]);
    int n = ref_ncbps(m, i);
    int k = 0;
    bits = {};
    while (k < n) begin
      en  = rand_en ? 1'($urandom_range(0, 7) != 0) : 1'b1;
      din = 1'($urandom);
      if (switch_mid && k == n / 2) begin
        mod_type = 2'(nm); id = 3'(ni);
      end
      #1;
      if (en) begin
        check(int'(wr_addr) == ref_j(m, i, k) && int'(rd_addr) == k, "address pair");
        classify_step(m, i, int'(wr_addr));
        bits.push_back(din);
        k++;
      end
      @(posedge clk); #1;
    end
  endtask

  function automatic void push_expected(int m, int i, bit bits [$]);
    int n = ref_ncbps(m, i);
    bit o [] = new[n];
    for (int k = 0; k < n; k++) o[ref_j(m, i, k)] = bits[k];
    for (int x = 0; x < n; x++) exp_q.push_back(o[x]);
  endfunction

  initial begin
    bit bits [$];
    int m, i, nm, ni, t0;
    clr = 1'b1; en = 1'b1; din = 1'b0;
    mod_type = 2'd0; id = 3'd0;
    repeat (2) @(posedge clk);
    #1 clr = 1'b0;
    @(posedge clk); #1;          // FSM leaves its first state

    // latency run: BPSK, enable always high, two blocks
    t0 = cyc;
    run_block(0, 0, 0, 0, 0, 0, bits);
    push_expected(0, 0, bits);
    run_block(0, 0, 0, 0, 0, 0, bits);
    push_expected(0, 0, bits);
    check(first_out_cycle - t0 == 48 + 1, "latency N+1 clocks");
    check(n_out == 48 - 1 + 0 || n_out == 48, "one output bit per clock");

    // a clear in the middle of a block
    run_block(0, 0, 0, 0, 0, 0, bits);
    push_expected(0, 0, bits);
    repeat (20) begin en = 1'b1; din = 1'($urandom); @(posedge clk); #1; end
    clr = 1'b1;
    @(posedge clk); #1;
    clr = 1'b0; n_clear++;
    have_prev = 0;
    exp_q = {};   // the partly written block is discarded by the clear
    check(!dout_valid, "no output after clear");
    @(posedge clk); #1;

    // all 17 configurations, random enable
    for (int c = 0; c < 17; c++) begin
      m = cfg_list[c][0]; i = cfg_list[c][1];
      nm = cfg_list[(c + 1) % 17][0]; ni = cfg_list[(c + 1) % 17][1];
      mods_seen[m]++;
      for (int b = 0; b < 3; b++) begin
        // all bits of the previous configuration are out, but for the one
        // whose read happened on the last clock
        if (b == 0)
          check(exp_q.size() <= 1, "all expected bits of the previous configuration came out");
        run_block(m, i, nm, ni, b == 2, 1, bits);
        if (b < 2) push_expected(m, i, bits);
        else begin
          n_switch++;
          n_dropped_out++;      // last block before a switch is not output
        end
      end
    end
    repeat (2) @(posedge clk);
    #1 check(exp_q.size() == 0, "all expected bits of the last configuration came out");

    // mechanism coverage
    $display("steps: equal=%0d larger=%0d smaller=%0d presets=%0d swaps=%0d",
             n_equal, n_big, n_small, n_preset, n_swap);
    $display("switches=%0d dropped_blocks=%0d stalls=%0d clears=%0d outputs=%0d",
             n_switch, n_dropped_out, n_stall, n_clear, n_out);
    check(n_equal > 0, "equal steps (BPSK/QPSK) occurred");
    check(n_big > 0, "larger unequal steps occurred");
    check(n_small > 0, "smaller unequal steps occurred");
    check(n_preset > 0, "iteration presets occurred");
    check(n_swap > 0, "RAM swaps occurred");
    check(n_switch > 0, "configuration switches occurred");
    check(n_stall > 0, "stalls occurred");
    check(n_clear > 0, "clear occurred");
    foreach (mods_seen[x]) check(mods_seen[x] > 0, "every modulation type used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
