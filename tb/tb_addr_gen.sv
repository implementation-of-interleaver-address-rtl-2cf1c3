// tb_addr_gen: self-checking testbench for the interleaver address generator.
// Runs every modulation type and depth code (all 32 MOD_TYPE/ID values, the 17
// distinct depths of the standard included), two blocks each, with random
// enable. The next configuration is applied in the middle of a block and must
// take effect at the block end. Every write address is compared with the
// interleaver formula (reference model), every read address with the block
// index, and the first 32 write addresses of BPSK/48, QPSK/96, 16-QAM/192 and
// 64-QAM/288 with the published address table. Checks one address per enabled
// clock (block = Ncbps enabled clocks) and the first address one clock after
// clr is released plus one.
module tb_addr_gen;
  import intlv_pkg::*;
  import intlv_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       clr, en, valid, blk_last, sel;
  logic [1:0] mod_type;
  logic [2:0] id;
  addr_t      wr_addr, rd_addr;
  cfg_t       cfg;

  addr_gen dut (.clk, .clr, .en, .mod_type, .id, .wr_addr, .rd_addr,
                .valid, .blk_last, .sel, .cfg);

  // first 32 write addresses from the published address table
  int tab_bpsk [32] = '{0,3,6,9,12,15,18,21, 24,27,30,33,36,39,42,45,
                        1,4,7,10,13,16,19,22, 25,28,31,34,37,40,43,46};
  int tab_qpsk [32] = '{0,6,12,18,24,30,36,42, 48,54,60,66,72,78,84,90,
                        1,7,13,19,25,31,37,43, 49,55,61,67,73,79,85,91};
  int tab_q16  [32] = '{0,13,24,37,48,61,72,85, 96,109,120,133,144,157,168,181,
                        1,12,25,36,49,60,73,84, 97,108,121,132,145,156,169,180};
  int tab_q64  [32] = '{0,20,37,54,74,91,108,128, 145,162,182,199,216,236,253,270,
                        1,18,38,55,72,92,109,126, 146,163,180,200,217,234,254,271};

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int tab_hits = 0;

  initial begin
    int m, i, k, n, ens, blk, ncfg;
    int cfgs [$];
    for (int c = 0; c < 32; c++) cfgs.push_back(c);
    clr = 1'b1; en = 1'b1;
    {mod_type, id} = 5'(cfgs[0]);
    @(posedge clk); #1;
    clr = 1'b0;
    check(!valid, "no address in the clock after clr");
    @(posedge clk); #1;
    ncfg = 0;
    while (ncfg < cfgs.size()) begin
      m = cfgs[ncfg] >> 3; i = cfgs[ncfg] & 7;
      n = ref_ncbps(m, i);
      for (blk = 0; blk < 2; blk++) begin
        k = 0; ens = 0;
        check(cfg == cfg_t'(5'(cfgs[ncfg])), "configuration taken");
        while (k < n) begin
          en = 1'($urandom_range(0, 9) != 0);
          if (blk == 1 && k == n / 2 && ncfg + 1 < cfgs.size())
            {mod_type, id} = 5'(cfgs[ncfg + 1]);
          #1;
          check(valid == en, "valid follows enable");
          if (en) begin
            ens++;
            check(int'(wr_addr) == ref_j(m, i, k), "write address");
            check(int'(rd_addr) == k, "read address");
            check(blk_last == (k == n - 1), "block end");
            if (blk == 0 && k < 32) begin
              automatic int t = -1;
              if (m == 0) t = tab_bpsk[k];
              if (m == 1 && i == 0) t = tab_qpsk[k];
              if (m == 2 && i == 0) t = tab_q16[k];
              if (m == 3 && i == 0) t = tab_q64[k];
              if (t >= 0) begin
                check(int'(wr_addr) == t, "published address table");
                tab_hits++;
              end
            end
            k++;
          end
          @(posedge clk); #1;
        end
        check(ens == n, "one address per enabled clock");
      end
      ncfg++;
    end
    check(tab_hits == 32 * 11, "address table compared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
