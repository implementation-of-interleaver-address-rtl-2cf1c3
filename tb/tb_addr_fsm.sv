// tb_addr_fsm: self-checking testbench for the address generator FSM.
// A model tracks the address index k inside the block and checks, on every
// clock, q = k mod 16, r = floor(k/16), the T flip-flop = (q+r) mod 2, the
// MOD-3 counter = (r-q) mod 3, reload, blk_last, the preset value and the
// ping-pong select. The configuration input is changed at random points; the
// FSM must pick it up only at a block end (and one clock after clr). Enable is
// random. Checks that a block takes exactly Ncbps enabled clocks.
module tb_addr_fsm;
  import intlv_pkg::*;
  import intlv_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              clr, en, run, tff, reload, blk_last, sel;
  cfg_t              cfg_in, cfg;
  logic [3:0]        q;
  logic [ITER_W-1:0] r;
  logic [1:0]        mod3;
  addr_t             next_start;

  addr_fsm dut (.clk, .clr, .en, .cfg_in, .cfg, .run, .q, .r, .tff, .mod3,
                .reload, .blk_last, .next_start, .sel);

  int n_blocks = 0, n_switch = 0;

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

  initial begin
    cfg_t mcfg;
    int   k, n, ens, mq, mr;
    bit   msel;
    clr = 1'b1; en = 1'b0;
    cfg_in = '{mod: MOD_QAM64, id: 3'd0};
    @(posedge clk); #1;
    clr = 1'b0;
    check(!run, "ST_INIT after clr");
    @(posedge clk); #1;
    mcfg = cfg_in; k = 0; ens = 0; msel = 1'b0;
    check(run, "running one clock after clr");
    while (n_blocks < 40) begin
      n  = ref_ncbps(int'(mcfg.mod), int'(mcfg.id));
      mq = k % 16; mr = k / 16;
      en = 1'($urandom_range(0, 7) != 0);
      // change the requested configuration now and then
      if ($urandom_range(0, 150) == 0) begin
        cfg_in = '{mod: mod_t'($urandom_range(0, 3)), id: 3'($urandom_range(0, 7))};
      end
      #1;
      check(cfg == mcfg, "configuration held");
      check(int'(q) == mq && int'(r) == mr, "q/r counters");
      check(tff == 1'((mq + mr) % 2), "T flip-flop phase");
      check(int'(mod3) == ((mr - mq) % 3 + 3) % 3, "MOD-3 phase");
      check(reload == (mq == 15), "reload");
      check(blk_last == (k == n - 1), "blk_last");
      if (mq == 15)
        check(int'(next_start) == ((k == n - 1) ? 0 : mr + 1), "preset value");
      check(sel == msel, "ping-pong select");
      @(posedge clk); #1;
      if (en) begin
        ens++;
        if (k == n - 1) begin
          check(ens == n, "block length in enabled clocks");
          ens = 0; k = 0; msel = ~msel; n_blocks++;
          if (cfg_in != mcfg) n_switch++;
          mcfg = cfg_in;
        end else k++;
      end
    end
    check(n_switch > 3, "configuration switches exercised");
    $display("blocks=%0d switches=%0d", n_blocks, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
