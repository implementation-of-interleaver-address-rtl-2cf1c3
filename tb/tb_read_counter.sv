// tb_read_counter: self-checking testbench for the read address counter.
// Runs the counter with random enable for several terminal counts (Ncbps-1 of
// the 48, 192 and 576 bit depths), checks every value against a model counter,
// that tc is high exactly at the terminal count, and that one sweep takes
// Ncbps enabled clocks. Also checks clear.
module tb_read_counter;
  import intlv_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  clr, en, tc;
  addr_t last_val, count;

  read_counter dut (.clk, .clr, .en, .last_val, .count, .tc);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int lasts [3] = '{47, 191, 575};
    int model, ens, wraps;
    clr = 1'b1; en = 1'b0; last_val = 10'd47;
    @(posedge clk); #1;
    clr = 1'b0;
    checks++;
    if (count != 0) begin failures++; $display("FAIL: not cleared"); end
    foreach (lasts[t]) begin
      clr = 1'b1; last_val = 10'(lasts[t]);
      @(posedge clk); #1;
      clr = 1'b0;
      model = 0; ens = 0; wraps = 0;
      for (int i = 0; i < 3 * (lasts[t] + 1) * 2; i++) begin
        en = 1'($urandom_range(0, 3) != 0);
        #1;
        checks++;
        if (int'(count) != model || tc != (model == lasts[t])) begin
          failures++;
          if (failures < 10) $display("FAIL: count=%0d tc=%0d expected %0d", count, tc, model);
        end
        @(posedge clk); #1;
        if (en) begin
          ens++;
          if (model == lasts[t]) begin
            model = 0; wraps++;
            checks++;
            if (ens != (lasts[t] + 1) * wraps) begin
              failures++;
              $display("FAIL: sweep took %0d enabled clocks", ens);
            end
          end else model++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
