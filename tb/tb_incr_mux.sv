// tb_incr_mux: self-checking testbench for the increment mux network.
// For every modulation type, depth code (all 8, including the ignored ID[2]
// for 16-QAM and 64-QAM), T flip-flop value and MOD-3 counter value, the
// selected step is compared with the increment table of the standard's depths
// (larger step at tff = 0 / mod3 = 0). The table is checked in turn against
// the address differences of the interleaver formula from the reference model.
module tb_incr_mux;
  import intlv_pkg::*;
  import intlv_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  mod_t       mod_type;
  depth_id_t  id;
  logic       tff;
  logic [1:0] mod3;
  inc_t       incr;

  incr_mux dut (.mod_type, .id, .tff, .mod3, .incr);

  // increment table: {equal or larger, smaller}
  function automatic int exp_inc(int m, int i, int t, int c);
    int qpsk [8] = '{6, 9, 12, 18, 24, 27, 30, 36};
    int b16  [4] = '{13, 19, 25, 37};
    int s16  [4] = '{11, 17, 23, 35};
    int b64  [4] = '{20, 26, 29, 38};
    int s64  [4] = '{17, 23, 26, 35};
    case (m)
      0: return 3;
      1: return qpsk[i];
      2: return (t != 0) ? s16[i % 4] : b16[i % 4];
      default: return (c == 0) ? b64[i % 4] : s64[i % 4];
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // the table agrees with the formula: step q -> q+1 of iteration 0
    for (int m = 0; m < 4; m++)
      for (int i = 0; i < 8; i++)
        for (int q = 0; q < 15; q++) begin
          automatic int step = ref_j(m, i, q + 1) - ref_j(m, i, q);
          automatic int c = (3 - q % 3) % 3;      // (r - q) mod 3 with r = 0
          checks++;
          if (step != exp_inc(m, i, q % 2, c)) begin
            failures++;
            $display("table/formula mismatch m=%0d id=%0d q=%0d", m, i, q);
          end
        end
    // the mux network against the table
    for (int m = 0; m < 4; m++)
      for (int i = 0; i < 8; i++)
        for (int t = 0; t < 2; t++)
          for (int c = 0; c < 3; c++) begin
            mod_type = mod_t'(m); id = 3'(i); tff = 1'(t); mod3 = 2'(c);
            @(posedge clk);
            checks++;
            if (int'(incr) != exp_inc(m, i, t, c)) begin
              failures++;
              $display("FAIL m=%0d id=%0d tff=%0d mod3=%0d: incr=%0d expected %0d",
                       m, i, t, c, incr, exp_inc(m, i, t, c));
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
