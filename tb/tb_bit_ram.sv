// tb_bit_ram: self-checking testbench for the single-port bit RAM.
// Writes random bits to all 576 addresses, reads them back in random order
// with the one-clock read latency, checks read-first behaviour when a
// location is written and read on the same edge, and that a clock with we low
// leaves the contents unchanged.
module tb_bit_ram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int DEPTH = 576;
  logic       we, d, q;
  logic [9:0] addr;
  logic       model [DEPTH];

  bit_ram #(.DEPTH(DEPTH), .ADDR_W(10)) dut (.clk, .we, .addr, .d, .q);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; d = 1'b0; addr = '0;
    @(posedge clk); #1;
    for (int a = 0; a < DEPTH; a++) begin
      we = 1'b1; addr = 10'(a); d = 1'($urandom); model[a] = d;
      @(posedge clk); #1;
    end
    we = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      automatic int a = $urandom_range(0, DEPTH - 1);
      addr = 10'(a);
      d = ~model[a];          // must not be written
      @(posedge clk); #1;
      checks++;
      if (q != model[a]) begin
        failures++;
        if (failures < 10) $display("FAIL read addr %0d: %0d expected %0d", a, q, model[a]);
      end
    end
    // read-first on a write
    for (int i = 0; i < 200; i++) begin
      automatic int a = $urandom_range(0, DEPTH - 1);
      addr = 10'(a); we = 1'b1; d = 1'($urandom);
      @(posedge clk); #1;
      checks++;
      if (q != model[a]) begin failures++; $display("FAIL read-first addr %0d", a); end
      model[a] = d;
      we = 1'b0;
      @(posedge clk); #1;
      checks++;
      if (q != model[a]) begin failures++; $display("FAIL write addr %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
