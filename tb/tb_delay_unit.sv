// tb_delay_unit: a delay unit driven by the real time-stamp generator.
// Hits are stored at every phase of the bus for several n; the unit must
// fire exactly once, exactly 2n+2 clocks after the store, and then be free.
module tb_delay_unit;
  import alice1_pkg::*;

  logic clk = 0, rst_n = 1;
  // drive a real falling edge into the asynchronous resets
  initial begin #1 rst_n = 0; end
  logic [7:0] modulo_n, bus, count;
  logic store, busy, fire;
  int checks = 0, failures = 0;

  delay_bus_gen gen (.clk, .rst_n, .modulo_n, .bus, .count);
  delay_unit    dut (.clk, .rst_n, .bus, .store, .busy, .fire);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_hit(int n, int phase);
    int t;
    store = 0;
    repeat (phase) @(posedge clk);
    #1 store = 1;
    @(posedge clk); #1 store = 0;
    t = 1;   // clocks since the store edge
    while (!fire && t < 4 * n + 10) begin
      @(posedge clk); #1; t++;
    end
    checks++;
    if (!fire || t != 2 * n + 2) begin
      failures++;
      $display("n=%0d phase=%0d fired after %0d (exp %0d)", n, phase, t, 2 * n + 2);
    end
    @(posedge clk); #1;
    checks++;
    if (busy) begin failures++; $display("unit not freed"); end
  endtask

  initial begin
    int ns [4] = '{3, 7, 49, 79};
    #1;
    foreach (ns[k]) begin
      rst_n = 0; modulo_n = 8'(ns[k]); store = 0;
      repeat (2) @(posedge clk);
      #1 rst_n = 1;
      for (int ph = 0; ph < 2 * ns[k] + 2; ph += (ns[k] > 10 ? 7 : 1))
        one_hit(ns[k], ph);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
