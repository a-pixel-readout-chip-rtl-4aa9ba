// tb_delay_bus_gen: checks the time-stamp generator against a reference
// model of the up-down sequence 0..n,n..0 (period 2n+2), that the bus is the
// Gray code of the count, that one bit toggles per clock, and that every
// value appears exactly twice per period. Runs n = 3, 49 and 0.
module tb_delay_bus_gen;
  import alice1_pkg::*;

  logic clk = 0, rst_n = 1;
  // drive a real falling edge into the asynchronous resets
  initial begin #1 rst_n = 0; end
  logic [7:0] modulo_n, bus, count;
  int checks = 0, failures = 0;

  delay_bus_gen dut (.clk, .rst_n, .modulo_n, .bus, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_val(int t, int n);
    int p = t % (2 * n + 2);
    return (p <= n) ? p : 2 * n + 1 - p;
  endfunction

  task automatic run(int n);
    int seen [256];
    logic [7:0] prev;
    rst_n = 0; modulo_n = 8'(n);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    foreach (seen[i]) seen[i] = 0;
    for (int t = 0; t < 3 * (2 * n + 2); t++) begin
      checks++;
      if (count !== 8'(ref_val(t, n)) || bus !== (count ^ (count >> 1))) begin
        failures++;
        $display("n=%0d t=%0d count=%0d exp=%0d bus=%h", n, t, count, ref_val(t, n), bus);
      end
      if (t > 0 && n > 0) begin
        checks++;
        if ($countones(bus ^ prev) > 1) begin
          failures++; $display("more than one bus bit toggled at t=%0d", t);
        end
      end
      if (t < 2 * n + 2) seen[count]++;
      prev = bus;
      @(posedge clk); #1;
    end
    for (int v = 0; v <= n; v++) begin
      checks++;
      if (seen[v] != 2) begin failures++; $display("value %0d seen %0d times", v, seen[v]); end
    end
  endtask

  initial begin
    run(3);
    run(49);
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
