// tb_pixel_column: a full 256-cell column with the real time-stamp generator
// (n = 10, latency 22). In each mode, random rows are hit at one clock and
// the trigger comes exactly one latency later; a second trigger one clock
// off must record nothing. Each event is loaded and shifted out and compared
// with the expected pattern: 256 bits (one per row) in ALICE mode, 32 bits
// (the OR over each group of eight rows) in LHCb mode. Also checks the
// configuration chain (1280 bits, read back on cfg_so; a masked row gives no
// hit) and the column fast-OR.
module tb_pixel_column;
  import alice1_pkg::*;
  localparam int N = 10, L = 2 * N + 2, R = 256;

  logic clk = 0, rst_n = 1, tck = 0, trst_n = 1;
  // drive a real falling edge into the asynchronous resets
  initial begin #1 trst_n = 0; rst_n = 0; end
  logic [7:0] bus, cnt;
  mode_e mode;
  logic [R-1:0] disc;
  logic disc_or, trig, sr_load, sr_shift, dout, cfg_shift, cfg_si, cfg_so;
  logic [3:0] wr_gray, rd_gray;
  pix_cfg_t [R-1:0] cfg;
  int checks = 0, failures = 0;

  delay_bus_gen gen (.clk, .rst_n, .modulo_n(8'(N)), .bus, .count(cnt));
  pixel_column #(.NROWS(R)) dut (.clk, .rst_n, .mode, .disc, .disc_or, .delay_bus(bus),
                    .trig_strobe(trig), .fifo_we(trig), .wr_gray, .rd_gray, .sr_load, .sr_shift,
                    .dout, .tck, .cfg_rst_n(trst_n), .cfg_shift, .cfg_si, .cfg_so, .cfg);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [3:0] g(int v);
    return 4'(v ^ (v >> 1));
  endfunction

  task automatic tck_pulse();
    #2 tck = 1; #2 tck = 0;
  endtask

  // hit the given rows, trigger after the latency (slot s), a stray trigger
  // one clock later (slot s+1), then read both slots back
  task automatic event_test(logic [R-1:0] rows, logic [R-1:0] masked, int s);
    int len = (mode == MODE_LHCB) ? R / 8 : R;
    logic [R-1:0] e;
    logic [R-1:0] live = rows & ~masked;
    for (int i = 0; i < R; i++) e[i] = (mode == MODE_LHCB) ? |live[(i / 8) * 8 +: 8] : live[i];
    disc = rows;
    #1 check(disc_or == |live, "fast-OR of unmasked rows");
    @(posedge clk); #1 disc = '0;
    repeat (L - 1) @(posedge clk);
    #1 trig = 1; wr_gray = g(s);
    @(posedge clk); #1 wr_gray = g(s + 1);
    @(posedge clk); #1 trig = 0;
    for (int k = 0; k < 2; k++) begin
      rd_gray = g(s + k); sr_load = 1;
      @(posedge clk); #1 sr_load = 0; sr_shift = 1;
      for (int i = 0; i < len; i++) begin
        logic exp_bit = (k == 0) ? e[(mode == MODE_LHCB) ? i * 8 : i] : 1'b0;
        check(dout == exp_bit, $sformatf("mode %0d slot %0d position %0d: %b exp %b", mode, s + k, i, dout, exp_bit));
        @(posedge clk); #1;
      end
      sr_shift = 0;
    end
  endtask

  initial begin
    logic [R*5-1:0] pat;
    trig = 0; sr_load = 0; sr_shift = 0; disc = '0; wr_gray = 0; rd_gray = 0;
    cfg_shift = 0; cfg_si = 0; mode = MODE_ALICE;
    #12 rst_n = 1; trst_n = 1;
    // configuration chain: shift a random pattern, then again to read it back
    for (int i = 0; i < R * 5; i++) pat[i] = 1'($urandom);
    pat[5 * 17 + 3] = 1'b0;   // row 17 stays unmasked
    cfg_shift = 1;
    for (int i = R * 5 - 1; i >= 0; i--) begin cfg_si = pat[i]; tck_pulse(); end
    for (int r = 0; r < R; r++) check(cfg[r] == pat[r*5 +: 5], $sformatf("row %0d config", r));
    for (int i = R * 5 - 1; i >= 0; i--) begin
      check(cfg_so == pat[i], "config read back");
      cfg_si = 1'b0; tck_pulse();
    end
    // all zero now; mask row 40 only
    for (int i = R * 5 - 1; i >= 0; i--) begin cfg_si = (i == 40 * 5 + 3); tck_pulse(); end
    cfg_shift = 0;
    check(cfg[40].mask && !cfg[41].mask, "row 40 masked");
    for (int m = 0; m < 2; m++) begin
      mode = (m == 0) ? MODE_ALICE : MODE_LHCB;
      rst_n = 0; #3 rst_n = 1;
      repeat (3) @(posedge clk);
      for (int ev = 0; ev < 6; ev++) begin
        logic [R-1:0] rows;
        for (int i = 0; i < R; i++) rows[i] = ($urandom % 20) == 0;
        if (ev == 0) rows = '0;
        if (ev == 1) begin rows = '0; rows[40] = 1'b1; end   // masked: nothing
        event_test(rows, R'(1) << 40, (2 * ev) % (m == 0 ? 4 : 16));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
