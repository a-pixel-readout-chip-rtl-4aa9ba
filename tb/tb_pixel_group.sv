// tb_pixel_group: eight cells in both modes with the real time-stamp
// generator (n = 20, latency 42 clocks). Each round applies random
// discriminator pulses and random triggers while a reference model predicts
// the coincidence of every trigger (per cell in ALICE mode with two delay
// units each; in LHCb mode on the OR of the eight cells with sixteen units),
// then reads every FIFO slot back through the readout flip-flops: eight bits
// shifted out per event in ALICE mode, one bit from the top cell in LHCb
// mode. A burst of 17 hits checks that the sixteenth unit is used and the
// seventeenth hit is lost. The LHCb bypass (one clock from sr_in to sr_out)
// and the ALICE shift path (eight clocks) are checked as well.
module tb_pixel_group;
  import alice1_pkg::*;
  localparam int N = 20, L = 2 * N + 2;

  logic clk = 0, rst_n = 1, tck = 0;
  // drive a real falling edge into the asynchronous resets
  initial begin #1 rst_n = 0; end
  logic [7:0] bus, cnt;
  mode_e mode;
  logic [7:0] disc;
  logic disc_or, trig, sr_load, sr_shift, sr_in, sr_out, cfg_so;
  logic [3:0] wr_gray, rd_gray;
  pix_cfg_t [7:0] cfg;
  int checks = 0, failures = 0, n_coin = 0, n_full16 = 0;

  delay_bus_gen gen (.clk, .rst_n, .modulo_n(8'(N)), .bus, .count(cnt));
  pixel_group dut (.clk, .rst_n, .mode, .disc, .disc_or, .delay_bus(bus), .trig_strobe(trig),
                   .fifo_we(trig), .wr_gray, .rd_gray, .sr_load, .sr_shift, .sr_in, .sr_out,
                   .tck, .cfg_rst_n(rst_n), .cfg_shift(1'b0), .cfg_si(1'b0), .cfg_so, .cfg);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
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

  // reference model state
  int   fire_at [8][16];   // [cell][unit] (LHCb uses row 0 with 16 units)
  logic [7:0] exp_ev [16];
  logic [7:0] prev_disc;
  logic prev_or;
  int   wp;

  task automatic model_reset();
    foreach (fire_at[i, j]) fire_at[i][j] = -1;
    foreach (exp_ev[i]) exp_ev[i] = '0;
    prev_disc = '0; prev_or = 0; wp = 0;
  endtask

  // one clock: apply disc/trig already set, check nothing, update model
  task automatic model_step(int cyc);
    logic lhcb = (mode == MODE_LHCB);
    int depth = lhcb ? 16 : 4;
    logic [7:0] c = '0;
    int units = lhcb ? 16 : 2;
    if (lhcb) begin
      for (int u = 0; u < 16; u++) if (fire_at[0][u] == cyc) c = 8'hFF;
      if ((|disc) && !prev_or) begin
        int busy = 0;
        for (int u = 0; u < 16; u++) if (fire_at[0][u] >= cyc) busy++;
        if (busy == 15) n_full16++;
        for (int u = 0; u < 16; u++)
          if (fire_at[0][u] < cyc) begin fire_at[0][u] = cyc + L; break; end
      end
    end else begin
      for (int k = 0; k < 8; k++) begin
        for (int u = 0; u < 2; u++) if (fire_at[k][u] == cyc) c[k] = 1'b1;
        if (disc[k] && !prev_disc[k])
          for (int u = 0; u < 2; u++)
            if (fire_at[k][u] < cyc) begin fire_at[k][u] = cyc + L; break; end
      end
    end
    if (trig) begin
      exp_ev[wp] = c;
      if (|c) n_coin++;
      wp = (wp + 1) % depth;
    end
    prev_disc = disc; prev_or = |disc;
  endtask

  task automatic read_all();
    int depth = (mode == MODE_LHCB) ? 16 : 4;
    for (int s = 0; s < depth; s++) begin
      rd_gray = g(s); sr_load = 1;
      @(posedge clk); #1 sr_load = 0;
      if (mode == MODE_LHCB) begin
        check(sr_out == exp_ev[s][0], $sformatf("LHCb slot %0d read %b exp %b", s, sr_out, exp_ev[s][0]));
      end else begin
        for (int k = 0; k < 8; k++) begin
          check(sr_out == exp_ev[s][k], $sformatf("ALICE slot %0d cell %0d read %b exp %b", s, k, sr_out, exp_ev[s][k]));
          sr_shift = 1; @(posedge clk); #1 sr_shift = 0;
        end
      end
    end
  endtask

  task automatic run(mode_e m, int rounds);
    int cyc = 0;
    mode = m; rst_n = 0; disc = 0; trig = 0; sr_load = 0; sr_shift = 0; sr_in = 0;
    wr_gray = 0; rd_gray = 0;
    model_reset();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < rounds; r++) begin
      for (int t = 0; t < 300; t++) begin
        if (r == 0 && m == MODE_LHCB && t < 34)
          disc = (t % 2 == 0) ? 8'(1 << (t % 8)) : 8'h00;  // burst of 17 hits
        else if (t < 200)
          disc = disc & 8'($urandom) | ((($urandom % 4) == 0) ? 8'(1 << ($urandom % 8)) : 8'h00);
        else
          disc = 8'h00;
        trig = (t >= 200) ? 1'b0 : (($urandom % 3) == 0);
        wr_gray = g(wp);
        #1 model_step(cyc);
        @(posedge clk); #1;
        cyc++;
      end
      disc = 0;
      read_all();
      // all stored hits have fired by now: start the next round clean
      for (int u = 0; u < 16; u++) for (int k = 0; k < 8; k++) fire_at[k][u] = -1;
      prev_disc = 0; prev_or = 0;
    end
  endtask

  initial begin
    run(MODE_ALICE, 6);
    // ALICE shift path: sr_in reaches sr_out after eight shifts
    sr_in = 1; sr_shift = 1;
    repeat (7) @(posedge clk);
    #1 check(sr_out == 1'b0, "ALICE: not through before eight shifts");
    @(posedge clk); #1 check(sr_out == 1'b1, "ALICE: through after eight shifts");
    sr_shift = 0;
    run(MODE_LHCB, 6);
    // LHCb bypass: one shift from sr_in to sr_out
    sr_in = 1; sr_shift = 1;
    @(posedge clk); #1 check(sr_out == 1'b1, "LHCb: seven cells bypassed");
    sr_in = 0;
    @(posedge clk); #1 check(sr_out == 1'b0, "LHCb: bypass follows sr_in");
    sr_shift = 0;
    check(n_coin > 20, "coincidences happened");
    check(n_full16 > 0, "sixteenth delay unit used");
    $display("coincidences=%0d sixteenth-unit=%0d", n_coin, n_full16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
