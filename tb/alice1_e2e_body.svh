// alice1_e2e_body.svh: body of the end-to-end chip testbench, shared by the
// full-size and the reduced-size wrapper. The including module declares
// R, C (matrix size), HITS (random hits per clock) and NCFG, and instantiates
// alice1_chip as dut on the signals declared below, after this file.

  logic clk_en = 1'b1;   // the system clock is stopped while JTAG configures
  always #5 clk = clk_en ? ~clk : clk;

  int checks = 0, failures = 0;
  int n_coin = 0, n_two = 0, n_lost = 0, n_deep = 0, n_refused = 0, n_queued = 0;
  int n_masked = 0, n_switch = 0, n_events = 0;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ------------------------------------------------------------ JTAG driver
  task automatic jstep(logic m, logic d, output logic o);
    tms = m; tdi = d;
    #2 tck = 1; o = tdo;
    #2 tck = 0;
  endtask

  task automatic jreset();
    logic o;
    repeat (5) jstep(1, 0, o);
    jstep(0, 0, o);
  endtask

  task automatic jir(logic [3:0] v);
    logic o;
    jstep(1, 0, o); jstep(1, 0, o); jstep(0, 0, o); jstep(0, 0, o);
    for (int i = 0; i < 4; i++) jstep(i == 3, v[i], o);
    jstep(1, 0, o); jstep(0, 0, o);
  endtask

  // shifts bits[0] first; returns what came out of TDO in the same order
  task automatic jdr(ref logic bits [], ref logic got []);
    logic o;
    got = new[bits.size()];
    jstep(1, 0, o); jstep(0, 0, o); jstep(0, 0, o);
    foreach (bits[i]) begin jstep(i == bits.size() - 1, bits[i], o); got[i] = o; end
    jstep(1, 0, o); jstep(0, 0, o);
  endtask

  // ------------------------------------------------------------ configuration
  pix_cfg_t want [C][R];

  task automatic configure();
    logic bits [], got [];
    logic [NUM_DAC*DAC_W-1:0] dac;
    foreach (maskv[c]) maskv[c] = '0;
    foreach (want[c, r]) want[c][r] = pix_cfg_t'(5'($urandom) & 5'b10111);  // no masks
    want[C-1][10].mask   = 1'b1;    // masked pixels
    want[0][R-5].mask    = 1'b1;
    want[C/2][R/2].mask  = 1'b1;
    foreach (want[c, r]) maskv[c][r] = want[c][r].mask;
    // pixel chain: position p = (c*R + r)*5 + bit; the last position goes first
    bits = new[NCFG];
    foreach (want[c, r])
      for (int b = 0; b < CFG_BITS; b++) bits[NCFG - 1 - ((c * R + r) * CFG_BITS + b)] = want[c][r][b];
    jir(IR_PIXCFG);
    jdr(bits, got);
    begin
      int bad = 0;
      foreach (want[c, r]) if (pix_cfg[c][r] !== want[c][r]) bad++;
      check(bad == 0, $sformatf("%0d pixel configurations differ", bad));
    end
    // DAC codes, written then read back
    dac = {NUM_DAC{8'h00}};
    for (int i = 0; i < NUM_DAC; i++) dac[i*8 +: 8] = 8'($urandom);
    bits = new[NUM_DAC * DAC_W];
    foreach (bits[i]) bits[i] = dac[i];
    jir(IR_DAC);
    jdr(bits, got);
    check(dac_code == dac, "DAC codes written");
    jdr(bits, got);
    begin
      logic [NUM_DAC*DAC_W-1:0] back;
      foreach (got[i]) back[i] = got[i];
      check(back == dac, "DAC codes read back");
    end
  endtask

  task automatic set_n(int n);
    logic bits [], got [];
    bits = new[8];
    foreach (bits[i]) bits[i] = n[i];
    jir(IR_CTRL);
    jdr(bits, got);
    check(dut.modulo_n == 8'(n), "delay modulo written");
  endtask

  // ------------------------------------------------------------ reference model
  task automatic run_mode(mode_e m, int n, int cycles, int drain, int hot_c, int hot_r);
    int L = 2 * n + 2;
    int depth = (m == MODE_LHCB) ? 16 : 4;
    int len = (m == MODE_LHCB) ? R / 8 : R;
    int vcount = 0, cyc = 0;
    logic prev_valid = 0;
    logic [R-1:0] col_bits [C];
    foreach (fire_at[c, r, u]) fire_at[c][r][u] = -1;
    foreach (gfire[c, g, u]) gfire[c][g][u] = -1;
    due.delete();
    qhead = 0; qcount = 0; occ = 0;
    foreach (prev_m[c]) prev_m[c] = '0;
    mode = m; trigger = 0; read_req = 0; disc = '0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    set_n(n);
    @(posedge clk); #1;
    for (cyc = 0; cyc < cycles; cyc++) begin
      logic [R-1:0] live, edges;
      logic any_live = 1'b0;
      logic quiet = (cyc > cycles - drain);   // let the buffer drain at the end
      // ---- stimulus
      disc = '0;
      if (!quiet) begin
        for (int k = 0; k < HITS; k++) disc[$urandom % C][$urandom % R] = 1'b1;
        if (cyc % 3 == 0) disc[hot_c][hot_r] = 1'b1;       // hot pixel
        if (cyc % 97 == 5) disc[C-1][10] = 1'b1;          // masked pixel
        if (cyc % 50 == 0) disc[C/2][8 +: 8] = 8'hFF;       // cluster
      end
      trigger  = !quiet && ($urandom % ((m == MODE_LHCB) ? 12 : 60)) == 0;
      read_req = ($urandom % ((m == MODE_LHCB) ? 20 : 200)) == 0 || (quiet && occ > 0 && !data_valid);
      #1;
      // ---- model: coincidences of this clock, then new hits
      foreach (ev[c]) ev[c] = '0;
      if (due.exists(cyc)) begin
        foreach (due[cyc][i]) ev[due[cyc][i] / R][due[cyc][i] % R] = 1'b1;
        due.delete(cyc);
      end
      for (int c = 0; c < C; c++) begin
        live  = disc[c] & ~maskv[c];
        edges = live & ~prev_m[c];
        if ((disc[c] & maskv[c]) != '0) n_masked++;
        if (live != '0) any_live = 1'b1;
        if (edges != '0) begin
          if (m == MODE_ALICE) begin
            for (int r = 0; r < R; r++) if (edges[r]) begin
              if (fire_at[c][r][0] < cyc)      begin fire_at[c][r][0] = cyc + L; due[cyc + L].push_back(c * R + r); end
              else if (fire_at[c][r][1] < cyc) begin fire_at[c][r][1] = cyc + L; due[cyc + L].push_back(c * R + r); end
              else n_lost++;
              if (fire_at[c][r][0] > cyc && fire_at[c][r][1] > cyc) n_two++;
            end
          end else begin
            for (int g = 0; g < R / 8; g++)
              if ((|live[g*8 +: 8]) && !(|prev_m[c][g*8 +: 8])) begin
                int busy = 0;
                for (int u = 0; u < 16; u++) if (gfire[c][g][u] >= cyc) busy++;
                if (busy >= 2) n_deep++;
                if (busy == 16) n_lost++;
                for (int u = 0; u < 16; u++)
                  if (gfire[c][g][u] < cyc) begin
                    gfire[c][g][u] = cyc + L;
                    due[cyc + L].push_back(c * R + g);
                    break;
                  end
              end
          end
        end
        prev_m[c] = live;
      end
      check(fast_or == any_live, "fast-OR");
      check(fifo_full == (occ == depth), $sformatf("fifo_full=%b with %0d events", fifo_full, occ));
      if (trigger) begin
        if (occ < depth) begin
          int slot = (qhead + qcount) % QD;
          for (int c = 0; c < C; c++) begin
            expbuf[slot][c] = ev[c];
            if (ev[c] != '0) n_coin++;
          end
          qcount++;
          occ++;
        end else n_refused++;
      end
      if (read_req && data_valid) n_queued++;
      // ---- readout collection
      if (data_valid) begin
        for (int c = 0; c < C; c++) col_bits[c][vcount] = data_out[c];
        vcount++;
      end
      @(posedge clk); #1;
      if (data_valid && !prev_valid) begin
        occ--;                        // the load happened at this edge
        check(vcount == 0, "readouts separated");
      end
      if (!data_valid && prev_valid) begin
        check(vcount == len, $sformatf("readout of %0d clocks, exp %0d", vcount, len));
        check(qcount > 0, "readout with no event expected");
        if (qcount > 0) begin
          int bad = 0;
          for (int c = 0; c < C; c++)
            for (int i = 0; i < len; i++)
              if (col_bits[c][i] !== expbuf[qhead][c][i]) bad++;
          check(bad == 0, $sformatf("event %0d: %0d bits differ", n_events, bad));
          qhead = (qhead + 1) % QD;
          qcount--;
          n_events++;
        end
        vcount = 0;
      end
      prev_valid = data_valid;
    end
    check(qcount == 0, $sformatf("%0d events never read", qcount));
  endtask

  initial begin
    mode = MODE_ALICE; trigger = 0; read_req = 0; disc = '0;
    #3 trst_n = 0; rst_n = 0;
    #3 trst_n = 1; rst_n = 1;
    jreset();
    check(dut.modulo_n == 8'd49, "default delay modulo");
    clk_en = 1'b0;
    configure();
    clk_en = 1'b1;
    run_mode(MODE_ALICE, 49, 5000, 1500, 1, R - 20);
    n_switch++;
    run_mode(MODE_LHCB, 79, 3000, 800, C - 2, 40);
    $display("events=%0d coincidences=%0d two-held=%0d lost=%0d deep=%0d refused=%0d queued=%0d masked=%0d switches=%0d",
             n_events, n_coin, n_two, n_lost, n_deep, n_refused, n_queued, n_masked, n_switch);
    check(n_coin > 0,    "coincidence happened");
    check(n_two > 0,     "a pixel held two hits");
    check(n_lost > 0,    "a hit found all delay units busy");
    check(n_deep > 0,    "a super-pixel used more than two delay units");
    check(n_refused > 0, "a trigger met a full buffer");
    check(n_queued > 0,  "a read request was queued during a readout");
    check(n_masked > 0,  "a masked pixel was hit");
    check(n_switch > 0,  "mode switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
