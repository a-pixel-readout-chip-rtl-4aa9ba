// tb_pixel_cell: one cell with the real time-stamp generator (n = 6, latency
// 14 clocks). Random discriminator pulses (1..3 clocks long) and random
// triggers are applied; a reference model with two delay units predicts for
// every clock the coincidence output, the hand-over of a third hit (hit_out)
// and what the FIFO stores per trigger, which is read back through fifo_dout
// and the readout flip-flop. Also checks the configuration segment (5 bits,
// readback on cfg_so), masking, and the shift path of the readout flip-flop.
module tb_pixel_cell;
  import alice1_pkg::*;
  localparam int N = 6, L = 2 * N + 2;

  logic clk = 0, rst_n = 1, tck = 0;
  // drive a real falling edge into the asynchronous resets
  initial begin #1 rst_n = 0; end
  logic [7:0] bus, cnt;
  logic disc, disc_m, own_hit, hit_out, trig, coin;
  logic fifo_we, fifo_din, fifo_dout, sr_load, sr_d, sr_shift, sr_in, sr_q;
  logic [1:0] wr_addr, rd_addr;
  logic cfg_shift, cfg_si, cfg_so;
  pix_cfg_t cfg;
  int checks = 0, failures = 0, n_coin = 0, n_lost = 0, n_two = 0;

  delay_bus_gen gen (.clk, .rst_n, .modulo_n(8'(N)), .bus, .count(cnt));
  pixel_cell dut (.clk, .rst_n, .disc, .disc_m, .own_hit, .hit_in(own_hit), .hit_out,
                  .delay_bus(bus), .trig_strobe(trig), .coin,
                  .fifo_we, .fifo_din(coin), .wr_addr, .rd_addr, .fifo_dout,
                  .sr_load, .sr_d(fifo_dout), .sr_shift, .sr_in, .sr_q,
                  .tck, .cfg_rst_n(rst_n), .cfg_shift, .cfg_si, .cfg_so, .cfg);
  assign fifo_we = trig;

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic cfg_write(logic [4:0] v);
    for (int i = 4; i >= 0; i--) begin
      cfg_shift = 1; cfg_si = v[i];
      #2 tck = 1; #2 tck = 0;
    end
    cfg_shift = 0;
  endtask

  initial begin
    int fire_at [2];
    int k, dur;
    logic prev_m, exp_coin, last_coin, exp_sr;
    logic [1:0] wp;
    disc = 0; trig = 0; sr_load = 0; sr_shift = 0; sr_in = 0; cfg_shift = 0; cfg_si = 0;
    wr_addr = 0; rd_addr = 0;
    #12 rst_n = 1;
    // configuration segment: write and read back
    cfg_write(5'b10110);
    check(cfg == 5'b10110, "configuration written");
    check(cfg_so == 1'b1, "configuration MSB on cfg_so");
    // masked: no hits at all
    cfg_write(5'b01000);
    check(cfg.mask && !cfg.test_en, "mask set");
    @(posedge clk); #1 disc = 1;
    #1 check(!disc_m && !own_hit, "masked pixel gives no hit");
    @(posedge clk); #1 disc = 0;
    cfg_write(5'b00000);
    repeat (3) @(posedge clk);
    // random operation against the reference model
    #1;
    fire_at = '{-1, -1};
    prev_m = 0; wp = 0; last_coin = 0; exp_sr = 0; k = 0; dur = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // stimulus for this clock
      if (dur > 0) dur--;
      else if (disc) disc = 0;
      else if ($urandom % 6 == 0) begin disc = 1; dur = $urandom % 3; end
      trig    = ($urandom % 2) == 0;
      wr_addr = wp ^ (wp >> 1);
      sr_load = 1;
      #1;
      // model
      exp_coin = trig && (fire_at[0] == cyc || fire_at[1] == cyc);
      check(coin == exp_coin, $sformatf("coin=%b exp %b at cycle %0d", coin, exp_coin, cyc));
      check(own_hit == (disc && !prev_m), "hit is the rising edge");
      if (own_hit) begin
        if (fire_at[0] < cyc)      fire_at[0] = cyc + L;
        else if (fire_at[1] < cyc) fire_at[1] = cyc + L;
        else begin
          n_lost++;
          check(hit_out, "third hit handed on");
        end
        if (fire_at[0] > cyc && fire_at[1] > cyc) n_two++;
      end else check(!hit_out, "no hand-over without a hit");
      if (coin) n_coin++;
      exp_sr = fifo_dout;
      prev_m = disc;
      @(posedge clk); #1;
      check(sr_q == exp_sr, "readout flip-flop loaded with the FIFO entry");
      // the entry just written is visible at its read address
      if (trig) begin
        rd_addr = wp ^ (wp >> 1);
        #1 check(fifo_dout == exp_coin, "FIFO entry written by the trigger");
        wp = wp + 1;
      end
    end
    // shift path
    sr_load = 0; sr_shift = 1; sr_in = ~sr_q;
    exp_sr = sr_in;
    @(posedge clk); #1;
    check(sr_q == exp_sr, "shift takes the cell above");
    check(n_coin > 20, "coincidences happened");
    check(n_lost > 0, "a hit found both units busy");
    check(n_two > 0, "two hits stored at once");
    $display("coincidences=%0d two-held=%0d handed-on=%0d", n_coin, n_two, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
