// tb_jtag_tap: the TAP controller with an 8-bit and a 16-bit jtag_reg and a
// 10-bit stand-in for the pixel chain, driven through TMS/TDI only. Checks
// the instruction-register capture pattern 0001, BYPASS after reset (one
// clock of delay), writing and reading back both registers, and that the
// pixel chain shifts only under its instruction and its length shows on TDO.
module tb_jtag_tap;
  import alice1_pkg::*;
  logic tck = 0, trst_n = 1, tms = 1, tdi = 0, tdo, tdo_en;
  // drive a real falling edge into the asynchronous resets
  initial begin #1 trst_n = 0; end
  logic pix_shift, ctrl_capture, ctrl_shift, ctrl_update, dac_capture, dac_shift, dac_update;
  logic ctrl_so, dac_so;
  logic [7:0]  ctrl_q;
  logic [15:0] dac_q;
  logic [9:0]  pix;
  logic [3:0]  ir_q;
  int checks = 0, failures = 0;

  jtag_tap dut (.tck, .trst_n, .tms, .tdi, .tdo, .tdo_en, .pix_shift,
                .ctrl_capture, .ctrl_shift, .ctrl_update,
                .dac_capture, .dac_shift, .dac_update,
                .pix_so(pix[9]), .ctrl_so, .dac_so, .ir_q);
  jtag_reg #(.W(8)) u_ctrl (.tck, .rst_n(trst_n), .capture(ctrl_capture), .shift(ctrl_shift),
                            .update(ctrl_update), .tdi, .tdo(ctrl_so), .q(ctrl_q));
  jtag_reg #(.W(16)) u_dac (.tck, .rst_n(trst_n), .capture(dac_capture), .shift(dac_shift),
                            .update(dac_update), .tdi, .tdo(dac_so), .q(dac_q));

  always_ff @(posedge tck or negedge trst_n)
    if (!trst_n)        pix <= '0;
    else if (pix_shift) pix <= {pix[8:0], tdi};

  always #10 tck = ~tck;

  initial begin
    repeat (20000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic m, logic d, output logic o);
    tms = m; tdi = d;
    @(posedge tck); o = tdo;
    @(negedge tck);
  endtask

  task automatic go_idle();
    logic o;
    repeat (5) step(1, 0, o);
    step(0, 0, o);
  endtask

  task automatic shift_ir(logic [3:0] v, output logic [3:0] got);
    logic o;
    step(1, 0, o); step(1, 0, o); step(0, 0, o); step(0, 0, o);
    for (int i = 0; i < 4; i++) begin step(i == 3, v[i], o); got[i] = o; end
    step(1, 0, o); step(0, 0, o);
  endtask

  task automatic shift_dr(int n, logic [63:0] v, output logic [63:0] got);
    logic o;
    got = '0;
    step(1, 0, o); step(0, 0, o); step(0, 0, o);
    for (int i = 0; i < n; i++) begin step(i == n - 1, v[i], o); got[i] = o; end
    step(1, 0, o); step(0, 0, o);
  endtask

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [3:0]  irg;
    logic [63:0] got;
    @(negedge tck); trst_n = 1;
    go_idle();
    check(ir_q == IR_BYPASS, "BYPASS after reset");
    // bypass: a pattern comes back one clock late
    shift_dr(16, 64'h0000_0000_0000_B3C5, got);
    check(got[15:1] == 15'(16'hB3C5), "bypass delay of one bit");
    check(got[0] == 1'b0, "bypass captures 0");
    shift_ir(IR_CTRL, irg);
    check(irg == 4'b0001, "IR capture pattern");
    check(ir_q == IR_CTRL, "IR loaded");
    shift_dr(8, 64'h5A, got);
    check(ctrl_q == 8'h5A, "control word written");
    shift_dr(8, 64'h00, got);
    check(got[7:0] == 8'h5A, "control word read back");
    check(ctrl_q == 8'h00, "control word rewritten");
    shift_ir(IR_DAC, irg);
    shift_dr(16, 64'hBEEF, got);
    check(dac_q == 16'hBEEF && ctrl_q == 8'h00, "DAC register written, control untouched");
    shift_dr(16, 64'hBEEF, got);
    check(got[15:0] == 16'hBEEF, "DAC register read back");
    // pixel chain: 10 bits, shift 20 bits and see the first 10 return
    shift_ir(IR_PIXCFG, irg);
    shift_dr(20, 64'h3_5A6B, got);
    begin
      logic [19:0] v = 20'h3_5A6B;
      logic [9:0]  e;
      for (int k = 0; k < 10; k++) e[k] = v[19 - k];   // last bit in sits nearest TDI
      check(pix == e, "pixel chain contents");
      check(got[19:10] == v[9:0], "pixel chain output after 10 clocks");
    end
    check(dac_q == 16'hBEEF, "DAC untouched by pixel shifting");
    // test-logic-reset returns to BYPASS
    go_idle();
    check(ir_q == IR_BYPASS, "BYPASS after TMS reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
