// tb_readout_ctrl: the readout sequencer in both modes with NROWS = 256.
// Checks that a request loads one event when the buffer is not empty, that
// data_valid then lasts exactly 256 (ALICE) or 32 (LHCb) clocks with a shift
// each clock, that requests made during a readout are served afterwards, and
// that nothing is loaded while the buffer is empty.
module tb_readout_ctrl;
  import alice1_pkg::*;
  logic clk = 0, rst_n = 1, read_req, empty, sr_load, sr_shift, data_valid, active;
  // drive a real falling edge into the asynchronous resets
  initial begin #1 rst_n = 0; end
  mode_e mode;
  int checks = 0, failures = 0;

  readout_ctrl #(.NROWS(256)) dut (.clk, .rst_n, .mode, .read_req, .empty,
                                   .sr_load, .sr_shift, .data_valid, .active);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count loads and valid clocks of one readout
  task automatic expect_readout(int len);
    int t = 0, v = 0;
    #1;
    while (!sr_load && t < 20) begin @(posedge clk); #1; t++; end
    checks++;
    if (!sr_load) begin failures++; $display("no load"); return; end
    @(posedge clk); #1;
    while (data_valid && v < 1000) begin
      if (!sr_shift || sr_load) begin failures++; $display("bad strobes during readout"); end
      v++; @(posedge clk); #1;
    end
    checks++;
    if (v != len) begin failures++; $display("valid for %0d clocks, exp %0d", v, len); end
  endtask

  task automatic run(mode_e m, int len);
    mode = m; rst_n = 0; read_req = 0; empty = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // request with empty buffer: nothing happens until an event arrives
    read_req = 1; @(posedge clk); #1 read_req = 0;
    repeat (10) begin
      checks++;
      if (sr_load || data_valid) begin failures++; $display("load from empty buffer"); end
      @(posedge clk); #1;
    end
    empty = 0;
    expect_readout(len);
    // two requests, the second during the readout
    read_req = 1; @(posedge clk); #2 read_req = 0;
    checks++;
    if (!sr_load) begin failures++; $display("request not served at once"); end
    repeat (6) @(posedge clk); #1;
    read_req = 1; @(posedge clk); #1 read_req = 0;
    begin
      int v = 0;
      while (data_valid && v < 1000) begin v++; @(posedge clk); #1; end
      checks++;
      if (v != len - 6) begin failures++; $display("first readout left %0d, exp %0d", v, len - 6); end
    end
    expect_readout(len);
  endtask

  initial begin
    run(MODE_ALICE, 256);
    run(MODE_LHCB, 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
