// tb_fifo_ptr_ctrl: random triggers and reads in both modes against a
// reference queue model. Checks the Gray write/read buses against the
// reference pointers, the occupancy, full/empty, that triggers are refused
// exactly when the buffer holds 4 (ALICE) or 16 (LHCb) events, and that only
// one bus bit changes per step.
module tb_fifo_ptr_ctrl;
  import alice1_pkg::*;
  logic clk = 0, rst_n = 1, trigger, rd_adv, trig_strobe, full, empty;
  // drive a real falling edge into the asynchronous resets
  initial begin #1 rst_n = 0; end
  logic [3:0] wr_gray, rd_gray;
  logic [4:0] used;
  mode_e mode;
  int checks = 0, failures = 0, refused = 0;

  fifo_ptr_ctrl dut (.clk, .rst_n, .mode, .trigger, .rd_adv, .trig_strobe,
                     .wr_gray, .rd_gray, .used, .full, .empty);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] g(int v);
    return 4'(v ^ (v >> 1));
  endfunction

  task automatic run(mode_e m);
    int depth = (m == MODE_LHCB) ? 16 : 4;
    int wp = 0, rp = 0, n = 0;
    logic [3:0] pw, pr;
    mode = m; rst_n = 0; trigger = 0; rd_adv = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      trigger = ($urandom % 3) != 0;
      rd_adv  = (n > 0) && (($urandom % 4) == 0);
      #1;
      checks++;
      if (wr_gray !== g(wp) || rd_gray !== g(rp) || used !== 5'(n) ||
          full !== (n == depth) || empty !== (n == 0) ||
          trig_strobe !== (trigger && n < depth)) begin
        failures++;
        $display("mode=%0d k=%0d wg=%h/%h rg=%h/%h used=%0d/%0d", m, k, wr_gray, g(wp),
                 rd_gray, g(rp), used, n);
      end
      if (trigger && n == depth) refused++;
      pw = wr_gray; pr = rd_gray;
      @(posedge clk); #1;
      if (trigger && n < depth) begin wp = (wp + 1) % depth; n++; end
      if (rd_adv) begin rp = (rp + 1) % depth; n--; end
      checks++;
      if ($countones(pw ^ wr_gray) > 1 || $countones(pr ^ rd_gray) > 1) begin
        failures++; $display("more than one address bit changed");
      end
    end
  endtask

  initial begin
    run(MODE_ALICE);
    run(MODE_LHCB);
    checks++;
    if (refused == 0) begin failures++; $display("full buffer never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
