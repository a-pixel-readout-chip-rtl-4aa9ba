// tb_event_fifo: writes random bits to random slots of one cell buffer
// through the Gray address lines and reads them back, comparing with a
// shadow array; also checks that a clock without write enable changes nothing.
module tb_event_fifo;
  logic clk = 0, rst_n = 1, we, din, dout;
  // drive a real falling edge into the asynchronous resets
  initial begin #1 rst_n = 0; end
  logic [1:0] wr_addr, rd_addr;
  logic [3:0] shadow;
  int checks = 0, failures = 0;

  event_fifo dut (.clk, .rst_n, .we, .wr_addr, .din, .rd_addr, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; din = 0; wr_addr = 0; rd_addr = 0; shadow = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      we = 1'($urandom); din = 1'($urandom); wr_addr = 2'($urandom);
      @(posedge clk); #1;
      if (we) shadow[wr_addr] = din;
      we = 0;
      for (int a = 0; a < 4; a++) begin
        rd_addr = 2'(a); #1;
        checks++;
        if (dout !== shadow[a]) begin
          failures++; $display("slot %0d read %b exp %b", a, dout, shadow[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
