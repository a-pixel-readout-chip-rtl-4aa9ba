// tb_jtag_reg: drives the capture/shift/update strobes of a 16-bit data
// register directly. Checks the reset value, that shifting W bits then
// updating loads q, that q does not move while shifting, and that capture
// followed by W shifts returns the held value LSB first on tdo.
module tb_jtag_reg;
  logic tck = 0, rst_n = 1, capture = 0, shift = 0, update = 0, tdi = 0, tdo;
  // drive a real falling edge into the asynchronous resets
  initial begin #1 rst_n = 0; end
  logic [15:0] q;
  int checks = 0, failures = 0;

  jtag_reg #(.W(16), .RESET_VAL(16'hA5C3)) dut (.tck, .rst_n, .capture, .shift, .update, .tdi, .tdo, .q);

  always #5 tck = ~tck;

  initial begin
    repeat (10000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_read(logic [15:0] v);
    logic [15:0] prev = q, got;
    for (int i = 0; i < 16; i++) begin
      shift = 1; tdi = v[i];
      @(posedge tck); #1;
    end
    shift = 0;
    checks++;
    if (q !== prev) begin failures++; $display("q moved during shift"); end
    update = 1; @(posedge tck); #1 update = 0;
    checks++;
    if (q !== v) begin failures++; $display("q=%h exp %h", q, v); end
    capture = 1; @(posedge tck); #1 capture = 0;
    for (int i = 0; i < 16; i++) begin
      got[i] = tdo;
      shift = 1; tdi = 1'b0;
      @(posedge tck); #1;
    end
    shift = 0;
    checks++;
    if (got !== v) begin failures++; $display("read back %h exp %h", got, v); end
  endtask

  initial begin
    #12 rst_n = 1;
    checks++;
    if (q !== 16'hA5C3) begin failures++; $display("reset value %h", q); end
    repeat (20) write_read(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
