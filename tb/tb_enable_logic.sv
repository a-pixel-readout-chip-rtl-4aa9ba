// tb_enable_logic: exhaustive check of the hit steering for 2 units (one
// ALICE cell) and 16 units (one LHCb super-pixel worth) against a reference:
// the lowest-index free unit takes the hit, nothing is stored without a hit,
// and the hit is passed on only when every unit is busy.
module tb_enable_logic;
  logic        hit2, out2;
  logic [1:0]  busy2, store2;
  logic        hit16, out16;
  logic [15:0] busy16, store16;
  int checks = 0, failures = 0;

  enable_logic #(.N(2))  dut2  (.hit_in(hit2),  .busy(busy2),  .store(store2),  .hit_out(out2));
  enable_logic #(.N(16)) dut16 (.hit_in(hit16), .busy(busy16), .store(store16), .hit_out(out16));

  function automatic logic [16:0] expect_of(logic hit, logic [15:0] busy, int n);
    logic [15:0] st = '0;
    if (hit)
      for (int i = 0; i < n; i++)
        if (!busy[i]) begin st[i] = 1'b1; return {1'b0, st}; end
    return {hit, st};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [16:0] e;
    for (int h = 0; h < 2; h++)
      for (int b = 0; b < 4; b++) begin
        hit2 = h[0]; busy2 = b[1:0]; #1;
        e = expect_of(hit2, {14'b0, busy2}, 2);
        checks++;
        if ({out2, store2} !== {e[16], e[1:0]}) begin
          failures++; $display("N=2 hit=%0d busy=%b store=%b out=%b", h, busy2, store2, out2);
        end
      end
    for (int k = 0; k < 3000; k++) begin
      hit16  = 1'($urandom);
      busy16 = (k % 5 == 0) ? 16'hFFFF : 16'($urandom) | 16'($urandom);
      #1;
      e = expect_of(hit16, busy16, 16);
      checks++;
      if ({out16, store16} !== e) begin
        failures++; $display("N=16 hit=%0d busy=%h store=%h out=%b", hit16, busy16, store16, out16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
