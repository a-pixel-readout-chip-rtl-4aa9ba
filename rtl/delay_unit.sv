// delay_unit: holds one hit for the trigger latency. On store it latches the
// Gray time stamp present on the bus (first comparison, counter = 1). On every
// following clock where the latch equals the bus, a 2-bit counter advances;
// the third equal comparison raises fire for that one clock (2n+2 ticks after
// the store, see delay_bus_gen) and frees the unit. The latch, comparator and
// 2-bit counter are the document's; the synchronous clock-by-clock comparison
// is this design's choice. Interface: store may be asserted only while busy is
// low; fire is combinational and meant for the trigger coincidence.
module delay_unit
  import alice1_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [BUS_W-1:0] bus,    // Gray time-stamp bus
  input  logic             store,  // hit accepted by this unit
  output logic             busy,   // unit holds a hit
  output logic             fire    // delayed hit, valid for one clock
);

  logic [BUS_W-1:0] stamp;
  logic [1:0]       ncmp;   // comparisons seen so far
  logic             match;

  assign match = (stamp == bus);
  assign fire  = busy && match && (ncmp == 2'd2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stamp <= '0;
      ncmp  <= '0;
      busy  <= 1'b0;
    end else if (store && !busy) begin
      stamp <= bus;
      ncmp  <= 2'd1;
      busy  <= 1'b1;
    end else if (busy && match) begin
      if (fire) begin
        ncmp <= '0;
        busy <= 1'b0;   // third comparison resets the unit
      end else begin
        ncmp <= ncmp + 2'd1;
      end
    end
  end

  a_store_free: assert property (@(posedge clk) disable iff (!rst_n) store |-> !busy)
    else $error("delay_unit: store while busy");

endmodule
