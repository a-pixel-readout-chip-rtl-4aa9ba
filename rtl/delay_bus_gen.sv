// delay_bus_gen: time-stamp generator of the periphery. An up-down counter
// runs 0,1,..,n,n,n-1,..,0,0,1,.. (it dwells one tick at each turning point),
// so its period is 2n+2 ticks and every value appears exactly twice per
// period. The count is Gray-encoded onto the 8-bit bus that every delay unit
// in the matrix latches and compares against, so only one bus line toggles per
// clock. A hit latched at tick t therefore matches the bus a second time on the
// opposite slope and a third time at exactly t+2n+2, the programmed trigger
// latency. The up-down counter, its adjustable modulo n, the Gray coding and the
// 2n+2 latency follow the document; the one-tick dwell at the turning points
// is this design's reading of how every hit gets exactly 2n+2.
// Timing: modulo_n is sampled every cycle; change it only while no hit is
// stored. bus is registered.
module delay_bus_gen
  import alice1_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [BUS_W-1:0] modulo_n,  // top value n of the count
  output logic [BUS_W-1:0] bus,       // Gray-coded time stamp
  output logic [BUS_W-1:0] count      // binary count (for observation)
);

  logic going_up;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      going_up <= 1'b1;
    end else if (going_up) begin
      if (count >= modulo_n) going_up <= 1'b0;  // dwell at the top
      else                   count    <= count + 1'b1;
    end else begin
      if (count == '0) going_up <= 1'b1;        // dwell at the bottom
      else             count    <= count - 1'b1;
    end
  end

  assign bus = bin2gray(count);

endmodule
