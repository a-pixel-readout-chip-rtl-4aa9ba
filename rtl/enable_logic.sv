// enable_logic: steers an incoming hit to the first free delay unit of a
// cell. Units are tried in index order; if all are busy the hit is passed on
// through hit_out. In ALICE mode hit_out of a cell is unused (the hit is lost);
// in LHCb mode the cells of a super-pixel are chained through hit_in/hit_out
// so that any of their sixteen delay units can take a hit. Purely
// combinational. The priority order and the chaining are this design's
// reading of the "enable logic" blocks drawn in each cell.
module enable_logic #(
  parameter int unsigned N = 2  // delay units in the cell
) (
  input  logic         hit_in,  // hit to be stored
  input  logic [N-1:0] busy,    // delay units occupied
  output logic [N-1:0] store,   // one-hot: unit that takes the hit
  output logic         hit_out  // hit not taken here
);

  always_comb begin
    logic pending;
    pending = hit_in;
    store   = '0;
    for (int i = 0; i < int'(N); i++) begin
      if (pending && !busy[i]) begin
        store[i] = 1'b1;
        pending  = 1'b0;
      end
    end
    hit_out = pending;
  end

endmodule
