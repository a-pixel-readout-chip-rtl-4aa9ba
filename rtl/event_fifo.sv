// event_fifo: the 4-event buffer of one cell. Each entry is one bit: whether
// the cell had a hit in coincidence with that trigger. Write and read slots
// are selected by the two low bits of the Gray-coded write and read address
// buses that the periphery broadcasts to the whole matrix, so the cell itself
// holds no pointers. In LHCb mode four of these buffers form one 16-event
// buffer, the upper two address bits choosing the cell (see pixel_group).
// Timing: write on the clock edge with we high; dout is combinational.
module event_fifo
  import alice1_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [1:0] wr_addr,  // low bits of the Gray write bus
  input  logic       din,
  input  logic [1:0] rd_addr,  // low bits of the Gray read bus
  output logic       dout
);

  logic [CELL_DEPTH-1:0] mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  mem <= '0;
    else if (we) mem[wr_addr] <= din;
  end

  assign dout = mem[rd_addr];

endmodule
