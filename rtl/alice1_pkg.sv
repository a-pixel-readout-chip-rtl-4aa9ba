// alice1_pkg: sizes, types and helper functions shared by the pixel readout
// chip. The matrix is 256 rows by 32 columns of 50 um x 400 um cells; in LHCb
// mode 8 vertically adjacent cells form one super-pixel, giving 32 x 32
// channels. Time stamps travel on an 8-bit Gray-coded bus and FIFO addresses
// on two 4-bit Gray-coded buses. The number of DAC registers and the JTAG
// instruction codes are this design's own choices.
package alice1_pkg;

  localparam int unsigned ROWS        = 256;  // cells per column
  localparam int unsigned COLS        = 32;   // columns, read out in parallel
  localparam int unsigned GROUP       = 8;    // cells per LHCb super-pixel
  localparam int unsigned DU_PER_CELL = 2;    // delay units per cell
  localparam int unsigned BUS_W       = 8;    // time-stamp bus width
  localparam int unsigned PTR_W       = 4;    // FIFO address bus width
  localparam int unsigned CELL_DEPTH  = 4;    // events per cell FIFO
  localparam int unsigned CFG_BITS    = 5;    // configuration latches per cell
  localparam int unsigned NUM_DAC     = 16;   // 8-bit bias DACs (count assumed)
  localparam int unsigned DAC_W       = 8;

  // Operating mode, selected by an external pin.
  typedef enum logic {
    MODE_ALICE = 1'b0,  // every cell is a channel, 4-event FIFO per cell
    MODE_LHCB  = 1'b1   // 8-cell super-pixels, 16-event FIFO per super-pixel
  } mode_e;

  // The five configuration latches of a cell, in configuration-chain order
  // (bit 4 leaves the cell first).
  typedef struct packed {
    logic       test_en;  // connect the test input to the preamplifier
    logic       mask;     // 1 = pixel masked off
    logic [2:0] trim;     // fine threshold adjustment
  } pix_cfg_t;

  // JTAG instructions (4-bit instruction register).
  typedef enum logic [3:0] {
    IR_PIXCFG = 4'h1,  // pixel configuration chain (all cells)
    IR_CTRL   = 4'h2,  // periphery control word
    IR_DAC    = 4'h3,  // DAC codes
    IR_BYPASS = 4'hF
  } jtag_ir_e;

  function automatic logic [BUS_W-1:0] bin2gray(input logic [BUS_W-1:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [PTR_W-1:0] ptr2gray(input logic [PTR_W-1:0] b);
    return b ^ (b >> 1);
  endfunction

endpackage
