// alice1_e2e_decl.svh: signal declarations of the end-to-end chip testbench
// (see alice1_e2e_body.svh).

  logic clk = 0, rst_n = 1;
  mode_e mode;
  logic [C-1:0][R-1:0] disc;
  logic trigger, read_req, data_valid, fifo_full, fast_or;
  logic [C-1:0] data_out;
  logic tck = 0, trst_n = 1, tms = 1, tdi = 0, tdo, tdo_en;
  pix_cfg_t [C-1:0][R-1:0] pix_cfg;
  logic [NUM_DAC-1:0][DAC_W-1:0] dac_code;

  // reference model state
  // Per-column vectors keep the generated simulation code small.
  localparam int QD = 64;        // ring of expected events
  int   fire_at [C][R][2];       // ALICE: per pixel, two units
  int   gfire   [C][R/8][16];    // LHCb: per super-pixel, sixteen units
  int   due [int][$];            // clock -> channels whose stored hit is released
  logic [R-1:0] maskv [C];
  logic [R-1:0] prev_m [C];
  logic [R-1:0] ev [C];
  logic [R-1:0] expbuf [QD][C];  // expected events, oldest at qhead
  int   qhead, qcount;
  int   occ;

