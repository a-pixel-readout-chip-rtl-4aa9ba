// tb_alice1_chip: end-to-end test of the whole chip on a matrix of full
// column height, 256 rows x 4 of the 32 columns (32 super-pixels per
// column). It
//  1. configures the chip through JTAG only: pixel chain (masks, trims and
//     test bits), DAC codes (written and read back) and the delay modulo n;
//  2. runs ALICE mode with n = 49 (trigger latency 100 clocks = 10 us at
//     10 MHz): random sparse hits plus a hot pixel, random Level-1 triggers
//     and Level-2 read requests;
//  3. switches to LHCb mode with n = 79 (160 clocks = 4 us at 40 MHz): hits
//     on super-pixels, a 16-event buffer and 32-clock readouts.
// A reference model (delay units per channel, event buffer occupancy, read
// order) predicts every event; each readout is collected from data_out while
// data_valid is high and compared bit by bit, its length checked (256 / 32
// clocks). It counts how often each mechanism occurred (coincidences, a pixel
// holding two hits, a hit lost to busy units, more than two units used in a
// super-pixel, buffer full with a trigger refused, a read request queued
// during a readout, a masked hit, the mode switch) and fails if any never did.
module tb_alice1_chip;
  import alice1_pkg::*;
  localparam int R = 256, C = 4, HITS = 1, NCFG = R * C * CFG_BITS;
`include "alice1_e2e_decl.svh"
  alice1_chip #(.NROWS(R), .NCOLS(C)) dut (.clk, .rst_n, .mode, .disc, .trigger, .read_req, .data_out, .data_valid,
                   .fifo_full, .fast_or, .tck, .trst_n, .tms, .tdi, .tdo, .tdo_en,
                   .pix_cfg, .dac_code);
`include "alice1_e2e_body.svh"
endmodule
