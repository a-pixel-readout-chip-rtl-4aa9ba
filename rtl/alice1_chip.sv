// alice1_chip: digital part of the ALICE1 pixel readout chip.
// A matrix of NCOLS x NROWS cells (32 x 256) stores hits for the trigger
// latency, buffers triggered events and shifts them out column-parallel.
//  - delay_bus_gen broadcasts the Gray time stamp; each cell's delay units
//    release a hit 2n+2 clocks after it arrived (n from the JTAG control
//    word), where it meets the trigger (Level-1 ALICE / Level-0 LHCb).
//  - fifo_ptr_ctrl broadcasts the Gray FIFO write/read addresses; a trigger
//    writes one bit per channel into the event buffers (4 deep in ALICE mode,
//    16 deep per super-pixel in LHCb mode).
//  - readout_ctrl, on read_req (Level-2 / NEXT-EVENT-READ), loads the oldest
//    event into the column shift registers and shifts it out on data_out,
//    one bit per column per clock: 256 clocks per event in ALICE mode, 32 in
//    LHCb mode. data_out[c] is column c; row 0 (or super-pixel 0) comes first.
//  - jtag_tap with the pixel chain and two jtag_reg registers configures the
//    chip: pixel mask/test/trim (chain of 5 bits per cell, column 0 row 0
//    nearest TDI), control word (bits [7:0] = n, reset value 49 = 10 us at
//    10 MHz) and NUM_DAC 8-bit DAC codes.
// The analog front end, DACs and I/O buffers are not part of this RTL: the
// discriminator outputs arrive on disc (synchronous to clk), the per-pixel
// test enable and trim go out on pix_cfg, and the DAC codes on dac_code.
// mode is the external mode pin (0 ALICE, 1 LHCb); change it under reset.
// rst_n resets the data path; trst_n resets the TAP and all configuration.
module alice1_chip
  import alice1_pkg::*;
#(
  parameter int unsigned NROWS = ROWS,
  parameter int unsigned NCOLS = COLS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  mode_e                        mode,
  input  logic [NCOLS-1:0][NROWS-1:0]  disc,
  input  logic                         trigger,
  input  logic                         read_req,
  output logic [NCOLS-1:0]             data_out,
  output logic                         data_valid,
  output logic                         fifo_full,
  output logic                         fast_or,
  // JTAG
  input  logic                         tck,
  input  logic                         trst_n,
  input  logic                         tms,
  input  logic                         tdi,
  output logic                         tdo,
  output logic                         tdo_en,  // TDO driver enable
  // to the analog parts
  output pix_cfg_t [NCOLS-1:0][NROWS-1:0] pix_cfg,
  output logic [NUM_DAC-1:0][DAC_W-1:0]   dac_code
);

  logic [BUS_W-1:0] delay_bus, modulo_n;
  logic [PTR_W-1:0] wr_gray, rd_gray;
  logic             trig_strobe, empty, sr_load, sr_shift;
  logic [NCOLS-1:0] col_or;
  logic [NCOLS:0]   cfg_chain;
  logic             pix_shift;
  logic             ctrl_capture, ctrl_shift, ctrl_update, ctrl_so;
  logic             dac_capture, dac_shift, dac_update, dac_so;

  // ---- periphery ------------------------------------------------------
  delay_bus_gen u_delay_bus (
    .clk     (clk),
    .rst_n   (rst_n),
    .modulo_n(modulo_n),
    .bus     (delay_bus),
    .count   ()
  );

  fifo_ptr_ctrl u_fifo_ptr (
    .clk        (clk),
    .rst_n      (rst_n),
    .mode       (mode),
    .trigger    (trigger),
    .rd_adv     (sr_load),
    .trig_strobe(trig_strobe),
    .wr_gray    (wr_gray),
    .rd_gray    (rd_gray),
    .used       (),
    .full       (fifo_full),
    .empty      (empty)
  );

  readout_ctrl #(.NROWS(NROWS)) u_readout (
    .clk       (clk),
    .rst_n     (rst_n),
    .mode      (mode),
    .read_req  (read_req),
    .empty     (empty),
    .sr_load   (sr_load),
    .sr_shift  (sr_shift),
    .data_valid(data_valid),
    .active    ()
  );

  // ---- pixel matrix ---------------------------------------------------
  assign cfg_chain[0] = tdi;
  assign fast_or      = |col_or;

  for (genvar c = 0; c < NCOLS; c++) begin : g_col
    pixel_column #(.NROWS(NROWS)) u_col (
      .clk        (clk),
      .rst_n      (rst_n),
      .mode       (mode),
      .disc       (disc[c]),
      .disc_or    (col_or[c]),
      .delay_bus  (delay_bus),
      .trig_strobe(trig_strobe),
      .fifo_we    (trig_strobe),
      .wr_gray    (wr_gray),
      .rd_gray    (rd_gray),
      .sr_load    (sr_load),
      .sr_shift   (sr_shift),
      .dout       (data_out[c]),
      .tck        (tck),
      .cfg_rst_n  (trst_n),
      .cfg_shift  (pix_shift),
      .cfg_si     (cfg_chain[c]),
      .cfg_so     (cfg_chain[c+1]),
      .cfg        (pix_cfg[c])
    );
  end

  // ---- configuration --------------------------------------------------
  jtag_tap u_tap (
    .tck         (tck),
    .trst_n      (trst_n),
    .tms         (tms),
    .tdi         (tdi),
    .tdo         (tdo),
    .tdo_en      (tdo_en),
    .pix_shift   (pix_shift),
    .ctrl_capture(ctrl_capture),
    .ctrl_shift  (ctrl_shift),
    .ctrl_update (ctrl_update),
    .dac_capture (dac_capture),
    .dac_shift   (dac_shift),
    .dac_update  (dac_update),
    .pix_so      (cfg_chain[NCOLS]),
    .ctrl_so     (ctrl_so),
    .dac_so      (dac_so),
    .ir_q        ()
  );

  jtag_reg #(.W(BUS_W), .RESET_VAL(BUS_W'(49))) u_ctrl_reg (
    .tck    (tck),
    .rst_n  (trst_n),
    .capture(ctrl_capture),
    .shift  (ctrl_shift),
    .update (ctrl_update),
    .tdi    (tdi),
    .tdo    (ctrl_so),
    .q      (modulo_n)
  );

  jtag_reg #(.W(NUM_DAC * DAC_W)) u_dac_reg (
    .tck    (tck),
    .rst_n  (trst_n),
    .capture(dac_capture),
    .shift  (dac_shift),
    .update (dac_update),
    .tdi    (tdi),
    .tdo    (dac_so),
    .q      (dac_code)
  );

endmodule
