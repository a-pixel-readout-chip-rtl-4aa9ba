// pixel_cell: the digital part of one 50 um x 400 um pixel cell.
//  - Five configuration latches (test enable, mask, 3-bit threshold trim)
//    form a 5-bit segment of the JTAG pixel chain, clocked by tck while
//    cfg_shift is high and cleared by cfg_rst_n (the JTAG reset). mask gates the discriminator; test_en and trim are
//    driven out to the analog front end.
//  - The masked discriminator output is edge-detected (own_hit); the enable
//    logic stores the hit offered on hit_in in the first free of the two
//    delay units, or passes it on (hit_out).
//  - Coincidence: coin is high when a delay unit fires in the same clock as
//    the trigger strobe.
//  - The 4-event FIFO stores fifo_din on fifo_we at wr_addr; fifo_dout shows
//    the entry at rd_addr.
//  - One flip-flop of the column readout shift register: sr_load takes
//    sr_d, sr_shift takes sr_in (the cell above), sr_q goes to the cell below.
// Which signals feed hit_in, fifo_din, fifo_we and sr_d depends on the mode and
// is decided by pixel_group. The cell structure follows the document; the
// synchronous edge detection of the discriminator and the shift-only
// configuration segment (no separate update latch) are this design's choices.
module pixel_cell
  import alice1_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // front end
  input  logic             disc,      // discriminator output, synchronous to clk
  output logic             disc_m,    // masked discriminator output
  output logic             own_hit,   // rising edge of disc_m
  // enable logic chain
  input  logic             hit_in,
  output logic             hit_out,
  // delay and coincidence
  input  logic [BUS_W-1:0] delay_bus,
  input  logic             trig_strobe,
  output logic             coin,
  // event FIFO
  input  logic             fifo_we,
  input  logic             fifo_din,
  input  logic [1:0]       wr_addr,
  input  logic [1:0]       rd_addr,
  output logic             fifo_dout,
  // readout shift register
  input  logic             sr_load,
  input  logic             sr_d,
  input  logic             sr_shift,
  input  logic             sr_in,
  output logic             sr_q,
  // configuration chain (tck domain, reset by the JTAG reset)
  input  logic             tck,
  input  logic             cfg_rst_n,
  input  logic             cfg_shift,
  input  logic             cfg_si,
  output logic             cfg_so,
  output pix_cfg_t         cfg
);

  // ---- configuration latches -------------------------------------------
  always_ff @(posedge tck or negedge cfg_rst_n) begin
    if (!cfg_rst_n)     cfg <= '0;
    else if (cfg_shift) cfg <= {cfg[CFG_BITS-2:0], cfg_si};
  end
  assign cfg_so = cfg[CFG_BITS-1];

  // ---- mask and hit edge ------------------------------------------------
  logic disc_q;
  assign disc_m = disc & ~cfg.mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) disc_q <= 1'b0;
    else        disc_q <= disc_m;
  end
  assign own_hit = disc_m & ~disc_q;

  // ---- enable logic and delay units -------------------------------------
  logic [DU_PER_CELL-1:0] busy, store, fire;

  enable_logic #(.N(DU_PER_CELL)) u_enable (
    .hit_in (hit_in),
    .busy   (busy),
    .store  (store),
    .hit_out(hit_out)
  );

  for (genvar i = 0; i < DU_PER_CELL; i++) begin : g_du
    delay_unit u_du (
      .clk  (clk),
      .rst_n(rst_n),
      .bus  (delay_bus),
      .store(store[i]),
      .busy (busy[i]),
      .fire (fire[i])
    );
  end

  assign coin = trig_strobe & (|fire);

  // ---- event FIFO -------------------------------------------------------
  event_fifo u_fifo (
    .clk    (clk),
    .rst_n  (rst_n),
    .we     (fifo_we),
    .wr_addr(wr_addr),
    .din    (fifo_din),
    .rd_addr(rd_addr),
    .dout   (fifo_dout)
  );

  // ---- readout flip-flop ------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sr_q <= 1'b0;
    else if (sr_load)  sr_q <= sr_d;
    else if (sr_shift) sr_q <= sr_in;
  end

endmodule
