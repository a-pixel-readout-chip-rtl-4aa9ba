// pixel_group: eight vertically adjacent cells (cell 0 nearest the periphery,
// cell 7 the top one) plus the extra logic that makes them one LHCb
// super-pixel of 400 um x 400 um.
//  ALICE mode: each cell works alone. Its own discriminator edge goes to its
//   own two delay units, its own coincidence is written to its own 4-event
//   FIFO, and all eight readout flip-flops are part of the column shift
//   register.
//  LHCb mode: the masked discriminator outputs of the eight cells are OR-ed;
//   the rising edge of the OR enters the enable chain at the top cell and
//   goes down until a free one of the sixteen delay units takes it. The OR of
//   all sixteen coincidences is written to a 16-event FIFO made of the FIFOs
//   of cells 7..4: Gray write-bus bits [3:2] = j select cell 7-j, bits [1:0]
//   the entry. On load the top cell's flip-flop takes the entry at the read
//   address, and the shift path goes from top cell to top cell, bypassing the
//   other seven.
// The OR, the sixteen-unit array, the four-FIFO buffer and the top-cell bypass
// follow the document; the order in which cells and FIFOs are used is this
// design's choice. Combinational from disc/trig_strobe to the FIFO inputs;
// everything else as in pixel_cell.
module pixel_group
  import alice1_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  mode_e            mode,
  input  logic [GROUP-1:0] disc,
  output logic             disc_or,     // OR of masked discriminators (fast-OR)
  input  logic [BUS_W-1:0] delay_bus,
  input  logic             trig_strobe,
  input  logic             fifo_we,
  input  logic [PTR_W-1:0] wr_gray,
  input  logic [PTR_W-1:0] rd_gray,
  input  logic             sr_load,
  input  logic             sr_shift,
  input  logic             sr_in,       // from the group above
  output logic             sr_out,      // to the group below
  input  logic             tck,
  input  logic             cfg_rst_n,
  input  logic             cfg_shift,
  input  logic             cfg_si,
  output logic             cfg_so,
  output pix_cfg_t [GROUP-1:0] cfg
);

  localparam int unsigned TOP = GROUP - 1;

  logic [GROUP-1:0] disc_m, own_hit, hit_in, hit_out, coin;
  logic [GROUP-1:0] c_we, c_din, c_dout, c_sr_d, c_sr_in, c_sr_q;
  logic [GROUP:0]   cfg_chain;
  logic             lhcb;
  logic             grp_q, grp_hit, grp_coin, grp_dout;

  assign lhcb    = (mode == MODE_LHCB);
  assign disc_or = |disc_m;

  // rising edge of the super-pixel OR
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) grp_q <= 1'b0;
    else        grp_q <= disc_or;
  end
  assign grp_hit  = disc_or & ~grp_q;
  assign grp_coin = |coin;
  assign grp_dout = c_dout[TOP - int'(rd_gray[3:2])];

  assign cfg_chain[0] = cfg_si;
  assign cfg_so       = cfg_chain[GROUP];
  assign sr_out       = lhcb ? c_sr_q[TOP] : c_sr_q[0];

  always_comb begin
    for (int k = 0; k < int'(GROUP); k++) begin
      if (lhcb) begin
        hit_in[k]  = (k == int'(TOP)) ? grp_hit : hit_out[k+1 > int'(TOP) ? TOP : k+1];
        c_din[k]   = grp_coin;
        c_we[k]    = fifo_we && (k >= int'(GROUP) - 4) && (int'(wr_gray[3:2]) == int'(TOP) - k);
        c_sr_d[k]  = (k == int'(TOP)) ? grp_dout : 1'b0;
        c_sr_in[k] = (k == int'(TOP)) ? sr_in : 1'b0;
      end else begin
        hit_in[k]  = own_hit[k];
        c_din[k]   = coin[k];
        c_we[k]    = fifo_we;
        c_sr_d[k]  = c_dout[k];
        c_sr_in[k] = (k == int'(TOP)) ? sr_in : c_sr_q[k+1 > int'(TOP) ? TOP : k+1];
      end
    end
  end

  for (genvar k = 0; k < GROUP; k++) begin : g_cell
    pixel_cell u_cell (
      .clk        (clk),
      .rst_n      (rst_n),
      .disc       (disc[k]),
      .disc_m     (disc_m[k]),
      .own_hit    (own_hit[k]),
      .hit_in     (hit_in[k]),
      .hit_out    (hit_out[k]),
      .delay_bus  (delay_bus),
      .trig_strobe(trig_strobe),
      .coin       (coin[k]),
      .fifo_we    (c_we[k]),
      .fifo_din   (c_din[k]),
      .wr_addr    (wr_gray[1:0]),
      .rd_addr    (rd_gray[1:0]),
      .fifo_dout  (c_dout[k]),
      .sr_load    (sr_load),
      .sr_d       (c_sr_d[k]),
      .sr_shift   (sr_shift),
      .sr_in      (c_sr_in[k]),
      .sr_q       (c_sr_q[k]),
      .tck        (tck),
      .cfg_rst_n  (cfg_rst_n),
      .cfg_shift  (cfg_shift),
      .cfg_si     (cfg_chain[k]),
      .cfg_so     (cfg_chain[k+1]),
      .cfg        (cfg[k])
    );
  end

endmodule
