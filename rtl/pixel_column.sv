// pixel_column: one column of ROWS cells, built from ROWS/GROUP pixel_groups
// (group 0 nearest the periphery). The readout flip-flops of the column form
// one shift register that moves data one row towards the periphery per clock;
// dout is the bottom flip-flop, so after a load the column delivers row 0,
// 1, 2, ... (ALICE mode, 256 bits) or super-pixel 0, 1, ... (LHCb mode, 32
// bits) on successive clocks. The configuration chain enters at cell 0 of
// group 0 and leaves at the top cell. disc_or is the column's share of the
// fast-OR. The column shift register is the document's; the direction of the
// chains is this design's choice.
module pixel_column
  import alice1_pkg::*;
#(
  parameter int unsigned NROWS = ROWS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  mode_e            mode,
  input  logic [NROWS-1:0] disc,
  output logic             disc_or,
  input  logic [BUS_W-1:0] delay_bus,
  input  logic             trig_strobe,
  input  logic             fifo_we,
  input  logic [PTR_W-1:0] wr_gray,
  input  logic [PTR_W-1:0] rd_gray,
  input  logic             sr_load,
  input  logic             sr_shift,
  output logic             dout,
  input  logic             tck,
  input  logic             cfg_rst_n,
  input  logic             cfg_shift,
  input  logic             cfg_si,
  output logic             cfg_so,
  output pix_cfg_t [NROWS-1:0] cfg
);

  localparam int unsigned NG = NROWS / GROUP;

  logic [NG:0]   sr_chain;   // sr_chain[g+1] enters group g from above
  logic [NG:0]   cfg_chain;
  logic [NG-1:0] g_or;

  assign sr_chain[NG]  = 1'b0;
  assign dout          = sr_chain[0];
  assign cfg_chain[0]  = cfg_si;
  assign cfg_so        = cfg_chain[NG];
  assign disc_or       = |g_or;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    pixel_group u_grp (
      .clk        (clk),
      .rst_n      (rst_n),
      .mode       (mode),
      .disc       (disc[g*GROUP +: GROUP]),
      .disc_or    (g_or[g]),
      .delay_bus  (delay_bus),
      .trig_strobe(trig_strobe),
      .fifo_we    (fifo_we),
      .wr_gray    (wr_gray),
      .rd_gray    (rd_gray),
      .sr_load    (sr_load),
      .sr_shift   (sr_shift),
      .sr_in      (sr_chain[g+1]),
      .sr_out     (sr_chain[g]),
      .tck        (tck),
      .cfg_rst_n  (cfg_rst_n),
      .cfg_shift  (cfg_shift),
      .cfg_si     (cfg_chain[g]),
      .cfg_so     (cfg_chain[g+1]),
      .cfg        (cfg[g*GROUP +: GROUP])
    );
  end

endmodule
