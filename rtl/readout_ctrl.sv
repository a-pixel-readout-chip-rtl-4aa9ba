// readout_ctrl: sequences the readout of one event. Read requests (Level-2
// trigger in ALICE, NEXT-EVENT-READ in LHCb) are counted; when the readout is
// idle, a request is pending and the event buffer is not empty, sr_load
// copies the oldest event from the FIFOs into the column shift registers and
// advances the read pointer. The next LEN clocks shift the columns out with
// data_valid high: LEN = NROWS (256) in ALICE mode and NROWS/GROUP (32) in
// LHCb mode, i.e. 25.6 us at 10 MHz and 800 ns at 40 MHz. One idle clock
// (the load) separates events. Loading by the read request and shifting by
// the system clock follow the document; the request counter and the one-clock
// load gap are this design's choices.
module readout_ctrl
  import alice1_pkg::*;
#(
  parameter int unsigned NROWS = ROWS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  mode_e mode,
  input  logic  read_req,
  input  logic  empty,       // event buffer empty
  output logic  sr_load,     // load FIFO entry into shift registers
  output logic  sr_shift,    // shift columns by one row
  output logic  data_valid,  // column outputs carry a row
  output logic  active
);

  localparam int unsigned CW = $clog2(NROWS + 1);

  logic [CW-1:0] left;     // shifts left after this one
  logic [4:0]    pending;  // read requests not yet served
  logic [CW-1:0] len;

  assign len        = (mode == MODE_LHCB) ? CW'(NROWS / GROUP) : CW'(NROWS);
  assign sr_load    = !active && (pending != '0) && !empty;
  assign sr_shift   = active;
  assign data_valid = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      left    <= '0;
      pending <= '0;
    end else begin
      pending <= pending + ((read_req && pending != 5'h1F) ? 5'd1 : 5'd0)
                         - (sr_load ? 5'd1 : 5'd0);
      if (sr_load) begin
        active <= 1'b1;
        left   <= len - 1'b1;
      end else if (active) begin
        if (left == '0) active <= 1'b0;
        else            left   <= left - 1'b1;
      end
    end
  end

endmodule
