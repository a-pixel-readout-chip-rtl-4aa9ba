// fifo_ptr_ctrl: periphery counters that address the event FIFOs of the
// whole matrix. A write pointer advances on every accepted trigger and a read
// pointer on every event loaded into the readout shift registers; both are
// broadcast Gray-coded on 4-bit buses. The buffer holds 4 events in ALICE
// mode (pointers count modulo 4, so only the two low bus bits move) and 16 in
// LHCb mode (modulo 16). A trigger that arrives while the buffer is full is
// not passed to the matrix; full is brought out so the system can see it.
// Timing: trig_strobe (= write enable of all FIFOs) is combinational from
// trigger in the same clock, so it coincides with the delay units' fire.
// Gray-coded 4-bit read/write buses and the 4/16-event depths follow the
// document; the handling of a full buffer is this design's choice. Change
// mode only under reset.
module fifo_ptr_ctrl
  import alice1_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  mode_e            mode,
  input  logic             trigger,      // Level-1 (ALICE) / Level-0 (LHCb)
  input  logic             rd_adv,       // an event is being loaded for readout
  output logic             trig_strobe,  // accepted trigger, FIFO write enable
  output logic [PTR_W-1:0] wr_gray,
  output logic [PTR_W-1:0] rd_gray,
  output logic [PTR_W:0]   used,         // events stored
  output logic             full,
  output logic             empty
);

  logic [PTR_W-1:0] wr_ptr, rd_ptr, wrap;
  logic [PTR_W:0]   depth;

  assign wrap  = (mode == MODE_LHCB) ? 4'hF : 4'h3;
  assign depth = (mode == MODE_LHCB) ? 5'd16 : 5'd4;

  assign full        = (used == depth);
  assign empty       = (used == '0);
  assign trig_strobe = trigger && !full;
  assign wr_gray     = ptr2gray(wr_ptr);
  assign rd_gray     = ptr2gray(rd_ptr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      used   <= '0;
    end else begin
      if (trig_strobe) wr_ptr <= (wr_ptr + 1'b1) & wrap;
      if (rd_adv)      rd_ptr <= (rd_ptr + 1'b1) & wrap;
      used <= used + (trig_strobe ? 5'd1 : 5'd0) - ((rd_adv && !empty) ? 5'd1 : 5'd0);
    end
  end

  a_no_read_empty: assert property (@(posedge clk) disable iff (!rst_n) rd_adv |-> !empty)
    else $error("fifo_ptr_ctrl: read of an empty buffer");

endmodule
