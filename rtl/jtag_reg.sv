// jtag_reg: a JTAG data register of W bits with a separate holding register.
// Capture copies the holding register into the shift stage (read-back),
// shift moves it one bit towards tdo (LSB first, tdi enters at the MSB) and
// update copies the shift stage into the holding register q, which drives the
// chip. Used for the periphery control word and the DAC codes. The read and
// write of settings through JTAG is the document's; the capture-shift-update
// structure is the usual one of the standard. All strobes are sampled on
// rising tck; q resets to RESET_VAL.
module jtag_reg #(
  parameter int unsigned   W         = 8,
  parameter logic [W-1:0]  RESET_VAL = '0
) (
  input  logic         tck,
  input  logic         rst_n,
  input  logic         capture,
  input  logic         shift,
  input  logic         update,
  input  logic         tdi,
  output logic         tdo,
  output logic [W-1:0] q
);

  logic [W-1:0] sr, sr_next;

  if (W > 1) begin : g_wide
    assign sr_next = {tdi, sr[W-1:1]};
  end else begin : g_one
    assign sr_next = tdi;
  end

  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n) begin
      sr <= RESET_VAL;
      q  <= RESET_VAL;
    end else begin
      if (capture)    sr <= q;
      else if (shift) sr <= sr_next;
      if (update)     q  <= sr;
    end
  end

  assign tdo = sr[0];

endmodule
