// jtag_tap: IEEE 1149.1 test access port. The 16-state controller is
// advanced by TMS on rising TCK; a 4-bit instruction register (captures
// 4'b0001, resets to BYPASS) selects which data register sits between TDI
// and TDO: the pixel configuration chain, the periphery control word, the DAC
// register or the 1-bit bypass. Data registers live outside; this block gives
// them capture/shift/update strobes qualified by the instruction and muxes
// their serial outputs onto TDO, which changes on falling TCK as the standard
// requires. JTAG as the configuration port is the document's; the
// instruction set and codes are this design's own.
module jtag_tap
  import alice1_pkg::*;
(
  input  logic tck,
  input  logic trst_n,
  input  logic tms,
  input  logic tdi,
  output logic tdo,
  output logic tdo_en,
  // data register strobes (already qualified by the instruction)
  output logic pix_shift,
  output logic ctrl_capture, ctrl_shift, ctrl_update,
  output logic dac_capture,  dac_shift,  dac_update,
  input  logic pix_so,
  input  logic ctrl_so,
  input  logic dac_so,
  output logic [3:0] ir_q
);

  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PAU_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PAU_IR, EX2_IR, UPD_IR
  } tap_e;

  tap_e       st, st_n;
  logic [3:0] ir_sr;
  logic       bypass_q;

  always_comb begin
    unique case (st)
      TLR:    st_n = tms ? TLR     : RTI;
      RTI:    st_n = tms ? SEL_DR  : RTI;
      SEL_DR: st_n = tms ? SEL_IR  : CAP_DR;
      CAP_DR: st_n = tms ? EX1_DR  : SH_DR;
      SH_DR:  st_n = tms ? EX1_DR  : SH_DR;
      EX1_DR: st_n = tms ? UPD_DR  : PAU_DR;
      PAU_DR: st_n = tms ? EX2_DR  : PAU_DR;
      EX2_DR: st_n = tms ? UPD_DR  : SH_DR;
      UPD_DR: st_n = tms ? SEL_DR  : RTI;
      SEL_IR: st_n = tms ? TLR     : CAP_IR;
      CAP_IR: st_n = tms ? EX1_IR  : SH_IR;
      SH_IR:  st_n = tms ? EX1_IR  : SH_IR;
      EX1_IR: st_n = tms ? UPD_IR  : PAU_IR;
      PAU_IR: st_n = tms ? EX2_IR  : PAU_IR;
      EX2_IR: st_n = tms ? UPD_IR  : SH_IR;
      UPD_IR: st_n = tms ? SEL_DR  : RTI;
      default: st_n = TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      st       <= TLR;
      ir_sr    <= '0;
      ir_q     <= IR_BYPASS;
      bypass_q <= 1'b0;
    end else begin
      st <= st_n;
      if (st == TLR)   ir_q  <= IR_BYPASS;
      if (st == CAP_IR) ir_sr <= 4'b0001;
      if (st == SH_IR)  ir_sr <= {tdi, ir_sr[3:1]};
      if (st == UPD_IR) ir_q  <= ir_sr;
      if (st == CAP_DR) bypass_q <= 1'b0;
      if (st == SH_DR)  bypass_q <= tdi;
    end
  end

  assign pix_shift    = (st == SH_DR)  && (ir_q == IR_PIXCFG);
  assign ctrl_capture = (st == CAP_DR) && (ir_q == IR_CTRL);
  assign ctrl_shift   = (st == SH_DR)  && (ir_q == IR_CTRL);
  assign ctrl_update  = (st == UPD_DR) && (ir_q == IR_CTRL);
  assign dac_capture  = (st == CAP_DR) && (ir_q == IR_DAC);
  assign dac_shift    = (st == SH_DR)  && (ir_q == IR_DAC);
  assign dac_update   = (st == UPD_DR) && (ir_q == IR_DAC);

  logic tdo_mux;
  always_comb begin
    if (st == SH_IR) tdo_mux = ir_sr[0];
    else begin
      unique case (ir_q)
        IR_PIXCFG: tdo_mux = pix_so;
        IR_CTRL:   tdo_mux = ctrl_so;
        IR_DAC:    tdo_mux = dac_so;
        default:   tdo_mux = bypass_q;
      endcase
    end
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      tdo    <= 1'b0;
      tdo_en <= 1'b0;
    end else begin
      tdo    <= tdo_mux;
      tdo_en <= (st == SH_DR) || (st == SH_IR);
    end
  end

endmodule
