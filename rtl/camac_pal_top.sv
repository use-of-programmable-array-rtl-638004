// camac_pal_top: the two CAMAC PAL designs side by side.
//
// camac_decoder is the PAL14L8 command decoder of one CAMAC module (RD1 A0,
// WT1 A0/A1, WT2 A0/A1/A2, XEQ A15, Z.S2, X response). camac_mask_register
// is the PAL16R4 LAM mask and request register of another. They are two
// separate examples: the decoder shown does not decode the bit-set,
// bit-clear and initialise commands that drive the mask register, so the
// mask register's clock and control pins (clkmask, set, init, w) are brought
// out, to be driven by that module's own decoder.
//
// Interface: every pin of both devices, at pin level, with the polarities
// described in the two modules. Timing: the decoder is combinational; the
// mask register loads on the rising edge of mask_clk.
module camac_pal_top
  import camac_pal_pkg::*;
(
  // CAMAC decoder (PAL14L8)
  input  dec_in_t    dec_pins,
  output dec_out_t   dec_outs,
  // LAM mask and request register (PAL16R4)
  input  logic       mask_clk,
  input  logic [3:1] mask_w,
  input  logic       mask_set,
  input  logic       mask_init,
  input  logic [3:1] mask_dm,
  input  logic       mask_readm_n,
  output logic [3:1] mask_m,
  output logic       mask_m_oe,
  output logic [3:1] mask_r,
  output logic [3:1] mask_r_oe,
  output logic       mask_lam,
  output logic       mask_lam_oe
);

  camac_decoder u_decoder (
    .pins(dec_pins),
    .outs(dec_outs)
  );

  camac_mask_register u_mask (
    .clkmask(mask_clk),
    .w      (mask_w),
    .set    (mask_set),
    .init   (mask_init),
    .dm     (mask_dm),
    .readm_n(mask_readm_n),
    .m      (mask_m),
    .m_oe   (mask_m_oe),
    .r      (mask_r),
    .r_oe   (mask_r_oe),
    .lam    (mask_lam),
    .lam_oe (mask_lam_oe)
  );

endmodule
