// camac_mask_register: a CAMAC LAM mask and request register in one PAL16R4.
//
// Three interrupt sources (demands DM1..DM3) are each gated by a bit of a
// three-bit LAM mask. The mask can be initialised, bit-set and bit-cleared
// from the dataway and read back; the gated requests R1..R3 and their OR,
// the LAM output, are always driven.
//
// Mask register: a registered PAL cell per bit, clocked on the rising edge of
// CLKMASK, which the module's command decoder pulses at S1 of every bit-set,
// bit-clear and initialise command. With INIT low the clock clears every
// bit. Otherwise a bit whose write line W is high is set if SET is low
// (bit set) and cleared if SET is high (bit clear); a bit whose W is low is
// fed back on itself and holds. In PAL equation form, at pin level:
//     /Mi := /INIT + Wi*SET + /Wi*/Mi
// The register drives the M pins through three-state buffers enabled by
// /READM low, so the mask is read straight onto the read lines.
//
// Requests and LAM: combinational PAL outputs with the three-state enable
// term tied on (all its fuses blown).
//     /R1 = /M1 + DM1      /R2 = /M2 + /DM2      /R3 = /M3 + /DM3
//     /LAM = /R1 * /R2 * /R3
// so Ri is high when mask bit i is set and demand i is active, and LAM is
// high when any request is. LAM is formed from the request pins fed back
// into the array, as in the device.
//
// Implementation: the device's single AND array is modelled as two
// pal_and_or arrays, one over the input pins and mask feedback (mask next
// state, requests, enables) and one over the request feedback (LAM). That
// keeps the netlist free of combinational loops; the logic is the same.
// The fourth register of the PAL16R4 (pin 14) is unused and not modelled.
//
// Interface: pin levels. clkmask is the register clock; readm_n low enables
// the m outputs (m_oe); r_oe and lam_oe are the request and LAM enables.
// Timing: m changes after a rising clkmask edge; r and lam follow m and dm
// combinationally.
//
// Taken from the original PAL design: the equations, the pin functions, the
// hold-by-feedback mask cell and the three-state mask read. This design's
// own choices: the register has no power-up reset (INIT is the only clear,
// as in the device), the split into two arrays, the value-plus-enable form
// of the three-state pins, and the parameter DM_ACTIVE_HIGH, whose default
// is the polarity the equations give (DM1 active low, DM2 and DM3 active
// high); the original pin notes state the opposite polarity.
module camac_mask_register
  import camac_pal_pkg::*;
#(
  // Bit i set: demand DMi is active high. Default taken from the equations.
  parameter logic [3:1] DM_ACTIVE_HIGH = 3'b110
) (
  input  logic       clkmask,   // pin 1   rising edge loads the mask
  input  logic [3:1] w,         // pins 2-4 write lines, active high
  input  logic       set,       // pin 5   low = bit set, high = bit clear
  input  logic       init,      // pin 6   low = initialise (clear) the mask
  input  logic [3:1] dm,        // pins 7-9 demands
  input  logic       readm_n,   // pin 11  low = drive the mask onto m
  output logic [3:1] m,         // pins 17,16,15 mask bits (high = set)
  output logic       m_oe,      // m pins driven
  output logic [3:1] r,         // pins 19,18,13 requests (high = request)
  output logic [3:1] r_oe,      // r pins driven
  output logic       lam,       // pin 12  LAM (high = request pending)
  output logic       lam_oe     // lam pin driven
);

  localparam int unsigned REG_TERMS = 8;
  localparam int unsigned IO_TERMS  = 7;   // eighth term is the enable

  // Mask cells: t0 = /INIT, t1 = Wi*SET, t2 = /Wi*/Mi, t3..t7 unused.
  function automatic logic [3*REG_TERMS*MSK_N_IN-1:0] mask_fuses(input bit comp);
    logic [3*REG_TERMS*MSK_N_IN-1:0] f;
    f = '1;
    for (int i = 0; i < 3; i++) begin
      msk_vec_t w_col, m_col;
      w_col = MI_W1 << i;
      m_col = MI_M1 << i;
      f[(i*REG_TERMS+0)*MSK_N_IN +: MSK_N_IN] = comp ? MI_INIT       : msk_vec_t'(0);
      f[(i*REG_TERMS+1)*MSK_N_IN +: MSK_N_IN] = comp ? msk_vec_t'(0) : (w_col | MI_SET);
      f[(i*REG_TERMS+2)*MSK_N_IN +: MSK_N_IN] = comp ? (w_col | m_col) : msk_vec_t'(0);
    end
    return f;
  endfunction

  // Request cells: t0 = /Mi, t1 = demand i inactive, t2..t6 unused.
  function automatic logic [3*IO_TERMS*MSK_N_IN-1:0] req_fuses(input bit comp);
    logic [3*IO_TERMS*MSK_N_IN-1:0] f;
    f = '1;
    for (int i = 0; i < 3; i++) begin
      msk_vec_t dm_col, m_col;
      dm_col = MI_DM1 << i;
      m_col  = MI_M1 << i;
      f[(i*IO_TERMS+0)*MSK_N_IN +: MSK_N_IN] = comp ? m_col : msk_vec_t'(0);
      // an active-high demand is inactive when its pin is low: /DMi
      f[(i*IO_TERMS+1)*MSK_N_IN +: MSK_N_IN] =
        (comp == DM_ACTIVE_HIGH[i+1]) ? dm_col : msk_vec_t'(0);
    end
    return f;
  endfunction

  // LAM cell over the request feedback: t0 = /R1*/R2*/R3, t1..t6 unused.
  localparam logic [IO_TERMS*LAM_N_IN-1:0] LAM_TRUE = {{(IO_TERMS-1)*LAM_N_IN{1'b1}}, 3'b000};
  localparam logic [IO_TERMS*LAM_N_IN-1:0] LAM_COMP = {{(IO_TERMS-1)*LAM_N_IN{1'b1}}, 3'b111};

  logic [2:0]                q;          // register state, q = 1 means pin low
  logic [2:0]                d;
  logic [3*REG_TERMS-1:0]    d_prod;
  logic [2:0]                r_pin;
  logic [3*IO_TERMS-1:0]     r_prod;
  logic [0:0]                lam_pin;
  logic [IO_TERMS-1:0]       lam_prod;
  logic [3:0]                oe_prod;
  logic [3:0]                oe_unused;
  msk_vec_t                  col;

  // Array columns: input pins and the registers fed back at pin level.
  assign col = {~q, dm, init, set, w};

  pal_and_or #(
    .N_IN(MSK_N_IN), .N_OUT(3), .TERMS(REG_TERMS), .ACTIVE_LOW(1'b0),
    .FUSE_TRUE(mask_fuses(1'b0)), .FUSE_COMP(mask_fuses(1'b1))
  ) u_mask_terms (
    .in(col), .product(d_prod), .out(d)
  );

  // Registered cell: D is the OR output; the pin shows the inverse of Q.
  always_ff @(posedge clkmask) q <= d;

  pal_and_or #(
    .N_IN(MSK_N_IN), .N_OUT(3), .TERMS(IO_TERMS), .ACTIVE_LOW(1'b1),
    .FUSE_TRUE(req_fuses(1'b0)), .FUSE_COMP(req_fuses(1'b1))
  ) u_req_terms (
    .in(col), .product(r_prod), .out(r_pin)
  );

  // Three-state enable terms of R1..R3 and LAM: every fuse blown (IF (VCC)).
  pal_and_or #(
    .N_IN(MSK_N_IN), .N_OUT(4), .TERMS(1), .ACTIVE_LOW(1'b0),
    .FUSE_TRUE('0), .FUSE_COMP('0)
  ) u_enable_terms (
    .in(col), .product(oe_prod), .out(oe_unused)
  );

  pal_and_or #(
    .N_IN(LAM_N_IN), .N_OUT(1), .TERMS(IO_TERMS), .ACTIVE_LOW(1'b1),
    .FUSE_TRUE(LAM_TRUE), .FUSE_COMP(LAM_COMP)
  ) u_lam_terms (
    .in(r_pin), .product(lam_prod), .out(lam_pin)
  );

  assign m      = ~q;
  assign m_oe   = ~readm_n;
  assign r      = r_pin;
  assign r_oe   = oe_prod[2:0];
  assign lam    = lam_pin[0];
  assign lam_oe = oe_prod[3];

  // Initialise clears every mask bit at the clock.
  a_init_clears: assert property (@(posedge clkmask) !init |=> (m == 3'b000))
    else $error("camac_mask_register: INIT did not clear the mask");
  // A bit whose write line is low holds its value.
  for (genvar i = 1; i <= 3; i++) begin : g_hold
    a_hold: assert property (@(posedge clkmask) (init && !w[i]) |=> $stable(m[i]))
      else $error("camac_mask_register: unwritten mask bit changed");
  end

endmodule
