// camac_decoder: a complete CAMAC command decoder in one PAL14L8.
//
// The module answers eight commands: RD1 A0 (F0 A0), WT1 A0 and A1
// (F16 A0/A1), WT2 A0, A1 and A2 (F17 A0/A1/A2), XEQ A15 (F25 A15), and the
// dataway initialise Z.S2. All are decoded only while the station line N
// and BUSY B are active; Z.S2 needs neither.
//
//   wt10..wt22  pulse low during S1 of their write command, to clock the
//               module's output and control registers;
//   rd10        is low for the whole RD1 A0 cycle, to enable the read-out;
//   x           is low for the whole cycle of every command the module
//               answers (the CAMAC command-accepted response);
//   init        is low during S2 of XEQ A15, or during Z.S2.
//
// How it works: the decoder is a gate-array PAL, a pal_and_or array with no
// registers and inverting outputs. Each output is an OR of product terms
// whose fuse maps are written below, term by term, in the same form as the
// device's PAL equations. Every CAMAC line is active low, so a product that
// asks for function bit F16 = 1 uses the complement column of the F16 pin.
// X needs four terms: WT1 A0, WT1 A1, WT2 A0 and WT2 A1 differ only in F1
// and A1, so one term with those two columns left out covers all four; WT2
// A2, XEQ A15 and RD1 A0 take one term each. INIT needs two terms. The
// PAL14L8 gives X and INIT four product terms each and the other six
// outputs two each, which is the split used here; unused terms keep every
// fuse intact and stay false.
//
// Interface: pin levels in (dec_in_t), pin levels out (dec_out_t), all
// outputs active low. Timing: combinational, outputs follow the inputs.
//
// Taken from the original PAL design: the command set, the equations, the
// term sharing, the device and its pin-out. This design's own choices: the
// bit order of the input vector, and the X response's first term includes A4 (all four
// commands it covers have A4 = 0).
module camac_decoder
  import camac_pal_pkg::*;
(
  input  dec_in_t  pins,
  output dec_out_t outs
);

  // Common parts of the product terms. CAMAC lines are active low: a dataway
  // bit of 1 is a low pin, i.e. the complement column.
  localparam dec_vec_t NB       = DI_N | DI_B;                        // addressed, busy
  localparam dec_vec_t A0_T     = DI_A8 | DI_A4 | DI_A2 | DI_A1;     // A = 0
  localparam dec_vec_t A1_T     = DI_A8 | DI_A4 | DI_A2;             // A = 1 ...
  localparam dec_vec_t A1_C     = DI_A1;                             // ... A1 low
  localparam dec_vec_t A2_T     = DI_A8 | DI_A4 | DI_A1;             // A = 2 ...
  localparam dec_vec_t A2_C     = DI_A2;
  localparam dec_vec_t A15_C    = DI_A8 | DI_A4 | DI_A2 | DI_A1;     // A = 15
  localparam dec_vec_t F0_T     = DI_F16 | DI_F8 | DI_F4 | DI_F2 | DI_F1;
  localparam dec_vec_t F16_T    = DI_F8 | DI_F4 | DI_F2 | DI_F1;
  localparam dec_vec_t F16_C    = DI_F16;
  localparam dec_vec_t F17_T    = DI_F8 | DI_F4 | DI_F2;
  localparam dec_vec_t F17_C    = DI_F16 | DI_F1;
  localparam dec_vec_t F25_T    = DI_F4 | DI_F2;
  localparam dec_vec_t F25_C    = DI_F16 | DI_F8 | DI_F1;
  localparam dec_vec_t OFF      = '1;                                // unused term

  // ----- INIT (4 terms) and X (4 terms): out[0] = INIT, out[1] = X --------
  // INIT : /S2*/Z  +  XEQ A15 at S2
  // X    : WT1/WT2 A0/A1 (F1, A1 not decoded) + WT2 A2 + XEQ A15 + RD1 A0
  localparam logic [2*4*DEC_N_IN-1:0] GA_TRUE = {
    F0_T | A0_T,                      // X    t3  RD1 A0
    F25_T,                            // X    t2  XEQ A15
    F17_T | A2_T,                     // X    t1  WT2 A2
    DI_F8 | DI_F4 | DI_F2 | DI_A8 | DI_A4 | DI_A2,  // X t0 WT1/WT2 A0/A1
    OFF, OFF,                         // INIT t3, t2 unused
    F25_T,                            // INIT t1  XEQ A15 . S2
    dec_vec_t'(0)                     // INIT t0  Z . S2
  };
  localparam logic [2*4*DEC_N_IN-1:0] GA_COMP = {
    NB,                               // X    t3
    F25_C | A15_C | NB,               // X    t2
    F17_C | A2_C | NB,                // X    t1
    DI_F16 | NB,                      // X    t0
    OFF, OFF,
    F25_C | A15_C | DI_S2 | NB,       // INIT t1
    DI_S2 | DI_Z                      // INIT t0
  };

  // ----- six single-command outputs, 2 terms each ---------------------------
  // out[0] WT10, [1] WT11, [2] WT20, [3] WT21, [4] WT22, [5] RD10
  localparam logic [6*2*DEC_N_IN-1:0] GB_TRUE = {
    OFF, F0_T  | A0_T,                // RD10 whole cycle
    OFF, F17_T | A2_T,                // WT22
    OFF, F17_T | A1_T,                // WT21
    OFF, F17_T | A0_T,                // WT20
    OFF, F16_T | A1_T,                // WT11
    OFF, F16_T | A0_T                 // WT10
  };
  localparam logic [6*2*DEC_N_IN-1:0] GB_COMP = {
    OFF, NB,
    OFF, F17_C | A2_C | DI_S1 | NB,
    OFF, F17_C | A1_C | DI_S1 | NB,
    OFF, F17_C | DI_S1 | NB,
    OFF, F16_C | A1_C | DI_S1 | NB,
    OFF, F16_C | DI_S1 | NB
  };

  logic [DEC_N_IN-1:0] col;
  logic [1:0]          ga_out;
  logic [5:0]          gb_out;
  logic [7:0]          ga_prod;
  logic [11:0]         gb_prod;

  assign col = pins;

  pal_and_or #(
    .N_IN(DEC_N_IN), .N_OUT(2), .TERMS(4), .ACTIVE_LOW(1'b1),
    .FUSE_TRUE(GA_TRUE), .FUSE_COMP(GA_COMP)
  ) u_group4 (
    .in(col), .product(ga_prod), .out(ga_out)
  );

  pal_and_or #(
    .N_IN(DEC_N_IN), .N_OUT(6), .TERMS(2), .ACTIVE_LOW(1'b1),
    .FUSE_TRUE(GB_TRUE), .FUSE_COMP(GB_COMP)
  ) u_group2 (
    .in(col), .product(gb_prod), .out(gb_out)
  );

  always_comb begin
    outs.init = ga_out[0];
    outs.x    = ga_out[1];
    outs.wt10 = gb_out[0];
    outs.wt11 = gb_out[1];
    outs.wt20 = gb_out[2];
    outs.wt21 = gb_out[3];
    outs.wt22 = gb_out[4];
    outs.rd10 = gb_out[5];
  end

  // The commands are disjoint: at most one write or read output is active,
  // and any of them implies the X response.
  always_comb begin
    assert (($countones(~{outs.wt10, outs.wt11, outs.wt20, outs.wt21,
                          outs.wt22, outs.rd10}) <= 1))
      else $error("camac_decoder: more than one command output active");
    if (!(outs.wt10 && outs.wt11 && outs.wt20 && outs.wt21 && outs.wt22 && outs.rd10))
      assert (!outs.x) else $error("camac_decoder: command without X response");
  end

endmodule
