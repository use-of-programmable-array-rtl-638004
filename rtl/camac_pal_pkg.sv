// camac_pal_pkg: shared constants for the two CAMAC PAL designs.
//
// A PAL product term is described by two masks over the array's input
// columns: the "true" fuses that stay intact connect the signal itself to
// the AND gate, the "complement" fuses that stay intact connect its
// inverse. Here every input is a one-hot constant, so a product term is
// written much as it is in a PAL equation: TRUE = F8|F4|..., COMP = N|B|...
//
// All levels are pin levels. CAMAC dataway lines are active low, so a pin
// that is high means the dataway bit is 0. The bit order of the input
// vectors is this design's own choice; the pin numbers in the comments are
// those of the two devices (PAL14L8 and PAL16R4).
package camac_pal_pkg;

  // ---------------------------------------------------------------------
  // CAMAC decoder, PAL14L8: 14 array inputs, 8 active-low outputs.
  // ---------------------------------------------------------------------
  localparam int unsigned DEC_N_IN = 14;
  typedef logic [DEC_N_IN-1:0] dec_vec_t;

  localparam dec_vec_t DI_N   = dec_vec_t'(1) << 0;   // pin 1  station number
  localparam dec_vec_t DI_B   = dec_vec_t'(1) << 1;   // pin 2  busy
  localparam dec_vec_t DI_S1  = dec_vec_t'(1) << 2;   // pin 3  strobe S1
  localparam dec_vec_t DI_S2  = dec_vec_t'(1) << 3;   // pin 4  strobe S2
  localparam dec_vec_t DI_Z   = dec_vec_t'(1) << 4;   // pin 5  initialise
  localparam dec_vec_t DI_A1  = dec_vec_t'(1) << 5;   // pin 6
  localparam dec_vec_t DI_A2  = dec_vec_t'(1) << 6;   // pin 7
  localparam dec_vec_t DI_A4  = dec_vec_t'(1) << 7;   // pin 8
  localparam dec_vec_t DI_A8  = dec_vec_t'(1) << 8;   // pin 9
  localparam dec_vec_t DI_F1  = dec_vec_t'(1) << 9;   // pin 10
  localparam dec_vec_t DI_F2  = dec_vec_t'(1) << 10;  // pin 11
  localparam dec_vec_t DI_F4  = dec_vec_t'(1) << 11;  // pin 13
  localparam dec_vec_t DI_F8  = dec_vec_t'(1) << 12;  // pin 14
  localparam dec_vec_t DI_F16 = dec_vec_t'(1) << 13;  // pin 23

  // Pin levels of the decoder inputs, in the bit order above.
  typedef struct packed {
    logic [4:0] f;    // F16..F1 pin levels (pin high = function bit 0)
    logic [3:0] a;    // A8..A1 pin levels (pin high = address bit 0)
    logic       z;
    logic       s2;
    logic       s1;
    logic       b;
    logic       n;
  } dec_in_t;

  // Decoder outputs, each active low at its pin.
  typedef struct packed {
    logic x;      // pin 22  X response
    logic rd10;   // pin 21  read RD1 A0 (F0 A0), low for the whole cycle
    logic wt22;   // pin 20  WT2 A2 (F17 A2) strobe at S1
    logic wt21;   // pin 19  WT2 A1 (F17 A1) strobe at S1
    logic wt20;   // pin 18  WT2 A0 (F17 A0) strobe at S1
    logic wt11;   // pin 17  WT1 A1 (F16 A1) strobe at S1
    logic wt10;   // pin 16  WT1 A0 (F16 A0) strobe at S1
    logic init;   // pin 15  initialise: Z.S2 or XEQ A15 (F25 A15) at S2
  } dec_out_t;

  // ---------------------------------------------------------------------
  // CAMAC LAM mask and request register, PAL16R4.
  // First array level: the eight input pins and the mask feedback.
  // ---------------------------------------------------------------------
  localparam int unsigned MSK_N_IN = 11;
  typedef logic [MSK_N_IN-1:0] msk_vec_t;

  localparam msk_vec_t MI_W1   = msk_vec_t'(1) << 0;   // pin 2  write bit 1 (active high)
  localparam msk_vec_t MI_W2   = msk_vec_t'(1) << 1;   // pin 3
  localparam msk_vec_t MI_W3   = msk_vec_t'(1) << 2;   // pin 4
  localparam msk_vec_t MI_SET  = msk_vec_t'(1) << 3;   // pin 5  low = bit set, high = bit clear
  localparam msk_vec_t MI_INIT = msk_vec_t'(1) << 4;   // pin 6  low = initialise
  localparam msk_vec_t MI_DM1  = msk_vec_t'(1) << 5;   // pin 7  demand 1
  localparam msk_vec_t MI_DM2  = msk_vec_t'(1) << 6;   // pin 8  demand 2
  localparam msk_vec_t MI_DM3  = msk_vec_t'(1) << 7;   // pin 9  demand 3
  localparam msk_vec_t MI_M1   = msk_vec_t'(1) << 8;   // pin 17 mask bit 1 feedback
  localparam msk_vec_t MI_M2   = msk_vec_t'(1) << 9;   // pin 16 mask bit 2 feedback
  localparam msk_vec_t MI_M3   = msk_vec_t'(1) << 10;  // pin 15 mask bit 3 feedback

  // Second array level: the three request pins fed back.
  localparam int unsigned LAM_N_IN = 3;

endpackage
