// dwt_pkg: constants and types shared by the 9/7 lifting DWT blocks.
//
// The flipped 9/7 lifting structure multiplies its data paths by six constants
// C0..C5. C1..C5 are the values published for the flipped structure with the
// >>4 and >>1 scalings of the lifting steps folded in; C0 = 1/alpha follows from
// the flipping (alpha is the first lifting coefficient of the JPEG 2000 9/7
// filter). Each constant is turned into a signed fixed-point integer with
// `coef_q`, rounded to the nearest step of 2^-frac.
//
// The buffer port controls and the controller's multiplexer selects are also
// defined here, since the controller, the buffer and the top all use them.
package dwt_pkg;

  // Lifting coefficient alpha of the 9/7 filter (used only for C0).
  localparam real ALPHA = -1.586134342;

  // Flipped-structure constants.
  localparam real C0 = 1.0 / ALPHA;     // -0.6304636
  localparam real C1 = 0.7437502472;    //  1/(16 alpha beta)
  localparam real C2 = -0.6680671710;   //  1/(32 beta gamma)
  localparam real C3 = 0.6384438531;    //  1/(4 gamma delta)
  localparam real C4 = 2.065244244;     //  32 alpha beta gamma / zeta
  localparam real C5 = 2.421021152;     //  64 alpha beta gamma delta zeta

  // Integer bits (with sign) of a coefficient: every |Ck| is below 4.
  localparam int COEF_IB = 3;

  // Round a real constant to a signed integer with `frac` fractional bits.
  function automatic longint coef_q(real c, int frac);
    real scaled;
    scaled = c * (2.0 ** frac);
    if (scaled >= 0.0) return longint'($rtoi(scaled + 0.5));
    else               return -longint'($rtoi(-scaled + 0.5));
  endfunction

  // Control of one buffer port: `en` starts an access, `we` makes it a write.
  typedef struct packed {
    logic en;
    logic we;
  } buf_ctrl_t;

  // Source of the word written through buffer port 1.
  typedef enum logic [1:0] {
    WR_PIXEL = 2'd0,   // raw image sample from the load interface
    WR_LOW   = 2'd1,   // low-pass output s(i+1) of the 1-D DWT
    WR_HIGH  = 2'd2    // high-pass output d(i+1) of the 1-D DWT
  } wr_sel_e;

  // Filter control: `en` advances the 1-D DWT by one sample pair; `ds` selects
  // the digit-serial core (else the bit-parallel one) for the current
  // transform, both as the receiver of `en` and as the source of the results.
  typedef struct packed {
    logic    en;
    logic    ds;
    wr_sel_e wr_sel;
  } filter_ctrl_t;

  // Radix-2 signed digit in {-1, 0, +1}, two's complement coded
  // (2'b11 = -1, 2'b00 = 0, 2'b01 = +1), used by the digit-serial core.
  typedef logic signed [1:0] sd_digit_t;

  // Controller states.
  typedef enum logic [1:0] {
    ST_IDLE    = 2'd0,   // accepting raw samples, waiting for start
    ST_RUN     = 2'd1,   // row and column passes of every level
    ST_READOUT = 2'd2,   // streaming the transformed frame out
    ST_DRAIN   = 2'd3    // digit-serial core: waiting for the last results
  } ctrl_state_e;

endpackage
