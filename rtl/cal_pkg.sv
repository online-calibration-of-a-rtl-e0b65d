// cal_pkg: widths, fixed-point formats and defaults shared by the online
// code-density calibration engine.
//
// Output levels are addressed by an unsigned index k = 0 .. N-1, which stands
// for the signed level n = k - N/2 + 1 (n runs from -N/2+1 to N/2). Level n
// nominally covers the input interval [(n-1), n] LSB, centred on n - 1/2.
// All amplitudes and positions below are in LSB units.
//
// From the document: the 12-bit resolution, 5e6 samples per phase, M = 8
// averaging terms for alpha and 25 factors for the infinite product. All the
// word widths and binary-point positions are this design's own choices,
// sized after the memory budget 2^q * (2d + x + y + b) bits.
//
// Lint note: each module uses only the constants it needs (the histogram
// counter and the memories hardly any, the DSP all but OUT_W), so a tool
// that checks one module on its own reports the rest of the package as
// unused parameters.
package cal_pkg;

  // ADC resolution q and number of output levels N = 2^q.
  localparam int unsigned Q_BITS   = 12;
  // Hit-counter width d (5e6 samples fit in 23 bits).
  localparam int unsigned CNT_W    = 24;
  // Fraction bits kept with a preconditioned histogram value.
  localparam int unsigned HF       = 8;
  localparam int unsigned HV_W     = CNT_W + HF;
  // Mismatch information: x = signed offset e_a - a, y = f_a in 1.16 format.
  localparam int unsigned MAP_X_W  = 10;
  localparam int unsigned FF       = 16;
  localparam int unsigned MAP_F_W  = FF + 1;
  localparam int unsigned MAP_W    = MAP_X_W + MAP_F_W;
  // Positions on the level axis: signed, POS_F fraction bits.
  localparam int unsigned POS_F    = 16;
  localparam int unsigned POS_W    = 32;
  // Attenuator gain alpha: unsigned, ALPHA_F fraction bits.
  localparam int unsigned ALPHA_F  = 24;
  localparam int unsigned ALPHA_W  = 26;
  // Running product of eq. (36): unsigned, AF fraction bits.
  localparam int unsigned AF       = 16;
  localparam int unsigned ACC_W    = 48;
  // DNL / INL values: signed, DF fraction bits.
  localparam int unsigned DF       = 16;
  localparam int unsigned INL_W    = 32;
  // Correction LUT entry b: signed error in LSB with LUT_F fraction bits.
  localparam int unsigned LUT_F    = 8;
  localparam int unsigned LUT_W    = 16;
  // Corrected output word: signed level value with LUT_F fraction bits.
  localparam int unsigned OUT_W    = 24;

  // Calibration phase, drives the analog switch S of the E-ADC input.
  typedef enum logic {
    PHASE_MISMATCH    = 1'b0,   // alpha = 1
    PHASE_NONLINEARITY = 1'b1   // alpha ~ 0.5
  } phase_e;

  // Sign-extend / truncate helpers are not needed: all arithmetic is written
  // with explicit casts in the modules.

endpackage
