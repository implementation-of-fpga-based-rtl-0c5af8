// pid_pkg: number formats and shared types of the incremental PID controllers.
//
// All values are two's-complement fixed point. The ADC word is an unsigned
// integer. The step size s is unsigned with S_FRAC fraction bits, so the
// measured position P = a*s and the set point Pd carry S_FRAC fraction bits.
// The gains k0, k1, k2 are signed with K_FRAC fraction bits, so the control
// output u carries S_FRAC+K_FRAC fraction bits and is never rounded: the
// multiplier design and the distributed-arithmetic design give bit-identical
// results. The 8-bit ADC width follows the document; every other width here
// is this design's own choice.
package pid_pkg;

  localparam int unsigned ADC_W  = 8;            // ADC output bits
  localparam int unsigned S_W    = 12;           // step size bits (unsigned)
  localparam int unsigned S_FRAC = 8;            // fraction bits of s, P, Pd, e
  localparam int unsigned P_W    = ADC_W + S_W;  // P = a*s, unsigned
  localparam int unsigned E_W    = 24;           // error width (DA serial length B)
  localparam int unsigned K_W    = 16;           // gain width (signed)
  localparam int unsigned K_FRAC = 8;            // fraction bits of the gains
  localparam int unsigned U_W    = 48;           // control output width (signed)
  localparam int unsigned U_FRAC = S_FRAC + K_FRAC;

  // States of the DA controller sequencer.
  typedef enum logic [2:0] {
    DA_IDLE,    // waiting for a sample strobe
    DA_ADC,     // ADC side: one bit of a[n] per clock
    DA_ERRLD,   // form e[n], load the three error PSRs
    DA_ERR,     // error side: one bit of e[n], e[n-1], e[n-2] per clock
    DA_UPD      // u[n] = u[n-1] + E, shift the error history
  } da_state_e;

endpackage
