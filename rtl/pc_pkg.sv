// Shared types and constants of the precoded multi-beam forward-link chain.
//
// All baseband streams are complex fixed-point samples (cplx_t): two signed
// SW-bit words.  A unit-modulus BPSK/QPSK symbol has components of +/-SYM_A,
// i.e. |s| = SYM_A*sqrt(2).  Matrix and filter coefficients use the same
// two's-complement format with CFRAC fraction bits (1.0 = 2**CFRAC).
// The segment tags follow the superframe fields named for the precoding mask
// (SOSF, SFFI, PLH, P2, P, payload); their encoding is this design's choice.
package pc_pkg;
  localparam int unsigned NUM_STREAMS = 6;   // 6 beams / 6 terminals
  localparam int unsigned OSF         = 4;   // oversampling factor
  localparam int unsigned SW          = 16;  // sample component width
  localparam int unsigned CFRAC       = 14;  // coefficient fraction bits
  localparam int signed   SYM_A       = 2048;// symbol component amplitude

  typedef struct packed {
    logic signed [SW-1:0] re;
    logic signed [SW-1:0] im;
  } cplx_t;

  typedef enum logic [2:0] {
    SEG_SOSF    = 3'd0,
    SEG_SFFI    = 3'd1,
    SEG_PLH     = 3'd2,
    SEG_P2      = 3'd3,
    SEG_P       = 3'd4,
    SEG_PAYLOAD = 3'd5
  } seg_t;
  localparam int unsigned NUM_SEGS = 6;

  // Superframe layout shared by the generator and the terminal deframer.
  // Superframe = SOSF, SFFI, then FRAMES x { PLH, P2, BLOCKS x { payload, P } }.
  localparam int unsigned SOSF_LEN = 256;
  localparam int unsigned SFFI_LEN = 32;
  localparam int unsigned PLH_LEN  = 32;
  localparam int unsigned P2_LEN   = 32;
  localparam int unsigned P_LEN    = 32;
  localparam int unsigned PAY_LEN  = 512;
  localparam int unsigned BLOCKS   = 4;
  localparam int unsigned FRAMES   = 4;

  localparam cplx_t CPLX_ZERO = '{re: '0, im: '0};
  localparam cplx_t CPLX_ONE  = '{re: SW'(1 << CFRAC), im: '0};

  // Saturate a wide signed value to SW bits.
  function automatic logic signed [SW-1:0] sat(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7fff;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return v[SW-1:0];
  endfunction

  // Complex product a*b with b in Q(CFRAC), rounded and saturated.
  function automatic cplx_t cmul(input cplx_t a, input cplx_t b);
    logic signed [47:0] pr, pi;
    cplx_t r;
    pr = 48'(a.re) * 48'(b.re) - 48'(a.im) * 48'(b.im);
    pi = 48'(a.re) * 48'(b.im) + 48'(a.im) * 48'(b.re);
    r.re = sat((pr + (48'sd1 <<< (CFRAC-1))) >>> CFRAC);
    r.im = sat((pi + (48'sd1 <<< (CFRAC-1))) >>> CFRAC);
    return r;
  endfunction

  // Chip n (+1 -> 0, -1 -> 1) of row k of the natural-order Walsh-Hadamard matrix.
  function automatic logic wh_chip(input logic [7:0] k, input logic [7:0] n);
    return ^(k & n);
  endfunction

  // BPSK symbol on the diagonal: +/-SYM_A*(1+j).
  function automatic cplx_t bpsk(input logic neg);
    cplx_t r;
    r.re = neg ? -SW'(SYM_A) : SW'(SYM_A);
    r.im = r.re;
    return r;
  endfunction

  // Pilot scrambler: LFSR x^7 + x^6 + 1, restarted to all-ones at every
  // scrambled field.  The same sequence is used by all streams, so that
  // Walsh-Hadamard orthogonality between streams is kept.
  localparam logic [6:0] SCR_SEED = 7'h7f;
  function automatic logic [6:0] scr_next(input logic [6:0] s);
    return {s[5:0], s[6] ^ s[5]};
  endfunction
endpackage
