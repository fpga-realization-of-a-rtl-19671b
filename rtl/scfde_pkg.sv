// scfde_pkg -- constants, tables and small functions shared by the SC-FDE
// transmitter and receiver.
//
// Frame format (one packet): ten 16-symbol short preambles, a 16-symbol cyclic
// prefix, two 64-symbol long preambles (BPSK, +-7 on I), then the payload
// UW D48 UW D48 ... D48 UW: six 48-symbol QPSK data blocks, each followed by a
// 16-symbol Unique Word (UW), with one extra UW in front of the first block so
// that every 64-symbol FFT window [D48 UW] is preceded by its cyclic
// extension.  Frame sizes, code and filter sizes follow the published design;
// the preamble and UW bit patterns are this design's own choice (the source
// gives none): the long preamble is a +-1 pattern chosen for a flat spectrum.
//
// Angles are 16-bit two's-complement fractions of a full turn (65536 = 2*pi).
// The DFT tables of the long preamble and of the UW are computed at
// elaboration from a 17-entry quarter-wave cosine table,
//   COS_Q[m] = round(2^14 * cos(2*pi*m/64)), m = 0..16.
package scfde_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int N_FFT       = 64;   // FFT size = symbols per frame
  localparam int N_DATA      = 48;   // data symbols per frame
  localparam int N_UW        = 16;   // Unique Word symbols per frame
  localparam int N_FRAMES    = 6;    // frames per packet
  localparam int N_SHORT     = 16;   // short preamble length
  localparam int N_SHORT_REP = 10;   // number of short preambles
  localparam int N_LONG      = 64;   // long preamble length
  localparam int N_LONG_CP   = 16;   // cyclic prefix in front of the long preambles
  localparam int N_PMB       = N_SHORT * N_SHORT_REP + N_LONG_CP + 2 * N_LONG;  // 304
  localparam int N_PAYLOAD   = N_FRAMES * (N_DATA + N_UW) + N_UW;              // 400
  localparam int N_DATA_PKT  = N_FRAMES * N_DATA;                              // 288
  localparam int N_CODED_PKT = 2 * N_DATA_PKT;                                 // 576
  localparam int N_SRC_PKT   = N_CODED_PKT / 3;                                // 192

  localparam int PMB_AMP  = 7;       // preamble level (+-7)
  localparam int DATA_AMP = 4;       // floor(7/sqrt(2)) for QPSK data and UW

  // ------------------------------------------------ preamble / UW patterns
  // Bit m of a pattern is symbol m; '1' = +1, '0' = -1.
  localparam logic [15:0] SHORT_PAT = 16'h987f;
  localparam logic [63:0] LONG_PAT  = 64'h3b7e_68be_8f42_387b;
  localparam logic [15:0] UW_PAT_I  = 16'hb4c5;
  localparam logic [15:0] UW_PAT_Q  = 16'h6e29;

  typedef logic signed [3:0] sym4_t;   // transmit symbol, 4-bit two's complement

  typedef struct packed {
    logic signed [11:0] re;
    logic signed [11:0] im;
  } cplx12_t;

  // --------------------------------------------------------------- coding
  // K = 5, rate 1/3 code. state = {s0,s1,s2,s3}, s0 = newest bit.
  // g2 = din^s0^s1^s2^s3 (37 octal), g1 = din^s0^s2^s3 (33), g0 = din^s1^s3 (25).
  // Returned as {g2,g1,g0}; g0 is sent first.
  function automatic logic [2:0] conv_out(input logic din, input logic [3:0] st);
    logic s0, s1, s2, s3;
    {s0, s1, s2, s3} = st;
    return {din ^ s0 ^ s1 ^ s2 ^ s3, din ^ s0 ^ s2 ^ s3, din ^ s1 ^ s3};
  endfunction

  // ----------------------------------------------------------- RRC filter
  // 32-tap root-raised-cosine, roll-off 0.25, 4 samples/symbol:
  // h[n] = rrc((n - 15.5)/4), scaled to a peak of 255 and rounded.
  function automatic int rrc_coef(input int n);
    int t [32] = '{5, -1, -8, -11, -5, 9, 21, 21, 1, -29, -50, -38, 17, 105, 197, 255,
                   255, 197, 105, 17, -38, -50, -29, 1, 21, 21, 9, -5, -11, -8, -1, 5};
    return t[n];
  endfunction

  // --------------------------------------------------------------- CORDIC
  // atan(2^-i) in 1/65536 of a turn.
  function automatic int cordic_atan(input int i);
    int t [16] = '{8192, 4836, 2555, 1297, 651, 326, 163, 81, 41, 20, 10, 5, 3, 1, 1, 0};
    return (i < 16) ? t[i] : 0;
  endfunction

  // ------------------------------------------------------- DFT helpers
  // round(2^14 cos(2 pi m / 64)) for any integer m.
  function automatic int cos64(input int m);
    int q [17] = '{16384, 16305, 16069, 15679, 15137, 14449, 13623, 12665, 11585,
                   10394, 9102, 7723, 6270, 4756, 3196, 1606, 0};
    int r;
    r = m & 63;
    if (r <= 16)      return  q[r];
    else if (r <= 32) return -q[32 - r];
    else if (r <= 48) return -q[r - 32];
    else              return  q[64 - r];
  endfunction

  function automatic int sin64(input int m);
    return cos64(m - 16);
  endfunction

  function automatic int pm1(input logic b);
    return b ? 1 : -1;
  endfunction

  // round(8 * X_k): DFT of the +-1 long preamble, real and imaginary part.
  function automatic int lp_dft_re(input int k);
    int acc = 0;
    for (int m = 0; m < N_LONG; m++) acc += pm1(LONG_PAT[m]) * cos64(k * m);
    return (acc * 8 + 8192) >>> 14;
  endfunction

  function automatic int lp_dft_im(input int k);
    int acc = 0;
    for (int m = 0; m < N_LONG; m++) acc -= pm1(LONG_PAT[m]) * sin64(k * m);
    return (acc * 8 + 8192) >>> 14;
  endfunction

  // round(U_k): DFT of the UW (+-4 +-4j) placed at positions 48..63 of a frame.
  function automatic int uw_dft_re(input int k);
    int acc = 0;
    for (int m = 0; m < N_UW; m++)
      acc += DATA_AMP * (pm1(UW_PAT_I[m]) * cos64(k * (m + N_DATA))
                       + pm1(UW_PAT_Q[m]) * sin64(k * (m + N_DATA)));
    return (acc + 8192) >>> 14;
  endfunction

  function automatic int uw_dft_im(input int k);
    int acc = 0;
    for (int m = 0; m < N_UW; m++)
      acc += DATA_AMP * (pm1(UW_PAT_Q[m]) * cos64(k * (m + N_DATA))
                       - pm1(UW_PAT_I[m]) * sin64(k * (m + N_DATA)));
    return (acc + 8192) >>> 14;
  endfunction

endpackage
