// csd_pkg: shared constants, types and constant functions of the W-CDMA
// initial cell search receiver (three-stage search: slot boundary, code group
// and slot number, scrambling code).
//
// Frame numbers (38400-chip frame of 15 slots of 2560 chips, 256-chip SCH
// bursts, 10 CPICH symbols of 256 chips per slot, 32 code groups of 16 codes,
// 4-bit input samples) follow the design description. The primary
// synchronisation code and the scrambling code polynomials are those of the
// W-CDMA standard (3GPP TS 25.213). The 32 cyclic code words of stage 2 are
// this design's own choice; see cyclic_code_rom.
package csd_pkg;

  // ---- frame structure ----------------------------------------------------
  localparam int unsigned CHIPS_PER_SLOT  = 2560;
  localparam int unsigned SLOTS_PER_FRAME = 15;
  localparam int unsigned CHIPS_PER_FRAME = CHIPS_PER_SLOT * SLOTS_PER_FRAME; // 38400
  localparam int unsigned SCH_LEN         = 256;  // P-SCH / S-SCH burst length
  localparam int unsigned SUB_LEN         = 16;   // hierarchical code: 16 x 16 chips
  localparam int unsigned SYM_LEN         = 256;  // CPICH symbol length
  localparam int unsigned N_GROUPS        = 32;   // code groups
  localparam int unsigned CODES_PER_GROUP = 16;   // scrambling codes per group

  localparam int unsigned POS_W   = $clog2(CHIPS_PER_SLOT);   // 12
  localparam int unsigned GROUP_W = $clog2(N_GROUPS);          // 5
  localparam int unsigned SLOTID_W = $clog2(SLOTS_PER_FRAME);  // 4
  localparam int unsigned CODE_W  = $clog2(CODES_PER_GROUP);   // 4
  localparam int unsigned LONG_W  = $clog2(N_GROUPS * CODES_PER_GROUP); // 9

  // ---- input samples --------------------------------------------------------
  localparam int unsigned DATA_W = 4;   // quantisation of I and Q input data
  typedef logic signed [DATA_W-1:0] sample_t;
  typedef struct packed {
    sample_t i;
    sample_t q;
  } iq_t;

  // ---- correlation widths ---------------------------------------------------
  // 16 products of DATA_W-bit samples need DATA_W+5 bits (|sum| <= 128 for 4 bits),
  // a 256-chip hierarchical correlation DATA_W+9 bits.
  localparam int unsigned MF1_W    = DATA_W + 5;
  localparam int unsigned CORR_W   = DATA_W + 9;
  localparam int unsigned ENERGY_W = 2 * CORR_W;      // I^2 + Q^2

  // ---- primary synchronisation code (3GPP TS 25.213) -----------------------
  // Bit k = 1 means chip value -1, bit k = 0 means +1; chip 0 is sent first.
  // a = <1,1,1,1,1,1,-1,-1,1,-1,1,-1,1,-1,-1,1>
  localparam logic [15:0] PSC_INNER = 16'h6AC0;
  // outer sign pattern <a,a,a,-a,-a,a,-a,-a,a,a,a,-a,a,-a,a,a>
  localparam logic [15:0] PSC_OUTER = 16'h28D8;

  // ---- scrambling code generator (3GPP TS 25.213) ---------------------------
  // x: X^18 + X^7 + 1, y: X^18 + X^10 + X^7 + X^5 + 1. Feedback taps listed
  // as the low 18 coefficients of the characteristic polynomial.
  localparam int unsigned LFSR_W = 18;
  localparam logic [17:0] X_POLY = 18'h00081;          // X^7 + 1
  localparam logic [17:0] Y_POLY = 18'h004A1;          // X^10 + X^7 + X^5 + 1
  localparam int unsigned Q_SHIFT = 131072;            // Q branch offset, 2^17
  localparam int unsigned GROUP_STRIDE = 256;          // x shift between groups
  localparam int unsigned CODE_STRIDE  = 16;           // x shift between codes

  // Multiply a polynomial by X modulo the characteristic polynomial
  // X^18 + poly (poly holds the coefficients of X^0..X^17).
  function automatic logic [17:0] gf2_mulx(input logic [17:0] a, input logic [17:0] poly);
    logic [17:0] r;
    r = {a[16:0], 1'b0};
    if (a[17]) r = r ^ poly;
    return r;
  endfunction

  // Multiply two residues modulo X^18 + poly.
  function automatic logic [17:0] gf2_mul(input logic [17:0] a, input logic [17:0] b,
                                          input logic [17:0] poly);
    logic [17:0] acc, sh;
    acc = '0;
    sh  = a;
    for (int k = 0; k < 18; k++) begin
      if (b[k]) acc = acc ^ sh;
      sh = gf2_mulx(sh, poly);
    end
    return acc;
  endfunction

  // X^d modulo X^18 + poly. Bit j of the result is the weight of sequence
  // element s(i+j) in s(i+d): it is the mask that turns the LFSR state
  // (s(i), ..., s(i+17)) into the sequence advanced by d chips.
  function automatic logic [17:0] gf2_xpow(input int unsigned d, input logic [17:0] poly);
    logic [17:0] result, base;
    int unsigned e;
    result = 18'd1;
    base   = 18'd2;
    e      = d;
    while (e != 0) begin
      if (e[0]) result = gf2_mul(result, base, poly);
      base = gf2_mul(base, base, poly);
      e    = e >> 1;
    end
    return result;
  endfunction

  // One step of an 18-stage Fibonacci LFSR holding (s(i), ..., s(i+17)) in
  // bits 0..17: s(i+18) = sum of s(i+j) over the set bits j of poly.
  function automatic logic [17:0] lfsr_step(input logic [17:0] s, input logic [17:0] poly);
    return {^(s & poly), s[17:1]};
  endfunction

endpackage
