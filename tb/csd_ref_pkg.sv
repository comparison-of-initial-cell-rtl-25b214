// csd_ref_pkg: reference models for the cell search testbenches, written
// independently of the RTL: chip-by-chip code definitions, brute-force LFSR
// sequences and a transmitted-signal generator (P-SCH + S-SCH + CPICH + noise).
package csd_ref_pkg;

  // primary code, as chip values (first chip first)
  localparam int A_SEQ [16] = '{1,1,1,1,1,1,-1,-1,1,-1,1,-1,1,-1,-1,1};
  localparam int O_SEQ [16] = '{1,1,1,-1,-1,1,-1,-1,1,1,1,-1,1,-1,1,1};

  // cyclic code words of the 32 groups (bit k = 1 means chip k is -1)
  localparam logic [15:0] WORDS [32] = '{
    16'h74E7, 16'h8DA0, 16'hB6CE, 16'h2D66, 16'h0EEF, 16'h5C24, 16'h4B3A, 16'hC2B6,
    16'h2F34, 16'hE967, 16'hC6F5, 16'hF85B, 16'hEF2C, 16'hAE0D, 16'h3055, 16'h91E0,
    16'h7520, 16'hE4FA, 16'hCF05, 16'h5330, 16'hF143, 16'hA186, 16'h2711, 16'h03EB,
    16'hF695, 16'h5462, 16'h586D, 16'h9885, 16'hAF03, 16'hC36A, 16'hFCA5, 16'hC20E
  };

  function automatic int psc_chip(int n);
    return A_SEQ[n % 16] * O_SEQ[n / 16];
  endfunction

  function automatic int word_chip(logic [15:0] w, int k);
    return w[k % 16] ? -1 : 1;
  endfunction

  // secondary burst chip n of group g in slot s
  function automatic int ssc_chip(int g, int s, int n);
    return word_chip(WORDS[g], n % 16) * word_chip(WORDS[g], (n / 16 + s) % 16);
  endfunction

  // ---- scrambling code sequences, stepped one chip at a time ----
  localparam int SEQ_LEN = 262143;
  bit xs [SEQ_LEN + 18];
  bit ys [SEQ_LEN + 18];

  function automatic void build_sequences();
    for (int i = 0; i < 18; i++) begin
      xs[i] = (i == 0);
      ys[i] = 1'b1;
    end
    for (int i = 0; i < SEQ_LEN; i++) begin
      xs[i+18] = xs[i+7] ^ xs[i];
      ys[i+18] = ys[i+10] ^ ys[i+7] ^ ys[i+5] ^ ys[i];
    end
  endfunction

  // chip i (0..38399) of scrambling code number n, as bits (1 means -1)
  function automatic bit scr_i(int n, int i);
    return xs[(i + n) % SEQ_LEN] ^ ys[i];
  endfunction
  function automatic bit scr_q(int n, int i);
    return xs[(i + n + 131072) % SEQ_LEN] ^ ys[(i + 131072) % SEQ_LEN];
  endfunction

  function automatic int sgn(bit b);
    return b ? -1 : 1;
  endfunction

  // transmitted baseband chip c (counted from a frame start) of a cell in
  // group g using primary code p (0..511), rotated by rot*90 degrees, with
  // noise in -1..1 on each branch. build_sequences() must have run.
  function automatic void tx_chip(int c, int g, int p, int rot, int noise_i, int noise_q,
                                  output int ri, output int rq);
    int fc, slot, w, si, sq, ci, cq, ti, tq;
    fc   = c % 38400;
    slot = fc / 2560;
    w    = fc % 2560;
    si   = sgn(scr_i(16 * p, fc));
    sq   = sgn(scr_q(16 * p, fc));
    // CPICH (1+j) times code (si + j sq)
    ci = si - sq;
    cq = si + sq;
    ti = ci;
    tq = cq;
    if (w < 256) begin
      ti += 2 * psc_chip(w) + 2 * ssc_chip(g, slot, w);
      tq += 2 * psc_chip(w) + 2 * ssc_chip(g, slot, w);
    end
    case (rot & 3)
      0: begin ri = ti;  rq = tq;  end
      1: begin ri = -tq; rq = ti;  end
      2: begin ri = -ti; rq = -tq; end
      default: begin ri = tq; rq = -ti; end
    endcase
    ri += noise_i;
    rq += noise_q;
    if (ri > 7) ri = 7;
    if (ri < -8) ri = -8;
    if (rq > 7) rq = 7;
    if (rq < -8) rq = -8;
  endfunction

endpackage
