// scr_phase_rom: 32 x 18 ROM of initial phases for the scrambling code
// generator, one per code group.
//
// Entry g is the state of the x register (x(d), ..., x(d+17) in bits 0..17)
// at d = 256*g chips from the standard initial state x(0) = 1,
// x(1..17) = 0: the x sequence of the first scrambling code of group g.
// With 16 codes per group spaced 16 chips apart in the x sequence, group g
// holds codes 16*g .. 16*g+15 of the 512 primary codes, and one phase per
// group is all the generator needs; the masks produce the other 15.
// The table is computed at elaboration from x(d) = coefficient 0 of
// X^d mod (X^18 + X^7 + 1).
//
// Interface: combinational read, addr -> phase.
module scr_phase_rom
  import csd_pkg::*;
(
  input  logic [GROUP_W-1:0] addr,
  output logic [17:0]        phase
);
  typedef logic [17:0] phase_table_t [N_GROUPS];

  // r = X^(256*g) mod p; its coefficient 0 after j further multiplications
  // by X is x(256*g + j). r is advanced from group to group by one multiply.
  function automatic phase_table_t make_table();
    phase_table_t t;
    logic [17:0] r, step, m, p;
    r    = 18'd1;
    step = gf2_xpow(GROUP_STRIDE, X_POLY);
    for (int g = 0; g < N_GROUPS; g++) begin
      m = r;
      p = '0;
      for (int j = 0; j < LFSR_W; j++) begin
        p = p | (18'(m[0]) << j);
        m = gf2_mulx(m, X_POLY);
      end
      t[g] = p;
      r = gf2_mul(r, step, X_POLY);
    end
    return t;
  endfunction

  localparam phase_table_t PHASES = make_table();

  assign phase = PHASES[addr];
endmodule
