// cyclic_code_rom: 32 x 16 ROM of the stage-2 cyclic code words, one word per
// code group.
//
// Word g defines the secondary synchronisation burst of group g: chip 16*m+i
// of the 256-chip burst sent in slot s is c_g(i) * c_g((m+s) mod 16), where
// c_g(k) = +1 for bit k = 0 and -1 for bit k = 1. The inner 16 chips are the
// word itself and the outer signs are the word rotated by the slot number,
// so one word per group serves all 15 slots and both the group and the slot
// number come out of a single 256-chip burst.
//
// The words are this design's choice. They were picked so that every word is
// orthogonal to the inner primary code (the primary burst, sent at the same
// time, then gives zero in the first adder tree), every periodic
// autocorrelation sidelobe is at most 4 of 16, and the 256-chip correlation
// between any two of the 480 group/slot bursts is at most 96 of 256.
//
// Interface: combinational read, addr -> word.
module cyclic_code_rom
  import csd_pkg::*;
(
  input  logic [GROUP_W-1:0] addr,
  output logic [15:0]        word
);
  localparam logic [15:0] CODES [N_GROUPS] = '{
    16'h74E7, 16'h8DA0, 16'hB6CE, 16'h2D66, 16'h0EEF, 16'h5C24, 16'h4B3A, 16'hC2B6,
    16'h2F34, 16'hE967, 16'hC6F5, 16'hF85B, 16'hEF2C, 16'hAE0D, 16'h3055, 16'h91E0,
    16'h7520, 16'hE4FA, 16'hCF05, 16'h5330, 16'hF143, 16'hA186, 16'h2711, 16'h03EB,
    16'hF695, 16'h5462, 16'h586D, 16'h9885, 16'hAF03, 16'hC36A, 16'hFCA5, 16'hC20E
  };

  assign word = CODES[addr];
endmodule
