// scr_code_gen: multiple scrambling code generator. One pair of 18-stage
// LFSRs produces the I and Q chips of all 16 scrambling codes of a code group
// in parallel.
//
// The x register (X^18 + X^7 + 1) starts each frame from the group's phase in
// scr_phase_rom, the y register (X^18 + X^10 + X^7 + X^5 + 1) from all ones.
// A masking function is an AND of the register state with a fixed 18-bit
// mask followed by an XOR reduction; mask X^d mod p(X) yields the sequence d
// chips ahead. Code k of the group uses x advanced by 16*k for its I chip and
// by 16*k + 131072 for its Q chip; y is used directly for I and advanced by
// 131072 for Q. So 16 codes cost 33 masks and no extra registers, instead of
// 16 generators with 16 stored phases each.
//
// Slot jump: stage 3 starts at the first slot boundary after stage 2, which is
// usually not a frame start. load copies the frame-start states into the
// registers; the generator then applies a constant "advance one slot" matrix
// (18 masks X^(2560+j), one per state bit, for each register) load_slot times,
// one slot per clock, so at most 14 cycles later the registers hold the state
// of the first chip of slot load_slot. The scrambling code itself is from the
// W-CDMA standard; the jump matrix is this design's way to start mid-frame.
//
// Interface: group selects the phase entry. ready is high when no jump is
// pending. The registers advance one chip on chip_en while run is high.
// On a chip_en cycle with frame_start high the outputs are those of chip 0 of
// the frame (the registers restart from the ROM phase). code_i[k] / code_q[k]
// = 1 means chip value -1; outputs are combinational from the registers.
module scr_code_gen
  import csd_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [GROUP_W-1:0]           group,
  input  logic                         load,
  input  logic [SLOTID_W-1:0]          load_slot,
  output logic                         ready,
  input  logic                         run,
  input  logic                         chip_en,
  input  logic                         frame_start,
  output logic [CODES_PER_GROUP-1:0]   code_i,
  output logic [CODES_PER_GROUP-1:0]   code_q
);
  typedef logic [17:0] mask_table_t [CODES_PER_GROUP];
  typedef logic [17:0] jump_table_t [LFSR_W];

  // mask k = X^(16*k + extra) mod p, built by one multiply per entry
  function automatic mask_table_t make_masks(input int unsigned extra);
    mask_table_t t;
    logic [17:0] m, step;
    m    = gf2_xpow(extra, X_POLY);
    step = gf2_xpow(CODE_STRIDE, X_POLY);
    for (int k = 0; k < CODES_PER_GROUP; k++) begin
      t[k] = m;
      m = gf2_mul(m, step, X_POLY);
    end
    return t;
  endfunction

  // row j of the slot jump: X^(2560 + j) mod p
  function automatic jump_table_t make_jump(input logic [17:0] poly);
    jump_table_t t;
    logic [17:0] m;
    m = gf2_xpow(CHIPS_PER_SLOT, poly);
    for (int j = 0; j < LFSR_W; j++) begin
      t[j] = m;
      m = gf2_mulx(m, poly);
    end
    return t;
  endfunction

  localparam mask_table_t MASK_XI = make_masks(0);
  localparam mask_table_t MASK_XQ = make_masks(Q_SHIFT);
  localparam logic [17:0] MASK_YQ = gf2_xpow(Q_SHIFT, Y_POLY);
  localparam jump_table_t JUMP_X  = make_jump(X_POLY);
  localparam jump_table_t JUMP_Y  = make_jump(Y_POLY);

  logic [17:0] x_q, y_q, x_cur, y_cur, phase, x_jump, y_jump;
  logic [SLOTID_W-1:0] jumps_left;
  logic        y_i_bit, y_q_bit;

  scr_phase_rom u_rom (.addr(group), .phase);

  assign ready   = (jumps_left == '0);
  assign x_cur   = frame_start ? phase : x_q;
  assign y_cur   = frame_start ? '1    : y_q;
  assign y_i_bit = y_cur[0];
  assign y_q_bit = ^(y_cur & MASK_YQ);

  always_comb begin
    for (int k = 0; k < CODES_PER_GROUP; k++) begin
      code_i[k] = (^(x_cur & MASK_XI[k])) ^ y_i_bit;
      code_q[k] = (^(x_cur & MASK_XQ[k])) ^ y_q_bit;
    end
    for (int j = 0; j < LFSR_W; j++) begin
      x_jump[j] = ^(x_q & JUMP_X[j]);
      y_jump[j] = ^(y_q & JUMP_Y[j]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q        <= 18'd1;
      y_q        <= '1;
      jumps_left <= '0;
    end else if (load) begin
      x_q        <= phase;
      y_q        <= '1;
      jumps_left <= load_slot;
    end else if (jumps_left != '0) begin
      x_q        <= x_jump;
      y_q        <= y_jump;
      jumps_left <= jumps_left - 1'b1;
    end else if (chip_en && run) begin
      x_q <= lfsr_step(x_cur, X_POLY);
      y_q <= lfsr_step(y_cur, Y_POLY);
    end
  end
endmodule
