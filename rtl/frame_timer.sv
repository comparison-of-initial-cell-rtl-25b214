// frame_timer: frame boundary from the detected slot number, and CPICH symbol
// timing for stage 3.
//
// Stage 2 finds the slot number s of the burst that ended at chip position B
// of the slot (the slot boundary of stage 1). That slot started at chip
// S0 = B - 255 (mod 2560), so every later chip at position S0 starts a new
// slot. The timer loads s when stage 2 finishes, counts slot starts modulo 15
// and flags the start of slot 0 as frame_start. Stage 3 starts at the first
// slot start after sync (start3, slot number start_slot = s+1 mod 15, which
// the code generator jumps to); from then on the timer marks the first and
// last chip of each 256-chip CPICH symbol (10 per slot, aligned to the slot
// start).
//
// Interface: pos is the index within the slot of the chip on the input
// (from the sampling counter); the outputs are combinational and qualified by
// chip_en, so they apply to the chip of the same cycle. sync must come before
// the next slot start after the burst (stage 2 takes about 1750 of the 2304
// chips available).
module frame_timer
  import csd_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 chip_en,
  input  logic [POS_W-1:0]     pos,
  input  logic                 sync,
  input  logic [POS_W-1:0]     slot_boundary,
  input  logic [SLOTID_W-1:0]  slot_id,
  output logic                 frame_start,
  output logic                 start3,
  output logic [SLOTID_W-1:0]  start_slot,
  output logic                 sym_first,
  output logic                 sym_last,
  output logic                 running,
  output logic [SLOTID_W-1:0]  slot_cnt
);
  logic             armed, slot_start, active;
  logic [POS_W-1:0] s0, off;

  assign s0 = POS_W'((32'(slot_boundary) + CHIPS_PER_SLOT - (SCH_LEN - 1)) % CHIPS_PER_SLOT);
  assign off = (pos >= s0) ? pos - s0 : POS_W'(32'(pos) + CHIPS_PER_SLOT - 32'(s0));
  assign slot_start  = chip_en && armed && (pos == s0);
  assign frame_start = slot_start && (slot_cnt == SLOTID_W'(SLOTS_PER_FRAME - 1));
  assign start3      = slot_start && !running;
  assign start_slot  = (slot_id == SLOTID_W'(SLOTS_PER_FRAME - 1)) ? '0 : slot_id + 1'b1;
  assign active      = chip_en && (running || start3);
  assign sym_first   = active && (off[7:0] == 8'd0);
  assign sym_last    = active && (off[7:0] == 8'd255);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed    <= 1'b0;
      running  <= 1'b0;
      slot_cnt <= '0;
    end else begin
      if (sync) begin
        armed    <= 1'b1;
        slot_cnt <= slot_id;
      end else if (slot_start) begin
        slot_cnt <= (slot_cnt == SLOTID_W'(SLOTS_PER_FRAME - 1)) ? '0 : slot_cnt + 1'b1;
      end
      if (start3) running <= 1'b1;
    end
  end
endmodule
