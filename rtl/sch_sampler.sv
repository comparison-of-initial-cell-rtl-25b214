// sch_sampler: stage-2 sampling counter and secondary buffer.
//
// The sampling counter counts input chips modulo CHIPS from the first chip
// after reset, so its count matches the chip positions of stage 1. A 256-deep
// shift register of I/Q samples (the secondary buffer) follows the input.
// Once stage 1 has reported the slot boundary (the position of the last chip
// of the primary burst), the buffer is frozen right after the chip at that
// position has entered it: it then holds the 256 chips of one synchronisation
// burst, oldest at index 0. It stays frozen until release, so a decoder
// running on the fast clock can read it while new chips keep arriving.
//
// Interface: chip_en qualifies din. pos is the index, within the slot, of the
// chip on din. captured pulses one cycle after the freeze; rd_addr reads the
// frozen buffer combinationally. release re-arms the sampler; it freezes again
// at the next boundary chip once 256 fresh chips have entered the buffer.
module sch_sampler
  import csd_pkg::*;
#(
  parameter int unsigned CHIPS = CHIPS_PER_SLOT,
  parameter int unsigned LEN   = SCH_LEN,
  localparam int unsigned P_W  = $clog2(CHIPS),
  localparam int unsigned A_W  = $clog2(LEN)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            chip_en,
  input  iq_t             din,
  input  logic            stage1_done,
  input  logic [P_W-1:0]  slot_boundary,
  input  logic            release_buf,
  output logic [P_W-1:0]  pos,
  output logic            captured,
  output logic            frozen,
  input  logic [A_W-1:0]  rd_addr,
  output iq_t             rd_data
);
  iq_t buf_q [LEN];   // buf_q[LEN-1] = newest chip
  logic [A_W:0] fill; // chips entered since reset or release, up to LEN
  logic hit;

  assign hit = chip_en && stage1_done && !frozen && (pos == slot_boundary)
               && (fill >= (A_W+1)'(LEN - 1));
  assign rd_data = buf_q[rd_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos      <= '0;
      frozen   <= 1'b0;
      captured <= 1'b0;
      fill     <= '0;
      for (int k = 0; k < LEN; k++) buf_q[k] <= '0;
    end else begin
      captured <= hit;
      if (chip_en) pos <= (pos == P_W'(CHIPS - 1)) ? '0 : pos + 1'b1;
      if (chip_en && !frozen) begin
        for (int k = 0; k < LEN - 1; k++) buf_q[k] <= buf_q[k+1];
        buf_q[LEN-1] <= din;
      end
      if (hit) frozen <= 1'b1;
      else if (release_buf) begin
        frozen <= 1'b0;
        fill   <= '0;
      end else if (chip_en && !frozen && fill != (A_W+1)'(LEN)) begin
        fill <= fill + 1'b1;
      end
    end
  end
endmodule
