// slot_accumulator: stage-1 accumulator and comparator. Adds the matched
// filter energy of every chip position of a slot over N_SLOTS slots and
// returns the position with the largest sum as the slot boundary.
//
// A CHIPS-entry memory holds one running sum per chip position of the slot.
// The first slot writes the energies, the following slots add to them
// (read-modify-write of one entry per energy sample). During the last slot a
// comparator keeps the largest sum and its position; ties keep the earlier
// position. Fifteen slots (one frame) is the described default.
//
// Interface: one energy per e_valid, counted from the first e_valid after
// reset. The reported boundary is the position of the largest sum minus
// POS_OFFSET (modulo CHIPS), so that with POS_OFFSET set to the latency of the
// matched filter it is the input-chip index, within the slot, of the last
// chip of the primary code. done rises with the boundary after
// N_SLOTS*CHIPS samples and stays high until reset.
module slot_accumulator #(
  parameter int unsigned CHIPS      = 2560,
  parameter int unsigned N_SLOTS    = 15,
  parameter int unsigned ENERGY_W   = 26,
  parameter int unsigned POS_OFFSET = 2,
  localparam int unsigned POS_W     = $clog2(CHIPS),
  localparam int unsigned ACC_W     = ENERGY_W + $clog2(N_SLOTS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 e_valid,
  input  logic [ENERGY_W-1:0]  energy,
  output logic [POS_W-1:0]     boundary,
  output logic [ACC_W-1:0]     peak,
  output logic                 done
);
  localparam int unsigned SLOT_W = $clog2(N_SLOTS + 1);

  logic [ACC_W-1:0]  acc_mem [CHIPS];
  logic [POS_W-1:0]  pos;
  logic [SLOT_W-1:0] slot;
  logic [ACC_W-1:0]  sum;
  logic [ACC_W-1:0]  best;
  logic [POS_W-1:0]  best_pos;
  logic              last_slot;

  assign last_slot = (slot == SLOT_W'(N_SLOTS - 1));
  assign sum = (slot == '0) ? ACC_W'(energy) : acc_mem[pos] + ACC_W'(energy);

  always_ff @(posedge clk) begin
    if (e_valid && !done) acc_mem[pos] <= sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos      <= '0;
      slot     <= '0;
      best     <= '0;
      best_pos <= '0;
      boundary <= '0;
      peak     <= '0;
      done     <= 1'b0;
    end else if (e_valid && !done) begin
      if (last_slot && (pos == '0 || sum > best)) begin
        best     <= sum;
        best_pos <= pos;
      end
      if (pos == POS_W'(CHIPS - 1)) begin
        pos <= '0;
        if (last_slot) begin
          done <= 1'b1;
          if (sum > best) begin
            peak     <= sum;
            boundary <= POS_W'((CHIPS - 1 + CHIPS - POS_OFFSET) % CHIPS);
          end else begin
            peak     <= best;
            boundary <= POS_W'((32'(best_pos) + CHIPS - POS_OFFSET) % CHIPS);
          end
        end else begin
          slot <= slot + 1'b1;
        end
      end else begin
        pos <= pos + 1'b1;
      end
    end
  end
endmodule
