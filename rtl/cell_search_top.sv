// cell_search_top: three-stage W-CDMA initial cell search receiver using
// cyclic synchronisation codes.
//
// Stage 1 (slot boundary): I and Q hierarchical matched filters for the
// primary synchronisation code, non-coherent detection, and accumulation of
// the energies of all 2560 chip positions over N_SLOTS slots; the position of
// the maximum is the slot boundary.
// Stage 2 (code group and slot number): the 256 chips of one secondary
// burst are frozen in a buffer at the slot boundary and decoded on the fast
// clock against 32 groups x 15 slot numbers before the next slot arrives.
// Stage 3 (scrambling code): from the next slot start, one LFSR pair with
// masking functions (jumped to that slot of the frame) generates the 16
// scrambling codes of the group, 16
// descramblers measure the CPICH energy of each symbol, the best code of each
// symbol gets a vote, and the search ends when a vote counter exceeds
// THRESHOLD.
//
// Clocking: one clock, the fast clock. chip_valid marks the cycles that carry
// a new chip (one in CLK_RATIO = 5 in the described design); stages 1 and 3
// work on those cycles only, stage 2 on every cycle. long_code is the primary
// scrambling code index 16*code_group + code index (0..511).
//
// The described design has two clocks (system clock and a 5x fast clock);
// using one clock with a chip enable instead is this design's choice and
// avoids a clock-domain crossing. So are the slot jump that starts stage 3
// at the next slot rather than the next frame, and the single search after
// reset (no restart after a failed stage 3).
module cell_search_top
  import csd_pkg::*;
#(
  parameter int unsigned N_SLOTS   = 15,
  parameter int unsigned THRESHOLD = 28
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  logic                 chip_valid,
  input  iq_t                  din,
  output logic                 stage1_done,
  output logic [POS_W-1:0]     slot_boundary,
  output logic                 stage2_done,
  output logic [GROUP_W-1:0]   code_group,
  output logic [SLOTID_W-1:0]  slot_id,
  output logic                 frame_sync,
  output logic                 code_found,
  output logic [LONG_W-1:0]    long_code
);
  localparam int unsigned D_ACC_W = DATA_W + 2 + $clog2(SYM_LEN);
  localparam int unsigned D_E_W   = 2 * D_ACC_W;
  localparam int unsigned CNT_W   = 8;

  logic chip;
  assign chip = chip_valid && enable;

  // ---------------- stage 1: slot boundary detection ----------------
  logic signed [CORR_W-1:0] psc_i, psc_q;
  logic                     psc_valid, psc_valid_q;
  logic [ENERGY_W-1:0]      s1_energy;
  logic                     s1_e_valid;

  psch_matched_filter u_psc_i (.clk, .rst_n, .en(chip), .din(din.i), .corr(psc_i), .corr_valid(psc_valid));
  psch_matched_filter u_psc_q (.clk, .rst_n, .en(chip), .din(din.q), .corr(psc_q), .corr_valid(psc_valid_q));

  noncoherent_detect #(.W(CORR_W)) u_s1_ncd (
    .clk, .rst_n, .in_valid(psc_valid), .i_in(psc_i), .q_in(psc_q),
    .energy(s1_energy), .out_valid(s1_e_valid));

  slot_accumulator #(
    .CHIPS(CHIPS_PER_SLOT), .N_SLOTS(N_SLOTS), .ENERGY_W(ENERGY_W), .POS_OFFSET(2)
  ) u_acc (
    .clk, .rst_n, .e_valid(s1_e_valid), .energy(s1_energy),
    .boundary(slot_boundary), .peak(), .done(stage1_done));

  // ---------------- stage 2: code group and slot number ----------------
  logic [POS_W-1:0] pos;
  logic             captured, frozen;
  logic [7:0]       rd_addr;
  iq_t              rd_data;
  logic             s2_pulse, s2_busy;

  sch_sampler u_sampler (
    .clk, .rst_n, .chip_en(chip), .din, .stage1_done, .slot_boundary,
    .release_buf(1'b0), .pos, .captured, .frozen, .rd_addr, .rd_data);

  ssc_decoder u_s2 (
    .clk, .rst_n, .start(captured), .rd_addr, .rd_data,
    .code_group, .slot_id, .best_energy(), .busy(s2_busy), .done(s2_pulse));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        stage2_done <= 1'b0;
    else if (s2_pulse) stage2_done <= 1'b1;
  end

  // ---------------- stage 3: scrambling code identification ----------------
  logic                       frame_start, start3, sym_first, sym_last, gen_ready;
  logic [SLOTID_W-1:0]        slot_cnt, start_slot;
  logic [CODES_PER_GROUP-1:0] code_i, code_q;
  logic [D_E_W-1:0]           d_energy [CODES_PER_GROUP];
  logic [CODES_PER_GROUP-1:0] d_valid;
  logic [CNT_W-1:0]           votes [CODES_PER_GROUP];
  logic [CODE_W-1:0]          winner, code_idx;

  frame_timer u_ft (
    .clk, .rst_n, .chip_en(chip), .pos, .sync(s2_pulse), .slot_boundary, .slot_id,
    .frame_start, .start3, .start_slot, .sym_first, .sym_last, .running(frame_sync), .slot_cnt);

  scr_code_gen u_gen (
    .clk, .rst_n, .group(code_group), .load(s2_pulse), .load_slot(start_slot), .ready(gen_ready),
    .run(frame_sync || start3), .chip_en(chip), .frame_start, .code_i, .code_q);

  // the slot jump (at most 14 cycles) ends long before the next slot starts
  a_jump_done: assert property (@(posedge clk) disable iff (!rst_n) start3 |-> gen_ready);

  for (genvar k = 0; k < CODES_PER_GROUP; k++) begin : g_desc
    descrambler u_desc (
      .clk, .rst_n, .chip_en(chip && (frame_sync || start3)), .sym_first, .sym_last,
      .din, .ci(code_i[k]), .cq(code_q[k]), .energy(d_energy[k]), .e_valid(d_valid[k]));
  end

  vote_counter #(.E_W(D_E_W), .CNT_W(CNT_W)) u_votes (
    .clk, .rst_n, .clear(1'b0), .valid(d_valid[0] && !code_found), .energy(d_energy),
    .count(votes), .winner);

  code_decision #(.CNT_W(CNT_W)) u_dec (
    .clk, .rst_n, .clear(1'b0), .count(votes), .threshold(CNT_W'(THRESHOLD)),
    .code_found, .code_idx);

  assign long_code = {code_group, code_idx};
endmodule
