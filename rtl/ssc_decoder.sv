// ssc_decoder: stage-2 code group and slot number detector.
//
// Runs on the fast clock (five times the chip rate in the described design)
// and decodes one frozen 256-chip synchronisation burst before the next slot
// arrives. For each of the N_GROUPS code groups it loads the group's cyclic
// code word into the code registers of the I and Q matched filters, shifts the
// 256 buffered chips through matched filter 1 (one chip per cycle, one partial
// sum into shift register 2 every 16 chips), then rotates code register 2
// through the 15 slot hypotheses, one per cycle. Each hypothesis goes through
// the non-coherent detection block, and a comparator keeps the largest energy
// with its group and slot number (ties keep the earlier hypothesis).
// The fast clock and the one-burst decision follow the described design; the
// serial group-by-group schedule is this design's own.
//
// Timing: 1 + 256 + 1 + 15 = 273 cycles per group, 8736 for 32 groups; done
// rises 8739 cycles after the start edge. At five fast cycles per chip that is
// 1748 chips, less than the 2304 chips between the end of one burst and the
// start of the next slot.
//
// Interface: start (one cycle) begins a search of the buffer read through
// rd_addr/rd_data. done pulses with code_group, slot_id and best_energy valid
// and held until the next start.
module ssc_decoder
  import csd_pkg::*;
#(
  parameter int unsigned GROUPS = N_GROUPS,
  localparam int unsigned G_W   = $clog2(GROUPS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic [7:0]            rd_addr,
  input  iq_t                   rd_data,
  output logic [G_W-1:0]        code_group,
  output logic [SLOTID_W-1:0]   slot_id,
  output logic [ENERGY_W-1:0]   best_energy,
  output logic                  busy,
  output logic                  done
);
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_FILL, S_SUB, S_EVAL, S_FLUSH, S_DONE} state_t;
  state_t state;

  logic [G_W-1:0]       g;
  logic [7:0]           n;
  logic [SLOTID_W-1:0]  s;
  logic [15:0]          word;
  logic                 code_load, chip_en, sub_en, rot_en;
  logic signed [CORR_W-1:0] corr_i, corr_q;
  logic [ENERGY_W-1:0]  energy;
  logic                 e_valid;
  logic [G_W-1:0]       tag_g;
  logic [SLOTID_W-1:0]  tag_s;
  logic                 first_q;

  cyclic_code_rom u_rom (.addr(GROUP_W'(g)), .word(word));

  assign code_load = (state == S_LOAD);
  assign chip_en   = (state == S_FILL);
  assign sub_en    = (state == S_SUB) || (state == S_FILL && n[3:0] == 4'd0 && n != 8'd0);
  assign rot_en    = (state == S_EVAL);
  assign rd_addr   = n;
  assign busy      = (state != S_IDLE);

  ssc_matched_filter u_mf_i (
    .clk, .rst_n, .code_load, .code_word(word), .chip_en, .din(rd_data.i),
    .sub_en, .rot_en, .corr(corr_i));
  ssc_matched_filter u_mf_q (
    .clk, .rst_n, .code_load, .code_word(word), .chip_en, .din(rd_data.q),
    .sub_en, .rot_en, .corr(corr_q));

  noncoherent_detect #(.W(CORR_W)) u_ncd (
    .clk, .rst_n, .in_valid(rot_en), .i_in(corr_i), .q_in(corr_q),
    .energy, .out_valid(e_valid));

  // control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      g     <= '0;
      n     <= '0;
      s     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:  if (start) begin
                   g     <= '0;
                   state <= S_LOAD;
                 end
        S_LOAD:  begin
                   n     <= '0;
                   state <= S_FILL;
                 end
        S_FILL:  begin
                   n <= n + 1'b1;
                   if (n == 8'd255) state <= S_SUB;
                 end
        S_SUB:   begin
                   s     <= '0;
                   state <= S_EVAL;
                 end
        S_EVAL:  begin
                   s <= s + 1'b1;
                   if (s == SLOTID_W'(SLOTS_PER_FRAME - 1)) begin
                     if (g == G_W'(GROUPS - 1)) state <= S_FLUSH;
                     else begin
                       g     <= g + 1'b1;
                       state <= S_LOAD;
                     end
                   end
                 end
        S_FLUSH: state <= S_DONE;
        S_DONE:  begin
                   done  <= 1'b1;
                   state <= S_IDLE;
                 end
        default: state <= S_IDLE;
      endcase
    end
  end

  // comparator: hypothesis tags follow the one-cycle energy register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_g       <= '0;
      tag_s       <= '0;
      first_q     <= 1'b0;
      code_group  <= '0;
      slot_id     <= '0;
      best_energy <= '0;
    end else begin
      if (rot_en) begin
        tag_g   <= g;
        tag_s   <= s;
        first_q <= (g == '0) && (s == '0);
      end
      if (e_valid && (first_q || energy > best_energy)) begin
        best_energy <= energy;
        code_group  <= tag_g;
        slot_id     <= tag_s;
      end
    end
  end
endmodule
