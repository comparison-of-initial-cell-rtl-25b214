// descrambler: one stage-3 descrambler. Removes one candidate scrambling code
// from the received chips and measures the CPICH symbol energy.
//
// Each chip is multiplied by the conjugate of the candidate code
// (ci + j*cq with ci, cq = +-1): I' = rI*ci + rQ*cq, Q' = rQ*ci - rI*cq.
// I' and Q' are integrated coherently over one 256-chip CPICH symbol (the
// pilot symbol is constant), then squared and added, which removes the
// carrier phase. With the right code the pilot adds up in phase; with a wrong
// one the sum stays near noise level. The descramblers follow the described
// stage 3; integrating over exactly one CPICH symbol per decision is this
// design's choice, as the integration length is not given.
//
// Interface: chip_en qualifies din/ci/cq; sym_first marks the first chip of a
// symbol (the integrator restarts), sym_last the last one. energy and
// e_valid (one-cycle pulse) follow one cycle after the sym_last chip.
module descrambler
  import csd_pkg::*;
#(
  parameter int unsigned W     = DATA_W,
  localparam int unsigned ACC_W = W + 2 + $clog2(SYM_LEN),
  localparam int unsigned E_W   = 2 * ACC_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              chip_en,
  input  logic              sym_first,
  input  logic              sym_last,
  input  iq_t               din,
  input  logic              ci,
  input  logic              cq,
  output logic [E_W-1:0]    energy,
  output logic              e_valid
);
  logic signed [W:0]       pi_i, pq_i, pi_q, pq_q;
  logic signed [ACC_W-1:0] yi, yq, acc_i, acc_q, nxt_i, nxt_q;
  logic signed [2*ACC_W-1:0] sq_i, sq_q;

  always_comb begin
    pi_i = ci ? -(W+1)'(din.i) : (W+1)'(din.i);   // rI * ci
    pq_i = cq ? -(W+1)'(din.q) : (W+1)'(din.q);   // rQ * cq
    pi_q = ci ? -(W+1)'(din.q) : (W+1)'(din.q);   // rQ * ci
    pq_q = cq ? -(W+1)'(din.i) : (W+1)'(din.i);   // rI * cq
    yi   = ACC_W'(pi_i) + ACC_W'(pq_i);
    yq   = ACC_W'(pi_q) - ACC_W'(pq_q);
    nxt_i = (sym_first ? '0 : acc_i) + yi;
    nxt_q = (sym_first ? '0 : acc_q) + yq;
    sq_i  = nxt_i * nxt_i;
    sq_q  = nxt_q * nxt_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_i   <= '0;
      acc_q   <= '0;
      energy  <= '0;
      e_valid <= 1'b0;
    end else begin
      e_valid <= chip_en && sym_last;
      if (chip_en) begin
        acc_i <= nxt_i;
        acc_q <= nxt_q;
        if (sym_last) energy <= E_W'(sq_i) + E_W'(sq_q);
      end
    end
  end
endmodule
