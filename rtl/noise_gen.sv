// noise_gen: the random generator of the pseudo-annealing mechanism. Once
// per updating cycle it delivers, serially, an N-bit string holding exactly
// T_FLIPS ones at random places; the string is XORed into the recycling
// path of the state ring, so T_FLIPS neuron states are perturbed per cycle.
//
// Two N-bit masks are kept. `mask_cur` is the string being emitted: its bit
// s is `noise_bit` in basic cycle s of the updating cycle. `mask_nxt` is
// filled in the background, one probe per clock: a candidate position is
// drawn from a 16-bit Galois LFSR; if that place is free it is set,
// otherwise the next place is tried (linear probing), until T_FLIPS places
// are set. The worst case is T_FLIPS*(T_FLIPS+1)/2 clocks, which the
// elaboration check keeps below one updating cycle, so a fresh mask is
// always complete when `load` swaps it in at the start of the next cycle
// (and at most N-1 clocks after reset or after the previous load).
// Positions are drawn among 0..N-2 only, since in the last basic cycle the
// ring is overwritten by the new states and a flip there would be lost.
//
// Interface: `load` (with `step`, on basic cycle 0) takes the new mask and
// emits its bit 0 at once; `step` alone emits the next bit; `enable` low
// forces the output to 0 without disturbing the masks. `ready` says that
// the background mask is complete.
//
// The fixed number of flips and the serial XOR follow the published
// mechanism; the LFSR, the probing scheme and the default T_FLIPS = 2 (the
// value the published experiments found sufficient) are this design's
// choices.
module noise_gen #(
  parameter int unsigned N       = fbnn_pkg::N_NEURONS,
  parameter int unsigned T_FLIPS = 2,
  parameter logic [15:0] SEED    = 16'hACE1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic load,
  input  logic step,
  output logic noise_bit,
  output logic ready
);

  localparam int unsigned PW = $clog2(N);

  if (T_FLIPS * (T_FLIPS + 1) / 2 > N - 1) begin : g_check
    $error("noise_gen: T_FLIPS too large to refill the mask within one updating cycle");
  end

  logic [15:0]           lfsr_q;
  logic [N-1:0]          mask_cur, mask_nxt;
  logic [PW-1:0]         cand_q, draw;
  logic [$clog2(T_FLIPS+1)-1:0] count_q;
  logic                  probe_free;

  // Draw among 0..N-2: the value N-1 folds onto 0.
  assign draw       = (lfsr_q[PW-1:0] >= PW'(N - 1)) ? '0 : lfsr_q[PW-1:0];
  assign probe_free = !mask_nxt[cand_q];
  assign ready      = (count_q == $bits(count_q)'(T_FLIPS));
  assign noise_bit  = enable && (load ? mask_nxt[0] : mask_cur[0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr_q   <= SEED;
      mask_cur <= '0;
      mask_nxt <= '0;
      cand_q   <= '0;
      count_q  <= '0;
    end else begin
      lfsr_q <= {1'b0, lfsr_q[15:1]} ^ (lfsr_q[0] ? 16'hB400 : 16'h0000);
      if (load) begin
        mask_cur <= step ? (mask_nxt >> 1) : mask_nxt;
        mask_nxt <= '0;
        count_q  <= '0;
        cand_q   <= draw;
      end else begin
        if (step) mask_cur <= mask_cur >> 1;
        if (count_q != $bits(count_q)'(T_FLIPS)) begin
          if (probe_free) begin
            mask_nxt[cand_q] <= 1'b1;
            count_q          <= count_q + 1'b1;
            cand_q           <= draw;
          end else begin
            cand_q <= (cand_q == PW'(N - 2)) ? '0 : cand_q + 1'b1;
          end
        end
      end
    end
  end

endmodule
