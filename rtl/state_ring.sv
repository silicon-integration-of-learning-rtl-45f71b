// state_ring: the network state shift register, N bits closed on itself.
//
// Bit k of `state` is the state of neuron k (1 = +1, 0 = -1); stage N-1 is
// the output end of the ring (cell N1 of the chip floor plan) and stage 0
// the input end (cell N64). On every `shift` the vector moves one place
// toward the output end and the bit that leaves is fed back into stage 0,
// through an exclusive OR with the serial `noise_bit` of the random
// generator, unless `sel_code` selects the serial output of the cyclic coder
// instead (loading a new stimulus or prototype). After N shifts with no
// noise the ring is back where it started. `commit` overwrites the whole
// ring with the neurons' new states at the end of a relaxation cycle and
// takes priority over `shift`. `ser_out` is the bit about to leave, which is
// what the label checker reads. `state_next` is the value the ring takes
// at the next clock edge, for registers that must capture the ring in the
// same clock as its last change.
//
// The ring, the multiplexer in front of the input stage and the XOR on the
// recycling path follow the published floor plan; the parallel commit is
// this design's reading of how the parallel synchronous update reaches the
// ring.
module state_ring #(
  parameter int unsigned N = fbnn_pkg::N_NEURONS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         sel_code,   // 1: take code_bit, 0: recycle
  input  logic         code_bit,
  input  logic         noise_bit,
  input  logic         commit,
  input  logic [N-1:0] commit_vec,
  output logic [N-1:0] state,
  output logic         ser_out,
  output logic [N-1:0] state_next
);

  logic in_bit;

  assign ser_out = state[N-1];
  assign in_bit  = sel_code ? code_bit : (state[N-1] ^ noise_bit);

  always_comb begin
    if (commit)     state_next = commit_vec;
    else if (shift) state_next = {state[N-2:0], in_bit};
    else            state_next = state;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= '0;
    else        state <= state_next;
  end

endmodule
