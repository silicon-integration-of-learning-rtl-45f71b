// synaptic_memory: one neuron's synaptic coefficients, kept in a circular
// shift register of DEPTH words of WIDTH bits (64 x 9 bits by default).
//
// The coefficients are only ever read or written serially, one per basic
// cycle, so the store is a ring of words instead of an addressed RAM, as in
// the published neuron. Word 0 is the head: it is presented on `head` and
// leaves the ring on every `shift`, while `din` enters at the tail. Feeding
// `head` back into `din` simply rotates the ring; feeding a modified value
// rewrites the coefficient in passing. After DEPTH shifts the ring is back
// in its original alignment.
//
// Timing: `head` is a register output; `din` is taken on the rising clock
// edge while `shift` is high. There is no reset: the coefficients are
// cleared by writing zeros for one full rotation, which the neuron does on
// the clear command (the published chip clears the same way, serially, as
// its memory has no other access path).
module synaptic_memory #(
  parameter int unsigned DEPTH = fbnn_pkg::N_NEURONS,
  parameter int unsigned WIDTH = fbnn_pkg::W_BITS
) (
  input  logic             clk,
  input  logic             shift,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] head
);

  logic [WIDTH-1:0] words [DEPTH];

  always_ff @(posedge clk) begin
    if (shift) begin
      for (int unsigned k = 0; k < DEPTH - 1; k++) words[k] <= words[k+1];
      words[DEPTH-1] <= din;
    end
  end

  assign head = words[0];

endmodule
