// fbnn_pkg: constants, encodings and arithmetic helpers shared by the
// 64-neuron feedback network.
//
// The network size (64 neurons), the 9-bit synaptic coefficients (beta =
// log2(M)+1 with M = 256), the 12-bit neuron arithmetic and the label code
// generated by x^6+x+1 are the published figures of the design. The command
// codes on the 3-bit Cmd bus and the neuron phase encoding are this design's
// own choice; the command set itself is not published.
package fbnn_pkg;

  // Network and arithmetic sizes.
  localparam int unsigned N_NEURONS  = 64;   // fully connected binary neurons
  localparam int unsigned W_BITS     = 9;    // synaptic coefficient, sign included
  localparam int unsigned ACC_BITS   = 12;   // neuron arithmetic, sign included
  localparam int unsigned M_SCALE    = 256;  // J = M * C, beta = log2(M) + 1 = 9
  localparam int unsigned LABEL_BITS = 6;    // label produced by the cyclic code
  localparam logic [5:0]  CODE_POLY  = 6'b000011; // x^6 + x + 1 without the x^6 term
  localparam int unsigned IO_BLOCKS  = 4;    // 64 bits seen as four 16-bit blocks

  // Commands on Cmd[2:0], accepted with CmdReq.
  typedef enum logic [2:0] {
    CMD_NOP    = 3'd0,  // acknowledged, does nothing
    CMD_LOAD   = 3'd1,  // code the DATAin word and shift it into the state ring
    CMD_RELAX  = 3'd2,  // cold relaxation of the current state until stable
    CMD_ANNEAL = 3'd3,  // noisy iterations, then cold relaxation until stable
    CMD_LEARN  = 3'd4,  // one Widrow-Hoff presentation of the current state
    CMD_CLEAR  = 3'd5,  // zero every synaptic coefficient
    CMD_EPOCH  = 3'd6,  // start a new presentation epoch for EndLearn
    CMD_RECALL = 3'd7   // load, relax, and retry annealed while the label fails
  } cmd_e;

  // What every neuron does during the current updating cycle.
  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0,  // memories and accumulators hold
    PH_RELAX = 3'd1,  // accumulate potential, decide new state at the last step
    PH_POT   = 3'd2,  // learning cycle 1: potential, then increment
    PH_UPD   = 3'd3,  // learning cycle 2: add increment * sigma_j to each J_ij
    PH_CLEAR = 3'd4,  // write zero into every coefficient
    PH_LOAD  = 3'd5   // state ring is being filled; neurons rotate only
  } phase_e;

  // Two's complement addition clipped to the range of a WIDTH-bit result.
  function automatic logic signed [15:0] sat_clip(input logic signed [15:0] v,
                                                  input int unsigned width);
    logic signed [15:0] hi, lo;
    hi = 16'sd1 <<< (width - 1);
    hi = hi - 16'sd1;
    lo = -(16'sd1 <<< (width - 1));
    if (v > hi)      return hi;
    else if (v < lo) return lo;
    else             return v;
  endfunction

endpackage
