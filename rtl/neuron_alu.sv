// neuron_alu: the arithmetic of one neuron, purely combinational.
//
// Three operations share the unit, all in saturating two's complement:
//  * multiply-accumulate: acc_next = sat12(acc_in +/- w), adding the
//    coefficient when the presented state bit is +1 and subtracting it
//    when it is -1 (states are binary, so the product is a sign change);
//    new_state is the sign of acc_next (1 = +1, a zero potential gives +1);
//  * Widrow-Hoff increment in integers: e = sat12(M*sigma_i - acc_next) and
//    delta = e / N truncated toward zero, N being a power of two;
//    delta_zero tells that the six most significant bits of |e| are all
//    zero, i.e. that the increment of this neuron is null;
//  * coefficient update: w_upd = sat9(w + delta * sigma_j).
// Overflow saturates instead of wrapping, as the published neuron does. The
// widths (9-bit coefficients, 12-bit arithmetic), M = 256 and the division
// by N come from the published design; the sign of a zero potential and
// truncation toward zero (a sign-magnitude reading of "integer part") are
// this design's choices.
module neuron_alu #(
  parameter int unsigned W_BITS   = fbnn_pkg::W_BITS,
  parameter int unsigned ACC_BITS = fbnn_pkg::ACC_BITS,
  parameter int unsigned M_SCALE  = fbnn_pkg::M_SCALE,
  parameter int unsigned LOG2N    = $clog2(fbnn_pkg::N_NEURONS),
  localparam int unsigned D_BITS  = ACC_BITS - LOG2N + 1
) (
  input  logic signed [ACC_BITS-1:0] acc_in,     // partial potential so far
  input  logic signed [W_BITS-1:0]   w,          // coefficient at the memory head
  input  logic                       sigma_j,    // state bit presented (1 = +1)
  input  logic                       sigma_i,    // own state bit, for the target
  input  logic signed [D_BITS-1:0]   delta,      // stored increment, for the update
  output logic signed [ACC_BITS-1:0] acc_next,
  output logic                       new_state,
  output logic signed [D_BITS-1:0]   delta_next,
  output logic                       delta_zero,
  output logic signed [W_BITS-1:0]   w_upd
);
  import fbnn_pkg::sat_clip;

  logic signed [15:0] w_ext, sum, target, err, step, wsum;
  logic        [15:0] err_mag, q_mag;

  always_comb begin
    w_ext     = 16'(w);
    sum       = sigma_j ? 16'(acc_in) + w_ext : 16'(acc_in) - w_ext;
    acc_next  = ACC_BITS'(sat_clip(sum, ACC_BITS));
    new_state = ~acc_next[ACC_BITS-1];

    target     = sigma_i ? 16'sd0 + 16'(M_SCALE) : 16'sd0 - 16'(M_SCALE);
    err        = sat_clip(target - 16'(acc_next), ACC_BITS);
    err_mag    = err[15] ? 16'(-err) : 16'(err);
    q_mag      = err_mag >> LOG2N;
    delta_zero = (q_mag == 16'd0);
    delta_next = err[15] ? D_BITS'(-$signed(q_mag)) : D_BITS'($signed(q_mag));

    step  = sigma_j ? 16'(delta) : -16'(delta);
    wsum  = w_ext + step;
    w_upd = W_BITS'(sat_clip(wsum, W_BITS));
  end

endmodule
