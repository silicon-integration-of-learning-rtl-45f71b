// neuron_cell: one elementary cell of the linear systolic network, holding
// row i of the synaptic matrix and doing all of neuron i's work locally.
//
// An updating cycle is N basic cycles (`run` pulses). In basic cycle s the
// state ring presents to this cell the state bit of neuron (i - s) mod N on
// `sigma`, and the synaptic ring presents the matching coefficient J[i][j]
// at its head; the two rotate in lock-step, so no coefficient is ever
// addressed. What the cell does depends on `phase`:
//  * PH_RELAX: potential = sum_j J[i][j]*sigma_j; on the last basic cycle
//    `new_state` is its sign and the cell flags a change against the state
//    it held at the start of the cycle (kept in a one-bit register).
//  * PH_POT: same sum on a prototype; on the last basic cycle the integer
//    Widrow-Hoff increment delta_i = (M*sigma_i - potential)/N is stored and
//    the cell flags a non-null increment.
//  * PH_UPD: J[i][j] += delta_i * sigma_j, written back into the ring as
//    each coefficient passes the head.
//  * PH_CLEAR: zeros are written into the ring for one rotation.
// The flags of all cells are ORed serially through `cnv_in`/`cnv_out`; the
// end of the chain is low when the whole network is stable. On the last
// basic cycle the cell puts the flag it is computing onto the chain
// combinationally, so the controller can decide without an extra clock;
// afterwards the registered flag is shown. The systolic organisation, the
// one-bit previous state, the serial OR and the increment test follow the
// published neuron; the exact per-cycle sequencing is this design's own.
module neuron_cell #(
  parameter int unsigned N        = fbnn_pkg::N_NEURONS,
  parameter int unsigned W_BITS   = fbnn_pkg::W_BITS,
  parameter int unsigned ACC_BITS = fbnn_pkg::ACC_BITS,
  parameter int unsigned M_SCALE  = fbnn_pkg::M_SCALE,
  localparam int unsigned D_BITS  = ACC_BITS - $clog2(N) + 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  fbnn_pkg::phase_e           phase,
  input  logic                       run,       // one basic cycle
  input  logic                       first,     // basic cycle 0 of the updating cycle
  input  logic                       last,      // basic cycle N-1
  input  logic                       sigma,     // state bit presented by the ring
  input  logic                       cnv_in,    // OR chain from the previous cell
  output logic                       cnv_out,   // OR chain to the next cell
  output logic                       new_state, // sign of the potential, valid on `last`
  output logic signed [ACC_BITS-1:0] potential  // accumulated potential (observation)
);
  import fbnn_pkg::*;

  logic signed [ACC_BITS-1:0] acc_q, acc_next;
  logic signed [D_BITS-1:0]   delta_q, delta_next;
  logic signed [W_BITS-1:0]   head, w_upd;
  logic [W_BITS-1:0]          mem_din;
  logic                       own_q, own, delta_zero, flag_q, flag_now, mem_shift;

  // Own state: sampled from the ring in basic cycle 0, when the ring is
  // aligned and presents this neuron's own bit.
  assign own = first ? sigma : own_q;

  neuron_alu #(
    .W_BITS(W_BITS), .ACC_BITS(ACC_BITS), .M_SCALE(M_SCALE), .LOG2N($clog2(N))
  ) u_alu (
    .acc_in    (first ? '0 : acc_q),
    .w         (head),
    .sigma_j   (sigma),
    .sigma_i   (own),
    .delta     (delta_q),
    .acc_next  (acc_next),
    .new_state (new_state),
    .delta_next(delta_next),
    .delta_zero(delta_zero),
    .w_upd     (w_upd)
  );

  assign mem_shift = run && (phase inside {PH_RELAX, PH_POT, PH_UPD, PH_CLEAR});

  always_comb begin
    unique case (phase)
      PH_UPD:   mem_din = w_upd;
      PH_CLEAR: mem_din = '0;
      default:  mem_din = head;
    endcase
  end

  synaptic_memory #(.DEPTH(N), .WIDTH(W_BITS)) u_mem (
    .clk  (clk),
    .shift(mem_shift),
    .din  (mem_din),
    .head (head)
  );

  always_comb begin
    flag_now = flag_q;
    if (run && last && phase == PH_RELAX) flag_now = new_state ^ own;
    if (run && last && phase == PH_POT)   flag_now = ~delta_zero;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q   <= '0;
      own_q   <= 1'b0;
      delta_q <= '0;
      flag_q  <= 1'b0;
    end else if (run) begin
      if (first) own_q <= sigma;
      if (phase inside {PH_RELAX, PH_POT}) acc_q <= acc_next;
      if (last && phase == PH_POT) delta_q <= delta_next;
      if (last && phase inside {PH_RELAX, PH_POT}) flag_q <= flag_now;
    end
  end

  assign cnv_out   = cnv_in | flag_now;
  assign potential = acc_q;

endmodule
