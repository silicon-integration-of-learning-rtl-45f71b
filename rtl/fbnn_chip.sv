// fbnn_chip: a fully connected feedback network of N = 64 binary neurons
// with parallel synchronous dynamics, used as an associative memory, that
// learns its own synaptic matrix, tells whether it has relaxed onto a
// stored prototype, and can retry a failed recall with pseudo-annealing.
//
// Organisation (linear systolic): every neuron keeps its row of the
// synaptic matrix in its own circular shift register; the 64-bit network
// state circulates in a ring past all neurons, one bit per basic cycle, so
// after N basic cycles (one updating cycle) each neuron has summed
// J[i][j]*sigma_j over all j and the new states are committed together.
// Around the ring sit the DATAin register and the cyclic CODE generator
// (which fill the ring serially, appending a 6-bit label to 58 information
// bits), the RANDOM generator (XORed into the recycling path during
// annealing), the DECODE label checker (which reads the ring output and
// drives CODEvalid), the DATAout register and the CONTROL sequencer.
//
// Learning is the Widrow-Hoff rule in integers: per presentation of a
// prototype, one updating cycle computes each potential and the increment
// (M*sigma_i - potential)/N, the next adds increment*sigma_j to each J[i][j].
// A learning presentation is 2N clocks; a relaxation is N clocks per
// updating cycle, including the final cycle that finds nothing changed.
// A command costs one further clock to be accepted.
//
// Interface: see the port comments. Commands and their codes are in
// fbnn_pkg. The data ports are two-state: `data_out_oe` tells which 16-bit
// blocks the pads should drive. The block structure, widths, code and the
// pin functions follow the published chip; the clocking (one clock per
// basic cycle), command codes and the details listed in each block are
// this design's choices.
module fbnn_chip #(
  parameter int unsigned N            = fbnn_pkg::N_NEURONS,
  parameter int unsigned W_BITS       = fbnn_pkg::W_BITS,
  parameter int unsigned ACC_BITS     = fbnn_pkg::ACC_BITS,
  parameter int unsigned M_SCALE      = fbnn_pkg::M_SCALE,
  parameter int unsigned T_FLIPS      = 2,
  parameter int unsigned ANNEAL_ITERS = 4,
  parameter int unsigned MAX_ITER     = 32,
  parameter int unsigned MAX_RETRY    = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  // command port (Cmd, CmdReq, command accept)
  input  logic [2:0]          cmd,
  input  logic                cmd_req,
  output logic                cmd_ack,
  // data ports, four 16-bit blocks each, active-low enables
  input  logic [3:0]          wr_n,
  input  logic [N-1:0]        data_in,
  input  logic [3:0]          rd_n,
  output logic [N-1:0]        data_out,
  output logic [3:0]          data_out_oe,
  // status
  output logic                net_ready,   // a relaxation has ended
  output logic                end_learn,   // every increment null in this epoch
  output logic                code_valid,  // attractor label agrees: a prototype
  output logic                busy,
  output logic                timeout,     // last relaxation hit MAX_ITER
  output logic [1:0]          retries,     // annealed retries of the last RECALL
  output logic [N-1:0]        state        // network state ring (observation)
);
  import fbnn_pkg::*;

  phase_e       phase;
  logic         run, first, last, ring_shift, ring_sel_code, ring_commit;
  logic         coder_start, noise_en, check_step, capture;
  logic         code_bit, noise_bit, noise_ready, ser_out, label_match, label_valid;
  logic [N-1:0] in_word, new_states, state_next;
  logic [N:0]   chain;

  data_in_port #(.N(N)) u_din (
    .clk(clk), .rst_n(rst_n), .wr_n(wr_n), .din(data_in), .word(in_word)
  );

  cyclic_coder #(.N(N)) u_code (
    .clk(clk), .rst_n(rst_n), .start(coder_start), .word(in_word),
    .step(ring_sel_code && run), .code_bit(code_bit)
  );

  noise_gen #(.N(N), .T_FLIPS(T_FLIPS)) u_rand (
    .clk(clk), .rst_n(rst_n), .enable(noise_en), .load(noise_en && first),
    .step(noise_en), .noise_bit(noise_bit), .ready(noise_ready)
  );

  state_ring #(.N(N)) u_ring (
    .clk(clk), .rst_n(rst_n), .shift(ring_shift), .sel_code(ring_sel_code),
    .code_bit(code_bit), .noise_bit(noise_bit), .commit(ring_commit),
    .commit_vec(new_states), .state(state), .ser_out(ser_out),
    .state_next(state_next)
  );

  label_checker #(.N(N)) u_decode (
    .clk(clk), .rst_n(rst_n), .step(check_step), .first(first), .last(last),
    .ser_in(ser_out), .match(label_match), .code_valid(label_valid)
  );

  assign chain[0] = 1'b0;
  for (genvar i = 0; i < N; i++) begin : g_neuron
    neuron_cell #(
      .N(N), .W_BITS(W_BITS), .ACC_BITS(ACC_BITS), .M_SCALE(M_SCALE)
    ) u_cell (
      .clk(clk), .rst_n(rst_n), .phase(phase), .run(run), .first(first),
      .last(last), .sigma(state[i]), .cnv_in(chain[i]), .cnv_out(chain[i+1]),
      .new_state(new_states[i]), .potential()
    );
  end

  net_control #(
    .N(N), .MAX_ITER(MAX_ITER), .ANNEAL_ITERS(ANNEAL_ITERS), .MAX_RETRY(MAX_RETRY)
  ) u_ctrl (
    .clk(clk), .rst_n(rst_n), .cmd(cmd), .cmd_req(cmd_req), .cmd_ack(cmd_ack),
    .cnv(chain[N]), .label_match(label_match), .phase(phase), .run(run),
    .first(first), .last(last), .ring_shift(ring_shift),
    .ring_sel_code(ring_sel_code), .ring_commit(ring_commit),
    .coder_start(coder_start), .noise_en(noise_en), .check_step(check_step),
    .capture(capture), .net_ready(net_ready), .end_learn(end_learn),
    .code_valid(code_valid), .busy(busy), .timeout(timeout), .retries(retries)
  );

  data_out_port #(.N(N)) u_dout (
    .clk(clk), .rst_n(rst_n), .capture(capture), .state(state_next), .rd_n(rd_n),
    .dout(data_out), .oe(data_out_oe)
  );

endmodule
