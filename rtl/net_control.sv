// net_control: the command sequencer of the network (CONTROL).
//
// Commands arrive on `cmd` with a four-phase handshake: the host raises
// `cmd_req`, the controller takes the command when it is idle and raises
// `cmd_ack`, which stays high until the host drops `cmd_req`. Every
// operation is a whole number of updating cycles of N basic cycles; a
// basic cycle is one clock here. In each basic cycle the controller pulses
// `run` and marks the first and last basic cycles of the updating cycle.
//
//  LOAD    one cycle: the DATAin word runs through the cyclic coder into
//          the state ring (information field plus its label).
//  RELAX   cold updating cycles until one leaves every neuron unchanged
//          (the OR chain `cnv` is low on its last basic cycle); that extra
//          cycle also streams the attractor past the label checker, whose
//          verdict becomes CODEvalid. Bounded by MAX_ITER cycles; hitting
//          the bound sets `timeout` and clears CODEvalid.
//  ANNEAL  ANNEAL_ITERS updating cycles with the random generator enabled,
//          then cold cycles as for RELAX.
//  LEARN   two cycles: potentials and increments, then coefficient update.
//          If every increment was null the presentation counts as stable;
//          `end_learn` is high when all presentations since the last EPOCH
//          were stable (and there was at least one).
//  CLEAR   one cycle writing zeros into all synaptic memories.
//  EPOCH   no cycle; starts a new epoch for `end_learn`.
//  RECALL  LOAD, then RELAX; while the label check fails and fewer than
//          MAX_RETRY retries were made, LOAD the same DATAin word again and
//          ANNEAL. The self-identification thus triggers annealing without
//          the host.
// `net_ready` rises when a relaxation ends and falls when a new command
// that uses the network is taken. `capture` asks the output register to
// copy the state when LOAD, a relaxation or LEARN ends.
//
// The command signals, the network-ready, end-of-learning and CODEvalid
// outputs, the two learning cycles, the extra convergence cycle and up to
// three annealed retries triggered by the label check follow the published
// design. The command codes, the epoch rule for end of learning, the bound
// on relaxation cycles and the fixed number of noisy cycles are this
// design's own choices.
module net_control #(
  parameter int unsigned N            = fbnn_pkg::N_NEURONS,
  parameter int unsigned MAX_ITER     = 32,
  parameter int unsigned ANNEAL_ITERS = 4,
  parameter int unsigned MAX_RETRY    = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  // host command port
  input  logic [2:0]       cmd,
  input  logic             cmd_req,
  output logic             cmd_ack,
  // network status
  input  logic             cnv,          // serial OR of the neuron flags
  input  logic             label_match,  // label checker, valid on the last basic cycle
  // sequencing of the datapath
  output fbnn_pkg::phase_e phase,
  output logic             run,
  output logic             first,
  output logic             last,
  output logic             ring_shift,
  output logic             ring_sel_code,
  output logic             ring_commit,
  output logic             coder_start,
  output logic             noise_en,
  output logic             check_step,
  output logic             capture,
  // chip outputs
  output logic             net_ready,
  output logic             end_learn,
  output logic             code_valid,
  output logic             busy,
  output logic             timeout,
  output logic [1:0]       retries
);
  import fbnn_pkg::*;

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_RELAX, S_POT, S_UPD, S_CLEAR
  } state_e;

  state_e                  st_q;
  logic [$clog2(N)-1:0]    step_q;
  logic [$clog2(MAX_ITER+1)-1:0]     iter_q;
  logic [$clog2(ANNEAL_ITERS+1)-1:0] noisy_q;
  logic [1:0]              retry_q;
  logic                    auto_q, all_null_q, epoch_ok_q, epoch_used_q;
  logic                    accept, relax_end, relax_fail, do_retry;
  cmd_e                    cmd_in;

  assign cmd_in = cmd_e'(cmd);
  assign accept = (st_q == S_IDLE) && cmd_req && !cmd_ack;
  assign run    = (st_q != S_IDLE);
  assign first  = run && (step_q == '0);
  assign last   = run && (step_q == $clog2(N)'(N - 1));
  assign busy   = run;

  always_comb begin
    unique case (st_q)
      S_LOAD:  phase = PH_LOAD;
      S_RELAX: phase = PH_RELAX;
      S_POT:   phase = PH_POT;
      S_UPD:   phase = PH_UPD;
      S_CLEAR: phase = PH_CLEAR;
      default: phase = PH_IDLE;
    endcase
  end

  assign ring_shift    = st_q inside {S_LOAD, S_RELAX, S_POT, S_UPD};
  assign ring_sel_code = (st_q == S_LOAD);
  assign ring_commit   = (st_q == S_RELAX) && last;
  assign noise_en      = (st_q == S_RELAX) && (noisy_q != '0);
  assign check_step    = (st_q == S_RELAX);

  // End of a cold relaxation: stable, or out of cycles.
  assign relax_end  = (st_q == S_RELAX) && last && (noisy_q == '0) &&
                      (!cnv || iter_q == $bits(iter_q)'(MAX_ITER - 1));
  assign relax_fail = cnv || !label_match;
  assign do_retry   = relax_end && auto_q && relax_fail && (retry_q < 2'(MAX_RETRY));

  assign coder_start = (accept && cmd_in inside {CMD_LOAD, CMD_RECALL}) || do_retry;
  assign capture     = ((st_q == S_LOAD) && last && !auto_q) ||
                       (relax_end && !do_retry) || ((st_q == S_UPD) && last);
  assign end_learn   = epoch_ok_q && epoch_used_q;
  assign retries     = retry_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q         <= S_IDLE;
      step_q       <= '0;
      iter_q       <= '0;
      noisy_q      <= '0;
      retry_q      <= '0;
      auto_q       <= 1'b0;
      all_null_q   <= 1'b0;
      epoch_ok_q   <= 1'b0;
      epoch_used_q <= 1'b0;
      cmd_ack      <= 1'b0;
      net_ready    <= 1'b0;
      code_valid   <= 1'b0;
      timeout      <= 1'b0;
    end else begin
      cmd_ack <= cmd_req && (cmd_ack || accept);
      if (run) step_q <= step_q + 1'b1;

      if (accept) begin
        step_q <= '0;
        iter_q <= '0;
        if (!(cmd_in inside {CMD_NOP, CMD_EPOCH})) net_ready <= 1'b0;
        unique case (cmd_in)
          CMD_LOAD:   begin st_q <= S_LOAD;  auto_q <= 1'b0; end
          CMD_RELAX:  begin st_q <= S_RELAX; noisy_q <= '0; end
          CMD_ANNEAL: begin st_q <= S_RELAX; noisy_q <= $bits(noisy_q)'(ANNEAL_ITERS); end
          CMD_LEARN:  st_q <= S_POT;
          CMD_CLEAR:  st_q <= S_CLEAR;
          CMD_EPOCH:  begin epoch_ok_q <= 1'b1; epoch_used_q <= 1'b0; end
          CMD_RECALL: begin st_q <= S_LOAD; auto_q <= 1'b1; retry_q <= '0; end
          default:    ;
        endcase
        if (cmd_in inside {CMD_RELAX, CMD_ANNEAL, CMD_RECALL}) timeout <= 1'b0;
      end

      if (last) begin
        unique case (st_q)
          S_LOAD: begin
            if (auto_q) begin
              st_q    <= S_RELAX;
              iter_q  <= '0;
              timeout <= 1'b0;
              noisy_q <= (retry_q == '0) ? '0 : $bits(noisy_q)'(ANNEAL_ITERS);
            end else begin
              st_q <= S_IDLE;
            end
          end
          S_RELAX: begin
            if (noisy_q != '0) begin
              noisy_q <= noisy_q - 1'b1;
            end else if (relax_end) begin
              code_valid <= !relax_fail;
              timeout    <= cnv;
              if (do_retry) begin
                st_q    <= S_LOAD;
                retry_q <= retry_q + 1'b1;
              end else begin
                st_q      <= S_IDLE;
                auto_q    <= 1'b0;
                net_ready <= 1'b1;
              end
            end else begin
              iter_q <= iter_q + 1'b1;
            end
          end
          S_POT: begin
            all_null_q <= !cnv;
            st_q       <= S_UPD;
          end
          S_UPD: begin
            epoch_ok_q   <= epoch_ok_q && all_null_q;
            epoch_used_q <= 1'b1;
            st_q         <= S_IDLE;
          end
          S_CLEAR: st_q <= S_IDLE;
          default: ;
        endcase
      end
    end
  end

  // Handshake rule: a command is only taken while idle, so the sequencer
  // is never restarted in the middle of an updating cycle.
  always_ff @(posedge clk) begin
    if (accept) assert (st_q == S_IDLE && !cmd_ack);
    if (run)    assert (!accept);
  end

endmodule
