// tb_workload_retrieval: the retrieval experiments of the pseudo-annealing
// table, run on two copies of the network driven in lock-step: one at its
// default parameters (64 neurons, 9-bit coefficients, two flipped states
// per annealed cycle) and one flipping four states (T_FLIPS = 4). Both
// learn the same prototypes the same way, so their matrices are equal and
// their cold relaxations identical; they differ only in the annealing.
//
// For p = 8, 16 and 24 random prototypes the matrix is cleared and learnt
// by epochs of Widrow-Hoff presentations until end_learn. Then, for each
// (p, Hi) pair of the table, TRIALS stimuli are made by flipping Hi random
// information bits of a random prototype (the chip recomputes the label
// of the stimulus, so the label field may differ from the prototype's in
// a few more bits). Each stimulus is relaxed cold (RELAX) and then recalled
// autonomously (RECALL: cold, then up to three annealed retries while the
// label check fails). The testbench reports the rate of exact retrieval
// for both, the identification error of the label check (CODEvalid high
// on a state that is not a prototype, or low on a prototype), and checks:
// learning ends, every relaxation ends stable, CODEvalid agrees with the
// label of the final state, a RECALL without retry gives the cold result,
// and RECALL never retrieves less often than cold relaxation in total.
module tb_workload_retrieval;
  import fbnn_pkg::*;
  localparam int N = 64, TRIALS = 100;

  logic clk = 0, rst_n = 0;
  logic [2:0] cmd = 0;
  logic cmd_req = 0;
  logic [3:0] wr_n = 4'hF, rd_n = 4'hF;
  logic [N-1:0] data_in = '0;
  // outputs of the two copies: index 0 flips 2 states, index 1 flips 4
  logic [1:0] cmd_ack, net_ready, end_learn, cv, busy, tmo;
  logic [3:0] data_out_oe [2];
  logic [N-1:0] data_out [2], state [2];
  logic [1:0] retries [2];
  logic code_valid, timeout;
  assign code_valid = cv[0];
  assign timeout    = tmo[0];

  for (genvar g = 0; g < 2; g++) begin : g_chip
    fbnn_chip #(.T_FLIPS(g == 0 ? 2 : 4)) dut (
      .clk, .rst_n, .cmd, .cmd_req, .cmd_ack(cmd_ack[g]), .wr_n, .data_in, .rd_n,
      .data_out(data_out[g]), .data_out_oe(data_out_oe[g]), .net_ready(net_ready[g]),
      .end_learn(end_learn[g]), .code_valid(cv[g]), .busy(busy[g]), .timeout(tmo[g]),
      .retries(retries[g]), .state(state[g]));
  end

  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin #2s; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [N-1:0] with_label(logic [N-1:0] w);
    logic [N-1:0] v;
    v = {w[N-1:6], 6'b0};
    for (int k = N - 1; k >= 6; k--) if (v[k]) v ^= (64'b1000011 << (k - 6));
    return {w[N-1:6], v[5:0]};
  endfunction

  function automatic logic [N-1:0] perturb(logic [N-1:0] v, int h);
    logic [N-1:0] r = v;
    int flipped = 0;
    while (flipped < h) begin
      int k = 6 + $urandom % (N - 6);
      if (r[k] == v[k]) begin r[k] = ~r[k]; flipped++; end
    end
    return r;
  endfunction

  task automatic issue(cmd_e c);
    cmd = c; cmd_req = 1;
    do begin @(posedge clk); #1; end while (cmd_ack != 2'b11);
    cmd_req = 0;
    @(posedge clk);
    while (busy != 0) @(posedge clk);
    #1;
  endtask

  task automatic put(logic [N-1:0] w);
    data_in = w; wr_n = 4'h0; @(posedge clk); #1 wr_n = 4'hF;
  endtask

  task automatic get(input int g, output logic [N-1:0] w);
    rd_n = 4'h0; #1 w = data_out[g]; rd_n = 4'hF;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int ps [3] = '{8, 16, 24};
    int his [3][2] = '{'{16, 20}, '{10, 14}, '{6, 6}};
    int nh [3] = '{2, 2, 1};
    int cold_total = 0, recall_total = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    foreach (ps[pi]) begin
      int p, epochs;
      logic [N-1:0] protos [$];
      p = ps[pi]; epochs = 0; protos.delete();
      issue(CMD_CLEAR);
      for (int k = 0; k < p; k++) protos.push_back(with_label({$urandom, $urandom}));
      do begin
        issue(CMD_EPOCH);
        foreach (protos[k]) begin put(protos[k]); issue(CMD_LOAD); issue(CMD_LEARN); end
        epochs++;
      end while (!end_learn && epochs < 200);
      check(end_learn == 2'b11, $sformatf("learning of %0d prototypes ended", p));
      $display("p = %0d: learning ended after %0d epochs (%0d presentations)", p, epochs, epochs * p);
      for (int hk = 0; hk < nh[pi]; hk++) begin
        int hi, cold_ok, rec_ok, rec4_ok, id_err, n_retry;
        hi = his[pi][hk]; cold_ok = 0; rec_ok = 0; rec4_ok = 0; id_err = 0; n_retry = 0;
        for (int t = 0; t < TRIALS; t++) begin
          logic [N-1:0] proto, stim, cold_v, cold4_v, rec_v, rec4_v;
          bit cold_is_proto, rec_is_proto;
          proto = protos[$urandom % p];
          stim  = with_label(perturb(proto, hi));
          put(stim);
          issue(CMD_LOAD); issue(CMD_RELAX);
          get(0, cold_v);
          get(1, cold4_v);
          check(cold4_v == cold_v, "both copies relax alike");
          check(!timeout, "cold relaxation ended stable");
          check(code_valid == (with_label(cold_v) == cold_v), "CODEvalid is the label check");
          cold_is_proto = 0;
          foreach (protos[k]) if (protos[k] == cold_v) cold_is_proto = 1;
          if (code_valid != cold_is_proto) id_err++;
          if (cold_v == proto) cold_ok++;
          issue(CMD_RECALL);
          get(0, rec_v);
          get(1, rec4_v);
          check(cv[1] == (with_label(rec4_v) == rec4_v), "RECALL CODEvalid is the label check (t = 4)");
          if (retries[1] == 0) check(rec4_v == cold_v, "RECALL without retry gives the cold result (t = 4)");
          if (rec4_v == proto) rec4_ok++;
          check(code_valid == (with_label(rec_v) == rec_v), "RECALL CODEvalid is the label check");
          if (retries[0] == 0) check(rec_v == cold_v, "RECALL without retry gives the cold result");
          else n_retry++;
          if (rec_v == proto) rec_ok++;
        end
        cold_total += cold_ok; recall_total += rec_ok;
        $display("p = %2d Hi = %2d: exact retrieval t = 0 %5.1f %%, t = 2 %5.1f %%, t = 4 %5.1f %%; %0d recalls retried (t = 2); label identification errors %5.1f %%",
                 p, hi, 100.0 * cold_ok / TRIALS, 100.0 * rec_ok / TRIALS, 100.0 * rec4_ok / TRIALS, n_retry, 100.0 * id_err / TRIALS);
      end
    end
    check(recall_total >= cold_total, "annealed retries do not lose retrievals overall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
