// tb_fbnn_chip: end-to-end test of the 64-neuron network at its default
// parameters, driven through the pins as a host would.
//
//  1. Clear the synaptic matrix, then teach P random prototypes (58 random
//     information bits each; the chip appends the label) with the
//     Widrow-Hoff rule, one epoch after another, until end_learn is high.
//     An integer model of the same rule, summing in ring order with the
//     same saturation, predicts which presentations have a null increment
//     and in which epoch learning ends; the chip must agree exactly.
//  2. Cold relaxation from noisy versions of the prototypes and from random
//     states: the final state (read through the 16-bit output blocks), the
//     number of updating cycles (from the clock count), net_ready and
//     CODEvalid must match the model.
//  3. RECALL (load, relax, annealed retries while the label fails) from
//     random and noisy states: the final state must be a fixed point of the
//     model, CODEvalid must equal the label check of that state, and a
//     retry count of 0 must give the cold result.
//  4. ANNEAL from noisy prototypes: at least four noisy cycles and one cold
//     one, ending on a fixed point with a consistent CODEvalid; the flips
//     must make at least one run end elsewhere than cold relaxation would.
// Each mechanism is counted (non-null and null increments, end of
// learning, convergence, prototype identified, spurious state identified,
// annealed retry, ANNEAL moving the result, success after an annealed
// retry, relaxation timeout, saturation in the model's sums); a mechanism
// that never occurs is a failure, except the last three, which are only
// reported (timeout and saturation are forced in the controller and ALU
// testbenches).
module tb_fbnn_chip;
  import fbnn_pkg::*;
  localparam int N = 64, M = 256, P = 8, MAX_ITER = 32, ANNEAL = 4;

  logic clk = 0, rst_n = 0;
  logic [2:0] cmd = 0;
  logic cmd_req = 0, cmd_ack;
  logic [3:0] wr_n = 4'hF, rd_n = 4'hF, data_out_oe;
  logic [N-1:0] data_in = '0, data_out, state;
  logic net_ready, end_learn, code_valid, busy, timeout;
  logic [1:0] retries;

  fbnn_chip dut (.*);

  int checks = 0, failures = 0;
  int c_nonnull = 0, c_null = 0, c_endlearn = 0, c_conv = 0, c_proto = 0, c_spur = 0;
  int c_retry = 0, c_retry_ok = 0, c_sat = 0, c_timeout = 0, c_anneal = 0, c_anneal_moved = 0;
  int J [N][N];
  logic [N-1:0] protos [P];
  int busy_clocks;

  always #5 clk = ~clk;
  always @(posedge clk) if (busy) busy_clocks++;
  initial begin #200ms; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // ---------------- reference model ----------------
  function automatic int clip(int v, int bits);
    int hi = (1 << (bits - 1)) - 1, lo = -(1 << (bits - 1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  function automatic logic [N-1:0] with_label(logic [N-1:0] w);
    logic [N-1:0] v;
    v = {w[N-1:6], 6'b0};
    for (int k = N - 1; k >= 6; k--) if (v[k]) v ^= (64'b1000011 << (k - 6));
    return {w[N-1:6], v[5:0]};
  endfunction

  function automatic int pot(int i, logic [N-1:0] v);
    int a = 0;
    for (int s = 0; s < N; s++) begin
      int j = (i - s + N) % N;
      int t = a + (v[j] ? J[i][j] : -J[i][j]);
      if (t != clip(t, 12)) c_sat++;
      a = clip(t, 12);
    end
    return a;
  endfunction

  function automatic logic [N-1:0] update(logic [N-1:0] v);
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) r[i] = (pot(i, v) >= 0);
    return r;
  endfunction

  // one Widrow-Hoff presentation; returns 1 if every increment was null
  function automatic bit learn(logic [N-1:0] v);
    int d [N];
    bit all_null = 1;
    for (int i = 0; i < N; i++) begin
      int e = clip((v[i] ? M : -M) - pot(i, v), 12);
      d[i] = (e < 0) ? -((-e) / 64) : e / 64;
      if (d[i] != 0) all_null = 0;
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) J[i][j] = clip(J[i][j] + (v[j] ? d[i] : -d[i]), 9);
    return all_null;
  endfunction

  // ---------------- host operations ----------------
  task automatic issue(cmd_e c);
    cmd = c; cmd_req = 1;
    busy_clocks = 0;
    do begin @(posedge clk); #1; end while (!cmd_ack);
    cmd_req = 0;
    @(posedge clk);
    while (busy) @(posedge clk);
    #1;
  endtask

  task automatic write_word(logic [N-1:0] w);
    if ($urandom % 2) begin            // 64-bit host: one write
      data_in = w; wr_n = 4'h0; @(posedge clk); #1 wr_n = 4'hF;
    end else begin                     // 16-bit host: four block writes
      for (int b = 0; b < 4; b++) begin
        data_in = {4{w[b*16 +: 16]}}; wr_n = ~(4'b1 << b); @(posedge clk); #1;
      end
      wr_n = 4'hF; data_in = '0;
    end
  endtask

  task automatic read_word(output logic [N-1:0] w);
    for (int b = 0; b < 4; b++) begin
      rd_n = ~(4'b1 << b); #1;
      w[b*16 +: 16] = data_out[b*16 +: 16];
      checks++;
      if (data_out_oe != ~rd_n) failures++;
    end
    rd_n = 4'hF;
  endtask

  task automatic expect_eq(string what, longint got, longint exp_v);
    checks++;
    if (got != exp_v) begin failures++; $display("%s = %h, expected %h", what, got, exp_v); end
  endtask

  function automatic logic [N-1:0] perturb(logic [N-1:0] v, int h);
    logic [N-1:0] r = v;
    int flipped = 0;
    while (flipped < h) begin
      int k = 6 + $urandom % (N - 6);
      if (r[k] == v[k]) begin r[k] = ~r[k]; flipped++; end
    end
    return r;
  endfunction

  // ---------------- test ----------------
  initial begin
    logic [N-1:0] w, v, nxt;
    int cycles, epoch;
    bit model_end;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    issue(CMD_CLEAR);
    expect_eq("clear clocks", busy_clocks, N);
    foreach (J[i, j]) J[i][j] = 0;
    foreach (protos[k]) protos[k] = with_label({$urandom, $urandom});

    // 1. learning
    model_end = 0;
    for (epoch = 0; epoch < 60 && !model_end; epoch++) begin
      issue(CMD_EPOCH);
      model_end = 1;
      foreach (protos[k]) begin
        bit nul;
        write_word(protos[k]);
        issue(CMD_LOAD);
        expect_eq("load clocks", busy_clocks, N);
        read_word(w);
        expect_eq("loaded vector carries the label", w, protos[k]);
        issue(CMD_LEARN);
        expect_eq("learn clocks", busy_clocks, 2 * N);
        nul = learn(protos[k]);
        if (nul) c_null++; else c_nonnull++;
        model_end &= nul;
        expect_eq("end_learn vs model", end_learn, model_end);
      end
      if (end_learn) c_endlearn++;
    end
    $display("learning of %0d prototypes ended after %0d epochs", P, epoch);
    expect_eq("learning ended", end_learn, 1);

    // 2. cold relaxation against the model
    for (int n = 0; n < 40; n++) begin
      logic [N-1:0] final_v; logic lbl_ok;
      v = (n % 4 == 3) ? with_label({$urandom, $urandom}) : with_label(perturb(protos[n % P], 2 + n % 9));
      write_word(v);
      issue(CMD_LOAD);
      issue(CMD_RELAX);
      cycles = 0;
      forever begin
        nxt = update(v); cycles++;
        if (nxt == v || cycles == MAX_ITER) break;
        v = nxt;
      end
      read_word(final_v);
      lbl_ok = (with_label(nxt) == nxt) && (nxt == v);
      expect_eq("relaxed state", final_v, nxt);
      expect_eq("relax clocks", busy_clocks, cycles * N);
      expect_eq("net_ready", net_ready, 1);
      expect_eq("code_valid", code_valid, lbl_ok);
      expect_eq("timeout", timeout, nxt != v);
      if (nxt == v) c_conv++;
      else c_timeout++;
      if (code_valid) c_proto++; else c_spur++;
    end

    // 3. autonomous recall with annealed retries
    for (int n = 0; n < 40; n++) begin
      logic [N-1:0] start_v, final_v, cold_v;
      start_v = (n % 2) ? with_label({$urandom, $urandom}) : with_label(perturb(protos[n % P], 10 + n % 12));
      // cold result of the model, for comparison when no retry was made
      v = start_v;
      for (int c = 0; c < MAX_ITER; c++) begin nxt = update(v); if (nxt == v) break; v = nxt; end
      cold_v = nxt;
      write_word(start_v);
      issue(CMD_RECALL);
      read_word(final_v);
      nxt = update(final_v);
      expect_eq("recall code_valid", code_valid, (nxt == final_v) && (with_label(final_v) == final_v));
      if (!timeout) expect_eq("recall ends on a fixed point", nxt, final_v);
      expect_eq("net_ready", net_ready, 1);
      if (retries == 0) begin
        expect_eq("cold recall", final_v, cold_v);
        expect_eq("cold recall identified", code_valid, 1);
      end else begin
        c_retry++;
        if (code_valid) c_retry_ok++;
        else expect_eq("retries exhausted", retries, 3);
      end
    end

    // 4. explicit ANNEAL command: noisy cycles, then cold cycles to a fixed point
    for (int n = 0; n < 20; n++) begin
      logic [N-1:0] start_v, final_v, cold_v;
      start_v = (n % 2) ? with_label({$urandom, $urandom}) : with_label(perturb(protos[n % P], 12 + n % 10));
      v = start_v;
      for (int c = 0; c < MAX_ITER; c++) begin nxt = update(v); if (nxt == v) break; v = nxt; end
      cold_v = nxt;
      write_word(start_v);
      issue(CMD_LOAD);
      issue(CMD_ANNEAL);
      read_word(final_v);
      checks++;
      if (busy_clocks < (ANNEAL + 1) * N || busy_clocks % N != 0) begin
        failures++; $display("anneal took %0d clocks", busy_clocks);
      end
      expect_eq("anneal ends on a fixed point", update(final_v), final_v);
      expect_eq("anneal code_valid", code_valid, with_label(final_v) == final_v);
      expect_eq("anneal net_ready", net_ready, 1);
      c_anneal++;
      if (final_v != cold_v) c_anneal_moved++;
    end

    $display("ANNEAL commands %0d, of which %0d ended elsewhere than cold relaxation", c_anneal, c_anneal_moved);
    $display("increments: %0d null / %0d non-null presentations; end of learning seen %0d", c_null, c_nonnull, c_endlearn);
    $display("relaxations converged %0d, timed out %0d; prototypes %0d, spurious %0d", c_conv, c_timeout, c_proto, c_spur);
    $display("recalls with annealed retries %0d (successful %0d); model saturations %0d", c_retry, c_retry_ok, c_sat);
    if (c_null == 0 || c_nonnull == 0 || c_endlearn == 0 || c_conv == 0 || c_proto == 0 || c_spur == 0 || c_retry == 0 || c_anneal_moved == 0) begin
      failures++; $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
