// tb_neuron_cell: one cell, playing neuron I of a 64-neuron ring. The
// testbench presents state bits in ring order (bit (I - s) mod 64 in basic
// cycle s) and keeps its own integer model of the coefficient row:
// clear, then several epochs of Widrow-Hoff presentations (potential and
// increment cycle, then update cycle), then relaxation cycles. It checks
// the potential, the increment flag on the OR chain, the new state and the
// change flag against the model, and that idle and load phases leave the
// coefficients alone. The model sums in the same order as the ring, since
// saturation makes the order matter.
module tb_neuron_cell;
  import fbnn_pkg::*;
  localparam int N = 64, I = 5, M = 256;
  logic clk = 0, rst_n = 0, run = 0, first = 0, last = 0, sigma = 0, cnv_in = 0;
  phase_e phase = PH_IDLE;
  logic cnv_out, new_state;
  logic signed [11:0] potential;
  int checks = 0, failures = 0, n_nonnull = 0, n_null = 0, n_change = 0, n_stable = 0, n_sat = 0;
  int J [N];
  int delta_m;

  neuron_cell dut (.*);
  always #5 clk = ~clk;
  initial begin #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int clip(int v, int bits);
    int hi = (1 << (bits - 1)) - 1, lo = -(1 << (bits - 1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  // Potential of the model in ring order, with 12-bit saturation.
  function automatic int pot(logic [N-1:0] v);
    int a = 0;
    for (int s = 0; s < N; s++) begin
      int j = (I - s + N) % N;
      int t = a + (v[j] ? J[j] : -J[j]);
      if (t != clip(t, 12)) n_sat++;
      a = clip(t, 12);
    end
    return a;
  endfunction

  // One updating cycle; returns what the chain showed on the last step.
  task automatic cycle(phase_e ph, logic [N-1:0] v, output logic chain, output logic st);
    for (int s = 0; s < N; s++) begin
      phase = ph; run = 1; first = (s == 0); last = (s == N - 1);
      sigma = v[(I - s + N) % N];
      #1 if (s == N - 1) begin chain = cnv_out; st = new_state; end
      @(posedge clk); #1;
    end
    run = 0; first = 0; last = 0; phase = PH_IDLE;
  endtask

  initial begin
    logic [N-1:0] protos [4];
    logic chain, st;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // random memory contents, then clear
    cycle(PH_CLEAR, '0, chain, st);
    foreach (J[j]) J[j] = 0;
    foreach (protos[k]) protos[k] = {$urandom, $urandom};
    for (int ep = 0; ep < 12; ep++) begin
      foreach (protos[k]) begin
        int h, e;
        h = pot(protos[k]);
        e = clip((protos[k][I] ? M : -M) - h, 12);
        delta_m = (e < 0) ? -((-e) / 64) : e / 64;
        cycle(PH_POT, protos[k], chain, st);
        checks += 2;
        if (int'(potential) != h) begin failures++; $display("pot %0d exp %0d", potential, h); end
        if (chain != (delta_m != 0)) begin failures++; $display("null flag %0b exp %0d", chain, delta_m); end
        if (delta_m != 0) n_nonnull++; else n_null++;
        // idle and load phases in between must not disturb the row
        repeat ($urandom % 3) @(posedge clk);
        cycle(PH_LOAD, {$urandom, $urandom}, chain, st);
        cycle(PH_UPD, protos[k], chain, st);
        foreach (J[j]) J[j] = clip(J[j] + (protos[k][j] ? delta_m : -delta_m), 9);
      end
    end
    // relaxation cycles on prototypes and random states
    for (int n = 0; n < 40; n++) begin
      logic [N-1:0] v; int h; logic ns;
      v = (n % 2) ? protos[n % 4] : {$urandom, $urandom};
      h = pot(v);
      ns = (h >= 0);
      cnv_in = (n % 7 == 3);
      cycle(PH_RELAX, v, chain, st);
      checks += 3;
      if (st != ns) begin failures++; $display("state %0b exp %0b (h=%0d)", st, ns, h); end
      if (chain != (cnv_in | (ns ^ v[I]))) begin failures++; $display("chain %0b", chain); end
      if (int'(potential) != h) failures++;
      if (!cnv_in) begin if (ns ^ v[I]) n_change++; else n_stable++; end
      cnv_in = 0;
    end
    checks++;
    if (n_nonnull == 0 || n_null == 0 || n_change == 0 || n_stable == 0) begin
      failures++; $display("coverage %0d %0d %0d %0d", n_nonnull, n_null, n_change, n_stable);
    end
    $display("null increments %0d, non-null %0d, saturations %0d", n_null, n_nonnull, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
