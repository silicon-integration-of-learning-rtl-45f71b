// tb_neuron_alu: random and corner-case vectors against an integer model of
// the saturating multiply-accumulate, the Widrow-Hoff increment (division
// by 64 truncated toward zero) and the saturating coefficient update.
module tb_neuron_alu;
  localparam int W = 9, A = 12, M = 256, L = 6, D = A - L + 1;
  logic signed [A-1:0] acc_in, acc_next;
  logic signed [W-1:0] w, w_upd;
  logic sigma_j, sigma_i, new_state, delta_zero;
  logic signed [D-1:0] delta, delta_next;
  int checks = 0, failures = 0, sat_acc = 0, sat_w = 0;

  neuron_alu dut (.*);

  function automatic int clip(int v, int bits);
    int hi = (1 << (bits - 1)) - 1, lo = -(1 << (bits - 1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  task automatic check(int a, int ww, bit sj, bit si, int d);
    int s, e, q, wu;
    acc_in = A'(a); w = W'(ww); sigma_j = sj; sigma_i = si; delta = D'(d);
    #1;
    s  = clip(a + (sj ? ww : -ww), A);
    if (a + (sj ? ww : -ww) != s) sat_acc++;
    e  = clip((si ? M : -M) - s, A);
    q  = (e < 0) ? -((-e) / 64) : e / 64;
    wu = clip(ww + (sj ? d : -d), W);
    if (ww + (sj ? d : -d) != wu) sat_w++;
    checks++;
    if (int'(acc_next) != s || new_state != (s >= 0) || int'(delta_next) != q ||
        delta_zero != (q == 0) || int'(w_upd) != wu) begin
      failures++;
      $display("FAIL a=%0d w=%0d sj=%0b si=%0b d=%0d: acc %0d/%0d st %0b dn %0d/%0d dz %0b wu %0d/%0d",
               a, ww, sj, si, d, acc_next, s, new_state, delta_next, q, delta_zero, w_upd, wu);
    end
  endtask

  initial begin
    check(2040, 200, 1, 1, 0);      // positive saturation of the accumulator
    check(-2040, 200, 0, 0, 0);     // negative saturation
    check(0, 0, 1, 1, 0);           // zero potential counts as +1
    check(256, 0, 1, 1, 5);         // converged: null increment
    check(-2048, 0, 1, 1, 32);      // error clipped to 2047
    check(250, 10, 1, 1, 32);       // coefficient saturation
    check(-250, -10, 0, 0, -32);
    check(255 - 63, 0, 1, 1, -1);   // error 63: just below one step
    check(255 - 64 + 1, 0, 0, 1, 1);
    for (int n = 0; n < 20000; n++)
      check(int'($signed(A'($urandom))), int'($signed(W'($urandom))), 1'($urandom), 1'($urandom),
            int'($urandom_range(0, 64)) - 32);
    if (sat_acc == 0 || sat_w == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
