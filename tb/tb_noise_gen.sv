// tb_noise_gen: over many updating cycles of 64 steps, the serial string
// must hold exactly T_FLIPS ones, never in the last position, and the
// strings must vary from cycle to cycle; with `enable` low the output
// must stay 0. Run for T_FLIPS = 2 (default) and 4.
module tb_noise_gen;
  localparam int unsigned N = 64;
  logic clk = 0, rst_n = 0;
  logic en2 = 0, ld2 = 0, st2 = 0, nb2, rdy2;
  logic en4 = 0, ld4 = 0, st4 = 0, nb4, rdy4;
  int checks = 0, failures = 0, distinct = 0;

  noise_gen                  dut2 (.clk, .rst_n, .enable(en2), .load(ld2), .step(st2), .noise_bit(nb2), .ready(rdy2));
  noise_gen #(.T_FLIPS(4))   dut4 (.clk, .rst_n, .enable(en4), .load(ld4), .step(st4), .noise_bit(nb4), .ready(rdy4));

  always #5 clk = ~clk;
  initial begin #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [N-1:0] s2, s4, prev2;
    prev2 = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    repeat (N) @(posedge clk); #1;
    for (int c = 0; c < 200; c++) begin
      bit en = (c % 10 != 9);
      checks += 2;
      if (!rdy2 || !rdy4) failures++;
      if (!rdy2 || !rdy4) failures++;
      for (int s = 0; s < N; s++) begin
        en2 = en; en4 = en; st2 = 1; st4 = 1; ld2 = (s == 0); ld4 = (s == 0);
        #1 s2[s] = nb2; s4[s] = nb4;
        @(posedge clk); #1;
      end
      checks += 3;
      if (en) begin
        if ($countones(s2) != 2 || $countones(s4) != 4) begin
          failures++; $display("cycle %0d: %h %h", c, s2, s4);
        end
        if (s2[N-1] || s4[N-1]) failures++;
        if (s2 != prev2) distinct++;
        prev2 = s2;
      end else if (s2 != 0 || s4 != 0) failures++;
    end
    checks++;
    if (distinct < 150) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
