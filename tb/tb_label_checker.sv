// tb_label_checker: streams code words (label computed here by long
// division by x^6+x+1), code words with one or two flipped bits, and
// words with a random label through the checker, with gaps between steps,
// and compares `match` on the last bit and the registered `code_valid`.
module tb_label_checker;
  localparam int unsigned N = 64;
  logic clk = 0, rst_n = 0, step = 0, first = 0, last = 0, ser_in = 0, match, code_valid;
  int checks = 0, failures = 0, n_valid = 0, n_bad = 0;

  label_checker dut (.*);
  always #5 clk = ~clk;
  initial begin #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [5:0] label_of(logic [N-1:0] w);
    logic [N-1:0] v;
    v = {w[N-1:6], 6'b0};
    for (int k = N - 1; k >= 6; k--) if (v[k]) v ^= (64'b1000011 << (k - 6));
    return v[5:0];
  endfunction

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      logic [N-1:0] v; logic expect_ok; logic m;
      v = {$urandom, $urandom};
      v[5:0] = label_of(v);
      case (n % 4)
        0, 1: ;
        2: v[$urandom % N] ^= 1'b1;
        3: begin int a = $urandom % N, b = (a + 1 + $urandom % (N - 1)) % N; v[a] ^= 1; v[b] ^= 1; end
      endcase
      expect_ok = (v[5:0] == label_of(v));
      for (int s = N - 1; s >= 0; s--) begin
        while ($urandom % 3 == 0) @(posedge clk);
        #1 ser_in = v[s]; first = (s == N - 1); last = (s == 0); step = 1;
        #1 if (s == 0) m = match;
        @(posedge clk); #1 step = 0; first = 0; last = 0;
      end
      checks += 2;
      if (m !== expect_ok)          begin failures++; $display("match %0b exp %0b", m, expect_ok); end
      if (code_valid !== expect_ok) begin failures++; $display("valid %0b exp %0b", code_valid, expect_ok); end
      if (expect_ok) n_valid++; else n_bad++;
    end
    if (n_valid == 0 || n_bad == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
