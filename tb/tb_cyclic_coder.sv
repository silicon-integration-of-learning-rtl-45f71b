// tb_cyclic_coder: the serial output of the coder over one 64-step vector
// must be the 58 information bits followed by the remainder of
// info(x)*x^6 modulo x^6+x+1, computed here by long division on a 64-bit
// word. Steps are given with random gaps.
module tb_cyclic_coder;
  localparam int unsigned N = 64;
  logic clk = 0, rst_n = 0, start = 0, step = 0, code_bit;
  logic [N-1:0] word;
  int checks = 0, failures = 0;

  cyclic_coder dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [N-1:0] encode(logic [N-1:0] w);
    logic [N-1:0] v;
    v = {w[N-1:6], 6'b0};
    for (int k = N - 1; k >= 6; k--) if (v[k]) v ^= (64'b1000011 << (k - 6));
    return {w[N-1:6], v[5:0]};
  endfunction

  initial begin
    word = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic [N-1:0] exp_v, got;
      word = {$urandom, $urandom};
      if (n == 0) word = '0;
      if (n == 1) word = 64'h40;       // single information bit at the end
      exp_v = encode(word);
      start = 1; @(posedge clk); #1 start = 0;
      word = {$urandom, $urandom};     // the coder must have latched the word
      for (int s = N - 1; s >= 0; s--) begin
        while ($urandom % 4 == 0) @(posedge clk);
        #1 got[s] = code_bit; step = 1; @(posedge clk); #1 step = 0;
      end
      checks++;
      if (got !== exp_v) begin failures++; $display("got %h exp %h", got, exp_v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
