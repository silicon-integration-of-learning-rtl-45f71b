// tb_state_ring: random mixes of serial load, recycling with and without
// noise, parallel commit and hold, against a bit-vector model; also checks
// that N recycling shifts without noise return the ring to its start.
module tb_state_ring;
  localparam int unsigned N = 64;
  logic clk = 0, rst_n = 0, shift = 0, sel_code = 0, code_bit = 0, noise_bit = 0, commit = 0;
  logic [N-1:0] commit_vec = '0, state, model;
  logic ser_out;
  logic [N-1:0] state_next;
  int checks = 0, failures = 0;

  state_ring dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    model = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      shift = 1'($urandom); sel_code = 1'($urandom); code_bit = 1'($urandom);
      noise_bit = ($urandom % 5 == 0); commit = ($urandom % 17 == 0);
      commit_vec = {$urandom, $urandom};
      #1 checks++;
      if (ser_out !== model[N-1]) failures++;
      if (commit) model = commit_vec;
      else if (shift) model = {model[N-2:0], sel_code ? code_bit : (model[N-1] ^ noise_bit)};
      checks++;
      if (state_next !== model) failures++;
      @(posedge clk); #1;
      checks++;
      if (state !== model) begin failures++; $display("state %h exp %h", state, model); end
    end
    begin
      logic [N-1:0] start;
      start = state;
      commit = 0; sel_code = 0; noise_bit = 0; shift = 1;
      repeat (N) @(posedge clk);
      #1 checks++;
      if (state !== start) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
