// tb_data_out_port: captures random states and reads them back through
// random active-low block enables; disabled blocks must read as zero with
// their output enable low, and the result must hold between captures.
module tb_data_out_port;
  localparam int unsigned N = 64;
  logic clk = 0, rst_n = 0, capture = 0;
  logic [3:0] rd_n = 4'hF, oe;
  logic [N-1:0] state = '0, dout, model = '0, expect_v;
  int checks = 0, failures = 0;

  data_out_port dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      capture = ($urandom % 3 == 0); state = {$urandom, $urandom};
      if (capture) model = state;
      @(posedge clk); #1 capture = 0;
      rd_n = 4'($urandom); state = {$urandom, $urandom};
      #1;
      for (int b = 0; b < 4; b++) expect_v[b*16 +: 16] = rd_n[b] ? 16'h0 : model[b*16 +: 16];
      checks++;
      if (dout !== expect_v || oe !== ~rd_n) begin failures++; $display("dout %h exp %h", dout, expect_v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
