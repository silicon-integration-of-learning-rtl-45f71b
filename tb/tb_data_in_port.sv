// tb_data_in_port: writes random 16-bit blocks under random active-low
// enables and compares the held word with a model.
module tb_data_in_port;
  localparam int unsigned N = 64;
  logic clk = 0, rst_n = 0;
  logic [3:0] wr_n = 4'hF;
  logic [N-1:0] din = '0, word, model = '0;
  int checks = 0, failures = 0;

  data_in_port dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      wr_n = 4'($urandom); din = {$urandom, $urandom};
      for (int b = 0; b < 4; b++) if (!wr_n[b]) model[b*16 +: 16] = din[b*16 +: 16];
      @(posedge clk); #1 checks++;
      if (word !== model) begin failures++; $display("word %h exp %h", word, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
