// tb_synaptic_memory: checks the circular coefficient store against a
// queue model. Words are written through a full rotation, then rotated,
// rewritten in passing and held, and the head is compared every clock.
module tb_synaptic_memory;
  localparam int unsigned DEPTH = 64, WIDTH = 9;
  logic clk = 0, shift;
  logic [WIDTH-1:0] din, head;
  logic [WIDTH-1:0] model [$];
  int checks = 0, failures = 0;

  synaptic_memory dut (.*);

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("watchdog"); 
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic tick(input logic sh, input logic [WIDTH-1:0] d);
    shift = sh; din = d;
    @(posedge clk); #1;
    if (sh) begin void'(model.pop_front()); model.push_back(d); end
  endtask

  initial begin
    shift = 0; din = 0;
    // fill with known words: after DEPTH shifts the ring holds them in order
    for (int k = 0; k < DEPTH; k++) begin shift = 1; din = WIDTH'(k * 7 + 3); @(posedge clk); #1; end
    for (int k = 0; k < DEPTH; k++) model.push_back(WIDTH'(k * 7 + 3));
    for (int n = 0; n < 600; n++) begin
      logic sh; logic [WIDTH-1:0] d;
      if (head !== model[0]) begin failures++; $display("head %h exp %h", head, model[0]); end
      checks++;
      sh = ($urandom % 4) != 0;
      d  = ($urandom % 3 == 0) ? WIDTH'($urandom) : head;   // rotate or rewrite
      tick(sh, d);
    end
    // a full rotation with din = head returns the same alignment
    for (int k = 0; k < DEPTH; k++) begin
      if (head !== model[k]) failures++;
      checks++;
      shift = 1; din = head; @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
