// data_out_port: the parallel output register of the chip, DATAout.
//
// `capture` copies the network state into a result register when a
// command finishes (the top feeds the value the state ring takes at that
// clock edge), so the host can read the result at its own pace while
// the network goes on. The result is presented in four 16-bit blocks, each
// enabled by its active-low read enable rd_n[b]. On the chip a disabled
// block is left at high impedance; here a disabled block drives zeros and
// `oe[b]` tells the pad whether to drive, so the module stays two-state and
// the pad cells are left to the implementation. The blocks and the
// enables follow the published pin list; the result register is this
// design's choice.
module data_out_port #(
  parameter int unsigned N      = fbnn_pkg::N_NEURONS,
  parameter int unsigned BLOCKS = fbnn_pkg::IO_BLOCKS,
  localparam int unsigned BW    = N / BLOCKS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              capture,
  input  logic [N-1:0]      state,
  input  logic [BLOCKS-1:0] rd_n,
  output logic [N-1:0]      dout,
  output logic [BLOCKS-1:0] oe
);

  logic [N-1:0] result_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       result_q <= '0;
    else if (capture) result_q <= state;
  end

  always_comb begin
    for (int unsigned b = 0; b < BLOCKS; b++) begin
      oe[b]             = !rd_n[b];
      dout[b*BW +: BW]  = rd_n[b] ? '0 : result_q[b*BW +: BW];
    end
  end

endmodule
