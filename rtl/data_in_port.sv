// data_in_port: the parallel input register of the chip, DATAin.
//
// The 64-bit input word is held in four 16-bit blocks. Block b takes
// din[16b+15:16b] on a rising clock edge while its active-low write enable
// wr_n[b] is low, so a 16-bit host bus (an MC68000 for instance) can fill
// the word in four writes with the same 16 data lines wired to every block,
// and a 64-bit host in one. The register keeps the last stimulus, which
// lets the controller reload it for a retry without help from the host.
// The four active-low enables and the 16-bit blocks follow the published
// pin list; clocking the input and resetting it to zero are this design's
// choices.
module data_in_port #(
  parameter int unsigned N      = fbnn_pkg::N_NEURONS,
  parameter int unsigned BLOCKS = fbnn_pkg::IO_BLOCKS,
  localparam int unsigned BW    = N / BLOCKS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [BLOCKS-1:0] wr_n,
  input  logic [N-1:0]      din,
  output logic [N-1:0]      word
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) word <= '0;
    else
      for (int unsigned b = 0; b < BLOCKS; b++)
        if (!wr_n[b]) word[b*BW +: BW] <= din[b*BW +: BW];
  end

endmodule
