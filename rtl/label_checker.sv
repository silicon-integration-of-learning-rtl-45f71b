// label_checker: tells whether the vector that streams past it is a code
// word, i.e. whether its label field is the cyclic code of its information
// field (g(x) = x^6 + x + 1).
//
// The checker reads the serial output of the state ring for one full
// rotation. `first` marks the first of the N bits. The N-6 information bits
// run through the same linear feedback shift register as in the coder; the
// 6 label bits that follow are compared one by one with the remainder as it
// is shifted out. `match` is combinational and, during the last of the N
// bits, already includes the comparison of that bit; `code_valid` holds the
// result of the last complete vector (updated by `last`). A relaxed state
// whose two fields agree is most likely one of the stored prototypes; one
// whose fields disagree is taken as a spurious attractor.
//
// The principle (recode the information field, compare with the label)
// follows the published design; the serial implementation during the
// convergence cycle is this design's choice.
module label_checker #(
  parameter int unsigned N          = fbnn_pkg::N_NEURONS,
  parameter int unsigned LABEL_BITS = fbnn_pkg::LABEL_BITS,
  parameter logic [LABEL_BITS-1:0] POLY = fbnn_pkg::CODE_POLY,
  localparam int unsigned INFO_BITS = N - LABEL_BITS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic step,
  input  logic first,
  input  logic last,
  input  logic ser_in,
  output logic match,
  output logic code_valid
);

  logic [LABEL_BITS-1:0]  rem_q, rem;
  logic [$clog2(N+1)-1:0] cnt_q, cnt;
  logic                   ok_q, ok, in_info, fb;

  // A vector restarts the register and the match on its first bit.
  assign rem     = first ? '0 : rem_q;
  assign cnt     = first ? '0 : cnt_q;
  assign ok      = first ? 1'b1 : ok_q;
  assign in_info = cnt < ($bits(cnt_q))'(INFO_BITS);
  assign fb      = ser_in ^ rem[LABEL_BITS-1];
  assign match   = ok && (in_info || ser_in == rem[LABEL_BITS-1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_q      <= '0;
      cnt_q      <= '0;
      ok_q       <= 1'b0;
      code_valid <= 1'b0;
    end else if (step) begin
      cnt_q <= cnt + 1'b1;
      ok_q  <= match;
      if (in_info) rem_q <= {rem[LABEL_BITS-2:0], 1'b0} ^ (fb ? POLY : '0);
      else         rem_q <= rem << 1;
      if (last) code_valid <= match;
    end
  end

endmodule
