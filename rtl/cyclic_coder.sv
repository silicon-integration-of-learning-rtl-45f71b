// cyclic_coder: serial systematic encoder of the cyclic code generated by
// g(x) = x^6 + x + 1, producing the label of a stored vector.
//
// `start` latches the information field, the upper N-6 bits of `word`, and
// clears the remainder register. Each following `step` emits one bit on
// `code_bit`: first the N-6 information bits, most significant first, then
// the 6 bits of the remainder of info(x)*x^6 divided by g(x), most
// significant first. While the information bits go out they are also shifted
// into a linear feedback shift register (one XOR per nonzero tap of g), so the
// label is ready as soon as the last information bit has left. A vector of
// N bits therefore takes N steps, which is one rotation of the state ring.
//
// The generator polynomial, the 6-bit label and its use as a tail on the
// information field follow the published design; the bit order and the
// placement of the label in the low bits are this design's choice.
module cyclic_coder #(
  parameter int unsigned N          = fbnn_pkg::N_NEURONS,
  parameter int unsigned LABEL_BITS = fbnn_pkg::LABEL_BITS,
  parameter logic [LABEL_BITS-1:0] POLY = fbnn_pkg::CODE_POLY,
  localparam int unsigned INFO_BITS = N - LABEL_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] word,
  input  logic         step,
  output logic         code_bit
);

  logic [INFO_BITS-1:0]  info_q;
  logic [LABEL_BITS-1:0] rem_q;
  logic [$clog2(N+1)-1:0] cnt_q;
  logic                  in_info, fb;

  assign in_info  = cnt_q < ($bits(cnt_q))'(INFO_BITS);
  assign code_bit = in_info ? info_q[INFO_BITS-1] : rem_q[LABEL_BITS-1];
  assign fb       = info_q[INFO_BITS-1] ^ rem_q[LABEL_BITS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      info_q <= '0;
      rem_q  <= '0;
      cnt_q  <= '0;
    end else if (start) begin
      info_q <= word[N-1:LABEL_BITS];
      rem_q  <= '0;
      cnt_q  <= '0;
    end else if (step) begin
      cnt_q <= cnt_q + 1'b1;
      if (in_info) begin
        info_q <= info_q << 1;
        rem_q  <= {rem_q[LABEL_BITS-2:0], 1'b0} ^ (fb ? POLY : '0);
      end else begin
        rem_q  <= rem_q << 1;
      end
    end
  end

endmodule
