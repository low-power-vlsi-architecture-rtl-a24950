// image_compressor: lossy image compressor. 8x8 pixel blocks (row-major,
// unsigned 8 bit) go through the hyperanalytic wavelet transform (four
// floating-point 2-D lifting DWTs of the block and its Hilbert transforms),
// the quantizer (division by a position-dependent table and rounding) and the
// variable length encoder (zigzag scan, zero-run-length coding, per-block
// Huffman coding). Each pixel block yields four coefficient blocks (hR+, hR-,
// hI+, hI-), each coded as one Huffman block of the output bit stream.
// level (1..3) selects the number of DWT decomposition levels.
// Handshakes: pix_valid/pix_ready in, bit_valid/bit_ready out; bit_last marks
// the end of each coded coefficient block.
module image_compressor (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] level,
  input  logic       pix_valid,
  output logic       pix_ready,
  input  logic [7:0] pix,
  output logic       bit_valid,
  input  logic       bit_ready,
  output logic       bit_out,
  output logic       bit_last
);
  import hwt_pkg::*;
  logic       c_valid, c_ready, c_last;
  fp32_t      c_coef;
  logic [1:0] c_comp;
  logic [5:0] c_pos;
  logic       q_valid, q_ready, q_last;
  logic signed [7:0] q_val;

  hwt u_hwt (.clk, .rst_n, .level, .in_valid(pix_valid), .in_ready(pix_ready), .in_pix(pix),
             .out_valid(c_valid), .out_ready(c_ready), .out_coef(c_coef), .out_comp(c_comp),
             .out_pos(c_pos), .out_last(c_last));

  quantizer u_q (.clk, .rst_n, .in_valid(c_valid), .in_ready(c_ready), .in_coef(c_coef),
                 .in_pos(c_pos), .in_last(c_last), .out_valid(q_valid), .out_ready(q_ready),
                 .out_q(q_val), .out_last(q_last));

  vle u_vle (.clk, .rst_n, .in_valid(q_valid), .in_ready(q_ready), .in_q(q_val),
             .bit_valid, .bit_ready, .bit_out, .bit_last);
endmodule
