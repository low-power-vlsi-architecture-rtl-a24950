// vle: variable length encoder. Quantized coefficients (row-major, 64 per
// block, signed 8 bit) pass through the zigzag scanner, the zero-run-length
// encoder and the per-block Huffman coder; the result is a bit stream.
// Handshakes: valid/ready at both ends; bit_last marks the final bit of each
// coded block.
module vle (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic signed [7:0] in_q,
  output logic             bit_valid,
  input  logic             bit_ready,
  output logic             bit_out,
  output logic             bit_last
);
  logic             z_valid, z_ready, z_last;
  logic signed [7:0] z_data;
  logic             r_valid, r_ready, r_last;
  logic [7:0]       r_data;

  zigzag_scanner u_zz (.clk, .rst_n, .in_valid, .in_ready, .in_data(in_q),
                       .out_valid(z_valid), .out_ready(z_ready), .out_data(z_data), .out_last(z_last));
  rle_encoder u_rle (.clk, .rst_n, .in_valid(z_valid), .in_ready(z_ready), .in_data(z_data),
                     .in_last(z_last), .out_valid(r_valid), .out_ready(r_ready),
                     .out_data(r_data), .out_last(r_last));
  huffman_encoder u_huf (.clk, .rst_n, .in_valid(r_valid), .in_ready(r_ready), .in_sym(r_data),
                         .in_last(r_last), .out_valid(bit_valid), .out_ready(bit_ready),
                         .out_bit(bit_out), .out_last(bit_last));
endmodule
