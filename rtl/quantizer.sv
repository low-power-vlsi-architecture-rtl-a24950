// quantizer: fq = round(f / Q(pos)) for each transform coefficient.
// A 64-entry ROM holds the quantization table (the standard JPEG luminance
// table), indexed by the coefficient's position in the 8x8 block. The fp32
// coefficient is first turned into a fixed-point magnitude with FRAC fraction
// bits (saturating at 2^(NW-FRAC-2)). Adding half the divisor makes the
// pipelined restoring divider's truncated quotient a rounded one (halves
// round away from zero). The result gets the coefficient's sign and is
// clipped to a signed 8-bit value for the zigzag buffer.
// Streaming with one coefficient per clock; the pipeline stalls as a whole
// when out_ready is low (in_ready = out_ready). Latency: NW + 2 clocks.
module quantizer
  import hwt_pkg::*;
#(
  parameter int unsigned FRAC = 4,
  parameter int unsigned NW   = 18
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  fp32_t            in_coef,
  input  logic [5:0]       in_pos,
  input  logic             in_last,
  output logic             out_valid,
  input  logic             out_ready,
  output logic signed [7:0] out_q,
  output logic             out_last
);
  localparam int unsigned DW = 7 + FRAC;
  localparam logic [7:0] QTAB [64] = '{
     8'd16,  8'd11,  8'd10,  8'd16,  8'd24,  8'd40,  8'd51,  8'd61,
     8'd12,  8'd12,  8'd14,  8'd19,  8'd26,  8'd58,  8'd60,  8'd55,
     8'd14,  8'd13,  8'd16,  8'd24,  8'd40,  8'd57,  8'd69,  8'd56,
     8'd14,  8'd17,  8'd22,  8'd29,  8'd51,  8'd87,  8'd80,  8'd62,
     8'd18,  8'd22,  8'd37,  8'd56,  8'd68, 8'd109, 8'd103,  8'd77,
     8'd24,  8'd35,  8'd55,  8'd64,  8'd81, 8'd104, 8'd113,  8'd92,
     8'd49,  8'd64,  8'd78,  8'd87, 8'd103, 8'd121, 8'd120, 8'd101,
     8'd72,  8'd92,  8'd95,  8'd98, 8'd112, 8'd100, 8'd103,  8'd99};

  logic          en;
  logic          s_v, s_sign, s_last;
  logic [NW-1:0] s_num;
  logic [DW-1:0] s_den;
  logic          d_v;
  logic [NW-1:0] d_quo;
  logic [1:0]    d_tag;
  logic [NW-1:0] mag_fx;
  logic [DW-1:0] den;

  assign en       = out_ready;
  assign in_ready = out_ready;
  assign den      = DW'(QTAB[in_pos]) << FRAC;

  // |coef| * 2^FRAC, truncated, saturated to NW-1 bits
  always_comb begin
    int sh;
    logic [23:0] m;
    m  = {1'b1, in_coef[22:0]};
    sh = int'(in_coef[30:23]) - 150 + int'(FRAC);
    if (in_coef[30:23] == 8'd0)       mag_fx = '0;
    else if (sh < 0)                  mag_fx = (sh <= -24) ? '0 : NW'(m >> (-sh));
    else if (sh + 24 > int'(NW) - 1)  mag_fx = {1'b0, {(NW-1){1'b1}}};
    else                              mag_fx = NW'(m) << sh;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_v <= 1'b0; s_sign <= 1'b0; s_last <= 1'b0; s_num <= '0; s_den <= '0;
    end else if (en) begin
      s_v    <= in_valid;
      s_sign <= in_coef[31];
      s_last <= in_last;
      s_num  <= mag_fx + NW'(den >> 1);
      s_den  <= den;
    end
  end

  pipe_divider #(.NW(NW), .DW(DW), .TW(2)) u_div (
    .clk, .rst_n, .en, .in_valid(s_v), .in_num(s_num), .in_den(s_den),
    .in_tag({s_last, s_sign}), .out_valid(d_v), .out_quo(d_quo), .out_tag(d_tag));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_q <= '0; out_last <= 1'b0;
    end else if (en) begin
      logic [6:0] mag;
      mag       = (d_quo > NW'(127)) ? 7'd127 : d_quo[6:0];
      out_valid <= d_v;
      out_last  <= d_tag[1];
      out_q     <= d_tag[0] ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
    end
  end
endmodule
