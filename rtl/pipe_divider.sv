// pipe_divider: pipelined restoring divider, one quotient bit per stage and
// NW register stages (MSB first). Each stage shifts the next numerator bit
// into the partial remainder and subtracts the divisor when it fits. A tag
// travels with each operand pair. The whole pipeline advances when en is
// high (global stall). quo = num / den (den must be non-zero), latency NW
// enabled clocks.
module pipe_divider #(
  parameter int unsigned NW = 18,
  parameter int unsigned DW = 11,
  parameter int unsigned TW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          in_valid,
  input  logic [NW-1:0] in_num,
  input  logic [DW-1:0] in_den,
  input  logic [TW-1:0] in_tag,
  output logic          out_valid,
  output logic [NW-1:0] out_quo,
  output logic [TW-1:0] out_tag
);
  logic          v   [NW+1];
  logic [NW-1:0] num [NW+1];
  logic [NW-1:0] quo [NW+1];
  logic [DW:0]   rem [NW+1];
  logic [DW-1:0] den [NW+1];
  logic [TW-1:0] tag [NW+1];

  assign v[0]   = in_valid;
  assign num[0] = in_num;
  assign quo[0] = '0;
  assign rem[0] = '0;
  assign den[0] = in_den;
  assign tag[0] = in_tag;

  for (genvar i = 0; i < int'(NW); i++) begin : g_st
    logic [DW+1:0] trial;
    assign trial = {rem[i], num[i][NW-1-i]};
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v[i+1] <= 1'b0; num[i+1] <= '0; quo[i+1] <= '0; rem[i+1] <= '0;
        den[i+1] <= '0; tag[i+1] <= '0;
      end else if (en) begin
        v[i+1]   <= v[i];
        num[i+1] <= num[i];
        den[i+1] <= den[i];
        tag[i+1] <= tag[i];
        if (trial >= {2'b00, den[i]}) begin
          rem[i+1] <= (DW+1)'(trial - {2'b00, den[i]});
          quo[i+1] <= quo[i] | (NW'(1) << (NW-1-i));
        end else begin
          rem[i+1] <= trial[DW:0];
          quo[i+1] <= quo[i];
        end
      end
    end
  end

  assign out_valid = v[NW];
  assign out_quo   = quo[NW];
  assign out_tag   = tag[NW];
endmodule
