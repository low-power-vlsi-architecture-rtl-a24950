// zigzag_scanner: reorders each 8x8 block of quantized coefficients from
// row-major to zigzag order (DC first, then along anti-diagonals towards the
// highest frequency). A dual-port 128 x 8-bit memory is split into two
// 64-entry banks used in ping-pong fashion: one bank is written in raster
// order while the other is read, with an address counter translated by the
// zigzag look-up table. Bank roles swap after every block.
// Handshakes: in_valid/in_ready and out_valid/out_ready; in_ready drops only
// while both banks hold unread blocks. One coefficient per clock in each
// direction; a block leaves one block time after it arrives. out_last marks
// the 64th coefficient.
module zigzag_scanner (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic signed [7:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic signed [7:0] out_data,
  output logic             out_last
);
  // zigzag LUT: element i of the scan is raster address ZZ[6*i +: 6]
  function automatic logic [383:0] zz_table();
    logic [383:0] t;
    int i, r;
    t = '0;
    i = 0;
    for (int s = 0; s < 15; s++) begin
      if (s % 2 == 0) begin
        for (r = (s < 7 ? s : 7); r >= (s > 7 ? s - 7 : 0); r--) begin
          t[6*i +: 6] = 6'(r * 8 + (s - r)); i++;
        end
      end else begin
        for (r = (s > 7 ? s - 7 : 0); r <= (s < 7 ? s : 7); r++) begin
          t[6*i +: 6] = 6'(r * 8 + (s - r)); i++;
        end
      end
    end
    return t;
  endfunction
  localparam logic [383:0] ZZ = zz_table();

  logic [7:0] mem [128];
  logic [5:0] wa, ra;
  logic       wb, rb;
  logic [1:0] full;
  logic       rd_go;

  assign in_ready = !full[wb];
  assign rd_go    = full[rb] && (!out_valid || out_ready);

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[{wb, wa}] <= in_data;
    if (rd_go)                out_data <= mem[{rb, ZZ[6*ra +: 6]}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wa <= '0; ra <= '0; wb <= 1'b0; rb <= 1'b0; full <= '0;
      out_valid <= 1'b0; out_last <= 1'b0;
    end else begin
      logic [1:0] f;
      f = full;
      if (in_valid && in_ready) begin
        wa <= wa + 1'b1;
        if (wa == 6'd63) begin f[wb] = 1'b1; wb <= ~wb; end
      end
      if (rd_go) begin
        out_valid <= 1'b1;
        out_last  <= (ra == 6'd63);
        ra        <= ra + 1'b1;
        if (ra == 6'd63) begin f[rb] = 1'b0; rb <= ~rb; end
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
      full <= f;
    end
  end
endmodule
