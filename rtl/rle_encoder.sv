// rle_encoder: run-length encoder for zigzag-ordered coefficients that counts
// the zeros between non-zero coefficients rather than repeats of any value.
// A non-zero coefficient is passed on as it is. A run of k zeros followed by
// a non-zero coefficient becomes the byte pair 0, k-1 (so 0 0 0 -> 0 2 and a
// single 0 -> 0 0). Coding stops at the last non-zero coefficient of the
// block: any trailing run is replaced by the end-of-block pair 0, 0xFF.
// A decoder knows a block ends after 64 coefficients or at this pair.
// out_last marks the final byte of each block.
// Handshakes: valid/ready on both sides. Up to three bytes can follow one
// input, so the input is held off while they are sent (one byte per clock).
module rle_encoder (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic signed [7:0] in_data,
  input  logic             in_last,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [7:0]       out_data,
  output logic             out_last
);
  localparam logic [7:0] EOB = 8'hff;

  logic [7:0] q_data [3];
  logic       q_last [3];
  logic [1:0] qn;          // bytes waiting
  logic [6:0] zc;          // zeros counted in the current run
  logic       pop;

  assign out_valid = (qn != 2'd0);
  assign out_data  = q_data[0];
  assign out_last  = q_last[0];
  assign pop       = out_valid && out_ready;
  assign in_ready  = (qn == 2'd0) || (qn == 2'd1 && pop);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qn <= '0; zc <= '0;
      for (int i = 0; i < 3; i++) begin q_data[i] <= '0; q_last[i] <= 1'b0; end
    end else begin
      if (in_valid && in_ready) begin
        // the queue is empty after this clock's pop, so load it from slot 0
        if (in_data == 8'sd0) begin
          if (in_last) begin
            q_data[0] <= 8'd0; q_last[0] <= 1'b0;
            q_data[1] <= EOB;  q_last[1] <= 1'b1;
            qn <= 2'd2; zc <= '0;
          end else begin
            zc <= zc + 1'b1;
            qn <= '0;
          end
        end else if (zc != 7'd0) begin
          q_data[0] <= 8'd0;             q_last[0] <= 1'b0;
          q_data[1] <= 8'(zc - 7'd1);    q_last[1] <= 1'b0;
          q_data[2] <= in_data;          q_last[2] <= in_last;
          qn <= 2'd3; zc <= '0;
        end else begin
          q_data[0] <= in_data;          q_last[0] <= in_last;
          qn <= 2'd1;
        end
      end else if (pop) begin
        q_data[0] <= q_data[1]; q_last[0] <= q_last[1];
        q_data[1] <= q_data[2]; q_last[1] <= q_last[2];
        qn <= qn - 1'b1;
      end
    end
  end
endmodule
