// hwt: hyperanalytic wavelet transform of one 8x8 pixel block.
// The HWT of an image is the 2-D DWT of its hypercomplex associate
// f + l Hx{f} + m Hy{f} + n Hx{Hy{f}}, so it is computed as four 2-D DWTs:
// on the block f, on its Hilbert transform along rows Hx{f}, along columns
// Hy{f}, and along both Hy{Hx{f}}. One 16-point Hilbert transform processor
// is shared by the 24 line transforms (8 rows of f, 8 columns of f, 8 columns
// of Hx{f}). Each 8-sample line is padded with 8 zeros and the first 8
// outputs are kept. The four DWT results are combined by two fused
// add-subtract units:
//   comp 0: hR+ = DWT{f} - DWT{HxHy f}     comp 1: hR- = DWT{f} + DWT{HxHy f}
//   comp 2: hI+ = DWT{Hx f} + DWT{Hy f}    comp 3: hI- = DWT{Hx f} - DWT{Hy f}
// Phases: LOAD takes 64 pixels (row-major, unsigned 8 bit) with valid/ready;
// HT streams 24 live frames plus flushing frames through the Hilbert
// processor (about 560 clocks); DWT runs the four 2-D DWTs in parallel for
// `level` levels; OUT delivers 4 x 64 fp32 coefficients (component-major,
// row-major position) with valid/ready, two clocks per coefficient.
module hwt
  import hwt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] level,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_pix,
  output logic       out_valid,
  input  logic       out_ready,
  output fp32_t      out_coef,
  output logic [1:0] out_comp,
  output logic [5:0] out_pos,
  output logic       out_last
);
  typedef enum logic [2:0] {S_LOAD, S_HT, S_START, S_DWT, S_OUT} st_t;
  st_t st;

  fp32_t      fbuf  [64];     // block f
  fp32_t      hxbuf [64];     // Hx{f}
  logic [5:0] la;

  // ---------------- Hilbert transform feeding and capture
  logic [4:0] fl, cl;         // frame being fed, frame being captured
  logic [3:0] fs, cs;
  logic       fr_live_q, fr_live;
  logic       hx_done;
  logic       d_in_valid, d_in_live, d_out_valid, d_out_live;
  fp32_t      d_in_x, d_out_y;

  assign hx_done = (cl >= 5'd8);

  always_comb begin
    logic [2:0] j;
    fr_live    = (fs == 4'd0) ? ((fl < 5'd24) && (fl < 5'd16 || hx_done)) : fr_live_q;
    d_in_valid = (st == S_HT);
    d_in_live  = fr_live;
    j          = fl[2:0];
    d_in_x     = FP_ZERO;
    if (fr_live && !fs[3]) begin
      unique case (fl[4:3])
        2'd0:    d_in_x = fbuf[{j, fs[2:0]}];     // row j of f
        2'd1:    d_in_x = fbuf[{fs[2:0], j}];     // column j of f
        default: d_in_x = hxbuf[{fs[2:0], j}];    // column j of Hx{f}
      endcase
    end
  end

  dht16 u_dht (.clk, .rst_n, .in_valid(d_in_valid), .in_live(d_in_live), .in_x(d_in_x),
               .out_valid(d_out_valid), .out_live(d_out_live), .out_y(d_out_y));

  // ---------------- four 2-D DWTs
  logic       ld_en   [4];
  logic [5:0] ld_addr [4];
  fp32_t      ld_data [4];
  logic       dw_busy [4];
  logic       dw_done [4];
  fp32_t      dw_q    [4];
  logic [3:0] done_seen;
  logic       dw_start;
  logic [7:0] oi;             // output index: component, position
  logic       oph;

  always_comb begin
    logic [2:0] j;
    j = cl[2:0];
    for (int k = 0; k < 4; k++) begin
      ld_en[k] = 1'b0; ld_addr[k] = '0; ld_data[k] = d_out_y;
    end
    ld_en[0]   = (st == S_LOAD) && in_valid;
    ld_addr[0] = la;
    ld_data[0] = u2f({16'd0, in_pix});
    if (st == S_HT && d_out_valid && d_out_live && !cs[3]) begin
      unique case (cl[4:3])
        2'd0:    begin ld_en[1] = 1'b1; ld_addr[1] = {j, cs[2:0]}; end
        2'd1:    begin ld_en[2] = 1'b1; ld_addr[2] = {cs[2:0], j}; end
        default: begin ld_en[3] = 1'b1; ld_addr[3] = {cs[2:0], j}; end
      endcase
    end
  end

  for (genvar k = 0; k < 4; k++) begin : g_dwt
    dwt2d u_dwt (.clk, .rst_n, .ld_en(ld_en[k]), .ld_addr(ld_addr[k]), .ld_data(ld_data[k]),
                 .start(dw_start), .level, .busy(dw_busy[k]), .done(dw_done[k]),
                 .rd_addr(oi[5:0]), .rd_data(dw_q[k]));
  end

  // ---------------- combination by fused add-subtract units
  fp32_t r_sum, r_dif, i_sum, i_dif;
  ffasu u_cr (.a(dw_q[0]), .b(dw_q[3]), .sum(r_sum), .diff(r_dif));
  ffasu u_ci (.a(dw_q[1]), .b(dw_q[2]), .sum(i_sum), .diff(i_dif));

  always_comb begin
    unique case (oi[7:6])
      2'd0:    out_coef = r_dif;
      2'd1:    out_coef = r_sum;
      2'd2:    out_coef = i_sum;
      default: out_coef = i_dif;
    endcase
  end
  assign out_comp  = oi[7:6];
  assign out_pos   = oi[5:0];
  assign out_valid = (st == S_OUT) && oph;
  assign out_last  = (oi == 8'hff);
  assign in_ready  = (st == S_LOAD);
  assign dw_start  = (st == S_START);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_LOAD; la <= '0;
      fl <= '0; fs <= '0; cl <= '0; cs <= '0; fr_live_q <= 1'b0;
      done_seen <= '0; oi <= '0; oph <= 1'b0;
      for (int i = 0; i < 64; i++) begin fbuf[i] <= FP_ZERO; hxbuf[i] <= FP_ZERO; end
    end else begin
      unique case (st)
        S_LOAD: if (in_valid) begin
          fbuf[la] <= u2f({16'd0, in_pix});
          la <= la + 1'b1;
          if (la == 6'd63) begin
            st <= S_HT; fl <= '0; cl <= '0; cs <= '0;  // fs keeps the processor's frame phase
          end
        end
        S_HT: begin
          // feed: one sample per clock; live frames and flushing frames
          fr_live_q <= fr_live;
          fs <= fs + 1'b1;
          if (fs == 4'd15 && fr_live) fl <= fl + 1'b1;
          // capture
          if (d_out_valid && d_out_live) begin
            if (cl < 5'd8 && !cs[3]) hxbuf[{cl[2:0], cs[2:0]}] <= d_out_y;
            cs <= cs + 1'b1;
            if (cs == 4'd15) begin
              cl <= cl + 1'b1;
              if (cl == 5'd23) st <= S_START;
            end
          end
        end
        S_START: begin st <= S_DWT; done_seen <= '0; end
        S_DWT: begin
          for (int k = 0; k < 4; k++) if (dw_done[k]) done_seen[k] <= 1'b1;
          if (done_seen == 4'hf) begin st <= S_OUT; oi <= '0; oph <= 1'b0; end
        end
        S_OUT: begin
          if (!oph) oph <= 1'b1;                 // read address settles
          else if (out_ready) begin
            oph <= 1'b0;
            oi  <= oi + 1'b1;
            if (oi == 8'hff) begin st <= S_LOAD; la <= '0; end
          end
        end
        default: st <= S_LOAD;
      endcase
    end
  end
endmodule
