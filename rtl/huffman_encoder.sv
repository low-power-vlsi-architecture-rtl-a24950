// huffman_encoder: builds a Huffman code for each block of RLE bytes and
// sends the block as a bit stream. It works in three parts, run one after
// another for each block:
//  * histogram: buffers the block's symbols and counts each distinct symbol
//    (content-addressed table of up to MAXSYM entries);
//  * sorting: odd-even transposition sort of the table by count, ascending
//    (one compare-exchange layer per clock);
//  * coder: repeatedly joins the two least frequent nodes into a new node,
//    using the sorted leaves and a second queue of joined nodes, which is
//    already in order. Codes are then handed down from the root, 0 to the
//    first child and 1 to the second, and the block is sent.
// Bit stream per block (MSB first): number of distinct symbols (8 bits); per
// symbol: symbol (8), code length (5), code; then the code of every buffered
// symbol in arrival order. out_last marks the final bit of a block.
// Handshakes: in_valid/in_ready (in_ready is high only while collecting;
// in_last ends the block), out_valid/out_ready, one bit per clock.
// Block time: n symbols, d distinct: n + d + 2d + header and data bits clocks.
module huffman_encoder #(
  parameter int unsigned MAXSYM = 128,   // distinct symbols and buffered symbols per block
  parameter int unsigned CLW    = 16     // longest code
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_sym,
  input  logic       in_last,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       out_bit,
  output logic       out_last
);
  localparam int unsigned IW = $clog2(MAXSYM);
  localparam logic [8:0]  WMAX = 9'h1ff;

  typedef enum logic [2:0] {H_CLEAR, H_HIST, H_SORT, H_BUILD, H_ASSIGN, H_HDR, H_DATA} st_t;
  st_t st;

  logic [7:0]     bsym  [MAXSYM];   // buffered block
  logic [7:0]     tsym  [MAXSYM];   // histogram / leaf table
  logic [8:0]     tcnt  [MAXSYM];
  logic [8:0]     iw    [MAXSYM];   // joined-node weights
  logic [IW:0]    ic0   [MAXSYM];   // children: {internal, index}
  logic [IW:0]    ic1   [MAXSYM];
  logic [CLW-1:0] icode [MAXSYM];
  logic [4:0]     ilen  [MAXSYM];
  logic [CLW-1:0] lcode [MAXSYM];
  logic [4:0]     llen  [MAXSYM];
  logic [IW:0]    nbuf, nsym, lp, ip, nn, k, hi, di;
  logic [1:0]     hk;
  logic [CLW-1:0] fv;
  logic [4:0]     fn;
  logic           flast;

  // ---------------- histogram look-up
  logic          hit;
  logic [IW-1:0] hidx;
  always_comb begin
    hit = 1'b0; hidx = '0;
    for (int i = 0; i < int'(MAXSYM); i++)
      if (!hit && (IW+1)'(i) < nsym && tsym[i] == in_sym) begin hit = 1'b1; hidx = IW'(i); end
  end

  // ---------------- data symbol look-up in the sorted table
  logic [IW-1:0] didx;
  logic [7:0]    dsym;
  assign dsym = bsym[di[IW-1:0]];
  always_comb begin
    didx = '0;
    for (int i = 0; i < int'(MAXSYM); i++)
      if ((IW+1)'(i) < nsym && tsym[i] == dsym) didx = IW'(i);
  end

  // ---------------- choice of the two lightest nodes
  logic [IW:0] pa, pb, lp2, ip2;
  logic [8:0]  wa, wb;
  always_comb begin
    lp2 = lp; ip2 = ip;
    if (lp2 < nsym && (ip2 >= nn || tcnt[lp2[IW-1:0]] <= iw[ip2[IW-1:0]])) begin
      pa = {1'b0, lp2[IW-1:0]}; wa = tcnt[lp2[IW-1:0]]; lp2 = lp2 + 1'b1;
    end else begin
      pa = {1'b1, ip2[IW-1:0]}; wa = iw[ip2[IW-1:0]]; ip2 = ip2 + 1'b1;
    end
    if (lp2 < nsym && (ip2 >= nn || tcnt[lp2[IW-1:0]] <= iw[ip2[IW-1:0]])) begin
      pb = {1'b0, lp2[IW-1:0]}; wb = tcnt[lp2[IW-1:0]]; lp2 = lp2 + 1'b1;
    end else begin
      pb = {1'b1, ip2[IW-1:0]}; wb = iw[ip2[IW-1:0]]; ip2 = ip2 + 1'b1;
    end
  end

  assign in_ready  = (st == H_HIST);
  assign out_valid = (st == H_HDR || st == H_DATA) && (fn != 5'd0);
  assign out_bit   = fv[$clog2(CLW)'(fn - 5'd1)];
  assign out_last  = (st == H_DATA) && flast && (fn == 5'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= H_CLEAR;
      nbuf <= '0; nsym <= '0; lp <= '0; ip <= '0; nn <= '0; k <= '0; hi <= '0; di <= '0;
      hk <= '0; fv <= '0; fn <= '0; flast <= 1'b0;
      for (int i = 0; i < int'(MAXSYM); i++) begin
        bsym[i] <= '0; tsym[i] <= '0; tcnt[i] <= WMAX; iw[i] <= '0; ic0[i] <= '0; ic1[i] <= '0;
        icode[i] <= '0; ilen[i] <= '0; lcode[i] <= '0; llen[i] <= '0;
      end
    end else begin
      unique case (st)
        H_CLEAR: begin
          for (int i = 0; i < int'(MAXSYM); i++) tcnt[i] <= WMAX;
          nbuf <= '0; nsym <= '0;
          st <= H_HIST;
        end
        // ---- histogram
        H_HIST: if (in_valid) begin
          bsym[nbuf[IW-1:0]] <= in_sym;
          nbuf <= nbuf + 1'b1;
          if (hit) tcnt[hidx] <= tcnt[hidx] + 1'b1;
          else begin
            tsym[nsym[IW-1:0]] <= in_sym;
            tcnt[nsym[IW-1:0]] <= 9'd1;
            nsym <= nsym + 1'b1;
          end
          if (in_last || nbuf == (IW+1)'(MAXSYM - 1)) begin st <= H_SORT; k <= '0; end
        end
        // ---- sorting: nsym layers of compare-exchange
        H_SORT: begin
          for (int i = 0; i + 1 < int'(MAXSYM); i++)
            if ((i % 2) == int'(k[0]) && tcnt[i] > tcnt[i+1]) begin
              tcnt[i] <= tcnt[i+1]; tcnt[i+1] <= tcnt[i];
              tsym[i] <= tsym[i+1]; tsym[i+1] <= tsym[i];
            end
          k <= k + 1'b1;
          if (k + 1'b1 >= nsym) begin
            st <= H_BUILD; lp <= '0; ip <= '0; nn <= '0;
          end
        end
        // ---- tree: join the two lightest nodes each clock
        H_BUILD: begin
          if (nsym == (IW+1)'(1)) begin
            llen[0] <= 5'd1; lcode[0] <= '0;
            st <= H_HDR; hi <= '0; hk <= '0; fv <= CLW'(nsym); fn <= 5'd8;
          end else begin
            iw[nn[IW-1:0]]  <= wa + wb;
            ic0[nn[IW-1:0]] <= pa;
            ic1[nn[IW-1:0]] <= pb;
            lp <= lp2; ip <= ip2;
            nn <= nn + 1'b1;
            if (nn + 1'b1 == nsym - 1'b1) begin
              st <= H_ASSIGN;
              k  <= nn;                           // root
              icode[nn[IW-1:0]] <= '0;
              ilen[nn[IW-1:0]]  <= '0;
            end
          end
        end
        // ---- codes from the root down
        H_ASSIGN: begin
          logic [IW:0] c0, c1;
          logic [CLW-1:0] pc;
          logic [4:0] pl;
          c0 = ic0[k[IW-1:0]]; c1 = ic1[k[IW-1:0]];
          pc = icode[k[IW-1:0]]; pl = ilen[k[IW-1:0]];
          if (c0[IW]) begin icode[c0[IW-1:0]] <= {pc[CLW-2:0], 1'b0}; ilen[c0[IW-1:0]] <= pl + 1'b1; end
          else        begin lcode[c0[IW-1:0]] <= {pc[CLW-2:0], 1'b0}; llen[c0[IW-1:0]] <= pl + 1'b1; end
          if (c1[IW]) begin icode[c1[IW-1:0]] <= {pc[CLW-2:0], 1'b1}; ilen[c1[IW-1:0]] <= pl + 1'b1; end
          else        begin lcode[c1[IW-1:0]] <= {pc[CLW-2:0], 1'b1}; llen[c1[IW-1:0]] <= pl + 1'b1; end
          if (k == '0) begin
            st <= H_HDR; hi <= '0; hk <= '0; fv <= CLW'(nsym); fn <= 5'd8;
          end
          k <= k - 1'b1;
        end
        // ---- header: count, then symbol / length / code per table entry
        H_HDR: begin
          if (fn != 5'd0) begin
            if (out_ready) fn <= fn - 1'b1;
          end else if (hi == nsym) begin
            st <= H_DATA; di <= '0; flast <= 1'b0;
          end else begin
            unique case (hk)
              2'd0: begin fv <= CLW'(tsym[hi[IW-1:0]]); fn <= 5'd8; hk <= 2'd1; end
              2'd1: begin fv <= CLW'(llen[hi[IW-1:0]]); fn <= 5'd5; hk <= 2'd2; end
              default: begin
                fv <= lcode[hi[IW-1:0]]; fn <= llen[hi[IW-1:0]]; hk <= 2'd0; hi <= hi + 1'b1;
              end
            endcase
          end
        end
        // ---- data: code of every buffered symbol
        H_DATA: begin
          if (fn != 5'd0) begin
            if (out_ready) begin
              fn <= fn - 1'b1;
              if (fn == 5'd1 && flast) st <= H_CLEAR;
            end
          end else begin
            fv    <= lcode[didx];
            fn    <= llen[didx];
            flast <= (di + 1'b1 == nbuf);
            di    <= di + 1'b1;
          end
        end
        default: st <= H_CLEAR;
      endcase
    end
  end
endmodule
