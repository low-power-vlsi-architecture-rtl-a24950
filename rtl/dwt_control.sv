// dwt_control: finite-state controller of the 2-D DWT. On start it runs, for
// each decomposition level up to `level` (1..3, 0 counts as 1) on an S x S
// region (S = 8, 4, 2):
//   ROW   read pairs of every row from memory unit 1 (S/2 pair reads plus one
//         mirror request per line), results go to memory unit 2 (l to the left
//         half, h to the right half of the row);
//   XFER  copy the S x S region from memory unit 2 back to memory unit 1;
//   COL   the same along columns (l to the top half, h to the bottom half);
//   then, if another level follows, copy the S/2 x S/2 approximation (LL)
//   region to memory unit 1 and repeat with S/2.
// The sub-bands of all levels end up in memory unit 2. It generates all
// addresses, read/write strobes and the processor enable; write addresses
// follow the processor's output strobe. done pulses for one clock at the end.
module dwt_control (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [1:0] level,
  output logic       busy,
  output logic       done,
  // memory unit 1 pair reads
  output logic       m1_rd_en,
  output logic       m1_rd_mirror,
  output logic       m1_rd_emit,
  output logic       m1_rd_first,
  output logic [5:0] m1_addr_e,
  output logic [5:0] m1_addr_o,
  // transfer memory unit 2 -> memory unit 1
  output logic       xfer_rd,      // memory unit 2 read port is used internally
  output logic [5:0] xfer_rd_addr,
  output logic       xfer_wr_en,   // write memory unit 1 with memory unit 2 data
  output logic [5:0] xfer_wr_addr,
  // processor results -> memory unit 2
  input  logic       proc_valid,
  output logic       m2_we,
  output logic [5:0] m2_addr_l,
  output logic [5:0] m2_addr_h
);
  typedef enum logic [2:0] {IDLE, ROW, XFER, COL, XFER_LL, FINISH} state_t;
  state_t     st;
  logic [1:0] lvl, nlev;
  logic [3:0] sz;            // S
  logic [3:0] line;          // line being read
  logic [2:0] pn;            // pair index, S/2 = mirror request
  logic [5:0] xa;            // transfer counter
  logic [5:0] wcnt;          // results written in this pass
  logic [2:0] wl, wn;        // result line and index
  logic [3:0] half;
  logic [5:0] total;
  logic       col;

  assign half  = sz >> 1;
  assign total = 6'((int'(sz) * int'(sz)) / 2);
  assign col   = (st == COL);
  assign busy  = (st != IDLE);

  // pair addresses: even/odd sample of pair pn on line `line`
  always_comb begin
    logic [2:0] ie, io;
    ie = 3'(pn << 1);
    io = ie + 3'd1;
    m1_rd_en     = (st == ROW || st == COL) && ({1'b0, pn} <= half) && (line < sz);
    m1_rd_mirror = m1_rd_en && ({1'b0, pn} == half);
    m1_rd_emit   = m1_rd_en && (pn != 3'd0);
    m1_rd_first  = (pn == 3'd1);
    m1_addr_e    = col ? {ie, line[2:0]} : {line[2:0], ie};
    m1_addr_o    = col ? {io, line[2:0]} : {line[2:0], io};
  end

  // transfer addresses: region S x S (XFER) or S/2 x S/2 (XFER_LL), row-major
  always_comb begin
    logic [3:0] xs;
    logic [2:0] xr, xc;
    xs = (st == XFER_LL) ? half : sz;
    xr = 3'(xa / 6'(xs));
    xc = 3'(xa % 6'(xs));
    xfer_rd      = (st == XFER || st == XFER_LL);
    xfer_rd_addr = {xr, xc};
  end

  // result addresses
  always_comb begin
    logic [2:0] hn;
    hn = 3'(half) + wn;
    m2_we     = proc_valid;
    m2_addr_l = (st == COL) ? {wn, wl} : {wl, wn};
    m2_addr_h = (st == COL) ? {hn, wl} : {wl, hn};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; lvl <= '0; nlev <= '0; sz <= 4'd8;
      line <= '0; pn <= '0; xa <= '0; wcnt <= '0; wl <= '0; wn <= '0;
      xfer_wr_en <= 1'b0; xfer_wr_addr <= '0; done <= 1'b0;
    end else begin
      done         <= 1'b0;
      xfer_wr_en   <= xfer_rd;
      xfer_wr_addr <= xfer_rd_addr;
      // result write tracking
      if (proc_valid) begin
        wcnt <= wcnt + 1'b1;
        if ({1'b0, wn} == half - 4'd1) begin wn <= '0; wl <= wl + 1'b1; end
        else wn <= wn + 1'b1;
      end
      // read sequencing
      if (m1_rd_en) begin
        if ({1'b0, pn} == half) begin pn <= '0; line <= line + 1'b1; end
        else pn <= pn + 1'b1;
      end
      unique case (st)
        IDLE: if (start) begin
          st <= ROW; lvl <= 2'd1; nlev <= (level == 2'd0) ? 2'd1 : level; sz <= 4'd8;
          line <= '0; pn <= '0; wcnt <= '0; wl <= '0; wn <= '0;
        end
        ROW, COL: if (wcnt == total && !proc_valid && line == sz) begin
          line <= '0; pn <= '0; wcnt <= '0; wl <= '0; wn <= '0; xa <= '0;
          if (st == ROW)        st <= XFER;
          else if (lvl == nlev) st <= FINISH;
          else                  st <= XFER_LL;
        end
        XFER: begin
          xa <= xa + 1'b1;
          if (xa == 6'(int'(sz) * int'(sz) - 1)) st <= COL;
        end
        XFER_LL: begin
          xa <= xa + 1'b1;
          if (xa == 6'(int'(half) * int'(half) - 1)) begin
            st  <= ROW;
            sz  <= half;
            lvl <= lvl + 1'b1;
          end
        end
        FINISH: if (!xfer_wr_en) begin st <= IDLE; done <= 1'b1; end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
