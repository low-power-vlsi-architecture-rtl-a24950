// tb_vle_pkg: reference decoding of the coded bit stream for the testbenches.
// huff_block: reads one Huffman block (symbol table header, then codes until
// the block's last bit) and returns the symbols; also checks that the table
// is prefix-free and reports the number of data bits.
// rle_block: turns RLE bytes back into 64 coefficients.
// huff_cost: bit count of an optimal Huffman code for a histogram.
package tb_vle_pkg;
  typedef logic [7:0] byte_q_t[$];

  function automatic int take(ref logic bits[$], input int n);
    int v = 0;
    for (int i = 0; i < n; i++) v = (v << 1) | int'(bits.pop_front());
    return v;
  endfunction

  // bits/lasts: captured stream; returns 0 on a malformed block
  function automatic bit huff_block(ref logic bits[$], ref logic lasts[$],
                                    output byte_q_t syms, output int data_bits);
    int n, sym[256], len[256], code[256];
    bit done;
    syms = {};
    data_bits = 0;
    if (bits.size() < 8) return 0;
    n = take(bits, 8);
    for (int i = 0; i < 8; i++) void'(lasts.pop_front());
    if (n == 0) return 0;
    for (int i = 0; i < n; i++) begin
      sym[i] = take(bits, 8);
      len[i] = take(bits, 5);
      code[i] = take(bits, len[i]);
      for (int k = 0; k < 13 + len[i]; k++) void'(lasts.pop_front());
      if (len[i] == 0) return 0;
    end
    // prefix-free check
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        if (i != j && len[i] <= len[j] && (code[j] >> (len[j] - len[i])) == code[i]) return 0;
    done = 0;
    while (!done && bits.size() > 0) begin
      int c = 0, l = 0, hit = -1;
      while (hit < 0 && bits.size() > 0) begin
        c = (c << 1) | int'(bits.pop_front());
        done = lasts.pop_front();
        l++;
        data_bits++;
        for (int i = 0; i < n; i++) if (len[i] == l && code[i] == c) hit = i;
        if (l > 20) return 0;
      end
      if (hit < 0) return 0;
      syms.push_back(8'(sym[hit]));
    end
    return done;
  endfunction

  function automatic bit rle_block(ref byte_q_t b, output int coef[64]);
    int n = 0;
    for (int i = 0; i < 64; i++) coef[i] = 0;
    while (n < 64) begin
      logic [7:0] c;
      if (b.size() == 0) return 0;
      c = b.pop_front();
      if (c != 0) begin coef[n] = int'($signed(c)); n++; end
      else begin
        if (b.size() == 0) return 0;
        c = b.pop_front();
        n = (c == 8'hff) ? 64 : n + int'(c) + 1;
      end
    end
    return (n == 64);
  endfunction

  function automatic int huff_cost(input int w[$]);
    int cost = 0;
    if (w.size() == 1) return w[0];
    while (w.size() > 1) begin
      int a, b;
      w.sort();
      a = w.pop_front(); b = w.pop_front();
      cost += a + b;
      w.push_back(a + b);
    end
    return cost;
  endfunction
endpackage
