// gpp_ref_pkg -- reference model of one pyramid REDUCE step, for testbenches.
//
// Works on whole images held in dynamic byte arrays, row after row, in the
// order the hardware uses: every line is filtered with [1 2 1]/4 (edge
// pixel repeated) and shrunk 6-to-5 by linear interpolation; then every
// column of that result is filtered and shrunk the same way. Each step
// truncates to 8 bits as the hardware does. The interpolation is written
// from the output positions (output k at input 1.2*k, weights rounded to
// 1/256), not from the phase tables of the RTL.
package gpp_ref_pkg;

  typedef byte unsigned img_t[];

  function automatic int red_size(input int n);
    return (5 * (n - 1)) / 6 + 1;
  endfunction

  // 1-D: filter then decimate a vector of n samples
  function automatic img_t reduce_1d(input img_t x, input int n);
    img_t f, y;
    int no;
    f = new[n];
    for (int i = 0; i < n; i++) begin
      int l, r;
      l = (i == 0) ? int'(x[0]) : int'(x[i-1]);
      r = (i == n-1) ? int'(x[n-1]) : int'(x[i+1]);
      f[i] = 8'((l + 2 * int'(x[i]) + r) >> 2);
    end
    no = red_size(n);
    y = new[no];
    for (int k = 0; k < no; k++) begin
      int pos10, i0, fr, wb;
      pos10 = 12 * k;              // position in tenths of a sample
      i0 = pos10 / 10;
      fr = pos10 % 10;             // 0, 2, 4, 6 or 8 tenths
      if (fr == 0) y[k] = f[i0];
      else begin
        wb = (256 * fr + 5) / 10;  // weight of the right neighbour, rounded
        y[k] = 8'(((256 - wb) * int'(f[i0]) + wb * int'(f[i0+1])) >> 8);
      end
    end
    return y;
  endfunction

  // 2-D: one pyramid level, rows first, then columns
  function automatic img_t reduce_2d(input img_t src, input int w, input int h);
    img_t mid, out, line, col;
    int wo, ho;
    wo = red_size(w);
    ho = red_size(h);
    mid = new[wo * h];
    for (int y = 0; y < h; y++) begin
      line = new[w];
      for (int x = 0; x < w; x++) line[x] = src[y * w + x];
      line = reduce_1d(line, w);
      for (int x = 0; x < wo; x++) mid[y * wo + x] = line[x];
    end
    out = new[wo * ho];
    for (int x = 0; x < wo; x++) begin
      col = new[h];
      for (int y = 0; y < h; y++) col[y] = mid[y * wo + x];
      col = reduce_1d(col, h);
      for (int y = 0; y < ho; y++) out[y * wo + x] = col[y];
    end
    return out;
  endfunction

  // bytes a level takes in memory: whole 16-pixel bursts
  function automatic int level_bytes(input int w, input int h);
    return ((w * h + 15) / 16) * 16;
  endfunction

endpackage
