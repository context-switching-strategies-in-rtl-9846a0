// motion_ref_pkg: reference model of the motion-detection stages, on
// frames held as arrays of pixels in raster order (index r*W + c):
//   diff(r,c) = |cur(r,c) - prev(r,c)|
//   filt(r,c) = (sum of diff(min(r+i,H-1), min(c+j,W-1)), i,j = 0..3) / 16
//   bin(r,c)  = filt(r,c) > threshold
package motion_ref_pkg;
  typedef logic [7:0] frame_t[];

  function automatic frame_t diff(input frame_t cur, input frame_t prev);
    frame_t d = new[cur.size()];
    foreach (cur[i]) d[i] = (cur[i] > prev[i]) ? cur[i] - prev[i] : prev[i] - cur[i];
    return d;
  endfunction

  function automatic frame_t lpf(input frame_t d, input int W, input int H);
    frame_t f = new[d.size()];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int s = 0;
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) begin
            int rr = (r + i > H - 1) ? H - 1 : r + i;
            int cc = (c + j > W - 1) ? W - 1 : c + j;
            s += d[rr * W + cc];
          end
        f[r * W + c] = 8'(s / 16);
      end
    return f;
  endfunction

  function automatic frame_t bin(input frame_t f, input logic [7:0] th);
    frame_t b = new[f.size()];
    foreach (f[i]) b[i] = (f[i] > th) ? 8'd1 : 8'd0;
    return b;
  endfunction
endpackage
