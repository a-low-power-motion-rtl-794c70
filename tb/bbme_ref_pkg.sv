// bbme_ref_pkg: reference models used by the testbenches, written directly
// from the algorithm (not from the RTL structure):
//   binarize  - threshold = floor(mean of 4 neighbours), bit = pixel >= threshold
//   pyramid   - 18x18 block -> 16x16 LV3 bits, 2x2 rounded means -> 9x9,
//               mirror pad (row/col -1 = 1) -> 10x10 -> 8x8 LV2 bits, and the
//               same again -> 6x6 -> 4x4 LV1 bits
//   sod       - XOR count between a block and a window position
package bbme_ref_pkg;
  typedef byte unsigned pix_t;

  function automatic int mir(input int k);
    return (k == 0) ? 1 : k - 1;
  endfunction

  // bits[r*n+c] of the n x n interior of an (n+2) x (n+2) block p
  function automatic void binarize(input int n, input pix_t p [][], ref bit bits []);
    bits = new[n*n];
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++) begin
        int th;
        th = (int'(p[r][c+1]) + int'(p[r+1][c]) + int'(p[r+1][c+2]) + int'(p[r+2][c+1])) / 4;
        bits[r*n+c] = (int'(p[r+1][c+1]) >= th);
      end
  endfunction

  function automatic void down_pad(input int n, input pix_t p [][], ref pix_t q [][]);
    // n x n -> (n/2) x (n/2) rounded 2x2 means -> mirror padded (n/2+1)^2
    pix_t d [][];
    d = new[n/2];
    for (int i = 0; i < n/2; i++) begin
      d[i] = new[n/2];
      for (int j = 0; j < n/2; j++)
        d[i][j] = pix_t'((int'(p[2*i][2*j]) + int'(p[2*i][2*j+1]) + int'(p[2*i+1][2*j]) + int'(p[2*i+1][2*j+1]) + 2) / 4);
    end
    q = new[n/2 + 1];
    for (int i = 0; i <= n/2; i++) begin
      q[i] = new[n/2 + 1];
      for (int j = 0; j <= n/2; j++) q[i][j] = d[mir(i)][mir(j)];
    end
  endfunction

  function automatic void pyramid(input pix_t blk [][], ref bit b3 [], ref bit b2 [], ref bit b1 []);
    pix_t p10 [][];
    pix_t p6 [][];
    binarize(16, blk, b3);
    down_pad(18, blk, p10);
    binarize(8, p10, b2);
    down_pad(10, p10, p6);
    binarize(4, p6, b1);
  endfunction

  // SOD of an n x n block against window w (side ws) at top-left (y, x)
  function automatic int sod(input int n, input bit blk [], input bit w [], input int ws,
                             input int y, input int x);
    int s;
    s = 0;
    for (int r = 0; r < n; r++)
      for (int c = 0; c < n; c++)
        s += int'(blk[r*n+c] != w[(y+r)*ws + x + c]);
    return s;
  endfunction

  // SOD of the 8x8 quadrant q of a 16x16 block
  function automatic int sod_q(input int q, input bit blk [], input bit w [], input int ws,
                               input int y, input int x);
    int s, oy, ox;
    s = 0; oy = 8*(q/2); ox = 8*(q%2);
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++)
        s += int'(blk[(oy+r)*16 + ox + c] != w[(y+oy+r)*ws + x + ox + c]);
    return s;
  endfunction
endpackage
