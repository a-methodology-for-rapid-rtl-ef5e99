// Reference model of the defect detector for the testbenches, written from
// the algorithm with plain integers over whole token sequences (no clocks, no
// pipelining). Tokens are numbered across frames; delays reach back across
// line and frame boundaries and read 0 before the start of the stream.
package dd_ref_pkg;

  int unsigned INV_NUM   = 4096;
  int unsigned OUT_SHIFT = 10;

  function automatic int absi(int v); return v < 0 ? -v : v; endfunction

  function automatic int at(const ref int a[], input int i);
    return (i >= 0) ? a[i] : 0;
  endfunction

  // direction code of a gradient: first-quadrant angle on a 254-per-180-degree
  // scale, folded to the second quadrant when dx and dy differ in sign
  function automatic int dir_code(int adx, int ady, int flag);
    int a;
    a = $rtoi($atan2(real'(ady), real'(adx)) * 254.0 / 3.141592653589793 + 0.5);
    return (flag != 0) ? (254 - a) % 254 : a;
  endfunction

  function automatic int weight(int k, int ndir, int dir);
    int c, d, w;
    c = (k * 254 + ndir / 2) / ndir;
    d = absi(dir - c) % 254;
    if (d > 127) d = 254 - d;
    w = 255 - 4 * d;
    return w > 0 ? w : 0;
  endfunction

  function automatic int inv_of(int a);
    int q;
    if (a == 0) return 255;
    q = (int'(INV_NUM) + a / 2) / a;
    return q > 255 ? 255 : q;
  endfunction

  // extraction macro: direction and edge (0/255) per token
  function automatic void extract(const ref int pix[], input int L, input int thr,
                                  ref int dir[], ref int edg[]);
    int dx, dy, adx, ady, m;
    dir = new[pix.size()];
    edg = new[pix.size()];
    foreach (pix[i]) begin
      dx  = pix[i] - at(pix, i - 1);
      dy  = pix[i] - at(pix, i - L);
      adx = absi(dx) / 8;
      ady = absi(dy) / 8;
      dir[i] = dir_code(adx, ady, int'((dx < 0) != (dy < 0)));
      m = adx > ady ? adx : ady;
      edg[i] = (m >= thr) ? 255 : 0;
    end
  endfunction

  // direction macro k: contribution per token, plus the average A of each
  // frame (frame f ends at token eof_at[f])
  function automatic void dir_macro(const ref int dir[], const ref int edg[],
                                    const ref int eof_at[], input int L,
                                    input int k, input int ndir,
                                    ref int contrib[], ref int avg[]);
    int wi[], ch[], cv, frame, inv_cur, s, n, p;
    wi = new[dir.size()];
    ch = new[dir.size()];
    contrib = new[dir.size()];
    avg = new[eof_at.size()];
    foreach (dir[i]) begin
      wi[i] = (edg[i] != 0) ? weight(k, ndir, dir[i]) : 0;
      ch[i] = wi[i] + at(wi, i - 1) + at(wi, i - 2);
    end
    frame = 0; inv_cur = 255; s = 0; n = 0;
    foreach (dir[i]) begin
      cv = ch[i] + at(ch, i - L) + at(ch, i - 2 * L);
      p  = ((edg[i] != 0) ? cv : 0) * inv_cur;
      p  = p >> OUT_SHIFT;
      contrib[i] = p > 255 ? 255 : p;
      s += wi[i];
      n += (edg[i] != 0);
      if (frame < eof_at.size() && i == eof_at[frame]) begin
        avg[frame] = (n == 0) ? 0 : s / n;
        inv_cur = inv_of(avg[frame]);
        frame++; s = 0; n = 0;
      end
    end
  endfunction

  function automatic bit in_patch(int x, int y, int w, int h);
    return x >= w / 2 && x < w / 2 + w / 6 && y >= h / 2 && y < h / 2 + h / 5;
  endfunction

  // Test picture in the spirit of an inspected wafer: a black border around
  // a mesh of diagonal lines with period P, and inside it a patch of shading
  // that rises towards the upper right, whose edges have a direction the
  // mesh lacks (the defect). noise adds a little
  // random grain so that weak gradients occur too.
  function automatic int mesh_pixel(int x, int y, int w, int h, int p, int noise);
    int v, bx, by;
    bx = w / 8; by = h / 8;
    if (x < bx || x >= w - bx || y < by || y >= h - by) v = 0;
    else if (in_patch(x, y, w, h))
      v = 20 + ((x - y + 7000) % 7) * 32;
    else
      v = (((x + y) % p) < 2 || ((x - y + 1000 * p) % p) < 2) ? 230 : 20;
    if (noise > 0) v += $urandom_range(noise) - noise / 2;
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

endpackage
