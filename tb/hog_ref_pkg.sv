// hog_ref_pkg: reference model of the HoG pixel arithmetic for the
// testbenches, written with real-valued math rather than the hardware's
// fixed-point tricks:
//   magnitude  floor(max(0.875*a + 0.5*b, a)), a/b = larger/smaller |component|
//   angle      atan2 folded into [0, 180) degrees
//   sector     number of boundaries 5, 15, ..., 175 degrees at or below the angle
//   votes      sector 0/18 -> bins 8 and 0; 2k+1 -> 2*mag on bin k; 2k+2 -> bins k, k+1
// ref_sector also reports a vector that lies within rounding distance of a
// boundary, where the fixed-point test may legitimately fall either way.
package hog_ref_pkg;

  function automatic int ref_mag(int gx, int gy);
    int ax, ay, a, b;
    real m;
    ax = (gx < 0) ? -gx : gx;
    ay = (gy < 0) ? -gy : gy;
    a  = (ax > ay) ? ax : ay;
    b  = (ax > ay) ? ay : ax;
    m  = 0.875 * a + 0.5 * b;
    if (m < a) m = a;
    return int'($floor(m));
  endfunction

  function automatic real ref_angle(int gx, int gy);
    real th;
    th = $atan2(real'(gy), real'(gx)) * 180.0 / 3.14159265358979;
    if (th < 0.0) th = th + 180.0;
    if (th >= 180.0) th = th - 180.0;
    return th;
  endfunction

  // Returns the sector 0..18; ambiguous = 1 when the vector lies so close to
  // a boundary (distance below 0.02 in gradient units) that rounding of the
  // boundary constants may put it on either side. |gx| == |gy| lies exactly
  // on the 45 or 135 degree boundary and counts as having passed it. A zero
  // vector is sector 18 by convention.
  function automatic int ref_sector(int gx, int gy, output bit ambiguous);
    real th, r;
    int  s;
    ambiguous = 0;
    if (gx == 0 && gy == 0) return 18;
    th = ref_angle(gx, gy);
    if (gx == gy)  th = 45.0;
    if (gx == -gy) th = 135.0;
    r = $sqrt(real'(gx * gx + gy * gy));
    s = 0;
    for (int j = 0; j < 18; j++) begin
      real phi, dd;
      phi = 5.0 + 10.0 * j;
      if (th >= phi) s++;
      dd = r * $sin((th - phi) * 3.14159265358979 / 180.0);
      if (th != phi && dd < 0.02 && dd > -0.02) ambiguous = 1;
    end
    return s;
  endfunction

  typedef int votes_t [9];

  function automatic votes_t ref_votes(int mag, int sector);
    votes_t v;
    foreach (v[i]) v[i] = 0;
    if (sector == 0 || sector == 18) begin
      v[8] = mag; v[0] = mag;
    end else if (sector % 2 == 1) begin
      v[(sector - 1) / 2] = 2 * mag;
    end else begin
      v[sector / 2 - 1] = mag; v[sector / 2] = mag;
    end
    return v;
  endfunction

  // Votes of every pixel of a raster stream of line width w, following the
  // sliding 3x3 window: the gradient of stream index j is centred at
  // pix[j-w-1], gx = pix[j-w] - pix[j-w-2], gy = pix[j-1] - pix[j-2w-1].
  // Indices before 2w+2 get no votes and are marked ambiguous. Also counts
  // the kinds of vote cast: [0] double votes, [1] split votes, [2] split
  // votes across the 180/0 wrap.
  function automatic void ref_stream_votes(ref int pix[$], input int w,
                                           ref int votes[$], ref bit amb[$],
                                           ref int kinds[3]);
    votes.delete();
    amb.delete();
    for (int j = 0; j < pix.size(); j++) begin
      votes_t v;
      bit a;
      int gx, gy, m, s;
      if (j < 2 * w + 2) begin
        foreach (v[i]) v[i] = 0;
        a = 1;
      end else begin
        gx = pix[j - w] - pix[j - w - 2];
        gy = pix[j - 1] - pix[j - 2 * w - 1];
        m  = ref_mag(gx, gy);
        s  = ref_sector(gx, gy, a);
        v  = ref_votes(m, s);
        if (m != 0) begin
          if (s % 2 == 1) kinds[0]++;
          else if (s == 0 || s == 18) kinds[2]++;
          else kinds[1]++;
        end
      end
      foreach (v[i]) votes.push_back(v[i]);
      amb.push_back(a);
    end
  endfunction

  // Histogram of the csize x csize block of votes whose newest entry is stream
  // index k; ok = 0 when any contributing pixel is ambiguous or missing.
  function automatic votes_t ref_cell(ref int votes[$], ref bit amb[$],
                                      input int w, int csize, int k, output bit ok);
    votes_t h;
    foreach (h[i]) h[i] = 0;
    ok = 1;
    for (int r = 0; r < csize; r++)
      for (int c = 0; c < csize; c++) begin
        int j = k - r * w - c;
        if (j < 0 || j >= amb.size() || amb[j]) ok = 0;
        else for (int b = 0; b < 9; b++) h[b] += votes[9 * j + b];
      end
    return h;
  endfunction

endpackage
