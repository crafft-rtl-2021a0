// crafft_ref_pkg: reference arithmetic for the CRAFFT testbenches.
//
// A bit-exact software model of one fixed-point Singleton butterfly as the
// tiles compute it (product sum, round half up at TW-2 fraction bits, one bit
// of growth with two's-complement wrap), the quantised twiddle table, the
// bit reversal of the input order and the gate count of one butterfly stage.
package crafft_ref_pkg;

  localparam int TW  = 16;
  localparam int TWF = TW - 2;

  function automatic int bitrev(input int n, input int s);
    int r = 0;
    for (int q = 0; q < s; q++) r = (r << 1) | ((n >> q) & 1);
    return r;
  endfunction

  function automatic longint sext(input longint v, input int w);
    longint m = longint'(1) << w;
    longint u = v & (m - 1);
    return (u >= (m >> 1)) ? u - m : u;
  endfunction

  function automatic longint rnd(input real x);
    return (x >= 0.0) ? longint'($floor(x + 0.5)) : -longint'($floor(-x + 0.5));
  endfunction

  // w^e = exp(-2 pi i e / 2^s), TW-bit, TWF fraction bits.
  function automatic longint tw_re(input longint e, input int s);
    real ph = 2.0 * 3.14159265358979323846 * real'(e) / real'(longint'(1) << s);
    return rnd($cos(ph) * real'(1 << TWF));
  endfunction

  function automatic longint tw_im(input longint e, input int s);
    real ph = 2.0 * 3.14159265358979323846 * real'(e) / real'(longint'(1) << s);
    return rnd(-$sin(ph) * real'(1 << TWF));
  endfunction

  // One butterfly with W-bit inputs and W+1-bit outputs.
  task automatic bfly(input longint ar, input longint ai, input longint br, input longint bi,
                      input longint wr, input longint wi, input int w,
                      output longint ypr, output longint ypi,
                      output longint ymr, output longint ymi);
    longint tr, ti;
    tr  = (br * wr - bi * wi + (longint'(1) << (TWF - 1))) >>> TWF;
    ti  = (br * wi + bi * wr + (longint'(1) << (TWF - 1))) >>> TWF;
    ypr = sext(ar + tr, w + 1);
    ypi = sext(ai + ti, w + 1);
    ymr = sext(ar - tr, w + 1);
    ymi = sext(ai - ti, w + 1);
  endtask

  // Gates (= cycles) of one butterfly stage with W-bit inputs.
  function automatic int stage_gates(input int w);
    int aws = TWF + w + 1;
    int per = 0;
    for (int n = 0; n < 2 * TW; n++) begin
      int b = n % TW;
      per += b + 5 * (aws - b);
    end
    per += 4 * (aws - TWF + 1) + 4 * (w + 1) + 5 * (w + 1);
    return 2 * per;
  endfunction

endpackage
