// ddc_ref_pkg: bit-true reference models used by the DDC testbenches.
//
// The models are written from the filter definitions, not from the RTL
// structure: the NCO value is the rounded sine of the phase, the CIC output
// is the n-th difference of an n-fold running sum sampled every dec inputs
// (computed in 64-bit integers without wrap-around), and the half-band
// output is a direct 11-tap convolution at the full input rate.
package ddc_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  // Rounded sine table entry for a table address.
  function automatic longint sine_entry(longint addr, int aw, int ow);
    return longint'($floor($sin(2.0 * PI * real'(addr) / (2.0 ** aw))
                           * (2.0 ** (ow - 1) - 1.0) + 0.5));
  endfunction

  // Interpret the low w bits of v as a two's complement number.
  function automatic longint sext(longint v, int w);
    longint m;
    m = v & ((64'sd1 <<< w) - 1);
    if (m >= (64'sd1 <<< (w - 1))) m -= (64'sd1 <<< w);
    return m;
  endfunction

  // CIC decimator with n_stages integrator/comb pairs (default 2) and
  // factors clamped to 1..max_dec. The model keeps n_stages running sums,
  // samples the last one every dec inputs, and takes the n_stages-th
  // difference of the sampled sequence.
  class cic_model;
    int     n_stages, max_dec;
    int     cnt;
    longint s [];       // running sums, s[0] of the input
    longint samp [$];   // sampled last running sum, newest last
    function new(int stages = 2, int maxd = 9);
      n_stages = stages; max_dec = maxd; cnt = 0;
      s = new[stages];
      foreach (s[k]) s[k] = 0;
    endfunction
    // Feed one input; returns 1 and the output when a decimation happens.
    function automatic bit push(longint x, int dec_setting, output longint y);
      bit took;
      int d;
      longint diff [];
      d = (dec_setting < 1) ? 1 : (dec_setting > max_dec ? max_dec : dec_setting);
      took = (cnt >= d - 1);
      y = 0;
      if (took) begin
        samp.push_back(s[n_stages-1]);
        while (samp.size() > n_stages + 1) void'(samp.pop_front());
        // n-th backward difference, samples before the first one are zero
        diff = new[n_stages + 1];
        for (int k = 0; k <= n_stages; k++)
          diff[k] = (k < samp.size()) ? samp[samp.size() - 1 - k] : 0;
        for (int r = 0; r < n_stages; r++)
          for (int k = 0; k < n_stages - r; k++)
            diff[k] = diff[k] - diff[k + 1];
        y = diff[0];
        cnt = 0;
      end else begin
        cnt++;
      end
      for (int k = n_stages - 1; k > 0; k--) s[k] += s[k-1];
      s[0] += x;
      return took;
    endfunction
  endclass

  // Half-band decimator, taps h0 (centre), h1 (outer), h3, h5 (inner).
  class hb_model;
    longint hist [$];   // hist[0] newest
    bit     second;
    function new();
      second = 0;
    endfunction
    function automatic longint at(int k);
      return (k < hist.size()) ? hist[k] : 0;
    endfunction
    function automatic bit push(longint x, longint h0, longint h1, longint h3,
                                longint h5, int w, output longint y);
      longint acc, maxv, minv;
      hist.push_front(x);
      while (hist.size() > 16) void'(hist.pop_back());
      y = 0;
      if (!second) begin
        second = 1;
        return 0;
      end
      second = 0;
      // x is the second sample of a pair (full-rate index n); taps n-1..n-11
      acc = h1 * (at(1) + at(11)) + h3 * (at(3) + at(9)) + h5 * (at(5) + at(7))
          + h0 * at(6);
      acc = (acc + (64'sd1 <<< 14)) >>> 15;
      maxv = (64'sd1 <<< (w - 1)) - 1;
      minv = -(64'sd1 <<< (w - 1));
      y = (acc > maxv) ? maxv : ((acc < minv) ? minv : acc);
      return 1;
    endfunction
  endclass

endpackage
