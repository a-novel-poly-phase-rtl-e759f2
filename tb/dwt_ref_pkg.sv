// dwt_ref_pkg: reference model used by the testbenches.
//
// Computes the same fixed-point DWT as the RTL with plain integer loops, so
// a testbench can compare every output word bit for bit:
//   a[n] = round_sat( sum_k LO[k] * x[2n+1-k] ),  d[n] likewise with HI,
// x[i] = 0 for i < 0, round_sat = add 2^(CF-1), arithmetic shift right by
// CF, clamp to the DW-bit signed range. Also holds a second coefficient set
// (4-tap Daubechies, 14 fractional bits) for tests that need a filter with
// sub-filter history.
package dwt_ref_pkg;

  // Daubechies D4 scaling filter, round(c * 2^14); tap k multiplies x[2n+1-k].
  localparam logic [3:0][15:0] D4_LO = {-16'sd2120, 16'sd3672, 16'sd13705, 16'sd7913};
  // High-pass hi[k] = (-1)^k lo[3-k].
  localparam logic [3:0][15:0] D4_HI = {-16'sd7913, 16'sd13705, -16'sd3672, -16'sd2120};

  function automatic longint round_sat(longint acc, int cf, int dw);
    longint r, maxv, minv;
    r    = (acc + (64'sd1 <<< (cf - 1))) >>> cf;
    maxv = (64'sd1 <<< (dw - 1)) - 1;
    minv = -(64'sd1 <<< (dw - 1));
    if (r > maxv) r = maxv;
    if (r < minv) r = minv;
    return r;
  endfunction

  // One analysis level over the whole sequence x (length even).
  function automatic void level(input longint x[$], input longint lo[$], input longint hi[$],
                                input int cf, input int dw,
                                output longint a[$], output longint d[$]);
    a.delete();
    d.delete();
    for (int n = 0; n < x.size() / 2; n++) begin
      longint sa, sd;
      sa = 0;
      sd = 0;
      for (int k = 0; k < lo.size(); k++) begin
        int i;
        i = 2 * n + 1 - k;
        if (i >= 0) begin
          sa += lo[k] * x[i];
          sd += hi[k] * x[i];
        end
      end
      a.push_back(round_sat(sa, cf, dw));
      d.push_back(round_sat(sd, cf, dw));
    end
  endfunction

endpackage
