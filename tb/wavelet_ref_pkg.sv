// wavelet_ref_pkg: software reference of the wavelet compression for the
// system testbenches. lift() applies the 5/3 lifting equations with mirrored
// edges, encode() produces the token stream (zero runs, 7-bit values,
// escaped 16-bit values), compress() chains them for one or two levels.
package wavelet_ref_pkg;
  typedef int ivec_t[$];

  function automatic void lift(input ivec_t xs, output ivec_t lo, output ivec_t hi);
    int m = xs.size() / 2;
    int dprev = 0;
    lo = {}; hi = {};
    for (int n = 0; n < m; n++) begin
      int nxt = (2*n + 2 < xs.size()) ? xs[2*n+2] : xs[2*n];
      int d = xs[2*n+1] - ((xs[2*n] + nxt) >>> 1);
      int dp = (n == 0) ? d : dprev;
      int s = xs[2*n] + ((dp + d) >>> 2);
      hi.push_back(d); lo.push_back(s);
      dprev = d;
    end
  endfunction

  function automatic void encode(input ivec_t vals, input bit delta, inout ivec_t out);
    int run = 0, prev = 0;
    foreach (vals[i]) begin
      int v = delta ? vals[i] - prev : vals[i];
      prev = vals[i];
      if (v == 0) begin
        if (run == 128) begin out.push_back('hff); run = 0; end
        run++;
      end else begin
        if (run > 0) begin out.push_back('h80 + run - 1); run = 0; end
        if (v >= -63 && v <= 63) out.push_back(v & 'h7f);
        else begin out.push_back('h40); out.push_back((v >> 8) & 'hff); out.push_back(v & 'hff); end
      end
    end
    if (run > 0) out.push_back('h80 + run - 1);
  endfunction

  function automatic ivec_t compress(input ivec_t xs, input bit two);
    ivec_t lo, hi, lo2, hi2, out;
    out = {};
    lift(xs, lo, hi);
    if (two) begin
      lift(lo, lo2, hi2);
      encode(lo2, 1'b1, out); encode(hi2, 1'b0, out); encode(hi, 1'b0, out);
    end else begin
      encode(lo, 1'b1, out); encode(hi, 1'b0, out);
    end
    return out;
  endfunction
endpackage
