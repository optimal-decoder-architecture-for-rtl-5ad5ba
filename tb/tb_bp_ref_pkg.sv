// Reference model of the polar BP node network, for the testbenches.
//
// Written from the arithmetic the nodes must perform, not from their
// structure: the F node is checked against a signed integer sum clipped to
// the magnitude range, the G node against its selection rule (compare the
// magnitudes shifted right by K, pass b when a's upper part is larger).
// The network model applies log2(N) stages; stage butterfly k takes
// values k and k+N/2 and writes G to 2k and F to 2k+1.
//
// The package also counts how often each node mechanism occurred in the
// data it was given: same-sign additions, opposite-sign subtractions (with
// a or b the larger), saturated sums, and G choices where the approximate
// comparator picked the larger magnitude.
package tb_bp_ref_pkg;

  typedef struct {
    bit          s;
    logic [63:0] m;
  } llr_t;

  int n_f_add   = 0;  // F node, equal signs
  int n_f_sub_a = 0;  // F node, signs differ, |a| >= |b|
  int n_f_sub_b = 0;  // F node, signs differ, |b| > |a|
  int n_f_sat   = 0;  // F node, sum saturated
  int n_g_exact = 0;  // G node picked the true minimum
  int n_g_wrong = 0;  // G node picked the larger magnitude (approximation)

  function automatic logic [64:0] mask_w(int w);
    return (65'(1) << w) - 65'd1;
  endfunction

  function automatic llr_t ref_f(llr_t a, llr_t b, int w);
    llr_t r;
    logic signed [66:0] va, vb, sum, mag;
    va  = a.s ? -67'(a.m) : 67'(a.m);
    vb  = b.s ? -67'(b.m) : 67'(b.m);
    sum = va + vb;
    mag = (sum < 0) ? -sum : sum;
    if (a.s == b.s) n_f_add++;
    else if (b.m > a.m) n_f_sub_b++;
    else n_f_sub_a++;
    if (67'(mag) > 67'(mask_w(w))) begin
      n_f_sat++;
      r.m = 64'(mask_w(w));
    end else begin
      r.m = 64'(mag);
    end
    r.s = (sum < 0) ? 1'b1 : (sum > 0) ? 1'b0 : a.s;
    return r;
  endfunction

  function automatic llr_t ref_g(llr_t a, llr_t b, int k);
    llr_t r;
    logic [63:0] exact;
    r.s   = a.s ^ b.s;
    r.m   = ((a.m >> k) > (b.m >> k)) ? b.m : a.m;
    exact = (a.m < b.m) ? a.m : b.m;
    if (r.m == exact) n_g_exact++;
    else n_g_wrong++;
    return r;
  endfunction

  function automatic void ref_stage(input llr_t x[], output llr_t y[], input int w, input int k);
    int n = x.size();
    y = new[n];
    for (int i = 0; i < n / 2; i++) begin
      y[2*i]   = ref_g(x[i], x[i+n/2], k);
      y[2*i+1] = ref_f(x[i], x[i+n/2], w);
    end
  endfunction

  function automatic void ref_net(input llr_t x[], output llr_t y[], input int w, input int k);
    llr_t cur[];
    int   n = x.size();
    cur = x;
    for (int s = 1; s < n; s *= 2) begin
      ref_stage(cur, y, w, k);
      cur = y;
    end
    y = cur;
  endfunction

  // Random magnitude of width w in one of three ranges: small (upper bits
  // mostly equal, exercises the G approximation), near full scale
  // (exercises saturation) or uniform.
  function automatic logic [63:0] rand_mag(int w, int mode);
    logic [63:0] v;
    v = {$urandom, $urandom};
    case (mode)
      0: v = v & 64'hF;
      1: v = ~(v & 64'hFF);
      default: ;
    endcase
    return v & 64'(mask_w(w));
  endfunction

endpackage
