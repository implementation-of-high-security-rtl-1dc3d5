// tb_ref_pkg: reference models used by the testbenches, written
// independently of the RTL.
//
// ref_code builds a bi-orthogonal code word by Sylvester doubling: start from
// a single 0 and, for each index bit k, form {half ^ index[k], half}; the data
// MSB then inverts the word. ref_lfsr_next steps a Fibonacci LFSR from an
// explicit list of tap positions (x^16 + x^15 + x^13 + x^4 + 1 for 16 bits
// and the matching maximal-length sets for the other widths). ref_dist counts
// differing bits one at a time.
package tb_ref_pkg;

  localparam int MAXB = 128;

  function automatic logic [MAXB-1:0] ref_code(input int a, input int data);
    logic [MAXB-1:0] v;
    int len;
    v   = '0;
    len = 1;
    for (int k = 0; k < a - 1; k++) begin
      logic [MAXB-1:0] lo, hi;
      lo = v;
      hi = (((data >> k) & 1) != 0) ? (v ^ ((MAXB'(1) << len) - 1)) : v;
      v  = (hi << len) | lo;
      len = len * 2;
    end
    if (((data >> (a - 1)) & 1) != 0) v = v ^ ((MAXB'(1) << len) - 1);
    return v;
  endfunction

  function automatic logic [MAXB-1:0] ref_lfsr_next(input int w, input logic [MAXB-1:0] s);
    int taps[4];
    logic fb;
    case (w)
      8:   taps = '{8, 6, 5, 4};
      16:  taps = '{16, 15, 13, 4};
      32:  taps = '{32, 22, 2, 1};
      64:  taps = '{64, 63, 61, 60};
      default: taps = '{128, 126, 101, 99};
    endcase
    fb = 1'b0;
    foreach (taps[i]) fb ^= s[taps[i] - 1];
    s = (s << 1) | MAXB'(fb);
    if (w < MAXB) s = s & ((MAXB'(1) << w) - 1);
    return s;
  endfunction

  function automatic int ref_dist(input logic [MAXB-1:0] x, input logic [MAXB-1:0] y, input int w);
    int d;
    d = 0;
    for (int i = 0; i < w; i++) if (x[i] != y[i]) d++;
    return d;
  endfunction

  // Random error mask of w bits with exactly n ones.
  function automatic logic [MAXB-1:0] ref_errmask(input int w, input int n);
    logic [MAXB-1:0] m;
    int placed;
    m = '0;
    placed = 0;
    while (placed < n) begin
      int p;
      p = int'($urandom_range(w - 1));
      if (!m[p]) begin
        m[p] = 1'b1;
        placed++;
      end
    end
    return m;
  endfunction

endpackage
