// ortho_pkg: constants and constant functions shared by the orthogonal-code
// crypto link.
//
// An a-bit data word is carried as a b = 2**(a-1) bit bi-orthogonal code word.
// The low a-1 data bits pick a row of the b x b Sylvester-Hadamard matrix
// (code bit p = parity(index & p)); the data MSB inverts the whole row. The
// 2**a words so obtained have pairwise distance b/2 (or b for a word and its
// inverse), so a nearest-code search corrects up to b/4 - 1 bit errors.
// The b = 2**(a-1) relation and the correction limit are those of the
// published scheme; the Hadamard row assignment is this design's choice.
//
// The key stream is a maximal-length Fibonacci LFSR of width b. Tap sets for
// the widths used here (8, 16, 32, 64, 128) are the usual published
// maximal-length sets; the scheme itself names no polynomial.
package ortho_pkg;

  // Largest code width supported (a = 8).
  localparam int unsigned MAX_B = 128;

  // Code length for a data width a.
  function automatic int unsigned code_len(input int unsigned a);
    return 1 << (a - 1);
  endfunction

  // Width of a counter that holds 0..b.
  function automatic int unsigned count_w(input int unsigned b);
    return $clog2(b + 1);
  endfunction

  // Bi-orthogonal code word for data value `data` of width a, in the low
  // code_len(a) bits of the result. Bit b-1 is the first bit sent on the line.
  function automatic logic [MAX_B-1:0] ortho_code(input int unsigned a,
                                                  input int unsigned data);
    logic [MAX_B-1:0] c;
    int unsigned b;
    int unsigned idx;
    logic inv;
    b   = code_len(a);
    idx = data & ((1 << (a - 1)) - 1);
    inv = ((data >> (a - 1)) & 1) != 0;
    c   = '0;
    for (int unsigned p = 0; p < MAX_B; p++) begin
      if (p < b) c[p] = (^(idx & p)) ^ inv;
    end
    return c;
  endfunction

  // Feedback tap mask for a w-bit Fibonacci LFSR that shifts towards the MSB
  // and feeds the XOR of the tapped bits into bit 0. Tap n is mask bit n-1.
  function automatic logic [MAX_B-1:0] lfsr_taps(input int unsigned w);
    logic [MAX_B-1:0] m;
    m = '0;
    case (w)
      8:       begin m[7]   = 1'b1; m[5]   = 1'b1; m[4]   = 1'b1; m[3]  = 1'b1; end
      16:      begin m[15]  = 1'b1; m[14]  = 1'b1; m[12]  = 1'b1; m[3]  = 1'b1; end
      32:      begin m[31]  = 1'b1; m[21]  = 1'b1; m[1]   = 1'b1; m[0]  = 1'b1; end
      64:      begin m[63]  = 1'b1; m[62]  = 1'b1; m[60]  = 1'b1; m[59] = 1'b1; end
      128:     begin m[127] = 1'b1; m[125] = 1'b1; m[100] = 1'b1; m[98] = 1'b1; end
      default: begin m[w-1] = 1'b1; m[0]   = 1'b1; end
    endcase
    return m;
  endfunction

endpackage
