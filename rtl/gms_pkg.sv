// gms_pkg: constants and elaboration-time helpers shared by the masked
// GF(2^m) multiplier.
//
// A d-th order Generalized Masking Scheme (GMS) multiplier splits each
// operand into s = 2d+1 input shares and produces s' = d(2d+1) = C(s,2)
// intermediate output shares before compression.  This package provides:
//   * in_shares / out_shares  : s and s' as functions of the order d
//   * l_term                  : which partial products the k-th adder of the
//                               linear layer sums (the noncomplete grouping)
//   * default_ip              : a default irreducible polynomial per m
//
// Field elements are packed vectors, bit i is the coefficient of beta^i.
// An irreducible polynomial IP of degree m is stored without its leading
// term: bit i of the parameter is the coefficient of x^i, x^m is implied.
package gms_pkg;

  // Largest extension degree handled by default_ip().
  localparam int unsigned MAX_M = 256;

  // Number of input shares of a degree-2 function (multiplication): d*t+1, t=2.
  function automatic int unsigned in_shares(int unsigned d);
    return 2 * d + 1;
  endfunction

  // Number of output shares before compression: C(s,2) = d(2d+1).
  function automatic int unsigned out_shares(int unsigned d);
    return d * (2 * d + 1);
  endfunction

  // One adder of the linear layer.  It sums a_x*b_y + a_y*b_x, plus the
  // diagonal product a_x*b_x when diag is set.  Share indices are below 256.
  typedef struct packed {
    logic [7:0] x;
    logic [7:0] y;
    logic       diag;
  } l_term_t;

  // Assignment of partial products to the k-th linear-layer output l_k.
  // The adders are generated in this order (t counts up from 0):
  //   for i = 1 .. s-2:  L0(i,0), then L1(i,j) for j = 1 .. i-1
  //   L0(0,s-1), L0(s-1,1), then L1(s-1,j) for j = 2 .. s-2
  // where L0(x,y) = a_x b_y + a_x b_x + a_y b_x and L1(x,y) = a_x b_y + a_y b_x.
  // Adder t drives output k = s'-1-t, which reproduces the first-order
  // numbering l_0 = a2b1+a2b2+a1b2, l_1 = a0b2+a0b0+a2b0, l_2 = a1b0+a1b1+a0b1.
  // Every cross pair {x,y} appears in exactly one adder and every diagonal
  // product in exactly one L0 adder, so each l_k depends on two share indices
  // only.
  function automatic l_term_t l_term(int unsigned d, int unsigned k);
    int unsigned s;
    int unsigned sp;
    int unsigned t;
    l_term_t     found;
    s     = in_shares(d);
    sp    = out_shares(d);
    t     = 0;
    found = '0;
    for (int unsigned i = 1; i + 2 <= s; i++) begin
      if (sp - 1 - t == k) found = '{x: 8'(i), y: 8'(0), diag: 1'b1};
      t++;
      for (int unsigned j = 1; j < i; j++) begin
        if (sp - 1 - t == k) found = '{x: 8'(i), y: 8'(j), diag: 1'b0};
        t++;
      end
    end
    if (sp - 1 - t == k) found = '{x: 8'(0), y: 8'(s - 1), diag: 1'b1};
    t++;
    if (sp - 1 - t == k) found = '{x: 8'(s - 1), y: 8'(1), diag: 1'b1};
    t++;
    for (int unsigned j = 2; j + 2 <= s; j++) begin
      if (sp - 1 - t == k) found = '{x: 8'(s - 1), y: 8'(j), diag: 1'b0};
      t++;
    end
    return found;
  endfunction

  // Default irreducible polynomials (low-weight trinomials/pentanomials),
  // without the x^m term.  Other degrees return 0 and need an explicit IP.
  function automatic logic [MAX_M-1:0] default_ip(int unsigned m);
    logic [MAX_M-1:0] ip;
    ip = '0;
    case (m)
      2:       ip[1:0] = 2'b11;           // x^2 + x + 1
      4:       ip[1:0] = 2'b11;           // x^4 + x + 1
      8:       ip[7:0] = 8'h1b;           // x^8 + x^4 + x^3 + x + 1
      16:      ip[7:0] = 8'h2b;           // x^16 + x^5 + x^3 + x + 1
      32:      ip[7:0] = 8'h8d;           // x^32 + x^7 + x^3 + x^2 + 1
      64:      ip[7:0] = 8'h1b;           // x^64 + x^4 + x^3 + x + 1
      128:     ip[7:0] = 8'h87;           // x^128 + x^7 + x^2 + x + 1
      256:     ip[15:0] = 16'h0425;       // x^256 + x^10 + x^5 + x^2 + 1
      default: ip = '0;
    endcase
    return ip;
  endfunction

endpackage
