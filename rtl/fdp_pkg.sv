// fdp_pkg: shared types and elaboration-time functions of the exact fused
// dot-product-add (FDPNA) operator.
//
// The compressed accumulator is cut into N+1 zones. Zone i starts at bit
// position d_i (positions are counted from the left, i.e. from the most
// significant end of the accumulator) and holds p_i protection bits, then a
// w-bit significand slot, then one round-bit placeholder:
//   d_0 = 0,  d_i = d_{i-1} + w + 1 + p_{i-1},  w_compressed = d_{N+1}.
// The recurrence and w = max(2 + m_out, 2(1 + m_in)) follow the operator's
// definition; p_i = ceil(log2(N + 1 - i)) (enough to absorb the carries of the
// N+1-i terms that may share zone i) is this implementation's reading of the
// protection-bit rule.
// The rounding-mode encoding (RISC-V style) and the flag set are design choices.
package fdp_pkg;

  // Rounding modes (encoding chosen to match the RISC-V frm field).
  typedef enum logic [2:0] {
    RM_RNE = 3'd0,  // to nearest, ties to even
    RM_RTZ = 3'd1,  // toward zero
    RM_RDN = 3'd2,  // toward -infinity
    RM_RUP = 3'd3,  // toward +infinity
    RM_RMM = 3'd4   // to nearest, ties away from zero
  } fdp_rm_e;

  // IEEE 754 exception flags raised by one operation.
  typedef struct packed {
    logic invalid;
    logic overflow;
    logic underflow;
    logic inexact;
  } fdp_flags_t;

  // Special-value classification of one term (a product X*Y or the addend Z).
  typedef struct packed {
    logic nan;    // the term is NaN (an operand is NaN)
    logic snan;   // an operand is a signalling NaN
    logic inf;    // the term is an infinity (and not NaN)
    logic inv;    // invalid product: infinity times zero
    logic sign;   // sign of the term (also meaningful for zero terms)
  } fdp_cls_t;

  function automatic int unsigned clog2(input int unsigned v);
    int unsigned r;
    r = 0;
    while ((32'd1 << r) < v) r++;
    return r;
  endfunction

  // Common significand width w of all terms.
  function automatic int fdp_w(input int m_in, input int m_out);
    return (2 + m_out > 2 * (1 + m_in)) ? 2 + m_out : 2 * (1 + m_in);
  endfunction

  // Protection bits of zone i for an operator with N products.
  function automatic int fdp_p(input int n, input int i);
    return int'(clog2(n + 1 - i));
  endfunction

  // Left boundary d_i of zone i; fdp_d(n, w, n+1) is w_compressed.
  function automatic int fdp_d(input int n, input int w, input int i);
    int d;
    d = 0;
    for (int j = 0; j < i; j++) d = d + w + 1 + fdp_p(n, j);
    return d;
  endfunction

  // Width of the signed internal exponents E_i (true exponent of the 2^0
  // bit of a term significand).
  function automatic int fdp_ew(input int e_in, input int e_out);
    return (e_in + 3 > e_out + 2) ? e_in + 3 : e_out + 2;
  endfunction

endpackage
