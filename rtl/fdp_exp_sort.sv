// fdp_exp_sort: sorts the N+1 terms by exponent, largest first.
//
// The sort key of term i is {E_i, nz_i}: the "significand is non-zero" bit
// appended below the exponent makes a subnormal term sort above a zero term
// of the same exponent. The sort is done by ranking: all n(n-1)/2 key pairs
// are compared in parallel (ties go to the lower index, a choice of this
// design), a population count
// per term gives its rank, and an n x n crossbar moves each term's exponent
// and index to its rank. Only indices travel through the crossbar; the
// significands are then recovered with one index-driven multiplexer per
// output. Outputs satisfy e_s[0] >= e_s[1] >= ... >= e_s[N].
// Purely combinational.
module fdp_exp_sort
  import fdp_pkg::*;
#(
  parameter int N  = 4,        // number of products; N+1 terms are sorted
  parameter int W  = 48,       // significand width w
  parameter int EW = 11,       // exponent width
  localparam int NT = N + 1,
  localparam int IW = (NT > 1) ? $clog2(NT) : 1
) (
  input  logic signed [EW-1:0] e   [NT],
  input  logic signed [W:0]    m   [NT],
  input  logic                 nz  [NT],
  output logic signed [EW-1:0] e_s [NT],
  output logic signed [W:0]    m_s [NT],
  output logic [IW-1:0]        idx_s [NT]
);
  // ge[i][j] (i < j): term i ranks before term j
  logic          ge   [NT][NT];
  logic [IW-1:0] rank [NT];

  always_comb begin
    for (int i = 0; i < NT; i++)
      for (int j = 0; j < NT; j++)
        ge[i][j] = 1'b0;
    for (int i = 0; i < NT; i++)
      for (int j = i + 1; j < NT; j++)
        ge[i][j] = (e[i] > e[j]) || ((e[i] == e[j]) && (nz[i] || !nz[j]));

    // rank = number of terms that precede this one
    for (int j = 0; j < NT; j++) begin
      rank[j] = '0;
      for (int i = 0; i < j; i++)      rank[j] = rank[j] + IW'(ge[i][j]);
      for (int i = j + 1; i < NT; i++) rank[j] = rank[j] + IW'(!ge[j][i]);
    end

    // crossbar: exponent and index of the term whose rank is r
    for (int r = 0; r < NT; r++) begin
      e_s[r]   = '0;
      idx_s[r] = '0;
      for (int i = 0; i < NT; i++)
        if (rank[i] == IW'(r)) begin
          e_s[r]   = e_s[r] | e[i];
          idx_s[r] = idx_s[r] | IW'(i);
        end
    end

    // significand recovery from the sorted indices
    for (int r = 0; r < NT; r++) begin
      m_s[r] = '0;
      for (int i = 0; i < NT; i++)
        if (idx_s[r] == IW'(i)) m_s[r] = m[i];
    end
  end
endmodule
