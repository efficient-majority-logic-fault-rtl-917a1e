// dscc_encoder: systematic encoder for the difference-set cyclic code of
// order S. A K-bit data word m becomes the N-bit codeword
//   c(X) = X^(N-K) m(X) + (X^(N-K) m(X) mod g(X)),
// so c[N-1:N-K] = m (the data bits) and c[N-K-1:0] are the parity bits.
//
// The generator polynomial is derived at elaboration from the difference set
// P = {l_j}: with z'(X) = sum_j X^((N - l_j) mod N), h(X) = GCD(z'(X), X^N + 1)
// and g(X) = (X^N + 1) / h(X). The reflected z' is used so that the code's
// parity checks are the cyclic shifts of P itself, which is the form the
// decoder's XOR matrix evaluates. Each data bit i contributes the fixed parity
// pattern X^(N-K+i) mod g(X); the encoder XORs the patterns of the data bits
// that are 1, a single combinational XOR network with no clock.
//
// An elaboration check makes sure deg g(X) = N - K, the parity-bit count of
// the code family (3^S + 1).
module dscc_encoder
  import dscc_pkg::*;
#(
  parameter int unsigned S = 3,
  localparam int unsigned N = code_n(S),
  localparam int unsigned K = code_k(S),
  localparam int unsigned J = code_j(S)
) (
  input  logic [K-1:0] m,
  output logic [N-1:0] c
);

  typedef logic [N:0] poly_t;   // GF(2) polynomial of degree <= N

  function automatic int poly_deg(input poly_t p);
    int d;
    d = -1;
    for (int i = 0; i <= N; i++) if (p[i]) d = i;
    return d;
  endfunction

  // Remainder (want_quot = 0) or quotient (want_quot = 1) of a / b.
  function automatic poly_t poly_divmod(input poly_t a, input poly_t b, input bit want_quot);
    poly_t q;
    int    db;
    q  = '0;
    db = poly_deg(b);
    for (int d = N; d >= db; d--) begin
      if (a[d]) begin
        a        = a ^ (b << (d - db));
        q[d - db] = 1'b1;
      end
    end
    return want_quot ? q : a;
  endfunction

  function automatic poly_t gen_poly();
    poly_t a, b, t, xn1;
    xn1    = '0;
    xn1[N] = 1'b1;
    xn1[0] = 1'b1;
    b = '0;
    for (int j = 0; j < J; j++) b[(N - dset(S, j)) % N] = 1'b1;
    a = xn1;
    while (b != '0) begin
      t = poly_divmod(a, b, 1'b0);
      a = b;
      b = t;
    end
    return poly_divmod(xn1, a, 1'b1);
  endfunction

  localparam poly_t G = gen_poly();

  if (poly_deg(G) != int'(N - K)) begin : g_bad_code
    $error("dscc_encoder: generator degree %0d does not match N-K = %0d",
           poly_deg(G), N - K);
  end

  typedef logic [K-1:0][N-K-1:0] rows_t;

  function automatic rows_t gen_rows();
    rows_t rows;
    poly_t r;
    // r = X^(N-K) mod g = g minus its leading term (g has degree N-K)
    r = G;
    r[N-K] = 1'b0;
    for (int i = 0; i < K; i++) begin
      rows[i] = r[N-K-1:0];
      // multiply by X and reduce
      r = r << 1;
      if (r[N-K]) r = r ^ G;
    end
    return rows;
  endfunction

  localparam rows_t ROWS = gen_rows();

  logic [N-K-1:0] parity;

  always_comb begin
    parity = '0;
    for (int unsigned i = 0; i < K; i++) if (m[i]) parity = parity ^ ROWS[i];
  end

  assign c = {m, parity};

endmodule
