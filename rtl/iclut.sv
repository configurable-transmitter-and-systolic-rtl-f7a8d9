// iclut: inverse-C look-up table of the systolic channel estimator.
//
// The channel estimate is h = C^-1 y, where C is the P x P circulant
// matrix whose first column is one period c(0..P-1) of the training
// sequence. C^-1 is circulant as well, with first column g:
//   g(m) = (1/P) * sum_k exp(j*2*pi*k*m/P) / lambda_k,
//   lambda_k = sum_n c(n) * exp(-j*2*pi*k*n/P),
// so element (i, j) of C^-1 is g((i - j) mod P). Instead of a multi-port
// ROM (which would cost P^2 words) the table is a ring of P registers that
// holds the first row of C^-1, Reg_j = g((-j) mod P), after reset.
// Each clock with rot_en high rotates the ring by one place
// (Reg_0 <- Reg_(P-1), Reg_j <- Reg_(j-1)), so after t rotations the ring
// presents row t of C^-1: Reg_j = g((t - j) mod P). After P rotations it is
// back at row 0.
//
// g is computed at elaboration from the unquantised training sequence and
// stored as signed Q0.15 (GFRAC) words, which requires |g| < 1 (true for
// the default training power: |g| = 1/(P*sigma_c) = 0.28).
module iclut
  import ddst_pkg::*;
#(
  parameter int  P        = 8,
  parameter real SIGMA_C2 = 0.2
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  rot_en,
  output cplx_t coef [P]
);

  typedef logic [2*GW-1:0] tab_t [P];

  // First row of C^-1, entry j = g((-j) mod P), as flat {re, im} words.
  function automatic tab_t make_row0();
    tab_t t;
    real  cr [P], ci [P], lr [P], li [P], gr [P], gi [P];
    real  sc, ph, den, ur, ui;
    logic signed [GW-1:0] qr, qi;
    sc = $sqrt(SIGMA_C2);
    for (int n = 0; n < P; n++) begin
      cr[n] = sc * $cos(train_phase(n, P));
      ci[n] = sc * $sin(train_phase(n, P));
    end
    for (int k = 0; k < P; k++) begin
      lr[k] = 0.0;
      li[k] = 0.0;
      for (int n = 0; n < P; n++) begin
        ph    = -2.0 * PI * real'(k * n) / real'(P);
        lr[k] = lr[k] + cr[n] * $cos(ph) - ci[n] * $sin(ph);
        li[k] = li[k] + cr[n] * $sin(ph) + ci[n] * $cos(ph);
      end
    end
    for (int m = 0; m < P; m++) begin
      gr[m] = 0.0;
      gi[m] = 0.0;
      for (int k = 0; k < P; k++) begin
        den   = lr[k] * lr[k] + li[k] * li[k];
        ur    = lr[k] / den;   // 1/lambda_k
        ui    = -li[k] / den;
        ph    = 2.0 * PI * real'(k * m) / real'(P);
        gr[m] = gr[m] + (ur * $cos(ph) - ui * $sin(ph)) / real'(P);
        gi[m] = gi[m] + (ur * $sin(ph) + ui * $cos(ph)) / real'(P);
      end
    end
    for (int j = 0; j < P; j++) begin
      qr   = GW'(quant(gr[(P - j) % P], GFRAC));
      qi   = GW'(quant(gi[(P - j) % P], GFRAC));
      t[j] = {qr, qi};
    end
    return t;
  endfunction

  localparam tab_t ROW0 = make_row0();

  logic [2*GW-1:0] ring [P];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < P; j++) ring[j] <= ROW0[j];
    end else if (rot_en) begin
      ring[0] <= ring[P-1];
      for (int j = 1; j < P; j++) ring[j] <= ring[j-1];
    end
  end

  always_comb begin
    for (int j = 0; j < P; j++) coef[j] = cplx_t'(ring[j]);
  end

endmodule
