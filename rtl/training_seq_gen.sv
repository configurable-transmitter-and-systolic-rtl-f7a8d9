// training_seq_gen: look-up table of one period of the superimposed
// training sequence.
//
// c(n) = sigma_c * exp(j*pi*n*(n+nu)/P), nu = 2 for even P and 1 for odd P,
// n = 0..P-1, with sigma_c = sqrt(SIGMA_C2). The sequence depends only on
// constants, so the P complex values are computed at elaboration, quantised
// to the Q2.13 sample format and held in a ROM. The transmit address
// generator reads it with idx = k mod P, which repeats the period N/P times
// over a block.
//
// Timing: combinational read; c follows idx in the same clock.
module training_seq_gen
  import ddst_pkg::*;
#(
  parameter int  P        = 8,
  parameter real SIGMA_C2 = 0.2
) (
  input  logic [$clog2(P)-1:0] idx,
  output cplx_t                c
);

  // Entries are stored as flat {re, im} words.
  typedef logic [2*DW-1:0] tab_t [P];

  function automatic tab_t make_tab();
    tab_t  t;
    cplx_t v;
    real   sc;
    sc = $sqrt(SIGMA_C2);
    for (int n = 0; n < P; n++) begin
      v.re = smp_t'(quant(sc * $cos(train_phase(n, P)), FRAC));
      v.im = smp_t'(quant(sc * $sin(train_phase(n, P)), FRAC));
      t[n] = v;  // packed struct to flat word
    end
    return t;
  endfunction

  localparam tab_t C_LUT = make_tab();

  assign c = cplx_t'(C_LUT[idx]);

endmodule
