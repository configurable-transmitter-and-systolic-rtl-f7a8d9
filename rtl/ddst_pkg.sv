// ddst_pkg: types, number formats and constant helpers shared by the
// ST/DDST transmitter and the systolic DDST channel estimator (SYSDCE).
//
// Every complex sample travels as a packed {re, im} pair of signed
// two's-complement words of DW bits with FRAC fractional bits (Q2.13 at the
// defaults). Constants that multiply samples have their own formats:
// mapper normalisation constants are unsigned Q0.16, inverse-C coefficients
// are signed Q0.15. Quantisation everywhere truncates toward minus infinity,
// as the design uses no rounding. The 16-bit word is this design's choice;
// the transmitter's pin count (two 16-bit outputs) is consistent with it.
package ddst_pkg;

  localparam int DW    = 16;  // sample word width, per real component
  localparam int FRAC  = 13;  // fractional bits of a sample
  localparam int NW    = 16;  // mapper normalisation constant width (unsigned, all fractional)
  localparam int GW    = 16;  // inverse-C coefficient width (signed)
  localparam int GFRAC = 15;  // fractional bits of an inverse-C coefficient

  localparam real PI = 3.14159265358979323846;

  typedef logic signed [DW-1:0] smp_t;

  typedef struct packed {
    smp_t re;
    smp_t im;
  } cplx_t;

  // Constellation order selected by map_mode.
  typedef enum logic [1:0] {
    MAP_OFF   = 2'd0,  // mapper outputs zero symbols
    MAP_QAM4  = 2'd1,
    MAP_QAM16 = 2'd2,
    MAP_QAM64 = 2'd3
  } map_mode_t;

  // Training technique selected by tx_mode.
  typedef enum logic {
    TX_ST   = 1'b0,
    TX_DDST = 1'b1
  } tx_mode_t;

  // Phase of the optimal training sequence c(n) = sigma_c * exp(j*pi*n*(n+nu)/P),
  // nu = 1 for odd P and 2 for even P.
  function automatic real train_phase(int n, int p);
    int nu;
    nu = (p % 2 == 1) ? 1 : 2;
    return PI * real'(n * (n + nu)) / real'(p);
  endfunction

  // Quantise a real value to a signed integer with `frac` fractional bits
  // (truncation toward minus infinity).
  function automatic longint quant(real v, int frac);
    return longint'($floor(v * (2.0 ** frac)));
  endfunction

endpackage
