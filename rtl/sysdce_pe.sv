// sysdce_pe: processing element of the modified systolic matrix-vector
// multiplier.
//
// Combinational. It adds a contribution to the partial sum arriving from
// the previous element:
//   mul_sel = 1: contribution = a * y, a complex product of the coefficient
//                a (signed Q0.15) and the element's stored vector entry y
//                (Q2.13), truncated to 13 + GX fractional bits;
//   mul_sel = 0: contribution = a itself (the multiplier is bypassed; this
//                is the trivial multiplication by one used for the cyclic
//                mean, where a is a received sample), aligned to the
//                partial sum's 13 + GX fractional bits.
// vld = 0 adds nothing. The partial sum is AW bits wide and carries GX
// guard bits below the sample's LSB. The register that follows each
// element in the array lives in msysmvm.
module sysdce_pe
  import ddst_pkg::*;
#(
  parameter int AW = 26, // partial-sum width per real component
  parameter int GX = 4   // guard fraction bits of the partial sum
) (
  input  logic                 vld,
  input  logic                 mul_sel,
  input  cplx_t                a,
  input  cplx_t                y,
  input  logic signed [AW-1:0] psum_in_re,
  input  logic signed [AW-1:0] psum_in_im,
  output logic signed [AW-1:0] psum_out_re,
  output logic signed [AW-1:0] psum_out_im
);

  logic signed [2*DW-1:0] rr, ii, ri, ir;
  logic signed [2*DW:0]   prod_re, prod_im;
  logic signed [AW-1:0]   add_re, add_im;

  always_comb begin
    rr      = a.re * y.re;
    ii      = a.im * y.im;
    ri      = a.re * y.im;
    ir      = a.im * y.re;
    prod_re = (2*DW+1)'(rr) - (2*DW+1)'(ii);
    prod_im = (2*DW+1)'(ri) + (2*DW+1)'(ir);
    if (!vld) begin
      add_re = '0;
      add_im = '0;
    end else if (mul_sel) begin
      add_re = AW'(prod_re >>> (GFRAC - GX));
      add_im = AW'(prod_im >>> (GFRAC - GX));
    end else begin
      add_re = AW'(a.re) <<< GX;
      add_im = AW'(a.im) <<< GX;
    end
    psum_out_re = psum_in_re + add_re;
    psum_out_im = psum_in_im + add_im;
  end

endmodule
