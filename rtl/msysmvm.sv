// msysmvm: modified systolic matrix-vector multiplier (P processing
// elements), used both for the cyclic mean and for h = C^-1 y.
//
// Structure: a linear array of P elements (sysdce_pe). Element j holds the
// vector entry y_j in a register and receives its vertical operand vin[j]
// through a j-clock delay line, so that the operands issued in one clock
// meet the partial sum issued in the same clock as it ripples through the
// array. A register (1D) follows every element; the partial sum leaving
// the last one is the array output. The first element's partial-sum input
// is 0 or, with lb_sel, the array output fed back (loop-back).
//
// Matrix-vector mode (vin_mul = 1): issuing row t of a matrix M on vin in
// clock t (entry j on vin[j]) yields sum_j M(t,j)*y_j at the output P clocks
// later; P rows take 2P-1 clocks.
// Cyclic-mean mode (vin_mul = 0, multipliers bypassed): issuing P samples in
// clock t yields their sum P clocks later, exactly when the samples issued
// at t+P enter. Feeding the output back (lb_sel) therefore accumulates,
// for each of the P row positions, the sums of successive P x P blocks
// B_i * 1_P (the partitioned form of the cyclic mean).
// The shifter divides the output by Np = N/P (arithmetic shift by
// log2(Np), after dropping the guard bits) to give cm_out; with y_ld,
// cm_out is stored into register y[y_idx]. h_out is the array output
// without its guard bits, saturated to the sample format.
//
// The tags vin_vld/vin_mul travel with the operands through the delay
// lines. Partial sums are AW = DW + log2(Np) + GX bits: enough for the sum
// of Np samples, with GX guard fraction bits below the sample's LSB so that
// the P truncated products of a row do not pile up their truncation error
// (the sum is truncated once, when it leaves the array). GX = 4 is this
// design's choice; GX = 0 truncates every product to the sample format.
module msysmvm
  import ddst_pkg::*;
#(
  parameter int N = 512,
  parameter int P = 8,
  parameter int GX = 4    // guard fraction bits carried in the partial sums
) (
  input  logic                 clk,
  input  logic                 rst,
  input  cplx_t                vin [P],
  input  logic                 vin_vld,
  input  logic                 vin_mul,
  input  logic                 lb_sel,
  input  logic                 y_ld,
  input  logic [$clog2(P)-1:0] y_idx,
  output cplx_t                cm_out,
  output cplx_t                h_out
);

  localparam int NP = N / P;
  localparam int LS = $clog2(NP);
  localparam int AW = DW + LS + GX;

  typedef logic signed [AW-1:0] acc_t;

  typedef struct packed {
    logic  vld;
    logic  mul;
    cplx_t d;
  } op_t;

  acc_t  chain_re [P];  // the 1D registers after each element
  acc_t  chain_im [P];
  acc_t  nxt_re [P];
  acc_t  nxt_im [P];
  cplx_t y [P];
  op_t   op [P];        // operand reaching element j

  for (genvar j = 0; j < P; j++) begin : g_pe
    op_t  head;
    acc_t pin_re, pin_im;

    assign head = '{vld: vin_vld, mul: vin_mul, d: vin[j]};

    if (j == 0) begin : g_nodelay
      assign op[j] = head;
    end else begin : g_delay
      op_t dl [j];
      always_ff @(posedge clk) begin
        if (rst) begin
          for (int i = 0; i < j; i++) dl[i] <= '0;
        end else begin
          dl[0] <= head;
          for (int i = 1; i < j; i++) dl[i] <= dl[i-1];
        end
      end
      assign op[j] = dl[j-1];
    end

    if (j == 0) begin : g_first
      assign pin_re = lb_sel ? chain_re[P-1] : '0;
      assign pin_im = lb_sel ? chain_im[P-1] : '0;
    end else begin : g_next
      assign pin_re = chain_re[j-1];
      assign pin_im = chain_im[j-1];
    end

    sysdce_pe #(.AW(AW), .GX(GX)) u_pe (
      .vld         (op[j].vld),
      .mul_sel     (op[j].mul),
      .a           (op[j].d),
      .y           (y[j]),
      .psum_in_re  (pin_re),
      .psum_in_im  (pin_im),
      .psum_out_re (nxt_re[j]),
      .psum_out_im (nxt_im[j])
    );

    always_ff @(posedge clk) begin
      if (rst) begin
        chain_re[j] <= '0;
        chain_im[j] <= '0;
        y[j]        <= '0;
      end else begin
        chain_re[j] <= nxt_re[j];
        chain_im[j] <= nxt_im[j];
        if (y_ld && y_idx == $clog2(P)'(j)) y[j] <= cm_out;
      end
    end
  end

  function automatic smp_t sat(acc_t v);
    if (v > acc_t'(2**(DW-1) - 1))  return smp_t'(2**(DW-1) - 1);
    if (v < -acc_t'(2**(DW-1)))     return smp_t'(-(2**(DW-1)));
    return smp_t'(v);
  endfunction

  always_comb begin
    cm_out.re = smp_t'(chain_re[P-1] >>> (LS + GX));
    cm_out.im = smp_t'(chain_im[P-1] >>> (LS + GX));
    h_out.re  = sat(chain_re[P-1] >>> GX);
    h_out.im  = sat(chain_im[P-1] >>> GX);
  end

endmodule
