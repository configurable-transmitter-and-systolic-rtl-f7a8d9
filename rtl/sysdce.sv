// sysdce: systolic DDST channel estimator.
//
// Estimates the P-tap channel impulse response from one received block of
// a data-dependent superimposed training system. Because the transmitter
// cancels the data's per-position mean, the cyclic mean of the received
// block, y_r = (1/Np) * sum_i x(iP + r), equals C*h (C the circulant matrix
// of the training period), so h = C^-1 y. Both steps run on one systolic
// array:
//   1. storage: N+P samples on IN; the prefix is dropped and DATINF stores
//      the block column-wise in P memories;
//   2. cyclic mean: Np clocks of P parallel reads; the array sums with its
//      multipliers bypassed and loops its output back, the shifter divides
//      by Np, and y is left in the array's y registers;
//   3. channel estimate (mode = 1): the ICLUT streams the rows of C^-1
//      into the array, which now multiplies; h_0..h_(P-1) leave on H_OUT.
// The multiplexers in front of the array choose DATINF (phase 2) or ICLUT
// (phase 3) operands. Timing and the exact clock schedule are given in
// sysdce_cu: the last cyclic-mean value appears N+P+Np+P-1 clock edges
// after start is sampled, the last channel coefficient 2P-1 edges later.
//
// Interface: pulse start while busy is low, with mode; present one sample
// per clock on in_data during the N+P clocks that follow. cm_flag (mode 0)
// marks the P clocks in which cm_out carries y_0..y_(P-1); done (mode 1)
// marks the P clocks in which h_out carries h_0..h_(P-1), in order.
module sysdce
  import ddst_pkg::*;
#(
  parameter int  N        = 512,
  parameter int  P        = 8,
  parameter real SIGMA_C2 = 0.2
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  logic  mode,
  input  cplx_t in_data,
  output cplx_t cm_out,
  output logic  cm_flag,
  output cplx_t h_out,
  output logic  done,
  output logic  busy
);

  localparam int NP = N / P;

  logic                    store_en, rd_en, lb_sel, y_ld, coef_sel, dat_vld;
  logic [$clog2(NP)-1:0]   rd_addr;
  logic [$clog2(P)-1:0]    y_idx;
  cplx_t                   dat [P];
  cplx_t                   coef [P];
  cplx_t                   vin [P];

  sysdce_cu #(.N(N), .P(P)) u_cu (
    .clk      (clk),
    .rst      (rst),
    .start    (start),
    .mode     (mode),
    .store_en (store_en),
    .rd_en    (rd_en),
    .rd_addr  (rd_addr),
    .lb_sel   (lb_sel),
    .y_ld     (y_ld),
    .y_idx    (y_idx),
    .coef_sel (coef_sel),
    .cm_flag  (cm_flag),
    .done     (done),
    .busy     (busy)
  );

  datinf #(.N(N), .P(P)) u_datinf (
    .clk      (clk),
    .rst      (rst),
    .start    (start && !busy),
    .store_en (store_en),
    .in_data  (in_data),
    .rd_en    (rd_en),
    .rd_addr  (rd_addr),
    .rd_data  (dat),
    .rd_valid (dat_vld)
  );

  iclut #(.P(P), .SIGMA_C2(SIGMA_C2)) u_iclut (
    .clk    (clk),
    .rst    (rst),
    .rot_en (coef_sel),
    .coef   (coef)
  );

  // Operand multiplexers: DATINF (0) or ICLUT (1).
  always_comb begin
    for (int j = 0; j < P; j++) vin[j] = coef_sel ? coef[j] : dat[j];
  end

  msysmvm #(.N(N), .P(P)) u_mvm (
    .clk     (clk),
    .rst     (rst),
    .vin     (vin),
    .vin_vld (coef_sel || dat_vld),
    .vin_mul (coef_sel),
    .lb_sel  (lb_sel),
    .y_ld    (y_ld),
    .y_idx   (y_idx),
    .cm_out  (cm_out),
    .h_out   (h_out)
  );

endmodule
