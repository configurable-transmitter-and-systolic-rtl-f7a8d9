// sysdce_cu: control unit of the systolic DDST channel estimator.
//
// A pulse on start (while idle) begins one estimation; mode selects the
// cyclic mean only (0) or the full channel estimate (1). Everything is
// scheduled from one cycle counter t (t = 1 in the clock after start).
// With S = N+P and Np = N/P:
//   store_en  t = 1 .. S             N+P input samples into DATINF
//   rd_en     t = S .. S+Np-1        DATINF address t-S, all P memories
//                                     (the operands reach the array at
//                                      t = S+1 .. S+Np)
//   lb_sel    t = S+1+P .. S+Np      loop-back: add the previous block's
//                                     sums for the same row positions
//   y_ld      t = S+Np+1 .. S+Np+P   cyclic mean y_r leaves the shifter,
//                                     r = t-(S+Np+1); stored in y_r;
//                                     cm_flag in mode 0
//   mode 1 only:
//   coef_sel  t = S+Np+P .. S+Np+2P-1 ICLUT rows 0..P-1 enter the array
//                                     (multipliers on), ICLUT rotates
//   done      t = S+Np+2P .. S+Np+3P-1 h_0 .. h_(P-1) on H_OUT
// The last cyclic-mean value is thus presented (N+P)+(Np+P-1) clock edges
// after the edge that samples start, and the last channel coefficient
// 2P-1 edges later (591 and 606 at N = 512, P = 8).
module sysdce_cu #(
  parameter int N = 512,
  parameter int P = 8
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  logic                   mode,
  output logic                   store_en,
  output logic                   rd_en,
  output logic [$clog2(N/P)-1:0] rd_addr,
  output logic                   lb_sel,
  output logic                   y_ld,
  output logic [$clog2(P)-1:0]   y_idx,
  output logic                   coef_sel,
  output logic                   cm_flag,
  output logic                   done,
  output logic                   busy
);

  localparam int NP = N / P;
  localparam int S  = N + P;
  localparam int T_CM_END = S + NP + P;        // last cyclic-mean output
  localparam int T_H_END  = S + NP + 3*P - 1;  // last channel coefficient
  localparam int TW = $clog2(T_H_END + 1);

  typedef logic [TW-1:0] cnt_t;

  cnt_t t;
  logic run_mode;

  always_ff @(posedge clk) begin
    if (rst) begin
      t        <= '0;
      run_mode <= 1'b0;
    end else if (t == '0) begin
      if (start) begin
        t        <= cnt_t'(1);
        run_mode <= mode;
      end
    end else if ((!run_mode && t == cnt_t'(T_CM_END)) || t == cnt_t'(T_H_END)) begin
      t <= '0;
    end else begin
      t <= t + 1'b1;
    end
  end

  function automatic logic in_range(cnt_t v, int lo, int hi);
    return (int'(v) >= lo) && (int'(v) <= hi);
  endfunction

  always_comb begin
    busy     = (t != '0);
    store_en = in_range(t, 1, S);
    rd_en    = in_range(t, S, S + NP - 1);
    rd_addr  = $clog2(NP)'(t - cnt_t'(S));
    lb_sel   = in_range(t, S + 1 + P, S + NP);
    y_ld     = in_range(t, S + NP + 1, S + NP + P);
    y_idx    = $clog2(P)'(t - cnt_t'(S + NP + 1));
    cm_flag  = y_ld && !run_mode;
    coef_sel = run_mode && in_range(t, S + NP + P, S + NP + 2*P - 1);
    done     = run_mode && in_range(t, S + NP + 2*P, T_H_END);
  end

endmodule
