// tb_msysmvm: drives the systolic array directly.
// Phase 1, cyclic mean: Np clocks of P random samples with the multipliers
// bypassed and the loop-back on from clock P; the P outputs of the last
// sweep must be floor(T_r / Np), T_r being the sum of all samples issued in
// clocks r, r+P, r+2P, ... (computed here). They are loaded into the y
// registers. Phase 2, matrix-vector product: P rows of a random Q0.15
// matrix M; output t must be floor(sum_j floor(M(t,j)*y_j / 2^11) / 2^4)
// (per real component of the complex product: products kept with 4 guard
// bits, which are dropped at the output), saturated to 16 bits. Each output is
// expected exactly P clocks after its operands were issued.
module tb_msysmvm;
  import ddst_pkg::*;

  localparam int N  = 512;
  localparam int P  = 8;
  localparam int NP = N / P;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  cplx_t      vin [P];
  logic       vin_vld, vin_mul, lb_sel, y_ld;
  logic [2:0] y_idx;
  cplx_t      cm_out, h_out;

  msysmvm #(.N(N), .P(P)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  function automatic longint floordiv(longint a, longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  function automatic longint sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  cplx_t  x [NP][P];
  cplx_t  m [P][P];
  longint tr [P], ti [P], yr [P], yi [P];

  initial begin
    int tau, r;
    longint er, ei, pr, pi;
    for (int j = 0; j < P; j++) vin[j] = '0;
    vin_vld = 1'b0;
    vin_mul = 1'b0;
    lb_sel  = 1'b0;
    y_ld    = 1'b0;
    y_idx   = '0;
    for (int q = 0; q < P; q++) begin
      tr[q] = 0;
      ti[q] = 0;
    end
    for (int c = 0; c < NP; c++)
      for (int j = 0; j < P; j++) begin
        x[c][j].re = smp_t'($signed($urandom_range(16000)) - 8000);
        x[c][j].im = smp_t'($signed($urandom_range(16000)) - 8000);
        tr[c % P] += longint'(x[c][j].re);
        ti[c % P] += longint'(x[c][j].im);
      end
    for (int t = 0; t < P; t++)
      for (int j = 0; j < P; j++) m[t][j] = cplx_t'($urandom);
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // Phase 1
    for (int c = 0; c < NP + P; c++) begin
      vin_vld = (c < NP);
      vin_mul = 1'b0;
      lb_sel  = (c >= P) && (c < NP);
      for (int j = 0; j < P; j++) vin[j] = (c < NP) ? x[c][j] : '0;
      @(posedge clk);
      #1;
      y_ld = 1'b0;
      tau = c - P + 1;
      if (tau >= NP - P && tau < NP) begin
        r = tau - (NP - P);
        er = floordiv(tr[r], longint'(NP));
        ei = floordiv(ti[r], longint'(NP));
        check(longint'(cm_out.re) == er && longint'(cm_out.im) == ei,
              $sformatf("cyclic mean %0d: got %0d %0d expected %0d %0d", r, cm_out.re, cm_out.im, er, ei));
        yr[r] = er;
        yi[r] = ei;
        y_ld  = 1'b1;
        y_idx = 3'(r);
      end
    end
    // Phase 2
    for (int c = 0; c < 2 * P; c++) begin
      vin_vld = (c < P);
      vin_mul = (c < P);
      lb_sel  = 1'b0;
      for (int j = 0; j < P; j++) vin[j] = (c < P) ? m[c][j] : '0;
      @(posedge clk);
      #1;
      y_ld = 1'b0;
      tau = c - P + 1;
      if (tau >= 0 && tau < P) begin
        er = 0;
        ei = 0;
        for (int j = 0; j < P; j++) begin
          pr = longint'(m[tau][j].re) * yr[j] - longint'(m[tau][j].im) * yi[j];
          pi = longint'(m[tau][j].re) * yi[j] + longint'(m[tau][j].im) * yr[j];
          er += floordiv(pr, 1 << 11);
          ei += floordiv(pi, 1 << 11);
        end
        er = floordiv(er, 16);
        ei = floordiv(ei, 16);
        check(longint'(h_out.re) == sat16(er) && longint'(h_out.im) == sat16(ei),
              $sformatf("product row %0d: got %0d %0d expected %0d %0d", tau, h_out.re, h_out.im, er, ei));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
