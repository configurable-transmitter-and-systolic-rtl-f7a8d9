// tb_sysdce: whole-estimator test.
// Block A (mode 0): random received samples; the P cyclic-mean values on
// CM_OUT (cm_flag) must equal floor(sum_i x(iP+r) / Np), computed here, and
// the last one must come 591 clock edges after start (equation (21)).
// Block B (mode 1): a block built here as the noise-free channel output of
// the training sequence plus data whose per-position mean is zero (what a
// DDST transmitter sends), x(k) = sum_l h_l (c+d)((k-l) mod N) with a random
// 8-tap channel h. The estimate on H_OUT (done) must be within 0.003 of h
// in every component, and the last coefficient must come 606 edges after
// start (equation (22)). It is also compared with C^-1 y computed here in
// floating point through C^-1 = C^H / (P sigma_c^2), which holds because
// the training period has ideal periodic autocorrelation.
module tb_sysdce;
  import ddst_pkg::*;

  localparam int  N  = 512;
  localparam int  P  = 8;
  localparam int  NP = N / P;
  localparam real S2 = 0.2;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic  start, mode, cm_flag, done, busy;
  cplx_t in_data, cm_out, h_out;

  sysdce #(.N(N), .P(P), .SIGMA_C2(S2)) dut (.*);

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

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  real   cr [P], ci [P];
  cplx_t x [N + P];
  cplx_t got_cm [P], got_h [P];
  int    last_cm, last_h;

  // Feed x after a start pulse and collect the outputs; t counts edges after
  // the start edge.
  task automatic run(bit m);
    int t, ncm, nh;
    while (busy) @(posedge clk);
    #1;
    mode  = m;
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    t = 0;
    ncm = 0;
    nh = 0;
    last_cm = -1;
    last_h = -1;
    while (t < 700) begin
      in_data = (t < N + P) ? x[t] : cplx_t'($urandom);
      if (cm_flag) begin
        if (ncm < P) got_cm[ncm] = cm_out;
        ncm++;
        last_cm = t;
      end
      if (done) begin
        if (nh < P) got_h[nh] = h_out;
        nh++;
        last_h = t;
      end
      @(posedge clk);
      #1 t++;
    end
    check(ncm == (m ? 0 : P), $sformatf("%0d cyclic-mean outputs", ncm));
    check(nh == (m ? P : 0), $sformatf("%0d channel outputs", nh));
  endtask

  initial begin
    longint sr [P], si [P];
    real    hr [P], hi [P], dr [N], di [N], yr [P], yi [P], er, ei, xr, xi, mr [P], mi [P];
    for (int n = 0; n < P; n++) begin
      cr[n] = $sqrt(S2) * $cos(3.14159265358979 * n * (n + 2) / P);
      ci[n] = $sqrt(S2) * $sin(3.14159265358979 * n * (n + 2) / P);
    end
    start = 1'b0;
    mode = 1'b0;
    in_data = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // Block A: cyclic mean only.
    for (int r = 0; r < P; r++) begin
      sr[r] = 0;
      si[r] = 0;
    end
    for (int s = 0; s < N + P; s++) begin
      x[s].re = smp_t'($signed($urandom_range(20000)) - 10000);
      x[s].im = smp_t'($signed($urandom_range(20000)) - 10000);
      if (s >= P) begin
        sr[(s - P) % P] += longint'(x[s].re);
        si[(s - P) % P] += longint'(x[s].im);
      end
    end
    run(1'b0);
    for (int r = 0; r < P; r++)
      check(longint'(got_cm[r].re) == floordiv(sr[r], longint'(NP)) && longint'(got_cm[r].im) == floordiv(si[r], longint'(NP)),
            $sformatf("cyclic mean %0d: got %0d %0d", r, got_cm[r].re, got_cm[r].im));
    // t counts the edges after the start edge.
    check(last_cm == (N + P) + (NP + P - 1), $sformatf("cyclic-mean latency %0d", last_cm));

    // Block B: channel estimate of a DDST-like block.
    for (int l = 0; l < P; l++) begin
      hr[l] = (real'($urandom_range(2000)) - 1000.0) / 1000.0 * 0.5 / $sqrt(P);
      hi[l] = (real'($urandom_range(2000)) - 1000.0) / 1000.0 * 0.5 / $sqrt(P);
    end
    for (int r = 0; r < P; r++) begin
      mr[r] = 0.0;
      mi[r] = 0.0;
    end
    for (int k = 0; k < N; k++) begin
      dr[k] = (real'($urandom_range(2)) - 1.0) * 0.6;
      di[k] = (real'($urandom_range(2)) - 1.0) * 0.6;
      mr[k % P] += dr[k] / NP;
      mi[k % P] += di[k] / NP;
    end
    for (int k = 0; k < N; k++) begin
      dr[k] = dr[k] - mr[k % P] + cr[k % P];
      di[k] = di[k] - mi[k % P] + ci[k % P];
    end
    for (int s = 0; s < N + P; s++) begin
      int k;
      k = (s + N - P) % N;  // prefix: last P samples first
      xr = 0.0;
      xi = 0.0;
      for (int l = 0; l < P; l++) begin
        xr += hr[l] * dr[(k - l + N) % N] - hi[l] * di[(k - l + N) % N];
        xi += hr[l] * di[(k - l + N) % N] + hi[l] * dr[(k - l + N) % N];
      end
      x[s].re = smp_t'(longint'($floor(xr * 8192.0)));
      x[s].im = smp_t'(longint'($floor(xi * 8192.0)));
    end
    // Floating-point cyclic mean of the quantised block and C^H y / (P sigma_c^2).
    for (int r = 0; r < P; r++) begin
      yr[r] = 0.0;
      yi[r] = 0.0;
    end
    for (int s = P; s < N + P; s++) begin
      yr[(s - P) % P] += real'(x[s].re) / 8192.0 / NP;
      yi[(s - P) % P] += real'(x[s].im) / 8192.0 / NP;
    end
    run(1'b1);
    for (int i = 0; i < P; i++) begin
      er = 0.0;
      ei = 0.0;
      for (int j = 0; j < P; j++) begin
        // (C^H)(i, j) = conj(c((j - i) mod P))
        er += (cr[(j - i + P) % P] * yr[j] + ci[(j - i + P) % P] * yi[j]) / (P * S2);
        ei += (cr[(j - i + P) % P] * yi[j] - ci[(j - i + P) % P] * yr[j]) / (P * S2);
      end
      xr = real'(got_h[i].re) / 8192.0;
      xi = real'(got_h[i].im) / 8192.0;
      check(rabs(xr - er) < 0.002 && rabs(xi - ei) < 0.002,
            $sformatf("h[%0d] = %f %f, C^-1 y = %f %f", i, xr, xi, er, ei));
      check(rabs(xr - hr[i]) < 0.003 && rabs(xi - hi[i]) < 0.003,
            $sformatf("h[%0d] = %f %f, channel %f %f", i, xr, xi, hr[i], hi[i]));
    end
    check(last_h == (N + P) + (NP + P - 1) + 2 * P - 1, $sformatf("estimate latency %0d", last_h));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
