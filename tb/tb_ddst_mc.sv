// tb_ddst_mc: Monte Carlo test of the DDST link with noise, at the default
// sizes (N = 512, P = 8, training power 0.2).
//
// Each trial sends one DDST 4-QAM block from the transmitter through a
// random Rayleigh channel of P taps (independent complex Gaussian taps of
// variance 1/P) and adds complex white Gaussian noise of variance
// 10^(-SNR/10) (unit transmit power, unit mean channel energy). The
// received samples are quantised to the sample format and fed to the
// channel estimator in channel-estimate mode.
//
// For each trial the testbench also runs a floating-point reference
// estimator on the same quantised samples: cyclic mean over the Np periods
// after the prefix, then h = C^-1 y with C^-1 obtained from the ideal
// training sequence via the DFT. It checks:
//   * per trial: the fixed-point estimate matches the reference with a
//     signal-to-quantisation-noise ratio of at least 50 dB, and of at least
//     60 dB on average over all trials;
//   * per SNR: the mean square error of both estimators against the true
//     channel agree within 0.5 dB and lie within 2 dB of the DDST figure
//     sigma_n^2 / (N * sigma_c^2) per tap (for a training sequence with a
//     flat spectrum, noise is the only error left once the data are
//     cancelled);
//   * the error falls as the SNR rises.
// SNR points and the number of trials per point are localparams.
module tb_ddst_mc;
  import ddst_pkg::*;

  localparam int  N      = 512;
  localparam int  P      = 8;
  localparam int  NP     = N / P;
  localparam real S2     = 0.2;
  localparam int  NSNR   = 6;
  localparam int  TRIALS = 10;
  localparam real PI_R   = 3.14159265358979;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       start_tx, byp_mode, data_val_tx, tx_busy;
  tx_mode_t   tx_mode;
  map_mode_t  map_mode;
  logic [5:0] in_tx;
  cplx_t      out_tx;
  logic       rx_start, rx_mode, cm_flag, done, rx_busy;
  cplx_t      rx_in, cm_out, h_out;

  ddst_top dut (.*);

  initial begin
    #(20_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  function automatic real uni();
    return (real'($urandom) + 1.0) / 4294967296.0;
  endfunction

  // standard normal sample (Box-Muller)
  function automatic real gauss();
    return $sqrt(-2.0 * $ln(uni())) * $cos(2.0 * PI_R * uni());
  endfunction

  function automatic real db(real v);
    return 10.0 * $log10(v);
  endfunction

  function automatic smp_t sat(real v);
    real s;
    s = $floor(v * 8192.0);
    if (s > 32767.0) s = 32767.0;
    if (s < -32768.0) s = -32768.0;
    return smp_t'(longint'(s));
  endfunction

  // ---- channel and noise -----------------------------------------------------
  real   hr [P], hi [P];
  real   sh_r [P], sh_i [P];
  real   sn;                    // noise standard deviation per component
  bit    link_on, rx_started;
  real   xq_r [$], xq_i [$];    // received samples as the estimator sees them

  always @(posedge clk) begin
    real xr, xi;
    if (data_val_tx) begin
      for (int l = P - 1; l > 0; l--) begin
        sh_r[l] = sh_r[l-1];
        sh_i[l] = sh_i[l-1];
      end
      sh_r[0] = real'(out_tx.re) / 8192.0;
      sh_i[0] = real'(out_tx.im) / 8192.0;
      xr = sn * gauss();
      xi = sn * gauss();
      for (int l = 0; l < P; l++) begin
        xr += hr[l] * sh_r[l] - hi[l] * sh_i[l];
        xi += hr[l] * sh_i[l] + hi[l] * sh_r[l];
      end
      rx_in.re <= sat(xr);
      rx_in.im <= sat(xi);
      xq_r.push_back(real'(sat(xr)) / 8192.0);
      xq_i.push_back(real'(sat(xi)) / 8192.0);
    end
  end

  assign rx_start = link_on && data_val_tx && !rx_started && !rx_busy;
  always @(posedge clk) if (rx_start) rx_started <= 1'b1;

  // ---- floating-point reference estimator ------------------------------------
  real gr [P], gi [P];          // first column of C^-1

  task automatic make_cinv();
    real cr [P], ci [P], lr [P], li [P], m2;
    for (int n = 0; n < P; n++) begin
      cr[n] = $sqrt(S2) * $cos(PI_R * n * (n + 2) / P);
      ci[n] = $sqrt(S2) * $sin(PI_R * n * (n + 2) / P);
    end
    for (int k = 0; k < P; k++) begin
      lr[k] = 0.0;
      li[k] = 0.0;
      for (int n = 0; n < P; n++) begin
        lr[k] += cr[n] * $cos(2.0 * PI_R * k * n / P) + ci[n] * $sin(2.0 * PI_R * k * n / P);
        li[k] += ci[n] * $cos(2.0 * PI_R * k * n / P) - cr[n] * $sin(2.0 * PI_R * k * n / P);
      end
    end
    for (int m = 0; m < P; m++) begin
      gr[m] = 0.0;
      gi[m] = 0.0;
      for (int k = 0; k < P; k++) begin
        real ir, ii, wr, wi;
        m2 = lr[k] * lr[k] + li[k] * li[k];
        ir = lr[k] / m2;
        ii = -li[k] / m2;
        wr = $cos(2.0 * PI_R * k * m / P);
        wi = $sin(2.0 * PI_R * k * m / P);
        gr[m] += (ir * wr - ii * wi) / P;
        gi[m] += (ir * wi + ii * wr) / P;
      end
    end
  endtask

  // ---- one trial ---------------------------------------------------------------
  real fr [P], fi [P];          // reference estimate
  real qr [P], qi [P];          // hardware estimate

  task automatic run_trial(output int nh);
    int t;
    real yr [P], yi [P];
    for (int l = 0; l < P; l++) begin
      hr[l] = gauss() * $sqrt(0.5 / P);
      hi[l] = gauss() * $sqrt(0.5 / P);
      sh_r[l] = 0.0;
      sh_i[l] = 0.0;
    end
    xq_r.delete();
    xq_i.delete();
    while (tx_busy || rx_busy) @(posedge clk);
    #1;
    rx_started = 1'b0;
    link_on  = 1'b1;
    start_tx = 1'b1;
    @(posedge clk);
    #1 start_tx = 1'b0;
    nh = 0;
    for (t = 0; t < 1400; t++) begin
      in_tx = 6'($urandom_range(3));
      if (done && nh < P) begin
        qr[nh] = real'(h_out.re) / 8192.0;
        qi[nh] = real'(h_out.im) / 8192.0;
        nh++;
      end
      @(posedge clk);
      #1;
    end
    link_on = 1'b0;
    for (int r = 0; r < P; r++) begin
      yr[r] = 0.0;
      yi[r] = 0.0;
    end
    if (xq_r.size() == N + P)
      for (int k = 0; k < N; k++) begin
        yr[k % P] += xq_r[P + k] / NP;
        yi[k % P] += xq_i[P + k] / NP;
      end
    for (int l = 0; l < P; l++) begin
      fr[l] = 0.0;
      fi[l] = 0.0;
      for (int m = 0; m < P; m++) begin
        int d;
        d = (l - m + P) % P;
        fr[l] += gr[d] * yr[m] - gi[d] * yi[m];
        fi[l] += gr[d] * yi[m] + gi[d] * yr[m];
      end
    end
  endtask

  real snr_db [NSNR] = '{5.0, 10.0, 15.0, 20.0, 25.0, 30.0};

  initial begin
    real mse_hw [NSNR], mse_fl [NSNR], sqnr_sum;
    int  nh, n_trials;
    start_tx = 1'b0;
    tx_mode  = TX_DDST;
    map_mode = MAP_QAM4;
    byp_mode = 1'b0;
    rx_mode  = 1'b1;
    in_tx    = '0;
    link_on  = 1'b0;
    rx_started = 1'b0;
    sn = 0.0;
    make_cinv();
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    sqnr_sum = 0.0;
    n_trials = 0;
    for (int s = 0; s < NSNR; s++) begin
      real theory;
      sn = $sqrt(0.5 * $pow(10.0, -snr_db[s] / 10.0));
      mse_hw[s] = 0.0;
      mse_fl[s] = 0.0;
      for (int tr = 0; tr < TRIALS; tr++) begin
        real pf, pe, sq;
        run_trial(nh);
        check(nh == P, $sformatf("SNR %0.0f trial %0d: %0d coefficients", snr_db[s], tr, nh));
        check(xq_r.size() == N + P, "N+P samples received");
        pf = 0.0;
        pe = 0.0;
        for (int l = 0; l < P; l++) begin
          pf += fr[l] * fr[l] + fi[l] * fi[l];
          pe += (qr[l] - fr[l]) * (qr[l] - fr[l]) + (qi[l] - fi[l]) * (qi[l] - fi[l]);
          mse_hw[s] += ((qr[l] - hr[l]) * (qr[l] - hr[l]) + (qi[l] - hi[l]) * (qi[l] - hi[l])) / (TRIALS * P);
          mse_fl[s] += ((fr[l] - hr[l]) * (fr[l] - hr[l]) + (fi[l] - hi[l]) * (fi[l] - hi[l])) / (TRIALS * P);
        end
        sq = db(pf / (pe + 1.0e-30));
        sqnr_sum += sq;
        n_trials++;
        check(sq >= 50.0, $sformatf("SNR %0.0f trial %0d: SQNR %0.1f dB", snr_db[s], tr, sq));
      end
      theory = 2.0 * sn * sn / (N * S2);
      $display("SNR %4.1f dB: MSE fixed-point %e, floating-point %e, theory %e", snr_db[s], mse_hw[s], mse_fl[s], theory);
      check(db(mse_hw[s] / mse_fl[s]) < 0.5 && db(mse_hw[s] / mse_fl[s]) > -0.5,
            $sformatf("SNR %0.0f: fixed-point MSE %e against floating-point %e", snr_db[s], mse_hw[s], mse_fl[s]));
      check(db(mse_fl[s] / theory) < 2.0 && db(mse_fl[s] / theory) > -2.0,
            $sformatf("SNR %0.0f: MSE %e against theory %e", snr_db[s], mse_fl[s], theory));
      if (s > 0) check(mse_hw[s] < mse_hw[s-1], $sformatf("MSE falls from %0.0f to %0.0f dB", snr_db[s-1], snr_db[s]));
    end
    $display("trials %0d, mean estimator SQNR %0.1f dB", n_trials, sqnr_sum / n_trials);
    check(sqnr_sum / n_trials >= 60.0, $sformatf("mean SQNR %0.1f dB", sqnr_sum / n_trials));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
