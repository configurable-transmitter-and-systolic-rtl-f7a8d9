// tb_tx_sqnr: signal-to-quantisation-noise ratio of the transmitter against
// a floating-point model, at the default sizes (N = 512, P = 8, training
// power 0.2).
//
// 102 blocks of random point numbers are sent, 17 in each of the six
// configurations (ST and DDST, each with 4/16/64-QAM). For every block the
// testbench builds the ideal transmitted sequence in floating point:
// b(k) = level * sigma_b * (QAM normalisation) from the Gray-coded
// constellation, c(k) = sigma_c * exp(j*pi*k(k+2)/P), and for DDST
// e(k) = -(mean of the b at the same position modulo P), with
// sigma_b^2 = 1 - sigma_c^2 (ST) or (1 - sigma_c^2) * Np/(Np-1) (DDST);
// the last P samples are repeated in front as the cyclic prefix. The SQNR of
// a block is 10*log10(sum |s|^2 / sum |s_hw - s|^2). It must be at least
// 65 dB for every block; the mean of each configuration is printed. The
// average transmit power of the model must also come out near 1.
// Spectrum: the DFT of the N block samples (prefix removed) at the P pilot
// bins m*Np is compared with Np times the DFT of one training period. In
// DDST mode the data are cancelled there, so the residual must lie 40 dB
// below the pilots; in ST mode the data remain and it must lie within
// 20 dB of them.
module tb_tx_sqnr;
  import ddst_pkg::*;

  localparam int  N      = 512;
  localparam int  P      = 8;
  localparam int  NP     = N / P;
  localparam real S2     = 0.2;
  localparam int  TRIALS = 17;
  localparam real PI_R   = 3.14159265358979;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       start_tx, byp_mode, data_val_tx, busy;
  tx_mode_t   tx_mode;
  map_mode_t  map_mode;
  logic [5:0] in_tx;
  cplx_t      out_tx;

  ddst_transmitter dut (.*);

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

  // Gray level of a 3-bit axis code
  function automatic real level(int code);
    case (code)
      0: return  3.0;
      1: return  1.0;
      2: return  5.0;
      3: return  7.0;
      4: return -3.0;
      5: return -1.0;
      6: return -5.0;
      default: return -7.0;
    endcase
  endfunction

  cplx_t hw [$];
  tx_mode_t  modes [2] = '{TX_ST, TX_DDST};
  map_mode_t maps  [3] = '{MAP_QAM4, MAP_QAM16, MAP_QAM64};
  always @(posedge clk) if (data_val_tx) hw.push_back(out_tx);

  // one block; returns its SQNR and the model's mean power
  task automatic run_block(tx_mode_t m, map_mode_t mm, output real sqnr, output real pwr, output real leak);
    int  pt [N];
    real br [N], bi [N], sr [N], si [N], mr [P], mi [P];
    real nq, sb, ps, pe;
    int  ci, cq;
    nq = (mm == MAP_QAM4) ? 2.0 : (mm == MAP_QAM16) ? 10.0 : 42.0;
    sb = (m == TX_DDST) ? $sqrt((1.0 - S2) * NP / (NP - 1.0)) : $sqrt(1.0 - S2);
    for (int r = 0; r < P; r++) begin
      mr[r] = 0.0;
      mi[r] = 0.0;
    end
    for (int k = 0; k < N; k++) begin
      pt[k] = (mm == MAP_QAM4) ? $urandom_range(3) : (mm == MAP_QAM16) ? $urandom_range(15) : $urandom_range(63);
      case (mm)
        MAP_QAM4: begin
          ci = 4 * ((pt[k] >> 1) & 1) + 1;
          cq = 4 * (pt[k] & 1) + 1;
        end
        MAP_QAM16: begin
          ci = 4 * ((pt[k] >> 3) & 1) + ((pt[k] >> 2) & 1);
          cq = 4 * ((pt[k] >> 1) & 1) + (pt[k] & 1);
        end
        default: begin
          ci = (pt[k] >> 3) & 7;
          cq = pt[k] & 7;
        end
      endcase
      br[k] = level(ci) * sb / $sqrt(nq);
      bi[k] = level(cq) * sb / $sqrt(nq);
      mr[k % P] += br[k] / NP;
      mi[k % P] += bi[k] / NP;
    end
    for (int k = 0; k < N; k++) begin
      sr[k] = br[k] + $sqrt(S2) * $cos(PI_R * (k % P) * ((k % P) + 2) / P);
      si[k] = bi[k] + $sqrt(S2) * $sin(PI_R * (k % P) * ((k % P) + 2) / P);
      if (m == TX_DDST) begin
        sr[k] -= mr[k % P];
        si[k] -= mi[k % P];
      end
    end
    hw.delete();
    while (busy) @(posedge clk);
    #1;
    tx_mode  = m;
    map_mode = mm;
    byp_mode = 1'b0;
    start_tx = 1'b1;
    @(posedge clk);
    #1 start_tx = 1'b0;
    for (int k = 0; k < N; k++) begin
      in_tx = 6'(pt[k]);
      @(posedge clk);
      #1;
    end
    while (busy) @(posedge clk);
    repeat (3) @(posedge clk);
    #1;
    check(hw.size() == N + P, $sformatf("%0d samples, expected %0d", hw.size(), N + P));
    ps = 0.0;
    pe = 0.0;
    if (hw.size() == N + P)
      for (int i = 0; i < N + P; i++) begin
        int k;
        real dr, di;
        k  = (i < P) ? N - P + i : i - P;
        dr = real'(hw[i].re) / 8192.0 - sr[k];
        di = real'(hw[i].im) / 8192.0 - si[k];
        ps += sr[k] * sr[k] + si[k] * si[k];
        pe += dr * dr + di * di;
      end
    sqnr = 10.0 * $log10(ps / (pe + 1.0e-30));
    pwr  = ps / (N + P);
    // pilot bins of the hardware spectrum
    ps = 0.0;
    pe = 0.0;
    if (hw.size() == N + P)
      for (int mb = 0; mb < P; mb++) begin
        real xr, xi, tr, ti, w;
        xr = 0.0;
        xi = 0.0;
        tr = 0.0;
        ti = 0.0;
        for (int k = 0; k < N; k++) begin
          w   = 2.0 * PI_R * mb * NP * k / N;
          xr += (real'(hw[P + k].re) * $cos(w) + real'(hw[P + k].im) * $sin(w)) / 8192.0;
          xi += (real'(hw[P + k].im) * $cos(w) - real'(hw[P + k].re) * $sin(w)) / 8192.0;
        end
        for (int n = 0; n < P; n++) begin
          real cr, ci;
          w   = 2.0 * PI_R * mb * n / P;
          cr  = $sqrt(S2) * $cos(PI_R * n * (n + 2) / P);
          ci  = $sqrt(S2) * $sin(PI_R * n * (n + 2) / P);
          tr += NP * (cr * $cos(w) + ci * $sin(w));
          ti += NP * (ci * $cos(w) - cr * $sin(w));
        end
        ps += tr * tr + ti * ti;
        pe += (xr - tr) * (xr - tr) + (xi - ti) * (xi - ti);
      end
    leak = 10.0 * $log10((pe + 1.0e-30) / ps);
  endtask

  initial begin
    real sqnr, pwr, leak, sum_sq, sum_pw, max_lk;
    start_tx = 1'b0;
    tx_mode  = TX_ST;
    map_mode = MAP_QAM4;
    byp_mode = 1'b0;
    in_tx    = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    foreach (modes[a])
      foreach (maps[b]) begin
        sum_sq = 0.0;
        sum_pw = 0.0;
        max_lk = -1000.0;
        for (int t = 0; t < TRIALS; t++) begin
          run_block(modes[a], maps[b], sqnr, pwr, leak);
          if (leak > max_lk) max_lk = leak;
          if (modes[a] == TX_DDST)
            check(leak < -40.0, $sformatf("DDST block %0d: data at the pilot bins %0.1f dB", t, leak));
          else
            check(leak > -20.0, $sformatf("ST block %0d: data at the pilot bins %0.1f dB", t, leak));
          sum_sq += sqnr;
          sum_pw += pwr;
          check(sqnr >= 65.0, $sformatf("%s %0d-QAM block %0d: SQNR %0.1f dB",
                modes[a] == TX_DDST ? "DDST" : "ST", 1 << (2 * maps[b]), t, sqnr));
        end
        $display("%-4s %0d-QAM: mean SQNR %0.1f dB, mean power %0.3f, data at pilot bins at most %0.1f dB",
                 modes[a] == TX_DDST ? "DDST" : "ST", 1 << (2 * maps[b]), sum_sq / TRIALS, sum_pw / TRIALS, max_lk);
        check(sum_pw / TRIALS > 0.9 && sum_pw / TRIALS < 1.1, $sformatf("mean power %0.3f", sum_pw / TRIALS));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
