// tb_ddst_top: end-to-end link test at the default sizes (N = 512, P = 8).
// The transmitter's output stream passes through a channel modelled here
// (an 8-tap complex FIR with random taps, one clock of latency) into the
// channel estimator, which is started as the first sample of a block
// leaves the transmitter. Runs:
//   DDST 4/16/64-QAM, estimator in channel mode: the estimate must match
//     the channel within 0.004 per component;
//   DDST 16-QAM, estimator in cyclic-mean mode: CM_OUT must match C*h
//     (the channel applied to one training period) within 0.003;
//   ST 16-QAM, channel mode: an estimate (disturbed by the data) must come
//     out, within 0.5 of the channel;
//   bypass 64-QAM: N samples without prefix must come out.
// For every prefixed block the first P samples must repeat the last P.
// Each mechanism (ST, DDST, bypass, each constellation, prefix insertion,
// prefix removal, cyclic-mean mode, channel mode, loop-back accumulation,
// multiplier bypass, ICLUT rotation) is counted and must occur.
module tb_ddst_top;
  import ddst_pkg::*;

  localparam int  N  = 512;
  localparam int  P  = 8;
  localparam int  NP = N / P;
  localparam real S2 = 0.2;

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

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // ---- channel model -------------------------------------------------------
  real   hr [P], hi [P];
  real   sh_r [P], sh_i [P];   // last P transmitted samples, newest first
  bit    link_on, rx_started;
  cplx_t tx_stream [$];

  always @(posedge clk) begin
    real xr, xi;
    if (data_val_tx) begin
      for (int l = P - 1; l > 0; l--) begin
        sh_r[l] = sh_r[l-1];
        sh_i[l] = sh_i[l-1];
      end
      sh_r[0] = real'(out_tx.re) / 8192.0;
      sh_i[0] = real'(out_tx.im) / 8192.0;
      xr = 0.0;
      xi = 0.0;
      for (int l = 0; l < P; l++) begin
        xr += hr[l] * sh_r[l] - hi[l] * sh_i[l];
        xi += hr[l] * sh_i[l] + hi[l] * sh_r[l];
      end
      rx_in.re <= smp_t'(longint'($floor(xr * 8192.0)));
      rx_in.im <= smp_t'(longint'($floor(xi * 8192.0)));
      tx_stream.push_back(out_tx);
    end
  end

  // Start the estimator in the clock the first sample of a block appears.
  assign rx_start = link_on && data_val_tx && !rx_started && !rx_busy;
  always @(posedge clk) if (rx_start) rx_started <= 1'b1;

  // ---- mechanism counters --------------------------------------------------
  int n_st, n_ddst, n_byp, n_qam [4], n_cp, n_cm_mode, n_h_mode;
  int n_lb, n_bypass_mul, n_rot, n_prefix_drop;

  always @(posedge clk) begin
    if (dut.u_rx.u_cu.lb_sel)   n_lb++;
    if (dut.u_rx.u_cu.coef_sel) n_rot++;
    if (dut.u_rx.u_mvm.vin_vld && !dut.u_rx.u_mvm.vin_mul) n_bypass_mul++;
    if (dut.u_rx.u_cu.store_en && !dut.u_rx.u_datinf.we) n_prefix_drop++;
  end

  // ---- one block -----------------------------------------------------------
  cplx_t got_h [P], got_cm [P];

  task automatic run_block(bit byp, tx_mode_t m, map_mode_t mm, bit rxm, bit use_rx);
    int t, nh, ncm, nexp;
    for (int l = 0; l < P; l++) begin
      hr[l] = (real'($urandom_range(2000)) - 1000.0) / 1000.0 * 0.35;
      hi[l] = (real'($urandom_range(2000)) - 1000.0) / 1000.0 * 0.35;
      sh_r[l] = 0.0;
      sh_i[l] = 0.0;
    end
    tx_stream.delete();
    while (tx_busy || rx_busy) @(posedge clk);
    #1;
    rx_started = 1'b0;
    link_on  = use_rx;
    rx_mode  = rxm;
    tx_mode  = m;
    map_mode = mm;
    byp_mode = byp;
    start_tx = 1'b1;
    @(posedge clk);
    #1 start_tx = 1'b0;
    t = 0;
    nh = 0;
    ncm = 0;
    while (t < 1400) begin
      in_tx = 6'($urandom);
      if (done) begin
        if (nh < P) got_h[nh] = h_out;
        nh++;
      end
      if (cm_flag) begin
        if (ncm < P) got_cm[ncm] = cm_out;
        ncm++;
      end
      @(posedge clk);
      #1 t++;
    end
    link_on = 1'b0;
    nexp = byp ? N : N + P;
    check(tx_stream.size() == nexp, $sformatf("%0d samples transmitted, expected %0d", tx_stream.size(), nexp));
    if (byp) n_byp++;
    else if (m == TX_DDST) n_ddst++;
    else n_st++;
    n_qam[mm]++;
    if (!byp && tx_stream.size() == nexp) begin
      bit same;
      same = 1'b1;
      for (int i = 0; i < P; i++) same &= (tx_stream[i] == tx_stream[N + i]);
      check(same, "cyclic prefix repeats the block's last P samples");
      if (same) n_cp++;
    end
    if (use_rx && rxm) begin
      check(nh == P, $sformatf("%0d channel coefficients", nh));
      if (nh == P) n_h_mode++;
      for (int l = 0; l < P; l++) begin
        real er, ei, tol;
        er  = real'(got_h[l].re) / 8192.0 - hr[l];
        ei  = real'(got_h[l].im) / 8192.0 - hi[l];
        tol = (m == TX_DDST) ? 0.004 : 0.5;
        check(rabs(er) < tol && rabs(ei) < tol,
              $sformatf("mode %0d map %0d: tap %0d error %f %f", m, mm, l, er, ei));
      end
    end
    if (use_rx && !rxm) begin
      check(ncm == P, $sformatf("%0d cyclic-mean values", ncm));
      if (ncm == P) n_cm_mode++;
      for (int r = 0; r < P; r++) begin
        real yr, yi, cr, ci;
        yr = 0.0;
        yi = 0.0;
        for (int l = 0; l < P; l++) begin
          cr = $sqrt(S2) * $cos(3.14159265358979 * ((r - l + P) % P) * ((r - l + P) % P + 2) / P);
          ci = $sqrt(S2) * $sin(3.14159265358979 * ((r - l + P) % P) * ((r - l + P) % P + 2) / P);
          yr += hr[l] * cr - hi[l] * ci;
          yi += hr[l] * ci + hi[l] * cr;
        end
        check(rabs(real'(got_cm[r].re) / 8192.0 - yr) < 0.003 && rabs(real'(got_cm[r].im) / 8192.0 - yi) < 0.003,
              $sformatf("cyclic mean %0d: %f %f expected %f %f", r, real'(got_cm[r].re) / 8192.0,
                        real'(got_cm[r].im) / 8192.0, yr, yi));
      end
    end
  endtask

  initial begin
    start_tx = 1'b0;
    tx_mode  = TX_ST;
    map_mode = MAP_QAM4;
    byp_mode = 1'b0;
    in_tx    = '0;
    rx_mode  = 1'b0;
    link_on  = 1'b0;
    rx_started = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    run_block(1'b0, TX_DDST, MAP_QAM4,  1'b1, 1'b1);
    run_block(1'b0, TX_DDST, MAP_QAM16, 1'b1, 1'b1);
    run_block(1'b0, TX_DDST, MAP_QAM64, 1'b1, 1'b1);
    run_block(1'b0, TX_DDST, MAP_QAM16, 1'b0, 1'b1);
    run_block(1'b0, TX_ST,   MAP_QAM16, 1'b1, 1'b1);
    run_block(1'b1, TX_ST,   MAP_QAM64, 1'b0, 1'b0);
    check(n_st > 0, "ST mode exercised");
    check(n_ddst > 0, "DDST mode exercised");
    check(n_byp > 0, "bypass mode exercised");
    check(n_qam[1] > 0 && n_qam[2] > 0 && n_qam[3] > 0, "4/16/64-QAM exercised");
    check(n_cp > 0, "cyclic prefix inserted");
    check(n_prefix_drop > 0, "cyclic prefix removed");
    check(n_cm_mode > 0, "cyclic-mean-only mode exercised");
    check(n_h_mode > 0, "channel-estimate mode exercised");
    check(n_lb > 0, "loop-back accumulation exercised");
    check(n_bypass_mul > 0, "multiplier bypass exercised");
    check(n_rot > 0, "ICLUT rotation exercised");
    $display("mechanisms: ST %0d DDST %0d bypass %0d QAM4 %0d QAM16 %0d QAM64 %0d prefix-in %0d prefix-out %0d cm-mode %0d h-mode %0d loop-back %0d mult-bypass %0d rotations %0d",
             n_st, n_ddst, n_byp, n_qam[1], n_qam[2], n_qam[3], n_cp, n_prefix_drop, n_cm_mode, n_h_mode, n_lb, n_bypass_mul, n_rot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
