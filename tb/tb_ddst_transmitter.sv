// tb_ddst_transmitter: runs whole blocks through the transmitter in DDST,
// ST and bypass modes with 4-, 16- and 64-QAM, back to back, and compares
// every output sample with a reference computed here:
//   point number -> 64-QAM point (tables read off the Gray-coded map),
//   level * floor(norm * 2^16) / 8 -> b(k), plus c(k mod P) and, for DDST,
//   e_r = -floor(S_r / Np); output order: prefix N-P..N-1, then 0..N-1.
// Checks the latency (first ST/DDST sample N-P+5 edges after start_tx,
// first bypass symbol 3 edges after), that the N+P (or N) samples are
// contiguous, and that DDST removes the data's per-position mean.
module tb_ddst_transmitter;
  import ddst_pkg::*;

  localparam int N  = 512;
  localparam int P  = 8;
  localparam int NP = N / P;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       start_tx, byp_mode, data_val_tx, busy;
  tx_mode_t   tx_mode;
  map_mode_t  map_mode;
  logic [5:0] in_tx;
  cplx_t      out_tx;

  ddst_transmitter #(.N(N), .P(P), .SIGMA_C2(0.2)) dut (.*);

  int levels [8]     = '{3, 1, 5, 7, -3, -1, -5, -7};
  int qam4_pts [4]   = '{9, 13, 41, 45};
  int qam16_pts [16] = '{0, 1, 4, 5, 8, 9, 12, 13, 32, 33, 36, 37, 40, 41, 44, 45};
  longint cr [P], ci [P];

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

  function automatic real norm_of(bit byp, tx_mode_t m, map_mode_t mm);
    real q;
    case (mm)
      MAP_QAM4:  q = 1.0 / $sqrt(2.0);
      MAP_QAM16: q = 1.0 / $sqrt(10.0);
      MAP_QAM64: q = 1.0 / $sqrt(42.0);
      default:   q = 0.0;
    endcase
    if (byp) return q;
    return (m == TX_DDST) ? $sqrt(0.8 * NP / (NP - 1.0)) * q : $sqrt(0.8) * q;
  endfunction

  function automatic int qlevel(int lvl, real nrm);
    longint qn;
    qn = longint'($floor(nrm * 65536.0));
    return int'(floordiv(lvl * qn, 8));
  endfunction

  task automatic run_block(bit byp, tx_mode_t m, map_mode_t mm);
    int     sym [N];
    longint br [N], bi [N];
    longint sr [P], si [P];
    longint dr [P], di [P];
    int     t, t_first, nout, nexp, idx, pt;
    longint xr, xi;
    real    nrm;
    bit     contiguous;
    nrm = norm_of(byp, m, mm);
    for (int r = 0; r < P; r++) begin
      sr[r] = 0;
      si[r] = 0;
      dr[r] = 0;
      di[r] = 0;
    end
    for (int k = 0; k < N; k++) begin
      case (mm)
        MAP_QAM4:  begin sym[k] = $urandom_range(3);  pt = qam4_pts[sym[k]];  end
        MAP_QAM16: begin sym[k] = $urandom_range(15); pt = qam16_pts[sym[k]]; end
        default:   begin sym[k] = $urandom_range(63); pt = sym[k];            end
      endcase
      br[k] = longint'(qlevel(levels[pt / 8], nrm));
      bi[k] = longint'(qlevel(levels[pt % 8], nrm));
      sr[k % P] += br[k];
      si[k % P] += bi[k];
    end
    while (busy) @(posedge clk);
    #1;
    tx_mode  = m;
    map_mode = mm;
    byp_mode = byp;
    start_tx = 1'b1;
    @(posedge clk);
    #1 start_tx = 1'b0;
    t = 0;
    nout = 0;
    t_first = -1;
    contiguous = 1'b1;
    nexp = byp ? N : N + P;
    while (nout < nexp && t < 3 * N) begin
      in_tx = (t < N) ? 6'(sym[t]) : 6'($urandom);
      @(posedge clk);
      t++;
      #1;
      if (data_val_tx) begin
        if (t_first < 0) t_first = t;
        if (t != t_first + nout) contiguous = 1'b0;
        if (byp) begin
          idx = nout;
          xr = br[idx];
          xi = bi[idx];
        end else begin
          idx = (nout < P) ? N - P + nout : nout - P;
          xr = br[idx] + cr[idx % P];
          xi = bi[idx] + ci[idx % P];
          if (m == TX_DDST) begin
            xr += -floordiv(sr[idx % P], longint'(NP));
            xi += -floordiv(si[idx % P], longint'(NP));
          end
        end
        check(longint'(out_tx.re) == xr && longint'(out_tx.im) == xi,
              $sformatf("byp %0d mode %0d map %0d sample %0d: got %0d %0d expected %0d %0d",
                        byp, m, mm, nout, out_tx.re, out_tx.im, xr, xi));
        // DDST: after the block, the data part of every position averages to ~0.
        if (!byp && nout >= P) begin
          dr[idx % P] += longint'(out_tx.re) - cr[idx % P];
          di[idx % P] += longint'(out_tx.im) - ci[idx % P];
        end
        nout++;
      end
    end
    check(nout == nexp, $sformatf("%0d samples out, expected %0d", nout, nexp));
    check(contiguous, "output samples contiguous");
    check(t_first == (byp ? 3 : N - P + 5), $sformatf("first output after %0d edges", t_first));
    if (!byp && m == TX_DDST) begin
      for (int r = 0; r < P; r++) begin
        // Transmitted samples minus training, summed per position over the
        // block: S_r + Np*e_r, which lies in [0, Np) when e cancels the mean.
        check(dr[r] >= 0 && dr[r] < longint'(NP) && di[r] >= 0 && di[r] < longint'(NP),
              $sformatf("DDST leaves data sum %0d %0d at position %0d", dr[r], di[r], r));
      end
    end
    @(posedge clk);
    #1 check(!data_val_tx, "valid ends with the block");
  endtask

  int blocks_run;

  initial begin
    for (int n = 0; n < P; n++) begin
      cr[n] = longint'($floor($sqrt(0.2) * $cos(3.14159265358979 * n * (n + 2) / P) * 8192.0));
      ci[n] = longint'($floor($sqrt(0.2) * $sin(3.14159265358979 * n * (n + 2) / P) * 8192.0));
    end
    start_tx = 1'b0;
    tx_mode  = TX_ST;
    map_mode = MAP_QAM4;
    byp_mode = 1'b0;
    in_tx    = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    run_block(1'b0, TX_DDST, MAP_QAM4);
    run_block(1'b0, TX_ST, MAP_QAM16);
    run_block(1'b0, TX_DDST, MAP_QAM64);
    run_block(1'b1, TX_ST, MAP_QAM16);
    run_block(1'b0, TX_ST, MAP_QAM64);
    run_block(1'b1, TX_DDST, MAP_QAM64);
    run_block(1'b0, TX_DDST, MAP_QAM16);
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
