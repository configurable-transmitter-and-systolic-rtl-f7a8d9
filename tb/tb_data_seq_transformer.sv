// tb_data_seq_transformer: drives the transformer as the transmitter does
// (one symbol per clock, addresses generated here) for a DDST block and an
// ST block of random symbols, and checks all N+P output samples:
//   ST:   s = b(k) + c(k mod P)
//   DDST: s = b(k) + c(k mod P) + e(k mod P), e_r = -floor(S_r / Np)
// in the order k = N-P..N-1 (prefix), 0..N-1. c is computed here from
// sigma_c*exp(j*pi*n*(n+2)/P). Reads start one clock after symbol N-P is
// written; the output follows each read by one clock.
module tb_data_seq_transformer;
  import ddst_pkg::*;

  localparam int N  = 512;
  localparam int P  = 8;
  localparam int NP = N / P;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  tx_mode_t   tx_mode;
  logic       b_valid, dds_first, rd_en, s_valid;
  cplx_t      b, s;
  logic [2:0] tsg_idx, addr_wr_dds, addr_rd_dds;
  logic [8:0] addr_wr_st_cp, addr_rd_st_cp;

  data_seq_transformer #(.N(N), .P(P), .SIGMA_C2(0.2)) dut (.*);

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

  longint cr [P], ci [P];

  task automatic run_block(tx_mode_t m);
    longint br [N], bi [N];
    longint sr [P], si [P];
    int     wr_k, rd_r, nout, idx;
    longint xr, xi;
    for (int r = 0; r < P; r++) begin
      sr[r] = 0;
      si[r] = 0;
    end
    for (int k = 0; k < N; k++) begin
      br[k] = longint'($urandom_range(8000)) - 4000;
      bi[k] = longint'($urandom_range(8000)) - 4000;
      sr[k % P] += br[k];
      si[k % P] += bi[k];
    end
    tx_mode = m;
    wr_k = 0;
    rd_r = -1;
    nout = 0;
    while (nout < N + P) begin
      b_valid       = (wr_k < N);
      b.re          = smp_t'((wr_k < N) ? br[wr_k] : 0);
      b.im          = smp_t'((wr_k < N) ? bi[wr_k] : 0);
      tsg_idx       = 3'(wr_k % P);
      addr_wr_dds   = 3'(wr_k % P);
      addr_wr_st_cp = 9'(wr_k);
      dds_first     = (wr_k < P);
      rd_en         = (rd_r >= 0 && rd_r < N + P);
      addr_rd_st_cp = 9'((rd_r < P) ? N - P + rd_r : rd_r - P);
      addr_rd_dds   = 3'(rd_r % P);
      @(posedge clk);
      #1;
      if (s_valid) begin
        idx = (nout < P) ? N - P + nout : nout - P;
        xr = br[idx] + cr[idx % P];
        xi = bi[idx] + ci[idx % P];
        if (m == TX_DDST) begin
          xr += -floordiv(sr[idx % P], longint'(NP));
          xi += -floordiv(si[idx % P], longint'(NP));
        end
        check(longint'(s.re) == xr && longint'(s.im) == xi,
              $sformatf("mode %0d output %0d: got %0d %0d expected %0d %0d", m, nout, s.re, s.im, xr, xi));
        nout++;
      end
      if (wr_k == N - P) rd_r = 0;
      else if (rd_r >= 0) rd_r++;
      wr_k++;
    end
    b_valid = 1'b0;
    rd_en   = 1'b0;
    @(posedge clk);
    #1 check(!s_valid, "output ends after N+P samples");
  endtask

  initial begin
    for (int n = 0; n < P; n++) begin
      cr[n] = longint'($floor($sqrt(0.2) * $cos(3.14159265358979 * n * (n + 2) / P) * 8192.0));
      ci[n] = longint'($floor($sqrt(0.2) * $sin(3.14159265358979 * n * (n + 2) / P) * 8192.0));
    end
    b_valid = 1'b0;
    rd_en = 1'b0;
    b = '0;
    tx_mode = TX_ST;
    tsg_idx = '0;
    addr_wr_dds = '0;
    addr_rd_dds = '0;
    addr_wr_st_cp = '0;
    addr_rd_st_cp = '0;
    dds_first = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    run_block(TX_DDST);
    run_block(TX_ST);
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
