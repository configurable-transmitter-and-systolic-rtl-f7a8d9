// tb_training_seq_gen: checks the P stored training values against
// sigma_c*exp(j*pi*n*(n+2)/P) truncated to 13 fractional bits, and that the
// stored period has (nearly) ideal periodic autocorrelation: energy
// P*sigma_c^2 at lag 0 and almost none at the other lags.
module tb_training_seq_gen;
  import ddst_pkg::*;

  localparam int  P  = 8;
  localparam real S2 = 0.2;

  int checks = 0, failures = 0;

  logic [2:0] idx;
  cplx_t      c;
  cplx_t      got [P];

  training_seq_gen #(.P(P), .SIGMA_C2(S2)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    real ph, er, ei, ar, ai;
    for (int n = 0; n < P; n++) begin
      idx = 3'(n);
      #1;
      got[n] = c;
      ph = 3.14159265358979 * n * (n + 2) / P;
      er = $floor($sqrt(S2) * $cos(ph) * 8192.0);
      ei = $floor($sqrt(S2) * $sin(ph) * 8192.0);
      check(real'(c.re) == er && real'(c.im) == ei,
            $sformatf("n=%0d got %0d %0d expected %0d %0d", n, c.re, c.im, int'(er), int'(ei)));
    end
    for (int lag = 0; lag < P; lag++) begin
      ar = 0.0;
      ai = 0.0;
      for (int n = 0; n < P; n++) begin
        // c(n) * conj(c(n+lag))
        ar += (real'(got[n].re) * got[(n + lag) % P].re + real'(got[n].im) * got[(n + lag) % P].im) / 8192.0 / 8192.0;
        ai += (real'(got[n].im) * got[(n + lag) % P].re - real'(got[n].re) * got[(n + lag) % P].im) / 8192.0 / 8192.0;
      end
      if (lag == 0) check(ar > P * S2 * 0.999 && ar < P * S2 * 1.001, $sformatf("energy %f", ar));
      else          check(ar * ar + ai * ai < 1e-6, $sformatf("autocorrelation at lag %0d = %f %f", lag, ar, ai));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
