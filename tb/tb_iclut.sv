// tb_iclut: checks the inverse-C ring. After reset it must hold the first
// row of C^-1, and after t rotations row t: the product of the presented
// row with the columns of C (circulant of the training period c, computed
// here from sigma_c*exp(j*pi*n*(n+2)/P)) must be row t of the identity, to
// within the Q0.15 quantisation. Also checks the rotation pattern itself
// (Reg_j(t+1) = Reg_(j-1)(t)), that the ring holds when rot_en is low and
// that it returns to row 0 after P rotations.
module tb_iclut;
  import ddst_pkg::*;

  localparam int  P  = 8;
  localparam real S2 = 0.2;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic  rot_en;
  cplx_t coef [P];
  cplx_t row0 [P], prev [P];

  iclut #(.P(P), .SIGMA_C2(S2)) dut (.*);

  real cr [P], ci [P];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  task automatic check_row(int t);
    real sr, si, gr, gi;
    for (int m = 0; m < P; m++) begin
      // (C^-1 C)(t, m) = sum_j G(t, j) * C(j, m), C(j, m) = c((j - m) mod P)
      sr = 0.0;
      si = 0.0;
      for (int j = 0; j < P; j++) begin
        gr = real'(coef[j].re) / 32768.0;
        gi = real'(coef[j].im) / 32768.0;
        sr += gr * cr[(j - m + P) % P] - gi * ci[(j - m + P) % P];
        si += gr * ci[(j - m + P) % P] + gi * cr[(j - m + P) % P];
      end
      check(((m == t) ? (sr > 0.999 && sr < 1.001) : (sr > -0.001 && sr < 0.001)) && si > -0.001 && si < 0.001,
            $sformatf("row %0d column %0d of C^-1 C = %f %f", t, m, sr, si));
    end
  endtask

  initial begin
    for (int n = 0; n < P; n++) begin
      cr[n] = $sqrt(S2) * $cos(3.14159265358979 * n * (n + 2) / P);
      ci[n] = $sqrt(S2) * $sin(3.14159265358979 * n * (n + 2) / P);
    end
    rot_en = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    row0 = coef;
    check_row(0);
    repeat (3) @(posedge clk);
    #1 check(coef == row0, "ring holds without rot_en");
    for (int t = 1; t <= P; t++) begin
      prev = coef;
      rot_en = 1'b1;
      @(posedge clk);
      #1 rot_en = 1'b0;
      check_row(t % P);
      for (int j = 0; j < P; j++)
        check(coef[j] == prev[(j + P - 1) % P], $sformatf("rotation of Reg_%0d", j));
    end
    check(coef == row0, "back at row 0 after P rotations");
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
