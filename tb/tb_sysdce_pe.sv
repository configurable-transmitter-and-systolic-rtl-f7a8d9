// tb_sysdce_pe: random operands through the processing element, checking
// the three cases against integer arithmetic done here, with GX = 4 guard
// bits in the partial sum: multiply (psum + floor((a*y) / 2^(15-GX)) per
// component of the complex product), bypass (psum + a * 2^GX) and invalid
// operand (psum unchanged).
module tb_sysdce_pe;
  import ddst_pkg::*;

  localparam int AW = 26;
  localparam int GX = 4;

  int checks = 0, failures = 0;

  logic                 vld, mul_sel;
  cplx_t                a, y;
  logic signed [AW-1:0] psum_in_re, psum_in_im, psum_out_re, psum_out_im;

  sysdce_pe #(.AW(AW), .GX(GX)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  function automatic longint floordiv(longint n, longint d);
    longint q;
    q = n / d;
    if ((n % d != 0) && ((n < 0) != (d < 0))) q = q - 1;
    return q;
  endfunction

  initial begin
    longint er, ei, pr, pi;
    for (int i = 0; i < 3000; i++) begin
      vld        = ($urandom_range(5) != 0);
      mul_sel    = 1'($urandom_range(1));
      a          = cplx_t'($urandom);
      y          = cplx_t'($urandom);
      psum_in_re = AW'($signed($urandom_range(1 << 24)) - (1 << 23));
      psum_in_im = AW'($signed($urandom_range(1 << 24)) - (1 << 23));
      #1;
      pr = longint'(a.re) * y.re - longint'(a.im) * y.im;
      pi = longint'(a.re) * y.im + longint'(a.im) * y.re;
      if (!vld) begin
        er = longint'(psum_in_re);
        ei = longint'(psum_in_im);
      end else if (mul_sel) begin
        er = longint'(psum_in_re) + floordiv(pr, 1 << (15 - GX));
        ei = longint'(psum_in_im) + floordiv(pi, 1 << (15 - GX));
      end else begin
        er = longint'(psum_in_re) + longint'(a.re) * (1 << GX);
        ei = longint'(psum_in_im) + longint'(a.im) * (1 << GX);
      end
      check(longint'(psum_out_re) == er && longint'(psum_out_im) == ei,
            $sformatf("vld %0d mul %0d: got %0d %0d expected %0d %0d", vld, mul_sel,
                      psum_out_re, psum_out_im, er, ei));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
