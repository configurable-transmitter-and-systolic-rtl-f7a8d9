// tb_qam_mapper: checks every constellation level and every normalisation
// setting of the mapper. The expected values are computed here from the
// Gray-coded level table and from sigma_b (ST: sqrt(1 - 0.2), DDST:
// sqrt(0.8*Np/(Np-1))) and 1/sqrt(2, 10, 42), quantised as the design
// specifies (constant truncated to 16 fractional bits, product truncated to
// 13), for the levels each constellation uses. Also checks the average symbol power of each full constellation
// in bypass mode (1.0) and the one-clock latency.
module tb_qam_mapper;
  import ddst_pkg::*;

  localparam int  N  = 512;
  localparam int  P  = 8;
  localparam int  NP = N / P;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       in_valid, out_valid, sbyp_mode;
  logic [2:0] addr_i, addr_q;
  tx_mode_t   stx_mode;
  map_mode_t  smod_mode;
  cplx_t      out_mapp;

  qam_mapper #(.N(N), .P(P), .SIGMA_C2(0.2)) dut (.*);

  int levels [8] = '{3, 1, 5, 7, -3, -1, -5, -7};

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  function automatic real norm_of(bit byp, bit ddst, int m);
    real q, sb;
    case (m)
      1: q = 1.0 / $sqrt(2.0);
      2: q = 1.0 / $sqrt(10.0);
      3: q = 1.0 / $sqrt(42.0);
      default: q = 0.0;
    endcase
    sb = ddst ? $sqrt(0.8 * NP / (NP - 1.0)) : $sqrt(0.8);
    return byp ? q : sb * q;
  endfunction

  function automatic int expect_val(int lvl, real nrm);
    longint qn;
    qn = longint'($floor(nrm * 65536.0));
    return int'($floor(real'(lvl * qn) / 8.0));
  endfunction

  initial begin
    real pw;
    in_valid  = 1'b0;
    addr_i    = '0;
    addr_q    = '0;
    sbyp_mode = 1'b0;
    stx_mode  = TX_ST;
    smod_mode = MAP_QAM4;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int byp = 0; byp < 2; byp++)
      for (int dd = 0; dd < 2; dd++)
        for (int m = 0; m < 4; m++)
          for (int a = 0; a < 64; a++) begin
            // Only the levels a constellation uses: +-1 (4-QAM), +-1, +-3 (16-QAM).
            if (m == 1 && !(levels[a / 8] inside {1, -1} && levels[a % 8] inside {1, -1})) continue;
            if (m == 2 && !(levels[a / 8] inside {1, -1, 3, -3} && levels[a % 8] inside {1, -1, 3, -3})) continue;
            sbyp_mode = byp[0];
            stx_mode  = tx_mode_t'(dd[0]);
            smod_mode = map_mode_t'(m[1:0]);
            addr_i    = 3'(a / 8);
            addr_q    = 3'(a % 8);
            in_valid  = 1'b1;
            @(posedge clk);
            #1;
            check(out_valid, "valid");
            check(int'(out_mapp.re) == expect_val(levels[a / 8], norm_of(byp[0], dd[0], m)) &&
                  int'(out_mapp.im) == expect_val(levels[a % 8], norm_of(byp[0], dd[0], m)),
                  $sformatf("byp %0d ddst %0d mode %0d addr %0d: got %0d %0d", byp, dd, m, a,
                            out_mapp.re, out_mapp.im));
          end
    // Unit average power of full 64-QAM in bypass.
    pw = 0.0;
    sbyp_mode = 1'b1;
    smod_mode = MAP_QAM64;
    for (int a = 0; a < 64; a++) begin
      addr_i = 3'(a / 8);
      addr_q = 3'(a % 8);
      @(posedge clk);
      #1 pw += (real'(out_mapp.re) ** 2 + real'(out_mapp.im) ** 2) / (8192.0 ** 2);
    end
    pw = pw / 64.0;
    check(pw > 0.999 && pw < 1.0001, $sformatf("64-QAM bypass power %f", pw));
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
