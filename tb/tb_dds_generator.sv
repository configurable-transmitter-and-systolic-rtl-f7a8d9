// tb_dds_generator: feeds two blocks of N random complex symbols, one per
// clock, and after each reads RAM_DDS for Np+1 sweeps. Every output must be
// e_r = -floor(S_r / Np), where S_r is the sum of the symbols at positions
// r, r+P, r+2P, ... computed here. Also checks that adding e_r to every
// symbol removes the per-position mean (the DDST property) to within one
// LSB, that the second block starts its sums afresh, and the one-clock read
// latency.
module tb_dds_generator;
  import ddst_pkg::*;

  localparam int N  = 512;
  localparam int P  = 8;
  localparam int NP = N / P;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       ena_gen_dds, first_row, ena_rd_dds, out_valid;
  logic [2:0] addr_wr_dds, addr_rd_dds;
  cplx_t      in_dds, out_dds;

  dds_generator #(.N(N), .P(P)) dut (.*);

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

  task automatic run_block(int amp);
    longint sr [P], si [P];
    longint er, ei;
    for (int r = 0; r < P; r++) begin
      sr[r] = 0;
      si[r] = 0;
    end
    for (int k = 0; k < N; k++) begin
      in_dds.re   = smp_t'($signed($urandom_range(2 * amp)) - amp);
      in_dds.im   = smp_t'($signed($urandom_range(2 * amp)) - amp);
      sr[k % P]  += longint'(in_dds.re);
      si[k % P]  += longint'(in_dds.im);
      ena_gen_dds = 1'b1;
      first_row   = (k < P);
      addr_wr_dds = 3'(k % P);
      @(posedge clk);
      #1;
    end
    ena_gen_dds = 1'b0;
    for (int r = 0; r < (NP + 1) * P; r++) begin
      ena_rd_dds  = 1'b1;
      addr_rd_dds = 3'(r % P);
      @(posedge clk);
      #1;
      er = -floordiv(sr[r % P], longint'(NP));
      ei = -floordiv(si[r % P], longint'(NP));
      check(out_valid, "valid one clock after read");
      check(longint'(out_dds.re) == er && longint'(out_dds.im) == ei,
            $sformatf("read %0d: got %0d %0d expected %0d %0d", r, out_dds.re, out_dds.im, er, ei));
      if (r < P) begin
        // Residual mean after adding e: |S + Np*e| < Np.
        check((sr[r] + NP * longint'(out_dds.re)) < longint'(NP) && (sr[r] + NP * longint'(out_dds.re)) >= 0,
              "data mean removed");
      end
    end
    ena_rd_dds = 1'b0;
    @(posedge clk);
    #1 check(!out_valid, "valid drops");
  endtask

  initial begin
    ena_gen_dds = 1'b0;
    first_row   = 1'b0;
    ena_rd_dds  = 1'b0;
    addr_wr_dds = '0;
    addr_rd_dds = '0;
    in_dds      = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    run_block(8000);
    run_block(3000);
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
