// tb_sysdce_cu: checks the estimator's clock schedule for both modes.
// Counting t = 1 in the clock after start, each control output must be high
// exactly in its window (S = N+P): store_en 1..S, rd_en S..S+Np-1 with
// rd_addr = t-S, lb_sel S+1+P..S+Np, y_ld S+Np+1..S+Np+P with y_idx counting
// 0..P-1, cm_flag = y_ld in mode 0, coef_sel S+Np+P..S+Np+2P-1 and done
// S+Np+2P..S+Np+3P-1 in mode 1 only; busy until the last window ends.
// The last cm_flag/done clocks give the latencies 591 and 606 at N=512,
// P=8. Also checks that start is ignored while busy.
module tb_sysdce_cu;
  localparam int N  = 512;
  localparam int P  = 8;
  localparam int NP = N / P;
  localparam int S  = N + P;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       start, mode, store_en, rd_en, lb_sel, y_ld, coef_sel, cm_flag, done, busy;
  logic [5:0] rd_addr;
  logic [2:0] y_idx;

  sysdce_cu #(.N(N), .P(P)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  function automatic bit win(int t, int lo, int hi);
    return t >= lo && t <= hi;
  endfunction

  task automatic run(bit m);
    int t, last_cm, last_done, t_end;
    bit ok;
    mode  = m;
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    t = 1;
    last_cm = -1;
    last_done = -1;
    t_end = m ? S + NP + 3 * P - 1 : S + NP + P;
    while (t <= t_end + 2) begin
      if (t == 100) start = 1'b1;   // must be ignored
      ok = (store_en == win(t, 1, S)) && (rd_en == win(t, S, S + NP - 1)) &&
           (lb_sel == win(t, S + 1 + P, S + NP)) && (y_ld == win(t, S + NP + 1, S + NP + P)) &&
           (cm_flag == (!m && win(t, S + NP + 1, S + NP + P))) &&
           (coef_sel == (m && win(t, S + NP + P, S + NP + 2 * P - 1))) &&
           (done == (m && win(t, S + NP + 2 * P, S + NP + 3 * P - 1))) &&
           (busy == (t <= t_end));
      check(ok, $sformatf("mode %0d t=%0d: store %0d rd %0d lb %0d y_ld %0d cm %0d coef %0d done %0d busy %0d",
                          m, t, store_en, rd_en, lb_sel, y_ld, cm_flag, coef_sel, done, busy));
      if (rd_en) check(rd_addr == 6'(t - S), "rd_addr");
      if (y_ld)  check(y_idx == 3'(t - (S + NP + 1)), "y_idx");
      if (cm_flag) last_cm = t;
      if (done)    last_done = t;
      @(posedge clk);
      #1 start = 1'b0;
      t++;
    end
    // The value presented in clock t follows t-1 edges after the start edge.
    if (!m) check(last_cm - 1 == (N + P) + (NP + P - 1), $sformatf("cyclic mean latency %0d", last_cm - 1));
    else    check(last_done - 1 == (N + P) + (NP + P - 1) + 2 * P - 1, $sformatf("estimate latency %0d", last_done - 1));
  endtask

  initial begin
    start = 1'b0;
    mode  = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    run(1'b0);
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
