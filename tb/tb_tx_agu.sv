// tb_tx_agu: drives the address generator through a block with gaps in the
// write and read enables and checks every address and strobe against the
// expected sequences: write address k, training/DDS address k mod P,
// first-period flag for k < P, cp_rd_start at k = N-P, wr_last at k = N-1;
// read addresses N-P..N-1 then 0..N-1 for RAM_CP, (count mod P) for RAM_DDS,
// rd_last on read N+P-1. Finally checks that clr restarts both counters.
module tb_tx_agu;
  localparam int N = 64;
  localparam int P = 8;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       clr, wr_en, rd_en, dds_first, cp_rd_start, wr_last, rd_last;
  logic [2:0] tsg_idx, addr_wr_dds, addr_rd_dds;
  logic [5:0] addr_wr_st_cp, addr_rd_st_cp;

  tx_agu #(.N(N), .P(P)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    clr = 1'b0;
    wr_en = 1'b0;
    rd_en = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    clr = 1'b1;
    @(posedge clk);
    #1 clr = 1'b0;
    for (int k = 0; k < N; k++) begin
      wr_en = 1'b0;
      if ($urandom_range(3) == 0) begin
        #1 check(!cp_rd_start && !wr_last, "no strobes without wr_en");
        @(posedge clk);
        #1;
      end
      wr_en = 1'b1;
      #1;
      check(addr_wr_st_cp == 6'(k) && tsg_idx == 3'(k % P) && addr_wr_dds == 3'(k % P),
            $sformatf("write addresses at k=%0d", k));
      check(dds_first == (k < P), $sformatf("dds_first at k=%0d", k));
      check(cp_rd_start == (k == N - P), $sformatf("cp_rd_start at k=%0d", k));
      check(wr_last == (k == N - 1), $sformatf("wr_last at k=%0d", k));
      @(posedge clk);
      #1;
    end
    wr_en = 1'b0;
    for (int r = 0; r < N + P; r++) begin
      rd_en = 1'b0;
      if ($urandom_range(3) == 0) begin
        @(posedge clk);
        #1;
      end
      rd_en = 1'b1;
      #1;
      check(addr_rd_st_cp == 6'((r < P) ? N - P + r : r - P), $sformatf("RAM_CP read address at r=%0d: %0d", r, addr_rd_st_cp));
      check(addr_rd_dds == 3'(r % P), $sformatf("RAM_DDS read address at r=%0d", r));
      check(rd_last == (r == N + P - 1), $sformatf("rd_last at r=%0d", r));
      @(posedge clk);
      #1;
    end
    rd_en = 1'b0;
    clr = 1'b1;
    @(posedge clk);
    #1 clr = 1'b0;
    check(addr_wr_st_cp == 0 && addr_rd_st_cp == 6'(N - P), "clr restarts the counters");
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
