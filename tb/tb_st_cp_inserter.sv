// tb_st_cp_inserter: writes a block of N random words into RAM_CP and reads
// it in the transmit order (N-P..N-1, then 0..N-1), the first read one clock
// after word N-P is written while the rest is still being written, as the
// transmitter does. Checks every word and the one-clock read latency.
module tb_st_cp_inserter;
  import ddst_pkg::*;

  localparam int N = 512;
  localparam int P = 8;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       wr_en, rd_en, rd_valid;
  logic [8:0] addr_wr_st_cp, addr_rd_st_cp;
  cplx_t      wr_data, rd_data;
  cplx_t      ref_mem [N];

  st_cp_inserter #(.N(N)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  int wr_k, rd_r;
  int exp_idx [$];

  initial begin
    wr_en = 1'b0;
    rd_en = 1'b0;
    addr_wr_st_cp = '0;
    addr_rd_st_cp = '0;
    wr_data = '0;
    for (int k = 0; k < N; k++) ref_mem[k] = cplx_t'($urandom);
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wr_k = 0;
    rd_r = -1;
    while (rd_r < N + P) begin
      wr_en = (wr_k < N);
      addr_wr_st_cp = 9'(wr_k);
      wr_data = (wr_k < N) ? ref_mem[wr_k] : '0;
      rd_en = (rd_r >= 0);
      addr_rd_st_cp = 9'((rd_r < P) ? N - P + rd_r : rd_r - P);
      if (rd_en) exp_idx.push_back(int'(addr_rd_st_cp));
      @(posedge clk);
      #1;
      if (rd_en) begin
        check(rd_valid, "rd_valid one clock after rd_en");
        check(rd_data == ref_mem[exp_idx[0]], $sformatf("read of address %0d", exp_idx[0]));
        void'(exp_idx.pop_front());
      end else begin
        check(!rd_valid, "no rd_valid without a read");
      end
      if (wr_k == N - P) rd_r = 0;
      else if (rd_r >= 0) rd_r++;
      wr_k++;
    end
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
