// tb_sym_adequator: checks the point-number re-coding of the symbol
// adequator for all symbols of 4-, 16- and 64-QAM against point tables
// written out from the Gray-coded 64-QAM constellation map: 4-QAM points
// 0..3 sit on 64-QAM points 9, 13, 41, 45; 16-QAM points 0..15 on
// 0,1,4,5,8,9,12,13,32,33,36,37,40,41,44,45. Also checks the one-clock
// latency of addresses and valid.
module tb_sym_adequator;
  import ddst_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       in_valid, out_valid;
  logic [5:0] sym_in;
  map_mode_t  map_mode;
  logic [2:0] addr_i, addr_q;

  sym_adequator dut (.*);

  int qam4_pts [4]   = '{9, 13, 41, 45};
  int qam16_pts [16] = '{0, 1, 4, 5, 8, 9, 12, 13, 32, 33, 36, 37, 40, 41, 44, 45};

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  task automatic apply(map_mode_t m, int s, int exp_pt);
    map_mode = m;
    sym_in   = 6'(s);
    in_valid = 1'b1;
    @(posedge clk);
    #1;
    check(out_valid, "valid one clock after input");
    check({addr_i, addr_q} == 6'(exp_pt),
          $sformatf("mode %0d sym %0d: got point %0d, expected %0d", m, s, {addr_i, addr_q}, exp_pt));
  endtask

  initial begin
    in_valid = 1'b0;
    sym_in   = '0;
    map_mode = MAP_QAM4;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int s = 0; s < 4; s++)  apply(MAP_QAM4, s, qam4_pts[s]);
    for (int s = 0; s < 16; s++) apply(MAP_QAM16, s, qam16_pts[s]);
    for (int s = 0; s < 64; s++) apply(MAP_QAM64, s, s);
    in_valid = 1'b0;
    @(posedge clk);
    #1 check(!out_valid, "valid drops");
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
