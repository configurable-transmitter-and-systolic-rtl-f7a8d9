// tb_datinf: stores a block of N+P random samples (the first P are the
// prefix and must be dropped), then reads every address. Reading address t
// must return, from memory j, sample x[(t/P)*P^2 + j*P + (t mod P)] of the
// block without prefix (equations for blk_num, mem_num, mem_addr), one
// clock after rd_en. Done twice to check that start restarts the storing.
module tb_datinf;
  import ddst_pkg::*;

  localparam int N  = 512;
  localparam int P  = 8;
  localparam int NP = N / P;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       start, store_en, rd_en, rd_valid;
  cplx_t      in_data;
  logic [5:0] rd_addr;
  cplx_t      rd_data [P];

  datinf #(.N(N), .P(P)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  task automatic run_block();
    cplx_t x [N + P];
    bit    ok;
    for (int s = 0; s < N + P; s++) x[s] = cplx_t'($urandom);
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    for (int s = 0; s < N + P; s++) begin
      store_en = 1'b1;
      in_data  = x[s];
      @(posedge clk);
      #1;
    end
    store_en = 1'b0;
    for (int t = 0; t < NP; t++) begin
      rd_en   = 1'b1;
      rd_addr = 6'(t);
      @(posedge clk);
      #1;
      check(rd_valid, "rd_valid");
      for (int j = 0; j < P; j++) begin
        ok = (rd_data[j] == x[P + (t / P) * P * P + j * P + (t % P)]);
        check(ok, $sformatf("address %0d memory %0d", t, j));
      end
    end
    rd_en = 1'b0;
  endtask

  initial begin
    start = 1'b0;
    store_en = 1'b0;
    rd_en = 1'b0;
    rd_addr = '0;
    in_data = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    run_block();
    run_block();
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
