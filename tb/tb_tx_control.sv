// tb_tx_control: checks the transmit sequencer. For an ST/DDST block:
// modes are latched at start_tx (later changes of the inputs are ignored),
// in_valid is high for exactly N consecutive clocks after start_tx, rd_en
// rises one clock after cp_rd_start and stays high until rd_last, busy
// covers the block and start_tx is ignored while busy. For a bypass block:
// no read phase and the block ends at wr_last.
module tb_tx_control;
  import ddst_pkg::*;

  localparam int N = 32;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic      start_tx, byp_mode, cp_rd_start, wr_last, rd_last;
  logic      agu_clr, in_valid, rd_en, sbyp_mode, busy;
  tx_mode_t  tx_mode, stx_mode;
  map_mode_t map_mode, smod_mode;

  tx_control #(.N(N)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  task automatic run_block(bit byp, tx_mode_t tm, map_mode_t mm);
    int nin, nrd;
    tx_mode  = tm;
    map_mode = mm;
    byp_mode = byp;
    start_tx = 1'b1;
    #1 check(agu_clr, "agu_clr with start_tx");
    @(posedge clk);
    #1 start_tx = 1'b0;
    tx_mode  = tx_mode_t'(~tm);
    map_mode = MAP_OFF;
    byp_mode = ~byp;
    check(stx_mode == tm && smod_mode == mm && sbyp_mode == byp, "modes latched");
    check(busy, "busy after start");
    nin = 0;
    while (in_valid) begin
      nin++;
      @(posedge clk);
      #1;
    end
    check(nin == N, $sformatf("in_valid for %0d clocks", nin));
    // A start while busy must be ignored.
    start_tx = 1'b1;
    #1 check(!agu_clr, "start ignored while busy");
    @(posedge clk);
    #1 start_tx = 1'b0;
    if (byp) begin
      repeat (2) @(posedge clk);
      #1 check(!rd_en, "no read phase in bypass");
      wr_last = 1'b1;
      @(posedge clk);
      #1 wr_last = 1'b0;
      check(!busy, "bypass block ends at wr_last");
    end else begin
      check(!rd_en, "no read before cp_rd_start");
      cp_rd_start = 1'b1;
      @(posedge clk);
      #1 cp_rd_start = 1'b0;
      nrd = 0;
      while (rd_en && nrd < 1000) begin
        nrd++;
        rd_last = (nrd == N + 8);
        @(posedge clk);
        #1 rd_last = 1'b0;
      end
      check(nrd == N + 8, $sformatf("rd_en for %0d clocks", nrd));
      check(!busy, "block ends at rd_last");
    end
  endtask

  initial begin
    start_tx = 1'b0;
    cp_rd_start = 1'b0;
    wr_last = 1'b0;
    rd_last = 1'b0;
    tx_mode = TX_ST;
    map_mode = MAP_QAM4;
    byp_mode = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(!busy && !in_valid && !rd_en, "idle after reset");
    run_block(1'b0, TX_DDST, MAP_QAM16);
    run_block(1'b0, TX_ST, MAP_QAM64);
    run_block(1'b1, TX_ST, MAP_QAM4);
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
