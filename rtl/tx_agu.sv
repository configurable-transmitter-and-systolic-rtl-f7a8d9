// tx_agu: transmit address generation unit.
//
// Produces every address the data sequence transformer needs for one
// block of N symbols:
//   * write side, advanced by wr_en (one mapped symbol b(k) per pulse):
//     k itself is the RAM_CP write address, k mod P addresses the training
//     LUT and RAM_DDS, and dds_first marks the first period (k < P), in
//     which the data-dependent accumulator starts from zero;
//   * cp_rd_start pulses when symbol k = N-P is written: from the next
//     clock the stored ST sequence can be read while the last P symbols are
//     still arriving;
//   * read side, advanced by rd_en over N+P reads: RAM_CP is read at
//     N-P..N-1 (the cyclic prefix) and then at 0..N-1; RAM_DDS is read at
//     (read count) mod P, i.e. its P entries are swept N/P+1 times.
// clr restarts both counters for a new block. All outputs are decoded
// combinationally from the two counters.
module tx_agu #(
  parameter int N = 512,
  parameter int P = 8
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      clr,
  input  logic                      wr_en,
  input  logic                      rd_en,
  output logic [$clog2(P)-1:0]      tsg_idx,
  output logic [$clog2(N)-1:0]      addr_wr_st_cp,
  output logic [$clog2(P)-1:0]      addr_wr_dds,
  output logic                      dds_first,
  output logic                      cp_rd_start,
  output logic                      wr_last,
  output logic [$clog2(N)-1:0]      addr_rd_st_cp,
  output logic [$clog2(P)-1:0]      addr_rd_dds,
  output logic                      rd_last
);

  localparam int LN = $clog2(N);
  localparam int LP = $clog2(P);
  localparam int LR = $clog2(N + P);

  logic [LN-1:0] wr_cnt;
  logic [LR-1:0] rd_cnt;

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      wr_cnt <= '0;
      rd_cnt <= '0;
    end else begin
      if (wr_en) wr_cnt <= wr_cnt + 1'b1;
      if (rd_en) rd_cnt <= rd_cnt + 1'b1;
    end
  end

  always_comb begin
    addr_wr_st_cp = wr_cnt;
    tsg_idx       = wr_cnt[LP-1:0];
    addr_wr_dds   = wr_cnt[LP-1:0];
    dds_first     = (wr_cnt < LN'(P));
    cp_rd_start   = wr_en && (wr_cnt == LN'(N - P));
    wr_last       = wr_en && (wr_cnt == LN'(N - 1));
    if (rd_cnt < LR'(P)) addr_rd_st_cp = LN'(rd_cnt + LR'(N - P));
    else                 addr_rd_st_cp = LN'(rd_cnt - LR'(P));
    addr_rd_dds   = rd_cnt[LP-1:0];
    rd_last       = rd_en && (rd_cnt == LR'(N + P - 1));
  end

endmodule
