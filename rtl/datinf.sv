// datinf: data input feeder of the systolic channel estimator.
//
// Stores one received block so that the systolic array can read it as
// P-wide columns. The block arrives as N+P samples, one per clock while
// store_en is high; the first P (the cyclic prefix) are dropped. Sample
// k = 0..N-1 of x is written into a bank of P memories, each Np = N/P
// words deep, with hard-wired addressing: with LP = log2(P),
//   blk_num  = k[log2(N)-1 : 2*LP]   (block B_i, Np/P blocks of P x P)
//   mem_num  = k[2*LP-1 : LP]        (column of the block = memory index)
//   mem_addr = {blk_num, k[LP-1:0]}  (row of the block, blocks stacked)
// i.e. blk_num = floor(k/P^2), mem_num = floor(k/P) mod P and
// mem_addr = (k mod P) + P*blk_num. Reading address t = 0..Np-1 from all
// memories at once returns row (t mod P) of block B_(t/P): the P samples
// x[(t/P)*P^2 + j*P + (t mod P)], j = 0..P-1, whose sum is one element of
// B_i * 1_P.
//
// Requires N to be a multiple of P^2 (Np/P whole blocks). Timing: reads are
// registered, rd_data and rd_valid follow rd_en by one clock; a word
// written in one clock can be read from the next. start resets the sample
// counter.
module datinf
  import ddst_pkg::*;
#(
  parameter int N = 512,
  parameter int P = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic                    store_en,
  input  cplx_t                   in_data,
  input  logic                    rd_en,
  input  logic [$clog2(N/P)-1:0]  rd_addr,
  output cplx_t                   rd_data [P],
  output logic                    rd_valid
);

  localparam int NP = N / P;
  localparam int LN = $clog2(N);
  localparam int LP = $clog2(P);
  localparam int LS = $clog2(N + P);

  logic [LS-1:0]     s_cnt;     // sample count including the prefix
  logic [LN-1:0]     k;         // index of the sample within x
  logic              we;
  logic [LP-1:0]     mem_num;
  logic [LN-LP-1:0]  mem_addr;

  always_ff @(posedge clk) begin
    if (rst || start)  s_cnt <= '0;
    else if (store_en) s_cnt <= s_cnt + 1'b1;
  end

  always_comb begin
    k        = LN'(s_cnt - LS'(P));
    we       = store_en && (s_cnt >= LS'(P));
    mem_num  = k[2*LP-1:LP];
    mem_addr = {k[LN-1:2*LP], k[LP-1:0]};
  end

  for (genvar j = 0; j < P; j++) begin : g_bank
    cplx_t mem [NP];

    always_ff @(posedge clk) begin
      if (we && mem_num == LP'(j)) mem[mem_addr] <= in_data;
    end

    always_ff @(posedge clk) begin
      if (rd_en) rd_data[j] <= mem[rd_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) rd_valid <= 1'b0;
    else     rd_valid <= rd_en;
  end

endmodule
