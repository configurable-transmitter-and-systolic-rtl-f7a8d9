// data_seq_transformer: the affine transform s = A b + c of one block,
// with the cyclic prefix attached.
//
// Write side (one mapped symbol b(k) per clock while b_valid):
//   * the training sequence generator supplies c(k mod P), which a complex
//     adder superimposes on b(k); the ST sequence b(k)+c(k) is stored in
//     the cyclic-prefix buffer RAM_CP at address k;
//   * b(k) also enters the data-dependent sequence generator, which
//     accumulates the per-position sums.
// Read side (rd_en, N+P reads): RAM_CP returns the ST sequence with its
// prefix and the DDS generator returns e(k) for the same positions. The
// output multiplexer gives b+c+e for DDST (tx_mode = TX_DDST, A = I - G)
// and b+c for ST (tx_mode = TX_ST, A = I).
//
// All addresses come from the transmit address generator. Timing: s and
// s_valid follow rd_en by one clock (registered RAM reads), then pass the
// final adder and multiplexer combinationally.
module data_seq_transformer
  import ddst_pkg::*;
#(
  parameter int  N        = 512,
  parameter int  P        = 8,
  parameter real SIGMA_C2 = 0.2
) (
  input  logic                 clk,
  input  logic                 rst,
  input  tx_mode_t             tx_mode,
  input  logic                 b_valid,
  input  cplx_t                b,
  input  logic [$clog2(P)-1:0] tsg_idx,
  input  logic [$clog2(N)-1:0] addr_wr_st_cp,
  input  logic [$clog2(P)-1:0] addr_wr_dds,
  input  logic                 dds_first,
  input  logic                 rd_en,
  input  logic [$clog2(N)-1:0] addr_rd_st_cp,
  input  logic [$clog2(P)-1:0] addr_rd_dds,
  output cplx_t                s,
  output logic                 s_valid
);

  cplx_t c, st, st_rd, e_rd;
  logic  st_valid, e_valid;

  training_seq_gen #(.P(P), .SIGMA_C2(SIGMA_C2)) u_tsg (
    .idx (tsg_idx),
    .c   (c)
  );

  always_comb begin
    st.re = b.re + c.re;
    st.im = b.im + c.im;
  end

  st_cp_inserter #(.N(N)) u_cp (
    .clk           (clk),
    .rst           (rst),
    .wr_en         (b_valid),
    .addr_wr_st_cp (addr_wr_st_cp),
    .wr_data       (st),
    .rd_en         (rd_en),
    .addr_rd_st_cp (addr_rd_st_cp),
    .rd_data       (st_rd),
    .rd_valid      (st_valid)
  );

  dds_generator #(.N(N), .P(P)) u_dds (
    .clk         (clk),
    .rst         (rst),
    .ena_gen_dds (b_valid),
    .first_row   (dds_first),
    .in_dds      (b),
    .addr_wr_dds (addr_wr_dds),
    .ena_rd_dds  (rd_en),
    .addr_rd_dds (addr_rd_dds),
    .out_dds     (e_rd),
    .out_valid   (e_valid)
  );

  always_comb begin
    if (tx_mode == TX_DDST) begin
      s.re = st_rd.re + e_rd.re;
      s.im = st_rd.im + e_rd.im;
    end else begin
      s = st_rd;
    end
    s_valid = st_valid && (tx_mode == TX_ST || e_valid);
  end

endmodule
