// ddst_transmitter: configurable ST/DDST baseband transmitter.
//
// Turns a stream of constellation point numbers into blocks of N complex
// samples preceded by a P-sample cyclic prefix, with a periodic training
// sequence superimposed (ST) or, in DDST mode, also a data-dependent
// sequence that cancels the data from the receiver's cyclic mean.
// 4-, 16- and 64-QAM are supported by one 64-QAM constellation LUT. In
// bypass mode the plain normalised QAM symbols are sent, with neither
// training nor prefix.
//
// Pipeline: IN_TX -> symbol adequator (1 clock) -> mapper (1 clock) ->
// data sequence transformer (write phase) ... transformer read phase
// (1 clock) -> output register (1 clock) -> OUT_TX. tx_control sequences a
// block, tx_agu generates the addresses.
//
// Interface: pulse start_tx while busy is low; the modes are sampled with
// it. IN_TX is then sampled on each of the following N clocks (the source
// must supply one symbol per clock). data_val_tx marks valid OUT_TX
// samples. For ST/DDST the N+P output samples are contiguous and the first
// is registered N-P+5 clock edges after the edge that samples start_tx; in
// bypass mode each symbol leaves 2 clocks after it was sampled (the first
// 3 edges after start_tx). The next start_tx is accepted once busy is low
// again.
//
// tx_mode: 0 = ST, 1 = DDST. map_mode: 1/2/3 = 4/16/64-QAM (0 sends zeros).
// byp_mode: 1 = bypass. These encodings are this design's choice.
module ddst_transmitter
  import ddst_pkg::*;
#(
  parameter int  N        = 512,
  parameter int  P        = 8,
  parameter real SIGMA_C2 = 0.2
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      start_tx,
  input  tx_mode_t  tx_mode,
  input  map_mode_t map_mode,
  input  logic      byp_mode,
  input  logic [5:0] in_tx,
  output cplx_t     out_tx,
  output logic      data_val_tx,
  output logic      busy
);

  localparam int LN = $clog2(N);
  localparam int LP = $clog2(P);

  logic            agu_clr, in_valid, rd_en;
  tx_mode_t        stx_mode;
  map_mode_t       smod_mode;
  logic            sbyp_mode;
  logic            adq_valid, b_valid, s_valid;
  logic [2:0]      addr_i, addr_q;
  cplx_t           b, s;
  logic [LP-1:0]   tsg_idx, addr_wr_dds, addr_rd_dds;
  logic [LN-1:0]   addr_wr_st_cp, addr_rd_st_cp;
  logic            dds_first, cp_rd_start, wr_last, rd_last;

  tx_control #(.N(N)) u_ctrl (
    .clk         (clk),
    .rst         (rst),
    .start_tx    (start_tx),
    .tx_mode     (tx_mode),
    .map_mode    (map_mode),
    .byp_mode    (byp_mode),
    .cp_rd_start (cp_rd_start),
    .wr_last     (wr_last),
    .rd_last     (rd_last),
    .agu_clr     (agu_clr),
    .in_valid    (in_valid),
    .rd_en       (rd_en),
    .stx_mode    (stx_mode),
    .smod_mode   (smod_mode),
    .sbyp_mode   (sbyp_mode),
    .busy        (busy)
  );

  sym_adequator u_adq (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (in_valid),
    .sym_in    (in_tx),
    .map_mode  (smod_mode),
    .out_valid (adq_valid),
    .addr_i    (addr_i),
    .addr_q    (addr_q)
  );

  qam_mapper #(.N(N), .P(P), .SIGMA_C2(SIGMA_C2)) u_map (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (adq_valid),
    .addr_i    (addr_i),
    .addr_q    (addr_q),
    .sbyp_mode (sbyp_mode),
    .stx_mode  (stx_mode),
    .smod_mode (smod_mode),
    .out_valid (b_valid),
    .out_mapp  (b)
  );

  tx_agu #(.N(N), .P(P)) u_agu (
    .clk           (clk),
    .rst           (rst),
    .clr           (agu_clr),
    .wr_en         (b_valid),
    .rd_en         (rd_en),
    .tsg_idx       (tsg_idx),
    .addr_wr_st_cp (addr_wr_st_cp),
    .addr_wr_dds   (addr_wr_dds),
    .dds_first     (dds_first),
    .cp_rd_start   (cp_rd_start),
    .wr_last       (wr_last),
    .addr_rd_st_cp (addr_rd_st_cp),
    .addr_rd_dds   (addr_rd_dds),
    .rd_last       (rd_last)
  );

  data_seq_transformer #(.N(N), .P(P), .SIGMA_C2(SIGMA_C2)) u_dst (
    .clk           (clk),
    .rst           (rst),
    .tx_mode       (stx_mode),
    .b_valid       (b_valid),
    .b             (b),
    .tsg_idx       (tsg_idx),
    .addr_wr_st_cp (addr_wr_st_cp),
    .addr_wr_dds   (addr_wr_dds),
    .dds_first     (dds_first),
    .rd_en         (rd_en),
    .addr_rd_st_cp (addr_rd_st_cp),
    .addr_rd_dds   (addr_rd_dds),
    .s             (s),
    .s_valid       (s_valid)
  );

  // Output multiplexer and register: bypass sends the mapper output.
  always_ff @(posedge clk) begin
    if (rst) begin
      out_tx      <= '0;
      data_val_tx <= 1'b0;
    end else if (sbyp_mode) begin
      out_tx      <= b;
      data_val_tx <= b_valid;
    end else begin
      out_tx      <= s;
      data_val_tx <= s_valid;
    end
  end

endmodule
