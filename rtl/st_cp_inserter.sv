// st_cp_inserter: ST cyclic-prefix insertion buffer (RAM_CP).
//
// A simple dual-port RAM of N complex words with independent write and
// read addresses. The ST sequence b(k)+c(k) is written at k = 0..N-1.
// The address generator starts reading one clock after word N-P has been
// written, at address N-P: the P prefix words are read while the last P
// words are still being stored, and the reads then continue over
// addresses 0..N-1, so the block leaves with its prefix in front and
// without a gap.
//
// Timing: the read is registered (block-RAM style); rd_data and rd_valid
// appear one clock after rd_en. A word written in one clock can be read
// from the next.
module st_cp_inserter
  import ddst_pkg::*;
#(
  parameter int N = 512
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 wr_en,
  input  logic [$clog2(N)-1:0] addr_wr_st_cp,
  input  cplx_t                wr_data,
  input  logic                 rd_en,
  input  logic [$clog2(N)-1:0] addr_rd_st_cp,
  output cplx_t                rd_data,
  output logic                 rd_valid
);

  cplx_t ram_cp [N];

  always_ff @(posedge clk) begin
    if (wr_en) ram_cp[addr_wr_st_cp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= ram_cp[addr_rd_st_cp];
  end

  always_ff @(posedge clk) begin
    if (rst) rd_valid <= 1'b0;
    else     rd_valid <= rd_en;
  end

endmodule
