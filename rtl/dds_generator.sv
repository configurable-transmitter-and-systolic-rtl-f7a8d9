// dds_generator: data-dependent sequence (DDS) generator.
//
// For DDST the transmitter adds e(k) = -(1/Np) * sum_i b(iP + (k mod P)),
// Np = N/P: minus the mean of the data symbols that share the position
// k mod P within the training period. This cancels the data from the
// receiver's cyclic mean.
//
// Accumulation ("on the fly", no rearranging of b): the loop-back shift
// register lb_delay_dds of P stages returns, with each new symbol, the
// running sum of the symbol P positions earlier, i.e. of the same row of
// the P x Np arrangement of b. The new sum (in_dds plus that value, or
// in_dds alone during the first period) is written into RAM_DDS at
// address k mod P and shifted into lb_delay_dds. After N symbols RAM_DDS
// holds the P sums Np*mean.
//
// Generation: reading RAM_DDS (Np+1 sweeps of its P words, addresses from
// the address generator) and shifting right by log2(Np) gives the mean;
// it is negated to form e(k). The extra sweep supplies the P values for
// the cyclic prefix.
//
// Timing: accumulation one symbol per clock while ena_gen_dds is high;
// reads registered, out_dds/out_valid one clock after ena_rd_dds. A sum
// written in one clock can be read from the next.
module dds_generator
  import ddst_pkg::*;
#(
  parameter int N = 512,
  parameter int P = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ena_gen_dds,
  input  logic                 first_row,
  input  cplx_t                in_dds,
  input  logic [$clog2(P)-1:0] addr_wr_dds,
  input  logic                 ena_rd_dds,
  input  logic [$clog2(P)-1:0] addr_rd_dds,
  output cplx_t                out_dds,
  output logic                 out_valid
);

  localparam int NP = N / P;
  localparam int LS = $clog2(NP);
  localparam int SW = DW + LS;  // accumulator width: Np samples cannot overflow

  typedef logic signed [SW-1:0] acc_t;
  typedef struct packed {
    acc_t re;
    acc_t im;
  } cacc_t;

  cacc_t lb_delay_dds [P];
  cacc_t ram_dds [P];
  cacc_t fb, sum, rd_word;

  always_comb begin
    fb     = first_row ? '0 : lb_delay_dds[P-1];
    sum.re = fb.re + acc_t'(in_dds.re);
    sum.im = fb.im + acc_t'(in_dds.im);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < P; i++) lb_delay_dds[i] <= '0;
    end else if (ena_gen_dds) begin
      lb_delay_dds[0] <= sum;
      for (int i = 1; i < P; i++) lb_delay_dds[i] <= lb_delay_dds[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (ena_gen_dds) ram_dds[addr_wr_dds] <= sum;
  end

  // Shifter and sign change: e = -(sum >>> log2(Np)).
  assign rd_word = ram_dds[addr_rd_dds];

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_dds   <= '0;
    end else begin
      out_valid <= ena_rd_dds;
      if (ena_rd_dds) begin
        out_dds.re <= smp_t'(-(rd_word.re >>> LS));
        out_dds.im <= smp_t'(-(rd_word.im >>> LS));
      end
    end
  end

endmodule
