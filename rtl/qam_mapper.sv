// qam_mapper: 4/16/64-QAM mapper with the ST/DDST power normalisation built in.
//
// A constellation LUT of eight entries holds the axis levels
// {3, 1, 5, 7, -3, -1, -5, -7} and is read twice per symbol (as a dual-port
// ROM), once with addr_i and once with addr_q. Each level is multiplied by
// a normalisation constant read from a 16-entry normalisation LUT addressed
// by {sbyp_mode, stx_mode, smod_mode}:
//   bypass (sbyp_mode=1): 1/sqrt(2), 1/sqrt(10), 1/sqrt(42) for 4/16/64-QAM
//   ST   (stx_mode=0)   : sigma_b_ST   times those factors
//   DDST (stx_mode=1)   : sigma_b_DDST times those factors
// and 0 for smod_mode = MAP_OFF. The data powers follow from a unit total
// transmit power: sigma_b_ST^2 = 1 - sigma_c^2 and, since the data-dependent
// sequence removes the per-position mean over Np = N/P periods,
// sigma_b_DDST^2 = (1 - sigma_c^2) * Np / (Np - 1). The LUT contents are
// computed at elaboration from SIGMA_C2, N and P.
//
// Levels are integers, constants are unsigned Q0.16; the product is
// truncated to the Q2.13 sample format. Timing: the product is registered
// (Reg_out_mapper), so out_mapp appears one clock after the addresses.
module qam_mapper
  import ddst_pkg::*;
#(
  parameter int  N        = 512,  // block length
  parameter int  P        = 8,    // training period
  parameter real SIGMA_C2 = 0.2   // training power (total power 1)
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      in_valid,
  input  logic [2:0] addr_i,
  input  logic [2:0] addr_q,
  input  logic      sbyp_mode,
  input  tx_mode_t  stx_mode,
  input  map_mode_t smod_mode,
  output logic      out_valid,
  output cplx_t     out_mapp
);

  localparam int NP = N / P;

  typedef logic [NW-1:0] norm_t;
  typedef norm_t norm_tab_t [16];

  function automatic norm_tab_t make_norm_tab();
    norm_tab_t t;
    real sb_st, sb_ddst, v;
    real qn [4];
    qn[0]   = 0.0;
    qn[1]   = 1.0 / $sqrt(2.0);
    qn[2]   = 1.0 / $sqrt(10.0);
    qn[3]   = 1.0 / $sqrt(42.0);
    sb_st   = $sqrt(1.0 - SIGMA_C2);
    sb_ddst = $sqrt((1.0 - SIGMA_C2) * real'(NP) / real'(NP - 1));
    for (int a = 0; a < 16; a++) begin
      if (a[3])      v = qn[a % 4];
      else if (a[2]) v = sb_ddst * qn[a % 4];
      else           v = sb_st * qn[a % 4];
      t[a] = norm_t'(quant(v, NW));
    end
    return t;
  endfunction

  localparam norm_tab_t NORM_LUT = make_norm_tab();

  // Constellation LUT: Gray-coded axis levels.
  function automatic logic signed [3:0] level(logic [2:0] code);
    unique case (code)
      3'b000: return 4'sd3;
      3'b001: return 4'sd1;
      3'b010: return 4'sd5;
      3'b011: return 4'sd7;
      3'b100: return -4'sd3;
      3'b101: return -4'sd1;
      3'b110: return -4'sd5;
      default: return -4'sd7;
    endcase
  endfunction

  norm_t                    norm;
  logic signed [NW+4:0]     prod_i, prod_q;

  always_comb begin
    norm   = NORM_LUT[{sbyp_mode, stx_mode, smod_mode}];
    prod_i = level(addr_i) * $signed({1'b0, norm});
    prod_q = level(addr_q) * $signed({1'b0, norm});
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_mapp  <= '0;
    end else begin
      out_valid   <= in_valid;
      out_mapp.re <= smp_t'(prod_i >>> (NW - FRAC));
      out_mapp.im <= smp_t'(prod_q >>> (NW - FRAC));
    end
  end

endmodule
