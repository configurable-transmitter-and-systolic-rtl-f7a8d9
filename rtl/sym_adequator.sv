// sym_adequator: turns a constellation point number into the 64-QAM LUT
// addresses that produce the same symbol.
//
// The mapper stores only the Gray-coded 64-QAM constellation, in which the
// 4-QAM and 16-QAM constellations are embedded. A 64-QAM point number p
// selects I level code p[5:3] and Q level code p[2:0], where a 3-bit level
// code maps to 000:+3 001:+1 010:+5 011:+7 100:-3 101:-1 110:-5 111:-7.
// The embedded constellations use only levels +-1 (4-QAM) and +-1, +-3
// (16-QAM), so their point numbers must be re-coded:
//   4-QAM  s[1:0]: I code = {s[1],0,1}, Q code = {s[0],0,1}
//   16-QAM s[3:0]: I code = {s[3],0,s[2]}, Q code = {s[1],0,s[0]}
// These rules reproduce the point labels of the published constellation
// map (for example point 2 is -1+j in 4-QAM, 3-3j in 16-QAM, 3+5j in
// 64-QAM). Unused high bits of sym_in are ignored.
//
// Timing: one register stage; addresses appear one clock after sym_in,
// with out_valid following in_valid.
module sym_adequator
  import ddst_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      in_valid,
  input  logic [5:0] sym_in,
  input  map_mode_t map_mode,
  output logic      out_valid,
  output logic [2:0] addr_i,
  output logic [2:0] addr_q
);

  logic [2:0] ai, aq;

  always_comb begin
    unique case (map_mode)
      MAP_QAM4: begin
        ai = {sym_in[1], 2'b01};
        aq = {sym_in[0], 2'b01};
      end
      MAP_QAM16: begin
        ai = {sym_in[3], 1'b0, sym_in[2]};
        aq = {sym_in[1], 1'b0, sym_in[0]};
      end
      default: begin  // MAP_QAM64, and MAP_OFF (the mapper zeroes it)
        ai = sym_in[5:3];
        aq = sym_in[2:0];
      end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      addr_i    <= '0;
      addr_q    <= '0;
    end else begin
      out_valid <= in_valid;
      addr_i    <= ai;
      addr_q    <= aq;
    end
  end

endmodule
