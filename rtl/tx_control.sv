// tx_control: block sequencer of the ST/DDST transmitter.
//
// A pulse on start_tx while idle latches the operating modes (tx_mode,
// map_mode, byp_mode) into the held copies stx_mode, smod_mode and
// sbyp_mode that steer the datapath for the whole block, and clears the
// address generator. The transmitter then takes one symbol from IN_TX on
// each of the next N clocks (in_valid high). In ST and DDST modes, once the
// address generator reports that symbol N-P has been written (cp_rd_start),
// rd_en is held high for the N+P reads that emit the cyclic prefix and the
// block; the block ends with the last read (rd_last). In bypass mode there
// is no read phase and the block ends with the last mapped symbol
// (wr_last). busy is high from start_tx until the block ends; start_tx is
// ignored while busy.
module tx_control
  import ddst_pkg::*;
#(
  parameter int N = 512
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      start_tx,
  input  tx_mode_t  tx_mode,
  input  map_mode_t map_mode,
  input  logic      byp_mode,
  input  logic      cp_rd_start,
  input  logic      wr_last,
  input  logic      rd_last,
  output logic      agu_clr,
  output logic      in_valid,
  output logic      rd_en,
  output tx_mode_t  stx_mode,
  output map_mode_t smod_mode,
  output logic      sbyp_mode,
  output logic      busy
);

  typedef enum logic [1:0] {IDLE, LOAD, DRAIN} state_t;

  state_t                 state;
  logic [$clog2(N)-1:0]   in_cnt;
  logic                   rd_active;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      in_cnt    <= '0;
      rd_active <= 1'b0;
      stx_mode  <= TX_ST;
      smod_mode <= MAP_OFF;
      sbyp_mode <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (start_tx) begin
          stx_mode  <= tx_mode;
          smod_mode <= map_mode;
          sbyp_mode <= byp_mode;
          in_cnt    <= '0;
          state     <= LOAD;
        end
        LOAD: begin
          in_cnt <= in_cnt + 1'b1;
          if (in_cnt == $clog2(N)'(N - 1)) state <= DRAIN;
        end
        DRAIN: if (sbyp_mode ? wr_last : rd_last) state <= IDLE;
        default: state <= IDLE;
      endcase
      if (cp_rd_start && !sbyp_mode) rd_active <= 1'b1;
      else if (rd_last)              rd_active <= 1'b0;
    end
  end

  always_comb begin
    agu_clr  = (state == IDLE) && start_tx;
    in_valid = (state == LOAD);
    rd_en    = rd_active;
    busy     = (state != IDLE);
  end

endmodule
