// ddst_top: the two halves of a DDST link, side by side.
//
// The configurable ST/DDST transmitter and the systolic DDST channel
// estimator share only the clock and reset: in a system they sit at the
// two ends of a channel, so each keeps its own ports here. Connecting
// out_tx (through a channel) to rx_in gives a complete link, as the
// end-to-end testbench does. See ddst_transmitter and sysdce for the
// interfaces and timing.
module ddst_top
  import ddst_pkg::*;
#(
  parameter int  N        = 512,  // block length (without prefix)
  parameter int  P        = 8,    // training period = channel length = prefix length
  parameter real SIGMA_C2 = 0.2   // training power, total transmit power 1
) (
  input  logic      clk,
  input  logic      rst,
  // transmitter
  input  logic      start_tx,
  input  tx_mode_t  tx_mode,
  input  map_mode_t map_mode,
  input  logic      byp_mode,
  input  logic [5:0] in_tx,
  output cplx_t     out_tx,
  output logic      data_val_tx,
  output logic      tx_busy,
  // channel estimator
  input  logic      rx_start,
  input  logic      rx_mode,
  input  cplx_t     rx_in,
  output cplx_t     cm_out,
  output logic      cm_flag,
  output cplx_t     h_out,
  output logic      done,
  output logic      rx_busy
);

  ddst_transmitter #(.N(N), .P(P), .SIGMA_C2(SIGMA_C2)) u_tx (
    .clk         (clk),
    .rst         (rst),
    .start_tx    (start_tx),
    .tx_mode     (tx_mode),
    .map_mode    (map_mode),
    .byp_mode    (byp_mode),
    .in_tx       (in_tx),
    .out_tx      (out_tx),
    .data_val_tx (data_val_tx),
    .busy        (tx_busy)
  );

  sysdce #(.N(N), .P(P), .SIGMA_C2(SIGMA_C2)) u_rx (
    .clk     (clk),
    .rst     (rst),
    .start   (rx_start),
    .mode    (rx_mode),
    .in_data (rx_in),
    .cm_out  (cm_out),
    .cm_flag (cm_flag),
    .h_out   (h_out),
    .done    (done),
    .busy    (rx_busy)
  );

endmodule
