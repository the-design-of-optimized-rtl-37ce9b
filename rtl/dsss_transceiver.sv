// dsss_transceiver: DS-SS transmitter and correlator receiver of the sensor
// microsystem, side by side.
//
// The transmitter spreads a serial data stream with a programmable PN code
// (32 to 256 chips per bit, or no coding); the receiver despreads a digitized
// chip stream with its own PN generator and recovers the data. The two share
// the clock and reset and nothing else: the radio, demodulator and A/D
// converter between the transmitter's coded output and the receiver's sample
// input lie outside this design, so both ends are brought out as ports. Each
// side has its own code select, so a duplex link can use different codes in
// each direction. The pairing for a duplex link follows the original design;
// the separate selects are this design's choice.
//
// Parameters: IN_W receiver sample width, ACC_W receiver internal register
// width (see dsss_receiver).
module dsss_transceiver
  import dsss_pkg::*;
#(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned ACC_W = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // transmitter
  input  code_sel_t               tx_sel,
  input  logic                    tx_en,
  input  logic                    tx_data,
  output logic                    tx_data_req,
  output logic                    tx_coded,
  output logic                    tx_chip_valid,
  // receiver
  input  code_sel_t               rx_sel,
  input  thr_sel_t                rx_thr_sel,
  input  logic                    rx_en,
  input  logic                    rx_valid,
  input  logic signed [IN_W-1:0]  rx_sample,
  output logic                    rx_data,
  output logic                    rx_data_valid,
  output logic signed [ACC_W-1:0] rx_corr,
  output logic                    rx_saturated
);

  dsss_transmitter u_tx (
    .clk, .rst_n,
    .sel        (tx_sel),
    .en         (tx_en),
    .data       (tx_data),
    .data_req   (tx_data_req),
    .coded      (tx_coded),
    .chip_valid (tx_chip_valid),
    .pn_chip    ()
  );

  dsss_receiver #(.IN_W(IN_W), .ACC_W(ACC_W)) u_rx (
    .clk, .rst_n,
    .sel        (rx_sel),
    .thr_sel    (rx_thr_sel),
    .en         (rx_en),
    .valid      (rx_valid),
    .sample     (rx_sample),
    .data_out   (rx_data),
    .data_valid (rx_data_valid),
    .corr       (rx_corr),
    .saturated  (rx_saturated)
  );

endmodule
