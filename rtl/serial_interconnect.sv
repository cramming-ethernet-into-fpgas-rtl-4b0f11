// serial_interconnect: the full set of point-to-point serial links of one
// FPGA in a directly connected array of FPGAs.
//
// Instead of an Ethernet switch fabric, every FPGA connects straight to the
// FPGAs it must talk to, one 25 Gb/s transceiver lane per direction per
// neighbour, and each lane carries the lightweight framing of serial_link.
// This module holds NUM_LINKS independent serial_link instances side by
// side; each link's packet streams, transceiver words, configuration and
// status are brought out as arrays indexed by link number. The routing of
// packets between links and the transceivers themselves are outside this
// module.
// NUM_LINKS defaults to 29, the number of link instances used in the
// published size comparison (an FPGA with 10 duplex links to one processing
// stage and 19 links to its peers). Every link runs on the common clk.
module serial_interconnect
  import link_pkg::*;
#(
  parameter int unsigned NUM_LINKS  = 29,
  parameter int unsigned LOCK_COUNT = 64,
  parameter int unsigned WINDOW     = 64,
  parameter int unsigned BAD_LIMIT  = 16,
  parameter int unsigned CNT_W      = 32
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [NUM_LINKS-1:0] cfg_collapse,
  input  logic [NUM_LINKS-1:0] cfg_idle_sep,
  input  idle_t                cfg_tx_idle        [NUM_LINKS],
  input  idle_t                cfg_rx_idle_expect [NUM_LINKS],
  input  logic [NUM_LINKS-1:0] mon_clear,
  // packets to send, per link
  input  logic [NUM_LINKS-1:0] tx_valid,
  output logic [NUM_LINKS-1:0] tx_ready,
  input  logic [NUM_LINKS-1:0] tx_sop,
  input  logic [NUM_LINKS-1:0] tx_eop,
  input  logic [NUM_LINKS-1:0] tx_empty,
  input  hdr_t                 tx_header [NUM_LINKS],
  input  word_t                tx_data   [NUM_LINKS],
  // packets received, per link
  output logic [NUM_LINKS-1:0] rx_valid,
  output logic [NUM_LINKS-1:0] rx_sop,
  output logic [NUM_LINKS-1:0] rx_eop,
  output logic [NUM_LINKS-1:0] rx_empty,
  output logic [NUM_LINKS-1:0] rx_crc_err,
  output hdr_t                 rx_header [NUM_LINKS],
  output word_t                rx_data   [NUM_LINKS],
  // transceiver lanes
  output logic [NUM_LINKS-1:0] pma_tx_valid,
  output block_t               pma_tx_word [NUM_LINKS],
  input  logic [NUM_LINKS-1:0] pma_rx_valid,
  input  block_t               pma_rx_word [NUM_LINKS],
  // status
  output logic [NUM_LINKS-1:0] rx_lock,
  output logic [CNT_W-1:0]     idle_count      [NUM_LINKS],
  output logic [CNT_W-1:0]     bit_err_count   [NUM_LINKS],
  output logic [CNT_W-1:0]     lock_loss_count [NUM_LINKS],
  output idle_t                rx_idle         [NUM_LINKS],
  output logic [NUM_LINKS-1:0] id_match,
  output logic [NUM_LINKS-1:0] miswired,
  // event pulses
  output logic [NUM_LINKS-1:0] ev_tx_collapse,
  output logic [NUM_LINKS-1:0] ev_tx_gap,
  output logic [NUM_LINKS-1:0] ev_rx_hdr_trl,
  output logic [NUM_LINKS-1:0] ev_rx_sh_fix,
  output logic [NUM_LINKS-1:0] ev_rx_proto_err,
  output logic [NUM_LINKS-1:0] ev_rx_slip
);

  for (genvar l = 0; l < NUM_LINKS; l++) begin : g_link
    serial_link #(
      .LOCK_COUNT(LOCK_COUNT),
      .WINDOW    (WINDOW),
      .BAD_LIMIT (BAD_LIMIT),
      .CNT_W     (CNT_W)
    ) u_link (
      .clk               (clk),
      .rst               (rst),
      .cfg_collapse      (cfg_collapse[l]),
      .cfg_idle_sep      (cfg_idle_sep[l]),
      .cfg_tx_idle       (cfg_tx_idle[l]),
      .cfg_rx_idle_expect(cfg_rx_idle_expect[l]),
      .mon_clear         (mon_clear[l]),
      .tx_valid          (tx_valid[l]),
      .tx_ready          (tx_ready[l]),
      .tx_sop            (tx_sop[l]),
      .tx_eop            (tx_eop[l]),
      .tx_empty          (tx_empty[l]),
      .tx_header         (tx_header[l]),
      .tx_data           (tx_data[l]),
      .rx_valid          (rx_valid[l]),
      .rx_sop            (rx_sop[l]),
      .rx_eop            (rx_eop[l]),
      .rx_empty          (rx_empty[l]),
      .rx_crc_err        (rx_crc_err[l]),
      .rx_header         (rx_header[l]),
      .rx_data           (rx_data[l]),
      .pma_tx_valid      (pma_tx_valid[l]),
      .pma_tx_word       (pma_tx_word[l]),
      .pma_rx_valid      (pma_rx_valid[l]),
      .pma_rx_word       (pma_rx_word[l]),
      .rx_lock           (rx_lock[l]),
      .idle_count        (idle_count[l]),
      .bit_err_count     (bit_err_count[l]),
      .lock_loss_count   (lock_loss_count[l]),
      .rx_idle           (rx_idle[l]),
      .id_match          (id_match[l]),
      .miswired          (miswired[l]),
      .ev_tx_collapse    (ev_tx_collapse[l]),
      .ev_tx_gap         (ev_tx_gap[l]),
      .ev_rx_hdr_trl     (ev_rx_hdr_trl[l]),
      .ev_rx_sh_fix      (ev_rx_sh_fix[l]),
      .ev_rx_proto_err   (ev_rx_proto_err[l]),
      .ev_rx_slip        (ev_rx_slip[l])
    );
  end

endmodule
