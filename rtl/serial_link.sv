// serial_link: one complete link end point, transmit and receive, between
// the FPGA fabric and one 25 Gb/s transceiver lane.
//
// Transmit: mac_tx frames packets into 64-bit data and control words, pcs_tx
// scrambles them and adds the 64b/66b sync header; one 66-bit block leaves
// for the transceiver every clock (pma_tx_*). Receive: 66-bit words from the
// transceiver (pma_rx_*) are aligned, descrambled and deframed by pcs_rx and
// mac_rx into a packet stream (rx_*), and link_monitor keeps error counts
// and the far end's identity from the idle words.
// Both directions run on one clock, the transceiver's word clock (about
// 390.6 MHz for a 25.78125 Gbaud lane). Transmit latency is two register
// stages (framer, scrambler) from the edge that accepts a beat to its block;
// receive latency is three (aligner, descrambler, deframer) from a block to
// the beat it releases, and a data beat is released only by the next data
// or trailer word.
// The split into framer, coder and monitor follows the published link; the
// single clock domain is this design's choice.
module serial_link
  import link_pkg::*;
#(
  parameter int unsigned LOCK_COUNT = 64,
  parameter int unsigned WINDOW     = 64,
  parameter int unsigned BAD_LIMIT  = 16,
  parameter int unsigned CNT_W      = 32
) (
  input  logic             clk,
  input  logic             rst,
  // configuration
  input  logic             cfg_collapse,
  input  logic             cfg_idle_sep,
  input  idle_t            cfg_tx_idle,
  input  idle_t            cfg_rx_idle_expect,
  input  logic             mon_clear,
  // packets to send
  input  logic             tx_valid,
  output logic             tx_ready,
  input  logic             tx_sop,
  input  logic             tx_eop,
  input  logic             tx_empty,
  input  hdr_t             tx_header,
  input  word_t            tx_data,
  // packets received
  output logic             rx_valid,
  output logic             rx_sop,
  output logic             rx_eop,
  output logic             rx_empty,
  output logic             rx_crc_err,
  output hdr_t             rx_header,
  output word_t            rx_data,
  // transceiver side
  output logic             pma_tx_valid,
  output block_t           pma_tx_word,
  input  logic             pma_rx_valid,
  input  block_t           pma_rx_word,
  // status
  output logic             rx_lock,
  output logic [CNT_W-1:0] idle_count,
  output logic [CNT_W-1:0] bit_err_count,
  output logic [CNT_W-1:0] lock_loss_count,
  output idle_t            rx_idle,
  output logic             id_match,
  output logic             miswired,
  // one-clock event pulses
  output logic             ev_tx_collapse,
  output logic             ev_tx_gap,
  output logic             ev_rx_hdr_trl,
  output logic             ev_rx_sh_fix,
  output logic             ev_rx_proto_err,
  output logic             ev_rx_slip
);

  logic       ftx_valid, ftx_ctrl;
  word_t      ftx_word;
  logic       prx_valid, prx_sh_err;
  logic [1:0] prx_sync;
  word_t      prx_word;
  logic       rx_ev_idle;
  word_t      rx_idle_word;

  mac_tx u_mac_tx (
    .clk         (clk),
    .rst         (rst),
    .cfg_collapse(cfg_collapse),
    .cfg_idle_sep(cfg_idle_sep),
    .cfg_idle    (cfg_tx_idle),
    .s_valid     (tx_valid),
    .s_ready     (tx_ready),
    .s_sop       (tx_sop),
    .s_eop       (tx_eop),
    .s_empty     (tx_empty),
    .s_header    (tx_header),
    .s_data      (tx_data),
    .out_valid   (ftx_valid),
    .out_ctrl    (ftx_ctrl),
    .out_word    (ftx_word),
    .ev_collapse (ev_tx_collapse),
    .ev_gap      (ev_tx_gap)
  );

  pcs_tx u_pcs_tx (
    .clk      (clk),
    .rst      (rst),
    .in_valid (ftx_valid),
    .in_ctrl  (ftx_ctrl),
    .in_word  (ftx_word),
    .out_valid(pma_tx_valid),
    .out_block(pma_tx_word)
  );

  pcs_rx #(
    .LOCK_COUNT(LOCK_COUNT),
    .WINDOW    (WINDOW),
    .BAD_LIMIT (BAD_LIMIT)
  ) u_pcs_rx (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (pma_rx_valid),
    .in_word   (pma_rx_word),
    .out_valid (prx_valid),
    .out_sync  (prx_sync),
    .out_word  (prx_word),
    .lock      (rx_lock),
    .slip_pulse(ev_rx_slip),
    .sh_err    (prx_sh_err)
  );

  mac_rx u_mac_rx (
    .clk            (clk),
    .rst            (rst),
    .cfg_idle_expect(cfg_rx_idle_expect),
    .lock           (rx_lock),
    .in_valid       (prx_valid),
    .in_sync        (prx_sync),
    .in_word        (prx_word),
    .m_valid        (rx_valid),
    .m_sop          (rx_sop),
    .m_eop          (rx_eop),
    .m_empty        (rx_empty),
    .m_crc_err      (rx_crc_err),
    .m_header       (rx_header),
    .m_data         (rx_data),
    .ev_idle        (rx_ev_idle),
    .idle_word      (rx_idle_word),
    .ev_sh_fix      (ev_rx_sh_fix),
    .ev_proto_err   (ev_rx_proto_err),
    .ev_hdr_trl     (ev_rx_hdr_trl)
  );

  link_monitor #(
    .CNT_W(CNT_W)
  ) u_mon (
    .clk            (clk),
    .rst            (rst),
    .clear          (mon_clear),
    .cfg_idle_expect(cfg_rx_idle_expect),
    .ev_idle        (rx_ev_idle),
    .idle_word      (rx_idle_word),
    .sh_err         (prx_sh_err),
    .lock           (rx_lock),
    .idle_count     (idle_count),
    .bit_err_count  (bit_err_count),
    .lock_loss_count(lock_loss_count),
    .rx_idle        (rx_idle),
    .id_match       (id_match),
    .miswired       (miswired)
  );

endmodule
