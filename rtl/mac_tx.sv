// mac_tx: transmit framer of the lightweight link (replaces an Ethernet MAC).
//
// Packets arrive as a stream of 64-bit beats and leave as one 64-bit word
// per clock, each marked data or control for the 64b/66b coder. There is no
// preamble, no inter-packet gap, no MAC addresses and no length field:
//   - the first beat's header field (22 bits) goes out in a header control
//     word (flags 10) ahead of the data;
//   - each beat's data goes out as one data word;
//   - after the last beat a trailer control word (flags 01) carries the
//     CRC-32 of the packet's data words, so nothing has to be stored to
//     append it;
//   - when the next packet is already waiting, its header shares the
//     trailer's word (flags 11), so back-to-back packets cost one control
//     word each (cfg_collapse = 1; with 0 trailer and header go separately);
//   - with cfg_idle_sep = 1 at least one idle word follows every trailer
//     before the next header, and nothing is collapsed: an idle word between
//     packets lets the receiver repair a damaged sync header next to it;
//   - whenever no beat is offered, an idle control word (flags 00, the other
//     62 bits the programmable pattern cfg_idle) is sent, between packets or
//     inside one: gaps inside a packet are allowed and need no buffering.
// A packet with no data (header and trailer only) is one beat with s_sop,
// s_eop and s_empty set.
// Interface: valid/ready stream in (s_ready is combinational from the state
// and s_sop/s_empty); out_valid/out_ctrl/out_word registered, one word every
// clock after reset. ev_collapse and ev_gap pulse with the word they mark.
// The framing rules follow the published link; the CRC choice, the empty-
// packet beat and the stream handshake are this design's choices.
module mac_tx
  import link_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   cfg_collapse,
  input  logic   cfg_idle_sep,
  input  idle_t  cfg_idle,
  input  logic   s_valid,
  output logic   s_ready,
  input  logic   s_sop,
  input  logic   s_eop,
  input  logic   s_empty,
  input  hdr_t   s_header,
  input  word_t  s_data,
  output logic   out_valid,
  output logic   out_ctrl,
  output word_t  out_word,
  output logic   ev_collapse,
  output logic   ev_gap
);

  logic        pend_q, pend_d;        // trailer owed for the last packet
  logic        hdr_sent_q, hdr_sent_d; // header of the waiting beat is out
  logic        in_pkt_q, in_pkt_d;    // between header and last data word
  logic        sep_q, sep_d;          // an idle word is owed after a trailer
  logic [31:0] crc_q, crc_d;
  logic        ctrl_d, consume, coll_d, gap_d;
  word_t       word_d;

  always_comb begin
    pend_d     = pend_q;
    hdr_sent_d = hdr_sent_q;
    in_pkt_d   = in_pkt_q;
    sep_d      = 1'b0;
    crc_d      = crc_q;
    consume    = 1'b0;
    coll_d     = 1'b0;
    gap_d      = 1'b0;
    ctrl_d     = 1'b1;
    word_d     = make_idle(cfg_idle);
    if (pend_q) begin
      pend_d = 1'b0;
      if (cfg_collapse && !cfg_idle_sep && s_valid && s_sop) begin
        word_d = make_ctrl(CW_HDR_TRL, s_header, ~crc_q);
        coll_d = 1'b1;
        crc_d  = CRC_INIT;
        if (s_empty) begin
          consume = 1'b1;
          pend_d  = 1'b1;
        end else begin
          hdr_sent_d = 1'b1;
          in_pkt_d   = 1'b1;
        end
      end else begin
        word_d = make_ctrl(CW_TRAILER, '0, ~crc_q);
        sep_d  = cfg_idle_sep;
      end
    end else if (sep_q) begin
      // the owed idle word between packets (word_d keeps its idle default)
    end else if (s_valid && s_sop && !hdr_sent_q) begin
      word_d = make_ctrl(CW_HEADER, s_header, '0);
      crc_d  = CRC_INIT;
      if (s_empty) begin
        consume = 1'b1;
        pend_d  = 1'b1;
      end else begin
        hdr_sent_d = 1'b1;
        in_pkt_d   = 1'b1;
      end
    end else if (s_valid) begin
      word_d     = s_data;
      ctrl_d     = 1'b0;
      consume    = 1'b1;
      crc_d      = crc32_word(crc_q, s_data);
      hdr_sent_d = 1'b0;
      if (s_eop) begin
        pend_d   = 1'b1;
        in_pkt_d = 1'b0;
      end
    end else begin
      gap_d = in_pkt_q;
    end
  end

  assign s_ready = consume;

  always_ff @(posedge clk) begin
    if (rst) begin
      pend_q      <= 1'b0;
      hdr_sent_q  <= 1'b0;
      in_pkt_q    <= 1'b0;
      sep_q       <= 1'b0;
      crc_q       <= CRC_INIT;
      out_valid   <= 1'b0;
      out_ctrl    <= 1'b1;
      out_word    <= '0;
      ev_collapse <= 1'b0;
      ev_gap      <= 1'b0;
    end else begin
      pend_q      <= pend_d;
      hdr_sent_q  <= hdr_sent_d;
      in_pkt_q    <= in_pkt_d;
      sep_q       <= sep_d;
      crc_q       <= crc_d;
      out_valid   <= 1'b1;
      out_ctrl    <= ctrl_d;
      out_word    <= word_d;
      ev_collapse <= coll_d;
      ev_gap      <= gap_d;
    end
  end

  // An empty packet is a single beat that both starts and ends it.
  assert property (@(posedge clk) disable iff (rst)
                   s_valid && s_empty |-> s_sop && s_eop)
    else $error("mac_tx: s_empty without s_sop and s_eop");

endmodule
