// mac_rx: receive deframer of the lightweight link.
//
// Takes descrambled 64-bit words with their sync headers and rebuilds the
// packets. Header words open a packet and give its 22-bit header; data words
// are its beats; a trailer word closes it and carries the CRC-32 that is
// checked against the data received; a header-and-trailer word closes one
// packet and opens the next; idle words are dropped wherever they appear.
// Because the end of a packet is known only when its trailer arrives, the
// newest data word is held back until the next data word or the trailer.
//
// Sync header repair: one line error can turn a sync header into 00 or 11.
// Such a word is classed as follows: if its payload is exactly the expected
// idle word it is idle; otherwise, inside a packet it is taken as data, and
// outside a packet as control (only idle and header words are legal there).
// ev_sh_fix pulses for each repaired word. This is why idle words are best
// placed between packets.
//
// Interface: in_valid/in_sync/in_word/lock from pcs_rx; cfg_idle_expect the
// idle pattern expected from the far end. The packet stream out (m_*) has no
// back-pressure: m_valid for one clock per beat, m_header on every beat,
// m_crc_err on the last beat. A header inside a packet, or loss of lock,
// ends the open packet with m_crc_err set (ev_proto_err); data outside a
// packet and trailers without a header are dropped (ev_proto_err).
// ev_idle/idle_word report every idle word for link monitoring. Outputs are
// registered, one clock after the input.
// The word types follow the published framing; the repair rule, the error
// handling and the output stream are this design's reading and choices.
module mac_rx
  import link_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  idle_t      cfg_idle_expect,
  input  logic       lock,
  input  logic       in_valid,
  input  logic [1:0] in_sync,
  input  word_t      in_word,
  output logic       m_valid,
  output logic       m_sop,
  output logic       m_eop,
  output logic       m_empty,
  output logic       m_crc_err,
  output hdr_t       m_header,
  output word_t      m_data,
  output logic       ev_idle,
  output word_t      idle_word,
  output logic       ev_sh_fix,
  output logic       ev_proto_err,
  output logic       ev_hdr_trl
);

  logic        in_pkt_q, in_pkt_d;
  logic        held_q, held_d;          // a data word is held back
  logic        held_sop_q, held_sop_d;  // ... and it is the first one
  word_t       held_data_q, held_data_d;
  hdr_t        hdr_q, hdr_d;
  logic [31:0] crc_q, crc_d;

  logic        o_valid, o_sop, o_eop, o_empty, o_err;
  hdr_t        o_hdr;
  word_t       o_data;
  logic        is_ctrl, sh_bad, fix, perr, idle_seen, ht_seen;
  cw_kind_e    kind;

  always_comb begin
    in_pkt_d    = in_pkt_q;
    held_d      = held_q;
    held_sop_d  = held_sop_q;
    held_data_d = held_data_q;
    hdr_d       = hdr_q;
    crc_d       = crc_q;
    o_valid     = 1'b0;
    o_sop       = 1'b0;
    o_eop       = 1'b0;
    o_empty     = 1'b0;
    o_err       = 1'b0;
    o_hdr       = hdr_q;
    o_data      = held_data_q;
    perr        = 1'b0;
    fix         = 1'b0;
    idle_seen   = 1'b0;
    ht_seen     = 1'b0;
    kind        = cw_kind_e'(in_word[63:62]);

    // Word class, with sync header repair.
    sh_bad = (in_sync[0] == in_sync[1]);
    if (!sh_bad)                              is_ctrl = (in_sync == SYNC_CTRL);
    else if (in_word == make_idle(cfg_idle_expect)) is_ctrl = 1'b1;
    else                                      is_ctrl = !in_pkt_q;

    if (!lock) begin
      // Link down: end an open packet as damaged.
      if (in_pkt_q) begin
        o_valid  = 1'b1;
        o_sop    = held_q ? held_sop_q : 1'b1;
        o_eop    = 1'b1;
        o_empty  = !held_q;
        o_err    = 1'b1;
        perr     = 1'b1;
        in_pkt_d = 1'b0;
        held_d   = 1'b0;
      end
    end else if (in_valid) begin
      fix = sh_bad;
      if (!is_ctrl) begin
        if (!in_pkt_q) begin
          perr = 1'b1;                      // data outside a packet
        end else begin
          if (held_q) begin
            o_valid = 1'b1;
            o_sop   = held_sop_q;
          end
          held_d      = 1'b1;
          held_sop_d  = !held_q && held_sop_q;
          held_data_d = in_word;
          crc_d       = crc32_word(crc_q, in_word);
        end
      end else begin
        if (kind == CW_IDLE) idle_seen = 1'b1;
        if (kind == CW_HDR_TRL) ht_seen = 1'b1;
        // Trailer part: close the open packet.
        if (kind[0]) begin
          if (!in_pkt_q) begin
            perr = 1'b1;
          end else begin
            o_valid = 1'b1;
            o_sop   = held_q ? held_sop_q : 1'b1;
            o_eop   = 1'b1;
            o_empty = !held_q;
            o_err   = (in_word[31:0] != ~crc_q);
          end
        end else if (kind[1] && in_pkt_q) begin
          // Header without a trailer: the open packet is cut short.
          o_valid = 1'b1;
          o_sop   = held_q ? held_sop_q : 1'b1;
          o_eop   = 1'b1;
          o_empty = !held_q;
          o_err   = 1'b1;
          perr    = 1'b1;
        end
        if (kind[0] || kind[1]) begin
          in_pkt_d = 1'b0;
          held_d   = 1'b0;
        end
        // Header part: open a new packet.
        if (kind[1]) begin
          in_pkt_d   = 1'b1;
          held_sop_d = 1'b1;
          hdr_d      = in_word[61:40];
          crc_d      = CRC_INIT;
        end
      end
    end
    if (o_empty) o_data = '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      in_pkt_q     <= 1'b0;
      held_q       <= 1'b0;
      held_sop_q   <= 1'b0;
      held_data_q  <= '0;
      hdr_q        <= '0;
      crc_q        <= CRC_INIT;
      m_valid      <= 1'b0;
      m_sop        <= 1'b0;
      m_eop        <= 1'b0;
      m_empty      <= 1'b0;
      m_crc_err    <= 1'b0;
      m_header     <= '0;
      m_data       <= '0;
      ev_idle      <= 1'b0;
      idle_word    <= '0;
      ev_sh_fix    <= 1'b0;
      ev_proto_err <= 1'b0;
      ev_hdr_trl   <= 1'b0;
    end else begin
      in_pkt_q     <= in_pkt_d;
      held_q       <= held_d;
      held_sop_q   <= held_sop_d;
      held_data_q  <= held_data_d;
      hdr_q        <= hdr_d;
      crc_q        <= crc_d;
      m_valid      <= o_valid;
      m_sop        <= o_sop;
      m_eop        <= o_eop;
      m_empty      <= o_empty;
      m_crc_err    <= o_err;
      m_header     <= o_hdr;
      m_data       <= o_data;
      ev_idle      <= idle_seen;
      idle_word    <= in_word;
      ev_sh_fix    <= fix;
      ev_proto_err <= perr;
      ev_hdr_trl   <= ht_seen;
    end
  end

endmodule
