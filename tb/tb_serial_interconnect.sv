// tb_serial_interconnect: end-to-end test of the full set of links at the
// default size (29 links, default lock rules), no parameters overridden.
// Each link's transmit lane reaches a receive lane through its own channel
// model (serialise, random rotation, optional bit errors). Lanes are wired
// straight (link l to link l) except that links 0 and 1 are cross-wired, while
// their expected far-end identities say straight: both must report
// miswired, the others id_match. Every link carries random packets with
// random gaps, collapsing on for even links and off for odd ones. Link 2's
// channel flips single bits (sync headers of data blocks, low payload bits
// of data and idle blocks; bits 0..3 only, so that the copies 39 and 58 bits
// later stay in the same word and miss the flag bits [63:62]); link 3's channel sends a burst of damaged sync
// headers before traffic, so it loses lock and must lock again.
// Links 0 and 1 count bit errors on every idle word, since the idle words
// they receive are not the expected ones.
// Checks: every received packet equals the one its true source sent, with
// rx_crc_err only on link 2's damaged packets; per-link error counts.
// Each mechanism must happen at least once: block lock with slips, lock loss
// and relock, collapsed header/trailer words, gaps inside packets, empty
// packets, sync header repair, CRC error detection, idle bit errors, and
// miswire detection.
module tb_serial_interconnect;
  import link_pkg::*;
  import tb_ref_pkg::*;

  localparam int NL = 29;

  typedef struct packed {
    logic        sop, eop, empty, err;
    logic [21:0] hdr;
    logic [63:0] data;
  } beat_t;

  logic            clk = 1'b0, rst = 1'b1;
  logic [NL-1:0]   cfg_collapse, cfg_idle_sep, mon_clear = '0;
  idle_t           cfg_tx_idle [NL], cfg_rx_idle_expect [NL];
  logic [NL-1:0]   tx_valid = '0, tx_ready, tx_sop = '0, tx_eop = '0, tx_empty = '0;
  hdr_t            tx_header [NL];
  word_t           tx_data [NL];
  logic [NL-1:0]   rx_valid, rx_sop, rx_eop, rx_empty, rx_crc_err;
  hdr_t            rx_header [NL];
  word_t           rx_data [NL];
  logic [NL-1:0]   pma_tx_valid, pma_rx_valid = '0;
  block_t          pma_tx_word [NL], pma_rx_word [NL];
  logic [NL-1:0]   rx_lock, id_match, miswired;
  logic [31:0]     idle_count [NL], bit_err_count [NL], lock_loss_count [NL];
  idle_t           rx_idle [NL];
  logic [NL-1:0]   ev_tx_collapse, ev_tx_gap, ev_rx_hdr_trl, ev_rx_sh_fix, ev_rx_proto_err, ev_rx_slip;

  serial_interconnect dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int src_of(input int l);
    return (l == 0) ? 1 : (l == 1) ? 0 : l;
  endfunction

  beat_t sent_q [NL][$];
  beat_t got_q  [NL][$];
  bit    inj_en = 0, burst_req = 0;
  int    n_sync_inj = 0, n_data_inj = 0, n_idle_inj = 0, n_burst = 0;
  int    n_fix2 = 0, n_coll = 0, n_gap = 0, n_ht = 0, n_fix = 0, n_perr = 0, n_slip = 0, n_empty = 0;
  int    n_sep_pkt = 0, n_sep_coll = 0;
  bit    done [NL];

  always @(posedge clk) if (!rst)
    for (int l = 0; l < NL; l++) begin
      if (rx_valid[l]) got_q[l].push_back({rx_sop[l], rx_eop[l], rx_empty[l], rx_crc_err[l], rx_header[l], rx_data[l]});
      n_coll += int'(ev_tx_collapse[l]);
      n_gap  += int'(ev_tx_gap[l]);
      n_ht   += int'(ev_rx_hdr_trl[l]);
      n_fix  += int'(ev_rx_sh_fix[l]);
      if (l == 2) n_fix2 += int'(ev_rx_sh_fix[l]);
      n_perr += int'(ev_rx_proto_err[l]);
      n_slip += int'(ev_rx_slip[l]);
      if (cfg_idle_sep[l]) begin
        n_sep_pkt  += int'(rx_valid[l] && rx_eop[l]);
        n_sep_coll += int'(ev_tx_collapse[l] || ev_rx_hdr_trl[l]);
      end
    end

  for (genvar l = 0; l < NL; l++) begin : g_lane
    // Channel from the transmitter of src_of(l) to the receiver of l.
    localparam int SRC = (l == 0) ? 1 : (l == 1) ? 0 : l;
    bit          bits_q[$];
    logic [57:0] dhist = '0;
    int          gap = 0;
    initial begin
      int rot;
      rot = $urandom_range(0, 65);
      for (int i = 0; i < rot; i++) bits_q.push_back(1'($urandom));
    end
    always @(posedge clk) begin
      block_t b;
      w64_t   plain;
      if (pma_tx_valid[SRC]) begin
        b = pma_tx_word[SRC];
        plain = ref_descramble(dhist, b[65:2]);
        if (l == 3 && burst_req && n_burst < 40) begin
          b[1:0] = 2'b11; n_burst++;
        end
        if (l == 2 && inj_en) begin
          if (gap == 0) begin
            if (b[1:0] == 2'b01 && n_sync_inj <= n_data_inj) begin
              b[1] = ~b[1]; n_sync_inj++; gap = 60;
            end else if (b[1:0] == 2'b01) begin
              b[2 + $urandom_range(0, 3)] ^= 1'b1; n_data_inj++; gap = 60;
            end else if (b[1:0] == 2'b10 && plain[63:62] == 2'b00 && n_idle_inj < n_data_inj) begin
              b[2 + $urandom_range(0, 3)] ^= 1'b1; n_idle_inj++; gap = 60;
            end
          end else gap--;
        end
        for (int i = 0; i < BLOCK_W; i++) bits_q.push_back(b[i]);
      end
      if (bits_q.size() >= BLOCK_W) begin
        for (int i = 0; i < BLOCK_W; i++) pma_rx_word[l][i] <= bits_q.pop_front();
        pma_rx_valid[l] <= 1'b1;
      end else pma_rx_valid[l] <= 1'b0;
    end

    // Packet source on the transmitter of link l.
    task automatic send_pkt(input int len, input int gap_pct);
      logic [21:0] h;
      h = 22'($urandom);
      for (int k = 0; k < (len == 0 ? 1 : len); k++) begin
        while ($urandom_range(0, 99) < gap_pct) begin tx_valid[l] = 1'b0; @(negedge clk); end
        tx_valid[l]  = 1'b1;
        tx_sop[l]    = (k == 0);
        tx_eop[l]    = (k == len - 1) || (len == 0);
        tx_empty[l]  = (len == 0);
        tx_header[l] = h;
        tx_data[l]   = (len == 0) ? '0 : {$urandom, $urandom};
        sent_q[l].push_back({tx_sop[l], tx_eop[l], tx_empty[l], 1'b0, h, tx_data[l]});
        #1;
        while (!tx_ready[l]) begin @(negedge clk); #1; end
        @(negedge clk);
      end
      tx_valid[l] = 1'b0;
    endtask

    initial begin
      done[l] = 0;
      tx_header[l] = '0;
      tx_data[l] = '0;
      wait (inj_en);
      @(negedge clk);
      for (int p = 0; p < 150; p++) send_pkt($urandom_range(0, 5), 25);
      done[l] = 1;
    end
  end

  initial begin
    int t, ncrc;
    bit all_done;
    for (int l = 0; l < NL; l++) begin
      cfg_collapse[l]       = (l % 2 == 0);
      cfg_idle_sep[l]       = (l % 4 == 2);   // overrules collapsing
      cfg_tx_idle[l]        = idle_t'(64'h00C0_FFEE_0000_0000 | 64'(l));
      cfg_rx_idle_expect[l] = idle_t'(64'h00C0_FFEE_0000_0000 | 64'(l));
    end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    t = 0;
    while (rx_lock != '1 && t < 5000) begin @(negedge clk); t++; end
    chk(rx_lock == '1, "all links locked");
    // Lose lock on link 3 and regain it.
    burst_req = 1;
    t = 0;
    while (rx_lock[3] && t < 200) begin @(negedge clk); t++; end
    chk(!rx_lock[3], "link 3 lost lock");
    burst_req = 0;
    t = 0;
    while (!rx_lock[3] && t < 5000) begin @(negedge clk); t++; end
    chk(rx_lock[3] && lock_loss_count[3] == 1, "link 3 locked again");
    repeat (20) @(negedge clk);
    for (int l = 0; l < NL; l++) begin
      chk(miswired[l] == (l < 2), $sformatf("link %0d miswire flag", l));
      chk(id_match[l] == (l >= 2), $sformatf("link %0d identity", l));
    end
    mon_clear = '1; @(negedge clk); mon_clear = '0;
    n_fix = 0; n_fix2 = 0;
    inj_en = 1;
    do begin
      @(negedge clk);
      all_done = 1;
      for (int l = 0; l < NL; l++) all_done &= done[l];
    end while (!all_done);
    inj_en = 0;
    repeat (30) @(negedge clk);

    ncrc = 0;
    for (int l = 0; l < NL; l++) begin
      int  s;
      bit  pkt_err;
      s = src_of(l);
      chk(got_q[l].size() == sent_q[s].size(),
          $sformatf("link %0d: %0d beats, %0d sent", l, got_q[l].size(), sent_q[s].size()));
      pkt_err = 0;
      for (int i = sent_q[s].size() - 1; i >= 0; i--) if (i < got_q[l].size()) begin
        beat_t g, e;
        g = got_q[l][i]; e = sent_q[s][i];
        if (g.eop) pkt_err = g.err;
        ncrc    += int'(g.err);
        n_empty += int'(g.empty);
        chk(g.sop == e.sop && g.eop == e.eop && g.empty == e.empty && g.hdr == e.hdr,
            $sformatf("link %0d beat %0d markers", l, i));
        chk(!g.err || l == 2, $sformatf("link %0d beat %0d unexpected CRC error", l, i));
        if (!pkt_err) chk(g.data == e.data, $sformatf("link %0d beat %0d data", l, i));
      end
      if (l > 2) chk(bit_err_count[l] == 0, $sformatf("link %0d clean", l));
    end
    chk(bit_err_count[2] == 32'(3 * n_idle_inj + n_sync_inj), "link 2 bit error count");
    chk(ncrc == n_data_inj, $sformatf("CRC errors %0d for %0d damaged words", ncrc, n_data_inj));
    chk(n_perr == 0, $sformatf("no protocol errors (%0d)", n_perr));
    // Mechanisms exercised.
    chk(n_slip > 0,     "slip during block lock");
    chk(n_burst > 0 && lock_loss_count[3] == 0, "lock loss happened (counter cleared after)");
    chk(n_coll > 0,     "collapsed header and trailer");
    chk(n_ht == n_coll, "collapsed words all received");
    chk(n_gap > 0,      "gap inside a packet");
    chk(n_sep_pkt > 0 && n_sep_coll == 0, "idle-separated packets, none collapsed");
    chk(n_empty > 0,    "empty packet");
    chk(n_fix2 > 0 && n_fix2 == n_sync_inj, $sformatf("sync header repair %0d for %0d", n_fix2, n_sync_inj));
    chk(ncrc > 0,       "CRC error detected");
    chk(n_idle_inj > 0, "idle bit errors counted");
    $display("mechanisms: slip=%0d lockloss=1 collapse=%0d idle_sep=%0d gap=%0d empty=%0d sh_fix=%0d crc_err=%0d idle_err=%0d miswired=%0d",
             n_slip, n_coll, n_sep_pkt, n_gap, n_empty, n_fix, ncrc, n_idle_inj, $countones(miswired));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
