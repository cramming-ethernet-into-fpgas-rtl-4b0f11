// tb_serial_link: one link end point looped back through a channel model.
// The channel serialises the transmitted 66-bit blocks, regroups the bits at
// a random rotation, and can flip single bits: in the sync header of a data
// block (must be repaired, ev_rx_sh_fix), in payload bits 0..3 of a data
// block (the descrambler makes three errors in that word, so that packet
// must arrive with rx_crc_err), or in payload bits 0..3 of an idle block
// (bit_err_count must grow by three; it also counts each damaged sync
// header once).
// Checks: lock, far-end identity (id_match), every packet received in
// order with its header, data and empty flag, rx_crc_err exactly on the
// damaged packets, the repair and error counts, and the line rate: with
// back-to-back 4-word packets and collapsing, the transmitter accepts 4
// beats in every 5 clocks.
module tb_serial_link;
  import link_pkg::*;
  import tb_ref_pkg::*;

  typedef struct packed {
    logic        sop, eop, empty, err;
    logic [21:0] hdr;
    logic [63:0] data;
  } beat_t;

  logic   clk = 1'b0, rst = 1'b1;
  logic   cfg_collapse = 1'b1, cfg_idle_sep = 1'b0, mon_clear = 1'b0;
  idle_t  cfg_tx_idle = 62'h0000_0000_0005_0307, cfg_rx_idle_expect = 62'h0000_0000_0005_0307;
  logic   tx_valid = 1'b0, tx_ready, tx_sop = 1'b0, tx_eop = 1'b0, tx_empty = 1'b0;
  hdr_t   tx_header = '0;
  word_t  tx_data = '0;
  logic   rx_valid, rx_sop, rx_eop, rx_empty, rx_crc_err;
  hdr_t   rx_header;
  word_t  rx_data;
  logic   pma_tx_valid, pma_rx_valid = 1'b0;
  block_t pma_tx_word, pma_rx_word = '0;
  logic   rx_lock, id_match, miswired;
  logic [31:0] idle_count, bit_err_count, lock_loss_count;
  idle_t  rx_idle;
  logic   ev_tx_collapse, ev_tx_gap, ev_rx_hdr_trl, ev_rx_sh_fix, ev_rx_proto_err, ev_rx_slip;
  int     checks = 0, failures = 0;

  serial_link dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- channel ----------------
  bit          bits_q[$];
  logic [57:0] dhist = '0;     // tracks the plain word of each block
  bit          inj_en = 0;
  int          inj_gap = 0, n_sync_inj = 0, n_data_inj = 0, n_idle_inj = 0;
  always @(posedge clk) begin
    block_t b;
    w64_t   plain;
    if (pma_tx_valid) begin
      b = pma_tx_word;
      plain = ref_descramble(dhist, b[65:2]);
      if (inj_en && inj_gap == 0) begin
        if (b[1:0] == 2'b01 && n_sync_inj <= n_data_inj) begin
          b[0] = ~b[0]; n_sync_inj++; inj_gap = 200;
        end else if (b[1:0] == 2'b01) begin
          b[2 + $urandom_range(0, 3)] ^= 1'b1; n_data_inj++; inj_gap = 200;
        end else if (b[1:0] == 2'b10 && plain[63:62] == 2'b00 && n_idle_inj < n_data_inj) begin
          b[2 + $urandom_range(0, 3)] ^= 1'b1; n_idle_inj++; inj_gap = 200;
        end
      end else if (inj_gap > 0) inj_gap--;
      for (int i = 0; i < BLOCK_W; i++) bits_q.push_back(b[i]);
    end
    if (bits_q.size() >= BLOCK_W) begin
      for (int i = 0; i < BLOCK_W; i++) pma_rx_word[i] <= bits_q.pop_front();
      pma_rx_valid <= 1'b1;
    end else pma_rx_valid <= 1'b0;
  end

  // ---------------- monitor ----------------
  beat_t got_q[$];
  int    n_coll = 0, n_gap = 0, n_ht = 0, n_fix = 0, n_perr = 0, n_acc = 0;
  always @(posedge clk) if (!rst) begin
    if (rx_valid) got_q.push_back({rx_sop, rx_eop, rx_empty, rx_crc_err, rx_header, rx_data});
    n_coll += int'(ev_tx_collapse);
    n_gap  += int'(ev_tx_gap);
    n_ht   += int'(ev_rx_hdr_trl);
    n_fix  += int'(ev_rx_sh_fix);
    n_perr += int'(ev_rx_proto_err);
    n_acc  += int'(tx_valid && tx_ready);
  end

  // ---------------- driver ----------------
  beat_t sent_q[$];
  task automatic send_pkt(input int len, input int gap_pct);
    logic [21:0] h;
    h = 22'($urandom);
    for (int k = 0; k < (len == 0 ? 1 : len); k++) begin
      while ($urandom_range(0, 99) < gap_pct) begin tx_valid = 1'b0; @(negedge clk); end
      tx_valid  = 1'b1;
      tx_sop    = (k == 0);
      tx_eop    = (k == len - 1) || (len == 0);
      tx_empty  = (len == 0);
      tx_header = h;
      tx_data   = (len == 0) ? '0 : {$urandom, $urandom};
      sent_q.push_back({tx_sop, tx_eop, tx_empty, 1'b0, h, tx_data});
      #1;
      while (!tx_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    tx_valid = 1'b0;
  endtask

  initial begin
    int rot, t, acc0, ncrc, ht0;
    logic [31:0] idle0;
    rot = $urandom_range(0, 65);
    for (int i = 0; i < rot; i++) bits_q.push_back(1'($urandom));
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    t = 0;
    while (!rx_lock && t < 5000) begin @(negedge clk); t++; end
    chk(rx_lock, "block lock");
    repeat (10) @(negedge clk);
    chk(id_match && !miswired && rx_idle == cfg_tx_idle, "far end identified by idle words");
    mon_clear = 1'b1; @(negedge clk); mon_clear = 1'b0;

    // Line rate: back-to-back 4-word packets, collapsing on.
    for (int p = 0; p < 30; p++) send_pkt(4, 0);
    repeat (2) @(negedge clk);
    acc0 = n_acc;
    t = 0;
    fork
      begin for (int p = 0; p < 40; p++) send_pkt(4, 0); end
      begin repeat (100) begin @(negedge clk); t++; end end
    join_any
    chk(n_acc - acc0 == 80, $sformatf("4 beats per 5 clocks: %0d beats in 100 clocks", n_acc - acc0));
    wait fork;

    // Mixed traffic with gaps, both framing modes, then with line errors.
    for (int p = 0; p < 150; p++) send_pkt($urandom_range(0, 6), 20);
    cfg_collapse = 1'b0;
    for (int p = 0; p < 100; p++) send_pkt($urandom_range(0, 6), 20);
    cfg_collapse = 1'b1;
    // Idle separation: back-to-back packets still get an idle word between
    // them and no collapsed word.
    repeat (20) @(negedge clk);
    idle0 = idle_count; ht0 = n_ht;
    cfg_idle_sep = 1'b1;
    for (int p = 0; p < 50; p++) send_pkt(4, 0);
    repeat (20) @(negedge clk);
    cfg_idle_sep = 1'b0;
    chk(n_ht == ht0, "no collapsed word with idle separation");
    chk(idle_count - idle0 >= 50 && idle_count - idle0 < 80,
        $sformatf("idle words between separated packets: %0d", idle_count - idle0));
    inj_en = 1;
    for (int p = 0; p < 400; p++) send_pkt($urandom_range(0, 6), 30);
    inj_en = 0;
    repeat (20) @(negedge clk);

    chk(got_q.size() == sent_q.size(), $sformatf("beats %0d sent %0d", got_q.size(), sent_q.size()));
    ncrc = 0;
    begin
      bit pkt_err;   // the packet this beat belongs to ended with crc_err
      pkt_err = 0;
      for (int i = sent_q.size() - 1; i >= 0; i--) if (i < got_q.size()) begin
        beat_t g, s;
        g = got_q[i]; s = sent_q[i];
        if (g.eop) pkt_err = g.err;
        ncrc += int'(g.err);
        chk(g.sop == s.sop && g.eop == s.eop && g.empty == s.empty && g.hdr == s.hdr
            && (g.err == 0 || g.eop), $sformatf("beat %0d markers", i));
        if (!pkt_err) chk(g.data == s.data, $sformatf("beat %0d data", i));
      end
    end
    chk(n_data_inj > 0 && ncrc == n_data_inj, $sformatf("CRC errors %0d for %0d damaged words", ncrc, n_data_inj));
    chk(n_sync_inj > 0 && n_fix == n_sync_inj, $sformatf("sync repairs %0d for %0d damaged headers", n_fix, n_sync_inj));
    chk(n_idle_inj > 0 && bit_err_count == 32'(3 * n_idle_inj + n_sync_inj), $sformatf("idle bit errors %0d for %0d flips", bit_err_count, n_idle_inj));
    chk(n_coll > 0 && n_ht == n_coll, "collapsed words sent and received");
    chk(n_gap > 0, "gaps inside packets");
    chk(n_perr == 0 && lock_loss_count == 0, "no protocol errors or lock loss");
    $display("events: collapse=%0d gap=%0d sync_fix=%0d crc_err=%0d idle_flips=%0d",
             n_coll, n_gap, n_fix, ncrc, n_idle_inj);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
