// tb_mac_tx: checks the transmit framer word by word.
//  1. Known answer: a one-word packet holding the bytes "12345678" must end
//     with a trailer whose CRC field is 0x9AE0DAAF (the standard CRC-32 of
//     that string).
//  2. Exact sequences for three packets A (2 words), B (1 word), C (empty),
//     offered back to back: with collapsing on the words must be
//     HDR(A) a0 a1 HT(A,B) b0 HT(B,C) TRL(C) IDLE...; with it off
//     HDR(A) a0 a1 TRL(A) HDR(B) b0 TRL(B) HDR(C) TRL(C) IDLE...
//  3. Rate: 20 back-to-back packets of 4 words with collapsing must take
//     exactly 20 * 5 + 1 words from the first header to the last trailer
//     (one control word per packet, one word per clock).
//  4. Random packets with random gaps inside and between packets are
//     parsed by an independent decoder: headers, data and CRC must match;
//     idle words must carry cfg_idle; gaps inside packets and collapsed
//     words must both occur.
module tb_mac_tx;
  import link_pkg::*;
  import tb_ref_pkg::*;

  typedef struct packed {
    logic        sop, eop, empty;
    logic [21:0] hdr;
    logic [63:0] data;
  } beat_t;

  logic  clk = 1'b0, rst = 1'b1;
  logic  cfg_collapse = 1'b1, cfg_idle_sep = 1'b0;
  idle_t cfg_idle = 62'h0123_4567_89AB_CDEF;
  logic  s_valid = 1'b0, s_ready, s_sop = 1'b0, s_eop = 1'b0, s_empty = 1'b0;
  hdr_t  s_header = '0;
  word_t s_data = '0;
  logic  out_valid, out_ctrl, ev_collapse, ev_gap;
  word_t out_word;
  int    checks = 0, failures = 0;

  mac_tx dut (.*);
  always #5 clk = ~clk;

  logic [64:0] mon_q[$];   // {ctrl, word}
  int          n_coll = 0, n_gap = 0;
  always @(posedge clk) if (!rst && out_valid) begin
    mon_q.push_back({out_ctrl, out_word});
    n_coll += int'(ev_collapse);
    n_gap  += int'(ev_gap);
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Offer beats in order; gap_pct = chance of an empty cycle before a beat.
  task automatic drive(input beat_t beats[$], input int gap_pct);
    foreach (beats[i]) begin
      while ($urandom_range(0, 99) < gap_pct) begin
        s_valid = 1'b0;
        @(negedge clk);
      end
      s_valid  = 1'b1;
      s_sop    = beats[i].sop;
      s_eop    = beats[i].eop;
      s_empty  = beats[i].empty;
      s_header = beats[i].hdr;
      s_data   = beats[i].data;
      #1;
      while (!s_ready) begin
        @(negedge clk);
        #1;
      end
      @(negedge clk);
    end
    s_valid = 1'b0;
  endtask

  task automatic settle();
    s_valid = 1'b0;
    repeat (6) @(negedge clk);
  endtask

  function automatic beat_t mk(input bit sop, eop, empty,
                               input logic [21:0] h, input w64_t d);
    beat_t b;
    b.sop = sop; b.eop = eop; b.empty = empty; b.hdr = h; b.data = d;
    return b;
  endfunction

  // Strip idle control words before the first non-idle word.
  function automatic void strip_lead();
    while (mon_q.size() > 0 && mon_q[0][64] && mon_q[0][63:62] == 2'b00)
      void'(mon_q.pop_front());
  endfunction

  task automatic expect_seq(input logic [64:0] exp[$], input string tag);
    strip_lead();
    chk(mon_q.size() >= exp.size(), {tag, ": length"});
    foreach (exp[i])
      if (i < mon_q.size())
        chk(mon_q[i] == exp[i], $sformatf("%s word %0d got %h exp %h", tag, i, mon_q[i], exp[i]));
    mon_q.delete();
  endtask

  initial begin
    beat_t       bq[$];
    logic [64:0] exp[$];
    w64_t        a0, a1, b0, wq[$];
    logic [31:0] ca, cb, cc;
    logic [21:0] ha, hb, hc;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    settle();
    mon_q.delete();

    // 1. Known answer.
    bq = {mk(1, 1, 0, 22'h1, 64'h3837_3635_3433_3231)};
    drive(bq, 0);
    settle();
    strip_lead();
    chk(mon_q.size() >= 3 && mon_q[2] == {1'b1, cw(0, 1, '0, 32'h9AE0_DAAF)}, "CRC known answer");
    mon_q.delete();

    // 2. Exact sequences.
    a0 = 64'h3736_3534_3332_3130; a1 = 64'h3F3E_3D3C_3B3A_3938; b0 = {$urandom, $urandom};
    ha = 22'h12345; hb = 22'h2AAAA; hc = 22'h00007;
    wq = {a0, a1}; ca = ref_crc32(wq);
    wq = {b0};     cb = ref_crc32(wq);
    wq = {};       cc = ref_crc32(wq);
    chk(ca == 32'h8075_C2B9, "reference CRC of bytes 30..3f");
    // mode 2: collapse requested but overruled by the idle separation
    for (int mode = 2; mode >= 0; mode--) begin
      cfg_collapse = (mode != 0);
      cfg_idle_sep = (mode == 2);
      bq = {mk(1, 0, 0, ha, a0), mk(0, 1, 0, ha, a1), mk(1, 1, 0, hb, b0), mk(1, 1, 1, hc, '0)};
      exp.delete();
      exp.push_back({1'b1, cw(1, 0, ha, '0)});
      exp.push_back({1'b0, a0});
      exp.push_back({1'b0, a1});
      if (mode == 2) begin
        exp.push_back({1'b1, cw(0, 1, '0, ca)});
        exp.push_back({1'b1, idle_w(cfg_idle)});
        exp.push_back({1'b1, cw(1, 0, hb, '0)});
        exp.push_back({1'b0, b0});
        exp.push_back({1'b1, cw(0, 1, '0, cb)});
        exp.push_back({1'b1, idle_w(cfg_idle)});
        exp.push_back({1'b1, cw(1, 0, hc, '0)});
      end else if (mode == 1) begin
        exp.push_back({1'b1, cw(1, 1, hb, ca)});
        exp.push_back({1'b0, b0});
        exp.push_back({1'b1, cw(1, 1, hc, cb)});
      end else begin
        exp.push_back({1'b1, cw(0, 1, '0, ca)});
        exp.push_back({1'b1, cw(1, 0, hb, '0)});
        exp.push_back({1'b0, b0});
        exp.push_back({1'b1, cw(0, 1, '0, cb)});
        exp.push_back({1'b1, cw(1, 0, hc, '0)});
      end
      exp.push_back({1'b1, cw(0, 1, '0, cc)});
      exp.push_back({1'b1, idle_w(cfg_idle)});
      drive(bq, 0);
      settle();
      expect_seq(exp, mode == 2 ? "idle separation" : mode ? "collapse on" : "collapse off");
    end
    cfg_idle_sep = 1'b0;

    // 3. Rate with collapsing.
    cfg_collapse = 1'b1;
    bq = {};
    for (int p = 0; p < 20; p++)
      for (int k = 0; k < 4; k++) bq.push_back(mk(k == 0, k == 3, 0, 22'(p), {$urandom, $urandom}));
    drive(bq, 0);
    settle();
    strip_lead();
    begin
      int last;
      last = -1;
      foreach (mon_q[i]) if (mon_q[i][64] && mon_q[i][63:62] == 2'b01) last = i;
      chk(last == 20 * 5, $sformatf("back-to-back rate: trailer at word %0d", last));
    end
    mon_q.delete();

    // 4. Random packets, random gaps, parsed independently.
    begin
      logic [21:0] hdrs[$];
      w64_t        data[$];
      int          lens[$];
      int          n, len, pi, di, in_pkt, cur_len;
      logic [21:0] cur_hdr;
      w64_t        cur_w[$];
      bq = {};
      for (int p = 0; p < 150; p++) begin
        len = $urandom_range(0, 6);
        hdrs.push_back(22'($urandom));
        lens.push_back(len);
        if (len == 0) bq.push_back(mk(1, 1, 1, hdrs[p], '0));
        for (int k = 0; k < len; k++) begin
          data.push_back({$urandom, $urandom});
          bq.push_back(mk(k == 0, k == len - 1, 0, hdrs[p], data[$]));
        end
      end
      cfg_collapse = 1'b1;
      n_coll = 0; n_gap = 0;
      drive(bq, 30);
      settle();
      pi = 0; di = 0; in_pkt = 0;
      foreach (mon_q[i]) begin
        if (!mon_q[i][64]) begin
          chk(in_pkt == 1, "data only inside a packet");
          cur_w.push_back(mon_q[i][63:0]);
          chk(mon_q[i][63:0] == data[di], $sformatf("data word %0d", di));
          di++;
        end else begin
          case (mon_q[i][63:62])
            2'b00: chk(mon_q[i][63:0] == idle_w(cfg_idle), "idle pattern");
            default: begin
              if (mon_q[i][62]) begin   // trailer part
                chk(in_pkt == 1, "trailer closes a packet");
                chk(cur_w.size() == lens[pi], $sformatf("packet %0d length", pi));
                chk(mon_q[i][31:0] == ref_crc32(cur_w), $sformatf("packet %0d CRC", pi));
                chk(cur_hdr == hdrs[pi], $sformatf("packet %0d header", pi));
                pi++;
                in_pkt = 0;
              end
              if (mon_q[i][63]) begin   // header part
                chk(in_pkt == 0, "header opens a packet");
                cur_hdr = mon_q[i][61:40];
                cur_w.delete();
                in_pkt = 1;
              end
            end
          endcase
        end
      end
      chk(pi == 150, $sformatf("all packets seen (%0d)", pi));
      chk(n_gap > 0, "gap inside a packet happened");
      chk(n_coll > 0, "collapsed header and trailer happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
