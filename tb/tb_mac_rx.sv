// tb_mac_rx: an encoder in the testbench builds the word stream the
// deframer receives, from a list of random packets:
//   headers, data, trailers with the CRC of the reference model, trailers
//   collapsed with the next header at random, idle words at random inside
//   and between packets, some packets with a wrong CRC, and damaged sync
//   headers (00 or 11) on idle words, on data words and on header words
//   that follow an idle word.
// The beats that come out must be exactly the expected ones: data in order,
// sop/eop/empty markers, header on every beat, crc_err on the last beat of
// each damaged packet only. Then protocol errors: data outside a packet is
// dropped, a header inside a packet ends it with crc_err, loss of lock ends
// an open packet with crc_err; ev_proto_err must pulse for each.
// Every repaired sync header must give one ev_sh_fix pulse, and every idle
// word one ev_idle pulse.
module tb_mac_rx;
  import link_pkg::*;
  import tb_ref_pkg::*;

  typedef struct packed {
    logic        sop, eop, empty, err;
    logic [21:0] hdr;
    logic [63:0] data;
  } obeat_t;

  logic       clk = 1'b0, rst = 1'b1;
  idle_t      cfg_idle_expect = 62'h2A5A_1234_0F0F_7777;
  logic       lock = 1'b1, in_valid = 1'b0;
  logic [1:0] in_sync = 2'b10;
  word_t      in_word = '0;
  logic       m_valid, m_sop, m_eop, m_empty, m_crc_err;
  hdr_t       m_header;
  word_t      m_data, idle_word;
  logic       ev_idle, ev_sh_fix, ev_proto_err, ev_hdr_trl;
  int         checks = 0, failures = 0;

  mac_rx dut (.*);
  always #5 clk = ~clk;

  obeat_t got_q[$], exp_q[$];
  int     n_fix = 0, n_idle = 0, n_perr = 0, n_ht = 0;
  always @(posedge clk) if (!rst) begin
    if (m_valid) got_q.push_back({m_sop, m_eop, m_empty, m_crc_err, m_header, m_data});
    n_fix  += int'(ev_sh_fix);
    n_idle += int'(ev_idle);
    n_perr += int'(ev_proto_err);
    n_ht   += int'(ev_hdr_trl);
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

  task automatic send(input bit ctrl, input w64_t w, input bit damage);
    in_valid = 1'b1;
    in_sync  = ctrl ? 2'b10 : 2'b01;
    if (damage) in_sync = $urandom_range(0, 1) ? 2'b00 : 2'b11;
    in_word  = w;
    @(negedge clk);
  endtask

  int exp_idle = 0, exp_fix = 0, exp_ht = 0;
  task automatic send_idle(input bit damage);
    send(1, idle_w(cfg_idle_expect), damage);
    exp_idle++;
    exp_fix += int'(damage);
  endtask

  task automatic compare(input string tag);
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    chk(got_q.size() == exp_q.size(), $sformatf("%s: %0d beats, expected %0d", tag, got_q.size(), exp_q.size()));
    foreach (exp_q[i])
      if (i < got_q.size())
        chk(got_q[i] == exp_q[i], $sformatf("%s beat %0d got %h exp %h", tag, i, got_q[i], exp_q[i]));
    got_q.delete();
    exp_q.delete();
  endtask

  initial begin
    int          len, prev_open;
    bit          bad, dmg;
    logic [21:0] hdr, prev_hdr;
    logic [31:0] prev_crc;
    w64_t        ws[$], w;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    send_idle(0);

    // Random legal traffic.
    prev_open = 0;
    for (int p = 0; p < 200; p++) begin
      len = $urandom_range(0, 5);
      hdr = 22'($urandom);
      bad = ($urandom_range(0, 9) == 0);
      ws.delete();
      for (int k = 0; k < len; k++) ws.push_back({$urandom, $urandom});
      // Close the previous packet, open this one.
      if (prev_open && $urandom_range(0, 1)) begin
        send(1, cw(1, 1, hdr, prev_crc), 0);
        exp_ht++;
      end else begin
        if (prev_open) send(1, cw(0, 1, '0, prev_crc), 0);
        while ($urandom_range(0, 2) == 0) send_idle($urandom_range(0, 3) == 0);
        send_idle(0);
        dmg = ($urandom_range(0, 3) == 0);
        send(1, cw(1, 0, hdr, '0), dmg);
        exp_fix += int'(dmg);
      end
      foreach (ws[k]) begin
        while ($urandom_range(0, 3) == 0) send_idle($urandom_range(0, 3) == 0);
        dmg = ($urandom_range(0, 5) == 0);
        send(0, ws[k], dmg);
        exp_fix += int'(dmg);
        exp_q.push_back({k == 0, k == len - 1, 1'b0, bad && k == len - 1, hdr, ws[k]});
      end
      if (len == 0) exp_q.push_back({1'b1, 1'b1, 1'b1, bad, hdr, 64'h0});
      prev_crc  = ref_crc32(ws) ^ (bad ? 32'h0000_0100 : 32'h0);
      prev_open = 1;
    end
    send(1, cw(0, 1, '0, prev_crc), 0);
    send_idle(0);
    compare("random traffic");
    chk(n_fix == exp_fix, $sformatf("sync repairs %0d expected %0d", n_fix, exp_fix));
    chk(n_idle == exp_idle, $sformatf("idle words %0d expected %0d", n_idle, exp_idle));
    chk(n_ht == exp_ht, "header-and-trailer words counted");
    chk(n_perr == 0, "no protocol error in legal traffic");

    // Data outside a packet is dropped.
    n_perr = 0;
    send(0, 64'hDEAD, 0);
    send_idle(0);
    compare("stray data");
    chk(n_perr == 1, "stray data flagged");
    // Header inside a packet ends the open one as damaged.
    w = {$urandom, $urandom};
    send(1, cw(1, 0, 22'h111, '0), 0);
    send(0, w, 0);
    send(1, cw(1, 0, 22'h222, '0), 0);
    exp_q.push_back({1'b1, 1'b1, 1'b0, 1'b1, 22'h111, w});
    ws = {w};
    send(0, w, 0);
    send(1, cw(0, 1, '0, ref_crc32(ws)), 0);
    exp_q.push_back({1'b1, 1'b1, 1'b0, 1'b0, 22'h222, w});
    send_idle(0);
    compare("header inside packet");
    chk(n_perr == 2, "header inside packet flagged");
    // Loss of lock ends an open packet as damaged.
    send(1, cw(1, 0, 22'h333, '0), 0);
    send(0, w, 0);
    lock = 1'b0;
    in_valid = 1'b0;
    @(negedge clk);
    exp_q.push_back({1'b1, 1'b1, 1'b0, 1'b1, 22'h333, w});
    lock = 1'b1;
    send_idle(0);
    compare("loss of lock");
    chk(n_perr == 3, "loss of lock flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
