// tb_workload_low_cbf: bandwidth of one FPGA of the 6 x 8 x 6 array.
// Each FPGA has 5 + 7 + 5 = 17 links to its neighbours plus 3 loop-back
// links, so the interconnect is built with NUM_LINKS = 20, every lane looped
// straight back to its own receiver. All 20 links stream back-to-back
// 16-word (128-byte) packets with collapsing on. Over a 1700-clock window
// each link must accept exactly 16 beats in every 17 clocks (one control
// word per packet), and the 17 neighbour links together must carry at
// least 400 Gb/s of packet data at the 390.625 MHz word clock of a
// 25.78125 Gbaud lane: 17 x 25 Gb/s x 16/17 = 400 Gb/s. Every received
// word is checked against the sender's counting pattern, with no CRC
// errors.
module tb_workload_low_cbf;
  import link_pkg::*;

  localparam int NL = 20, NEIGH = 17, PKT = 16, WIN = 1700;
  localparam real F_CLK_MHZ = 390.625;

  logic            clk = 1'b0, rst = 1'b1;
  logic [NL-1:0]   cfg_collapse = '1, cfg_idle_sep = '0, mon_clear = '0;
  idle_t           cfg_tx_idle [NL], cfg_rx_idle_expect [NL];
  logic [NL-1:0]   tx_valid = '0, tx_ready, tx_sop, tx_eop, tx_empty = '0;
  hdr_t            tx_header [NL];
  word_t           tx_data [NL];
  logic [NL-1:0]   rx_valid, rx_sop, rx_eop, rx_empty, rx_crc_err;
  hdr_t            rx_header [NL];
  word_t           rx_data [NL];
  logic [NL-1:0]   pma_tx_valid, pma_rx_valid;
  block_t          pma_tx_word [NL], pma_rx_word [NL];
  logic [NL-1:0]   rx_lock, id_match, miswired;
  logic [31:0]     idle_count [NL], bit_err_count [NL], lock_loss_count [NL];
  idle_t           rx_idle [NL];
  logic [NL-1:0]   ev_tx_collapse, ev_tx_gap, ev_rx_hdr_trl, ev_rx_sh_fix, ev_rx_proto_err, ev_rx_slip;

  serial_interconnect #(.NUM_LINKS(NL)) dut (.*);
  always #5 clk = ~clk;

  // Loop-back: each lane's blocks go straight to its own receiver.
  assign pma_rx_valid = pma_tx_valid;
  assign pma_rx_word  = pma_tx_word;

  int checks = 0, failures = 0;
  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sources: beat k of the stream of link l carries {l, k}; sop/eop mark
  // 16-beat packets. The next beat is offered as soon as one is taken.
  bit measure = 0;
  int sent [NL], rcvd [NL], acc [NL], bad_data [NL], crc_errs [NL];

  always_comb
    for (int l = 0; l < NL; l++) begin
      tx_sop[l]    = (sent[l] % PKT == 0);
      tx_eop[l]    = (sent[l] % PKT == PKT - 1);
      tx_header[l] = hdr_t'(l);
      tx_data[l]   = {32'(l), 32'(sent[l])};
    end

  always @(posedge clk)
    for (int l = 0; l < NL; l++) begin
      if (rst) begin
        sent[l] <= 0; rcvd[l] <= 0; acc[l] <= 0; bad_data[l] <= 0; crc_errs[l] <= 0;
      end else begin
        if (tx_valid[l] && tx_ready[l]) begin
          sent[l] <= sent[l] + 1;
          if (measure) acc[l] <= acc[l] + 1;
        end
        if (rx_valid[l]) begin
          if (rx_data[l] != {32'(l), 32'(rcvd[l])} || rx_header[l] != hdr_t'(l))
            bad_data[l] <= bad_data[l] + 1;
          if (rx_crc_err[l]) crc_errs[l] <= crc_errs[l] + 1;
          rcvd[l] <= rcvd[l] + 1;
        end
      end
    end

  initial begin
    real gbps;
    int  total;
    for (int l = 0; l < NL; l++) begin
      cfg_tx_idle[l] = idle_t'(l);
      cfg_rx_idle_expect[l] = idle_t'(l);
    end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 3000 && rx_lock != '1; t++) @(negedge clk);
    chk(rx_lock == '1, "all lanes locked");
    repeat (10) @(negedge clk);
    tx_valid = '1;
    repeat (100) @(negedge clk);
    measure = 1;
    repeat (WIN) @(negedge clk);
    measure = 0;
    repeat (5) @(negedge clk);
    tx_valid = '0;
    // Let the last packets finish (the source stops only between packets).
    repeat (40) @(negedge clk);
    total = 0;
    for (int l = 0; l < NL; l++) begin
      chk(acc[l] == WIN * PKT / (PKT + 1), $sformatf("link %0d: %0d beats in %0d clocks", l, acc[l], WIN));
      chk(bad_data[l] == 0 && crc_errs[l] == 0, $sformatf("link %0d data: %0d bad, %0d CRC errors", l, bad_data[l], crc_errs[l]));
      chk(rcvd[l] > 0 && rcvd[l] <= sent[l], $sformatf("link %0d received %0d of %0d", l, rcvd[l], sent[l]));
      if (l < NEIGH) total += acc[l];
    end
    gbps = real'(total) * 64.0 * F_CLK_MHZ / real'(WIN) / 1000.0;
    $display("neighbour links carry %0.1f Gb/s of packet data", gbps);
    chk(gbps >= 400.0, "at least 400 Gb/s per FPGA");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
