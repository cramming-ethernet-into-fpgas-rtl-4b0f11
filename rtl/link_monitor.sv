// link_monitor: bit-error-rate and wiring monitor built on the idle words.
//
// Each link sends a programmable 62-bit idle pattern, for example a code
// naming the sending FPGA and port. The receiver knows what its far end
// should send (cfg_idle_expect), so every received idle word is a known
// test pattern:
//   - bit_err_count adds the number of payload bits that differ from the
//     expected idle word, plus one for every damaged sync header; with
//     idle_count (idle words seen) this gives a running bit-error estimate.
//     Note that the descrambler turns one line error into three, so the
//     count overstates line errors by about three;
//   - rx_idle is the last idle pattern received (which far end is wired
//     here), id_match says it was the expected one, and miswired is set once
//     MISWIRE_COUNT identical idle words in a row differ from the expected
//     pattern (wrong cable or wrong configuration); an expected idle word
//     clears it;
//   - lock_loss_count counts falls of block lock.
// Counters saturate; clear zeroes them. Inputs are pulses from mac_rx and
// pcs_rx; outputs are registered.
// Using idle words to identify links and to measure the error rate follows
// the published link; the counting rules and widths are this design's.
module link_monitor
  import link_pkg::*;
#(
  parameter int unsigned CNT_W         = 32,
  parameter int unsigned MISWIRE_COUNT = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clear,
  input  idle_t            cfg_idle_expect,
  input  logic             ev_idle,
  input  word_t            idle_word,
  input  logic             sh_err,
  input  logic             lock,
  output logic [CNT_W-1:0] idle_count,
  output logic [CNT_W-1:0] bit_err_count,
  output logic [CNT_W-1:0] lock_loss_count,
  output idle_t            rx_idle,
  output logic             id_match,
  output logic             miswired
);

  localparam int unsigned RUN_W = $clog2(MISWIRE_COUNT + 1);

  logic [6:0]       diff_bits;
  logic [CNT_W:0]   err_sum;
  logic [RUN_W-1:0] run_q;
  logic             lock_q;
  word_t            expect_w;

  assign expect_w = make_idle(cfg_idle_expect);

  always_comb begin
    diff_bits = '0;
    if (ev_idle)
      for (int i = 0; i < WORD_W; i++) diff_bits += 7'(idle_word[i] ^ expect_w[i]);
    err_sum = {1'b0, bit_err_count} + (CNT_W+1)'(diff_bits) + (CNT_W+1)'(sh_err);
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      idle_count      <= '0;
      bit_err_count   <= '0;
      lock_loss_count <= '0;
      rx_idle         <= '0;
      id_match        <= 1'b0;
      miswired        <= 1'b0;
      run_q           <= '0;
      lock_q          <= 1'b0;
    end else begin
      lock_q <= lock;
      if (lock_q && !lock && lock_loss_count != '1)
        lock_loss_count <= lock_loss_count + 1'b1;
      bit_err_count <= err_sum[CNT_W] ? '1 : err_sum[CNT_W-1:0];
      if (ev_idle) begin
        if (idle_count != '1) idle_count <= idle_count + 1'b1;
        rx_idle  <= idle_word[IDLE_W-1:0];
        id_match <= (diff_bits == '0);
        if (diff_bits == '0) begin
          run_q    <= '0;
          miswired <= 1'b0;
        end else if (idle_word[IDLE_W-1:0] == rx_idle) begin
          if (run_q != RUN_W'(MISWIRE_COUNT - 1)) run_q <= run_q + 1'b1;
          if (run_q >= RUN_W'(MISWIRE_COUNT - 2)) miswired <= 1'b1;
        end else begin
          run_q <= '0;
        end
      end
    end
  end

endmodule
