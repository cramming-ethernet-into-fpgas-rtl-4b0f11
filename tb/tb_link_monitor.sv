// tb_link_monitor: feeds idle words with a chosen number of flipped bits,
// damaged-sync pulses and lock drops, and compares the counters with sums
// kept in the testbench. Also checks: rx_idle/id_match follow the last idle
// word; miswired sets on the MISWIRE_COUNT-th identical unexpected idle word
// in a row (not before) and clears on an expected one; clear zeroes the
// counters; counters saturate (CNT_W reduced to 8 for that).
module tb_link_monitor;
  import link_pkg::*;
  import tb_ref_pkg::*;

  localparam int CNT_W = 8;
  localparam int MISWIRE_COUNT = 8;

  logic             clk = 1'b0, rst = 1'b1, clear = 1'b0;
  idle_t            cfg_idle_expect = 62'h1555_0000_FFFF_1234;
  logic             ev_idle = 1'b0, sh_err = 1'b0, lock = 1'b0;
  word_t            idle_word = '0;
  logic [CNT_W-1:0] idle_count, bit_err_count, lock_loss_count;
  idle_t            rx_idle;
  logic             id_match, miswired;
  int               checks = 0, failures = 0;

  link_monitor #(.CNT_W(CNT_W), .MISWIRE_COUNT(MISWIRE_COUNT)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic w64_t flip(input w64_t w, input int n);
    int p;
    w64_t m;
    m = '0;
    while (popcount64(m) < n) begin
      p = $urandom_range(0, 63);
      m[p] = 1'b1;
    end
    return w ^ m;
  endfunction

  task automatic pulse(input bit idle, input w64_t w, input bit she);
    ev_idle   = idle;
    idle_word = w;
    sh_err    = she;
    @(negedge clk);
    ev_idle = 1'b0;
    sh_err  = 1'b0;
  endtask

  initial begin
    int   n_idle, n_err, n_loss, e;
    w64_t good, w;
    good = idle_w(cfg_idle_expect);
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    n_idle = 0; n_err = 0; n_loss = 0;
    lock = 1'b1;
    for (int i = 0; i < 40; i++) begin
      e = ($urandom_range(0, 2) == 0) ? $urandom_range(1, 3) : 0;
      w = flip(good, e);
      pulse(1, w, 0);
      n_idle++;
      n_err += e;
      chk(rx_idle == w[61:0] && id_match == (e == 0), "last idle and match");
      if ($urandom_range(0, 3) == 0) begin pulse(0, '0, 1); n_err++; end
      if (i % 10 == 9) begin
        lock = 1'b0; @(negedge clk); lock = 1'b1; @(negedge clk);
        n_loss++;
      end
      chk(idle_count == CNT_W'(n_idle), "idle count");
      chk(bit_err_count == CNT_W'(n_err), $sformatf("bit errors %0d exp %0d", bit_err_count, n_err));
      chk(lock_loss_count == CNT_W'(n_loss), "lock losses");
    end
    // Miswiring: a different far end keeps sending its own pattern.
    w = idle_w(62'h0BAD_0BAD_0BAD_0BAD);
    for (int i = 1; i <= MISWIRE_COUNT; i++) begin
      pulse(1, w, 0);
      chk(miswired == (i >= MISWIRE_COUNT), $sformatf("miswired after %0d words", i));
      chk(!id_match, "no match from wrong far end");
    end
    pulse(1, good, 0);
    chk(!miswired && id_match, "expected idle clears miswired");
    // Clear.
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    chk(idle_count == 0 && bit_err_count == 0 && lock_loss_count == 0, "clear");
    // Saturation: 64 words of 5 errors overflow 8 bits.
    for (int i = 0; i < 64; i++) pulse(1, flip(good, 5), 0);
    chk(bit_err_count == '1, "bit error counter saturates");
    for (int i = 0; i < 200; i++) pulse(1, good, 0);
    chk(idle_count == '1, "idle counter saturates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
