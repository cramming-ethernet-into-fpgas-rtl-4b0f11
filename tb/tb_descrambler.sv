// tb_descrambler: a bit-serial reference scrambler, started from a random
// history the descrambler does not know, feeds the descrambler.
//  - Self-synchronisation: from the second word on, every output word must
//    equal the word that was scrambled.
//  - Error multiplication: one line bit is flipped in some words; the
//    output must then differ from the sent data in exactly three bits, at
//    the flipped position and 39 and 58 bits later (across word borders).
//  - out_valid follows in_valid by one clock.
module tb_descrambler;
  import link_pkg::*;
  import tb_ref_pkg::*;

  logic  clk = 1'b0, rst = 1'b1, in_valid = 1'b0, out_valid;
  word_t in_data = '0, out_data;
  int    checks = 0, failures = 0;

  descrambler dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [57:0]  hist;
    w64_t         sent, line, prev_sent;
    logic [127:0] err_mask;   // expected output error bits, this + next word
    int           pos, n_err;
    hist = {$urandom, $urandom};
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    err_mask = '0;
    for (int n = 0; n < 3000; n++) begin
      sent     = {$urandom, $urandom};
      line     = ref_scramble(hist, sent);
      in_valid = 1'b1;
      pos      = -1;
      // Inject single errors only where the previous one has died out.
      if (n > 4 && n % 7 == 0 && err_mask == '0) begin
        pos = $urandom_range(0, 63);
        line[pos] = ~line[pos];
      end
      in_data = line;
      prev_sent = sent;
      @(negedge clk);
      chk(out_valid, "out_valid");
      if (pos >= 0) begin
        err_mask[pos]      = 1'b1;
        err_mask[pos + 39] = 1'b1;
        err_mask[pos + 58] = 1'b1;
      end
      if (n >= 1) begin
        chk((out_data ^ prev_sent) == err_mask[63:0],
            $sformatf("word %0d diff %h exp %h", n, out_data ^ prev_sent, err_mask[63:0]));
        if (pos >= 0) begin
          n_err = popcount64(out_data ^ prev_sent) + popcount64(err_mask[127:64]);
          chk(n_err == 3, "one line error gives three");
        end
      end
      err_mask = {64'h0, err_mask[127:64]};
    end
    in_valid = 1'b0;
    @(negedge clk);
    chk(!out_valid, "out_valid drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
