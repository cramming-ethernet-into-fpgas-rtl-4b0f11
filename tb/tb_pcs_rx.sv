// tb_pcs_rx: words are scrambled by the bit-serial reference, given sync
// headers, serialised and regrouped at a random rotation (channel model).
//  - out_valid must stay low until lock;
//  - after lock every output word and sync header must be the next one
//    sent, in order (alignment and descrambling together);
//  - a sync header damaged on the line must raise sh_err for that word,
//    show 00/11 on out_sync, and leave the payload intact.
module tb_pcs_rx;
  import link_pkg::*;
  import tb_ref_pkg::*;

  logic       clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  block_t     in_word = '0;
  logic       out_valid, lock, slip_pulse, sh_err;
  logic [1:0] out_sync;
  word_t      out_word;
  int         checks = 0, failures = 0;

  pcs_rx dut (.*);
  always #5 clk = ~clk;

  bit          bits_q[$];
  w64_t        word_q[$];
  logic [1:0]  sync_q[$];
  logic [57:0] hist = '0;
  bit          damage_next = 0;

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

  task automatic step();
    w64_t       w, s;
    logic [1:0] sh;
    while (bits_q.size() < BLOCK_W) begin
      w  = {$urandom, $urandom};
      sh = $urandom_range(0, 1) ? 2'b01 : 2'b10;
      if (damage_next) begin sh[0] = ~sh[0]; damage_next = 0; end
      s  = ref_scramble(hist, w);
      word_q.push_back(w);
      sync_q.push_back(sh);
      for (int i = 0; i < 2; i++)  bits_q.push_back(sh[i]);
      for (int i = 0; i < 64; i++) bits_q.push_back(s[i]);
    end
    for (int i = 0; i < BLOCK_W; i++) in_word[i] = bits_q.pop_front();
    in_valid = 1'b1;
    @(negedge clk);
  endtask

  initial begin
    int rot, cyc, idx, nbad, nerr;
    bit found;
    rot = $urandom_range(0, 65);
    for (int i = 0; i < rot; i++) bits_q.push_back(1'($urandom));
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    cyc = 0; nbad = 0;
    while (!out_valid && cyc < 3000) begin
      step();
      cyc++;
      if (!lock && out_valid) nbad++;
    end
    chk(out_valid && lock, "lock and output");
    chk(nbad == 0, "no output before lock");
    found = 0;
    for (int k = word_q.size() - 1; k >= 0 && k >= word_q.size() - 8; k--)
      if (word_q[k] == out_word && sync_q[k] == out_sync) begin idx = k; found = 1; end
    chk(found, "first word found in sent stream");
    nerr = 0;
    for (int j = 0; j < 1000; j++) begin
      if (j % 50 == 25) damage_next = 1;
      step();
      idx++;
      chk(out_valid && out_word == word_q[idx] && out_sync == sync_q[idx],
          $sformatf("word %0d", j));
      chk(sh_err == (sync_q[idx][0] == sync_q[idx][1]), "sh_err flags damaged header");
      nerr += int'(sh_err);
    end
    chk(nerr >= 15, $sformatf("damaged headers seen (%0d)", nerr));
    chk(lock, "lock held through isolated header errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
