// tb_block_aligner: a bit-level channel model serialises 66-bit blocks
// (valid sync header, random payload) and regroups the bits into 66-bit
// words at a random rotation, as a transceiver would deliver them.
//  - Lock must come within 3000 clocks, after at least LOCK_COUNT words.
//  - Once locked, every output block must be the next sent block, in order.
//  - 15 damaged sync headers in a row must not break lock (BAD_LIMIT = 16);
//  - 32 in a row (so that one 64-block window holds at least 16 of them)
//    must drop lock, with a slip; lock must then return and the block
//    stream must again match.
module tb_block_aligner;
  import link_pkg::*;

  localparam int LOCK_COUNT = 64;

  logic   clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  block_t in_word = '0;
  logic   out_valid, lock, slip_pulse;
  block_t out_block;
  int     checks = 0, failures = 0;

  block_aligner #(.LOCK_COUNT(LOCK_COUNT), .WINDOW(64), .BAD_LIMIT(16)) dut (.*);
  always #5 clk = ~clk;

  bit     bits_q[$];
  block_t sent_q[$];
  int     bad_run = 0;      // damaged headers still to send

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

  function automatic block_t new_block();
    block_t b;
    b[65:2] = {$urandom, $urandom};
    b[1:0]  = $urandom_range(0, 1) ? 2'b01 : 2'b10;
    if (bad_run > 0) begin
      b[1:0] = $urandom_range(0, 1) ? 2'b00 : 2'b11;
      bad_run--;
    end
    return b;
  endfunction

  // One clock of channel: fill the bit queue, deliver 66 bits.
  task automatic step();
    block_t b;
    while (bits_q.size() < BLOCK_W) begin
      b = new_block();
      sent_q.push_back(b);
      for (int i = 0; i < BLOCK_W; i++) bits_q.push_back(b[i]);
    end
    for (int i = 0; i < BLOCK_W; i++) in_word[i] = bits_q.pop_front();
    in_valid = 1'b1;
    @(negedge clk);
  endtask

  // Wait for lock, then line up with the sent stream and compare n blocks.
  task automatic lock_and_compare(input int n, input string tag);
    int t, idx;
    bit found;
    t = 0;
    while (!lock && t < 3000) begin step(); t++; end
    chk(lock, {tag, ": lock reached"});
    found = 0;
    for (int k = sent_q.size() - 1; k >= 0 && k >= sent_q.size() - 6; k--)
      if (sent_q[k] == out_block) begin idx = k; found = 1; end
    chk(found, {tag, ": output block found in sent stream"});
    for (int j = 0; j < n; j++) begin
      step();
      idx++;
      chk(lock && out_valid && out_block == sent_q[idx], $sformatf("%s: block %0d", tag, j));
    end
  endtask

  initial begin
    int rot, t, slips, cyc;
    rot = $urandom_range(1, 65);
    for (int i = 0; i < rot; i++) bits_q.push_back(1'($urandom));
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    cyc = 0; slips = 0;
    while (!lock && cyc < 3000) begin
      step();
      cyc++;
      slips += int'(slip_pulse);
    end
    chk(cyc > LOCK_COUNT, $sformatf("lock needs LOCK_COUNT good headers (took %0d)", cyc));
    chk(slips > 0 || rot == 0, "slipped to find the boundary");
    lock_and_compare(300, "first lock");
    // 15 bad headers in a row: lock holds.
    bad_run = 15;
    t = 0;
    repeat (200) begin step(); if (!lock) t++; end
    chk(t == 0, "15 bad headers keep lock");
    // 32 bad headers: lock lost.
    bad_run = 32;
    t = 0; slips = 0;
    repeat (60) begin step(); if (!lock) t++; slips += int'(slip_pulse); end
    chk(t > 0, "32 bad headers drop lock");
    chk(slips > 0, "slip after losing lock");
    lock_and_compare(300, "relock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
