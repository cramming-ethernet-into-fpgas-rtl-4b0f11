// tb_pcs_tx: random data and control words go in; each 66-bit block must
// come out one clock later with sync header 01 (data) or 10 (control) in
// bits [1:0] and the payload scrambled as by the bit-serial reference.
module tb_pcs_tx;
  import link_pkg::*;
  import tb_ref_pkg::*;

  logic   clk = 1'b0, rst = 1'b1, in_valid = 1'b0, in_ctrl = 1'b0, out_valid;
  word_t  in_word = '0;
  block_t out_block;
  int     checks = 0, failures = 0;

  pcs_tx dut (.*);
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

  initial begin
    logic [57:0] hist;
    w64_t        exp_w;
    logic        exp_c, exp_v;
    hist = '1;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      in_valid = ($urandom_range(0, 7) != 0);
      in_ctrl  = 1'($urandom);
      in_word  = {$urandom, $urandom};
      exp_v    = in_valid;
      exp_c    = in_ctrl;
      if (in_valid) exp_w = ref_scramble(hist, in_word);
      @(negedge clk);
      chk(out_valid == exp_v, "out_valid latency");
      if (exp_v) begin
        chk(out_block[1:0] == (exp_c ? 2'b10 : 2'b01), $sformatf("sync %0d", n));
        chk(out_block[65:2] == exp_w, $sformatf("payload %0d", n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
