// tb_scrambler: checks the scrambler against a known answer and a
// bit-serial reference.
// Known answer: from the all-ones history left by reset, a single 1 in
// bit 0 followed by zeros gives 0x07FF_FF00_0000_0001 and then
// 0xFFDF_FFFF_FFFF_8000 (worked out separately from
// o[n] = d[n] ^ o[n-39] ^ o[n-58] with o[-1..-58] = 1). Then random words, with in_valid
// dropping at random, are compared one clock later with the reference;
// out_valid must follow in_valid with one clock of latency.
module tb_scrambler;
  import link_pkg::*;
  import tb_ref_pkg::*;

  logic  clk = 1'b0, rst = 1'b1, in_valid = 1'b0, out_valid;
  word_t in_data = '0, out_data;
  int    checks = 0, failures = 0;

  scrambler dut (.*);
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
    logic        exp_v;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    in_valid <= 1'b1; in_data <= 64'h1;
    @(posedge clk);
    in_data <= 64'h0;
    @(negedge clk);
    chk(out_valid && out_data == 64'h07FF_FF00_0000_0001, "impulse word 0");
    @(posedge clk);
    in_valid <= 1'b0;
    @(negedge clk);
    chk(out_valid && out_data == 64'hFFDF_FFFF_FFFF_8000, "impulse word 1");
    // Restart from a clean history for the random run.
    rst <= 1'b1;
    @(posedge clk);
    rst <= 1'b0;
    hist = '1;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      in_valid = ($urandom_range(0, 3) != 0);
      in_data  = {$urandom, $urandom};
      exp_v    = in_valid;
      if (in_valid) exp_w = ref_scramble(hist, in_data);
      @(negedge clk);
      chk(out_valid == exp_v, "out_valid latency");
      if (exp_v) chk(out_data == exp_w, $sformatf("word %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
