// pcs_rx: receive half of the 64b/66b physical coding sublayer.
//
// Raw 66-bit words from the transceiver pass through the block aligner,
// which finds the block boundary from the sync headers, then the payload is
// descrambled. The sync header is delayed one clock to stay beside its
// payload. Words are delivered only while the aligner reports lock.
// Interface: in_valid/in_word from the transceiver. Outputs, two clocks
// after the input: out_valid, out_sync (raw 2-bit header: 01 data, 10
// control, 00/11 damaged), out_word (descrambled payload), plus lock,
// slip_pulse and sh_err (a damaged header while locked).
// Structure follows the link's PHY; the lock rule's parameters are this
// design's (see block_aligner).
module pcs_rx
  import link_pkg::*;
#(
  parameter int unsigned LOCK_COUNT = 64,
  parameter int unsigned WINDOW     = 64,
  parameter int unsigned BAD_LIMIT  = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  block_t     in_word,
  output logic       out_valid,
  output logic [1:0] out_sync,
  output word_t      out_word,
  output logic       lock,
  output logic       slip_pulse,
  output logic       sh_err
);

  logic   al_valid, al_lock, dsc_valid;
  block_t al_block;
  logic   lock_q;

  block_aligner #(
    .LOCK_COUNT(LOCK_COUNT),
    .WINDOW    (WINDOW),
    .BAD_LIMIT (BAD_LIMIT)
  ) u_align (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (in_valid),
    .in_word   (in_word),
    .out_valid (al_valid),
    .out_block (al_block),
    .lock      (al_lock),
    .slip_pulse(slip_pulse)
  );

  descrambler u_dsc (
    .clk      (clk),
    .rst      (rst),
    .in_valid (al_valid),
    .in_data  (al_block[BLOCK_W-1:2]),
    .out_valid(dsc_valid),
    .out_data (out_word)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      out_sync <= SYNC_CTRL;
      lock_q   <= 1'b0;
    end else if (al_valid) begin
      out_sync <= al_block[1:0];
      lock_q   <= al_lock;
    end
  end

  assign lock      = lock_q;
  assign out_valid = dsc_valid && lock_q;
  assign sh_err    = out_valid && (out_sync[0] == out_sync[1]);

endmodule
