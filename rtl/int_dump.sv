// int_dump: Integrate and Dump unit with shadow storage.
//
// Correlates one component (I or Q) of the wiped-off sample stream with the
// N_TAPS replica chips of one channel. Every valid sample is added to, or
// subtracted from, each of the N_TAPS accumulators in the same clock, as the
// replica bit of that tap says (1 = chip -1, so subtract). The "multiply" of
// the multiply-accumulate is this sign selection, because the replica is
// +-1. At the trigger (the 250 Hz code epoch) the accumulators are copied to
// a shadow storage, which holds the result for the post-processing stages
// (PLL/DLL) while the accumulators start the next period at once.
//
// Interface: sample_valid qualifies sample and replica. trigger may come
// with or without a sample; when it comes with one, that sample is the first
// of the new period. One clock after the trigger, result holds the finished
// sums and result_valid pulses for one clock. result stays until the next
// trigger. With 67200 samples of at most 32 in magnitude a period needs
// 6 + 17 = 23 bits.
//
// From the design study: 51 parallel adders, 23-bit accumulator words, two
// register banks (accumulators and shadow storage), a 250 Hz trigger.
// Own choices: the replica encoding, the trigger timing above, the wrap-
// around (two's complement) if more samples than planned are integrated,
// and the synchronous active-low reset.
module int_dump
  import gnss_pkg::*;
#(
  parameter int unsigned N = gnss_pkg::N_TAPS,
  parameter int unsigned W = gnss_pkg::ACC_W
)(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       sample_valid,
  input  logic signed [SAMPLE_W-1:0] sample,
  input  logic        [N-1:0]        replica,
  input  logic                       trigger,
  output logic                       result_valid,
  output logic signed [W-1:0]        result [N]
);

  logic signed [W-1:0] acc [N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin
        acc[k]    <= '0;
        result[k] <= '0;
      end
      result_valid <= 1'b0;
    end else begin
      result_valid <= trigger;
      for (int k = 0; k < N; k++) begin
        logic signed [W-1:0] term;
        term = sample_valid ? (replica[k] ? -W'(sample) : W'(sample)) : '0;
        if (trigger) begin
          result[k] <= acc[k];
          acc[k]    <= term;
        end else begin
          acc[k]    <= acc[k] + term;
        end
      end
    end
  end

endmodule
