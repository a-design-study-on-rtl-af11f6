// dual_channel_correlator: correlation part of the Dual Channel Correlation
// and Discriminators unit.
//
// Two channel processors, one for the E1B (data) and one for the E1C (pilot)
// replica. Each holds two integrate-and-dump units: one correlates the I
// component, the other the Q component of the wiped-off samples with that
// channel's replica. All four run on the same sample strobe and the same
// trigger, so their results are taken over the same code period. The
// PLL and DLL that the channel processors also contain are not part of this
// block: their inputs are the results brought out here.
//
// Interface: sample_valid qualifies i_in, q_in, replica_b and replica_c.
// trigger (the code epoch) dumps all four units; one clock later
// result_valid pulses and result[ch][comp][tap] holds the sums, with
// ch 0 = E1B, 1 = E1C and comp 0 = I, 1 = Q.
//
// From the design study: two channels, two I&D units each, fed by I and Q
// and the channel replica. Own choice: the shared trigger and the
// result array layout.
module dual_channel_correlator
  import gnss_pkg::*;
#(
  parameter int unsigned N = gnss_pkg::N_TAPS,
  parameter int unsigned W = gnss_pkg::ACC_W
)(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       sample_valid,
  input  logic signed [SAMPLE_W-1:0] i_in,
  input  logic signed [SAMPLE_W-1:0] q_in,
  input  logic        [N-1:0]        replica_b,
  input  logic        [N-1:0]        replica_c,
  input  logic                       trigger,
  output logic                       result_valid,
  output logic signed [W-1:0]        result [2][2][N]
);

  logic [3:0] unit_valid;

  for (genvar ch = 0; ch < 2; ch++) begin : g_channel
    for (genvar comp = 0; comp < 2; comp++) begin : g_comp
      int_dump #(.N(N), .W(W)) u_id (
        .clk          (clk),
        .rst_n        (rst_n),
        .sample_valid (sample_valid),
        .sample       (comp == 0 ? i_in : q_in),
        .replica      (ch == 0 ? replica_b : replica_c),
        .trigger      (trigger),
        .result_valid (unit_valid[2*ch+comp]),
        .result       (result[ch][comp])
      );
    end
  end

  // All four units share their control inputs, so their valids coincide.
  assign result_valid = unit_valid[0];

  always_ff @(posedge clk)
    if (rst_n) assert (unit_valid == '0 || unit_valid == '1)
      else $error("I&D units out of step");

endmodule
