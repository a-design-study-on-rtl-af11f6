// tb_dual_channel_correlator: self-checking testbench of the dual channel
// correlator.
//
// Drives independent random I and Q samples and independent random E1B and
// E1C replica words, triggers a dump every few hundred samples, and checks
// all 4 x 51 results against sums the testbench keeps for each
// (channel, component, tap), so that any mix-up of I/Q or E1B/E1C shows.
module tb_dual_channel_correlator;
  import gnss_pkg::*;

  localparam int N = gnss_pkg::N_TAPS;
  localparam int W = gnss_pkg::ACC_W;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sample_valid = 1'b0, trigger = 1'b0;
  logic signed [SAMPLE_W-1:0] i_in = '0, q_in = '0;
  logic [N-1:0] replica_b = '0, replica_c = '0;
  logic result_valid;
  logic signed [W-1:0] result [2][2][N];

  int checks = 0, failures = 0;
  longint ref_acc [2][2][N];
  longint ref_res [2][2][N];

  dual_channel_correlator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit v, input bit trg);
    logic signed [SAMPLE_W-1:0] s [2];
    logic [N-1:0] r [2];
    s[0] = SAMPLE_W'($urandom); s[1] = SAMPLE_W'($urandom);
    r[0] = {$urandom, $urandom}; r[1] = {$urandom, $urandom};
    sample_valid <= v; trigger <= trg;
    i_in <= s[0]; q_in <= s[1]; replica_b <= r[0]; replica_c <= r[1];
    for (int ch = 0; ch < 2; ch++)
      for (int cp = 0; cp < 2; cp++)
        for (int k = 0; k < N; k++) begin
          if (trg) begin ref_res[ch][cp][k] = ref_acc[ch][cp][k]; ref_acc[ch][cp][k] = 0; end
          if (v) ref_acc[ch][cp][k] += r[ch][k] ? -longint'(s[cp]) : longint'(s[cp]);
        end
    @(posedge clk);
    #1;
    checks++;
    if (result_valid != trg) begin failures++; $display("result_valid %0d", result_valid); end
    if (trg)
      for (int ch = 0; ch < 2; ch++)
        for (int cp = 0; cp < 2; cp++)
          for (int k = 0; k < N; k++) begin
            checks++;
            if (longint'(result[ch][cp][k]) != ref_res[ch][cp][k]) begin
              failures++;
              if (failures < 10) $display("ch %0d comp %0d tap %0d: %0d expected %0d", ch, cp, k,
                                          result[ch][cp][k], ref_res[ch][cp][k]);
            end
          end
  endtask

  initial begin
    for (int ch = 0; ch < 2; ch++)
      for (int cp = 0; cp < 2; cp++)
        for (int k = 0; k < N; k++) begin ref_acc[ch][cp][k] = 0; ref_res[ch][cp][k] = 0; end
    sample_valid = 1'b0; trigger = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    step(1'b0, 1'b1);
    for (int p = 0; p < 12; p++) begin
      int len = 100 + ($urandom % 400);
      for (int n = 0; n < len; n++) step(($urandom % 6) == 0 ? 1'b0 : 1'b1, 1'b0);
      step(1'b1, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
