// tb_int_dump: self-checking testbench of the integrate-and-dump unit.
//
// Drives random 6-bit samples and random 51-bit replica words with random
// gaps between valid samples (as in a 16.8 Msps stream on a 100 MHz clock),
// and keeps its own 51 integer sums. Triggers come with and without a
// sample. After each trigger it checks that result_valid comes exactly one
// clock later and that every result equals the reference sum of the period.
// A last period of 67200 samples of value -32 (a full 4 ms code period at
// the largest magnitude) checks that 23-bit words hold it without overflow.
module tb_int_dump;
  import gnss_pkg::*;

  localparam int N = gnss_pkg::N_TAPS;
  localparam int W = gnss_pkg::ACC_W;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sample_valid = 1'b0, trigger = 1'b0;
  logic signed [SAMPLE_W-1:0] sample = '0;
  logic [N-1:0] replica = '0;
  logic result_valid;
  logic signed [W-1:0] result [N];

  int checks = 0, failures = 0;
  longint ref_acc [N];
  longint ref_res [N];

  int_dump dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input bit v, input bit trg, input logic signed [SAMPLE_W-1:0] s,
                       input logic [N-1:0] r);
    sample_valid <= v; trigger <= trg; sample <= s; replica <= r;
    // reference model
    if (trg) for (int k = 0; k < N; k++) begin ref_res[k] = ref_acc[k]; ref_acc[k] = 0; end
    if (v) for (int k = 0; k < N; k++) ref_acc[k] += r[k] ? -longint'(s) : longint'(s);
    @(posedge clk);
    sample_valid <= 1'b0; trigger <= 1'b0;
    if (trg) begin
      #1;
      checks++;
      if (!result_valid) begin failures++; $display("result_valid missing after trigger"); end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (longint'(result[k]) != ref_res[k]) begin
          failures++;
          if (failures < 10) $display("tap %0d: got %0d expected %0d", k, result[k], ref_res[k]);
        end
      end
    end else begin
      #1;
      checks++;
      if (result_valid) begin failures++; $display("spurious result_valid"); end
    end
  endtask

  function automatic logic [N-1:0] rnd_rep();
    return {$urandom, $urandom};
  endfunction

  initial begin
    for (int k = 0; k < N; k++) begin ref_acc[k] = 0; ref_res[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // a start-up trigger so that both reference and unit begin from zero
    drive(1'b0, 1'b1, '0, '0);
    for (int p = 0; p < 20; p++) begin
      int len = 50 + ($urandom % 200);
      for (int n = 0; n < len; n++) begin
        // one to three idle cycles between samples
        int gap = $urandom % 3;
        for (int g = 0; g < gap; g++) drive(1'b0, 1'b0, '0, '0);
        drive(1'b1, 1'b0, SAMPLE_W'($urandom), rnd_rep());
      end
      // trigger with a sample (first of next period) or alone
      if (p % 2) drive(1'b1, 1'b1, SAMPLE_W'($urandom), rnd_rep());
      else       drive(1'b0, 1'b1, '0, '0);
    end
    // full 4 ms period at the largest magnitude
    for (int n = 0; n < 67200; n++) drive(1'b1, 1'b0, -6'sd32, {N{n[0]}} & 51'h1);
    drive(1'b0, 1'b1, '0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
