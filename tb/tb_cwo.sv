// tb_cwo: self-checking testbench of the carrier wipe-off.
//
// Runs the unit with random carrier frequency words, random 3-bit complex
// samples on a 16.8/100 sample strobe and random PLL phase corrections. The
// testbench keeps its own phase accumulator and phase-error sum, computes the
// local carrier from the real cos/sin functions (3 * cos(2*pi*a/8) rounded,
// a = top three phase bits) and checks every output one clock after its
// sample: out_valid, i_out = i_in*cos and q_out = q_in*sin.
module tb_cwo;
  import gnss_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [PHASE_W-1:0] carr_freq = '0;
  logic phase_err_valid = 1'b0;
  logic signed [PHASE_W-1:0] phase_err = '0;
  logic sample_valid = 1'b0;
  logic signed [ADC_W-1:0] i_in = '0, q_in = '0;
  logic out_valid;
  logic signed [SAMPLE_W-1:0] i_out, q_out;

  int checks = 0, failures = 0;
  int cycles = 0;

  cwo dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model, updated at each rising edge from the pre-edge inputs
  logic [PHASE_W-1:0] ref_acc = '0, ref_off = '0;
  bit   exp_valid = 0;
  int   exp_i = 0, exp_q = 0;

  function automatic int lo(input logic [PHASE_W-1:0] ph, input bit is_sin);
    real a;
    a = 2.0 * 3.14159265358979 * real'(ph[31:29]) / 8.0;
    return is_sin ? int'($floor(3.0 * $sin(a) + 0.5)) : int'($floor(3.0 * $cos(a) + 0.5));
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      ref_acc   = '0;
      ref_off   = '0;
      exp_valid = 0;
    end else begin
      logic [PHASE_W-1:0] ph;
      ph = ref_acc + ref_off;
      exp_valid = sample_valid;
      if (sample_valid) begin
        exp_i = int'(i_in) * lo(ph, 0);
        exp_q = int'(q_in) * lo(ph, 1);
      end
      ref_acc = ref_acc + carr_freq;
      if (phase_err_valid) ref_off = ref_off + phase_err;
    end
  end

  // check at the falling edge
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (out_valid !== exp_valid) begin
      failures++; $display("%0t out_valid %0d expected %0d", $time, out_valid, exp_valid);
    end
    if (exp_valid) begin
      checks++;
      if (int'(i_out) != exp_i || int'(q_out) != exp_q) begin
        failures++;
        if (failures < 10) $display("%0t got %0d/%0d expected %0d/%0d", $time, i_out, q_out, exp_i, exp_q);
      end
    end
  end

  int strobe = 0;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 8; run++) begin
      // frequencies from a few Hz to a few MHz of Doppler / IF
      carr_freq = (run == 0) ? 32'd0 : $urandom;
      for (int n = 0; n < 5000; n++) begin
        @(negedge clk);
        cycles++;
        strobe += 168;
        sample_valid = (strobe >= 1000);
        if (strobe >= 1000) strobe -= 1000;
        i_in = ADC_W'($urandom);
        q_in = ADC_W'($urandom);
        phase_err_valid = ($urandom % 1000) == 0;
        phase_err = $urandom;
      end
    end
    @(negedge clk);
    sample_valid = 1'b0; phase_err_valid = 1'b0;
    repeat (2) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
