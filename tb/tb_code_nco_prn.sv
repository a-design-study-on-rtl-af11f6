// tb_code_nco_prn: self-checking testbench of the code NCO and PRN generator.
//
// Loads random E1B/E1C codes through the write port, runs the NCO at the
// 1.023 MHz chip rate on a 100 MHz clock with a 16.8/100 sample strobe, and
// applies DLL code-phase corrections now and then. The testbench keeps the
// code phase as one 64-bit number modulo 4092 chips and for every replica
// word computes each tap directly: phase + (k-25)*spacing, chip = integer
// part, inverted in the second half of the chip. It checks all 51 E1B and
// E1C bits, the prompt chip, the one-clock latency, and that a code epoch
// comes every 67200 samples / 400000 clocks (4 ms) when no correction is
// applied.
module tb_code_nco_prn;
  import gnss_pkg::*;

  localparam int N   = gnss_pkg::N_TAPS;
  localparam int LEN = gnss_pkg::CODE_LEN;
  localparam int CW  = $clog2(LEN);
  localparam longint MODULUS = longint'(LEN) << 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [PHASE_W-1:0] code_freq = CODE_FREQ_1023K;
  logic code_err_valid = 1'b0;
  logic signed [PHASE_W-1:0] code_err = '0;
  logic code_wr_en = 1'b0;
  logic [CW-1:0] code_wr_addr = '0;
  logic [1:0] code_wr_data = '0;
  logic sample_valid = 1'b0;
  logic replica_valid, epoch;
  logic [CW-1:0] prompt_chip;
  logic [N-1:0] replica_b, replica_c;

  int checks = 0, failures = 0;
  logic [1:0] code_ref [LEN];

  code_nco_prn dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference code phase in 2^-32 chip, modulo LEN chips
  longint ref_reg = 0, ref_off = 0;
  bit     exp_valid = 0;
  logic [N-1:0] exp_b, exp_c;
  int     exp_chip;
  bit     run_nco = 0;

  function automatic longint md(input longint v);
    longint r = v % MODULUS;
    return (r < 0) ? r + MODULUS : r;
  endfunction

  always @(posedge clk) begin
    if (!rst_n || !run_nco) begin
      exp_valid = 0;
    end else begin
      longint p;
      p = md(ref_reg + ref_off);
      exp_valid = sample_valid;
      if (sample_valid) begin
        exp_chip = int'(p >>> 32);
        for (int k = 0; k < N; k++) begin
          longint t;
          int c;
          bit inv;
          t   = md(p + longint'(k - (N - 1) / 2) * longint'(TAP_SPACING));
          c   = int'(t >>> 32);
          inv = t[31];
          exp_b[k] = code_ref[c][0] ^ inv;
          exp_c[k] = code_ref[c][1] ^ inv;
        end
      end
      ref_reg = md(ref_reg + longint'(code_freq));
      if (code_err_valid) ref_off = md(ref_off + (longint'(code_err) <<< 12));
    end
  end

  // epoch bookkeeping
  int samples = 0, last_epoch_sample = -1, last_epoch_cycle = -1, cycle = 0;
  int epochs = 0, epochs_timed = 0;
  bit corrections_since_epoch = 0;

  always @(negedge clk) if (rst_n && run_nco) begin
    cycle++;
    checks++;
    if (replica_valid !== exp_valid) begin
      failures++; $display("%0t replica_valid %0d expected %0d", $time, replica_valid, exp_valid);
    end
    if (exp_valid) begin
      checks++;
      if (replica_b !== exp_b || replica_c !== exp_c || int'(prompt_chip) != exp_chip) begin
        failures++;
        if (failures < 10) $display("%0t chip %0d/%0d B %h/%h C %h/%h", $time, prompt_chip, exp_chip,
                                    replica_b, exp_b, replica_c, exp_c);
      end
      if (epoch) begin
        epochs++;
        if (last_epoch_sample >= 0 && !corrections_since_epoch) begin
          epochs_timed++;
          checks++;
          if (samples - last_epoch_sample != 67200 ||
              cycle - last_epoch_cycle < 399999 || cycle - last_epoch_cycle > 400001) begin
            failures++;
            $display("epoch period %0d samples %0d clocks", samples - last_epoch_sample,
                     cycle - last_epoch_cycle);
          end
        end
        last_epoch_sample = samples;
        last_epoch_cycle  = cycle;
        corrections_since_epoch = 0;
      end
      samples++;
    end
    if (code_err_valid) corrections_since_epoch = 1;
  end

  int strobe = 0;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // load random codes
    for (int a = 0; a < LEN; a++) begin
      code_ref[a]  = 2'($urandom);
      code_wr_en   = 1'b1;
      code_wr_addr = CW'(a);
      code_wr_data = code_ref[a];
      @(negedge clk);
    end
    code_wr_en = 1'b0;
    // restart the NCO from zero with the codes in place
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    run_nco = 1;
    // corrections in the first 300000 clocks, then two clean periods
    for (int n = 0; n < 1400000; n++) begin
      strobe += 168;
      sample_valid = (strobe >= 1000);
      if (strobe >= 1000) strobe -= 1000;
      code_err_valid = (n < 300000) && (($urandom % 20000) == 0);
      code_err = (n % 2) ? $urandom : 32'($signed($urandom % 65536) - 32768);
      @(negedge clk);
    end
    sample_valid = 1'b0; code_err_valid = 1'b0;
    repeat (2) @(negedge clk);
    checks++;
    if (epochs_timed < 2) begin failures++; $display("only %0d timed epochs", epochs_timed); end
    $display("epochs %0d (timed %0d)", epochs, epochs_timed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
