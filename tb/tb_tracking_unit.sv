// tb_tracking_unit: end-to-end test of the tracking unit at its full size
// (51 correlators, 4092-chip codes, 100 MHz clock, 16.8 Msps samples).
//
// The testbench loads random E1B/E1C codes and synthesises a received
// signal: I carries the E1B code, Q the E1C code, each with the half-chip
// subcarrier and amplitude 3, at the code phase the NCO starts from. It
// keeps a complete reference model of the chain (carrier NCO, wipe-off,
// code NCO, 51 taps, four sets of sums, dump at the code epoch) and checks
// every one of the 4 x 51 results of each 4 ms period, the latency (result
// valid on the second rising edge after the epoch sample) and the 400000-clock
// period. It also checks the physics: with the carrier set to 45 deg the
// prompt tap of E1B-I and E1C-Q peaks at 2*3*67200 = 403200; after a DLL
// correction of +0.2 chip the peak moves five taps early, and after a PLL
// correction of +90 deg the E1B-I peak turns negative. Two more periods run
// with a 1 kHz carrier offset and are checked against the reference only.
// Mechanisms counted (each must happen): result sets (dumps), code phase
// corrections, carrier phase corrections, code storage writes.
module tb_tracking_unit;
  import gnss_pkg::*;

  localparam int N   = gnss_pkg::N_TAPS;
  localparam int LEN = gnss_pkg::CODE_LEN;
  localparam int CW  = $clog2(LEN);
  localparam longint MODULUS = longint'(LEN) << 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [PHASE_W-1:0] carr_freq = '0, code_freq = CODE_FREQ_1023K;
  logic carr_err_valid = 1'b0, code_err_valid = 1'b0;
  logic signed [PHASE_W-1:0] carr_err = '0, code_err = '0;
  logic code_wr_en = 1'b0;
  logic [CW-1:0] code_wr_addr = '0;
  logic [1:0] code_wr_data = '0;
  logic sample_valid = 1'b0;
  logic signed [ADC_W-1:0] i_in = '0, q_in = '0;
  logic result_valid;
  logic signed [ACC_W-1:0] result [2][2][N];
  logic [CW-1:0] prompt_chip;

  tracking_unit dut (
    .clk, .rst_n, .carr_freq, .code_freq, .carr_err_valid, .carr_err,
    .code_err_valid, .code_err, .code_wr_en, .code_wr_addr, .code_wr_data,
    .sample_valid, .i_in, .q_in, .result_valid, .result(result), .prompt_chip
  );

  int checks = 0, failures = 0;
  int n_dumps = 0, n_code_corr = 0, n_carr_corr = 0, n_code_writes = 0;
  logic [1:0] code_ref [LEN];

  always #5 clk = ~clk;

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint md(input longint v);
    longint r = v % MODULUS;
    return (r < 0) ? r + MODULUS : r;
  endfunction

  function automatic int lo(input logic [PHASE_W-1:0] ph, input bit is_sin);
    real a;
    a = 2.0 * 3.14159265358979 * real'(ph[31:29]) / 8.0;
    return is_sin ? int'($floor(3.0 * $sin(a) + 0.5)) : int'($floor(3.0 * $cos(a) + 0.5));
  endfunction

  // code value (+1/-1) of one channel at a code phase, with the subcarrier
  function automatic int chip_val(input longint ph, input int ch);
    bit b;
    b = code_ref[int'(ph >>> 32)][ch] ^ ph[31];
    return b ? -1 : 1;
  endfunction

  // replica value of tap k of one channel at prompt code phase p
  function automatic int rep_val(input longint p, input int k, input int ch);
    longint t;
    t = md(p + (longint'(k) - longint'((N - 1) / 2)) * longint'(TAP_SPACING));
    return chip_val(t, ch);
  endfunction

  // ---------------------------------------------------------------- model
  bit     run = 0;
  longint code_reg = 0, code_off = 0, sig_phase = 0;
  logic [PHASE_W-1:0] carr_acc = '0, carr_off = '0;
  longint ref_acc [2][2][N];
  longint ref_res [2][2][N];
  int     last_chip = 0;
  int     cycle = 0, epoch_cycle = -1, last_result_cycle = -1;
  bit     have_ref = 0;

  always @(posedge clk) if (run) begin
    cycle++;
    if (sample_valid) begin
      longint p;
      int wi, wq, chip;
      bit ep;
      p    = md(code_reg + code_off);
      chip = int'(p >>> 32);
      ep   = (chip < last_chip) && (last_chip - chip > LEN / 2);
      last_chip = chip;
      wi = int'(i_in) * lo(carr_acc + carr_off, 0);
      wq = int'(q_in) * lo(carr_acc + carr_off, 1);
      if (ep) begin
        ref_res = ref_acc;
        for (int ch = 0; ch < 2; ch++) for (int cp = 0; cp < 2; cp++)
          for (int k = 0; k < N; k++) ref_acc[ch][cp][k] = 0;
        epoch_cycle = cycle;
        have_ref = 1;
      end
      for (int k = 0; k < N; k++)
        for (int ch = 0; ch < 2; ch++) begin
          ref_acc[ch][0][k] += rep_val(p, k, ch) * wi;
          ref_acc[ch][1][k] += rep_val(p, k, ch) * wq;
        end
    end
    code_reg  = md(code_reg + longint'(code_freq));
    sig_phase = md(sig_phase + longint'(code_freq));
    carr_acc  = carr_acc + carr_freq;
    if (code_err_valid) begin code_off = md(code_off + (longint'(code_err) <<< 12)); n_code_corr++; end
    if (carr_err_valid) begin carr_off = carr_off + carr_err; n_carr_corr++; end
  end

  // ------------------------------------------------------------- checking
  int peak_tap [2][2];
  longint peak_val [2][2];

  always @(negedge clk) if (run && result_valid) begin
    n_dumps++;
    checks++;
    if (!have_ref || cycle - epoch_cycle != 1) begin
      failures++; $display("result_valid %0d clocks after the epoch sample", cycle - epoch_cycle);
    end
    if (last_result_cycle >= 0 && n_code_corr == 0) begin
      checks++;
      if (cycle - last_result_cycle < 399999 || cycle - last_result_cycle > 400001) begin
        failures++; $display("result period %0d clocks", cycle - last_result_cycle);
      end
    end
    last_result_cycle = cycle;
    for (int ch = 0; ch < 2; ch++) for (int cp = 0; cp < 2; cp++) begin
      peak_tap[ch][cp] = 0; peak_val[ch][cp] = 0;
      for (int k = 0; k < N; k++) begin
        longint v;
        v = longint'(result[ch][cp][k]);
        checks++;
        if (v != ref_res[ch][cp][k]) begin
          failures++;
          if (failures < 10) $display("dump %0d ch %0d comp %0d tap %0d: %0d expected %0d",
                                      n_dumps, ch, cp, k, v, ref_res[ch][cp][k]);
        end
        if ((v < 0 ? -v : v) > (peak_val[ch][cp] < 0 ? -peak_val[ch][cp] : peak_val[ch][cp])) begin
          peak_val[ch][cp] = v; peak_tap[ch][cp] = k;
        end
      end
    end
    $display("dump %0d: E1B-I peak %0d at tap %0d, E1C-Q peak %0d at tap %0d", n_dumps,
             peak_val[0][0], peak_tap[0][0], peak_val[1][1], peak_tap[1][1]);
  end

  // peak of E1B-I (ch 0) and E1C-Q (ch 1): tap and value range of each
  task automatic expect_peak(input int tap, input longint lo_b, input longint hi_b,
                             input longint lo_c, input longint hi_c, input string what);
    for (int ch = 0; ch < 2; ch++) begin
      longint v, lo_lim, hi_lim;
      int     t;
      v      = (ch == 0) ? peak_val[0][0] : peak_val[1][1];
      t      = (ch == 0) ? peak_tap[0][0] : peak_tap[1][1];
      lo_lim = (ch == 0) ? lo_b : lo_c;
      hi_lim = (ch == 0) ? hi_b : hi_c;
      checks++;
      if (t != tap || v < lo_lim || v > hi_lim) begin
        failures++;
        $display("%s: channel %0d peak %0d at tap %0d, expected tap %0d in [%0d,%0d]",
                 what, ch, v, t, tap, lo_lim, hi_lim);
      end
    end
  endtask

  // ------------------------------------------------------------- stimulus
  int strobe = 0;
  bit gen = 0;

  always @(negedge clk) if (gen) begin
    strobe += 168;
    sample_valid <= (strobe >= 1000);
    if (strobe >= 1000) strobe -= 1000;
    i_in <= ADC_W'(3 * chip_val(sig_phase, 0));
    q_in <= ADC_W'(3 * chip_val(sig_phase, 1));
  end

  task automatic wait_result();
    @(negedge clk iff result_valid);
    @(negedge clk);
  endtask

  initial begin
    for (int ch = 0; ch < 2; ch++) for (int cp = 0; cp < 2; cp++)
      for (int k = 0; k < N; k++) begin ref_acc[ch][cp][k] = 0; ref_res[ch][cp][k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < LEN; a++) begin
      code_ref[a]  = 2'($urandom);
      code_wr_en   = 1'b1;
      code_wr_addr = CW'(a);
      code_wr_data = code_ref[a];
      n_code_writes++;
      @(negedge clk);
    end
    code_wr_en = 1'b0;
    // restart the NCOs, then turn the carrier to 45 deg (cos = sin = 2)
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    run = 1;
    carr_err = 32'sh2000_0000; carr_err_valid = 1'b1;
    @(negedge clk);
    carr_err_valid = 1'b0;
    gen = 1;
    wait_result();                      // first period, from reset
    expect_peak((N - 1) / 2, 403200, 403200, 403200, 403200, "first");
    wait_result();                      // second full period
    expect_peak((N - 1) / 2, 403200, 403200, 403200, 403200, "aligned");
    // DLL: replica 0.2 chip late -> peak five taps early
    code_err = 32'sd209715; code_err_valid = 1'b1;      // 0.2 * 2^20
    @(negedge clk);
    code_err_valid = 1'b0;
    // PLL: +90 deg -> 135 deg, cos = -2, sin = 2
    carr_err = 32'sh4000_0000; carr_err_valid = 1'b1;
    @(negedge clk);
    carr_err_valid = 1'b0;
    wait_result();
    expect_peak((N - 1) / 2 - 5, -403200, -380000, 380000, 403200, "after corrections");
    wait_result();
    expect_peak((N - 1) / 2 - 5, -403200, -403200, 403200, 403200, "settled");
    // a running carrier of 1 kHz: the unit must still match the reference
    carr_freq = 32'd42950;              // 1e3 / 100e6 * 2^32
    wait_result();
    wait_result();
    gen = 0;
    // every mechanism must have happened
    checks += 4;
    if (n_dumps < 6)       begin failures++; $display("too few dumps %0d", n_dumps); end
    if (n_code_corr == 0)  begin failures++; $display("no code correction"); end
    if (n_carr_corr == 0)  begin failures++; $display("no carrier correction"); end
    if (n_code_writes != LEN) begin failures++; $display("code writes %0d", n_code_writes); end
    $display("dumps %0d, code corrections %0d, carrier corrections %0d, code writes %0d",
             n_dumps, n_code_corr, n_carr_corr, n_code_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
