// cwo: Carrier Wipe-Off.
//
// Removes the residual carrier from the complex 3-bit ADC samples. A direct
// digital synthesizer makes the local carrier: a 32-bit phase accumulator
// advances by carr_freq on every processing clock (at 100 MHz one LSB is
// 100e6/2^32 = 0.023 Hz), a phase-error register adds up the carrier phase
// corrections from the PLL, and a phase adder sums the two. The top three
// phase bits address an 8-entry sin/cos table with 3-bit entries. Two 3x3-bit
// signed multipliers then mix the sample component by component:
//   i_out = i_in * cos(phase),   q_out = q_in * sin(phase)
// giving 6-bit signed outputs at the sample rate.
//
// Interface: sample_valid qualifies i_in/q_in (16.8 Msps in a 100 MHz clock
// domain, so on average one valid cycle in 5.95). out_valid follows one
// clock later with the products of that sample. phase_err is a signed phase
// step in 2^-32 cycles, added once per phase_err_valid pulse (every 4 ms).
//
// From the design study: the 32-bit accumulator, phase adder and phase-error
// adder, the 8x6-bit LUT, the two 3x3-bit multipliers, 3-bit in / 6-bit out.
// Own choices: component-wise mixing reads "per-component multiplication"
// literally (two multipliers, as the study counts); the LUT holds an
// amplitude-3 cosine/sine; the address is the truncated phase; synchronous
// active-low reset clears the phase registers.
module cwo
  import gnss_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  // NCO control
  input  logic        [PHASE_W-1:0]   carr_freq,       // phase step per clock
  input  logic                        phase_err_valid,
  input  logic signed [PHASE_W-1:0]   phase_err,       // PLL correction
  // ADC samples
  input  logic                        sample_valid,
  input  logic signed [ADC_W-1:0]     i_in,
  input  logic signed [ADC_W-1:0]     q_in,
  // wiped-off samples
  output logic                        out_valid,
  output logic signed [SAMPLE_W-1:0]  i_out,
  output logic signed [SAMPLE_W-1:0]  q_out
);

  logic [PHASE_W-1:0] phase_acc;    // phase accumulator
  logic [PHASE_W-1:0] phase_off;    // accumulated phase error
  logic [PHASE_W-1:0] phase;        // phase adder output

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase_acc <= '0;
      phase_off <= '0;
    end else begin
      phase_acc <= phase_acc + carr_freq;
      if (phase_err_valid)
        phase_off <= phase_off + PHASE_W'(phase_err);
    end
  end

  assign phase = phase_acc + phase_off;

  logic [LUT_ADDR_W-1:0]    lut_addr;
  logic signed [ADC_W-1:0]  lo_cos, lo_sin;

  assign lut_addr = phase[PHASE_W-1 -: LUT_ADDR_W];
  assign lo_cos   = lut_cos(lut_addr);
  assign lo_sin   = lut_sin(lut_addr);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      i_out     <= '0;
      q_out     <= '0;
    end else begin
      out_valid <= sample_valid;
      if (sample_valid) begin
        i_out <= SAMPLE_W'(i_in) * SAMPLE_W'(lo_cos);
        q_out <= SAMPLE_W'(q_in) * SAMPLE_W'(lo_sin);
      end
    end
  end

endmodule
