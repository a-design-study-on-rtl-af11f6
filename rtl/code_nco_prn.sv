// code_nco_prn: Code NCO and PRN replica generator for the E1B and E1C
// channels.
//
// A code DDS tracks the code phase of the received signal. Its phase
// register holds a chip index (0..CODE_LEN-1) and a 32-bit chip fraction;
// code_freq is added to the fraction on every processing clock (at 100 MHz
// one LSB is 0.023 Hz of chip rate, 1.023 MHz is 43937515) and each carry
// steps the chip index modulo CODE_LEN. This modulo-4092 chip count is the
// "NCO divider": its wrap is the code epoch, once every 4 ms (250 Hz).
// A phase-error register adds up the code phase corrections of the DLL and
// a phase adder gives the prompt code phase.
//
// For each of the N_TAPS correlators a constant offset (the correlator bank,
// (k-centre)*TAP_SPACING, within -1..+1 chip) is added to the prompt phase.
// The carry of that sum says which of only three chips the tap reads
// (previous, current, next), so the E1B/E1C code storage needs just three
// read ports. The tap's chip fraction decides the half-chip inversion: in
// the second half of a chip the code bit is inverted (a BOC(1,1) square
// subcarrier). Replica bits use 1 for chip value -1 and 0 for +1.
//
// Interface: sample_valid marks the cycles in which a 16.8 Msps sample is
// taken; one clock later replica_valid carries the 51-bit E1B and E1C
// replica words for that sample, the prompt chip index, and epoch = 1 for
// the first sample of a new code period. code_err (signed, 2^-20 chip, so
// +-2048 chips) is added once per code_err_valid pulse. The code storage is
// loaded through code_wr_*: bit 0 = E1B chip, bit 1 = E1C chip.
//
// From the design study: 32-bit code DDS with 0.023 Hz resolution, the
// divide by 4092, 51 constant correlators, three E1B/E1C code storages of
// 4092x2 bit, the "<1/2? invert" selection, 51-bit replica words per sample.
// Own choices: the 1/25-chip correlator spacing, the code-error format, the
// write port for the codes (their contents are not part of the design),
// epoch detection, replica encoding and the synchronous active-low reset.
module code_nco_prn
  import gnss_pkg::*;
#(
  parameter int unsigned        N        = gnss_pkg::N_TAPS,
  parameter int unsigned        LEN      = gnss_pkg::CODE_LEN,
  parameter logic [PHASE_W-1:0] SPACING  = gnss_pkg::TAP_SPACING,
  localparam int unsigned       CW       = $clog2(LEN)
)(
  input  logic                       clk,
  input  logic                       rst_n,
  // NCO control
  input  logic        [PHASE_W-1:0]  code_freq,      // chip phase step per clock
  input  logic                       code_err_valid,
  input  logic signed [PHASE_W-1:0]  code_err,       // DLL correction, 2^-20 chip
  // code storage load
  input  logic                       code_wr_en,
  input  logic        [CW-1:0]       code_wr_addr,
  input  logic        [1:0]          code_wr_data,   // {E1C, E1B}
  // replica output
  input  logic                       sample_valid,
  output logic                       replica_valid,
  output logic                       epoch,
  output logic        [CW-1:0]       prompt_chip,
  output logic        [N-1:0]        replica_b,
  output logic        [N-1:0]        replica_c
);

  localparam int unsigned CENTRE = (N - 1) / 2;

  // Full code phase: {chip index, 32-bit fraction}, kept modulo LEN chips.
  typedef struct packed {
    logic [CW-1:0]      chip;
    logic [PHASE_W-1:0] frac;
  } code_phase_t;

  localparam int unsigned FW = CW + PHASE_W;

  // (a + b) modulo LEN chips, a in range, b signed with |b| < LEN chips.
  function automatic code_phase_t phase_add(code_phase_t a, logic signed [FW+1:0] b);
    logic signed [FW+1:0] s;
    logic signed [FW+1:0] modulus;
    modulus = (FW+2)'(LEN) <<< PHASE_W;
    s = signed'({2'b00, a}) + b;
    if (s >= modulus)      s = s - modulus;
    else if (s < 0)        s = s + modulus;
    return code_phase_t'(s[FW-1:0]);
  endfunction

  code_phase_t phase_reg;     // integrated chip rate (Phase-Reg)
  code_phase_t phase_off;     // accumulated code phase error
  code_phase_t code_phase;    // phase adder output (prompt)

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase_reg <= '0;
      phase_off <= '0;
    end else begin
      phase_reg <= phase_add(phase_reg, signed'((FW+2)'(code_freq)));
      if (code_err_valid)
        phase_off <= phase_add(phase_off, (FW+2)'(code_err) <<< (PHASE_W - 20));
    end
  end

  assign code_phase = phase_add(phase_reg, signed'({2'b00, phase_off}));

  // Code storage, three read ports: previous, current and next chip.
  logic [1:0] code_mem [LEN];
  logic [CW-1:0] idx [3];
  logic [1:0]    code_rd [3];

  always_ff @(posedge clk)
    if (code_wr_en) code_mem[code_wr_addr] <= code_wr_data;

  always_comb begin
    idx[0] = (code_phase.chip == '0) ? CW'(LEN - 1) : code_phase.chip - 1'b1;
    idx[1] = code_phase.chip;
    idx[2] = (code_phase.chip == CW'(LEN - 1)) ? '0 : code_phase.chip + 1'b1;
    for (int p = 0; p < 3; p++)
      code_rd[p] = code_mem[idx[p]];
  end

  // Correlator bank and half-chip inversion for every tap.
  logic [N-1:0] rep_b, rep_c;

  always_comb begin
    for (int k = 0; k < N; k++) begin
      logic signed [PHASE_W+1:0] t;   // fraction + offset, in -1..+2 chips
      logic [1:0] sel;
      logic       inv;
      t   = signed'({2'b00, code_phase.frac})
          + (PHASE_W+2)'(signed'(k - int'(CENTRE))) * signed'({2'b00, SPACING});
      // t[33:32] = -1, 0 or +1 chip; add one to pick port 0, 1 or 2
      sel = t[PHASE_W+1:PHASE_W] + 2'd1;
      inv = t[PHASE_W-1];             // second half of the chip
      rep_b[k] = code_rd[sel][0] ^ inv;
      rep_c[k] = code_rd[sel][1] ^ inv;
    end
  end

  // Output registers and code epoch detection.
  logic [CW-1:0] last_chip;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      replica_valid <= 1'b0;
      epoch         <= 1'b0;
      prompt_chip   <= '0;
      replica_b     <= '0;
      replica_c     <= '0;
      last_chip     <= '0;
    end else begin
      replica_valid <= sample_valid;
      if (sample_valid) begin
        replica_b   <= rep_b;
        replica_c   <= rep_c;
        prompt_chip <= code_phase.chip;
        last_chip   <= code_phase.chip;
        // wrap of the prompt chip index (not a small backward correction)
        epoch       <= (code_phase.chip < last_chip) &&
                       ((last_chip - code_phase.chip) > CW'(LEN / 2));
      end
    end
  end

endmodule
