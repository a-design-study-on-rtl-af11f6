// tracking_unit: dual-channel Galileo E1 tracking unit (data path).
//
// Complex 3-bit ADC samples arrive at 16.8 Msps, qualified by sample_valid,
// in the 100 MHz processing clock domain. The carrier wipe-off mixes them
// with the local carrier into 6-bit I and Q. In the same cycle the code NCO
// and PRN generator produces the 51-bit E1B and E1C replica words for that
// sample. Both are registered once, so they reach the dual channel
// correlator together, one clock after the sample. The correlator's four
// integrate-and-dump units (E1B I/Q, E1C I/Q) sum over one code period; the
// code epoch from the NCO is their trigger, so a result set of 4 x 51 sums
// appears every 4 ms (67200 samples): result_valid rises on the second
// rising edge after the first sample of the next period is presented.
//
// The PLL and DLL, which turn the sums into carrier and code phase errors,
// are outside: result/result_valid go out, carr_err/code_err come back in
// and are added once per *_err_valid pulse. The acquisition's frequency
// words (carr_freq, code_freq) are inputs, and the PRN codes are loaded
// through code_wr_*.
//
// From the design study: the three units and their connections.
// Own choices: the trigger taken from the code epoch, the port formats.
module tracking_unit
  import gnss_pkg::*;
#(
  parameter int unsigned N   = gnss_pkg::N_TAPS,
  parameter int unsigned LEN = gnss_pkg::CODE_LEN,
  localparam int unsigned CW = $clog2(LEN)
)(
  input  logic                       clk,
  input  logic                       rst_n,
  // acquisition information
  input  logic        [PHASE_W-1:0]  carr_freq,
  input  logic        [PHASE_W-1:0]  code_freq,
  // feedback from the PLL / DLL
  input  logic                       carr_err_valid,
  input  logic signed [PHASE_W-1:0]  carr_err,
  input  logic                       code_err_valid,
  input  logic signed [PHASE_W-1:0]  code_err,
  // PRN code storage load
  input  logic                       code_wr_en,
  input  logic        [CW-1:0]       code_wr_addr,
  input  logic        [1:0]          code_wr_data,
  // ADC samples
  input  logic                       sample_valid,
  input  logic signed [ADC_W-1:0]    i_in,
  input  logic signed [ADC_W-1:0]    q_in,
  // correlation results to the PLL / DLL
  output logic                       result_valid,
  output logic signed [ACC_W-1:0]    result [2][2][N],
  output logic        [CW-1:0]       prompt_chip
);

  logic                       wiped_valid;
  logic signed [SAMPLE_W-1:0] wiped_i, wiped_q;
  logic                       replica_valid, epoch;
  logic        [N-1:0]        replica_b, replica_c;

  cwo u_cwo (
    .clk             (clk),
    .rst_n           (rst_n),
    .carr_freq       (carr_freq),
    .phase_err_valid (carr_err_valid),
    .phase_err       (carr_err),
    .sample_valid    (sample_valid),
    .i_in            (i_in),
    .q_in            (q_in),
    .out_valid       (wiped_valid),
    .i_out           (wiped_i),
    .q_out           (wiped_q)
  );

  code_nco_prn #(.N(N), .LEN(LEN)) u_code (
    .clk            (clk),
    .rst_n          (rst_n),
    .code_freq      (code_freq),
    .code_err_valid (code_err_valid),
    .code_err       (code_err),
    .code_wr_en     (code_wr_en),
    .code_wr_addr   (code_wr_addr),
    .code_wr_data   (code_wr_data),
    .sample_valid   (sample_valid),
    .replica_valid  (replica_valid),
    .epoch          (epoch),
    .prompt_chip    (prompt_chip),
    .replica_b      (replica_b),
    .replica_c      (replica_c)
  );

  dual_channel_correlator #(.N(N)) u_dcc (
    .clk          (clk),
    .rst_n        (rst_n),
    .sample_valid (wiped_valid),
    .i_in         (wiped_i),
    .q_in         (wiped_q),
    .replica_b    (replica_b),
    .replica_c    (replica_c),
    .trigger      (replica_valid && epoch),
    .result_valid (result_valid),
    .result       (result)
  );

  always_ff @(posedge clk)
    if (rst_n) assert (wiped_valid == replica_valid)
      else $error("samples and replica out of step");

endmodule
