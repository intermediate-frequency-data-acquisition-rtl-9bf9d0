// waveform_gen: the digital waveform generator that feeds the DAC.
//
// A numerically controlled oscillator: a PHASE_W-bit phase accumulator advances
// by the tuning word `ftw` every clock, and its top LUT_AW bits address a sine
// table. With the default tuning word the output is the 10 MHz IF tone sampled
// at 100 MHz, i.e. ten DAC codes per period, as the design calls for. The tone
// is produced only while `en` is high; while `en` is low the accumulator is
// held at zero, so every burst starts at phase zero and the DAC rests at
// mid-scale (code 0). The NCO structure, table size and the start-at-zero rule
// are this implementation's choices; the design states only a preprogrammed
// sine at 10 MHz into a 14-bit DAC.
//
// Interface: `phase_o` is the phase that addresses the table this cycle; it is
// what the 90-degree phase shifter uses so that both references stay aligned.
// Timing: `dac_o` and `ref_valid_o` follow `phase_o` by one clock (table read).
// DAC codes are signed two's complement.
module waveform_gen
  import if_dad_pkg::*;
#(
  parameter int unsigned P_W   = PHASE_W,
  parameter int unsigned A_W   = LUT_AW,
  parameter int unsigned D_W   = DAC_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic [P_W-1:0]        ftw,
  output logic [P_W-1:0]        phase_o,
  output logic signed [D_W-1:0] dac_o,
  output logic                  ref_valid_o
);
  logic [P_W-1:0] phase_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      phase_q <= '0;
    else if (!en)    phase_q <= '0;
    else             phase_q <= phase_q + ftw;
  end

  // The first sample of a burst is taken at phase zero, in the cycle `en`
  // is first seen high.
  assign phase_o = phase_q;

  sine_lut #(.ADDR_W(A_W), .DATA_W(D_W)) u_lut (
    .clk  (clk),
    .addr (phase_q[P_W-1 -: A_W]),
    .q    (dac_o)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ref_valid_o <= 1'b0;
    else        ref_valid_o <= en;
  end
endmodule
