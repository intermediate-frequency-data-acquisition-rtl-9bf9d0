// phase_shift90: quadrature copy of the generated reference.
//
// The generator's sine is shifted by 90 degrees to give the second reference
// against which the received signal is correlated. Because the generator is an
// NCO, the shift is exact: a quarter turn (a quarter of the table) is added
// to the generator's phase and the sum addresses a second copy of the sine table, so
// `q_o` = sin(phase + 90 deg) = cos(phase). The shift is a lead, which makes
// the imaginary result +A/2*sin(theta) for a received A*sin(wt + theta).
//
// Timing: `q_o` follows `phase_i` by one clock, the same latency as the
// generator's DAC output, so the in-phase and quadrature references line up.
module phase_shift90
  import if_dad_pkg::*;
#(
  parameter int unsigned P_W = PHASE_W,
  parameter int unsigned A_W = LUT_AW,
  parameter int unsigned D_W = DAC_W
) (
  input  logic                  clk,
  input  logic [P_W-1:0]        phase_i,
  output logic signed [D_W-1:0] q_o
);
  // A quarter turn is a quarter of the table; only the table-address bits of
  // the phase matter, so the addition is done at table resolution.
  localparam logic [A_W-1:0] QUARTER = A_W'(1) << (A_W - 2);

  logic [A_W-1:0] addr_q90;
  assign addr_q90 = phase_i[P_W-1 -: A_W] + QUARTER;

  sine_lut #(.ADDR_W(A_W), .DATA_W(D_W)) u_lut (
    .clk  (clk),
    .addr (addr_q90),
    .q    (q_o)
  );
endmodule
