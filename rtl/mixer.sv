// mixer: one of the two multipliers of the correlator.
//
// Multiplies a received ADC sample by a reference sample (signed x signed) and
// registers the full-precision product. Each input pair carries a valid flag,
// which is passed along with the product. One product per clock; latency one
// clock. Widths default to the 12-bit ADC and the 14-bit DAC reference. The
// multiplication and the widths follow the design; keeping the full product
// and registering it are this implementation's choices.
module mixer
  import if_dad_pkg::*;
#(
  parameter int unsigned A_W = ADC_W,
  parameter int unsigned B_W = DAC_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic signed [A_W-1:0]       a_i,
  input  logic signed [B_W-1:0]       b_i,
  output logic                        out_valid,
  output logic signed [A_W+B_W-1:0]   p_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      p_o       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) p_o <= a_i * b_i;
    end
  end
endmodule
