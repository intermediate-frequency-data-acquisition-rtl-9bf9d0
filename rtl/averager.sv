// averager: mean of a window of products, scaled to a 16-bit result.
//
// A `start` pulse clears the accumulator and arms the block. It then adds the
// next N_AVG valid products and ignores any further ones. When the last
// product has been added it divides the sum by N_AVG * 2**SHIFT (truncating
// toward zero), clamps it to the signed OUT_W range and pulses `out_valid`
// for one clock with the result on `avg_o`; `sat_o` flags a clamped result.
//
// The design gives the block's purpose and its 16-bit output; the window
// length, the scaling and the clamping are this implementation's choices.
// N_AVG = 1000 spans exactly 100 periods of the 10 MHz tone at 100 MHz, so
// the double-frequency term of the product cancels over the window.
// SHIFT = 8 maps the largest in-phase mean (2047 * 8191 / 2) to just below
// 2**15.
//
// Timing: the clock edge that adds the last product also raises an internal
// done flag; `out_valid` and the result follow on the next edge (divide and
// clamp), so a result leaves two clocks after its last product enters.
module averager
  import if_dad_pkg::*;
#(
  parameter int unsigned IN_W  = ADC_W + DAC_W,
  parameter int unsigned OUT_W = RES_W,
  parameter int unsigned N_AVG = 1000,
  parameter int unsigned SHIFT = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  p_i,
  output logic                    busy_o,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] avg_o,
  output logic                    sat_o
);
  localparam int unsigned CNT_W = $clog2(N_AVG + 1);
  localparam int unsigned ACC_W = IN_W + CNT_W + 1;
  localparam logic signed [ACC_W-1:0] DIVISOR = ACC_W'(N_AVG) <<< SHIFT;
  localparam logic signed [ACC_W-1:0] MAX_OUT = ACC_W'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] MIN_OUT = -MAX_OUT - 1;

  logic                    armed_q;
  logic [CNT_W-1:0]        cnt_q;
  logic signed [ACC_W-1:0] acc_q;
  logic                    done_q;
  logic signed [ACC_W-1:0] quot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed_q <= 1'b0;
      cnt_q   <= '0;
      acc_q   <= '0;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (start) begin
        armed_q <= 1'b1;
        cnt_q   <= '0;
        acc_q   <= '0;
      end else if (armed_q && in_valid) begin
        acc_q <= acc_q + ACC_W'(p_i);
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == CNT_W'(N_AVG - 1)) begin
          armed_q <= 1'b0;
          done_q  <= 1'b1;
        end
      end
    end
  end

  assign quot   = acc_q / DIVISOR;
  assign busy_o = armed_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      avg_o     <= '0;
      sat_o     <= 1'b0;
    end else begin
      out_valid <= done_q;
      if (done_q) begin
        if (quot > MAX_OUT) begin
          avg_o <= MAX_OUT[OUT_W-1:0];
          sat_o <= 1'b1;
        end else if (quot < MIN_OUT) begin
          avg_o <= MIN_OUT[OUT_W-1:0];
          sat_o <= 1'b1;
        end else begin
          avg_o <= quot[OUT_W-1:0];
          sat_o <= 1'b0;
        end
      end
    end
  end
endmodule
