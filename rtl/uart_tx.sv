// uart_tx: serial transmitter for the host link (8N1, LSB first).
//
// Carries the measurement results to the host through the serial port of the
// board's USB bridge. A byte is accepted when `valid_i` and `ready_o` are both
// high; the line then carries a start bit, eight data bits LSB first and a
// stop bit, each CLKS_PER_BIT clocks long, and `ready_o` returns high after
// the stop bit. The line idles high. Baud rate and frame format are this
// implementation's choices; CLKS_PER_BIT defaults to 100 MHz / 115200.
module uart_tx
  import if_dad_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = CLK_HZ / BAUD
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid_i,
  input  logic [7:0] data_i,
  output logic       ready_o,
  output logic       tx_o
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic          busy_q;
  logic [9:0]    frame_q;   // {stop, data[7:0], start}, shifted out LSB first
  logic [3:0]    bit_q;
  logic [CW-1:0] cnt_q;

  assign ready_o = !busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      frame_q <= '1;
      bit_q   <= '0;
      cnt_q   <= '0;
      tx_o    <= 1'b1;
    end else if (!busy_q) begin
      tx_o <= 1'b1;
      if (valid_i) begin
        busy_q  <= 1'b1;
        frame_q <= {1'b1, data_i, 1'b0};
        bit_q   <= '0;
        cnt_q   <= '0;
        tx_o    <= 1'b0;            // start bit goes out at once
      end
    end else begin
      if (cnt_q == CW'(CLKS_PER_BIT - 1)) begin
        cnt_q <= '0;
        if (bit_q == 4'd9) begin
          busy_q <= 1'b0;
          tx_o   <= 1'b1;
        end else begin
          bit_q <= bit_q + 1'b1;
          tx_o  <= frame_q[bit_q + 1'b1];
        end
      end else cnt_q <= cnt_q + 1'b1;
    end
  end
endmodule
