// uart_rx: serial receiver for the host link (8 data bits, no parity, 1 stop).
//
// The host reaches the FPGA through the serial port of the board's USB bridge.
// This receiver lets the host start a measurement by sending a byte. The line
// is brought into the clock domain through two flip-flops. A falling edge
// starts a frame; the start bit is re-checked half a bit later, then each of
// the eight data bits (LSB first) is sampled in the middle of its bit time,
// and finally the stop bit. `valid_o` pulses for one clock with the byte when
// the stop bit is high; a low stop bit pulses `frame_err_o` instead.
// Baud rate and frame format are this implementation's choices; CLKS_PER_BIT
// defaults to 100 MHz / 115200.
module uart_rx
  import if_dad_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = CLK_HZ / BAUD
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_i,
  output logic       valid_o,
  output logic [7:0] data_o,
  output logic       frame_err_o
);
  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [1:0]    sync_q;
  logic          rx;
  state_e        state_q;
  logic [CW-1:0] cnt_q;
  logic [2:0]    bit_q;
  logic [7:0]    shift_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_q <= 2'b11;
    else        sync_q <= {sync_q[0], rx_i};
  end
  assign rx = sync_q[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= IDLE;
      cnt_q       <= '0;
      bit_q       <= '0;
      shift_q     <= '0;
      valid_o     <= 1'b0;
      data_o      <= '0;
      frame_err_o <= 1'b0;
    end else begin
      valid_o     <= 1'b0;
      frame_err_o <= 1'b0;
      unique case (state_q)
        IDLE: begin
          cnt_q <= '0;
          if (!rx) state_q <= START;
        end
        START: begin
          if (cnt_q == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt_q   <= '0;
            bit_q   <= '0;
            state_q <= rx ? IDLE : DATA;   // glitch: back to idle
          end else cnt_q <= cnt_q + 1'b1;
        end
        DATA: begin
          if (cnt_q == CW'(CLKS_PER_BIT - 1)) begin
            cnt_q   <= '0;
            shift_q <= {rx, shift_q[7:1]};
            bit_q   <= bit_q + 1'b1;
            if (bit_q == 3'd7) state_q <= STOP;
          end else cnt_q <= cnt_q + 1'b1;
        end
        STOP: begin
          if (cnt_q == CW'(CLKS_PER_BIT - 1)) begin
            cnt_q   <= '0;
            state_q <= IDLE;
            if (rx) begin
              valid_o <= 1'b1;
              data_o  <= shift_q;
            end else frame_err_o <= 1'b1;
          end else cnt_q <= cnt_q + 1'b1;
        end
        default: state_q <= IDLE;
      endcase
    end
  end
endmodule
