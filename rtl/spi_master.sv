// spi_master: register-write port to the mm-wave converter chips.
//
// The FPGA programs the registers of the up converter, the down converter and
// the signal source over SPI; the board header carries SCLK, SDI, SDO and one
// chip select per chip (CS_UP, CS_DN, CS_SRC). The design names this link and
// its purpose but not the register map or word format, so this block is a
// plain transaction engine: a request names the target chip and a SPI_W-bit
// word, which is shifted out MSB first in SPI mode 0 (SCLK idles low, data
// changes on the falling edge, both sides sample on the rising edge). The bits
// the chip returns on `miso_i` in the same frame are collected and handed back
// on `rsp_data_o`, so register reads work wherever the chip's protocol returns
// data within the frame.
//
// Timing: SCLK = clk / (2*HALF), 10 MHz by default. A transaction is accepted
// when `req_valid_i` and `req_ready_o` are high; chip select falls on the next
// clock, the frame lasts (2*SPI_W + 1) * HALF clocks and `rsp_valid_o` pulses
// when chip select rises. A gap of HALF clocks follows before the next request.
module spi_master
  import if_dad_pkg::*;
#(
  parameter int unsigned W    = SPI_W,
  parameter int unsigned HALF = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid_i,
  output logic              req_ready_o,
  input  spi_target_e       req_target_i,
  input  logic [W-1:0]      req_data_i,
  output logic              rsp_valid_o,
  output logic [W-1:0]      rsp_data_o,
  output logic              sclk_o,
  output logic              mosi_o,
  input  logic              miso_i,
  output logic [2:0]        cs_n_o      // [0] source, [1] up, [2] down
);
  typedef enum logic [2:0] {IDLE, LOW, HIGH, TRAIL, GAP} state_e;
  localparam int unsigned CW = $clog2(HALF + 1);
  localparam int unsigned BW = $clog2(W + 1);

  state_e        state_q;
  logic [CW-1:0] cnt_q;
  logic [BW-1:0] bit_q;
  logic [W-1:0]  tx_q, rx_q;
  logic          half_done;

  assign half_done   = (cnt_q == CW'(HALF - 1));
  assign req_ready_o = (state_q == IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= IDLE;
      cnt_q       <= '0;
      bit_q       <= '0;
      tx_q        <= '0;
      rx_q        <= '0;
      sclk_o      <= 1'b0;
      mosi_o      <= 1'b0;
      cs_n_o      <= 3'b111;
      rsp_valid_o <= 1'b0;
      rsp_data_o  <= '0;
    end else begin
      rsp_valid_o <= 1'b0;
      cnt_q <= half_done ? '0 : cnt_q + 1'b1;
      unique case (state_q)
        IDLE: begin
          cnt_q <= '0;
          if (req_valid_i) begin
            cs_n_o                <= 3'b111;
            cs_n_o[req_target_i]  <= 1'b0;
            tx_q    <= req_data_i;
            mosi_o  <= req_data_i[W-1];
            bit_q   <= '0;
            state_q <= LOW;
          end
        end
        LOW: if (half_done) begin
          sclk_o  <= 1'b1;
          rx_q    <= {rx_q[W-2:0], miso_i};
          state_q <= HIGH;
        end
        HIGH: if (half_done) begin
          sclk_o <= 1'b0;
          if (bit_q == BW'(W - 1)) state_q <= TRAIL;
          else begin
            bit_q   <= bit_q + 1'b1;
            tx_q    <= {tx_q[W-2:0], 1'b0};
            mosi_o  <= tx_q[W-2];
            state_q <= LOW;
          end
        end
        TRAIL: if (half_done) begin
          cs_n_o      <= 3'b111;
          mosi_o      <= 1'b0;
          rsp_valid_o <= 1'b1;
          rsp_data_o  <= rx_q;
          state_q     <= GAP;
        end
        GAP: if (half_done) state_q <= IDLE;
        default: state_q <= IDLE;
      endcase
    end
  end

  // Exactly one chip is selected during a frame, none otherwise.
  a_one_cs: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(~cs_n_o) <= 1);
endmodule
