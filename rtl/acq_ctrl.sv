// acq_ctrl: sequences one acquisition, from the start command to the results.
//
// On `start_i` (a byte from the host, or the board's start input) the
// controller turns the waveform generator on, waits SETTLE clocks for the
// signal to travel out through the DAC, the converters and back through the
// ADC, and then starts both averagers together. When their results arrive it
// sends them to the host as four bytes, real part first, then imaginary part,
// each most significant byte first. It repeats the measure-and-send step
// N_POINTS times, then turns the generator off and waits for the next start.
// A start that arrives during an acquisition is ignored.
//
// The start-to-stream sequence and the real-then-imaginary order follow the
// design; the settle time, byte order, point count and ignoring of early
// starts are this implementation's choices.
//
// Interface: `tx_valid_o`/`tx_ready_i` is a valid/ready byte handshake to the
// UART transmitter. `result_valid_o` pulses with each complex result.
module acq_ctrl
  import if_dad_pkg::*;
#(
  parameter int unsigned SETTLE   = 64,
  parameter int unsigned N_POINTS = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_i,
  output logic       gen_en_o,
  output logic       avg_start_o,
  input  logic       avg_valid_i,
  input  iq_t        avg_i,
  output logic       result_valid_o,
  output iq_t        result_o,
  output logic       tx_valid_o,
  output logic [7:0] tx_data_o,
  input  logic       tx_ready_i,
  output logic       busy_o,
  output logic       done_o
);
  typedef enum logic [1:0] {IDLE, SETTLING, MEASURE, SEND} state_e;
  localparam int unsigned SW = $clog2(SETTLE + 1);
  localparam int unsigned PW = $clog2(N_POINTS + 1);

  state_e        state_q;
  logic [SW-1:0] settle_q;
  logic [PW-1:0] point_q;
  logic [1:0]    byte_q;
  logic          accept;

  assign busy_o     = (state_q != IDLE);
  assign tx_valid_o = (state_q == SEND);
  assign accept     = tx_valid_o && tx_ready_i;

  always_comb begin
    unique case (byte_q)
      2'd0: tx_data_o = result_o.re[15:8];
      2'd1: tx_data_o = result_o.re[7:0];
      2'd2: tx_data_o = result_o.im[15:8];
      default: tx_data_o = result_o.im[7:0];
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q        <= IDLE;
      settle_q       <= '0;
      point_q        <= '0;
      byte_q         <= '0;
      gen_en_o       <= 1'b0;
      avg_start_o    <= 1'b0;
      result_valid_o <= 1'b0;
      result_o       <= '0;
      done_o         <= 1'b0;
    end else begin
      avg_start_o    <= 1'b0;
      result_valid_o <= 1'b0;
      done_o         <= 1'b0;
      unique case (state_q)
        IDLE: if (start_i) begin
          gen_en_o <= 1'b1;
          settle_q <= '0;
          point_q  <= '0;
          state_q  <= SETTLING;
        end
        SETTLING: begin
          settle_q <= settle_q + 1'b1;
          if (settle_q == SW'(SETTLE - 1)) begin
            avg_start_o <= 1'b1;
            state_q     <= MEASURE;
          end
        end
        MEASURE: if (avg_valid_i) begin
          result_o       <= avg_i;
          result_valid_o <= 1'b1;
          byte_q         <= '0;
          state_q        <= SEND;
        end
        SEND: if (accept) begin
          byte_q <= byte_q + 1'b1;
          if (byte_q == 2'd3) begin
            if (point_q == PW'(N_POINTS - 1)) begin
              gen_en_o <= 1'b0;
              done_o   <= 1'b1;
              state_q  <= IDLE;
            end else begin
              point_q     <= point_q + 1'b1;
              avg_start_o <= 1'b1;
              state_q     <= MEASURE;
            end
          end
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  // A byte offered to the transmitter stays offered, unchanged, until taken.
  a_tx_hold: assert property (@(posedge clk) disable iff (!rst_n)
    tx_valid_o && !tx_ready_i |=> tx_valid_o && $stable(tx_data_o));
  // The averagers are started only while the generator runs.
  a_start_gen: assert property (@(posedge clk) disable iff (!rst_n)
    avg_start_o |-> gen_en_o);
endmodule
