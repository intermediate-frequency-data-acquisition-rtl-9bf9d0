// if_dad_top: FPGA design of the IF data-acquisition device.
//
// The board sends a 10 MHz IF tone out through a 14-bit DAC and digitises the
// returning signal with a 12-bit ADC, both at 100 MHz. To measure how the
// return is attenuated and phase-shifted, the received samples are multiplied
// by the transmitted sine and by a copy of it shifted 90 degrees, and each
// product stream is averaged. The two means are the real and imaginary parts
// of a complex number whose angle is the phase shift and whose magnitude is
// proportional to the received amplitude (A/2 for a return A*sin(wt+theta)).
// They are streamed to the host over the serial port of the USB bridge, real
// part first.
//
// Blocks: waveform_gen (NCO and sine table) -> DAC and phase_shift90;
// two mixers (ADC x reference, ADC x quadrature reference); two averagers;
// acq_ctrl sequencing start, settle, measure and send; uart_rx for the host's
// start byte; uart_tx for the results; spi_master for the converter chips,
// whose requests come in on the spi_req_* ports because the design does not
// say what drives them.
//
// Interface: `start_btn_i` is an asynchronous level input; its rising edge
// starts an acquisition, as does any byte received on `uart_rx_i`. The ADC
// bus is registered on entry. DAC and ADC codes are two's complement.
// `led_ready_o`/`led_busy_o` show the device state. `sat_o` is high when the
// last result was clamped to the 16-bit range.
// The blocks, their connections, the 100 MHz clock, the 10 MHz tone, the
// converter and result widths and the real-then-imaginary output follow the
// design; the start input, the status outputs, the SPI request port and the
// parameter defaults other than the tone are this implementation's choices.
//
// Timing: each result takes N_AVG clocks of averaging after SETTLE clocks of
// settling; the ADC path adds one register, which shows as a fixed phase
// offset that the host calibrates out with a zero-phase reference.
module if_dad_top
  import if_dad_pkg::*;
#(
  parameter logic [PHASE_W-1:0] FTW          = IF_FTW,
  parameter int unsigned        N_AVG        = 1000,
  parameter int unsigned        AVG_SHIFT    = 8,
  parameter int unsigned        SETTLE       = 64,
  parameter int unsigned        N_POINTS     = 1,
  parameter int unsigned        CLKS_PER_BIT = CLK_HZ / BAUD,
  parameter int unsigned        SPI_HALF     = 5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // host serial link (USB bridge)
  input  logic                    uart_rx_i,
  output logic                    uart_tx_o,
  input  logic                    start_btn_i,
  // data converters
  output logic signed [DAC_W-1:0] dac_o,
  input  logic signed [ADC_W-1:0] adc_i,
  // status
  output logic                    led_ready_o,
  output logic                    led_busy_o,
  output logic                    sat_o,
  output logic                    result_valid_o,
  output iq_t                     result_o,
  // converter configuration
  input  logic                    spi_req_valid_i,
  output logic                    spi_req_ready_o,
  input  spi_target_e             spi_req_target_i,
  input  logic [SPI_W-1:0]        spi_req_data_i,
  output logic                    spi_rsp_valid_o,
  output logic [SPI_W-1:0]        spi_rsp_data_o,
  output logic                    spi_sclk_o,
  output logic                    spi_mosi_o,
  input  logic                    spi_miso_i,
  output logic [2:0]              spi_cs_n_o
);
  localparam int unsigned P_W = ADC_W + DAC_W;

  // ---------------- start sources ----------------
  logic [2:0] btn_q;
  logic       btn_rise, rx_valid, start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) btn_q <= '0;
    else        btn_q <= {btn_q[1:0], start_btn_i};
  end
  assign btn_rise = btn_q[1] && !btn_q[2];

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rx_i(uart_rx_i),
    .valid_o(rx_valid), .data_o(), .frame_err_o()   // any good byte starts
  );
  assign start = btn_rise || rx_valid;

  // ---------------- reference generation ----------------
  logic                    gen_en, ref_valid;
  logic [PHASE_W-1:0]      phase;
  logic signed [DAC_W-1:0] ref_i, ref_q;

  waveform_gen u_gen (
    .clk, .rst_n, .en(gen_en), .ftw(FTW),
    .phase_o(phase), .dac_o(ref_i), .ref_valid_o(ref_valid)
  );
  phase_shift90 u_shift (.clk, .phase_i(phase), .q_o(ref_q));

  assign dac_o = ref_i;

  // ---------------- correlator ----------------
  logic signed [ADC_W-1:0] adc_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) adc_q <= '0;
    else        adc_q <= adc_i;
  end

  logic                  pi_valid, pq_valid;
  logic signed [P_W-1:0] p_i, p_q;

  mixer u_mix_re (.clk, .rst_n, .in_valid(ref_valid), .a_i(adc_q), .b_i(ref_i),
                  .out_valid(pi_valid), .p_o(p_i));
  mixer u_mix_im (.clk, .rst_n, .in_valid(ref_valid), .a_i(adc_q), .b_i(ref_q),
                  .out_valid(pq_valid), .p_o(p_q));

  logic avg_start, re_valid, im_valid, re_sat, im_sat, re_busy, im_busy;
  iq_t  avg;

  averager #(.N_AVG(N_AVG), .SHIFT(AVG_SHIFT)) u_avg_re (
    .clk, .rst_n, .start(avg_start), .in_valid(pi_valid), .p_i(p_i),
    .busy_o(re_busy), .out_valid(re_valid), .avg_o(avg.re), .sat_o(re_sat)
  );
  averager #(.N_AVG(N_AVG), .SHIFT(AVG_SHIFT)) u_avg_im (
    .clk, .rst_n, .start(avg_start), .in_valid(pq_valid), .p_i(p_q),
    .busy_o(im_busy), .out_valid(im_valid), .avg_o(avg.im), .sat_o(im_sat)
  );

  // ---------------- sequencing and host link ----------------
  logic       tx_valid, tx_ready, busy;
  logic [7:0] tx_data;

  acq_ctrl #(.SETTLE(SETTLE), .N_POINTS(N_POINTS)) u_ctrl (
    .clk, .rst_n, .start_i(start), .gen_en_o(gen_en), .avg_start_o(avg_start),
    .avg_valid_i(re_valid), .avg_i(avg),
    .result_valid_o(result_valid_o), .result_o(result_o),
    .tx_valid_o(tx_valid), .tx_data_o(tx_data), .tx_ready_i(tx_ready),
    .busy_o(busy), .done_o()
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .valid_i(tx_valid), .data_i(tx_data),
    .ready_o(tx_ready), .tx_o(uart_tx_o)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              sat_o <= 1'b0;
    else if (re_valid)       sat_o <= re_sat || im_sat;
  end

  assign led_busy_o  = busy;
  assign led_ready_o = !busy;

  // ---------------- converter configuration ----------------
  spi_master #(.HALF(SPI_HALF)) u_spi (
    .clk, .rst_n,
    .req_valid_i(spi_req_valid_i), .req_ready_o(spi_req_ready_o),
    .req_target_i(spi_req_target_i), .req_data_i(spi_req_data_i),
    .rsp_valid_o(spi_rsp_valid_o), .rsp_data_o(spi_rsp_data_o),
    .sclk_o(spi_sclk_o), .mosi_o(spi_mosi_o), .miso_i(spi_miso_i),
    .cs_n_o(spi_cs_n_o)
  );

  // Both averagers run in lock step.
  a_avg_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (re_valid == im_valid) && (re_busy == im_busy));
endmodule
