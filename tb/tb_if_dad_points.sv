// tb_if_dad_points: a multi-point acquisition through the whole design, as in
// a host session that plots a series of points: the top is built with
// N_POINTS = 17, other parameters at their defaults, and started once by a
// serial byte. Between points the return model's phase is stepped by 30
// degrees (as an operator turning a phase shifter would), from 0 through 180
// and on round the circle. Checks: 17 results and 68 serial bytes from one
// start, serial bytes equal to the results, each phase relative to the first
// point within 0.5 degree, magnitude within 1% plus the ADC rounding bound,
// the generator on for the whole series, and the spacing between results:
// once the serial link is busy, exactly four byte times (the link, not the
// averaging, sets the rate).
module tb_if_dad_points;
  import if_dad_pkg::*;
  localparam int NP  = 17;
  localparam int CPB = CLK_HZ / BAUD;
  localparam real FS_MAG = 2047.0 * 8191.0 / 2.0 / 256.0;
  localparam real QTOL = 0.5 * 8191.0 / 256.0;
  localparam real PI = 3.141592653589793;

  logic clk = 1'b0, rst_n = 1'b1;
  logic uart_rx = 1'b1, uart_tx;
  logic signed [DAC_W-1:0] dac;
  logic signed [ADC_W-1:0] adc = '0;
  logic led_ready, led_busy, sat, res_valid;
  iq_t  res;
  logic spi_req_ready, spi_rsp_valid, sclk, mosi;
  logic [SPI_W-1:0] spi_rsp_data;
  logic [2:0] cs_n;

  if_dad_top #(.N_POINTS(NP)) dut (
    .clk, .rst_n, .uart_rx_i(uart_rx), .uart_tx_o(uart_tx), .start_btn_i(1'b0),
    .dac_o(dac), .adc_i(adc), .led_ready_o(led_ready), .led_busy_o(led_busy),
    .sat_o(sat), .result_valid_o(res_valid), .result_o(res),
    .spi_req_valid_i(1'b0), .spi_req_ready_o(spi_req_ready),
    .spi_req_target_i(SPI_SRC), .spi_req_data_i('0),
    .spi_rsp_valid_o(spi_rsp_valid), .spi_rsp_data_o(spi_rsp_data),
    .spi_sclk_o(sclk), .spi_mosi_o(mosi), .spi_miso_i(1'b0), .spi_cs_n_o(cs_n));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic real wrap180(real d);
    while (d > 180.0) d -= 360.0;
    while (d <= -180.0) d += 360.0;
    return d;
  endfunction

  // return model: locked 10 MHz source, phase stepped after each result
  real theta_deg = 0.0;
  longint n_ret = 0;
  logic busy_d = 1'b0;
  always @(posedge clk) begin
    real ph;
    busy_d <= led_busy;
    if (led_busy && !busy_d) n_ret = 0;
    else n_ret++;
    ph = 2.0 * PI * (real'(n_ret) * real'(IF_FTW) / 4294967296.0) + theta_deg * PI / 180.0;
    adc <= ADC_W'($rtoi($floor(2047.0 * $sin(ph) + 0.5)));
  end

  // results and their times
  iq_t    results[$];
  real    set_deg[$];
  longint cyc = 0, t_res[$];
  int     gen_off_during = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && res_valid) begin
      results.push_back(res);
      set_deg.push_back(theta_deg);
      t_res.push_back(cyc);
      theta_deg = wrap180(theta_deg + 30.0);
    end
    if (rst_n && results.size() > 0 && results.size() < NP && !led_busy) gen_off_during++;
  end

  // host serial receiver
  logic [7:0] rx_bytes[$];
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge uart_tx);
      repeat (CPB / 2) @(posedge clk);
      if (uart_tx == 1'b0) begin
        for (int k = 0; k < 8; k++) begin
          repeat (CPB) @(posedge clk);
          b[k] = uart_tx;
        end
        repeat (CPB) @(posedge clk);
        if (uart_tx) rx_bytes.push_back(b);
      end
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real deg0, deg, mag;
    longint gap0;
    #1 rst_n = 1'b0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    // start byte
    uart_rx = 1'b0; repeat (CPB) @(posedge clk);
    for (int k = 0; k < 8; k++) begin uart_rx = k[0]; repeat (CPB) @(posedge clk); end
    uart_rx = 1'b1; repeat (CPB) @(posedge clk);
    while (led_busy || rx_bytes.size() < 4 * NP) begin
      @(posedge clk);
      if (cyc > 1900000) break;
    end
    repeat (3000) @(posedge clk);
    check(results.size() == NP, $sformatf("%0d results from one start", results.size()));
    check(rx_bytes.size() == 4 * NP, $sformatf("%0d serial bytes", rx_bytes.size()));
    check(gen_off_during == 0, "generator stays on between points");
    check(!led_busy && led_ready, "idle after the series");
    if (results.size() == NP && rx_bytes.size() == 4 * NP) begin
      deg0 = $atan2(real'(results[0].im), real'(results[0].re)) * 180.0 / PI;
      gap0 = t_res[1] - t_res[0];
      // The next window opens when the last byte of a point is accepted, so it
      // overlaps that byte's transmission. The first spacing is three byte
      // times plus a window; after that the transmitter is the bottleneck and
      // points follow each other every four byte times (a byte occupies the
      // transmitter for 10*CPB + 1 clocks).
      check(gap0 >= 3 * (10 * CPB + 1) + 1000 && gap0 <= 3 * (10 * CPB + 1) + 1000 + 10,
            $sformatf("first spacing %0d clocks", gap0));
      for (int k = 0; k < NP; k++) begin
        check({rx_bytes[4*k], rx_bytes[4*k+1]} == results[k].re, "serial real part");
        check({rx_bytes[4*k+2], rx_bytes[4*k+3]} == results[k].im, "serial imaginary part");
        deg = $atan2(real'(results[k].im), real'(results[k].re)) * 180.0 / PI;
        mag = $sqrt(real'(results[k].re) ** 2 + real'(results[k].im) ** 2);
        check(wrap180(deg - deg0 - set_deg[k]) < 0.5 && wrap180(deg - deg0 - set_deg[k]) > -0.5,
              $sformatf("point %0d: set %0.0f measured %0.2f", k, set_deg[k], wrap180(deg - deg0)));
        check(mag > 0.99 * FS_MAG - QTOL && mag < 1.01 * FS_MAG + QTOL, "magnitude");
        if (k > 1) check(t_res[k] - t_res[k-1] == 4 * (10 * CPB + 1),
                         $sformatf("spacing %0d clocks", t_res[k] - t_res[k-1]));
        $display("point %0d: set %0.0f measured %0.2f", k, set_deg[k], wrap180(deg - deg0));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
