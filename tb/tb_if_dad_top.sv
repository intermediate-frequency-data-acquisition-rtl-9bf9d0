// tb_if_dad_top: end-to-end test of the IF data-acquisition FPGA design at its
// default parameters (100 MHz clock, 10 MHz tone, 1000-sample windows,
// 115200-baud host link).
//
// The analog path (DAC, filters, up/down conversion, target, ADC) is replaced
// by a return model: like the bench set-up of a signal generator locked to the
// board's 10 MHz, it produces round(A * 2047 * sin(2*pi*f*n/fs + theta)) on the
// ADC bus, counting n from the start of each acquisition, with A and theta set
// by the test. The host side is modelled too: start bytes are sent on the
// serial input and the result bytes are decoded from the serial output by
// mid-bit sampling.
//
// Runs:
//  * calibration at A = 1, theta = 0: its phase is the fixed offset of the
//    pipeline, subtracted from later phases as a user of the device would;
//  * the attenuation sweep 0 to -50 dB in 10 dB steps (theta = 0);
//  * the phase sweep 0 to 180 degrees, then -150 back to 0 degrees, in
//    30-degree steps (A = 1);
//  * an in-phase full-scale square return, whose mean exceeds 16 bits and
//    must saturate;
//  * a start from the board input, with a second start during the
//    acquisition that must be ignored;
//  * SPI writes to the source, up- and down-converter chips with read-back.
// Every result is checked against A*32748.5*(cos, sin)(theta) (magnitude to
// 1% plus the ADC rounding bound of 16 LSB, attenuation to 0.5 dB, phase
// to 0.5 degree) and against the decoded serial bytes, and
// the time from start to result is checked to be SETTLE + N_AVG + 3 clocks
// (one sample per clock).
// Each mechanism is counted; one that never happens counts as a failure.
module tb_if_dad_top;
  import if_dad_pkg::*;
  localparam int CPB = CLK_HZ / BAUD;
  localparam real FS_MAG = 2047.0 * 8191.0 / 2.0 / 256.0;
  localparam real PI = 3.141592653589793;
  // ADC rounding moves each sample by at most 0.5 LSB, so the scaled mean by
  // at most 0.5 * 8191 / 256 LSB
  localparam real QTOL = 0.5 * 8191.0 / 256.0;

  logic clk = 1'b0, rst_n = 1'b1;
  logic uart_rx = 1'b1, uart_tx, start_btn = 1'b0;
  logic signed [DAC_W-1:0] dac;
  logic signed [ADC_W-1:0] adc = '0;
  logic led_ready, led_busy, sat, res_valid;
  iq_t  res;
  logic spi_req_valid = 1'b0, spi_req_ready, spi_rsp_valid;
  spi_target_e spi_target = SPI_SRC;
  logic [SPI_W-1:0] spi_req_data = '0, spi_rsp_data;
  logic sclk, mosi, miso;
  logic [2:0] cs_n;

  if_dad_top dut (
    .clk, .rst_n, .uart_rx_i(uart_rx), .uart_tx_o(uart_tx), .start_btn_i(start_btn),
    .dac_o(dac), .adc_i(adc), .led_ready_o(led_ready), .led_busy_o(led_busy),
    .sat_o(sat), .result_valid_o(res_valid), .result_o(res),
    .spi_req_valid_i(spi_req_valid), .spi_req_ready_o(spi_req_ready),
    .spi_req_target_i(spi_target), .spi_req_data_i(spi_req_data),
    .spi_rsp_valid_o(spi_rsp_valid), .spi_rsp_data_o(spi_rsp_data),
    .spi_sclk_o(sclk), .spi_mosi_o(mosi), .spi_miso_i(miso), .spi_cs_n_o(cs_n));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- return model ----------------
  real amp = 1.0, theta_deg = 0.0;
  bit  square = 1'b0;
  longint n_ret = 0;
  logic busy_d = 1'b0;
  always @(posedge clk) begin
    real ph, v;
    busy_d <= led_busy;
    if (led_busy && !busy_d) n_ret = 0;
    else n_ret++;
    ph = 2.0 * PI * (real'(n_ret) * real'(IF_FTW) / 4294967296.0) + theta_deg * PI / 180.0;
    v  = $sin(ph);
    if (square) v = (v >= 0.0) ? 1.0 : -1.0;
    adc <= ADC_W'($rtoi($floor(amp * 2047.0 * v + 0.5)));
  end

  // ---------------- host serial receiver ----------------
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
        else begin failures++; $display("FAIL host saw a framing error"); end
      end
    end
  end

  task automatic host_send(logic [7:0] b);
    uart_rx = 1'b0; repeat (CPB) @(posedge clk);
    for (int k = 0; k < 8; k++) begin uart_rx = b[k]; repeat (CPB) @(posedge clk); end
    uart_rx = 1'b1; repeat (CPB) @(posedge clk);
  endtask

  // ---------------- result capture ----------------
  iq_t    results[$];
  longint cyc = 0, t_busy = 0, lat[$];
  int     n_results = 0, n_sat = 0;
  always @(posedge clk) begin
    cyc++;
    if (led_busy && !busy_d) t_busy = cyc;
    if (res_valid && rst_n) begin
      results.push_back(res);
      lat.push_back(cyc - t_busy);
      n_results++;
    end
  end

  // ---------------- SPI chip models ----------------
  logic [SPI_W-1:0] spi_cap[3], spi_ret[3], miso_sh;
  int   spi_frames[3];
  logic sclk_d = 1'b0;
  logic [2:0] cs_d = 3'b111;
  assign miso = miso_sh[SPI_W-1];
  always @(posedge clk) begin
    sclk_d <= sclk;
    cs_d   <= cs_n;
    for (int c = 0; c < 3; c++) begin
      if (cs_d[c] && !cs_n[c]) begin spi_cap[c] = '0; miso_sh = spi_ret[c]; end
      if (!cs_n[c] && sclk && !sclk_d) spi_cap[c] = {spi_cap[c][SPI_W-2:0], mosi};
      if (!cs_d[c] && cs_n[c] && rst_n) spi_frames[c]++;
    end
    if (!(&cs_n) && !sclk && sclk_d) miso_sh = {miso_sh[SPI_W-2:0], 1'b0};
  end

  // ---------------- one acquisition ----------------
  real cal_deg = 0.0, cal_mag = 1.0;
  int  n_uart_start = 0, n_btn_start = 0, n_ignored = 0;

  function automatic real wrap180(real d);
    while (d > 180.0) d -= 360.0;
    while (d <= -180.0) d += 360.0;
    return d;
  endfunction

  task automatic acquire(bit by_button, output real mag, output real deg, output iq_t r);
    int r0 = n_results;
    int b0 = rx_bytes.size();
    int guard = 0;
    if (by_button) begin
      @(negedge clk) start_btn = 1'b1;
      repeat (5) @(negedge clk);
      start_btn = 1'b0;
      n_btn_start++;
      // a second press during the acquisition must be ignored
      repeat (300) @(negedge clk);
      start_btn = 1'b1; repeat (5) @(negedge clk); start_btn = 1'b0;
    end else begin
      host_send(8'h53);
      n_uart_start++;
    end
    while ((rx_bytes.size() < b0 + 4 || led_busy) && guard < 200000) begin
      @(posedge clk); guard++;
    end
    repeat (2000) @(posedge clk);
    check(n_results == r0 + 1, $sformatf("one result per start (%0d)", n_results - r0));
    check(rx_bytes.size() == b0 + 4, "four bytes per result");
    if (by_button && n_results == r0 + 1) n_ignored++;
    r = results[results.size() - 1];
    if (rx_bytes.size() >= b0 + 4) begin
      check({rx_bytes[b0], rx_bytes[b0+1]} == r.re, "serial real part matches");
      check({rx_bytes[b0+2], rx_bytes[b0+3]} == r.im, "serial imaginary part matches");
    end
    // settle, then one edge to arm the averagers, 1000 products, one edge to
    // divide and one to latch the result
    check(lat[lat.size() - 1] == 64 + 1000 + 3,
          $sformatf("start to result %0d clocks", lat[lat.size() - 1]));
    mag = $sqrt(real'(r.re) * real'(r.re) + real'(r.im) * real'(r.im));
    deg = $atan2(real'(r.im), real'(r.re)) * 180.0 / PI;
  endtask

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mag, deg, e_db, m_db, e_mag;
    iq_t r;
    #1 rst_n = 1'b0;                  // asynchronous reset before the first edge
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    check(led_ready && !led_busy && dac == 0, "idle after reset");

    // converter configuration over SPI, all three chips
    for (int c = 0; c < 3; c++) begin
      logic [SPI_W-1:0] w = SPI_W'($urandom);
      spi_ret[c] = SPI_W'($urandom);
      while (!spi_req_ready) @(negedge clk);
      spi_req_valid = 1'b1; spi_target = spi_target_e'(c); spi_req_data = w;
      @(negedge clk); spi_req_valid = 1'b0;
      while (!spi_rsp_valid) @(negedge clk);
      check(spi_cap[c] == w, $sformatf("SPI chip %0d received %06h expected %06h", c, spi_cap[c], w));
      check(spi_rsp_data == spi_ret[c], "SPI read-back");
    end

    // calibration
    amp = 1.0; theta_deg = 0.0;
    acquire(1'b0, mag, deg, r);
    cal_deg = deg; cal_mag = mag;
    check(mag > 0.99 * FS_MAG - QTOL && mag < 1.01 * FS_MAG + QTOL,
          $sformatf("full-scale magnitude %0.1f expected %0.1f", mag, FS_MAG));
    $display("calibration: re=%0d im=%0d phase offset %0.2f deg", r.re, r.im, cal_deg);

    // attenuation sweep
    for (int k = 0; k <= 5; k++) begin
      amp = 10.0 ** (-real'(k) / 2.0);
      theta_deg = 0.0;
      acquire(1'b0, mag, deg, r);
      e_mag = amp * FS_MAG;
      m_db = 20.0 * $log10(mag / cal_mag);
      check(mag > 0.99 * e_mag - QTOL && mag < 1.01 * e_mag + QTOL,
            $sformatf("-%0d dB: magnitude %0.1f expected %0.1f", 10 * k, mag, e_mag));
      check(m_db > -10.0 * k - 0.5 && m_db < -10.0 * k + 0.5,
            $sformatf("-%0d dB: measured %0.2f dB", 10 * k, m_db));
      $display("attenuation set -%0d dB measured %0.2f dB (re=%0d im=%0d)", 10 * k, m_db, r.re, r.im);
    end

    // phase sweep
    for (int k = 0; k < 13; k++) begin
      amp = 1.0;
      theta_deg = (k <= 6) ? 30.0 * k : -180.0 + 30.0 * (k - 6);
      acquire(1'b0, mag, deg, r);
      e_db = wrap180(deg - cal_deg - theta_deg);
      check(e_db < 0.5 && e_db > -0.5,
            $sformatf("phase set %0.0f measured %0.2f", theta_deg, wrap180(deg - cal_deg)));
      check(mag > 0.99 * FS_MAG - QTOL && mag < 1.01 * FS_MAG + QTOL, "magnitude during phase sweep");
      $display("phase set %0.0f measured %0.2f", theta_deg, wrap180(deg - cal_deg));
    end

    // saturation: full-scale square in phase with the reference
    amp = 1.0; theta_deg = -cal_deg; square = 1'b1;
    acquire(1'b0, mag, deg, r);
    square = 1'b0;
    check(sat && r.re == 16'sd32767, $sformatf("square return saturates (re=%0d sat=%0b)", r.re, sat));
    if (sat) n_sat++;

    // start from the board input
    amp = 0.5; theta_deg = 90.0;
    acquire(1'b1, mag, deg, r);
    check(!sat, "saturation flag clears");
    e_db = wrap180(deg - cal_deg - 90.0);
    check(e_db < 0.5 && e_db > -0.5, "button start result phase");

    // every mechanism happened
    check(n_uart_start > 0, "start by serial byte");
    check(n_btn_start > 0, "start by board input");
    check(n_ignored > 0, "start during acquisition ignored");
    check(n_sat > 0, "averager saturation");
    check(n_results == 1 + 6 + 13 + 1 + 1, $sformatf("%0d results", n_results));
    for (int c = 0; c < 3; c++) check(spi_frames[c] == 1, $sformatf("SPI frames to chip %0d", c));
    $display("mechanisms: serial starts %0d, board starts %0d, ignored starts %0d, saturations %0d, results %0d, SPI frames %0d/%0d/%0d",
             n_uart_start, n_btn_start, n_ignored, n_sat, n_results, spi_frames[0], spi_frames[1], spi_frames[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
