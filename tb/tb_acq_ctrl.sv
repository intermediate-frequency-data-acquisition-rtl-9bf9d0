// tb_acq_ctrl: the averagers and the UART are replaced by models here. The
// averager model answers each start with a known complex value after a fixed
// delay; the UART model accepts a byte, then stays busy a random time. Checks:
// the generator runs only during an acquisition, the averagers start SETTLE
// clocks after the start, the bytes are real MSB, real LSB, imag MSB, imag LSB
// for each of N_POINTS points, a start during an acquisition is ignored, and
// done pulses at the end.
module tb_acq_ctrl;
  import if_dad_pkg::*;
  localparam int SETTLE = 6, NP = 3, AVG_DLY = 9;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic gen_en, avg_start, avg_valid = 1'b0, res_valid, tx_valid, tx_ready = 1'b1, busy, done;
  iq_t avg = '0, res;
  logic [7:0] tx_data;
  int checks = 0, failures = 0;

  acq_ctrl #(.SETTLE(SETTLE), .N_POINTS(NP)) dut (
    .clk, .rst_n, .start_i(start), .gen_en_o(gen_en), .avg_start_o(avg_start),
    .avg_valid_i(avg_valid), .avg_i(avg), .result_valid_o(res_valid), .result_o(res),
    .tx_valid_o(tx_valid), .tx_data_o(tx_data), .tx_ready_i(tx_ready),
    .busy_o(busy), .done_o(done));
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // averager model
  iq_t vals[$];
  int cyc = 0, start_cyc = -1, n_starts = 0;
  always @(posedge clk) begin
    cyc++;
    avg_valid <= 1'b0;
    if (avg_start && rst_n) begin start_cyc = cyc; n_starts++; end
    if (start_cyc >= 0 && cyc == start_cyc + AVG_DLY) begin
      avg_valid <= 1'b1;
      avg.re    <= 16'($urandom);
      avg.im    <= 16'($urandom);
      start_cyc = -1;
    end
  end
  always @(posedge clk) if (avg_valid) vals.push_back(avg);

  // UART model
  logic [7:0] bytes[$];
  int busy_cnt = 0;
  always @(posedge clk) begin
    if (tx_valid && tx_ready) begin
      bytes.push_back(tx_data);
      tx_ready <= 1'b0;
      busy_cnt = $urandom_range(1, 12);
    end else if (!tx_ready) begin
      busy_cnt--;
      if (busy_cnt == 0) tx_ready <= 1'b1;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_start, n;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(!gen_en && !busy, "idle");
    for (int run = 0; run < 3; run++) begin
      vals.delete(); bytes.delete(); n_starts = 0;
      start = 1'b1; @(negedge clk); start = 1'b0;
      t_start = cyc;
      check(gen_en && busy, "generator on after start");
      while (!avg_start) @(negedge clk);
      check(cyc - t_start == SETTLE, $sformatf("settle %0d clocks", cyc - t_start));
      // a second start while busy must be ignored
      start = 1'b1; @(negedge clk); start = 1'b0;
      n = 0;
      while (!done && n < 5000) begin check(gen_en, "generator stays on"); @(negedge clk); n++; end
      check(done, "done");
      @(negedge clk);
      check(!gen_en && !busy, "generator off after last point");
      check(n_starts == NP && vals.size() == NP && bytes.size() == 4 * NP,
            $sformatf("%0d starts %0d results %0d bytes", n_starts, vals.size(), bytes.size()));
      for (int k = 0; k < NP && k < vals.size() && 4 * k + 3 < bytes.size(); k++) begin
        check({bytes[4*k], bytes[4*k+1]} == vals[k].re, "real part first, MSB first");
        check({bytes[4*k+2], bytes[4*k+3]} == vals[k].im, "imaginary part second");
      end
      repeat (20) @(negedge clk);
      check(!gen_en, "no restart from ignored start");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
