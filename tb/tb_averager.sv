// tb_averager: windows of random products with gaps in the valid stream. The
// expected result is the window sum divided by N_AVG*2**SHIFT, truncated
// toward zero and clamped to 16 bits, computed here with 64-bit integers.
// Also checked: products after the window are ignored, the result appears one
// clock after the edge that takes the last product, and full-scale input saturates.
module tb_averager;
  localparam int N = 10, SH = 2;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, in_valid = 1'b0;
  logic signed [25:0] p = '0;
  logic busy, out_valid, sat;
  logic signed [15:0] avg;
  int checks = 0, failures = 0;

  averager #(.N_AVG(N), .SHIFT(SH)) dut (
    .clk, .rst_n, .start, .in_valid, .p_i(p), .busy_o(busy), .out_valid,
    .avg_o(avg), .sat_o(sat));
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sum, q, e;
    int lim, fed, wait_cyc;
    bit esat;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 40; w++) begin
      lim = (w < 30) ? (1 << 20) : (1 << 25) - 1;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      sum = 0; fed = 0;
      while (fed < N) begin
        in_valid = ($urandom_range(3) != 0);
        p = 26'($signed($urandom_range(2 * lim)) - lim);
        if (w == 30) p = 26'(lim);
        if (w == 31) p = 26'(-lim - 1);
        if (in_valid) begin sum += longint'(p); fed++; end
        @(negedge clk);
      end
      // extra products after the window must be ignored
      in_valid = 1'b1; p = 26'(12345);
      wait_cyc = 1;
      @(negedge clk); in_valid = 1'b0;
      while (!out_valid && wait_cyc < 10) begin @(negedge clk); wait_cyc++; end
      q = sum / longint'(N << SH);
      esat = (q > 32767) || (q < -32768);
      e = (q > 32767) ? 32767 : (q < -32768) ? -32768 : q;
      check(out_valid, "result produced");
      check(wait_cyc == 1, $sformatf("latency %0d", wait_cyc));
      check(longint'(avg) == e, $sformatf("window %0d: got %0d expected %0d", w, avg, e));
      check(sat == esat, "saturation flag");
      if (w == 30) check(avg == 16'sd32767 && sat, "positive clamp");
      if (w == 31) check(avg == -16'sd32768 && sat, "negative clamp");
      @(negedge clk);
      check(!out_valid && !busy, "single result pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
