// tb_waveform_gen: checks the NCO sine generator against a sine computed here.
//
// With the 10 MHz tuning word, every DAC code is compared with
// round(8191*sin(2*pi*a/1024)), a being the top ten bits of n*ftw mod 2**32
// for the n-th sample of the burst, worked out with 64-bit arithmetic. Also
// checked: one-clock alignment of ref_valid with the first sample, ten samples per period, rest at
// code 0 with the generator off, and restart from phase zero.
module tb_waveform_gen;
  import if_dad_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [PHASE_W-1:0] phase;
  logic signed [DAC_W-1:0] dac;
  logic ref_valid;
  int checks = 0, failures = 0;

  waveform_gen dut (.clk, .rst_n, .en, .ftw(IF_FTW), .phase_o(phase), .dac_o(dac),
                    .ref_valid_o(ref_valid));

  always #5 clk = ~clk;

  function automatic int expect_code(longint n);
    longint unsigned ph = (longint'(n) * longint'(IF_FTW)) % (64'd1 << 32);
    int a = int'(ph >> 22);
    return $rtoi($floor(8191.0 * $sin(6.283185307179586 * a / 1024.0) + 0.5));
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [DAC_W-1:0] first[10];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    check(dac == 0 && !ref_valid, "idle output");
    for (int burst = 0; burst < 2; burst++) begin
      @(negedge clk) en = 1'b1;
      // the first sample (phase zero) and ref_valid appear at the first edge
      // that sees en high
      @(posedge clk); #1;
      for (int n = 0; n < 300; n++) begin
        check(ref_valid, "ref_valid high");
        check(int'(dac) == expect_code(n),
              $sformatf("sample %0d: got %0d expected %0d", n, dac, expect_code(n)));
        if (n < 10) first[n] = dac;
        else if (n < 20) check(dac == first[n-10], "period of ten samples");
        @(posedge clk); #1;
      end
      @(negedge clk) en = 1'b0;
      repeat (3) @(posedge clk); #1;
      check(dac == 0 && !ref_valid && phase == 0, "off after burst");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
