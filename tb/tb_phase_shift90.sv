// tb_phase_shift90: checks the quadrature reference against a cosine computed
// here. For random phases p, the output one clock later must equal
// round(8191*cos(2*pi*a/1024)), a = top ten bits of p.
module tb_phase_shift90;
  import if_dad_pkg::*;
  logic clk = 1'b0;
  logic [PHASE_W-1:0] phase = '0;
  logic signed [DAC_W-1:0] q;
  int checks = 0, failures = 0;

  phase_shift90 dut (.clk, .phase_i(phase), .q_o(q));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, e;
    for (int i = 0; i < 2100; i++) begin
      @(negedge clk);
      phase = (i < 1024) ? PHASE_W'(i) << 22 : PHASE_W'($urandom);
      a = int'(phase >> 22);
      e = $rtoi($floor(8191.0 * $cos(6.283185307179586 * a / 1024.0) + 0.5));
      @(posedge clk); #1;
      checks++;
      if (int'(q) != e) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d: got %0d expected %0d", a, q, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
