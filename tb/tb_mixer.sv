// tb_mixer: random signed 12-bit x 14-bit operands, including the extremes;
// the registered product and valid flag are checked one clock later.
module tb_mixer;
  import if_dad_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic signed [ADC_W-1:0] a = '0;
  logic signed [DAC_W-1:0] b = '0;
  logic signed [ADC_W+DAC_W-1:0] p;
  int checks = 0, failures = 0;

  mixer dut (.clk, .rst_n, .in_valid, .a_i(a), .b_i(b), .out_valid, .p_o(p));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      in_valid = (i % 7) != 3;
      ea = (i == 0) ? -2048 : (i == 1) ? 2047 : int'($urandom_range(4095)) - 2048;
      eb = (i == 0) ? -8192 : (i == 1) ? -8192 : int'($urandom_range(16383)) - 8192;
      a = ADC_W'(ea);
      b = DAC_W'(eb);
      @(posedge clk); #1;
      checks++;
      if (out_valid != in_valid || (in_valid && int'(p) != ea * eb)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d*%0d got %0d", ea, eb, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
