// tb_uart_tx: sends random bytes and decodes the line here by sampling it in
// the middle of each bit, as a host receiver does. Checks the data bits, the
// start and stop bits, the bit time (CLKS_PER_BIT clocks) and the ready
// handshake.
module tb_uart_tx;
  localparam int CPB = 8;
  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0, ready, tx;
  logic [7:0] data = '0;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .valid_i(valid), .data_i(data),
                                     .ready_o(ready), .tx_o(tx));
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
    logic [7:0] b, got;
    int t0, t1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    check(tx && ready, "idle line high and ready");
    // first pass: line levels and bit-time granularity
    for (int i = 0; i < 40; i++) begin
      b = (i == 0) ? 8'h00 : (i == 1) ? 8'hFF : 8'($urandom);
      @(negedge clk);
      valid = 1'b1; data = b;
      @(negedge clk);
      valid = 1'b0; data = 8'hXX;
      check(!ready, "busy after accept");
      // find the start bit edge
      t0 = 0;
      while (tx && t0 < 4 * CPB) begin @(negedge clk); t0++; end
      check(!tx, "start bit");
      t1 = 0;
      while (!tx && t1 < 20 * CPB) begin @(negedge clk); t1++; end
      // the first low stretch is the start bit plus any leading zeros, so it
      // must last a whole number of bit times
      while (!ready) @(negedge clk);
      check(tx, "stop/idle high");
      check(t1 >= CPB && (t1 % CPB) == 0, $sformatf("low stretch %0d clocks", t1));
    end
    // second pass: exact mid-bit sampling
    for (int i = 0; i < 40; i++) begin
      int len;
      b = 8'($urandom);
      @(negedge clk);
      valid = 1'b1; data = b;
      @(posedge clk);                 // accepted here; start bit from this edge
      #1 valid = 1'b0;
      repeat (CPB / 2) @(posedge clk);
      #1 check(!tx, "start bit mid");
      for (int k = 0; k < 8; k++) begin
        repeat (CPB) @(posedge clk);
        #1 got[k] = tx;
      end
      repeat (CPB) @(posedge clk);
      #1 check(tx, "stop bit mid");
      check(got == b, $sformatf("byte %02h decoded %02h", b, got));
      len = CPB / 2;
      while (!ready) begin @(posedge clk); #1 len++; end
      check(len == CPB, $sformatf("frame ends on time (%0d)", len));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
