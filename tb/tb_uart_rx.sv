// tb_uart_rx: drives 8N1 frames at CLKS_PER_BIT clocks per bit, with the bit
// time varied by +-1 clock, and checks every byte received; a frame with a low
// stop bit must give a frame error and no byte, and a short glitch must not
// start a frame.
module tb_uart_rx;
  localparam int CPB = 32;
  logic clk = 1'b0, rst_n = 1'b0, rx = 1'b1, valid, ferr;
  logic [7:0] data;
  int checks = 0, failures = 0, nvalid = 0, nerr = 0;
  logic [7:0] last;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rx_i(rx), .valid_o(valid),
                                     .data_o(data), .frame_err_o(ferr));
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (valid) begin nvalid++; last = data; end
    if (ferr) nerr++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(logic [7:0] b, int bt, bit stop);
    rx = 1'b0; repeat (bt) @(negedge clk);
    for (int k = 0; k < 8; k++) begin rx = b[k]; repeat (bt) @(negedge clk); end
    rx = stop; repeat (bt) @(negedge clk);
    rx = 1'b1; repeat (2 * bt) @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    int v0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 60; i++) begin
      b = 8'($urandom);
      v0 = nvalid;
      send(b, CPB + (i % 3) - 1, 1'b1);
      check(nvalid == v0 + 1 && last == b, $sformatf("byte %02h got %02h", b, last));
    end
    v0 = nvalid;
    send(8'h5A, CPB, 1'b0);
    check(nvalid == v0 && nerr == 1, "frame error on low stop bit");
    rx = 1'b0; repeat (3) @(negedge clk); rx = 1'b1;
    repeat (20 * CPB) @(negedge clk);
    check(nvalid == v0 && nerr == 1, "glitch ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
