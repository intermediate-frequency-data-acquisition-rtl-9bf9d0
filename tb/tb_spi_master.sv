// tb_spi_master: a mode-0 SPI slave model per chip select captures MOSI on
// rising SCLK and returns a random word on MISO, changing it on falling SCLK.
// Each transaction is checked for the word received by the right chip only,
// the word returned, the number of SCLK pulses and the frame length.
module tb_spi_master;
  import if_dad_pkg::*;
  localparam int W = 24, HALF = 2;
  logic clk = 1'b0, rst_n = 1'b0, req_valid = 1'b0, req_ready, rsp_valid;
  spi_target_e target = SPI_SRC;
  logic [W-1:0] req_data = '0, rsp_data;
  logic sclk, mosi, miso;
  logic [2:0] cs_n;
  int checks = 0, failures = 0;

  spi_master #(.W(W), .HALF(HALF)) dut (
    .clk, .rst_n, .req_valid_i(req_valid), .req_ready_o(req_ready),
    .req_target_i(target), .req_data_i(req_data), .rsp_valid_o(rsp_valid),
    .rsp_data_o(rsp_data), .sclk_o(sclk), .mosi_o(mosi), .miso_i(miso),
    .cs_n_o(cs_n));
  always #5 clk = ~clk;

  // slave model
  logic [W-1:0] cap[3], ret;
  logic [W-1:0] out_sh;
  int edges[3];
  logic sclk_d = 1'b0;
  logic [2:0] cs_d = 3'b111;
  assign miso = out_sh[W-1];
  always @(posedge clk) begin
    sclk_d <= sclk;
    cs_d   <= cs_n;
    for (int c = 0; c < 3; c++) begin
      if (cs_d[c] && !cs_n[c]) begin cap[c] = '0; edges[c] = 0; out_sh = ret; end
      if (!cs_n[c] && sclk && !sclk_d) begin cap[c] = {cap[c][W-2:0], mosi}; edges[c]++; end
    end
    if (!(&cs_n) && !sclk && sclk_d) out_sh = {out_sh[W-2:0], 1'b0};
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int len;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(cs_n == 3'b111 && !sclk && req_ready, "idle");
    for (int i = 0; i < 30; i++) begin
      logic [W-1:0] w;
      spi_target_e t;
      t = spi_target_e'(i % 3);
      w = W'($urandom);
      ret = W'($urandom);
      for (int c = 0; c < 3; c++) begin cap[c] = '0; edges[c] = 0; end
      while (!req_ready) @(negedge clk);
      req_valid = 1'b1; req_data = w; target = t;
      @(negedge clk);
      req_valid = 1'b0;
      len = 0;
      while (!rsp_valid && len < 1000) begin
        if (!(&cs_n)) begin
          len++;
          check(cs_n == ~(3'b001 << int'(t)), "only the addressed chip selected");
        end
        @(negedge clk);
      end
      check(cap[int'(t)] == w, $sformatf("chip %0d got %06h expected %06h", t, cap[int'(t)], w));
      check(edges[int'(t)] == W, $sformatf("%0d clock pulses", edges[int'(t)]));
      check(rsp_data == ret, $sformatf("read back %06h expected %06h", rsp_data, ret));
      check(len == (2 * W + 1) * HALF, $sformatf("frame length %0d", len));
      for (int c = 0; c < 3; c++)
        if (c != int'(t)) check(edges[c] == 0, "other chips untouched");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
