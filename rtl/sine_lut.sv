// sine_lut: one-read-port sine table, registered output.
//
// Entry i holds round(AMP * sin(2*pi*i / 2**ADDR_W)), AMP = 2**(DATA_W-1) - 1,
// as a signed DATA_W-bit number. The table is computed at elaboration from that
// formula, so no data file is needed; synthesis maps it to a ROM. Latency: the
// value for `addr` appears on `q` one clock later. The design calls for a
// preprogrammed sine; the table size and full-period layout are this
// implementation's choices.
module sine_lut #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 14
) (
  input  logic                     clk,
  input  logic [ADDR_W-1:0]        addr,
  output logic signed [DATA_W-1:0] q
);
  localparam int unsigned DEPTH = 1 << ADDR_W;
  localparam real AMP = real'((1 << (DATA_W - 1)) - 1);
  localparam real TWO_PI = 6.283185307179586;

  typedef logic signed [DATA_W-1:0] rom_t [DEPTH];

  function automatic rom_t build_rom();
    rom_t t;
    for (int i = 0; i < DEPTH; i++)
      t[i] = DATA_W'($rtoi($floor(AMP * $sin(TWO_PI * real'(i) / real'(DEPTH)) + 0.5)));
    return t;
  endfunction

  localparam rom_t ROM = build_rom();

  always_ff @(posedge clk) q <= ROM[addr];
endmodule
