// if_dad_pkg: constants and types shared by the IF data-acquisition datapath.
//
// The sample clock (100 MHz), the IF tone (10 MHz), the DAC width (14 bits),
// the ADC width (12 bits) and the width of each averaged result (16 bits) are
// the design's published figures. The phase-accumulator and sine-table sizes,
// the baud rate and the SPI word length are this implementation's choices.
package if_dad_pkg;

  // Published figures
  localparam int unsigned CLK_HZ = 100_000_000; // sample / system clock
  localparam int unsigned IF_HZ  = 10_000_000;  // transmitted IF tone
  localparam int unsigned DAC_W  = 14;          // DAC code width
  localparam int unsigned ADC_W  = 12;          // ADC code width
  localparam int unsigned RES_W  = 16;          // width of each averaged result

  // Implementation choices
  localparam int unsigned PHASE_W = 32;         // NCO phase accumulator width
  localparam int unsigned LUT_AW  = 10;         // sine table: 2**LUT_AW entries per turn
  // Tuning word for IF_HZ at CLK_HZ: round(2**32 * 10 MHz / 100 MHz)
  localparam logic [PHASE_W-1:0] IF_FTW = 32'd429_496_730;
  localparam int unsigned BAUD    = 115_200;    // serial link to the host
  localparam int unsigned SPI_W   = 24;         // converter register word

  // One complex measurement point: real then imaginary
  typedef struct packed {
    logic signed [RES_W-1:0] re;
    logic signed [RES_W-1:0] im;
  } iq_t;

  // SPI chip-select targets (header pins CS_SRC, CS_UP, CS_DN)
  typedef enum logic [1:0] {
    SPI_SRC  = 2'd0,
    SPI_UP   = 2'd1,
    SPI_DN   = 2'd2
  } spi_target_e;

endpackage
