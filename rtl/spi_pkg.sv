// spi_pkg -- types and constants shared by the register-configurable SPI master.
//
// The state codes are the ones the controller exposes on its state output:
// INIT = 0 while reset is held, IDLE = 2, START = 3, TRANSFER = 4, STOP = 5.
// The two initialisation steps (INIT, then LOAD where the programmed
// configuration is copied into the working copy) and the ERROR code 6 are
// this design's own naming of the remaining codes.
//
// The configuration record packs the division factor, the clock polarity and
// phase, and a two-bit word-width code (8, 16, 24 or 32 bits).  The 4-bit
// division factor, the 32-bit maximum word and the 16-bit bit counter follow
// the widths of the reference design; the register map is this design's own.
package spi_pkg;

  // Widest word the shift registers hold.
  localparam int unsigned SPI_DATA_W = 32;
  // Width of the clock division factor.
  localparam int unsigned SPI_DIV_W  = 4;
  // Width of the remaining-bit counter (data_length).
  localparam int unsigned SPI_LEN_W  = 16;

  // Controller states.
  typedef enum logic [2:0] {
    ST_INIT     = 3'd0,  // reset: chip select high, datapath cleared
    ST_LOAD     = 3'd1,  // copy programmed configuration into the working copy
    ST_IDLE     = 3'd2,  // wait for start
    ST_START    = 3'd3,  // chip select low, shift register loaded
    ST_TRANSFER = 3'd4,  // bits shifted on spi_clk edges
    ST_STOP     = 3'd5,  // chip select high, done flags set
    ST_ERROR    = 3'd6   // programmed configuration is unusable
  } spi_state_e;

  // Word width code.
  typedef enum logic [1:0] {
    W8  = 2'd0,
    W16 = 2'd1,
    W24 = 2'd2,
    W32 = 2'd3
  } spi_width_e;

  // Configuration record; bit layout of the CONFIG register.
  typedef struct packed {
    spi_width_e             width;       // [7:6]
    logic                   cpha;        // [5]
    logic                   cpol;        // [4]
    logic [SPI_DIV_W-1:0]   div_factor;  // [3:0]
  } spi_cfg_t;

  localparam int unsigned SPI_CFG_W = $bits(spi_cfg_t);

  // Register addresses on the host port.
  typedef enum logic [1:0] {
    REG_CONFIG = 2'd0,  // R/W  spi_cfg_t in bits [7:0]
    REG_TXDATA = 2'd1,  // R/W  word to transmit (right-aligned)
    REG_RXDATA = 2'd2,  // R    last received word (right-aligned)
    REG_STATUS = 2'd3   // R    {state[6:4], error[3], busy[2], rx_done[1], tx_done[0]}
  } spi_reg_addr_e;

  // Configuration after reset: division factor 4, mode 0, 32-bit words.
  localparam spi_cfg_t SPI_CFG_RESET = '{width: W32, cpha: 1'b0, cpol: 1'b0,
                                         div_factor: SPI_DIV_W'(4)};

  // Number of bits in a word of the given width code: 8 * (code + 1).
  function automatic logic [SPI_LEN_W-1:0] width_bits(spi_width_e w);
    return SPI_LEN_W'({w, 3'b000}) + SPI_LEN_W'(8);
  endfunction

endpackage
