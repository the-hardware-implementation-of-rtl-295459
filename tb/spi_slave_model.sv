// spi_slave_model -- behavioural SPI slave for the testbenches (not
// synthesizable; event driven on the SPI wires).
//
// It mirrors the master's edge roles: with CPHA = 0 it drives MISO on each
// leading spi_clk edge and samples MOSI on each trailing edge; with CPHA = 1
// it drives its first bit when chip select falls, samples MOSI on each
// leading edge and drives the next bit on each trailing edge.  Words are
// nbits long, most significant bit first, right-aligned in tx_word/rx_word.
// Chip select is active low.  rx_bits counts MOSI samples in the current
// selection; lead_edges counts leading spi_clk edges while selected.
module spi_slave_model (
  input  logic        spi_clk,
  input  logic        spi_mosi,
  input  logic        spi_cs,
  output logic        spi_miso,
  input  logic        cpol,
  input  logic        cpha,
  input  int unsigned nbits,
  input  logic [31:0] tx_word,
  output logic [31:0] rx_word,
  output int unsigned rx_bits,
  output int unsigned lead_edges
);

  logic [31:0] sh;

  initial begin
    spi_miso   = 1'b0;
    rx_word    = '0;
    rx_bits    = 0;
    lead_edges = 0;
    sh         = '0;
  end

  always @(negedge spi_cs) begin
    sh         = tx_word << (32 - nbits);
    rx_word    = '0;
    rx_bits    = 0;
    lead_edges = 0;
    if (cpha) begin
      spi_miso = sh[31];
      sh       = sh << 1;
    end
  end

  always @(spi_clk) begin
    if (!spi_cs) begin
      if (spi_clk != cpol) begin         // leading edge
        lead_edges++;
        if (cpha) begin
          rx_word = {rx_word[30:0], spi_mosi};
          rx_bits++;
        end else begin
          spi_miso = sh[31];
          sh       = sh << 1;
        end
      end else begin                     // trailing edge
        if (cpha) begin
          spi_miso = sh[31];
          sh       = sh << 1;
        end else begin
          rx_word = {rx_word[30:0], spi_mosi};
          rx_bits++;
        end
      end
    end
  end

endmodule
