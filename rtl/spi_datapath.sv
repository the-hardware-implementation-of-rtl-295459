// spi_datapath -- data transmission module of the SPI master.
//
// Two shift registers, one for MOSI and one for MISO, and the data_length
// counter of bits still to receive.  Words are sent and received most
// significant bit first; a word of 8, 16, 24 or 32 bits is taken from the
// low bits of tx_word and returned in the low bits of data_out.
//
// load (START state) left-aligns the word in the transmit register, clears
// the receive register and sets data_length to the word width in bits.
// Afterwards the registers move only on the edge strobes from the clock
// generator, with the edge roles the reference design gives for its modes:
//   CPHA = 0: a bit is driven onto MOSI on each leading spi_clk edge and
//             MISO is sampled on each trailing edge.
//   CPHA = 1: MISO is sampled on each leading edge and the next bit is driven
//             on each trailing edge; the first bit is driven at load, before
//             the first edge.
// With CPOL = 0 the leading edge is the rising one, with CPOL = 1 the falling
// one, which gives mode 0 "send on rising, receive on falling" and mode 3
// "send on rising, receive on falling" as in the reference design.  Note that
// this is the opposite edge assignment to the common Motorola convention, in
// which CPHA = 0 samples on the leading edge.
//
// Each sample shifts MISO into bit 0 of data_out and decrements
// data_length; len_zero tells the state machine that the word is complete.
// No shift happens once data_length is zero.  rst is asynchronous, active
// high.  The MOSI level before the first bit when CPHA = 0 (low) is this
// design's choice.
module spi_datapath
  import spi_pkg::*;
#(
  parameter int unsigned DATA_W = SPI_DATA_W,
  parameter int unsigned LEN_W  = SPI_LEN_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              load,         // start of a word
  input  spi_width_e        width,
  input  logic              cpha,
  input  logic              lead,         // leading spi_clk edge strobe
  input  logic              trail,        // trailing spi_clk edge strobe
  input  logic [DATA_W-1:0] tx_word,
  input  logic              miso,
  output logic              mosi,
  output logic [DATA_W-1:0] data_out,
  output logic [LEN_W-1:0]  data_length,
  output logic              len_zero
);

  logic [DATA_W-1:0] tx_sr;
  logic [DATA_W-1:0] tx_aligned;
  logic [LEN_W-1:0]  bits;
  logic              tx_ev, rx_ev;

  assign bits       = LEN_W'(width_bits(width));
  assign tx_aligned = tx_word << (DATA_W - int'(bits));
  assign len_zero   = (data_length == '0);
  assign tx_ev      = (cpha ? trail : lead) && !len_zero;
  assign rx_ev      = (cpha ? lead : trail) && !len_zero;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      tx_sr       <= '0;
      data_out    <= '0;
      data_length <= '0;
      mosi        <= 1'b0;
    end else if (load) begin
      data_out    <= '0;
      data_length <= bits;
      if (cpha) begin
        mosi  <= tx_aligned[DATA_W-1];
        tx_sr <= tx_aligned << 1;
      end else begin
        mosi  <= 1'b0;
        tx_sr <= tx_aligned;
      end
    end else begin
      if (tx_ev) begin
        mosi  <= tx_sr[DATA_W-1];
        tx_sr <= tx_sr << 1;
      end
      if (rx_ev) begin
        data_out    <= {data_out[DATA_W-2:0], miso};
        data_length <= data_length - LEN_W'(1);
      end
    end
  end

endmodule
