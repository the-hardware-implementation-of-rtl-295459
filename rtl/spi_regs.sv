// spi_regs -- register configuration module of the SPI master.
//
// The host writes the configuration (division factor, CPOL, CPHA, word
// width) and the word to transmit through a simple synchronous register port
// and reads back the received word and a status word.  As in the reference
// design, the programmed configuration does not act on the interface
// directly: the state machine copies it into a working copy (cfg_act) during
// initialisation (load_cfg), so a write never disturbs a transfer in
// progress.  A write to CONFIG raises cfg_pending until that copy is made,
// which lets the state machine re-initialise from IDLE and so apply new
// settings without a reset.  cfg_ack (every LOAD cycle) clears cfg_pending
// whether or not the configuration was usable; load_cfg (LOAD with a usable
// configuration) makes the copy.
//
// Interface: reg_we/reg_addr/reg_wdata are sampled on the rising clock edge;
// reg_rdata is combinational from reg_addr.  Register map (spi_pkg):
//   0 CONFIG  [7:6] width code (8/16/24/32 bits), [5] cpha, [4] cpol,
//             [3:0] div_factor
//   1 TXDATA  word to transmit, right-aligned
//   2 RXDATA  received word, right-aligned (read only)
//   3 STATUS  [6:4] state, [3] error, [2] busy, [1] rx_done, [0] tx_done
// The bus, the map and the reset values (div_factor 4, mode 0, 32 bits, as
// in the reference design's simulations) are this design's choices.
// rst is asynchronous and active high.
module spi_regs
  import spi_pkg::*;
#(
  parameter int unsigned DATA_W = SPI_DATA_W
) (
  input  logic              clk,
  input  logic              rst,
  // host register port
  input  logic              reg_we,
  input  spi_reg_addr_e     reg_addr,
  input  logic [DATA_W-1:0] reg_wdata,
  output logic [DATA_W-1:0] reg_rdata,
  // towards the state machine and datapath
  input  logic              load_cfg,     // copy cfg_prog into cfg_act
  input  logic              cfg_ack,      // programmed configuration examined
  output spi_cfg_t          cfg_prog,     // as programmed by the host
  output spi_cfg_t          cfg_act,      // working copy used by the interface
  output logic              cfg_pending,  // CONFIG written since the last copy
  output logic [DATA_W-1:0] tx_word,
  // status sources
  input  logic [DATA_W-1:0] rx_word,
  input  spi_state_e        state,
  input  logic              tx_done,
  input  logic              rx_done
);

  logic error, busy;

  assign error = (state == ST_ERROR);
  assign busy  = (state == ST_START) || (state == ST_TRANSFER) || (state == ST_STOP);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cfg_prog    <= SPI_CFG_RESET;
      cfg_act     <= SPI_CFG_RESET;
      cfg_pending <= 1'b0;
      tx_word     <= '0;
    end else begin
      if (load_cfg) cfg_act <= cfg_prog;
      if (cfg_ack)  cfg_pending <= 1'b0;
      if (reg_we) begin
        unique case (reg_addr)
          REG_CONFIG: begin
            cfg_prog    <= spi_cfg_t'(reg_wdata[SPI_CFG_W-1:0]);
            cfg_pending <= 1'b1;   // a write wins over a same-cycle copy
          end
          REG_TXDATA: tx_word <= reg_wdata;
          default: ;               // RXDATA and STATUS are read only
        endcase
      end
    end
  end

  always_comb begin
    unique case (reg_addr)
      REG_CONFIG: reg_rdata = DATA_W'(cfg_prog);
      REG_TXDATA: reg_rdata = tx_word;
      REG_RXDATA: reg_rdata = rx_word;
      REG_STATUS: reg_rdata = DATA_W'({state, error, busy, rx_done, tx_done});
      default:    reg_rdata = '0;
    endcase
  end

endmodule
