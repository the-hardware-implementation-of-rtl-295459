// spi_master -- register-configurable SPI master.
//
// A single SPI master whose clock rate, clock polarity (CPOL), clock phase
// (CPHA) and word width (8, 16, 24 or 32 bits) are set through registers at
// run time instead of being fixed when the hardware is built.  It is made of
// the five modules of the reference architecture:
//   spi_regs      register configuration (host port, programmed and working
//                 configuration, transmit word, status)
//   spi_fsm       state machine control (INIT, LOAD, IDLE, START, TRANSFER,
//                 STOP, ERROR)
//   spi_clkgen    clock generation (divider, CPOL idle level, edge strobes)
//   spi_datapath  data transmission (MOSI and MISO shift registers, bit count)
//   spi_ctrl_sig  control signal generation (chip select, done flags)
//
// Use: write CONFIG and TXDATA, then pulse start (or hold it until spi_cs
// falls).  The master pulls spi_cs low for one START cycle plus
// 2 * div_factor * bits + 1 system clocks of TRANSFER (the last cycle sees
// the bit count at zero and spi_clk at rest), then raises spi_cs,
// tx_done and rx_done together; the received word is in data_out (and
// RXDATA).  A new CONFIG takes effect the next time the controller is idle,
// by way of a two-cycle re-initialisation.  Edge roles per mode follow the
// reference design and are described in spi_datapath.
//
// All flops are reset asynchronously by rst (active high).  spi_miso is
// sampled directly; synchronising it, if it comes from another clock
// domain, is left to the surroundings.
module spi_master
  import spi_pkg::*;
#(
  parameter int unsigned DATA_W = SPI_DATA_W,
  parameter int unsigned LEN_W  = SPI_LEN_W
) (
  input  logic              clk,
  input  logic              rst,
  // host register port
  input  logic              reg_we,
  input  logic [1:0]        reg_addr,
  input  logic [DATA_W-1:0] reg_wdata,
  output logic [DATA_W-1:0] reg_rdata,
  input  logic              start,
  // SPI bus
  output logic              spi_clk,
  output logic              spi_mosi,
  input  logic              spi_miso,
  output logic              spi_cs,       // active low
  // status
  output logic              tx_done,
  output logic              rx_done,
  output logic [DATA_W-1:0] data_out,
  output logic [2:0]        state,
  output logic [LEN_W-1:0]  data_length
);

  spi_cfg_t   cfg_prog, cfg_act;
  spi_state_e st, st_d;
  logic       cfg_pending, load_cfg, cfg_ack, load_data, run_clk;
  logic       lead, trail, len_zero;
  logic [DATA_W-1:0] tx_word;

  assign state = st;

  spi_regs #(.DATA_W(DATA_W)) u_regs (
    .clk, .rst,
    .reg_we, .reg_addr(spi_reg_addr_e'(reg_addr)), .reg_wdata, .reg_rdata,
    .load_cfg, .cfg_ack, .cfg_prog, .cfg_act, .cfg_pending, .tx_word,
    .rx_word(data_out), .state(st), .tx_done, .rx_done
  );

  spi_fsm u_fsm (
    .clk, .rst, .start, .cfg_pending,
    .cfg_div_factor(cfg_prog.div_factor),
    .len_zero, .sclk_idle(spi_clk == cfg_act.cpol),
    .state(st), .state_d(st_d), .load_cfg, .cfg_ack, .load_data, .run_clk
  );

  spi_clkgen u_clkgen (
    .clk, .rst, .run(run_clk), .cpol(cfg_act.cpol),
    .div_factor(cfg_act.div_factor), .spi_clk, .lead, .trail
  );

  spi_datapath #(.DATA_W(DATA_W), .LEN_W(LEN_W)) u_datapath (
    .clk, .rst, .load(load_data), .width(cfg_act.width), .cpha(cfg_act.cpha),
    .lead, .trail, .tx_word, .miso(spi_miso), .mosi(spi_mosi),
    .data_out, .data_length, .len_zero
  );

  spi_ctrl_sig u_ctrl_sig (
    .clk, .rst, .state_d(st_d), .spi_cs, .tx_done, .rx_done
  );

  // Chip select is low exactly in START and TRANSFER.
  a_cs_state: assert property (@(posedge clk) disable iff (rst)
    !spi_cs == (st == ST_START || st == ST_TRANSFER));
  // Every word starts with spi_clk at its idle level.
  a_clk_idle_at_start: assert property (@(posedge clk) disable iff (rst)
    (st == ST_START) |-> (spi_clk == cfg_act.cpol));
  // The bit counter never exceeds the widest word.
  a_len_range: assert property (@(posedge clk) disable iff (rst)
    data_length <= LEN_W'(DATA_W));

endmodule
