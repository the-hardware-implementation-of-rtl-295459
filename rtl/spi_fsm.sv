// spi_fsm -- state machine control module of the SPI master.
//
// Sequences one SPI word at a time through the states of the reference
// design, with the state codes it shows:
//   INIT (0)      entered by reset; chip select is high.
//   LOAD (1)      second initialisation step: the programmed configuration is
//                 checked and copied into the working copy (load_cfg).  A
//                 division factor of 0 cannot make a clock and leads to ERROR.
//   IDLE (2)      waits for start.  A configuration written by the host in
//                 the meantime (cfg_pending) sends the machine back to INIT
//                 first, so new settings take effect without a reset.
//   START (3)     chip select low, shift registers loaded (load_data).
//   TRANSFER (4)  the clock generator runs (run_clk); bits move on its edges
//                 until data_length is zero and spi_clk is back at its idle
//                 level.
//   STOP (5)      chip select high, done flags set; then back to IDLE.
//   ERROR (6)     chip select high; left for INIT when the host rewrites the
//                 configuration.
// The error condition, the LOAD name for code 1, the ERROR code and the
// return path from IDLE to INIT on a configuration write are this design's
// own; the reference design names an error-handling state without saying
// what it handles.
//
// start is remembered from the cycle it is seen (outside a transfer) until
// the machine reaches START, so a one-cycle pulse during initialisation is
// not lost; a start during START, TRANSFER or STOP is ignored, and ERROR
// drops it.  state_d is the next state, for logic that must change together
// with state.  rst is asynchronous and active high.
module spi_fsm
  import spi_pkg::*;
#(
  parameter int unsigned DIV_W = SPI_DIV_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic             cfg_pending,
  input  logic [DIV_W-1:0] cfg_div_factor,  // programmed division factor
  input  logic             len_zero,        // all bits received
  input  logic             sclk_idle,       // spi_clk at its CPOL level
  output spi_state_e       state,
  output spi_state_e       state_d,
  output logic             load_cfg,
  output logic             cfg_ack,
  output logic             load_data,
  output logic             run_clk
);

  logic start_pend;
  logic start_req;
  logic in_xfer;

  assign in_xfer   = (state == ST_START) || (state == ST_TRANSFER) || (state == ST_STOP);
  assign start_req = start || start_pend;
  assign load_cfg  = (state == ST_LOAD) && (cfg_div_factor != '0);
  assign cfg_ack   = (state == ST_LOAD);
  assign load_data = (state == ST_START);
  assign run_clk   = (state == ST_TRANSFER) && !(len_zero && sclk_idle);

  always_comb begin
    state_d = state;
    unique case (state)
      ST_INIT:     state_d = ST_LOAD;
      ST_LOAD:     state_d = (cfg_div_factor != '0) ? ST_IDLE : ST_ERROR;
      ST_IDLE:     if (cfg_pending)    state_d = ST_INIT;
                   else if (start_req) state_d = ST_START;
      ST_START:    state_d = ST_TRANSFER;
      ST_TRANSFER: if (len_zero && sclk_idle) state_d = ST_STOP;
      ST_STOP:     state_d = ST_IDLE;
      ST_ERROR:    if (cfg_pending)    state_d = ST_INIT;
      default:     state_d = ST_INIT;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state      <= ST_INIT;
      start_pend <= 1'b0;
    end else begin
      state <= state_d;
      if (state_d == ST_START || state == ST_ERROR)
        start_pend <= 1'b0;
      else if (start && !in_xfer)
        start_pend <= 1'b1;
    end
  end

endmodule
