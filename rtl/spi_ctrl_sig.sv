// spi_ctrl_sig -- control signal generation module of the SPI master.
//
// Produces the registered chip select and the completion flags from the
// state machine's next state, so that they change on the same clock edge as
// the state itself:
//   spi_cs   low (selected) in START and TRANSFER, high in every other
//            state, and high out of reset.
//   tx_done, rx_done  cleared when a word starts (START), set when it ends
//            (STOP) and then held until the next START, so the host can poll
//            them at leisure.
// These levels follow the reference design; the flags' reset value (low)
// and holding them high through IDLE are this design's choices.  Both
// flags are set together because the receive register is complete at the
// same moment the last bit has been sent.  rst is asynchronous, active high.
module spi_ctrl_sig
  import spi_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  spi_state_e state_d,   // next state of the controller
  output logic       spi_cs,    // chip select, active low
  output logic       tx_done,
  output logic       rx_done
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      spi_cs  <= 1'b1;
      tx_done <= 1'b0;
      rx_done <= 1'b0;
    end else begin
      spi_cs <= !((state_d == ST_START) || (state_d == ST_TRANSFER));
      if (state_d == ST_START) begin
        tx_done <= 1'b0;
        rx_done <= 1'b0;
      end else if (state_d == ST_STOP) begin
        tx_done <= 1'b1;
        rx_done <= 1'b1;
      end
    end
  end

endmodule
