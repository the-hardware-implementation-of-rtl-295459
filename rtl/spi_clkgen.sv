// spi_clkgen -- clock generation module of the SPI master.
//
// Divides the system clock by the programmed division factor to produce
// spi_clk.  While run is low, spi_clk rests at the CPOL level and the divider
// is cleared, so every transfer starts with a full half period.  While run is
// high, a counter counts system clocks and spi_clk toggles every div_factor
// of them: one spi_clk period is 2 * div_factor system clocks, so the SPI
// bit rate is f_clk / (2 * div_factor).  Setting the divider and the idle
// level from registers follows the reference design; the exact ratio
// (half period = div_factor clocks) is this design's choice.
//
// lead and trail are one-cycle strobes, high in the system clock cycle at
// whose end spi_clk makes its leading edge (away from CPOL) or its trailing
// edge (back to CPOL).  The shift registers act on the same clock edge that
// moves spi_clk, so a receiver on the far side sees data that has been
// stable for a whole half period.
//
// div_factor must be at least 1; the state machine refuses 0 (ERROR state)
// before run can be raised.  rst is asynchronous and active high.
module spi_clkgen #(
  parameter int unsigned DIV_W = spi_pkg::SPI_DIV_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             run,         // generate spi_clk edges
  input  logic             cpol,        // idle level of spi_clk
  input  logic [DIV_W-1:0] div_factor,  // half period in system clocks (>= 1)
  output logic             spi_clk,
  output logic             lead,        // leading edge at the end of this cycle
  output logic             trail        // trailing edge at the end of this cycle
);

  logic [DIV_W-1:0] cnt;
  logic             tick;

  assign tick  = run && (cnt == div_factor - DIV_W'(1));
  assign lead  = tick && (spi_clk == cpol);
  assign trail = tick && (spi_clk != cpol);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cnt     <= '0;
      spi_clk <= 1'b0;
    end else if (!run) begin
      cnt     <= '0;
      spi_clk <= cpol;
    end else if (tick) begin
      cnt     <= '0;
      spi_clk <= ~spi_clk;
    end else begin
      cnt     <= cnt + DIV_W'(1);
    end
  end

endmodule
