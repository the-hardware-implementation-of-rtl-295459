// tb_spi_clkgen -- self-checking testbench of the SPI clock generator.
//
// For every division factor 1..15 and both polarities it holds run low
// (spi_clk must rest at CPOL, no strobes), then raises run and checks, cycle
// by cycle against a reference counter kept in the testbench, that
//   * a strobe comes every div_factor clocks, the first after div_factor;
//   * strobes alternate leading, trailing, leading, ...;
//   * spi_clk toggles exactly on the clock edge that ends a strobe cycle and
//     lies away from CPOL after a leading strobe, at CPOL after a trailing one.
// A spi_clk period is therefore 2 * div_factor clocks (checked).
module tb_spi_clkgen;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       run = 1'b0;
  logic       cpol = 1'b0;
  logic [3:0] div_factor = 4'd4;
  logic       spi_clk, lead, trail;

  int checks = 0, failures = 0;

  spi_clkgen dut (.clk, .rst, .run, .cpol, .div_factor, .spi_clk, .lead, .trail);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int p = 0; p < 2; p++) begin
      for (int d = 1; d <= 15; d++) begin
        int  phase;      // reference position inside the half period
        bit  active;     // reference: spi_clk away from CPOL
        int  ticks;
        int  last_rise, rise_gap;
        @(negedge clk);
        run = 1'b0; cpol = p[0]; div_factor = 4'(d);
        repeat (3) begin
          @(negedge clk);
          check(spi_clk == cpol && !lead && !trail, "rests at CPOL while run is low");
        end
        run = 1'b1;
        #1;
        phase = 0; active = 0; ticks = 0; last_rise = -1; rise_gap = 0;
        for (int c = 0; c < 4 * d + 3; c++) begin
          bit exp_tick;
          exp_tick = (phase == d - 1);
          // inputs settled (negedge): check strobes for this cycle
          check(lead  == (exp_tick && !active), $sformatf("lead d=%0d c=%0d", d, c));
          check(trail == (exp_tick &&  active), $sformatf("trail d=%0d c=%0d", d, c));
          check(spi_clk == (cpol ^ active), $sformatf("spi_clk level d=%0d c=%0d", d, c));
          @(negedge clk);
          if (exp_tick) begin
            active = !active;
            phase  = 0;
            ticks++;
            if (active) begin
              if (last_rise >= 0) rise_gap = c - last_rise;
              last_rise = c;
            end
          end else begin
            phase++;
          end
        end
        check(ticks >= 4, "at least two spi_clk periods seen");
        check(rise_gap == 2 * d, $sformatf("period %0d clocks for div %0d", rise_gap, d));
      end
    end
    // dropping run mid-period returns spi_clk to CPOL at once
    @(negedge clk); cpol = 1'b0; div_factor = 4'd2; run = 1'b1;
    repeat (3) @(negedge clk);
    check(spi_clk == 1'b1, "spi_clk away from CPOL mid-period");
    run = 1'b0;
    @(negedge clk);
    check(spi_clk == 1'b0, "spi_clk back at CPOL after run drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
