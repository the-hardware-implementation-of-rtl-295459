// tb_spi_ctrl_sig -- self-checking testbench of the chip-select and
// done-flag generator.
//
// Feeds a long random walk of next-state codes (plus the real word sequence
// IDLE, START, TRANSFER..., STOP, IDLE) and compares the registered outputs
// with a reference computed in the testbench one clock later:
//   spi_cs  low exactly when the previous next-state was START or TRANSFER;
//   tx_done/rx_done cleared by START, set by STOP, otherwise held.
// It also checks the reset values (chip select high, flags low).
module tb_spi_ctrl_sig;
  import spi_pkg::*;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  spi_state_e state_d = ST_INIT;
  logic       spi_cs, tx_done, rx_done;

  int checks = 0, failures = 0;
  int n_set = 0, n_clr = 0;

  spi_ctrl_sig dut (.clk, .rst, .state_d, .spi_cs, .tx_done, .rx_done);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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
    logic exp_cs, exp_done;
    @(negedge clk);
    check(spi_cs && !tx_done && !rx_done, "reset values");
    rst = 1'b0;
    exp_cs = 1'b1; exp_done = 1'b0;
    for (int i = 0; i < 1500; i++) begin
      spi_state_e s;
      if (i < 200) begin
        // the real sequence of a word: IDLE, START, TRANSFER x k, STOP
        int ph;
        ph = i % 10;
        s = (ph == 0) ? ST_IDLE : (ph == 1) ? ST_START : (ph == 9) ? ST_STOP : ST_TRANSFER;
      end else begin
        s = spi_state_e'($urandom_range(0, 6));
      end
      state_d = s;
      @(negedge clk);
      exp_cs = !(s == ST_START || s == ST_TRANSFER);
      if (s == ST_START) begin exp_done = 1'b0; n_clr++; end
      else if (s == ST_STOP) begin exp_done = 1'b1; n_set++; end
      check(spi_cs == exp_cs, $sformatf("spi_cs after state %0d", s));
      check(tx_done == exp_done && rx_done == exp_done, $sformatf("done flags after state %0d", s));
    end
    check(n_set > 0 && n_clr > 0, "flags both set and cleared");
    rst = 1'b1;
    #1;
    check(spi_cs && !tx_done && !rx_done, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
