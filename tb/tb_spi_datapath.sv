// tb_spi_datapath -- self-checking testbench of the SPI shift registers.
//
// The testbench plays both the clock generator (it issues the lead/trail
// strobes itself, with a random number of quiet cycles between them) and
// the slave (it puts the expected MISO bit in place before each sampling
// strobe).  For both CPHA settings, all four word widths and random words it
// checks:
//   * data_length equals the width after load and drops by one per sample;
//   * MOSI carries bit (width-1-k) of the word after the k-th transmit event
//     (leading strobe for CPHA = 0; load and then trailing strobes for
//     CPHA = 1), most significant bit first;
//   * data_out ends up holding the slave's word, right-aligned, although
//     MISO carries the inverted bit at the edge that must not sample it;
//   * strobes after the last bit change nothing.
module tb_spi_datapath;
  import spi_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        load = 1'b0;
  spi_width_e  width = W32;
  logic        cpha = 1'b0;
  logic        lead = 1'b0, trail = 1'b0;
  logic [31:0] tx_word = '0;
  logic        miso = 1'b0;
  logic        mosi;
  logic [31:0] data_out;
  logic [15:0] data_length;
  logic        len_zero;

  int checks = 0, failures = 0;

  spi_datapath dut (.clk, .rst, .load, .width, .cpha, .lead, .trail, .tx_word,
                    .miso, .mosi, .data_out, .data_length, .len_zero);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // One cycle with the given strobes, then a few quiet cycles.
  task automatic strobe(input bit l, input bit t);
    lead = l; trail = t;
    @(negedge clk);
    lead = 1'b0; trail = 1'b0;
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(data_length == 0 && len_zero && data_out == 0, "cleared by reset");

    for (int rep = 0; rep < 6; rep++)
      for (int ph = 0; ph < 2; ph++)
        for (int w = 0; w < 4; w++) begin
          int n;
          logic [31:0] txw, rxw, saved;
          n = 8 * (w + 1);
          txw = $urandom;
          rxw = $urandom;
          if (rep == 0) begin txw = 32'hAAAA_AAAA; rxw = 32'hFFFF_FFFF; end
          cpha = ph[0]; width = spi_width_e'(w); tx_word = txw;
          load = 1'b1;
          @(negedge clk);
          load = 1'b0;
          tx_word = ~txw;    // the word is captured at load
          check(data_length == 16'(n), $sformatf("data_length %0d after load, width %0d", data_length, n));
          check(data_out == 0, "receive register cleared at load");
          if (cpha) check(mosi == txw[n-1], "CPHA=1 first bit presented at load");
          for (int k = 0; k < n; k++) begin
            if (!cpha) begin
              miso = ~rxw[n-1-k];                        // must not be sampled here
              strobe(1'b1, 1'b0);                        // leading: transmit
              check(mosi == txw[n-1-k], $sformatf("mosi bit %0d cpha0 w%0d", k, n));
              miso = rxw[n-1-k];
              strobe(1'b0, 1'b1);                        // trailing: sample
            end else begin
              miso = rxw[n-1-k];
              strobe(1'b1, 1'b0);                        // leading: sample
              miso = ~rxw[n-1-k];                        // must not be sampled here
              strobe(1'b0, 1'b1);                        // trailing: transmit
              if (k < n - 1)
                check(mosi == txw[n-2-k], $sformatf("mosi bit %0d cpha1 w%0d", k + 1, n));
            end
            check(data_length == 16'(n - 1 - k), "data_length counts down");
          end
          check(len_zero, "len_zero after the last bit");
          check(data_out == (rxw & ((n == 32) ? 32'hFFFF_FFFF : ((32'd1 << n) - 1))),
                $sformatf("data_out %h w%0d cpha%0d", data_out, n, ph));
          saved = data_out;
          miso = ~miso;
          strobe(1'b1, 1'b0);
          strobe(1'b0, 1'b1);
          check(data_out == saved && data_length == 0, "strobes after the word change nothing");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
