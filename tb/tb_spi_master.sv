// tb_spi_master -- end-to-end testbench of the register-configurable SPI
// master, run with every parameter at its default.
//
// A behavioural slave (spi_slave_model) sits on the bus.  The testbench
// programs the master through its register port and checks, for every
// transfer:
//   * the word the slave received equals the low bits of TXDATA;
//   * data_out and RXDATA equal the word the slave sent;
//   * tx_done/rx_done are low during the word and high after it;
//   * chip select is low for exactly 2 + 2 * div_factor * bits clocks (one
//     START cycle, 2 * div_factor per bit, one cycle to see the end);
//   * spi_clk makes exactly `bits` leading edges and rests at CPOL when
//     chip select is high;
//   * MOSI only changes on the transmit edge of the mode (leading edge for
//     CPHA = 0, trailing edge for CPHA = 1), apart from the first bit that
//     CPHA = 1 presents when the word is loaded; spi_clk rests at CPOL in
//     START.
// It sweeps the four CPOL/CPHA modes, the four word widths and several
// division factors, and also checks the reset state sequence 0 -> 1 -> 2,
// the reset configuration, re-initialisation on a CONFIG write, a start
// pulse during initialisation, a start during a transfer (ignored) and the
// ERROR state for a division factor of 0.  Every one of these mechanisms is
// counted, and one that never happened counts as a failure.
module tb_spi_master;
  import spi_pkg::*;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        reg_we = 1'b0;
  logic [1:0]  reg_addr = '0;
  logic [31:0] reg_wdata = '0;
  logic [31:0] reg_rdata;
  logic        start = 1'b0;
  logic        spi_clk, spi_mosi, spi_miso, spi_cs;
  logic        tx_done, rx_done;
  logic [31:0] data_out;
  logic [2:0]  state;
  logic [15:0] data_length;

  // slave side
  logic        s_cpol = 1'b0, s_cpha = 1'b0;
  int unsigned s_nbits = 32;
  logic [31:0] s_tx = '0;
  logic [31:0] s_rx;
  int unsigned s_rx_bits, s_lead;

  int checks = 0, failures = 0;
  int n_mode[4];
  int n_width[4];
  int n_div1 = 0, n_divmax = 0, n_reinit = 0, n_error = 0, n_start_pend = 0;
  int n_start_ignored = 0;
  int cs_low_cycles = 0;
  int mosi_bad = 0;

  spi_master dut (
    .clk, .rst, .reg_we, .reg_addr, .reg_wdata, .reg_rdata, .start,
    .spi_clk, .spi_mosi, .spi_miso, .spi_cs, .tx_done, .rx_done, .data_out,
    .state, .data_length
  );

  spi_slave_model slave (
    .spi_clk, .spi_mosi, .spi_cs, .spi_miso,
    .cpol(s_cpol), .cpha(s_cpha), .nbits(s_nbits), .tx_word(s_tx),
    .rx_word(s_rx), .rx_bits(s_rx_bits), .lead_edges(s_lead)
  );

  always #5 clk = ~clk;

  // Watchdog.
  initial begin
    repeat (400000) @(posedge clk);
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

  // Chip-select low time and MOSI edge discipline, sampled every clock.
  logic prev_mosi, prev_sclk, prev_cs;
  logic [2:0] prev_st;
  always @(posedge clk) begin
    if (!spi_cs) cs_low_cycles++;
    if (!rst && !spi_cs && !prev_cs && spi_mosi != prev_mosi) begin
      // MOSI moved inside a selection: spi_clk must have made the transmit edge
      if (prev_st == ST_START) ;                                   // word loaded
      else if (spi_clk == prev_sclk) mosi_bad++;
      else if (s_cpha == 1'b0 && spi_clk == s_cpol) mosi_bad++;   // not leading
      else if (s_cpha == 1'b1 && spi_clk != s_cpol) mosi_bad++;   // not trailing
    end
    if (!rst && state == ST_START && spi_clk != s_cpol) mosi_bad++;   // rests at CPOL
    prev_mosi <= spi_mosi;
    prev_sclk <= spi_clk;
    prev_cs   <= spi_cs;
    prev_st   <= state;
  end

  task automatic wr(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk);
    reg_we = 1'b1; reg_addr = a; reg_wdata = d;
    @(negedge clk);
    reg_we = 1'b0;
  endtask

  task automatic rd(input logic [1:0] a, output logic [31:0] d);
    @(negedge clk);
    reg_addr = a;
    #1 d = reg_rdata;
  endtask

  task automatic wait_state(input spi_state_e s, input int limit);
    int n = 0;
    while (state != s && n < limit) begin @(posedge clk); #1; n++; end
  endtask

  function automatic logic [31:0] mask(input int unsigned bits);
    return (bits == 32) ? 32'hFFFF_FFFF : ((32'd1 << bits) - 1);
  endfunction

  // Program a configuration and wait until it is loaded (controller IDLE).
  task automatic configure(input int unsigned div, input logic cpol, input logic cpha,
                           input int unsigned wcode);
    spi_cfg_t c;
    bit saw_init = 0;
    c.div_factor = 4'(div); c.cpol = cpol; c.cpha = cpha; c.width = spi_width_e'(wcode);
    wr(REG_CONFIG, 32'(c));
    // the write must send the idle controller back through INIT
    for (int i = 0; i < 4; i++) begin
      if (state == ST_INIT) saw_init = 1;
      @(posedge clk); #1;
    end
    if (saw_init) n_reinit++;
    wait_state(ST_IDLE, 20);
    s_cpol = cpol; s_cpha = cpha; s_nbits = 8 * (wcode + 1);
  endtask

  // One word with the current configuration.
  task automatic transfer(input int unsigned div, input int unsigned wcode,
                          input logic [31:0] mtx, input logic [31:0] stx,
                          input bit poke_start);
    int unsigned bits = 8 * (wcode + 1);
    logic [31:0] r;
    int cs0;
    wr(REG_TXDATA, mtx);
    s_tx = stx;
    cs0 = cs_low_cycles;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    wait_state(ST_TRANSFER, 10);
    check(!tx_done && !rx_done, "done flags cleared at START");
    check(!spi_cs, "chip select low in TRANSFER");
    if (poke_start) begin
      // a second start during the word must be ignored
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
    end
    wait_state(ST_STOP, 2 * 16 * 33 + 10);
    check(state == ST_STOP, "reached STOP");
    check(tx_done && rx_done, "done flags set in STOP");
    check(data_length == 0, "data_length zero at STOP");
    @(posedge clk); #1;
    check(state == ST_IDLE, "STOP returns to IDLE");
    check(cs_low_cycles - cs0 == 2 + 2 * int'(div) * int'(bits), $sformatf(
          "chip select low %0d cycles, expected %0d", cs_low_cycles - cs0, 2 + 2 * div * bits));
    check(s_lead == bits, $sformatf("spi_clk made %0d leading edges, expected %0d", s_lead, bits));
    check(s_rx_bits == bits, "slave sampled every bit");
    check(s_rx == (mtx & mask(bits)), $sformatf("slave got %h expected %h", s_rx, mtx & mask(bits)));
    check(data_out == (stx & mask(bits)), $sformatf("data_out %h expected %h", data_out, stx & mask(bits)));
    rd(REG_RXDATA, r);
    check(r == data_out, "RXDATA reads data_out");
    rd(REG_STATUS, r);
    check(r[1:0] == 2'b11 && r[2] == 1'b0 && r[6:4] == 3'(ST_IDLE), "STATUS after a word");
    if (poke_start) begin
      repeat (5) @(posedge clk);
      #1;
      check(state == ST_IDLE, "start during a word was ignored");
      if (state == ST_IDLE) n_start_ignored++;
    end
    n_mode[{s_cpol, s_cpha}]++;
    n_width[wcode]++;
    if (div == 1) n_div1++;
    if (div == 15) n_divmax++;
  endtask

  initial begin
    logic [31:0] r;
    int unsigned divs[4] = '{4, 1, 2, 15};
    for (int i = 0; i < 4; i++) begin n_mode[i] = 0; n_width[i] = 0; end

    // reset: INIT (0) while held, then 1 and IDLE (2)
    repeat (3) @(posedge clk);
    #1;
    check(state == 3'd0 && spi_cs == 1'b1, "INIT with chip select high during reset");
    @(negedge clk); rst = 1'b0;
    @(posedge clk); #1;
    check(state == 3'd1, "state 1 after reset");
    @(posedge clk); #1;
    check(state == 3'd2, "IDLE after initialisation");
    check(spi_cs == 1'b1 && spi_clk == 1'b0, "idle bus after reset");
    rd(REG_CONFIG, r);
    check(r[7:0] == 8'hC4, "reset configuration: div 4, mode 0, 32 bits");

    // the demonstration word: 32 bits 0xAAAAAAAA, mode 0, div 4
    transfer(4, 3, 32'hAAAA_AAAA, 32'hFFFF_FFFF, 1'b0);

    // all modes, widths and several division factors
    for (int m = 0; m < 4; m++)
      for (int w = 0; w < 4; w++)
        for (int d = 0; d < 4; d++) begin
          configure(divs[d], m[1], m[0], w);
          transfer(divs[d], w, $urandom, $urandom, (d == 2));
        end

    // a start pulse during re-initialisation is remembered
    begin
      spi_cfg_t c;
      c.div_factor = 4'd3; c.cpol = 1'b1; c.cpha = 1'b0; c.width = W16;
      wr(REG_TXDATA, 32'h0000_5A3C);
      s_tx = 32'h0000_C3A5;
      @(negedge clk);
      reg_we = 1'b1; reg_addr = REG_CONFIG; reg_wdata = 32'(c);
      @(negedge clk);
      reg_we = 1'b0;
      s_cpol = 1'b1; s_cpha = 1'b0; s_nbits = 16;
      wait_state(ST_INIT, 4);
      check(state == ST_INIT, "CONFIG write re-initialises");
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      wait_state(ST_STOP, 200);
      check(state == ST_STOP, "pending start ran after initialisation");
      check(s_rx == 32'h5A3C && data_out == 32'hC3A5, "word of the pending start");
      if (state == ST_STOP && s_rx == 32'h5A3C) n_start_pend++;
      wait_state(ST_IDLE, 4);
    end

    // division factor 0 -> ERROR, then recovery by rewriting CONFIG
    begin
      spi_cfg_t c;
      c.div_factor = 4'd0; c.cpol = 1'b0; c.cpha = 1'b0; c.width = W8;
      wr(REG_CONFIG, 32'(c));
      wait_state(ST_ERROR, 6);
      check(state == ST_ERROR, "div_factor 0 gives ERROR");
      rd(REG_STATUS, r);
      check(r[3] == 1'b1, "STATUS error bit");
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      repeat (5) @(posedge clk);
      #1;
      check(state == ST_ERROR && spi_cs, "no transfer from ERROR");
      if (state == ST_ERROR) n_error++;
      configure(2, 0, 1, 0);
      check(state == ST_IDLE, "ERROR left by a new configuration");
      transfer(2, 0, 32'h0000_00E7, 32'h0000_0018, 1'b0);
    end

    // every mechanism must have happened
    for (int i = 0; i < 4; i++) begin
      check(n_mode[i] > 0, $sformatf("mode cpol,cpha=%0d exercised", i));
      check(n_width[i] > 0, $sformatf("width %0d bits exercised", 8 * (i + 1)));
    end
    check(n_div1 > 0 && n_divmax > 0, "smallest and largest division factor exercised");
    check(n_reinit > 0, "re-initialisation on CONFIG write exercised");
    check(n_start_pend > 0, "start during initialisation exercised");
    check(n_start_ignored > 0, "start during a word exercised");
    check(n_error > 0, "ERROR state exercised");
    check(mosi_bad == 0, $sformatf("MOSI/spi_clk edge discipline (%0d violations)", mosi_bad));

    $display("modes %0d/%0d/%0d/%0d widths %0d/%0d/%0d/%0d reinit %0d pend %0d ignored %0d error %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_width[0], n_width[1], n_width[2],
             n_width[3], n_reinit, n_start_pend, n_start_ignored, n_error);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
