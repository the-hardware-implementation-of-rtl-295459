// tb_spi_demo_runs -- replays the demonstration runs of the
// reference design on the SPI master at its default parameters, and checks
// the values those runs are described as showing.
//
//   1. Reset: state 0 with chip select high while rst is high, then 1 and 2;
//      a second rst pulse goes back to 0, then 1, 2; a start gives 3 (chip
//      select falls) and 4.
//   2. div_factor 4, CPOL = CPHA = 0, one 32-bit word 0xAAAAAAAA with MISO
//      held high: data_length reads 0x0020 once the word is loaded; data_out
//      fills 0x1, 0x3, 0x7, 0xf, ... 0xffffffff, one bit per spi_clk period;
//      data_length counts ..., 3, 2, 1, 0 and the state then goes 4 -> 5 -> 2
//      with tx_done/rx_done rising as it enters 5; MOSI carries 1010...10,
//      changing on rising spi_clk edges; spi_clk has a period of
//      2 * div_factor = 8 system clocks.
//   3. The same word in modes 1, 2 and 3: spi_clk rests at CPOL, MOSI changes
//      only on the mode's transmit edge (mode 1 falling, mode 2 falling,
//      mode 3 rising) and the word arrives intact at a slave.
module tb_spi_demo_runs;
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

  logic        s_cpol = 1'b0, s_cpha = 1'b0;
  logic [31:0] s_tx = 32'hFFFF_FFFF;
  logic [31:0] s_rx;
  int unsigned s_rx_bits, s_lead;

  int checks = 0, failures = 0;

  spi_master dut (
    .clk, .rst, .reg_we, .reg_addr, .reg_wdata, .reg_rdata, .start,
    .spi_clk, .spi_mosi, .spi_miso, .spi_cs, .tx_done, .rx_done, .data_out,
    .state, .data_length
  );

  spi_slave_model slave (
    .spi_clk, .spi_mosi, .spi_cs, .spi_miso,
    .cpol(s_cpol), .cpha(s_cpha), .nbits(32), .tx_word(s_tx),
    .rx_word(s_rx), .rx_bits(s_rx_bits), .lead_edges(s_lead)
  );

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

  // Trace of one word, sampled once per system clock.
  logic [31:0] trace_out[$];     // distinct data_out values
  logic [15:0] trace_len[$];     // distinct data_length values
  logic [2:0]  trace_st[$];      // distinct state values
  logic        trace_mosi[$];    // MOSI level at each spi_clk receive edge
  int          mosi_wrong_edge, rise_cycles[$], cyc;
  logic        p_sclk, p_mosi, p_done;
  logic [2:0]  p_state;
  int          done_rise_state;
  bit          tracing = 0;

  always @(posedge clk) begin
    cyc++;
    if (tracing) begin
      if (trace_out.size() == 0 || trace_out[$] != data_out) trace_out.push_back(data_out);
      if (trace_len.size() == 0 || trace_len[$] != data_length) trace_len.push_back(data_length);
      if (trace_st.size() == 0 || trace_st[$] != state) trace_st.push_back(state);
      if (!spi_cs && spi_clk != p_sclk) begin
        // the slave samples on the opposite edge to the master's transmit edge
        if ((spi_clk == s_cpol) != s_cpha) trace_mosi.push_back(spi_mosi);
        if (spi_clk) rise_cycles.push_back(cyc);
      end
      if (!spi_cs && spi_mosi != p_mosi && state == ST_TRANSFER && p_state == ST_TRANSFER) begin
        // MOSI may only move with the transmit edge of the mode
        bit rising, falling, want_rising;
        rising      = (spi_clk && !p_sclk);
        falling     = (!spi_clk && p_sclk);
        want_rising = (s_cpol == s_cpha);   // modes 0 and 3 transmit on rising edges
        if (!(want_rising ? rising : falling)) mosi_wrong_edge++;
      end
      if (tx_done && !p_done) done_rise_state = state;
    end
    p_sclk <= spi_clk;
    p_mosi <= spi_mosi;
    p_done <= tx_done;
    p_state <= state;
  end

  task automatic wr(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk);
    reg_we = 1'b1; reg_addr = a; reg_wdata = d;
    @(negedge clk);
    reg_we = 1'b0;
  endtask

  task automatic run_word(input logic cpol, input logic cpha);
    spi_cfg_t c;
    c.div_factor = 4'd4; c.cpol = cpol; c.cpha = cpha; c.width = W32;
    wr(REG_CONFIG, 32'(c));
    repeat (4) @(negedge clk);
    s_cpol = cpol; s_cpha = cpha;
    check(state == 3'(ST_IDLE) && spi_clk == cpol, $sformatf("mode %0d: idle at CPOL", {cpol, cpha}));
    wr(REG_TXDATA, 32'hAAAA_AAAA);
    trace_out.delete(); trace_len.delete(); trace_st.delete(); trace_mosi.delete();
    rise_cycles.delete();
    mosi_wrong_edge = 0; done_rise_state = -1;
    tracing = 1;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (state != 3'(ST_IDLE)) @(negedge clk);
    @(negedge clk);
    tracing = 0;
  endtask

  initial begin
    // 1. reset sequence
    repeat (3) @(negedge clk);
    check(state == 3'd0 && spi_cs, "state 0, chip select high in reset");
    rst = 1'b0;
    @(negedge clk); check(state == 3'd1, "then state 1");
    @(negedge clk); check(state == 3'd2, "then state 2");
    rst = 1'b1;
    @(negedge clk); check(state == 3'd0, "rst pulse returns to 0");
    rst = 1'b0;
    @(negedge clk); check(state == 3'd1, "state 1 again");
    @(negedge clk); check(state == 3'd2, "state 2 again");
    start = 1'b1;
    @(negedge clk); start = 1'b0;
    check(state == 3'd3 && !spi_cs, "state 3 with chip select low");
    @(negedge clk); check(state == 3'd4 && !spi_cs, "state 4");
    while (state != 3'(ST_IDLE)) @(negedge clk);

    // 2. mode 0, div 4, 32 bits of 0xAAAAAAAA, MISO high
    s_tx = 32'hFFFF_FFFF;
    run_word(1'b0, 1'b0);
    check(trace_st.size() == 5 && trace_st[0] == 3'd2 && trace_st[1] == 3'd3 &&
          trace_st[2] == 3'd4 && trace_st[3] == 3'd5 && trace_st[4] == 3'd2,
          "states 2, 3, 4, 5, 2 for the word");
    check(state == 3'd2, "back to state 2");
    check(done_rise_state == 5, "tx_done rises as the state enters 5");
    check(tx_done && rx_done, "done flags high after the word");
    check(trace_len.size() >= 2 && trace_len[1] == 16'h0020, "data_length 0x0020 after load");
    check(trace_len.size() == 34, $sformatf("data_length took %0d values", trace_len.size()));
    if (trace_len.size() == 34) begin
      check(trace_len[30] == 16'd3 && trace_len[31] == 16'd2 && trace_len[32] == 16'd1 &&
            trace_len[33] == 16'd0, "data_length ends 3, 2, 1, 0");
    end
    // data_out: the value from before the word, then 0 at load, then 1, 3, 7, ...
    begin
      int base;
      base = (trace_out.size() > 0 && trace_out[0] != 0) ? 1 : 0;
      check(trace_out.size() == base + 33, $sformatf("data_out took %0d values", trace_out.size()));
      for (int k = 1; k <= 32 && base + k < trace_out.size(); k++)
        check(trace_out[base + k] == ((k == 32) ? 32'hFFFF_FFFF : (32'd1 << k) - 1),
              $sformatf("data_out step %0d = %h", k, trace_out[base + k]));
    end
    check(trace_mosi.size() == 32, "32 bits seen on MOSI");
    for (int k = 0; k < 32 && k < trace_mosi.size(); k++)
      check(trace_mosi[k] == ((k % 2) == 0), $sformatf("MOSI bit %0d of 1010...", k));
    check(mosi_wrong_edge == 0, "mode 0: MOSI changes on rising edges");
    check(rise_cycles.size() == 32, "32 rising spi_clk edges");
    for (int k = 1; k < rise_cycles.size(); k++)
      check(rise_cycles[k] - rise_cycles[k - 1] == 8, "spi_clk period 8 clocks at div 4");
    check(s_rx == 32'hAAAA_AAAA && data_out == 32'hFFFF_FFFF, "mode 0 word both ways");

    // 3. modes 1, 2, 3
    for (int m = 1; m < 4; m++) begin
      s_tx = 32'h003F_C000 ^ 32'(m);
      run_word(m[1], m[0]);
      check(mosi_wrong_edge == 0, $sformatf("mode %0d: MOSI on the transmit edge", m));
      check(trace_mosi.size() == 32, $sformatf("mode %0d: 32 bits on MOSI", m));
      check(s_rx == 32'hAAAA_AAAA, $sformatf("mode %0d: slave received 0xAAAAAAAA", m));
      check(data_out == s_tx, $sformatf("mode %0d: data_out %h", m, data_out));
      check(spi_clk == m[1], $sformatf("mode %0d: spi_clk back at CPOL", m));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
