// tb_spi_regs -- self-checking testbench of the register configuration
// module.
//
// Checks the reset configuration (div 4, mode 0, 32 bits) in both the
// programmed and the working copy; that writing CONFIG changes only the
// programmed copy and raises cfg_pending; that load_cfg copies it to the
// working copy and cfg_ack clears cfg_pending (and that a write in the same
// cycle as cfg_ack keeps it pending); TXDATA write and read-back; that
// RXDATA and STATUS read their sources and ignore writes.  Random register
// traffic is compared with a reference model kept in the testbench.
module tb_spi_regs;
  import spi_pkg::*;

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic          reg_we = 1'b0;
  spi_reg_addr_e reg_addr = REG_CONFIG;
  logic [31:0]   reg_wdata = '0;
  logic [31:0]   reg_rdata;
  logic          load_cfg = 1'b0, cfg_ack = 1'b0;
  spi_cfg_t      cfg_prog, cfg_act;
  logic          cfg_pending;
  logic [31:0]   tx_word;
  logic [31:0]   rx_word = '0;
  spi_state_e    state = ST_IDLE;
  logic          tx_done = 1'b0, rx_done = 1'b0;

  int checks = 0, failures = 0;

  spi_regs dut (.clk, .rst, .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
                .load_cfg, .cfg_ack, .cfg_prog, .cfg_act, .cfg_pending, .tx_word,
                .rx_word, .state, .tx_done, .rx_done);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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
    logic [7:0]  m_prog, m_act;
    logic        m_pend;
    logic [31:0] m_tx;
    @(negedge clk);
    rst = 1'b0;
    check(cfg_prog == 8'hC4 && cfg_act == 8'hC4, "reset configuration div 4, mode 0, 32 bits");
    check(cfg_act.div_factor == 4'd4 && !cfg_act.cpol && !cfg_act.cpha && cfg_act.width == W32,
          "reset configuration fields");
    check(!cfg_pending && tx_word == 0, "nothing pending after reset");
    m_prog = 8'hC4; m_act = 8'hC4; m_pend = 1'b0; m_tx = '0;

    for (int i = 0; i < 2000; i++) begin
      logic        we, ld, ack;
      logic [1:0]  a;
      logic [31:0] d;
      we = ($urandom_range(0, 2) == 0);
      a = 2'($urandom);
      d = $urandom;
      ld = ($urandom_range(0, 4) == 0);
      ack = ld | ($urandom_range(0, 6) == 0);
      reg_we = we; reg_addr = spi_reg_addr_e'(a); reg_wdata = d;
      load_cfg = ld; cfg_ack = ack;
      rx_word = $urandom;
      state = spi_state_e'($urandom_range(0, 6));
      tx_done = 1'($urandom); rx_done = 1'($urandom);
      #1;
      // combinational read of the current contents
      unique case (a)
        2'd0: check(reg_rdata == 32'(m_prog), "CONFIG read");
        2'd1: check(reg_rdata == m_tx, "TXDATA read");
        2'd2: check(reg_rdata == rx_word, "RXDATA read");
        2'd3: check(reg_rdata == 32'({state, state == ST_ERROR,
                      state == ST_START || state == ST_TRANSFER || state == ST_STOP,
                      rx_done, tx_done}), "STATUS read");
      endcase
      @(negedge clk);
      // reference update
      if (ld) m_act = m_prog;
      if (ack) m_pend = 1'b0;
      if (we && a == 2'd0) begin m_prog = d[7:0]; m_pend = 1'b1; end
      if (we && a == 2'd1) m_tx = d;
      check(cfg_prog == m_prog, "programmed configuration");
      check(cfg_act == m_act, "working configuration");
      check(cfg_pending == m_pend, "cfg_pending");
      check(tx_word == m_tx, "transmit word");
    end
    reg_we = 1'b0; load_cfg = 1'b0; cfg_ack = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
