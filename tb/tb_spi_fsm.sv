// tb_spi_fsm -- self-checking testbench of the SPI controller state machine.
//
// Drives the controller's inputs directly and checks the state codes and
// strobes in scripted scenarios:
//   reset -> INIT(0) -> LOAD(1) -> IDLE(2), with load_cfg/cfg_ack in LOAD;
//   start -> START(3) with load_data -> TRANSFER(4) with run_clk, staying in
//   TRANSFER until both len_zero and sclk_idle -> STOP(5) -> IDLE;
//   a configuration write in IDLE -> INIT -> LOAD -> IDLE;
//   a start seen during INIT is remembered; a start during a word is not;
//   division factor 0 -> ERROR(6), start ignored there, left on a new write.
// A monitor also checks every cycle that state equals the previous state_d.
module tb_spi_fsm;
  import spi_pkg::*;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       start = 1'b0;
  logic       cfg_pending = 1'b0;
  logic [3:0] cfg_div_factor = 4'd4;
  logic       len_zero = 1'b0;
  logic       sclk_idle = 1'b1;
  spi_state_e state, state_d;
  logic       load_cfg, cfg_ack, load_data, run_clk;

  int checks = 0, failures = 0;

  spi_fsm dut (.clk, .rst, .start, .cfg_pending, .cfg_div_factor, .len_zero,
               .sclk_idle, .state, .state_d, .load_cfg, .cfg_ack, .load_data,
               .run_clk);

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

  // state must follow state_d
  spi_state_e prev_d;
  always @(posedge clk) begin
    if (!rst) begin
      #1;
      check(state == prev_d, "state follows state_d");
    end
  end
  always @(negedge clk) prev_d = state_d;

  task automatic expect_state(input spi_state_e s, input string what);
    check(state == s, $sformatf("%s: state %0d expected %0d", what, state, s));
  endtask

  task automatic cyc();
    @(negedge clk);
  endtask

  initial begin
    @(negedge clk);
    expect_state(ST_INIT, "held in reset");
    cyc();
    rst = 1'b0;
    cyc();
    expect_state(ST_LOAD, "after reset");
    check(load_cfg && cfg_ack, "LOAD copies a usable configuration");
    cyc();
    expect_state(ST_IDLE, "after LOAD");
    check(!load_cfg && !cfg_ack && !load_data && !run_clk, "IDLE strobes quiet");
    repeat (3) cyc();
    expect_state(ST_IDLE, "IDLE waits for start");

    // one word
    start = 1'b1; cyc(); start = 1'b0;
    expect_state(ST_START, "start seen");
    check(load_data && !run_clk, "START loads the word");
    cyc();
    expect_state(ST_TRANSFER, "after START");
    check(run_clk && !load_data, "clock runs in TRANSFER");
    start = 1'b1; cyc(); start = 1'b0;       // ignored: a word is in flight
    repeat (3) begin
      cyc();
      expect_state(ST_TRANSFER, "bits remain");
    end
    len_zero = 1'b1; sclk_idle = 1'b0;      // last bit in, clock not at rest
    #1;
    check(run_clk, "clock finishes its period");
    cyc();
    expect_state(ST_TRANSFER, "waits for spi_clk to rest");
    sclk_idle = 1'b1;
    #1;
    check(!run_clk, "clock stopped at rest");
    cyc();
    expect_state(ST_STOP, "word complete");
    len_zero = 1'b0;
    cyc();
    expect_state(ST_IDLE, "STOP returns to IDLE");
    repeat (3) cyc();
    expect_state(ST_IDLE, "start during a word was not remembered");

    // re-initialisation on a configuration write, with a start in INIT
    cfg_pending = 1'b1; cfg_div_factor = 4'd2;
    cyc();
    expect_state(ST_INIT, "CONFIG write re-initialises");
    start = 1'b1; cyc(); start = 1'b0;
    expect_state(ST_LOAD, "INIT -> LOAD");
    check(load_cfg && cfg_ack, "new configuration copied");
    cfg_pending = 1'b0;
    cyc();
    expect_state(ST_IDLE, "back in IDLE");
    cyc();
    expect_state(ST_START, "start remembered from INIT");
    cyc();
    expect_state(ST_TRANSFER, "remembered word runs");
    len_zero = 1'b1;
    cyc();
    expect_state(ST_STOP, "remembered word complete");
    len_zero = 1'b0;
    cyc();
    expect_state(ST_IDLE, "IDLE again");

    // start and configuration write together: configuration first
    cfg_pending = 1'b1; start = 1'b1;
    cyc();
    start = 1'b0;
    expect_state(ST_INIT, "configuration has priority over start");
    cyc();
    cfg_pending = 1'b0;
    cyc();
    expect_state(ST_IDLE, "configured");
    cyc();
    expect_state(ST_START, "start kept across re-initialisation");
    cyc(); len_zero = 1'b1; cyc(); len_zero = 1'b0;
    expect_state(ST_STOP, "word done");
    cyc();

    // unusable configuration
    cfg_pending = 1'b1; cfg_div_factor = 4'd0;
    cyc();
    expect_state(ST_INIT, "re-initialise");
    cyc();
    expect_state(ST_LOAD, "LOAD");
    check(!load_cfg && cfg_ack, "div 0 is not copied but acknowledged");
    cfg_pending = 1'b0;
    cyc();
    expect_state(ST_ERROR, "div 0 gives ERROR");
    start = 1'b1; cyc(); start = 1'b0;
    repeat (3) begin
      cyc();
      expect_state(ST_ERROR, "ERROR holds");
      check(!load_data && !run_clk, "nothing runs in ERROR");
    end
    cfg_pending = 1'b1; cfg_div_factor = 4'd1;
    cyc();
    expect_state(ST_INIT, "ERROR left on a new configuration");
    cfg_pending = 1'b0;
    cyc(); cyc();
    expect_state(ST_IDLE, "usable again");
    repeat (3) cyc();
    expect_state(ST_IDLE, "start given in ERROR was dropped");

    // reset from the middle of a word
    start = 1'b1; cyc(); start = 1'b0; cyc();
    expect_state(ST_TRANSFER, "word running");
    rst = 1'b1;
    #1;
    expect_state(ST_INIT, "asynchronous reset");
    cyc(); rst = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
