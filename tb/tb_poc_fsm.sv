// tb_poc_fsm: walks the POC state machine through every transition of the
// state diagram and checks that commands with no transition are ignored.
module tb_poc_fsm;
  import flexray_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, integration_ok = 0, sync_ok = 0, sync_error = 0;
  poc_cmd_t cmd = CMD_NONE;
  poc_state_t state;
  logic tx_allowed, rx_allowed;
  int checks = 0, failures = 0;

  poc_fsm dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(poc_state_t s, string what);
    checks++;
    if (state !== s) begin
      failures++;
      $display("FAIL %s: state %0d expected %0d", what, state, s);
    end
  endtask

  task automatic command(poc_cmd_t c);
    @(negedge clk); cmd_valid = 1; cmd = c;
    @(negedge clk); cmd_valid = 0; cmd = CMD_NONE;
  endtask

  task automatic pulse_in(int which);
    @(negedge clk);
    integration_ok = (which == 0); sync_error = (which == 1); sync_ok = (which == 2);
    @(negedge clk);
    integration_ok = 0; sync_error = 0; sync_ok = 0;
  endtask

  task automatic to_active();
    command(CMD_RUN);           expect_state(POC_STARTUP, "run");
    pulse_in(0);                expect_state(POC_NORMAL_ACTIVE, "integration");
  endtask

  task automatic restart();
    rst_n = 0; @(negedge clk); rst_n = 1;
    expect_state(POC_DEFAULT_CONFIG, "reset");
    @(negedge clk); expect_state(POC_CONFIG, "default->config");
    command(CMD_CONFIG_DONE); expect_state(POC_READY, "config done");
  endtask

  initial begin
    @(negedge clk);
    restart();
    command(CMD_RUN);
    expect_state(POC_STARTUP, "run");
    command(CMD_HALT);  expect_state(POC_STARTUP, "halt ignored in startup");
    pulse_in(0);        expect_state(POC_NORMAL_ACTIVE, "integration");
    checks++; if (!tx_allowed || !rx_allowed) begin failures++; $display("FAIL tx/rx allowed"); end
    pulse_in(1);        expect_state(POC_NORMAL_PASSIVE, "sync error");
    checks++; if (tx_allowed || !rx_allowed) begin failures++; $display("FAIL passive allow"); end
    pulse_in(2);        expect_state(POC_NORMAL_ACTIVE, "sync ok");
    command(CMD_READY); expect_state(POC_READY, "ready from active");
    command(CMD_CONFIG); expect_state(POC_CONFIG, "config cmd");
    command(CMD_RUN);   expect_state(POC_CONFIG, "run ignored in config");
    command(CMD_CONFIG_DONE); expect_state(POC_READY, "config done 2");
    command(CMD_WAKEUP); expect_state(POC_WAKEUP, "wakeup");
    command(CMD_READY); expect_state(POC_READY, "ready from wakeup");
    to_active();
    pulse_in(1);        expect_state(POC_NORMAL_PASSIVE, "sync error 2");
    command(CMD_READY); expect_state(POC_READY, "ready from passive");
    to_active();
    command(CMD_HALT);  expect_state(POC_HALT, "halt from active");
    command(CMD_READY); expect_state(POC_HALT, "halt is final");
    restart(); to_active(); pulse_in(1);
    command(CMD_HALT);  expect_state(POC_HALT, "halt from passive");
    restart();
    command(CMD_FREEZE); expect_state(POC_HALT, "freeze from ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
