// poc_fsm: protocol operation control state machine.
//
// Holds the operational state of the protocol engine and changes it, one
// transition per clock, on a host command (cmd_valid with cmd) or on a
// condition reported by the startup and clock synchronisation logic. The
// states and transitions are those of the FlexRay POC state diagram:
//   reset (power off / sleep) -> default config -> config
//   config      --config done-->          ready
//   ready       --config command-->       config
//   ready       --wake-up command-->      wake-up
//   ready       --run command-->          start-up
//   start-up    --integration success-->  normal active
//   normal active  --sync error-->        normal passive
//   normal passive --sync OK-->           normal active
//   wake-up, normal active, normal passive --ready command--> ready
//   normal active, normal passive --halt command--> halt (stop)
//   any state   --freeze command-->       halt (stop)
// Halt is left only by reset: the diagram shows no way out of it, and that
// is followed here. Commands that have no transition in the current state
// are ignored. 'tx_allowed' is high in normal active only and 'rx_allowed' in
// both normal states; these two outputs are this design's own.
module poc_fsm
  import flexray_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cmd_valid,
  input  poc_cmd_t   cmd,
  input  logic       integration_ok,
  input  logic       sync_ok,
  input  logic       sync_error,
  output poc_state_t state,
  output logic       tx_allowed,
  output logic       rx_allowed
);

  poc_state_t nxt;

  always_comb begin
    nxt = state;
    if (cmd_valid && cmd == CMD_FREEZE) begin
      nxt = POC_HALT;
    end else begin
      unique case (state)
        POC_DEFAULT_CONFIG: nxt = POC_CONFIG;
        POC_CONFIG:
          if (cmd_valid && cmd == CMD_CONFIG_DONE) nxt = POC_READY;
        POC_READY:
          if (cmd_valid) begin
            case (cmd)
              CMD_CONFIG: nxt = POC_CONFIG;
              CMD_WAKEUP: nxt = POC_WAKEUP;
              CMD_RUN:    nxt = POC_STARTUP;
              default:    ;
            endcase
          end
        POC_WAKEUP:
          if (cmd_valid && cmd == CMD_READY) nxt = POC_READY;
        POC_STARTUP:
          if (integration_ok) nxt = POC_NORMAL_ACTIVE;
        POC_NORMAL_ACTIVE:
          if (cmd_valid && cmd == CMD_HALT)       nxt = POC_HALT;
          else if (cmd_valid && cmd == CMD_READY) nxt = POC_READY;
          else if (sync_error)                    nxt = POC_NORMAL_PASSIVE;
        POC_NORMAL_PASSIVE:
          if (cmd_valid && cmd == CMD_HALT)       nxt = POC_HALT;
          else if (cmd_valid && cmd == CMD_READY) nxt = POC_READY;
          else if (sync_ok)                       nxt = POC_NORMAL_ACTIVE;
        POC_HALT: ;
        default: nxt = POC_DEFAULT_CONFIG;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= POC_DEFAULT_CONFIG;
    else        state <= nxt;
  end

  assign tx_allowed = (state == POC_NORMAL_ACTIVE);
  assign rx_allowed = (state == POC_NORMAL_ACTIVE) || (state == POC_NORMAL_PASSIVE);

endmodule
