// safety_core: one processor of the two-core safety platform.
//
// The emergency stop and reset buttons are brought into the clock domain by
// SYNC_STAGES-flop synchronisers and shared by the four modules of the core:
//   power_up_self_test - component check at power-on and after an STO;
//   reset_module       - turns a reset button press into a reset pulse;
//   safe_channel_1oo2  - sends local_sto to the other core, receives its STO;
//   diagnostics        - local STO diagnosis and the redundant output.
// ch_tx/ch_rx connect to the other core's ch_rx/ch_tx. ch_tx is driven from
// the local_sto register through gates only, and ch_rx reaches red_out
// through gates only, so the two cores see each other's diagnosis in the
// same cycle. Latency from a button edge to local_sto is SYNC_STAGES + 1
// cycles.
//
// The four-module split follows the platform description; the synchronisers
// and the status bundle are this design's.
module safety_core
  import safety_pkg::*;
#(
  parameter int unsigned N_COMP      = 4,
  parameter int unsigned SYNC_STAGES = 2,
  parameter int unsigned MIN_PRESS   = 2,
  parameter int unsigned DISC_CYCLES = 4,
  parameter int unsigned FB_TIMEOUT  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              estop_i,
  input  logic              reset_i,
  input  logic [N_COMP-1:0] comp_ok,
  input  logic              torque_off_fb,
  input  chan_word_t        ch_rx,
  output chan_word_t        ch_tx,
  output logic              red_out,
  output core_status_t      status
);

  logic estop, reset_btn, sys_reset;
  logic pust_ready, pust_fail;
  logic local_sto, sto_trip, ext_sto, chan_fault, disc_fault, fb_fault;
  pust_state_t pust_state;
  rst_state_t  rst_state;

  // The e-stop synchroniser resets to "pressed" so the core starts safe.
  sync2 #(.STAGES(SYNC_STAGES), .RESET_VAL(1'b1)) u_sync_estop (
    .clk, .rst_n, .d(estop_i), .q(estop));
  sync2 #(.STAGES(SYNC_STAGES), .RESET_VAL(1'b0)) u_sync_reset (
    .clk, .rst_n, .d(reset_i), .q(reset_btn));

  reset_module #(.MIN_PRESS(MIN_PRESS)) u_reset (
    .clk, .rst_n, .reset_btn, .estop, .sys_reset, .state(rst_state));

  power_up_self_test #(.N_COMP(N_COMP)) u_pust (
    .clk, .rst_n, .comp_ok, .sys_reset, .sto_active(sto_trip),
    .ready(pust_ready), .fail(pust_fail), .state(pust_state));

  safe_channel_1oo2 u_chan (
    .clk, .rst_n, .sys_reset, .local_sto, .rx(ch_rx), .tx(ch_tx),
    .ext_sto, .chan_fault);

  diagnostics #(.DISC_CYCLES(DISC_CYCLES), .FB_TIMEOUT(FB_TIMEOUT)) u_diag (
    .clk, .rst_n, .estop, .sys_reset, .pust_ready, .ext_sto, .chan_fault,
    .torque_off_fb, .local_sto, .sto_trip, .red_out, .disc_fault, .fb_fault);

  assign status = '{pust_state: pust_state, rst_state: rst_state,
                    pust_ready: pust_ready, pust_fail: pust_fail,
                    local_sto: local_sto, ext_sto: ext_sto,
                    chan_fault: chan_fault, disc_fault: disc_fault,
                    fb_fault: fb_fault};

endmodule
