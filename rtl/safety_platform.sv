// safety_platform: two safe cores cross-connected through 1oo2 safe channels.
//
// Both cores receive the same emergency stop, reset and torque feedback
// inputs; each has its own component flags. Core 1's channel word goes to
// core 2 and back the other way, so each core checks its own STO diagnosis
// against the other's and drives one redundant output (A from core 1, B from
// core 2). Both outputs are high only when both cores call for Safe Torque
// Off, and they change in the same clock cycle; an assertion checks this
// while both channel words are valid.
//
// The structure (two processors, crossed diagnostics, two redundant outputs)
// follows the platform description; parameter values are this design's.
module safety_platform
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
  input  logic [N_COMP-1:0] comp_ok_a,
  input  logic [N_COMP-1:0] comp_ok_b,
  input  logic              torque_off_fb,
  output logic              red_out_a,
  output logic              red_out_b,
  output core_status_t      status_a,
  output core_status_t      status_b
);

  chan_word_t ch_ab, ch_ba;  // core 1 -> core 2, core 2 -> core 1

  safety_core #(.N_COMP(N_COMP), .SYNC_STAGES(SYNC_STAGES), .MIN_PRESS(MIN_PRESS),
                .DISC_CYCLES(DISC_CYCLES), .FB_TIMEOUT(FB_TIMEOUT)) u_core1 (
    .clk, .rst_n, .estop_i, .reset_i, .comp_ok(comp_ok_a), .torque_off_fb,
    .ch_rx(ch_ba), .ch_tx(ch_ab), .red_out(red_out_a), .status(status_a));

  safety_core #(.N_COMP(N_COMP), .SYNC_STAGES(SYNC_STAGES), .MIN_PRESS(MIN_PRESS),
                .DISC_CYCLES(DISC_CYCLES), .FB_TIMEOUT(FB_TIMEOUT)) u_core2 (
    .clk, .rst_n, .estop_i, .reset_i, .comp_ok(comp_ok_b), .torque_off_fb,
    .ch_rx(ch_ab), .ch_tx(ch_ba), .red_out(red_out_b), .status(status_b));

  // Lock-step rule: while both channel words are valid, the two redundant
  // outputs are equal in every cycle.
  a_lock_step: assert property (@(posedge clk)
    (chan_valid(ch_ab) && chan_valid(ch_ba)) |-> (red_out_a == red_out_b));

endmodule
