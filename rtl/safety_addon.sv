// safety_addon: top level, the safety related add-on of a motor drive.
//
// Purpose: remove the motor torque (Safe Torque Off, STO) shortly after the
// emergency stop button is pressed, with two cross-checking cores so that a
// single fault neither hides an emergency stop nor goes unnoticed. The add-on
// holds the two-core safety_platform and the sto_interpreter that evaluates
// its two redundant outputs. safe_sto_o is the STO command for the drive,
// nonsafe_removal_o reports that the two cores disagreed for too long.
// torque_off_fb is the drive's report that torque has been removed.
//
// Timing: an emergency stop press reaches red_out_a/b after SYNC_STAGES + 1
// cycles and safe_sto_o one cycle later. After power-on both cores check
// their components (N_COMP cycles) and keep STO active until the reset button
// is pressed and released.
module safety_addon
  import safety_pkg::*;
#(
  parameter int unsigned N_COMP      = 4,
  parameter int unsigned SYNC_STAGES = 2,
  parameter int unsigned MIN_PRESS   = 2,
  parameter int unsigned DISC_CYCLES = 4,
  parameter int unsigned FB_TIMEOUT  = 16,
  parameter int unsigned NS_CYCLES   = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              estop_i,
  input  logic              reset_i,
  input  logic [N_COMP-1:0] comp_ok_a,
  input  logic [N_COMP-1:0] comp_ok_b,
  input  logic              torque_off_fb,
  output logic              safe_sto_o,
  output logic              nonsafe_removal_o,
  output logic              red_out_a,
  output logic              red_out_b,
  output core_status_t      status_a,
  output core_status_t      status_b
);

  safety_platform #(.N_COMP(N_COMP), .SYNC_STAGES(SYNC_STAGES), .MIN_PRESS(MIN_PRESS),
                    .DISC_CYCLES(DISC_CYCLES), .FB_TIMEOUT(FB_TIMEOUT)) u_platform (
    .clk, .rst_n, .estop_i, .reset_i, .comp_ok_a, .comp_ok_b, .torque_off_fb,
    .red_out_a, .red_out_b, .status_a, .status_b);

  sto_interpreter #(.NS_CYCLES(NS_CYCLES)) u_interp (
    .clk, .rst_n, .red_a(red_out_a), .red_b(red_out_b),
    .safe_sto(safe_sto_o), .nonsafe_removal(nonsafe_removal_o));

endmodule
