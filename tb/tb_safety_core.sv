// tb_safety_core: self-checking test of one safety_core.
//
// The partner core is modelled by this testbench: by default its channel
// word echoes ch_tx (an identical, healthy partner); it can also send a fixed
// valid word or an invalid one. The test walks the core through power-on,
// start by reset, emergency stop, restart, channel fault, discrepancy fault,
// torque feedback fault and a failed component, and checks the latencies
// from the button edges: e-stop to local STO SYNC_STAGES + 1 cycles, reset
// release to STO release SYNC_STAGES + 3 cycles at power-on and
// SYNC_STAGES + 3 + N_COMP cycles after an STO (re-scan of the components).
module tb_safety_core;
  import safety_pkg::*;

  localparam int N = 4, SY = 2, MP = 2, DC = 4, FT = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic estop_i = 1'b0, reset_i = 1'b0, torque_off_fb = 1'b1;
  logic [N-1:0] comp_ok = '1;
  chan_word_t ch_rx, ch_tx;
  logic red_out;
  core_status_t status;
  int checks = 0, failures = 0;

  int rx_mode = 0;   // 0 echo, 1 fixed valid word, 2 invalid word
  logic rx_val = 1'b0;
  always_comb
    case (rx_mode)
      0:       ch_rx = ch_tx;
      1:       ch_rx = chan_encode(rx_val);
      default: ch_rx = '{sto: 1'b1, sto_n: 1'b1};
    endcase

  always #5 clk = ~clk;

  safety_core #(.N_COMP(N), .SYNC_STAGES(SY), .MIN_PRESS(MP), .DISC_CYCLES(DC),
                .FB_TIMEOUT(FT)) dut (.*);

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic check_int(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Cycles until local_sto reaches `level`, at most `limit`.
  task automatic wait_sto(input logic level, input int limit, output int n);
    n = 0;
    while (status.local_sto !== level && n < limit) begin @(negedge clk); n++; end
  endtask

  task automatic press_reset(); reset_i = 1'b1; repeat (MP + SY + 1) @(negedge clk); reset_i = 1'b0; endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (N + SY + 4) @(negedge clk);
    check("waiting for first reset", status.pust_state == PUST_WAIT_RESET, 1'b1);
    check("STO held at power-on", status.local_sto, 1'b1);
    check("redundant output at power-on", red_out, 1'b1);
    press_reset();
    wait_sto(1'b0, 50, n);
    check_int("reset release to STO release (power-on)", n, SY + 3);
    check("ready", status.pust_ready, 1'b1);
    check("no redundant output when running", red_out, 1'b0);
    repeat (5) @(negedge clk);
    // Emergency stop.
    estop_i = 1'b1;
    wait_sto(1'b1, 50, n);
    check_int("e-stop to local STO", n, SY + 1);
    check("redundant output with e-stop", red_out, 1'b1);
    repeat (4) @(negedge clk);
    estop_i = 1'b0;
    repeat (10) @(negedge clk);
    check("STO latched after e-stop release", status.local_sto, 1'b1);
    check("self test armed", status.pust_state == PUST_ARMED, 1'b1);
    // Reset during an e-stop is ignored.
    estop_i = 1'b1; repeat (SY + 1) @(negedge clk);
    press_reset(); repeat (SY + N + 6) @(negedge clk);
    check("reset ignored during e-stop", status.local_sto, 1'b1);
    estop_i = 1'b0; repeat (SY + 2) @(negedge clk);
    press_reset();
    wait_sto(1'b0, 50, n);
    check_int("reset release to STO release (re-scan)", n, SY + 3 + N);
    // Channel fault: invalid word from the partner.
    rx_mode = 2; #1;
    check("channel fault seen at once", status.chan_fault, 1'b1);
    check("invalid word reads as STO", status.ext_sto, 1'b1);
    @(negedge clk);
    check("channel fault forces STO", status.local_sto, 1'b1);
    rx_mode = 0; repeat (3) @(negedge clk);
    check("channel fault sticky", status.chan_fault, 1'b1);
    press_reset();
    wait_sto(1'b0, 50, n);
    check("channel fault cleared by reset", status.chan_fault, 1'b0);
    check("running again", status.local_sto, 1'b0);
    // Discrepancy: the partner keeps calling STO on its own.
    rx_mode = 1; rx_val = 1'b1;
    repeat (DC) @(negedge clk);
    check("no discrepancy fault yet", status.disc_fault, 1'b0);
    @(negedge clk);
    check("discrepancy fault", status.disc_fault, 1'b1);
    @(negedge clk);
    check("discrepancy fault forces STO", status.local_sto, 1'b1);
    rx_mode = 0;
    press_reset();
    wait_sto(1'b0, 50, n);
    check("discrepancy fault cleared", status.disc_fault, 1'b0);
    // Torque feedback: STO commanded but torque stays on.
    torque_off_fb = 1'b0; estop_i = 1'b1;
    repeat (SY + 1 + FT + 2) @(negedge clk);
    check("torque feedback fault", status.fb_fault, 1'b1);
    torque_off_fb = 1'b1; estop_i = 1'b0; repeat (SY + 1) @(negedge clk);
    // Failed component found by the re-scan.
    comp_ok[1] = 1'b0;
    press_reset();
    repeat (N + SY + 4) @(negedge clk);
    check("component failure found", status.pust_fail, 1'b1);
    check("fb fault cleared by reset", status.fb_fault, 1'b0);
    check("STO held on failure", status.local_sto, 1'b1);
    comp_ok = '1;
    press_reset();
    repeat (N + SY + 4) @(negedge clk);
    check("after repair: wait for reset", status.pust_state == PUST_WAIT_RESET, 1'b1);
    press_reset();
    wait_sto(1'b0, 50, n);
    check("running after repair", status.pust_ready, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
