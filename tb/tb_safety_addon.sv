// tb_safety_addon: end-to-end test of the safety add-on at its default
// parameters (no parameter overrides).
//
// A behavioural drive model answers the Safe STO command: torque_off_fb
// follows safe_sto_o TORQUE_LAG cycles later, unless the model is told to
// ignore it. The test runs random emergency stop / reset episodes with
// occasional single-core component failures, then directed fault scenarios:
// an invalid channel word, a drive that does not remove the torque, and a
// redundant output stuck low. Checked on every cycle:
//   - an emergency stop held for SYNC_STAGES + 2 cycles gives safe_sto_o;
//   - safe_sto_o is withdrawn only within SYNC_STAGES + N_COMP + 4 cycles
//     after a release of the reset button (the latest a reset takes effect);
//   - the two redundant outputs are equal unless a fault is being injected;
//   - safe_sto_o is the AND of the two redundant outputs one cycle earlier.
// Every mechanism of the design is counted and must occur at least once.
module tb_safety_addon;
  import safety_pkg::*;

  // Local copies of the top's default parameter values.
  localparam int N = 4, SY = 2, MP = 2, DC = 4, FT = 16, NS = 8;
  localparam int TORQUE_LAG = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic estop_i = 1'b0, reset_i = 1'b0, torque_off_fb;
  logic [N-1:0] comp_ok_a = '1, comp_ok_b = '1;
  logic safe_sto_o, nonsafe_removal_o, red_out_a, red_out_b;
  core_status_t status_a, status_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  safety_addon dut (.*);

  // Drive model.
  bit drive_broken = 0;
  logic [TORQUE_LAG-1:0] lag = '1;
  always @(posedge clk) lag <= {lag[TORQUE_LAG-2:0], safe_sto_o};
  assign torque_off_fb = drive_broken ? 1'b0 : lag[TORQUE_LAG-1];

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  // Mechanism counters.
  int n_estop_sto = 0, n_reset_pulse = 0, n_reset_ignored = 0, n_rescan = 0;
  int n_pust_fail = 0, n_disc = 0, n_chan = 0, n_fb = 0, n_nonsafe = 0, n_restart = 0;

  // Property monitors.
  bit   tamper = 0;
  int   estop_held = 0;
  int   since_rel = 1000;      // cycles since the reset button was released
  logic reset_q = 1'b0, sto_q = 1'b1;
  logic [1:0] disc_q = '0, chan_q = '0, fb_q = '0, fail_q = '0;
  logic ns_q = 1'b0;
  logic red_q = 1'b1;          // red_out_a & red_out_b of the previous cycle
  always @(posedge clk or negedge rst_n) red_q <= !rst_n || (red_out_a & red_out_b);
  always @(negedge clk) if (rst_n) begin
    estop_held = estop_i ? estop_held + 1 : 0;
    if (estop_held >= SY + 3 && !tamper) check("e-stop gives safe STO", safe_sto_o, 1'b1);
    if (!tamper) check("redundant outputs equal", red_out_a, red_out_b);
    check("safe STO = both outputs, one cycle later", safe_sto_o, red_q);
    since_rel = (reset_q && !reset_i) ? 0 : since_rel + 1;
    if (sto_q && !safe_sto_o) begin
      check("STO withdrawn only after a reset", since_rel <= SY + N + 4, 1'b1);
      n_restart++;
    end
    if (!sto_q && safe_sto_o && estop_i) n_estop_sto++;
    if (status_a.rst_state == RST_PULSE)   n_reset_pulse++;
    if (status_a.rst_state == RST_BLOCKED && estop_i) n_reset_ignored++;
    if (status_a.pust_state == PUST_RETEST && status_a.pust_state != dut.u_platform.u_core1.u_pust.state_d)
      n_rescan++;
    if (!fail_q[0] && status_a.pust_fail || !fail_q[1] && status_b.pust_fail) n_pust_fail++;
    if (!disc_q[0] && status_a.disc_fault || !disc_q[1] && status_b.disc_fault) n_disc++;
    if (!chan_q[0] && status_a.chan_fault || !chan_q[1] && status_b.chan_fault) n_chan++;
    if (!fb_q[0] && status_a.fb_fault || !fb_q[1] && status_b.fb_fault) n_fb++;
    if (!ns_q && nonsafe_removal_o) n_nonsafe++;
    reset_q = reset_i; sto_q = safe_sto_o; ns_q = nonsafe_removal_o;
    fail_q = {status_b.pust_fail, status_a.pust_fail};
    disc_q = {status_b.disc_fault, status_a.disc_fault};
    chan_q = {status_b.chan_fault, status_a.chan_fault};
    fb_q   = {status_b.fb_fault, status_a.fb_fault};
  end

  task automatic cycles(input int n); repeat (n) @(negedge clk); endtask
  task automatic press_reset(input int n); reset_i = 1'b1; cycles(n); reset_i = 1'b0; endtask

  // Start from any state: repair, release the e-stop, reset until running.
  task automatic restart();
    comp_ok_a = '1; comp_ok_b = '1; estop_i = 1'b0;
    for (int i = 0; i < 4 && safe_sto_o; i++) begin
      cycles(SY + 2); press_reset(MP + SY); cycles(SY + N + 6);
    end
    check("platform restarts", safe_sto_o, 1'b0);
  endtask

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
    else $display("mechanism %-28s seen %0d times", what, n);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cycles(2);
    rst_n = 1'b1;
    cycles(N + SY + 4);
    check("STO at power-on", safe_sto_o, 1'b1);
    restart();
    // Random episodes.
    repeat (300) begin
      int k;
      k = $urandom_range(0, 9);
      if (k < 5) begin            // emergency stop, sometimes with a reset
        estop_i = 1'b1; cycles($urandom_range(1, 12));
        if (k == 0) press_reset($urandom_range(1, 4));
        cycles($urandom_range(0, 5));
        estop_i = 1'b0; cycles($urandom_range(1, 6));
      end else if (k < 8) begin   // reset press, possibly too short
        press_reset($urandom_range(1, 5)); cycles($urandom_range(1, SY + N + 6));
      end else if (k == 8) begin  // component failure in one core
        if ($urandom_range(0, 1)) comp_ok_a[$urandom_range(0, N-1)] = 1'b0;
        else                      comp_ok_b[$urandom_range(0, N-1)] = 1'b0;
        estop_i = 1'b1; cycles(SY + 2); estop_i = 1'b0; cycles(SY + 1);
        press_reset(MP + SY); cycles(SY + N + DC + 8);
        check("single-core failure ends in STO", safe_sto_o, 1'b1);
        restart();
      end else begin
        restart();
        cycles($urandom_range(1, 20));
      end
    end
    restart();
    // Invalid word on the channel from core 2 to core 1.
    tamper = 1;
    force dut.u_platform.ch_ba = '{sto: 1'b1, sto_n: 1'b1};
    cycles(DC + 6);
    release dut.u_platform.ch_ba;
    cycles(1);
    tamper = 0;
    check("channel fault ends in STO", safe_sto_o, 1'b1);
    restart();
    // The drive does not remove the torque.
    drive_broken = 1;
    estop_i = 1'b1; cycles(SY + 3 + FT + 3); estop_i = 1'b0;
    check("torque feedback fault", status_a.fb_fault & status_b.fb_fault, 1'b1);
    drive_broken = 0;
    restart();
    // Redundant output A stuck low during an emergency stop.
    // A stuck output breaks the platform's lock-step rule on purpose.
    $assertoff;
    tamper = 1;
    force dut.red_out_a = 1'b0;
    estop_i = 1'b1; cycles(SY + 3 + NS + 3);
    check("non-safe removal on stuck output", nonsafe_removal_o, 1'b1);
    release dut.red_out_a;
    estop_i = 1'b0; cycles(2);
    tamper = 0;
    $asserton;
    need("e-stop gives safe STO", n_estop_sto);
    need("restart after reset", n_restart);
    need("reset pulse", n_reset_pulse);
    need("reset ignored during e-stop", n_reset_ignored);
    need("self test re-scan", n_rescan);
    need("self test failure", n_pust_fail);
    need("discrepancy fault", n_disc);
    need("channel fault", n_chan);
    need("torque feedback fault", n_fb);
    need("non-safe removal", n_nonsafe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
