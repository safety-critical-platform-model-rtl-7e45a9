// tb_safety_platform: self-checking test of the two-core safety_platform.
//
// Every cycle, while no channel is tampered with, the two redundant outputs
// must be equal (they change in the same cycle) and each must equal the AND
// of the two cores' local STO. Scenarios: start, emergency stop with its
// latency, a component failure in core 2 only (core 1 must follow to STO
// through the discrepancy check), and an invalid word forced on the channel
// from core 1 to core 2.
module tb_safety_platform;
  import safety_pkg::*;

  localparam int N = 4, SY = 2, MP = 2, DC = 4, FT = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic estop_i = 1'b0, reset_i = 1'b0, torque_off_fb = 1'b1;
  logic [N-1:0] comp_ok_a = '1, comp_ok_b = '1;
  logic red_out_a, red_out_b;
  core_status_t status_a, status_b;
  int checks = 0, failures = 0;
  bit tamper = 0;

  always #5 clk = ~clk;

  safety_platform #(.N_COMP(N), .SYNC_STAGES(SY), .MIN_PRESS(MP), .DISC_CYCLES(DC),
                    .FB_TIMEOUT(FT)) dut (.*);

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  always @(negedge clk) if (rst_n && !tamper) begin
    check("outputs equal", red_out_a, red_out_b);
    check("output = AND of local STOs", red_out_a, status_a.local_sto & status_b.local_sto);
  end

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
    check("STO at power-on", red_out_a, 1'b1);
    press_reset();
    repeat (SY + 4) @(negedge clk);
    check("released after reset", red_out_a, 1'b0);
    check("core 2 released too", red_out_b, 1'b0);
    estop_i = 1'b1;
    n = 0; while (!red_out_a && n < 20) begin @(negedge clk); n++; end
    checks++; if (n != SY + 1) begin failures++; $display("FAIL e-stop latency %0d", n); end
    estop_i = 1'b0; repeat (SY + 2) @(negedge clk);
    // Core 2 finds a bad component during the re-scan; core 1 does not.
    comp_ok_b[3] = 1'b0;
    press_reset();
    repeat (SY + N + 3) @(negedge clk);
    check("core 2 self test failed", status_b.pust_fail, 1'b1);
    check("core 1 self test passed", status_a.pust_ready, 1'b1);
    repeat (DC + 4) @(negedge clk);
    check("core 1 found the discrepancy", status_a.disc_fault, 1'b1);
    check("both outputs call STO", red_out_a & red_out_b, 1'b1);
    comp_ok_b = '1;
    press_reset(); repeat (SY + N + 4) @(negedge clk);
    press_reset(); repeat (SY + N + 4) @(negedge clk);
    check("both running after repair", !red_out_a && status_a.pust_ready && status_b.pust_ready, 1'b1);
    // Invalid word on the channel core 1 -> core 2.
    tamper = 1;
    force dut.ch_ab = '{sto: 1'b0, sto_n: 1'b0};
    @(negedge clk);
    check("core 2 channel fault", status_b.chan_fault, 1'b1);
    check("core 2 reads STO", status_b.ext_sto, 1'b1);
    repeat (DC + 4) @(negedge clk);
    check("core 1 follows to STO", status_a.local_sto, 1'b1);
    release dut.ch_ab;
    @(negedge clk);
    tamper = 0;
    check("both outputs call STO after channel fault", red_out_a & red_out_b, 1'b1);
    press_reset(); repeat (SY + N + 4) @(negedge clk);
    check("running after channel repaired", red_out_a | red_out_b | status_b.chan_fault, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
