// tb_case_study: the emergency stop / reset scenario of the motor drive case
// study, run on the add-on at its default parameters.
//
// Three episodes, each: the machine runs, the emergency stop is pressed, the
// reset button is pressed while the stop is still held (and must be
// ignored), the stop is released, the reset button is pressed and released,
// and the machine runs again. The point under test is the lock-step of the
// two cores: in every cycle the local STO status of core 1 equals the STO
// status core 2 receives from it (and the other way round), and the two
// redundant outputs are equal, so they rise and fall in the same cycle. The
// testbench also checks the response time (e-stop edge to Safe STO
// command: SYNC_STAGES + 2 cycles) and that STO is only withdrawn after the
// reset.
module tb_case_study;
  import safety_pkg::*;

  localparam int N = 4, SY = 2, MP = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic estop_i = 1'b0, reset_i = 1'b0, torque_off_fb;
  logic [N-1:0] comp_ok_a = '1, comp_ok_b = '1;
  logic safe_sto_o, nonsafe_removal_o, red_out_a, red_out_b;
  core_status_t status_a, status_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  safety_addon dut (.*);

  assign torque_off_fb = safe_sto_o;  // ideal drive

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  int rises_a = 0, rises_b = 0;
  logic ra_q = 1'b1, rb_q = 1'b1;
  always @(negedge clk) if (rst_n) begin
    check("core 1 local = core 2 external", status_a.local_sto, status_b.ext_sto);
    check("core 2 local = core 1 external", status_b.local_sto, status_a.ext_sto);
    check("redundant outputs in step", red_out_a, red_out_b);
    if (!ra_q && red_out_a) rises_a++;
    if (!rb_q && red_out_b) rises_b++;
    ra_q = red_out_a; rb_q = red_out_b;
  end

  task automatic cycles(input int n); repeat (n) @(negedge clk); endtask
  task automatic press_reset(); reset_i = 1'b1; cycles(MP + 2); reset_i = 1'b0; endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n;
  initial begin
    cycles(2);
    rst_n = 1'b1;
    cycles(N + SY + 4);
    press_reset();
    cycles(SY + 5);
    check("running after start-up reset", safe_sto_o, 1'b0);
    for (int ep = 0; ep < 3; ep++) begin
      cycles(10 + 5 * ep);
      estop_i = 1'b1;
      n = 0;
      while (!safe_sto_o && n < 20) begin cycles(1); n++; end
      checks++;
      if (n != SY + 2) begin failures++; $display("FAIL response time %0d cycles", n); end
      cycles(3);
      press_reset();                 // ignored: stop still held
      cycles(SY + N + 4);
      check("reset during stop ignored", safe_sto_o, 1'b1);
      estop_i = 1'b0;
      cycles(8);
      check("STO held after stop release", safe_sto_o, 1'b1);
      press_reset();
      cycles(SY + N + 6);
      check("running after reset", safe_sto_o, 1'b0);
    end
    checks++;
    if (rises_a != 3 || rises_b != 3) begin
      failures++;
      $display("FAIL redundant output activations: %0d and %0d", rises_a, rises_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
