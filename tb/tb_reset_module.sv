// tb_reset_module: self-checking test of reset_module.
//
// Directed part: a long press gives exactly one pulse, in the cycle after
// the release is sampled; a short press, a press during an emergency stop
// and a release during an emergency stop give none. Random part: 4000 cycles
// against a reference model of the release-edge rule.
module tb_reset_module;
  import safety_pkg::*;

  localparam int MP = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic reset_btn = 1'b0, estop = 1'b0;
  logic sys_reset;
  rst_state_t state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  reset_module #(.MIN_PRESS(MP)) dut (.*);

  // Reference model: held = cycles the current press has lasted,
  // blocked = the current press is void, pulse = output.
  int held = 0;
  bit blocked = 0, pulse = 0, pressed = 0;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held = 0; blocked = 0; pulse = 0; pressed = 0;
    end else if (pulse) begin
      pulse = 0;
      if (reset_btn) begin pressed = 1; blocked = 1; end
      else pressed = 0;
    end else if (!pressed) begin
      if (reset_btn) begin pressed = 1; held = 1; blocked = estop; end
    end else if (blocked) begin
      if (!reset_btn) pressed = 0;
    end else if (estop) begin
      blocked = 1;
    end else if (reset_btn) begin
      held++;
    end else begin
      pressed = 0;
      pulse = (held >= MP);
    end
  end

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  int npulse;
  task automatic tick(); @(negedge clk); check("sys_reset vs model", sys_reset, pulse);
    if (sys_reset) npulse++; endtask

  task automatic press(input int n); reset_btn = 1'b1; repeat (n) tick(); reset_btn = 1'b0; endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    tick();
    npulse = 0;
    press(MP + 2);
    check("no pulse while held", sys_reset, 1'b0);
    tick();
    check("pulse one cycle after release", sys_reset, 1'b1);
    tick();
    check("pulse lasts one cycle", sys_reset, 1'b0);
    repeat (5) tick();
    check("exactly one pulse", npulse == 1, 1'b1);
    npulse = 0;
    press(1); repeat (6) tick();
    check("short press ignored", npulse == 0, 1'b1);
    estop = 1'b1; press(MP + 2); repeat (4) tick(); estop = 1'b0;
    check("press during e-stop ignored", npulse == 0, 1'b1);
    reset_btn = 1'b1; repeat (MP + 1) tick(); estop = 1'b1; tick(); reset_btn = 1'b0;
    repeat (4) tick(); estop = 1'b0; repeat (3) tick();
    check("release during e-stop ignored", npulse == 0, 1'b1);
    repeat (4000) begin
      if ($urandom_range(0, 5) == 0) reset_btn = ~reset_btn;
      if ($urandom_range(0, 30) == 0) estop = ~estop;
      tick();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
