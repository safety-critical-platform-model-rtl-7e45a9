// tb_sto_interpreter: self-checking test of sto_interpreter.
//
// Safe STO follows red_a & red_b one cycle later; a disagreement of
// NS_CYCLES cycles sets the non-safe removal flag, a shorter one does
// not, and the flag stays set. Random part against a model.
module tb_sto_interpreter;

  localparam int NS = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic red_a = 1'b0, red_b = 1'b0;
  logic safe_sto, nonsafe_removal;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sto_interpreter #(.NS_CYCLES(NS)) dut (.*);

  bit m_sto = 1, m_ns = 0;
  int m_cnt = 0;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin m_sto = 1; m_ns = 0; m_cnt = 0; end
    else begin
      if (m_cnt >= NS) m_ns = 1;
      m_cnt = (red_a == red_b) ? 0 : (m_cnt < NS ? m_cnt + 1 : NS);
      m_sto = red_a && red_b;
    end
  end

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic tick();
    @(negedge clk);
    check("safe_sto vs model", safe_sto, m_sto);
    check("nonsafe vs model", nonsafe_removal, m_ns);
  endtask

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
    check("STO at power-on", safe_sto, 1'b1);
    tick();
    check("released", safe_sto, 1'b0);
    red_a = 1'b1; tick();
    check("one output is not enough", safe_sto, 1'b0);
    red_b = 1'b1; tick();
    check("both outputs give STO", safe_sto, 1'b1);
    red_a = 1'b0; red_b = 1'b0; tick();
    red_a = 1'b1; repeat (NS - 1) tick(); red_a = 1'b0; repeat (3) tick();
    check("short disagreement tolerated", nonsafe_removal, 1'b0);
    red_b = 1'b1; repeat (NS + 2) tick(); red_b = 1'b0; tick();
    check("long disagreement flagged", nonsafe_removal, 1'b1);
    repeat (4) tick();
    check("flag held", nonsafe_removal, 1'b1);
    rst_n = 1'b0; #1; rst_n = 1'b1;
    repeat (3000) begin
      if ($urandom_range(0, 3) == 0) red_a = ~red_a;
      if ($urandom_range(0, 3) == 0) red_b = ~red_b;
      if ($urandom_range(0, 199) == 0) begin rst_n = 1'b0; #1; rst_n = 1'b1; end
      tick();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
