// tb_power_up_self_test: self-checking test of power_up_self_test.
//
// Directed part: power-on scan timing (N_COMP cycles), no ready without a
// reset pulse, ready one cycle after the pulse, drop of ready on an STO, the
// re-scan after the next reset (ready N_COMP + 1 cycles after the pulse), and
// a failed component. Random part: 3000 cycles of random stimulus compared
// every cycle with a cycle-level reference model kept in this testbench.
// Inputs change on the falling clock edge; outputs are compared there too.
module tb_power_up_self_test;
  import safety_pkg::*;

  localparam int N = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [N-1:0] comp_ok = '1;
  logic sys_reset = 1'b0, sto_active = 1'b0;
  logic ready, fail;
  pust_state_t state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  power_up_self_test #(.N_COMP(N)) dut (.*);

  // Reference model: mode 0 scan after power-on, 1 wait reset, 2 ready,
  // 3 armed, 4 re-scan, 5 failed.
  int m_mode = 0, m_cnt = 0;
  bit m_bad = 0;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_mode = 0; m_cnt = 0; m_bad = 0;
    end else begin
      case (m_mode)
        0, 4: begin
          if (!comp_ok[m_cnt]) m_bad = 1;
          if (m_cnt == N - 1) begin
            m_mode = m_bad ? 5 : (m_mode == 0 ? 1 : 2);
            m_cnt = 0; m_bad = 0;
          end else m_cnt++;
        end
        1: if (sys_reset) m_mode = 2;
        2: if (sto_active) m_mode = 3;
        3: if (sys_reset) m_mode = 4;
        5: if (sys_reset) m_mode = 0;
        default: ;
      endcase
    end
  end

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic cmp_model();
    check("ready vs model", ready, m_mode == 2);
    check("fail vs model", fail, m_mode == 5);
  endtask

  task automatic tick(); @(negedge clk); cmp_model(); endtask

  task automatic pulse_reset(); sys_reset = 1'b1; tick(); sys_reset = 1'b0; endtask

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
    // Power-on scan: N cycles, then waiting for reset, no ready on its own.
    repeat (N) tick();
    check("scan done -> wait reset", state == PUST_WAIT_RESET, 1'b1);
    repeat (10) tick();
    check("no ready without reset", ready, 1'b0);
    pulse_reset();
    check("ready right after reset pulse", ready, 1'b1);
    // STO drops ready, only a reset re-arms it, after N + 1 cycles.
    sto_active = 1'b1; tick(); sto_active = 1'b0;
    check("ready dropped on STO", ready, 1'b0);
    repeat (8) tick();
    check("still not ready", ready, 1'b0);
    pulse_reset();
    repeat (N - 1) begin tick(); check("re-scan not ready yet", ready, 1'b0); end
    tick();
    check("ready after re-scan", ready, 1'b1);
    // A failed component during the next re-scan.
    sto_active = 1'b1; tick(); sto_active = 1'b0;
    pulse_reset();
    comp_ok[2] = 1'b0;
    repeat (N) tick();
    comp_ok = '1;
    check("fail after bad component", fail, 1'b1);
    repeat (5) tick();
    check("fail is held", fail, 1'b1);
    pulse_reset();
    repeat (N) tick();
    check("after fail: rescan then wait reset", state == PUST_WAIT_RESET, 1'b1);
    // Random stimulus against the model.
    repeat (3000) begin
      comp_ok    = ($urandom_range(0, 19) == 0) ? N'($urandom) : '1;
      sys_reset  = ($urandom_range(0, 9) == 0);
      sto_active = ($urandom_range(0, 14) == 0);
      tick();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
