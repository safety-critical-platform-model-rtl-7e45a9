// tb_safe_channel_1oo2: self-checking test of safe_channel_1oo2.
//
// Checks the transmit encoding for both values, the decode of all four
// received words (invalid words read as STO), the zero-cycle path from rx to
// ext_sto, and the sticky fault: set by an invalid word, kept after the word
// recovers, cleared only by a reset pulse while the word is valid. Ends with
// 2000 random cycles against a model.
module tb_safe_channel_1oo2;
  import safety_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic sys_reset = 1'b0, local_sto = 1'b0;
  chan_word_t rx, tx;
  logic ext_sto, chan_fault;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  safe_channel_1oo2 dut (.*);

  bit m_sticky = 0;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) m_sticky = 0;
    else if (rx.sto == rx.sto_n) m_sticky = 1;
    else if (sys_reset) m_sticky = 0;
  end

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic cmp();
    check("tx.sto", tx.sto, local_sto);
    check("tx.sto_n", tx.sto_n, ~local_sto);
    check("ext_sto", ext_sto, (rx.sto == rx.sto_n) ? 1'b1 : rx.sto);
    check("chan_fault", chan_fault, m_sticky || (rx.sto == rx.sto_n));
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rx = '{sto: 1'b0, sto_n: 1'b1};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Combinational paths: change inputs, look after a delta, no clock.
    for (int i = 0; i < 8; i++) begin
      local_sto = i[2];
      rx = chan_word_t'(i[1:0]);
      #1 cmp();
    end
    @(negedge clk);
    rx = '{sto: 1'b1, sto_n: 1'b0};
    #1 check("valid STO word read as 1", ext_sto, 1'b1);
    check("no fault on valid word", chan_fault, 1'b0);
    rx = '{sto: 1'b0, sto_n: 1'b1};
    #1 check("valid release word read as 0", ext_sto, 1'b0);
    @(negedge clk);
    rx = '{sto: 1'b0, sto_n: 1'b0};
    #1 check("stuck-at-0 pair reads as STO", ext_sto, 1'b1);
    @(negedge clk);
    rx = '{sto: 1'b0, sto_n: 1'b1};
    #1 check("fault sticky after recovery", chan_fault, 1'b1);
    check("value usable after recovery", ext_sto, 1'b0);
    repeat (3) @(negedge clk);
    check("fault still sticky", chan_fault, 1'b1);
    sys_reset = 1'b1; @(negedge clk); sys_reset = 1'b0;
    check("fault cleared by reset", chan_fault, 1'b0);
    repeat (2000) begin
      local_sto = 1'($urandom);
      rx = ($urandom_range(0, 9) == 0) ? chan_word_t'($urandom) : chan_encode(1'($urandom));
      sys_reset = ($urandom_range(0, 7) == 0);
      #1 cmp();
      @(negedge clk);
      cmp();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
