// tb_diagnostics: self-checking test of diagnostics.
//
// Directed part: local STO one cycle after each request source (e-stop,
// self test not ready, channel fault), redundant output only when local and
// external STO agree, the discrepancy fault after DISC_CYCLES + 1 cycles of
// disagreement, the torque feedback fault after FB_TIMEOUT + 1 cycles, and
// clearing by the reset pulse. Random part: 5000 cycles against a reference
// model kept in this testbench.
module tb_diagnostics;

  localparam int DC = 4, FT = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic estop = 1'b0, sys_reset = 1'b0, pust_ready = 1'b0, ext_sto = 1'b1;
  logic chan_fault = 1'b0, torque_off_fb = 1'b1;
  logic local_sto, sto_trip, red_out, disc_fault, fb_fault;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  diagnostics #(.DISC_CYCLES(DC), .FB_TIMEOUT(FT)) dut (.*);

  // Reference model.
  bit m_sto = 1, m_disc = 0, m_fb = 0;
  int m_dcnt = 0, m_fcnt = 0;
  always @(posedge clk or negedge rst_n) begin
    bit red, req;
    if (!rst_n) begin
      m_sto = 1; m_disc = 0; m_fb = 0; m_dcnt = 0; m_fcnt = 0;
    end else begin
      red = m_sto && ext_sto;
      req = estop || !pust_ready || chan_fault || m_disc || m_fb;
      // Faults latch from the counts reached before this edge.
      if (sys_reset) begin m_disc = 0; m_fb = 0; end
      else begin
        if (m_dcnt >= DC) m_disc = 1;
        if (m_fcnt >= FT) m_fb = 1;
      end
      m_dcnt = (m_sto == ext_sto) ? 0 : (m_dcnt < DC ? m_dcnt + 1 : DC);
      m_fcnt = (!red || torque_off_fb) ? 0 : (m_fcnt < FT ? m_fcnt + 1 : FT);
      m_sto = req;
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
    check("local_sto vs model", local_sto, m_sto);
    check("red_out vs model", red_out, m_sto && ext_sto);
    check("disc_fault vs model", disc_fault, m_disc);
    check("sto_trip vs model", sto_trip, estop || chan_fault || m_disc || m_fb);
    check("fb_fault vs model", fb_fault, m_fb);
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check("STO at power-on", local_sto, 1'b1);
    tick();
    pust_ready = 1'b1; ext_sto = 1'b0; tick();
    check("STO released when ready", local_sto, 1'b0);
    check("no redundant output", red_out, 1'b0);
    // E-stop: local STO one cycle later; red_out waits for the external one.
    estop = 1'b1; tick();
    check("STO one cycle after e-stop", local_sto, 1'b1);
    check("red_out needs external STO", red_out, 1'b0);
    ext_sto = 1'b1; #1;
    check("red_out when both agree", red_out, 1'b1);
    tick();
    estop = 1'b0; ext_sto = 1'b0; repeat (2) tick();
    check("STO released after e-stop", local_sto, 1'b0);
    // Channel fault as a source.
    chan_fault = 1'b1; tick(); chan_fault = 1'b0;
    check("STO on channel fault", local_sto, 1'b1);
    repeat (2) tick();
    // Discrepancy: the other core calls STO, this one does not.
    ext_sto = 1'b1;
    repeat (DC) begin tick(); check("no disc fault yet", disc_fault, 1'b0); end
    tick();
    check("disc fault one cycle after DC cycles", disc_fault, 1'b1);
    tick();
    check("disc fault forces STO", local_sto, 1'b1);
    check("and the redundant output", red_out, 1'b1);
    ext_sto = 1'b1; sys_reset = 1'b1; tick(); sys_reset = 1'b0;
    check("reset clears disc fault", disc_fault, 1'b0);
    // Feedback: red_out high, torque never removed.
    estop = 1'b1; torque_off_fb = 1'b0;
    repeat (FT + 2) tick();
    check("fb fault after timeout", fb_fault, 1'b1);
    torque_off_fb = 1'b1; estop = 1'b0;
    sys_reset = 1'b1; tick(); sys_reset = 1'b0;
    check("reset clears fb fault", fb_fault, 1'b0);
    repeat (5000) begin
      estop         = ($urandom_range(0, 9) == 0);
      pust_ready    = ($urandom_range(0, 19) != 0);
      chan_fault    = ($urandom_range(0, 49) == 0);
      ext_sto       = ($urandom_range(0, 2) == 0) ? ~ext_sto : ext_sto;
      torque_off_fb = ($urandom_range(0, 3) != 0) ? torque_off_fb : ~torque_off_fb;
      sys_reset     = ($urandom_range(0, 29) == 0);
      tick();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
