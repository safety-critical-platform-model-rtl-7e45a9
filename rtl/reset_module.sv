// reset_module: status machine that launches the core's reset function.
//
// A press of the (synchronised) reset button is honoured on its release: if
// the button was held for at least MIN_PRESS cycles and the emergency stop is
// not pressed at that moment, sys_reset is high for exactly one cycle
// (RST_PULSE), one cycle after the release is seen. A press that starts while
// the emergency stop is held, or a release while it is held, is ignored
// (RST_BLOCKED until the button is let go). A press shorter than MIN_PRESS is
// treated as a glitch. An assertion checks that the pulse lasts one cycle.
//
// The platform description gives only that this module is a status machine
// that triggers the reset depending on the state of the system; the
// release-edge rule, MIN_PRESS and the e-stop interlock are this design's.
module reset_module
  import safety_pkg::*;
#(
  parameter int unsigned MIN_PRESS = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       reset_btn,  // synchronised, 1 = pressed
  input  logic       estop,      // synchronised, 1 = pressed
  output logic       sys_reset,  // one-cycle pulse
  output rst_state_t state
);

  localparam int unsigned CW = $clog2(MIN_PRESS + 1);

  rst_state_t    state_q, state_d;
  logic [CW-1:0] cnt_q, cnt_d;

  always_comb begin
    state_d = state_q;
    cnt_d   = cnt_q;
    unique case (state_q)
      RST_IDLE: begin
        cnt_d = '0;
        if (reset_btn) begin
          state_d = estop ? RST_BLOCKED : RST_PRESSED;
          cnt_d   = CW'(1);
        end
      end
      RST_PRESSED: begin
        if (estop) begin
          state_d = RST_BLOCKED;
        end else if (reset_btn) begin
          if (cnt_q < CW'(MIN_PRESS)) cnt_d = cnt_q + 1'b1;
        end else begin
          state_d = (cnt_q >= CW'(MIN_PRESS)) ? RST_PULSE : RST_IDLE;
        end
      end
      RST_PULSE:   state_d = reset_btn ? RST_BLOCKED : RST_IDLE;
      RST_BLOCKED: if (!reset_btn) state_d = RST_IDLE;
      default:     state_d = RST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= RST_IDLE;
      cnt_q   <= '0;
    end else begin
      state_q <= state_d;
      cnt_q   <= cnt_d;
    end
  end

  assign sys_reset = (state_q == RST_PULSE);
  assign state     = state_q;

  // The reset function is a single-cycle pulse.
  a_one_cycle_pulse: assert property (@(posedge clk)
    sys_reset |=> !sys_reset);

endmodule
