// diagnostics: run-time diagnosis of one core and its redundant output.
//
// local_sto is a register that calls for Safe Torque Off whenever the
// emergency stop is pressed, the power up self test is not ready (power-on,
// failed check, or waiting for a reset after an STO), the safe channel reports
// a fault, or one of the two latched diagnostic faults is set:
//   disc_fault - local_sto and the STO status received from the other core
//                (ext_sto) have disagreed for DISC_CYCLES consecutive cycles;
//   fb_fault   - the redundant output has been high for FB_TIMEOUT
//                consecutive cycles while the torque feedback says torque on.
// Each flag rises one cycle after the last cycle of its count.
// Both faults are cleared by the reset pulse. sto_trip (combinational) is
// the OR of the causes other than the self test: it tells the self test that
// the safety function has been activated, without feeding back the STO the
// self test itself asks for while it is not ready.
//
// The redundant output is red_out = local_sto & ext_sto: it is generated
// only when the local and the external diagnosis agree that STO is needed.
// Since both cores register local_sto on the same clock edge and the channel
// is combinational, the two redundant outputs change in the same cycle. The
// STO request takes one cycle from estop to local_sto.
//
// The AND of local and external status follows the platform description.
// The request sources, the discrepancy timer that makes a single-core
// diagnosis win in the end (fail-safe), and the torque feedback check are
// this design's.
module diagnostics #(
  parameter int unsigned DISC_CYCLES = 4,
  parameter int unsigned FB_TIMEOUT  = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic estop,          // synchronised, 1 = pressed
  input  logic sys_reset,      // one-cycle reset pulse
  input  logic pust_ready,
  input  logic ext_sto,
  input  logic chan_fault,
  input  logic torque_off_fb,  // 1 = torque removed
  output logic local_sto,
  output logic sto_trip,       // a cause other than the self test calls STO
  output logic red_out,
  output logic disc_fault,
  output logic fb_fault
);

  localparam int unsigned DW = $clog2(DISC_CYCLES + 1);
  localparam int unsigned FW = $clog2(FB_TIMEOUT + 1);

  logic          sto_q;
  logic [DW-1:0] disc_cnt_q;
  logic [FW-1:0] fb_cnt_q;
  logic          disc_q, fb_q;
  logic          sto_req;

  assign sto_trip = estop | chan_fault | disc_q | fb_q;
  assign sto_req  = sto_trip | ~pust_ready;
  assign red_out = sto_q & ext_sto;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sto_q      <= 1'b1;   // safe state until the platform is started
      disc_cnt_q <= '0;
      fb_cnt_q   <= '0;
      disc_q     <= 1'b0;
      fb_q       <= 1'b0;
    end else begin
      sto_q <= sto_req;

      if (sto_q == ext_sto)                disc_cnt_q <= '0;
      else if (disc_cnt_q != DW'(DISC_CYCLES)) disc_cnt_q <= disc_cnt_q + 1'b1;

      if (!red_out || torque_off_fb)       fb_cnt_q <= '0;
      else if (fb_cnt_q != FW'(FB_TIMEOUT)) fb_cnt_q <= fb_cnt_q + 1'b1;

      if (sys_reset) begin
        disc_q <= 1'b0;
        fb_q   <= 1'b0;
      end else begin
        if (disc_cnt_q == DW'(DISC_CYCLES)) disc_q <= 1'b1;
        if (fb_cnt_q == FW'(FB_TIMEOUT))    fb_q   <= 1'b1;
      end
    end
  end

  assign local_sto  = sto_q;
  assign disc_fault = disc_q;
  assign fb_fault   = fb_q;

endmodule
