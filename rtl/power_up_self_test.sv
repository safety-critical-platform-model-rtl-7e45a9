// power_up_self_test: power-on check of the system components of one core.
//
// After rst_n is released the module scans the N_COMP component health flags
// comp_ok, one flag per clock cycle (PUST_TEST, N_COMP cycles). If every flag
// was 1 it waits in PUST_WAIT_RESET for the first reset pulse from the reset
// module and then raises `ready`. A 0 flag sends it to PUST_FAIL (`fail` = 1),
// which only a reset pulse leaves, by re-running the scan.
//
// While ready, the module keeps watching the core's safety function: when
// sto_active rises it drops `ready` and waits (PUST_ARMED) for the next reset
// pulse, then re-runs the scan (PUST_RETEST) and returns straight to ready if
// it passes. This way the core leaves the safe state only through a reset and
// a fresh component check.
//
// Following the platform description: a check at power-on, a wait for a
// hardware reset, and staying active until the safety function fires so as to
// take part in the full reset. This design's choices: the one-flag-per-cycle
// scan, the reset button pulse as the "hardware reset", and the single-press
// restart after an STO.
module power_up_self_test
  import safety_pkg::*;
#(
  parameter int unsigned N_COMP = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_COMP-1:0] comp_ok,     // 1 = component available and correct
  input  logic              sys_reset,   // one-cycle reset pulse
  input  logic              sto_active,  // safety function activated
  output logic              ready,
  output logic              fail,
  output pust_state_t       state
);

  localparam int unsigned IW = (N_COMP > 1) ? $clog2(N_COMP) : 1;

  pust_state_t       state_q, state_d;
  logic [IW-1:0]     idx_q, idx_d;
  logic              bad_q, bad_d;   // a flag was 0 during this scan
  logic              scanning;
  logic              last;

  assign scanning = (state_q == PUST_TEST) || (state_q == PUST_RETEST);
  assign last     = (idx_q == IW'(N_COMP - 1));

  always_comb begin
    state_d = state_q;
    idx_d   = idx_q;
    bad_d   = bad_q;
    if (scanning) begin
      bad_d = bad_q | ~comp_ok[idx_q];
      idx_d = last ? '0 : idx_q + 1'b1;
      if (last) begin
        if (bad_d)                     state_d = PUST_FAIL;
        else if (state_q == PUST_TEST) state_d = PUST_WAIT_RESET;
        else                           state_d = PUST_READY;
      end
    end else begin
      unique case (state_q)
        PUST_WAIT_RESET: if (sys_reset)  state_d = PUST_READY;
        PUST_READY:      if (sto_active) state_d = PUST_ARMED;
        PUST_ARMED:      if (sys_reset)  state_d = PUST_RETEST;
        PUST_FAIL:       if (sys_reset)  state_d = PUST_TEST;
        default:                         state_d = PUST_FAIL;
      endcase
      idx_d = '0;
      bad_d = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= PUST_TEST;
      idx_q   <= '0;
      bad_q   <= 1'b0;
    end else begin
      state_q <= state_d;
      idx_q   <= idx_d;
      bad_q   <= bad_d;
    end
  end

  assign ready = (state_q == PUST_READY);
  assign fail  = (state_q == PUST_FAIL);
  assign state = state_q;

endmodule
