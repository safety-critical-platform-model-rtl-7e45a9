// safe_channel_1oo2: one end of the safe link between the two cores.
//
// Transmit side: the local STO status is sent as a chan_word_t, the bit and
// its complement. Receive side: the word from the other core is checked; a
// valid word (the two bits differ) gives ext_sto = rx.sto, an invalid one
// gives ext_sto = 1, so a broken link calls for Safe Torque Off. An invalid
// word also sets a sticky fault flag; chan_fault is high while the word is
// invalid and afterwards until a reset pulse arrives with the word valid.
//
// Timing: tx and ext_sto are combinational (no register in the data path),
// so the diagnosis of one core reaches the other in the same cycle. Only the
// sticky flag is a register. tx.sto is local_sto itself and tx.sto_n its
// inverse: the encoding needs no logic beyond one inverter.
//
// Following the description: two channels in parallel whose data meet in a
// common diagnosis (the 1oo2 arrangement), with no delay between the cores.
// The complement encoding and the fail-safe reading of a bad word are this
// design's.
module safe_channel_1oo2
  import safety_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sys_reset,   // clears the sticky fault
  input  logic       local_sto,   // value to send
  input  chan_word_t rx,          // word from the other core
  output chan_word_t tx,          // word to the other core
  output logic       ext_sto,     // STO status of the other core
  output logic       chan_fault
);

  logic rx_ok;
  logic sticky_q;

  assign tx      = chan_encode(local_sto);
  assign rx_ok   = chan_valid(rx);
  assign ext_sto = rx_ok ? rx.sto : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          sticky_q <= 1'b0;
    else if (!rx_ok)     sticky_q <= 1'b1;
    else if (sys_reset)  sticky_q <= 1'b0;
  end

  assign chan_fault = sticky_q | ~rx_ok;

endmodule
