// safety_pkg: types shared by the two-core safety platform.
//
// chan_word_t is the word one core sends to the other over the 1oo2 safe
// channel: the STO status and its complement, so that a stuck or shorted line
// is seen as an invalid word. core_status_t gathers the per-core status flags
// brought out of the platform. The two state types belong to the power up
// self test and to the reset status machine. The encodings are this design's
// own choice.
package safety_pkg;

  typedef struct packed {
    logic sto;    // 1 = this core calls for Safe Torque Off
    logic sto_n;  // complement of sto
  } chan_word_t;

  typedef enum logic [2:0] {
    PUST_TEST       = 3'd0,  // scanning the component flags
    PUST_WAIT_RESET = 3'd1,  // passed, waiting for the first reset
    PUST_READY      = 3'd2,  // core may release STO
    PUST_ARMED      = 3'd3,  // safety function active, waiting for reset
    PUST_RETEST     = 3'd4,  // re-check after a reset that follows an STO
    PUST_FAIL       = 3'd5   // a component failed the check
  } pust_state_t;

  typedef enum logic [1:0] {
    RST_IDLE    = 2'd0,  // button released
    RST_PRESSED = 2'd1,  // button held, counting
    RST_PULSE   = 2'd2,  // one-cycle reset pulse
    RST_BLOCKED = 2'd3   // pressed while e-stop held: ignored until release
  } rst_state_t;

  typedef struct packed {
    pust_state_t pust_state;  // power up self test FSM state
    rst_state_t  rst_state;   // reset status machine state
    logic pust_ready;  // power up self test passed and reset seen
    logic pust_fail;   // power up self test failed
    logic local_sto;   // this core's STO diagnosis
    logic ext_sto;     // STO diagnosis received from the other core
    logic chan_fault;  // safe channel word invalid (sticky)
    logic disc_fault;  // local/external disagreement too long (sticky)
    logic fb_fault;    // torque not removed in time (sticky)
  } core_status_t;

  // Encode a status bit as a channel word.
  function automatic chan_word_t chan_encode(input logic sto);
    return '{sto: sto, sto_n: ~sto};
  endfunction

  // A word is valid when its two bits differ.
  function automatic logic chan_valid(input chan_word_t w);
    return w.sto ^ w.sto_n;
  endfunction

endpackage
