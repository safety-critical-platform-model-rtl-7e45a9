// sync2: multi-flop synchroniser for an asynchronous push-button input.
//
// The input passes through STAGES flip-flops clocked by clk; the output is
// the last stage, so it lags the input by STAGES cycles. On reset the chain
// loads RESET_VAL. Input conditioning is not part of the original platform
// description; it is added here because the buttons are asynchronous to the
// core clock.
module sync2 #(
  parameter int unsigned STAGES    = 2,
  parameter logic        RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chain <= {STAGES{RESET_VAL}};
    else        chain <= {chain[STAGES-2:0], d};
  end

  assign q = chain[STAGES-1];

endmodule
