// sto_interpreter: evaluates the two redundant outputs of the platform.
//
// safe_sto is registered red_a & red_b: the Safe Torque Off command goes to
// the drive when both redundant outputs call for it. If the two outputs
// disagree for NS_CYCLES consecutive cycles, nonsafe_removal is set (one cycle
// later)
// and held until rst_n: the torque is then removed by the non-safe path,
// because one of the cores can no longer be trusted. Both outputs lag their
// cause by one cycle.
//
// The AND of both outputs follows the platform description; the disagreement
// timer and the meaning given to the non-safe removal are this design's.
module sto_interpreter #(
  parameter int unsigned NS_CYCLES = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic red_a,
  input  logic red_b,
  output logic safe_sto,
  output logic nonsafe_removal
);

  localparam int unsigned CW = $clog2(NS_CYCLES + 1);

  logic [CW-1:0] cnt_q;
  logic          sto_q, ns_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sto_q <= 1'b1;
      ns_q  <= 1'b0;
      cnt_q <= '0;
    end else begin
      sto_q <= red_a & red_b;
      if (red_a == red_b)              cnt_q <= '0;
      else if (cnt_q != CW'(NS_CYCLES)) cnt_q <= cnt_q + 1'b1;
      if (cnt_q == CW'(NS_CYCLES))     ns_q  <= 1'b1;
    end
  end

  assign safe_sto        = sto_q;
  assign nonsafe_removal = ns_q;

endmodule
