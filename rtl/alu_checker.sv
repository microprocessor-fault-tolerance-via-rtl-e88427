// alu_checker: concurrent error detection for the Execute-stage ALU
// ("code prediction and checking logic").
//
// Instead of a hand-derived parity-prediction circuit, a second copy of the
// ALU computes the same operation and only its parity is kept: the parity of
// the main ALU's result and condition codes must equal the parity predicted by
// the copy. A synthesis tool strips the copy down to the logic that parity
// needs. Parity calculators on the inputs check each operand against the
// parity bit captured with it when it entered the Execute stage.
//
// Purely combinational: error is valid in the same cycle as the operands, so
// the pipeline can be frozen before the wrong result is registered.
// The published design gives the scheme (a second unit feeding a parity calculator,
// parity calculators on inputs and output); how the operand parity bits are
// produced and that all three checks are ORed into one error are this
// design's choices.
module alu_checker
  import ft_pkg::*;
#(
  parameter int unsigned W = XLEN
) (
  input  alu_op_e        op,
  input  logic [W-1:0]   a,
  input  logic           a_par,     // parity of a recorded when it was fetched
  input  logic [W-1:0]   b,
  input  logic           b_par,
  input  logic [W-1:0]   result,    // result of the ALU under check
  input  icc_t           icc,
  output logic           err_in,    // operand parity mismatch
  output logic           err_out,   // result parity mismatch
  output logic           error
);

  logic [W-1:0] pred_result;
  icc_t         pred_icc;

  alu_shift #(.W(W)) u_pred (
    .op     (op),
    .a      (a),
    .b      (b),
    .result (pred_result),
    .icc    (pred_icc)
  );

  assign err_in  = ((^a) != a_par) || ((^b) != b_par);
  assign err_out = (^{result, icc}) != (^{pred_result, pred_icc});
  assign error   = err_in || err_out;

endmodule
