// ext_alu_rm: the hardware spare ALU as a reconfigurable module. It wraps the
// ALU/shifter with the port list shared by all modules of the reconfigurable
// area (ra_in_t / ra_out_t): the ALU half of the interface computes, the APB
// half is ignored and its outputs read as zero. Combinational: the result is
// valid in the same cycle as the operands, like the internal ALU it replaces.
// As in the published design, the spare unit carries no error checking of its
// own.
module ext_alu_rm
  import ft_pkg::*;
(
  input  ra_in_t  ra_i,
  output ra_out_t ra_o
);

  logic [XLEN-1:0] result;
  icc_t            icc;

  alu_shift #(.W(XLEN)) u_alu (
    .op     (ra_i.alu_op),
    .a      (ra_i.alu_a),
    .b      (ra_i.alu_b),
    .result (result),
    .icc    (icc)
  );

  always_comb begin
    ra_o            = '0;
    ra_o.alu_result = result;
    ra_o.alu_icc    = icc;
  end

endmodule
