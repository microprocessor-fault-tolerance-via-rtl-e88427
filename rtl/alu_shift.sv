// alu_shift: the ALU/shifter of the Execute stage, written as a stand-alone
// unit with the minimal interface needed to reproduce the stage's function.
//
// The same module is used three times in the design: as the internal ALU of
// the Execute stage, as the second copy inside the concurrent error checker,
// and as the hardware spare unit that is loaded into the reconfigurable area
// after a permanent fault. It is purely combinational.
//
// Operations (as in the published design): AND, NAND, OR, NOR, XOR, XNOR, ADD, SUB and
// shifts. The shift kinds (logical left, logical right, arithmetic right,
// amount in b[4:0]), the operation encoding and the SPARC-style condition
// codes (N, Z, V, C; V and C are zero for logic and shift operations) are
// this design's choices.
module alu_shift
  import ft_pkg::*;
#(
  parameter int unsigned W = XLEN
) (
  input  alu_op_e        op,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [W-1:0]   result,
  output icc_t           icc
);

  localparam int unsigned SHW = $clog2(W);

  logic [W:0]     sum;
  logic [SHW-1:0] shamt;
  logic           is_add, is_sub;

  assign shamt  = b[SHW-1:0];
  assign is_add = (op == ALU_ADD);
  assign is_sub = (op == ALU_SUB);

  always_comb begin
    sum = '0;
    if (is_sub) sum = {1'b0, a} + {1'b0, ~b} + {{W{1'b0}}, 1'b1};
    else        sum = {1'b0, a} + {1'b0, b};
  end

  always_comb begin
    unique case (op)
      ALU_AND:  result = a & b;
      ALU_NAND: result = ~(a & b);
      ALU_OR:   result = a | b;
      ALU_NOR:  result = ~(a | b);
      ALU_XOR:  result = a ^ b;
      ALU_XNOR: result = ~(a ^ b);
      ALU_ADD,
      ALU_SUB:  result = sum[W-1:0];
      ALU_SLL:  result = a << shamt;
      ALU_SRL:  result = a >> shamt;
      ALU_SRA:  result = W'($signed(a) >>> shamt);
      default:  result = '0;
    endcase
  end

  always_comb begin
    icc.n = result[W-1];
    icc.z = (result == '0);
    icc.v = 1'b0;
    icc.c = 1'b0;
    if (is_add) begin
      icc.v = (a[W-1] == b[W-1]) && (result[W-1] != a[W-1]);
      icc.c = sum[W];
    end else if (is_sub) begin
      icc.v = (a[W-1] != b[W-1]) && (result[W-1] != a[W-1]);
      icc.c = ~sum[W];            // borrow
    end
  end

endmodule
