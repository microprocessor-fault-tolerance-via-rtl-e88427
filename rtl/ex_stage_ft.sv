// ex_stage_ft: the Execute stage of the processor pipeline, modified so that
// its ALU can be replaced on the fly by a spare ALU in the reconfigurable area.
//
// Structure: an operand register (the Register Access / Execute pipeline
// register), the internal ALU/shifter, the concurrent error checker, a 2-way
// multiplexer between the internal ALU and the external spare ALU, and the
// result register (Execute / Memory pipeline register).
//
// * freeze disables both pipeline registers, so the ALU inputs stay constant
//   while an error is examined or the spare ALU is being configured; nothing
//   else is lost and no rollback is needed. Freeze acts as a register
//   enable while the clock keeps running; stopping the processor clock
//   instead would give the same behaviour but needs a clock gate.
// * The operands, the operation and the operand parity leave the stage on
//   alu_op_o/alu_a_o/alu_b_o for the reconfigurable area; the spare ALU's
//   result comes back on ext_result_i/ext_icc_i.
// * select_alu chooses the result: 1 = internal ALU, 0 = external ALU (the
//   numbering printed on the multiplexer in the published pipeline diagram).
// * error_o is combinational from the operand register, valid in the cycle
//   the operation is in the Execute stage.
//
// fault_mask_i is XORed onto the internal ALU's result. It is a fault
// injection point for verification (tie it to zero in a product), standing
// for a configuration-memory upset in the ALU logic.
// Timing: one operation per cycle when not frozen; a result appears on the
// mem_* outputs two clock edges after it was presented on the inputs.
module ex_stage_ft
  import ft_pkg::*;
#(
  parameter int unsigned W = XLEN
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           freeze,
  input  logic           select_alu,
  // from Register Access
  input  logic           valid_i,
  input  alu_op_e        op_i,
  input  logic [W-1:0]   a_i,
  input  logic [W-1:0]   b_i,
  // to / from the reconfigurable area
  output alu_op_e        alu_op_o,
  output logic [W-1:0]   alu_a_o,
  output logic [W-1:0]   alu_b_o,
  input  logic [W-1:0]   ext_result_i,
  input  icc_t           ext_icc_i,
  // fault injection on the internal ALU (verification only)
  input  logic [W-1:0]   fault_mask_i,
  // error detection
  output logic           error_o,
  output logic           ex_valid_o,
  // to Memory
  output logic           mem_valid_o,
  output logic [W-1:0]   mem_result_o,
  output icc_t           mem_icc_o
);

  typedef struct packed {
    logic          valid;
    alu_op_e       op;
    logic [W-1:0]  a;
    logic          a_par;
    logic [W-1:0]  b;
    logic          b_par;
  } ex_reg_t;

  ex_reg_t      ex_q;
  logic [W-1:0] int_result_raw, int_result, sel_result;
  icc_t         int_icc, sel_icc;
  logic         chk_err_in, chk_err_out, chk_error;

  // Register Access -> Execute pipeline register; operand parity is
  // generated here and checked at the ALU inputs.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_q <= '0;
    end else if (!freeze) begin
      ex_q.valid <= valid_i;
      ex_q.op    <= op_i;
      ex_q.a     <= a_i;
      ex_q.a_par <= ^a_i;
      ex_q.b     <= b_i;
      ex_q.b_par <= ^b_i;
    end
  end

  alu_shift #(.W(W)) u_alu (
    .op     (ex_q.op),
    .a      (ex_q.a),
    .b      (ex_q.b),
    .result (int_result_raw),
    .icc    (int_icc)
  );

  assign int_result = int_result_raw ^ fault_mask_i;

  alu_checker #(.W(W)) u_chk (
    .op      (ex_q.op),
    .a       (ex_q.a),
    .a_par   (ex_q.a_par),
    .b       (ex_q.b),
    .b_par   (ex_q.b_par),
    .result  (int_result),
    .icc     (int_icc),
    .err_in  (chk_err_in),
    .err_out (chk_err_out),
    .error   (chk_error)
  );

  // Only an operation actually in the stage can raise an error.
  assign error_o    = ex_q.valid && chk_error;
  assign ex_valid_o = ex_q.valid;

  assign alu_op_o = ex_q.op;
  assign alu_a_o  = ex_q.a;
  assign alu_b_o  = ex_q.b;

  always_comb begin
    if (select_alu) begin
      sel_result = int_result;
      sel_icc    = int_icc;
    end else begin
      sel_result = ext_result_i;
      sel_icc    = ext_icc_i;
    end
  end

  // Execute -> Memory pipeline register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_valid_o  <= 1'b0;
      mem_result_o <= '0;
      mem_icc_o    <= '0;
    end else if (!freeze) begin
      mem_valid_o  <= ex_q.valid;
      mem_result_o <= sel_result;
      mem_icc_o    <= sel_icc;
    end
  end

endmodule
