// tb_alu_checker: the checker must stay quiet for correct results and flag
// every single-bit error on the result, on the condition codes and on either
// operand (a flipped operand bit against its recorded parity).
module tb_alu_checker;
  import ft_pkg::*;
  import tb_ref_pkg::*;

  alu_op_e     op;
  logic [31:0] a, b, result;
  logic        a_par, b_par;
  icc_t        icc;
  logic        err_in, err_out, error;
  int          checks = 0, failures = 0;

  alu_checker dut (.op(op), .a(a), .a_par(a_par), .b(b), .b_par(b_par),
                   .result(result), .icc(icc), .err_in(err_in), .err_out(err_out), .error(error));

  task automatic expect_err(input logic exp_in, input logic exp_out, input string what);
    #1;
    checks++;
    if (err_in !== exp_in || err_out !== exp_out || error !== (exp_in | exp_out)) begin
      failures++;
      $display("FAIL %s: op=%s a=%h b=%h err_in=%b err_out=%b error=%b", what, op.name(), a, b, err_in, err_out, error);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_ref_t r;
    int bit_i;
    for (int i = 0; i < 500; i++) begin
      op = rand_op(); a = $urandom; b = $urandom;
      a_par = ^a; b_par = ^b;
      r = alu_ref(op, a, b);
      result = r.result; icc = r.icc;
      expect_err(1'b0, 1'b0, "clean");
      bit_i = $urandom_range(35, 0);
      if (bit_i < 32) result[bit_i] = ~result[bit_i];
      else            icc[bit_i-32] = ~icc[bit_i-32];
      expect_err(1'b0, 1'b1, "result bit flip");
      result = r.result; icc = r.icc;
      // operand corrupted after its parity was recorded: the checker's own
      // copy sees the same operands, so only the input parity can tell
      a_par = ~a_par;
      expect_err(1'b1, 1'b0, "operand a parity");
      a_par = ^a; b_par = ~b_par;
      expect_err(1'b1, 1'b0, "operand b parity");
      b_par = ^b;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
