// tb_alu_shift: checks every ALU operation against the 64-bit reference
// model on directed corner cases (carry, overflow, shift by 0 and 31) and on
// random operands. Combinational unit: results are sampled 1 ns after the
// inputs change.
module tb_alu_shift;
  import ft_pkg::*;
  import tb_ref_pkg::*;

  alu_op_e     op;
  logic [31:0] a, b, result;
  icc_t        icc;
  int          checks = 0, failures = 0;

  alu_shift dut (.op(op), .a(a), .b(b), .result(result), .icc(icc));

  task automatic check(input alu_op_e o, input logic [31:0] x, input logic [31:0] y);
    alu_ref_t r;
    op = o; a = x; b = y;
    #1;
    r = alu_ref(o, x, y);
    checks++;
    if (result !== r.result || icc !== r.icc) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h got %h/%b exp %h/%b", o.name(), x, y, result, icc, r.result, r.icc);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed corners
    check(ALU_ADD, 32'hFFFF_FFFF, 32'h1);
    check(ALU_ADD, 32'h7FFF_FFFF, 32'h1);
    check(ALU_ADD, 32'h8000_0000, 32'h8000_0000);
    check(ALU_SUB, 32'h0, 32'h1);
    check(ALU_SUB, 32'h8000_0000, 32'h1);
    check(ALU_SUB, 32'h5, 32'h5);
    check(ALU_SLL, 32'h8000_0001, 32'd31);
    check(ALU_SRL, 32'h8000_0001, 32'd31);
    check(ALU_SRA, 32'h8000_0001, 32'd31);
    check(ALU_SRA, 32'h8000_0001, 32'd0);
    check(ALU_NAND, 32'hF0F0_F0F0, 32'hFF00_FF00);
    check(ALU_NOR,  32'hF0F0_F0F0, 32'hFF00_FF00);
    check(ALU_XNOR, 32'hF0F0_F0F0, 32'hFF00_FF00);
    for (int o = 0; o <= 10; o++)
      for (int i = 0; i < 300; i++)
        check(alu_op_e'(o), $urandom, (i % 3 == 0) ? 32'($urandom_range(31, 0)) : $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
