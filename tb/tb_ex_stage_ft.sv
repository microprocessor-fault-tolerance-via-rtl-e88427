// tb_ex_stage_ft: streams random operations through the modified Execute
// stage and checks (a) the two-edge latency and the results of the internal
// ALU, (b) that freeze holds both pipeline registers, (c) that a corrupted
// internal result raises error in the same cycle, (d) that select_alu = 0
// takes the external result, and (e) that the ALU operands are exported.
module tb_ex_stage_ft;
  import ft_pkg::*;
  import tb_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        freeze = 0, select_alu = 1;
  logic        valid_i = 0;
  alu_op_e     op_i = ALU_AND;
  logic [31:0] a_i = 0, b_i = 0;
  alu_op_e     alu_op_o;
  logic [31:0] alu_a_o, alu_b_o, ext_result_i, fault_mask_i = 0;
  icc_t        ext_icc_i;
  logic        error_o, ex_valid_o, mem_valid_o;
  logic [31:0] mem_result_o;
  icc_t        mem_icc_o;
  int          checks = 0, failures = 0;

  ex_stage_ft dut (.*);

  // an external ALU stand-in: a different, easily recognised function
  assign ext_result_i = alu_a_o + alu_b_o + 32'h1000_0000;
  assign ext_icc_i    = 4'b0101;

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_ref_t r;
    alu_op_e o; logic [31:0] x, y;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // (a) results two edges after presentation
    for (int i = 0; i < 200; i++) begin
      o = rand_op(); x = $urandom; y = $urandom;
      @(negedge clk); valid_i = 1; op_i = o; a_i = x; b_i = y;
      @(negedge clk); valid_i = 0;
      chk(alu_op_o == o && alu_a_o == x && alu_b_o == y, "operands exported");
      chk(!error_o, "no error on clean op");
      @(negedge clk);
      r = alu_ref(o, x, y);
      chk(mem_valid_o && mem_result_o == r.result && mem_icc_o == r.icc, "internal result");
    end
    // (b) freeze holds everything
    @(negedge clk); valid_i = 1; op_i = ALU_ADD; a_i = 32'd7; b_i = 32'd5;
    @(negedge clk); freeze = 1; valid_i = 1; op_i = ALU_SUB; a_i = 32'd100; b_i = 32'd1;
    repeat (5) @(negedge clk);
    chk(alu_a_o == 32'd7 && alu_b_o == 32'd5 && ex_valid_o, "operand register frozen");
    chk(mem_result_o != 32'd12, "result register frozen (old value)");
    freeze = 0;
    @(negedge clk);
    chk(mem_result_o == 32'd12 && alu_a_o == 32'd100, "resume after freeze");
    // (c) corrupted internal result -> error in the same cycle
    valid_i = 0;
    @(negedge clk);
    fault_mask_i = 32'h0000_0100;
    @(negedge clk); valid_i = 1; op_i = ALU_OR; a_i = 32'h1; b_i = 32'h2;
    @(negedge clk); valid_i = 0;
    chk(error_o, "error raised by corrupted result");
    fault_mask_i = 32'h0000_0300;   // even number of flipped bits: parity cannot see it
    #1 chk(!error_o, "double-bit flip escapes parity (expected)");
    fault_mask_i = 0;
    #1 chk(!error_o, "error clears with the fault");
    // an invalid slot never raises error
    @(negedge clk); fault_mask_i = 32'h1;
    @(negedge clk); chk(!error_o, "no error for a bubble");
    fault_mask_i = 0;
    // (d) external ALU selected
    select_alu = 0;
    for (int i = 0; i < 50; i++) begin
      x = $urandom; y = $urandom;
      @(negedge clk); valid_i = 1; op_i = ALU_ADD; a_i = x; b_i = y;
      @(negedge clk); valid_i = 0; fault_mask_i = $urandom;
      @(negedge clk);
      chk(mem_result_o == x + y + 32'h1000_0000 && mem_icc_o == 4'b0101, "external result selected");
      fault_mask_i = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
