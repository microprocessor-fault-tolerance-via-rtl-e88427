// tb_ext_alu_rm: the spare ALU module computes every operation like the
// reference model through the shared reconfigurable-module interface and
// keeps the APB half of the interface quiet.
module tb_ext_alu_rm;
  import ft_pkg::*;
  import tb_ref_pkg::*;
  ra_in_t  ra_i;
  ra_out_t ra_o;
  int      checks = 0, failures = 0;

  ext_alu_rm dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_ref_t r;
    for (int i = 0; i < 2000; i++) begin
      ra_i = '0;
      ra_i.alu_op = rand_op(); ra_i.alu_a = $urandom; ra_i.alu_b = $urandom;
      ra_i.psel = 1'($urandom); ra_i.penable = 1'($urandom); ra_i.paddr = 8'($urandom); ra_i.pwdata = $urandom;
      #1;
      r = alu_ref(ra_i.alu_op, ra_i.alu_a, ra_i.alu_b);
      checks++;
      if (ra_o.alu_result !== r.result || ra_o.alu_icc !== r.icc || ra_o.prdata !== 0 || ra_o.pirq !== 0) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h got %h exp %h", ra_i.alu_op.name(), ra_i.alu_a, ra_i.alu_b, ra_o.alu_result, r.result);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
