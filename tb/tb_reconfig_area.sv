// tb_reconfig_area: the area model starts with the DES peripheral, behaves
// as DES over APB, shows non-functional outputs while a bitstream is being
// written (ICAP busy exercised, BUSY_PERIOD = 5), becomes the External ALU
// after the ALU bitstream, and can be turned back into DES (state lost) or
// blanked.
module tb_reconfig_area;
  import ft_pkg::*;
  import tb_ref_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        icap_ce_n = 1, icap_write_n = 1, icap_busy_o;
  logic [31:0] icap_i = 0, loaded_sig_o;
  logic        configuring_o;
  ra_in_t      ra_i;
  ra_out_t     ra_o;
  int          checks = 0, failures = 0, busy_seen = 0;

  reconfig_area #(.BUSY_PERIOD(5)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic apb_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); ra_i.psel = 1; ra_i.penable = 0; ra_i.pwrite = 1; ra_i.paddr = a; ra_i.pwdata = d;
    @(negedge clk); ra_i.penable = 1;
    @(negedge clk); ra_i.psel = 0; ra_i.penable = 0; ra_i.pwrite = 0;
  endtask

  task automatic apb_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); ra_i.psel = 1; ra_i.penable = 0; ra_i.pwrite = 0; ra_i.paddr = a;
    @(negedge clk); ra_i.penable = 1;
    #1 d = ra_o.prdata;
    @(negedge clk); ra_i.psel = 0; ra_i.penable = 0;
  endtask

  // write a bitstream of n words from storage address a, honouring busy
  task automatic load(input logic [31:0] a, input int n);
    int i = 0;
    int glitches = 0;
    while (i < n) begin
      @(negedge clk);
      icap_ce_n = 0; icap_write_n = 0; icap_i = mem_word(a + 32'(i) * 4);
      #1;
      if (icap_busy_o) busy_seen++;   // not taken at the coming edge: repeat
      else i++;
      if (configuring_o && ra_o.alu_result != (ra_i.alu_a + ra_i.alu_b)) glitches++;
    end
    @(negedge clk); icap_ce_n = 1; icap_write_n = 1;
    @(negedge clk);
    chk(glitches > 0, "outputs not functional while configuring");
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    ra_i = '0; ra_i.alu_op = ALU_ADD; ra_i.alu_a = 32'd1000; ra_i.alu_b = 32'd234;
    repeat (2) @(posedge clk);
    rst_n = 1;
    chk(loaded_sig_o == SIG_DES, "DES present after power-up");
    apb_write(8'h00, 32'hCAFE_F00D);
    apb_read(8'h00, d); chk(d == 32'hCAFE_F00D, "DES register works");
    load(BS_ALU_ADDR, 64);
    chk(loaded_sig_o == SIG_EXT_ALU && !configuring_o, "External ALU loaded");
    for (int i = 0; i < 20; i++) begin
      ra_i.alu_op = rand_op(); ra_i.alu_a = $urandom; ra_i.alu_b = $urandom;
      #1 chk(ra_o.alu_result == alu_ref(ra_i.alu_op, ra_i.alu_a, ra_i.alu_b).result, "External ALU computes");
    end
    apb_read(8'h00, d); chk(d == 32'd0, "DES gone");
    ra_i.alu_op = ALU_ADD; ra_i.alu_a = 32'd1000; ra_i.alu_b = 32'd234;
    load(BS_DES_ADDR, 40);
    chk(loaded_sig_o == SIG_DES, "DES reloaded");
    apb_read(8'h00, d); chk(d == 32'd0, "reloaded DES starts from reset");
    chk(ra_o.alu_result == 32'd0, "no ALU while DES is loaded");
    load(BS_BLANK_ADDR, 20);
    chk(loaded_sig_o == SIG_BLANK && ra_o == '0, "blank area");
    chk(busy_seen > 0, "ICAP busy exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
