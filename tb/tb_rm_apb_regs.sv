// tb_rm_apb_regs: APB reads of the reset contents (RASR = DES signature,
// bitstream table from the published sizes), table writes and readback,
// the spare-entry outputs, and the RASR sequence around a reconfiguration
// (blank while loading, the spare's signature afterwards).
module tb_rm_apb_regs;
  import ft_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        psel_i = 0, penable_i = 0, pwrite_i = 0;
  logic [7:0]  paddr_i = 0;
  logic [31:0] pwdata_i = 0, prdata_o;
  logic [1:0]  state_i = 0;
  logic        select_alu_i = 1, cfg_busy_i = 0, cfg_start_i = 0, cfg_done_i = 0;
  logic [31:0] spare_addr_o, rasr_o;
  logic [23:0] spare_words_o;
  int          checks = 0, failures = 0;

  rm_apb_regs #(.CNT_W(24)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic apb_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); psel_i = 1; penable_i = 0; pwrite_i = 1; paddr_i = a; pwdata_i = d;
    @(negedge clk); penable_i = 1;
    @(negedge clk); psel_i = 0; penable_i = 0; pwrite_i = 0;
  endtask

  task automatic apb_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); psel_i = 1; penable_i = 0; pwrite_i = 0; paddr_i = a;
    @(negedge clk); penable_i = 1;
    #1 d = prdata_o;
    @(negedge clk); psel_i = 0; penable_i = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    apb_read(8'h00, d); chk(d == SIG_DES, "RASR resets to the DES signature");
    state_i = 2'd1; select_alu_i = 1; cfg_busy_i = 0;
    apb_read(8'h04, d); chk(d == 32'h5, "STATUS fields");
    apb_read(8'h10, d); chk(d == BS_ALU_ADDR, "ALU address");
    apb_read(8'h14, d); chk(d == 32'd17204, "ALU length 67.2 KB");
    apb_read(8'h18, d); chk(d == SIG_EXT_ALU, "ALU signature");
    apb_read(8'h24, d); chk(d == 32'd21607, "DES length 84.4 KB");
    apb_read(8'h28, d); chk(d == SIG_DES, "DES signature");
    apb_read(8'h34, d); chk(d == 32'd13108, "blanking length 51.2 KB");
    chk(spare_addr_o == BS_ALU_ADDR && spare_words_o == 24'd17204, "spare entry outputs");
    for (int e = 0; e < 3; e++) begin
      apb_write(8'(16 * (e + 1)),     32'h4000_0000 + 32'(e) * 32'h100);
      apb_write(8'(16 * (e + 1) + 4), 32'd100 + 32'(e));
      apb_write(8'(16 * (e + 1) + 8), 32'hC0DE_0000 + 32'(e));
    end
    for (int e = 0; e < 3; e++) begin
      apb_read(8'(16 * (e + 1)),     d); chk(d == 32'h4000_0000 + 32'(e) * 32'h100, "table address written");
      apb_read(8'(16 * (e + 1) + 4), d); chk(d == 32'd100 + 32'(e), "table length written");
      apb_read(8'(16 * (e + 1) + 8), d); chk(d == 32'hC0DE_0000 + 32'(e), "table signature written");
    end
    chk(spare_addr_o == 32'h4000_0000 && spare_words_o == 24'd100, "spare entry follows the table");
    apb_write(8'h00, 32'hFFFF_FFFF);
    apb_read(8'h00, d); chk(d == SIG_DES, "RASR is read-only");
    @(negedge clk); cfg_start_i = 1; @(negedge clk); cfg_start_i = 0;
    chk(rasr_o == SIG_BLANK, "RASR blank during reconfiguration");
    repeat (3) @(negedge clk);
    cfg_done_i = 1; @(negedge clk); cfg_done_i = 0;
    apb_read(8'h00, d); chk(d == 32'hC0DE_0000, "RASR takes the spare's signature");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
