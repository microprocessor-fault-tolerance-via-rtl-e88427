// tb_des_apb: drives the DES peripheral over APB as a driver would: write
// key and block, start, poll STATUS, read the result. Checks the vectors in
// both directions, the interrupt pulse, the done flag, register readback,
// and that the unused ALU half of the shared interface reads zero.
module tb_des_apb;
  import ft_pkg::*;
  import tb_ref_pkg::*;
  logic    clk = 0, rst_n = 0;
  ra_in_t  ra_i;
  ra_out_t ra_o;
  int      checks = 0, failures = 0, irqs = 0;

  des_apb dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (ra_o.pirq) irqs++;

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

  task automatic des_op(input logic [63:0] k, input logic [63:0] d, input logic dec, output logic [63:0] r);
    logic [31:0] w;
    int polls;
    apb_write(8'h00, k[63:32]); apb_write(8'h04, k[31:0]);
    apb_write(8'h08, d[63:32]); apb_write(8'h0C, d[31:0]);
    apb_read(8'h08, w); chk(w == d[63:32], "DIN_HI readback");
    apb_write(8'h10, {30'd0, dec, 1'b1});
    polls = 0;
    do begin apb_read(8'h14, w); polls++; end while (!w[1] && polls < 50);
    chk(w[1] && !w[0], "done flag set, not busy");
    apb_read(8'h18, w); r[63:32] = w;
    apb_read(8'h1C, w); r[31:0] = w;
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] r;
    ra_i = '0;
    ra_i.alu_op = ALU_ADD; ra_i.alu_a = 32'd1; ra_i.alu_b = 32'd2;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NDES; i++) begin
      des_op(DES_VECS[i].key, DES_VECS[i].pt, 1'b0, r);
      chk(r == DES_VECS[i].ct, $sformatf("APB encrypt %0d", i));
      des_op(DES_VECS[i].key, DES_VECS[i].ct, 1'b1, r);
      chk(r == DES_VECS[i].pt, $sformatf("APB decrypt %0d", i));
      chk(ra_o.alu_result == 32'd0 && ra_o.alu_icc == 4'd0, "ALU half of the interface unused");
    end
    chk(irqs == 2 * NDES, "one interrupt per block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
