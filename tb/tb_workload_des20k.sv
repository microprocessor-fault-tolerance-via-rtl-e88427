// tb_workload_des20k: the DES workload of the original prototype, 20 KB of
// plain text (2560 64-bit blocks), encrypted and then decrypted with the
// hardware DES peripheral in the reconfigurable area of the full design at
// its default sizes, driven over APB as a driver would (presence check of
// the Reconfigurable Area Status Register before and after the job, then
// per block: write key and block, start, poll, read). Checks: the first
// block against a published test vector, every decrypted block against its
// plain text, and the RASR. Reports the cycle count and the time at 66 MHz.
module tb_workload_des20k;
  import ft_pkg::*;
  import tb_ref_pkg::*;

  localparam int NBLK = 20 * 1024 / 8;

  logic        clk = 0, rst_n = 0;
  logic        freeze_o, mem_valid_o, error_o, select_alu_o, transient_o;
  logic [31:0] mem_result_o, rasr_o;
  icc_t        mem_icc_o;
  logic [1:0]  rm_state_o;
  logic        hbusreq_o, hgrant_i, hwrite_o, hready_i;
  logic [1:0]  htrans_o, hresp_i;
  logic [31:0] haddr_o, hwdata_o, hrdata_i;
  logic [2:0]  hsize_o, hburst_o;
  logic [3:0]  hprot_o;
  logic        psel_rm_i = 0, psel_ra_i = 0, penable_i = 0, pwrite_i = 0;
  logic [7:0]  paddr_i = 0;
  logic [31:0] pwdata_i = 0, prdata_rm_o, prdata_ra_o;
  logic        pirq_ra_o;
  logic [31:0] area_sig_o;
  logic        area_configuring_o;
  int          checks = 0, failures = 0;

  ft_soc_top dut (
    .clk, .rst_n, .ex_valid_i(1'b0), .ex_op_i(ALU_AND), .ex_a_i(32'd0), .ex_b_i(32'd0),
    .freeze_o, .mem_valid_o, .mem_result_o, .mem_icc_o, .error_o, .select_alu_o, .rm_state_o,
    .transient_o, .rasr_o, .err_switch_i(1'b0), .alu_fault_mask_i(32'd0),
    .hbusreq_o, .hgrant_i, .htrans_o, .haddr_o, .hwrite_o, .hsize_o, .hburst_o, .hprot_o,
    .hwdata_o, .hready_i, .hresp_i, .hrdata_i,
    .psel_rm_i, .psel_ra_i, .penable_i, .paddr_i, .pwrite_i, .pwdata_i, .prdata_rm_o,
    .prdata_ra_o, .pirq_ra_o, .area_sig_o, .area_configuring_o);

  assign hgrant_i = 1'b0;
  assign hready_i = 1'b1;
  assign hresp_i  = 2'b00;
  assign hrdata_i = 32'd0;

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic apb_write(input logic sel_rm, input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    psel_rm_i = sel_rm; psel_ra_i = !sel_rm; penable_i = 0; pwrite_i = 1; paddr_i = a; pwdata_i = d;
    @(negedge clk); penable_i = 1;
    @(negedge clk); psel_rm_i = 0; psel_ra_i = 0; penable_i = 0; pwrite_i = 0;
  endtask

  task automatic apb_read(input logic sel_rm, input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    psel_rm_i = sel_rm; psel_ra_i = !sel_rm; penable_i = 0; pwrite_i = 0; paddr_i = a;
    @(negedge clk); penable_i = 1;
    #1 d = sel_rm ? prdata_rm_o : prdata_ra_o;
    @(negedge clk); psel_rm_i = 0; psel_ra_i = 0; penable_i = 0;
  endtask

  task automatic des_block(input logic [63:0] d, input logic dec, output logic [63:0] r);
    logic [31:0] w;
    int polls = 0;
    apb_write(1'b0, 8'h08, d[63:32]);
    apb_write(1'b0, 8'h0C, d[31:0]);
    apb_write(1'b0, 8'h10, {30'd0, dec, 1'b1});
    do begin apb_read(1'b0, 8'h14, w); polls++; end while (!w[1] && polls < 100);
    apb_read(1'b0, 8'h18, w); r[63:32] = w;
    apb_read(1'b0, 8'h1C, w); r[31:0] = w;
  endtask

  function automatic logic [63:0] plain(input int i);
    if (i == 0) return DES_VECS[0].pt;
    return {32'(i) * 32'h0101_0101 ^ 32'h2020_2020, 32'(i) * 32'h7F4A_7C15};
  endfunction

  logic [63:0] ct [NBLK];

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] sig;
    logic [63:0] r, key;
    longint t0, t1, t2;
    repeat (3) @(negedge clk);
    rst_n = 1;
    key = DES_VECS[0].key;
    apb_read(1'b1, 8'h00, sig);
    chk(sig == SIG_DES, "hardware DES present");
    apb_write(1'b0, 8'h00, key[63:32]);
    apb_write(1'b0, 8'h04, key[31:0]);
    t0 = $time;
    for (int i = 0; i < NBLK; i++) begin
      des_block(plain(i), 1'b0, r);
      ct[i] = r;
    end
    t1 = $time;
    chk(ct[0] == DES_VECS[0].ct, "first block matches the published vector");
    for (int i = 0; i < NBLK; i++) begin
      des_block(ct[i], 1'b1, r);
      checks++;
      if (r !== plain(i)) begin failures++; $display("FAIL block %0d", i); end
    end
    t2 = $time;
    apb_read(1'b1, 8'h00, sig);
    chk(sig == SIG_DES, "hardware DES still present after the job");
    $display("20 KB: encryption %0d cycles (%0d us at 66 MHz), decryption %0d cycles",
             (t1 - t0) / 10, (t1 - t0) / 10 * 1000 / 66000, (t2 - t1) / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
