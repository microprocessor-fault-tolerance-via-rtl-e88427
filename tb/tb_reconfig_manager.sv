// tb_reconfig_manager: the whole Reconfiguration Manager against the AHB
// memory model and an ICAP monitor.
//  Run 1 (slow bus with wait states and grant withdrawal, table entry
//  shortened over APB to 300 words): a transient error causes no bus
//  traffic; a permanent error freezes the pipeline, the RASR reads blank,
//  every ICAP word equals the stored bitstream word in order, and at the end
//  the external ALU is selected, RASR holds the External ALU signature and
//  freeze is released.
//  Run 2 (after a new reset, ideal bus, default 17204-word External ALU
//  bitstream): the reconfiguration, from the end of the detection window to
//  the release of freeze, takes close to one cycle per word.
module tb_reconfig_manager;
  import ft_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 8;
  logic        clk = 0, rst_n = 0, error_i = 0;
  logic        freeze_o, select_alu_o, transient_o;
  logic [1:0]  state_o;
  logic [31:0] rasr_o;
  logic        hbusreq_o, hgrant_i, hwrite_o, hready_i;
  logic [1:0]  htrans_o, hresp_i;
  logic [31:0] haddr_o, hwdata_o, hrdata_i;
  logic [2:0]  hsize_o, hburst_o;
  logic [3:0]  hprot_o;
  logic        psel_i = 0, penable_i = 0, pwrite_i = 0;
  logic [7:0]  paddr_i = 0;
  logic [31:0] pwdata_i = 0, prdata_o;
  logic        icap_ce_n_o, icap_write_n_o, icap_busy_i;
  logic [31:0] icap_i_o;
  int          checks = 0, failures = 0, icap_words = 0;
  logic        slow = 1;

  reconfig_manager #(.DETECT_CYCLES(N), .BUF_DEPTH(16)) dut (.*);

  logic hg0, hg1, hr0, hr1; logic [1:0] rs0, rs1; logic [31:0] rd0, rd1;
  int e0, e1, w0, w1, g0, g1, t0, t1;
  ahb_mem_model #(.WAIT_PCT(0), .DROP_PCT(0)) m0 (
    .clk, .rst_n, .hbusreq(hbusreq_o && !slow), .hgrant(hg0), .htrans(!slow ? htrans_o : HTRANS_IDLE),
    .haddr(haddr_o), .hwrite(hwrite_o), .hsize(hsize_o), .hready(hr0), .hresp(rs0), .hrdata(rd0),
    .errors(e0), .wait_cycles(w0), .grant_drops(g0), .transfers(t0));
  ahb_mem_model #(.WAIT_PCT(30), .MAX_WAIT(2), .DROP_PCT(5)) m1 (
    .clk, .rst_n, .hbusreq(hbusreq_o && slow), .hgrant(hg1), .htrans(slow ? htrans_o : HTRANS_IDLE),
    .haddr(haddr_o), .hwrite(hwrite_o), .hsize(hsize_o), .hready(hr1), .hresp(rs1), .hrdata(rd1),
    .errors(e1), .wait_cycles(w1), .grant_drops(g1), .transfers(t1));
  assign hgrant_i = slow ? hg1 : hg0;
  assign hready_i = slow ? hr1 : hr0;
  assign hresp_i  = slow ? rs1 : rs0;
  assign hrdata_i = slow ? rd1 : rd0;
  assign icap_busy_i = 1'b0;

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && !icap_ce_n_o && !icap_write_n_o) begin
      checks++;
      if (icap_i_o !== mem_word(BS_ALU_ADDR + 32'(icap_words) * 4)) begin
        failures++; $display("FAIL ICAP word %0d = %h", icap_words, icap_i_o);
      end
      icap_words <= icap_words + 1;
    end
  end

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

  task automatic do_reset();
    rst_n = 0; error_i = 0; icap_words = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int cyc, frozen;
    // ---------------- run 1 ----------------
    slow = 1;
    do_reset();
    apb_write(8'h14, 32'd300);
    // transient
    @(negedge clk); error_i = 1;
    repeat (N - 2) @(negedge clk);
    error_i = 0;
    repeat (5) @(negedge clk);
    chk(t1 == 0 && state_o == 2'd0 && !freeze_o, "transient: no bus traffic, idle");
    // permanent
    error_i = 1;
    wait (state_o == 2'd2);
    repeat (2) @(negedge clk);
    chk(freeze_o && rasr_o == SIG_BLANK, $sformatf("frozen, RASR blank while loading (%b %h)", freeze_o, rasr_o));
    apb_read(8'h00, d); chk(d == SIG_BLANK, "software reads blank RASR");
    error_i = 0;
    frozen = 0;
    while (state_o == 2'd2) begin
      @(negedge clk);
      if (state_o == 2'd2 && !freeze_o) frozen++;
    end
    chk(frozen == 0, "freeze held for the whole reconfiguration");
    chk(icap_words == 300, $sformatf("300 words written (%0d)", icap_words));
    chk(!select_alu_o && !freeze_o && state_o == 2'd3, "external ALU selected, running");
    apb_read(8'h00, d); chk(d == SIG_EXT_ALU, "RASR = External ALU");
    apb_read(8'h04, d); chk(d[2:0] == 3'b011, "STATUS repaired");
    chk(e1 == 0, "no AHB protocol violation");
    chk(w1 > 0 && g1 > 0, "wait states and grant drops happened");
    // ---------------- run 2 ----------------
    slow = 0;
    do_reset();
    @(negedge clk); error_i = 1;
    wait (state_o == 2'd2);
    cyc = 0;
    while (state_o == 2'd2) begin @(negedge clk); cyc++; end
    $display("full External ALU bitstream: %0d words in %0d cycles", BS_ALU_WORDS, cyc);
    chk(icap_words == BS_ALU_WORDS, "whole default bitstream written");
    chk(cyc >= BS_ALU_WORDS && cyc <= BS_ALU_WORDS + 10, "about one word per cycle");
    chk(!freeze_o && !select_alu_o, "released after full-size reconfiguration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
