// tb_rm_ahb_master: the master reads bitstreams through the AHB memory model
// (with wait states and grant withdrawal) into a buffer that is drained at a
// random rate. Checks: every word arrives once and in order, the protocol
// checker in the model sees no violation, done pulses once, the buffer never
// overflows, a 1 KB boundary is crossed, and with an ideal bus and
// an always-ready consumer the master sustains one word per cycle.
module tb_rm_ahb_master;
  import ft_pkg::*;
  import tb_ref_pkg::*;

  logic        clk = 0, rst_n = 0, start_i = 0;
  logic [31:0] addr_i = 0;
  logic [23:0] words_i = 0;
  logic        busy_o, done_o, push_o;
  logic [31:0] data_o;
  logic        hbusreq_o, hgrant_i, hwrite_o, hready_i;
  logic [1:0]  htrans_o, hresp_i;
  logic [31:0] haddr_o, hwdata_o, hrdata_i;
  logic [2:0]  hsize_o, hburst_o;
  logic [3:0]  hprot_o;
  logic [4:0]  free_i;
  logic        pop, empty, full;
  logic [31:0] dout;
  int          errors, wait_cycles, grant_drops, transfers;
  int          checks = 0, failures = 0, got = 0, dones = 0, pop_pct = 100;
  logic        ideal = 1;

  rm_ahb_master #(.CNT_W(24), .FREE_W(5)) dut (.*);

  rm_buffer #(.W(32), .DEPTH(16)) u_buf (
    .clk(clk), .rst_n(rst_n), .push_i(push_o), .din_i(data_o), .pop_i(pop),
    .dout_o(dout), .empty_o(empty), .full_o(full), .free_o(free_i));

  // two memory models: ideal and slow; a mux picks one
  logic hg0, hg1, hr0, hr1; logic [1:0] rs0, rs1; logic [31:0] rd0, rd1;
  int e0, e1, w0, w1, g0, g1, t0, t1;
  ahb_mem_model #(.WAIT_PCT(0), .DROP_PCT(0)) m0 (
    .clk, .rst_n, .hbusreq(hbusreq_o && ideal), .hgrant(hg0), .htrans(ideal ? htrans_o : HTRANS_IDLE),
    .haddr(haddr_o), .hwrite(hwrite_o), .hsize(hsize_o), .hready(hr0), .hresp(rs0), .hrdata(rd0),
    .errors(e0), .wait_cycles(w0), .grant_drops(g0), .transfers(t0));
  ahb_mem_model #(.WAIT_PCT(40), .MAX_WAIT(3), .DROP_PCT(10)) m1 (
    .clk, .rst_n, .hbusreq(hbusreq_o && !ideal), .hgrant(hg1), .htrans(!ideal ? htrans_o : HTRANS_IDLE),
    .haddr(haddr_o), .hwrite(hwrite_o), .hsize(hsize_o), .hready(hr1), .hresp(rs1), .hrdata(rd1),
    .errors(e1), .wait_cycles(w1), .grant_drops(g1), .transfers(t1));
  assign hgrant_i = ideal ? hg0 : hg1;
  assign hready_i = ideal ? hr0 : hr1;
  assign hresp_i  = ideal ? rs0 : rs1;
  assign hrdata_i = ideal ? rd0 : rd1;
  assign errors = e0 + e1; assign wait_cycles = w0 + w1; assign grant_drops = g0 + g1; assign transfers = t0 + t1;

  logic pop_en;
  always_ff @(negedge clk) pop_en <= ($urandom_range(99, 0) < pop_pct);
  assign pop = pop_en && !empty;

  always #5 clk = ~clk;

  logic [31:0] base;
  always @(posedge clk) begin
    if (pop) begin
      checks++;
      if (dout !== mem_word(base + 32'(got) * 4)) begin
        failures++; $display("FAIL word %0d: got %h exp %h", got, dout, mem_word(base + 32'(got) * 4));
      end
      got++;
    end
    if (done_o) dones++;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run(input logic [31:0] a, input int n, output int cycles);
    base = a; got = 0; dones = 0;
    @(negedge clk); addr_i = a; words_i = 24'(n); start_i = 1;
    @(negedge clk); start_i = 0;
    cycles = 1;
    while (got < n || dones == 0) begin @(negedge clk); cycles++; end
    repeat (5) @(negedge clk);
    chk(got == n && dones == 1 && !busy_o, "all words delivered, one done");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ideal bus: 1000 words must take about 1000 cycles
    ideal = 1; pop_pct = 100;
    run(BS_ALU_ADDR, 1000, cyc);
    chk(cyc <= 1000 + 8, $sformatf("one word per cycle (%0d cycles for 1000 words)", cyc));
    // slow bus, slow consumer, start not 1 KB aligned
    ideal = 0; pop_pct = 35;
    run(BS_DES_ADDR + 32'h3F0, 700, cyc);
    ideal = 0; pop_pct = 90;
    run(BS_ALU_ADDR, 2500, cyc);
    chk(errors == 0, "no AHB protocol violation");
    chk(wait_cycles > 0 && grant_drops > 0, "wait states and grant drops exercised");
    $display("wait states %0d, grant drops %0d, transfers %0d", wait_cycles, grant_drops, transfers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
