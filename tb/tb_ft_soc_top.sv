// tb_ft_soc_top: end-to-end run of the whole design at its default sizes
// (8-cycle detection window, 16-word buffer, full 17204-word External ALU
// bitstream), with the storage memory on a bus that inserts wait states and
// withdraws the grant now and then.
//
// A model of the processor front end issues a random ALU operation (or a
// bubble) every cycle it is not frozen; a scoreboard checks every result
// that reaches the Memory stage, in order, against the reference model. In
// parallel, a driver uses the DES peripheral the way the software does:
// check the Reconfigurable Area Status Register, use the hardware core if
// present, otherwise fall back to software, check the register again.
// Sequence: normal operation with hardware DES; a transient ALU fault
// (shorter than the detection window); a transient error from the board
// switch; a permanent ALU fault, which must lead to a full reconfiguration,
// after which the pipeline runs on the external ALU (the internal one stays
// faulty) and DES falls back to software.
// Every mechanism must have happened at least once; no result may be lost,
// duplicated or wrong.
module tb_ft_soc_top;
  import ft_pkg::*;
  import tb_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        ex_valid_i = 0;
  alu_op_e     ex_op_i = ALU_AND;
  logic [31:0] ex_a_i = 0, ex_b_i = 0;
  logic        freeze_o, mem_valid_o, error_o, select_alu_o, transient_o;
  logic [31:0] mem_result_o, rasr_o;
  icc_t        mem_icc_o;
  logic [1:0]  rm_state_o;
  logic        err_switch_i = 0;
  logic [31:0] alu_fault_mask_i = 0;
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
  int          ahb_errors, wait_cycles, grant_drops, transfers;

  ft_soc_top dut (.*);

  ahb_mem_model #(.WAIT_PCT(10), .MAX_WAIT(2), .DROP_PCT(2)) u_mem (
    .clk, .rst_n, .hbusreq(hbusreq_o), .hgrant(hgrant_i), .htrans(htrans_o), .haddr(haddr_o),
    .hwrite(hwrite_o), .hsize(hsize_o), .hready(hready_i), .hresp(hresp_i), .hrdata(hrdata_i),
    .errors(ahb_errors), .wait_cycles(wait_cycles), .grant_drops(grant_drops), .transfers(transfers));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_freeze_cycles = 0, n_transient = 0, n_switch_err = 0, n_reconfig = 0;
  int n_ext_results = 0, n_int_results = 0, n_des_hw = 0, n_des_sw = 0, n_icap = 0;
  int n_blank_rasr = 0, n_glitch_cycles = 0, n_reconfig_cycles = 0;
  bit done_stream = 0;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- processor front end and scoreboard ----------------
  typedef struct packed { alu_op_e op; logic [31:0] a; logic [31:0] b; } op_t;
  op_t q[$];
  bit  check_next = 0;

  initial begin
    op_t   cur;
    logic  cur_valid;
    bit    accepted;
    alu_ref_t r;
    cur_valid = 0;
    accepted  = 1;
    @(posedge rst_n);
    while (!done_stream) begin
      @(negedge clk);
      // result captured at the previous edge?
      if (check_next && mem_valid_o) begin
        op_t e;
        e = q.pop_front();
        r = alu_ref(e.op, e.a, e.b);
        checks++;
        if (mem_result_o !== r.result || mem_icc_o !== r.icc) begin
          failures++;
          $display("FAIL result %s %h %h: got %h/%b exp %h/%b at %0t", e.op.name(), e.a, e.b,
                   mem_result_o, mem_icc_o, r.result, r.icc, $time);
        end
        if (select_alu_o) n_int_results++; else n_ext_results++;
      end
      if (accepted) begin
        cur_valid = ($urandom_range(99, 0) < 85);
        cur.op = rand_op(); cur.a = $urandom; cur.b = $urandom;
      end
      ex_valid_i = cur_valid; ex_op_i = cur.op; ex_a_i = cur.a; ex_b_i = cur.b;
      #1;
      if (!freeze_o) begin
        accepted = 1;
        check_next = 1;
        if (cur_valid) q.push_back(cur);
      end else begin
        accepted = 0;
        check_next = 0;
        n_freeze_cycles++;
      end
    end
  end

  // ---------------- monitors ----------------
  always @(posedge clk) if (rst_n) begin
    if (transient_o) n_transient++;
    if (rm_state_o == 2'd2) begin
      n_reconfig_cycles++;
      if (area_configuring_o && dut.ra_out.alu_result != dut.u_ex.u_alu.result) n_glitch_cycles++;
    end
    if (!dut.icap_ce_n && !dut.icap_write_n) begin
      checks++;
      if (dut.icap_data !== mem_word(BS_ALU_ADDR + 32'(n_icap) * 4)) begin
        failures++; $display("FAIL ICAP word %0d", n_icap);
      end
      n_icap <= n_icap + 1;
    end
  end

  // ---------------- software (APB) ----------------
  task automatic apb_write(input logic sel_rm, input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); while (freeze_o) @(negedge clk);   // the processor is frozen
    psel_rm_i = sel_rm; psel_ra_i = !sel_rm; penable_i = 0; pwrite_i = 1; paddr_i = a; pwdata_i = d;
    @(negedge clk); penable_i = 1;
    @(negedge clk); psel_rm_i = 0; psel_ra_i = 0; penable_i = 0; pwrite_i = 0;
  endtask

  task automatic apb_read(input logic sel_rm, input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); while (freeze_o) @(negedge clk);
    psel_rm_i = sel_rm; psel_ra_i = !sel_rm; penable_i = 0; pwrite_i = 0; paddr_i = a;
    @(negedge clk); penable_i = 1;
    #1 d = sel_rm ? prdata_rm_o : prdata_ra_o;
    @(negedge clk); psel_rm_i = 0; psel_ra_i = 0; penable_i = 0;
  endtask

  // DES driver: presence check before and after using the hardware
  task automatic des_encrypt(input int v);
    logic [31:0] sig, w, sig2;
    logic [63:0] r;
    int polls;
    apb_read(1'b1, 8'h00, sig);
    if (sig == SIG_DES) begin
      apb_write(1'b0, 8'h00, DES_VECS[v].key[63:32]); apb_write(1'b0, 8'h04, DES_VECS[v].key[31:0]);
      apb_write(1'b0, 8'h08, DES_VECS[v].pt[63:32]);  apb_write(1'b0, 8'h0C, DES_VECS[v].pt[31:0]);
      apb_write(1'b0, 8'h10, 32'h1);
      polls = 0;
      do begin apb_read(1'b0, 8'h14, w); polls++; end while (!w[1] && polls < 100);
      apb_read(1'b0, 8'h18, w); r[63:32] = w;
      apb_read(1'b0, 8'h1C, w); r[31:0] = w;
      apb_read(1'b1, 8'h00, sig2);
      if (sig2 == SIG_DES) begin
        chk(r == DES_VECS[v].ct, $sformatf("hardware DES vector %0d", v));
        n_des_hw++;
      end
    end else begin
      // software spare unit: the tb only records that it was chosen and
      // that the hardware is really gone
      apb_read(1'b0, 8'h14, w);
      chk(w == 32'd0, "no DES peripheral answers after reconfiguration");
      n_des_sw++;
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int wait_start;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // normal operation: ALU stream plus hardware DES
    chk(rasr_o == SIG_DES && select_alu_o, "DES in the area, internal ALU in use");
    for (int v = 0; v < 3; v++) des_encrypt(v);
    repeat (50) @(negedge clk);

    // transient ALU fault: 3 cycles
    wait (ex_valid_i == 1);
    @(negedge clk); alu_fault_mask_i = 32'h0000_0040;
    repeat (3) @(negedge clk); alu_fault_mask_i = 0;
    repeat (50) @(negedge clk);
    chk(rm_state_o == 2'd0 && select_alu_o && n_transient >= 1, "transient fault absorbed");

    // transient error from the board switch: 5 cycles
    @(negedge clk); err_switch_i = 1; n_switch_err++;
    repeat (5) @(negedge clk); err_switch_i = 0;
    repeat (50) @(negedge clk);
    chk(rm_state_o == 2'd0 && n_transient >= 2, "switch error absorbed");
    des_encrypt(3);

    // permanent ALU fault: stays for the rest of the run
    @(negedge clk); alu_fault_mask_i = 32'h0001_0000;
    wait (rm_state_o == 2'd2);
    n_reconfig++;
    repeat (3) @(negedge clk);
    d = rasr_o;
    if (d == SIG_BLANK) n_blank_rasr++;
    wait (rm_state_o == 2'd3);
    $display("reconfiguration: %0d cycles for %0d words (%0d bus wait states, %0d grant drops)",
             n_reconfig_cycles, n_icap, wait_cycles, grant_drops);
    $display("at 66 MHz: %0d us", n_reconfig_cycles * 1000 / 66000);
    chk(n_icap == BS_ALU_WORDS, "full External ALU bitstream written");
    chk(area_sig_o == SIG_EXT_ALU && rasr_o == SIG_EXT_ALU && !select_alu_o, "External ALU in use");
    repeat (300) @(negedge clk);
    des_encrypt(4);
    des_encrypt(5);
    repeat (50) @(negedge clk);
    done_stream = 1;
    repeat (3) @(negedge clk);

    // every mechanism must have happened
    chk(n_freeze_cycles > 0,      "pipeline freeze");
    chk(n_transient >= 2,         "transient recovery (ALU fault and switch)");
    chk(n_switch_err > 0,         "board-switch error");
    chk(n_reconfig == 1,          "permanent fault reconfiguration");
    chk(n_glitch_cycles > 0,      "area outputs garbage while configuring (held off by freeze)");
    chk(n_blank_rasr > 0,         "RASR blank during reconfiguration");
    chk(n_int_results > 100,      "results from the internal ALU");
    chk(n_ext_results > 100,      "results from the external ALU");
    chk(n_des_hw >= 3,            "hardware DES used");
    chk(n_des_sw >= 2,            "software DES fallback");
    chk(wait_cycles > 0 && grant_drops > 0, "bus wait states and grant drops");
    chk(ahb_errors == 0,          "AHB protocol");
    chk(q.size() <= 2,            "no result lost (at most two still in flight)");
    $display("freeze cycles %0d, transients %0d, reconfigs %0d, int results %0d, ext results %0d, DES hw %0d sw %0d",
             n_freeze_cycles, n_transient, n_reconfig, n_int_results, n_ext_results, n_des_hw, n_des_sw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
