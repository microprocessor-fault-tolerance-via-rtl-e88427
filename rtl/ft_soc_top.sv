// ft_soc_top: the static part of a processor system whose ALU can be
// repaired on the fly by dynamic partial reconfiguration, together with the
// reconfigurable area it manages.
//
// Normal operation: the processor's Execute stage (ex_stage_ft) uses its own
// ALU, whose results are checked concurrently; the reconfigurable area holds
// a non-critical peripheral, the DES crypto-core, on the APB bus.
// On an ALU error the pipeline is frozen at once. If the error clears within
// the Reconfiguration Manager's detection window, execution simply goes on
// (transient fault). Otherwise the manager fetches the External ALU partial
// bitstream over AHB, writes it through the configuration port into the
// reconfigurable area (replacing DES), switches the Execute stage to the
// external ALU, updates the Reconfigurable Area Status Register and releases
// the pipeline. Software sees the new signature and runs DES in software.
//
// Outside this module (ports): the rest of the processor pipeline, which
// supplies one ALU operation per cycle on ex_* and must hold it while
// freeze_o is high, and receives results on mem_*; the AHB bus with its
// arbiter and the storage memory holding the bitstreams; the AHB/APB bridge,
// which drives the APB signals and selects the manager (psel_rm_i) or the
// reconfigurable-area peripheral (psel_ra_i).
// err_switch_i is ORed into the error signal (a board switch, as used to
// provoke a reconfiguration in a test of the prototype); alu_fault_mask_i
// corrupts the internal ALU's result for verification. Tie both to zero in
// normal use.
// The partition (critical ALU in the static part, non-critical DES core in
// the area, spare ALU loaded on demand, freeze instead of rollback) follows
// the published design; the port-level boundaries, the parameter defaults
// and the test inputs are this design's choices. The AHB master only reads,
// so hwrite_o, hsize_o, hburst_o, hprot_o and hwdata_o are constant.
module ft_soc_top
  import ft_pkg::*;
#(
  parameter int unsigned DETECT_CYCLES = 8,
  parameter int unsigned BUF_DEPTH     = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor pipeline: Register Access -> Execute
  input  logic        ex_valid_i,
  input  alu_op_e     ex_op_i,
  input  logic [31:0] ex_a_i,
  input  logic [31:0] ex_b_i,
  output logic        freeze_o,
  // processor pipeline: Execute -> Memory
  output logic        mem_valid_o,
  output logic [31:0] mem_result_o,
  output icc_t        mem_icc_o,
  // fault handling status and test inputs
  output logic        error_o,
  output logic        select_alu_o,
  output logic [1:0]  rm_state_o,
  output logic        transient_o,
  output logic [31:0] rasr_o,
  input  logic        err_switch_i,
  input  logic [31:0] alu_fault_mask_i,
  // AHB master port of the Reconfiguration Manager
  output logic        hbusreq_o,
  input  logic        hgrant_i,
  output logic [1:0]  htrans_o,
  output logic [31:0] haddr_o,
  output logic        hwrite_o,
  output logic [2:0]  hsize_o,
  output logic [2:0]  hburst_o,
  output logic [3:0]  hprot_o,
  output logic [31:0] hwdata_o,
  input  logic        hready_i,
  input  logic [1:0]  hresp_i,
  input  logic [31:0] hrdata_i,
  // APB (from the AHB/APB bridge)
  input  logic        psel_rm_i,
  input  logic        psel_ra_i,
  input  logic        penable_i,
  input  logic [7:0]  paddr_i,
  input  logic        pwrite_i,
  input  logic [31:0] pwdata_i,
  output logic [31:0] prdata_rm_o,
  output logic [31:0] prdata_ra_o,
  output logic        pirq_ra_o,
  // observation of the reconfigurable area
  output logic [31:0] area_sig_o,
  output logic        area_configuring_o
);

  logic        ex_error, rm_error;
  alu_op_e     alu_op;
  logic [31:0] alu_a, alu_b;
  logic        icap_ce_n, icap_write_n, icap_busy;
  logic [31:0] icap_data;
  ra_in_t      ra_in;
  ra_out_t     ra_out;

  ex_stage_ft #(.W(32)) u_ex (
    .clk          (clk),
    .rst_n        (rst_n),
    .freeze       (freeze_o),
    .select_alu   (select_alu_o),
    .valid_i      (ex_valid_i),
    .op_i         (ex_op_i),
    .a_i          (ex_a_i),
    .b_i          (ex_b_i),
    .alu_op_o     (alu_op),
    .alu_a_o      (alu_a),
    .alu_b_o      (alu_b),
    .ext_result_i (ra_out.alu_result),
    .ext_icc_i    (ra_out.alu_icc),
    .fault_mask_i (alu_fault_mask_i),
    .error_o      (ex_error),
    .ex_valid_o   (),
    .mem_valid_o  (mem_valid_o),
    .mem_result_o (mem_result_o),
    .mem_icc_o    (mem_icc_o)
  );

  assign rm_error = ex_error || err_switch_i;
  assign error_o  = rm_error;

  reconfig_manager #(
    .DETECT_CYCLES (DETECT_CYCLES),
    .BUF_DEPTH     (BUF_DEPTH)
  ) u_rm (
    .clk            (clk),
    .rst_n          (rst_n),
    .error_i        (rm_error),
    .freeze_o       (freeze_o),
    .select_alu_o   (select_alu_o),
    .state_o        (rm_state_o),
    .transient_o    (transient_o),
    .rasr_o         (rasr_o),
    .hbusreq_o      (hbusreq_o),
    .hgrant_i       (hgrant_i),
    .htrans_o       (htrans_o),
    .haddr_o        (haddr_o),
    .hwrite_o       (hwrite_o),
    .hsize_o        (hsize_o),
    .hburst_o       (hburst_o),
    .hprot_o        (hprot_o),
    .hwdata_o       (hwdata_o),
    .hready_i       (hready_i),
    .hresp_i        (hresp_i),
    .hrdata_i       (hrdata_i),
    .psel_i         (psel_rm_i),
    .penable_i      (penable_i),
    .paddr_i        (paddr_i),
    .pwrite_i       (pwrite_i),
    .pwdata_i       (pwdata_i),
    .prdata_o       (prdata_rm_o),
    .icap_ce_n_o    (icap_ce_n),
    .icap_write_n_o (icap_write_n),
    .icap_i_o       (icap_data),
    .icap_busy_i    (icap_busy)
  );

  // Boundary of the reconfigurable area: the APB dynamic part and the ALU
  // operands go in, the ALU inputs being wired straight from the Execute
  // stage.
  always_comb begin
    ra_in.psel    = psel_ra_i;
    ra_in.penable = penable_i;
    ra_in.paddr   = paddr_i;
    ra_in.pwrite  = pwrite_i;
    ra_in.pwdata  = pwdata_i;
    ra_in.alu_op  = alu_op;
    ra_in.alu_a   = alu_a;
    ra_in.alu_b   = alu_b;
  end

  reconfig_area #(.BUSY_PERIOD(0)) u_area (
    .clk           (clk),
    .rst_n         (rst_n),
    .icap_ce_n     (icap_ce_n),
    .icap_write_n  (icap_write_n),
    .icap_i        (icap_data),
    .icap_busy_o   (icap_busy),
    .ra_i          (ra_in),
    .ra_o          (ra_out),
    .loaded_sig_o  (area_sig_o),
    .configuring_o (area_configuring_o)
  );

  assign prdata_ra_o = ra_out.prdata;
  assign pirq_ra_o   = ra_out.pirq;

endmodule
