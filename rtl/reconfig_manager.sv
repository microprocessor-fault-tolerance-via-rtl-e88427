// reconfig_manager: the Reconfiguration Manager, which owns the
// reconfigurable area and repairs the processor's ALU on the fly.
//
// It is built from three parts:
//  * pipeline-freezing control (rm_freeze_ctrl): follows the ALU error
//    signal, separates transient from permanent faults with a detection
//    window, holds the pipeline frozen during reconfiguration and finally
//    switches the Execute stage to the external ALU;
//  * bitstream transfer: an AHB master (rm_ahb_master) reads the spare-ALU
//    partial bitstream from storage memory into a small buffer (rm_buffer),
//    from which rm_icap_writer feeds the 32-bit configuration port (ICAP);
//  * software support (rm_apb_regs): an APB slave with the Reconfigurable
//    Area Status Register and the bitstream table.
// The processor never takes part: it is simply frozen until the repair ends.
//
// Interface: error_i from the Execute-stage checker; freeze_o and
// select_alu_o to the pipeline; an AHB master port; an APB slave port; the
// ICAP port. Bitstream rate: one word per cycle once the buffer is primed,
// if memory and bus deliver a word per cycle.
// The three-part split, the AHB-master/APB-slave pair and the 32-bit ICAP
// follow the published design; on a permanent fault the manager always loads
// bitstream-table entry 0 (the External ALU), which is this design's choice.
module reconfig_manager
  import ft_pkg::*;
#(
  parameter int unsigned DETECT_CYCLES = 8,
  parameter int unsigned BUF_DEPTH     = 16,
  parameter int unsigned CNT_W         = 24
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor side
  input  logic        error_i,
  output logic        freeze_o,
  output logic        select_alu_o,
  output logic [1:0]  state_o,
  output logic        transient_o,
  output logic [31:0] rasr_o,
  // AHB master
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
  // APB slave
  input  logic        psel_i,
  input  logic        penable_i,
  input  logic [7:0]  paddr_i,
  input  logic        pwrite_i,
  input  logic [31:0] pwdata_i,
  output logic [31:0] prdata_o,
  // configuration port
  output logic        icap_ce_n_o,
  output logic        icap_write_n_o,
  output logic [31:0] icap_i_o,
  input  logic        icap_busy_i
);

  localparam int unsigned FREE_W = $clog2(BUF_DEPTH + 1);

  logic              cfg_start, cfg_done, ahb_busy, ahb_done;
  logic [31:0]       spare_addr;
  logic [CNT_W-1:0]  spare_words;
  logic              push, pop, empty, full;
  logic [31:0]       push_data, buf_dout;
  logic [FREE_W-1:0] free;

  rm_freeze_ctrl #(.DETECT_CYCLES(DETECT_CYCLES)) u_freeze (
    .clk          (clk),
    .rst_n        (rst_n),
    .error_i      (error_i),
    .cfg_done_i   (cfg_done),
    .freeze_o     (freeze_o),
    .cfg_start_o  (cfg_start),
    .select_alu_o (select_alu_o),
    .transient_o  (transient_o),
    .state_o      (state_o)
  );

  rm_ahb_master #(.CNT_W(CNT_W), .FREE_W(FREE_W)) u_ahb (
    .clk       (clk),
    .rst_n     (rst_n),
    .start_i   (cfg_start),
    .addr_i    (spare_addr),
    .words_i   (spare_words),
    .busy_o    (ahb_busy),
    .done_o    (ahb_done),
    .free_i    (free),
    .push_o    (push),
    .data_o    (push_data),
    .hbusreq_o (hbusreq_o),
    .hgrant_i  (hgrant_i),
    .htrans_o  (htrans_o),
    .haddr_o   (haddr_o),
    .hwrite_o  (hwrite_o),
    .hsize_o   (hsize_o),
    .hburst_o  (hburst_o),
    .hprot_o   (hprot_o),
    .hwdata_o  (hwdata_o),
    .hready_i  (hready_i),
    .hresp_i   (hresp_i),
    .hrdata_i  (hrdata_i)
  );

  rm_buffer #(.W(32), .DEPTH(BUF_DEPTH)) u_buf (
    .clk     (clk),
    .rst_n   (rst_n),
    .push_i  (push),
    .din_i   (push_data),
    .pop_i   (pop),
    .dout_o  (buf_dout),
    .empty_o (empty),
    .full_o  (full),
    .free_o  (free)
  );

  rm_icap_writer #(.CNT_W(CNT_W)) u_icap (
    .clk            (clk),
    .rst_n          (rst_n),
    .start_i        (cfg_start),
    .words_i        (spare_words),
    .done_o         (cfg_done),
    .empty_i        (empty),
    .data_i         (buf_dout),
    .pop_o          (pop),
    .icap_ce_n_o    (icap_ce_n_o),
    .icap_write_n_o (icap_write_n_o),
    .icap_i_o       (icap_i_o),
    .icap_busy_i    (icap_busy_i)
  );

  rm_apb_regs #(.CNT_W(CNT_W)) u_regs (
    .clk           (clk),
    .rst_n         (rst_n),
    .psel_i        (psel_i),
    .penable_i     (penable_i),
    .paddr_i       (paddr_i),
    .pwrite_i      (pwrite_i),
    .pwdata_i      (pwdata_i),
    .prdata_o      (prdata_o),
    .state_i       (state_o),
    .select_alu_i  (select_alu_o),
    .cfg_busy_i    (state_o == 2'd2),
    .cfg_start_i   (cfg_start),
    .cfg_done_i    (cfg_done),
    .spare_addr_o  (spare_addr),
    .spare_words_o (spare_words),
    .rasr_o        (rasr_o)
  );

endmodule
