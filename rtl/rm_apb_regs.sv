// rm_apb_regs: APB slave of the Reconfiguration Manager (software support).
//
// It holds the Reconfigurable Area Status Register (RASR), which carries the
// signature of the core currently present in the reconfigurable area, so that
// a driver can check, before and after talking to a peripheral, that the
// peripheral is still there, and use a software routine otherwise. It also
// holds the table of partial bitstreams kept in storage memory: for each
// entry a byte address, a length in 32-bit words and the signature of the
// core the bitstream configures.
//
// Register map (byte offsets):
//   0x00  RASR    read-only   signature of the core in the area
//   0x04  STATUS  read-only   [1:0] manager state (0 idle, 1 detecting,
//                             2 reconfiguring, 3 repaired), [2] select_alu,
//                             [3] reconfiguration busy
//   0x10 + 16*i   entry i: +0 address, +4 length (words), +8 signature
//                 entry 0 = External ALU (the one loaded on a permanent
//                 ALU fault), 1 = DES core, 2 = blanking bitstream
// RASR becomes SIG_BLANK when a reconfiguration starts and takes the
// signature of entry 0 when it ends. Reads are combinational (AMBA 2 APB:
// prdata valid in the access phase). Writes take effect on the enable phase.
// The published design gives the RASR and the table; the register map, the reset
// contents and the RASR value during reconfiguration are this design's
// choices.
module rm_apb_regs
  import ft_pkg::*;
#(
  parameter int unsigned CNT_W = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  // APB slave
  input  logic              psel_i,
  input  logic              penable_i,
  input  logic [7:0]        paddr_i,
  input  logic              pwrite_i,
  input  logic [31:0]       pwdata_i,
  output logic [31:0]       prdata_o,
  // manager status
  input  logic [1:0]        state_i,
  input  logic              select_alu_i,
  input  logic              cfg_busy_i,
  input  logic              cfg_start_i,
  input  logic              cfg_done_i,
  // bitstream to load on a permanent ALU fault
  output logic [31:0]       spare_addr_o,
  output logic [CNT_W-1:0]  spare_words_o,
  output logic [31:0]       rasr_o
);

  localparam int unsigned NBS = 3;

  typedef struct packed {
    logic [31:0]      addr;
    logic [CNT_W-1:0] words;
    logic [31:0]      sig;
  } bs_entry_t;

  bs_entry_t   tbl_q [NBS];
  logic [31:0] rasr_q;
  logic        wr_en;
  logic [1:0]  idx;

  assign idx = 2'(paddr_i[7:4] - 4'd1);

  assign wr_en = psel_i && penable_i && pwrite_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rasr_q      <= SIG_DES;
      tbl_q[0]    <= '{addr: BS_ALU_ADDR,   words: CNT_W'(BS_ALU_WORDS),   sig: SIG_EXT_ALU};
      tbl_q[1]    <= '{addr: BS_DES_ADDR,   words: CNT_W'(BS_DES_WORDS),   sig: SIG_DES};
      tbl_q[2]    <= '{addr: BS_BLANK_ADDR, words: CNT_W'(BS_BLANK_WORDS), sig: SIG_BLANK};
    end else begin
      if (cfg_start_i)     rasr_q <= SIG_BLANK;
      else if (cfg_done_i) rasr_q <= tbl_q[0].sig;
      if (wr_en && paddr_i[7:4] >= 4'd1 && paddr_i[7:4] <= 4'(NBS)) begin
        unique case (paddr_i[3:2])
          2'd0: tbl_q[idx].addr  <= pwdata_i;
          2'd1: tbl_q[idx].words <= pwdata_i[CNT_W-1:0];
          2'd2: tbl_q[idx].sig   <= pwdata_i;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    prdata_o = '0;
    if (paddr_i[7:4] == 4'd0) begin
      unique case (paddr_i[3:2])
        2'd0:    prdata_o = rasr_q;
        2'd1:    prdata_o = {28'd0, cfg_busy_i, select_alu_i, state_i};
        default: prdata_o = '0;
      endcase
    end else if (paddr_i[7:4] <= 4'(NBS)) begin
      unique case (paddr_i[3:2])
        2'd0:    prdata_o = tbl_q[idx].addr;
        2'd1:    prdata_o = 32'(tbl_q[idx].words);
        2'd2:    prdata_o = tbl_q[idx].sig;
        default: prdata_o = '0;
      endcase
    end
  end

  assign spare_addr_o  = tbl_q[0].addr;
  assign spare_words_o = tbl_q[0].words;
  assign rasr_o        = rasr_q;

endmodule
