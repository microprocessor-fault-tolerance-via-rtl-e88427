// reconfig_area: behavioural model of the reconfigurable area of the FPGA
// together with its configuration port (ICAP). It is not meant for
// synthesis: on the device the area is a region of the fabric whose contents
// are replaced by a partial bitstream.
//
// The model holds one instance of every module that may occupy the area (the
// DES peripheral and the External ALU) and makes exactly one of them visible
// on the boundary signals at a time. Bitstream words arrive on the ICAP port
// (icap_ce_n = 0 and icap_write_n = 0 at a rising clock edge; both active
// low). A configuration sequence starts with the sync word CFG_SYNC_WORD;
// the word after it is taken as the signature of the module being loaded (a
// convention of this model, standing in for the frame data of a real
// bitstream). While a sequence is being written, the area holds no working
// module: its outputs carry pseudo-random values, as a half-configured
// region may glitch. When the port is deselected after a sequence, the
// module whose signature was received becomes active, starting from reset;
// an unknown signature leaves the area blank (outputs zero).
// After power-up the area holds the DES peripheral (the initial full
// bitstream contains it).
// icap_busy_o is high on every BUSY_PERIOD-th cycle of a sequence when
// BUSY_PERIOD > 0, to exercise flow control; the real port keeps BUSY low
// during writes, so the default is 0.
module reconfig_area
  import ft_pkg::*;
#(
  parameter int unsigned BUSY_PERIOD = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration port
  input  logic        icap_ce_n,
  input  logic        icap_write_n,
  input  logic [31:0] icap_i,
  output logic        icap_busy_o,
  // boundary signals (shared reconfigurable-module interface)
  input  ra_in_t      ra_i,
  output ra_out_t     ra_o,
  // model observation
  output logic [31:0] loaded_sig_o,
  output logic        configuring_o
);

  typedef enum logic [1:0] {
    AREA_BLANK   = 2'd0,
    AREA_DES     = 2'd1,
    AREA_EXT_ALU = 2'd2
  } area_e;

  area_e       area_q;
  logic        seq_q;          // inside a configuration sequence
  logic        sig_next_q;     // next word is the signature
  logic [31:0] sig_q;
  logic [31:0] lfsr_q;
  logic [15:0] busy_cnt_q;
  logic        wr;
  logic        des_rst_n;
  ra_out_t     des_o, alu_o;

  assign wr = !icap_ce_n && !icap_write_n && !icap_busy_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      area_q     <= AREA_DES;
      seq_q      <= 1'b0;
      sig_next_q <= 1'b0;
      sig_q      <= SIG_DES;
      lfsr_q     <= 32'h1;
      busy_cnt_q <= '0;
    end else begin
      lfsr_q <= {lfsr_q[30:0], lfsr_q[31] ^ lfsr_q[21] ^ lfsr_q[1] ^ lfsr_q[0]};
      if (seq_q && BUSY_PERIOD > 0)
        busy_cnt_q <= (busy_cnt_q == 16'(BUSY_PERIOD - 1)) ? '0 : busy_cnt_q + 16'd1;
      if (wr) begin
        sig_next_q <= 1'b0;
        if (icap_i == CFG_SYNC_WORD) begin
          seq_q      <= 1'b1;
          sig_next_q <= 1'b1;
          area_q     <= AREA_BLANK;
        end else if (sig_next_q) begin
          sig_q <= icap_i;
        end
      end else if (icap_ce_n && seq_q) begin
        seq_q <= 1'b0;
        unique case (sig_q)
          SIG_DES:     area_q <= AREA_DES;
          SIG_EXT_ALU: area_q <= AREA_EXT_ALU;
          default:     area_q <= AREA_BLANK;
        endcase
      end
    end
  end

  assign icap_busy_o = seq_q && (BUSY_PERIOD > 0) && (busy_cnt_q == 16'(BUSY_PERIOD - 1));

  // A module that is not configured loses its state.
  assign des_rst_n = rst_n && (area_q == AREA_DES);

  des_apb u_des (
    .clk   (clk),
    .rst_n (des_rst_n),
    .ra_i  (ra_i),
    .ra_o  (des_o)
  );

  ext_alu_rm u_alu (
    .ra_i (ra_i),
    .ra_o (alu_o)
  );

  always_comb begin
    if (seq_q) begin
      ra_o            = '0;
      ra_o.prdata     = lfsr_q;
      ra_o.alu_result = ~lfsr_q;
      ra_o.alu_icc    = icc_t'(lfsr_q[3:0]);
    end else begin
      unique case (area_q)
        AREA_DES:     ra_o = des_o;
        AREA_EXT_ALU: ra_o = alu_o;
        default:      ra_o = '0;
      endcase
    end
  end

  assign loaded_sig_o  = (area_q == AREA_DES) ? SIG_DES :
                         (area_q == AREA_EXT_ALU) ? SIG_EXT_ALU : SIG_BLANK;
  assign configuring_o = seq_q;

endmodule
