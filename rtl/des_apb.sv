// des_apb: the DES crypto-core as an APB peripheral, written as a
// reconfigurable module: it has the same port list as every other module
// that can be placed in the reconfigurable area (ra_in_t / ra_out_t), so the
// External ALU can later take its place. The ALU half of the interface is
// ignored and its outputs are driven to zero.
//
// Register map (byte offsets, AMBA 2 APB, reads combinational):
//   0x00 KEY_HI   0x04 KEY_LO      key, read/write
//   0x08 DIN_HI   0x0C DIN_LO      input block, read/write
//   0x10 CTRL     write: bit 0 = start, bit 1 = decrypt
//   0x14 STATUS   read: bit 0 = busy, bit 1 = done (cleared by the next start)
//   0x18 DOUT_HI  0x1C DOUT_LO     result, read-only
// pirq pulses for one cycle when a block is finished. A block takes 17
// cycles from the CTRL write.
// The published design gives only the role of the core (a non-critical APB
// peripheral with a software replacement); the register map and interrupt
// behaviour are this design's choices.
module des_apb
  import ft_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  ra_in_t  ra_i,
  output ra_out_t ra_o
);

  logic [63:0] key_q, din_q, dout;
  logic        start, decrypt, busy, done, done_q;
  logic        wr;

  assign wr      = ra_i.psel && ra_i.penable && ra_i.pwrite;
  assign start   = wr && (ra_i.paddr[7:2] == 6'h04) && ra_i.pwdata[0];
  assign decrypt = ra_i.pwdata[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q  <= '0;
      din_q  <= '0;
      done_q <= 1'b0;
    end else begin
      if (wr) begin
        unique case (ra_i.paddr[7:2])
          6'h00: key_q[63:32] <= ra_i.pwdata;
          6'h01: key_q[31:0]  <= ra_i.pwdata;
          6'h02: din_q[63:32] <= ra_i.pwdata;
          6'h03: din_q[31:0]  <= ra_i.pwdata;
          default: ;
        endcase
      end
      if (start && !busy) done_q <= 1'b0;
      else if (done)      done_q <= 1'b1;
    end
  end

  des_core u_des (
    .clk       (clk),
    .rst_n     (rst_n),
    .start_i   (start),
    .decrypt_i (decrypt),
    .key_i     (key_q),
    .data_i    (din_q),
    .busy_o    (busy),
    .done_o    (done),
    .data_o    (dout)
  );

  always_comb begin
    ra_o = '0;
    unique case (ra_i.paddr[7:2])
      6'h00: ra_o.prdata = key_q[63:32];
      6'h01: ra_o.prdata = key_q[31:0];
      6'h02: ra_o.prdata = din_q[63:32];
      6'h03: ra_o.prdata = din_q[31:0];
      6'h05: ra_o.prdata = {30'd0, done_q, busy};
      6'h06: ra_o.prdata = dout[63:32];
      6'h07: ra_o.prdata = dout[31:0];
      default: ra_o.prdata = '0;
    endcase
    ra_o.pirq = done;
  end

endmodule
