// des_core: DES block cipher (FIPS 46-3), encryption and decryption of one
// 64-bit block with a 64-bit key (8 parity bits ignored).
//
// Iterative: one Feistel round per clock cycle. start_i (while not busy)
// loads key_i and data_i; the key halves C and D are rotated left before each
// encryption round, or used first and rotated right after each decryption
// round, so decryption applies the subkeys in reverse order without storing
// them. done_o pulses 17 cycles after start_i (one load cycle, then 16
// rounds), with the result on data_o
// (held until the next start).
// The published design names the DES core only, as the reconfigurable area's initial
// occupant; its iterative one-round-per-cycle structure is this design's
// choice.
module des_core
  import des_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_i,
  input  logic        decrypt_i,
  input  logic [63:0] key_i,
  input  logic [63:0] data_i,
  output logic        busy_o,
  output logic        done_o,
  output logic [63:0] data_o
);

  logic [27:0] c_q, d_q, c_rot, d_rot, c_k, d_k;
  logic [31:0] l_q, r_q;
  logic [3:0]  round_q;
  logic        busy_q, dec_q;
  logic [47:0] subkey;
  logic [55:0] cd0;
  logic [63:0] ip0;
  int          sh;

  assign cd0 = perm_pc1(key_i);
  assign ip0 = perm_ip(data_i);

  always_comb begin
    sh     = dec_q ? SH_T[15 - int'(round_q)] : SH_T[round_q];
    c_rot  = dec_q ? rotr28(c_q, sh) : rotl28(c_q, sh);
    d_rot  = dec_q ? rotr28(d_q, sh) : rotl28(d_q, sh);
    // encryption uses the rotated halves, decryption the current ones
    c_k    = dec_q ? c_q : c_rot;
    d_k    = dec_q ? d_q : d_rot;
    subkey = perm_pc2({c_k, d_k});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_q     <= '0;
      d_q     <= '0;
      l_q     <= '0;
      r_q     <= '0;
      round_q <= '0;
      busy_q  <= 1'b0;
      dec_q   <= 1'b0;
      done_o  <= 1'b0;
      data_o  <= '0;
    end else begin
      done_o <= 1'b0;
      if (!busy_q) begin
        if (start_i) begin
          c_q     <= cd0[55:28];
          d_q     <= cd0[27:0];
          l_q     <= ip0[63:32];
          r_q     <= ip0[31:0];
          dec_q   <= decrypt_i;
          round_q <= '0;
          busy_q  <= 1'b1;
        end
      end else begin
        c_q     <= c_rot;
        d_q     <= d_rot;
        l_q     <= r_q;
        r_q     <= l_q ^ feistel(r_q, subkey);
        round_q <= round_q + 4'd1;
        if (round_q == 4'd15) begin
          busy_q <= 1'b0;
          done_o <= 1'b1;
          data_o <= perm_fp({l_q ^ feistel(r_q, subkey), r_q});
        end
      end
    end
  end

  assign busy_o = busy_q;

endmodule
