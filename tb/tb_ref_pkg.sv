// tb_ref_pkg: reference models used by the testbenches, written
// independently of the RTL: a 64-bit-arithmetic model of the ALU, the
// contents of the bitstream storage memory, and published / independently
// computed DES test vectors (key, plaintext, ciphertext).
package tb_ref_pkg;
  import ft_pkg::*;

  typedef struct packed {
    logic [31:0] result;
    icc_t        icc;
  } alu_ref_t;

  function automatic alu_ref_t alu_ref(input alu_op_e op, input logic [31:0] a, input logic [31:0] b);
    alu_ref_t    r;
    longint      sa, sb, ss;
    logic [63:0] wide;
    int          n;
    r  = '0;
    sa = longint'($signed(a));
    sb = longint'($signed(b));
    n  = int'(b[4:0]);
    case (op)
      ALU_AND:  r.result = a & b;
      ALU_NAND: r.result = ~(a & b);
      ALU_OR:   r.result = a | b;
      ALU_NOR:  r.result = ~(a | b);
      ALU_XOR:  r.result = a ^ b;
      ALU_XNOR: r.result = ~(a ^ b);
      ALU_ADD: begin
        wide = {32'd0, a} + {32'd0, b};
        r.result = wide[31:0];
        r.icc.c  = wide[32];
        ss = sa + sb;
        r.icc.v  = (ss > 64'sd2147483647) || (ss < -64'sd2147483648);
      end
      ALU_SUB: begin
        r.result = a - b;
        r.icc.c  = (a < b);
        ss = sa - sb;
        r.icc.v  = (ss > 64'sd2147483647) || (ss < -64'sd2147483648);
      end
      ALU_SLL: begin wide = {32'd0, a} << n; r.result = wide[31:0]; end
      ALU_SRL: begin wide = {32'd0, a} >> n; r.result = wide[31:0]; end
      ALU_SRA: begin ss = sa >>> n; r.result = ss[31:0]; end
      default: r.result = '0;
    endcase
    r.icc.n = r.result[31];
    r.icc.z = (r.result == 32'd0);
    return r;
  endfunction

  function automatic alu_op_e rand_op();
    return alu_op_e'($urandom_range(10, 0));
  endfunction

  // Storage memory: every bitstream starts with the sync word and the
  // signature of its core; the rest is a fixed hash of the address.
  function automatic logic [31:0] mem_word(input logic [31:0] addr);
    logic [31:0] a;
    a = {addr[31:2], 2'b00};
    if (a == BS_ALU_ADDR || a == BS_DES_ADDR || a == BS_BLANK_ADDR) return CFG_SYNC_WORD;
    if (a == BS_ALU_ADDR + 32'd4)   return SIG_EXT_ALU;
    if (a == BS_DES_ADDR + 32'd4)   return SIG_DES;
    if (a == BS_BLANK_ADDR + 32'd4) return SIG_BLANK;
    return (a * 32'h9E37_79B1) ^ (a >> 11) ^ 32'h5A5A_0F0F;
  endfunction

  typedef struct packed {
    logic [63:0] key;
    logic [63:0] pt;
    logic [63:0] ct;
  } des_vec_t;

  localparam int NDES = 8;
  localparam des_vec_t DES_VECS [NDES] = '{
    '{64'h133457799bbcdff1, 64'h0123456789abcdef, 64'h85e813540f0ab405},
    '{64'h0e329232ea6d0d73, 64'h8787878787878787, 64'h0000000000000000},
    '{64'hf2a74de452e6b438, 64'h6513270e269e0d37, 64'h391bbccb4492fc51},
    '{64'h0c5c7fd0a6a3a450, 64'hd23f0824128b2f33, 64'h57a4490e488dd87a},
    '{64'h1818e811892f902b, 64'h9531985d5d9dc9f8, 64'h1c83b420f9b5ac73},
    '{64'he8e25d940ed90475, 64'h36f675cc81e74ef5, 64'h39cee5c11cdb1c39},
    '{64'h1600a35a099950d8, 64'h6b0d549b6f03675a, 64'h2850d47958dfd9ec},
    '{64'h3d9c172411e20b8f, 64'h8d116ece1738f7d9, 64'h62ce54688eeb83ca}
  };

endpackage
