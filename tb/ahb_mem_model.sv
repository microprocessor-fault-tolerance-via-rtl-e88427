// ahb_mem_model: behavioural AHB slave (storage memory) plus a one-master
// arbiter, for testbenches. Reads return tb_ref_pkg::mem_word(address).
// Each transfer gets a random number of wait states (0..MAX_WAIT, with
// probability WAIT_PCT percent of having any) and, while the master
// requests the bus, the grant is withdrawn on a random DROP_PCT percent of
// cycles. It checks the master's protocol: transfers only while owning the
// bus, SEQ only directly after a transfer of the same burst to the previous
// address plus 4, no 1 KB boundary crossed by SEQ, reads only, word size.
module ahb_mem_model
  import ft_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int WAIT_PCT = 0,
  parameter int MAX_WAIT = 2,
  parameter int DROP_PCT = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hbusreq,
  output logic        hgrant,
  input  logic [1:0]  htrans,
  input  logic [31:0] haddr,
  input  logic        hwrite,
  input  logic [2:0]  hsize,
  output logic        hready,
  output logic [1:0]  hresp,
  output logic [31:0] hrdata,
  output int          errors,
  output int          wait_cycles,
  output int          grant_drops,
  output int          transfers
);

  logic        dph_q, owner_q, last_active_q;
  logic [31:0] daddr_q, last_addr_q;
  int          wait_q;

  assign hready = !dph_q || (wait_q == 0);
  assign hrdata = (dph_q && wait_q == 0) ? mem_word(daddr_q) : 32'hDEAD_BEEF;
  assign hresp  = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dph_q <= 1'b0; owner_q <= 1'b0; last_active_q <= 1'b0;
      daddr_q <= '0; last_addr_q <= '0; wait_q <= 0;
      hgrant <= 1'b0; errors <= 0; wait_cycles <= 0; grant_drops <= 0; transfers <= 0;
    end else begin
      if (hbusreq && DROP_PCT > 0 && $urandom_range(99, 0) < DROP_PCT) begin
        hgrant <= 1'b0;
        grant_drops <= grant_drops + 1;
      end else begin
        hgrant <= hbusreq;
      end
      if (dph_q && wait_q > 0) begin
        wait_q <= wait_q - 1;
        wait_cycles <= wait_cycles + 1;
      end
      if (hready) begin
        owner_q <= hgrant;
        if (htrans[1]) begin
          transfers <= transfers + 1;
          if (!owner_q) begin errors <= errors + 1; $display("AHB: transfer without grant"); end
          if (hwrite || hsize != HSIZE_WORD) begin errors <= errors + 1; $display("AHB: bad transfer type"); end
          if (htrans == HTRANS_SEQ &&
              (!last_active_q || haddr != last_addr_q + 32'd4 || haddr[9:0] == 10'd0)) begin
            errors <= errors + 1; $display("AHB: bad SEQ at %h", haddr);
          end
          dph_q   <= 1'b1;
          daddr_q <= haddr;
          wait_q  <= (WAIT_PCT > 0 && $urandom_range(99, 0) < WAIT_PCT) ? $urandom_range(MAX_WAIT, 1) : 0;
          last_addr_q <= haddr;
        end else begin
          dph_q <= 1'b0;
        end
        last_active_q <= htrans[1];
      end
    end
  end

endmodule
