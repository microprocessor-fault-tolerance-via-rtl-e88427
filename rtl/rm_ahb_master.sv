// rm_ahb_master: AMBA AHB (rev 2.0) bus master of the Reconfiguration Manager.
// It reads a partial bitstream of words_i 32-bit words from storage memory,
// starting at byte address addr_i, and pushes each word into the bitstream
// buffer.
//
// After start_i it requests the bus (hbusreq_o) and, while granted, issues
// back-to-back single-word reads as an undefined-length incrementing burst:
// NONSEQ for the first beat, after any gap, and at each 1 KB boundary
// (which a burst may not cross), SEQ otherwise. Address and data phases are
// pipelined: one word per cycle with a zero-wait-state memory. hready_i low
// stretches the current phases. A new address phase is started only if the
// buffer has room for every read then in flight (free_i), so the buffer can
// never overflow. done_o pulses for one cycle after the last word was pushed.
// The published design specifies an AHB master that fetches bitstreams from memory;
// the burst style and flow control are this design's choices. Error, retry
// and split responses are not handled (the storage memory is assumed to
// answer OKAY).
module rm_ahb_master
  import ft_pkg::*;
#(
  parameter int unsigned CNT_W  = 24,
  parameter int unsigned FREE_W = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  // command
  input  logic              start_i,
  input  logic [31:0]       addr_i,
  input  logic [CNT_W-1:0]  words_i,
  output logic              busy_o,
  output logic              done_o,
  // buffer side
  input  logic [FREE_W-1:0] free_i,
  output logic              push_o,
  output logic [31:0]       data_o,
  // AHB master interface
  output logic              hbusreq_o,
  input  logic              hgrant_i,
  output logic [1:0]        htrans_o,
  output logic [31:0]       haddr_o,
  output logic              hwrite_o,
  output logic [2:0]        hsize_o,
  output logic [2:0]        hburst_o,
  output logic [3:0]        hprot_o,
  output logic [31:0]       hwdata_o,
  input  logic              hready_i,
  input  logic [1:0]        hresp_i,
  input  logic [31:0]       hrdata_i
);

  logic             busy_q, aph_q, dph_q;
  logic [CNT_W-1:0] words_q, issued_q, recvd_q;
  logic [31:0]      next_addr_q;
  logic             want_issue;
  logic [FREE_W:0]  need;

  assign push_o = dph_q && hready_i;
  assign data_o = hrdata_i;

  // Room needed in the buffer if a new address phase starts now: the new
  // read, the read whose address phase ends now, and this cycle's push.
  assign need       = (FREE_W+1)'(1) + (FREE_W+1)'(aph_q) + (FREE_W+1)'(push_o);
  assign want_issue = busy_q && (issued_q != words_q) && hgrant_i
                      && ((FREE_W+1)'(free_i) >= need);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q      <= 1'b0;
      aph_q       <= 1'b0;
      dph_q       <= 1'b0;
      words_q     <= '0;
      issued_q    <= '0;
      recvd_q     <= '0;
      next_addr_q <= '0;
      htrans_o    <= HTRANS_IDLE;
      haddr_o     <= '0;
      done_o      <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (start_i && !busy_q) begin
        busy_q      <= (words_i != '0);
        done_o      <= (words_i == '0);
        words_q     <= words_i;
        issued_q    <= '0;
        recvd_q     <= '0;
        next_addr_q <= {addr_i[31:2], 2'b00};
      end else if (busy_q && hready_i) begin
        if (dph_q) begin
          recvd_q <= recvd_q + CNT_W'(1);
          if (recvd_q + CNT_W'(1) == words_q) begin
            busy_q <= 1'b0;
            done_o <= 1'b1;
          end
        end
        dph_q <= aph_q;
        if (want_issue) begin
          htrans_o    <= (aph_q && next_addr_q[9:0] != 10'd0) ? HTRANS_SEQ : HTRANS_NONSEQ;
          haddr_o     <= next_addr_q;
          next_addr_q <= next_addr_q + 32'd4;
          issued_q    <= issued_q + CNT_W'(1);
          aph_q       <= 1'b1;
        end else begin
          htrans_o <= HTRANS_IDLE;
          aph_q    <= 1'b0;
        end
      end else if (!busy_q && hready_i) begin
        htrans_o <= HTRANS_IDLE;
        aph_q    <= 1'b0;
        dph_q    <= 1'b0;
      end
    end
  end

  assign busy_o    = busy_q;
  assign hbusreq_o = busy_q && (issued_q != words_q);
  assign hwrite_o  = 1'b0;
  assign hsize_o   = HSIZE_WORD;
  assign hburst_o  = HBURST_INCR;
  assign hprot_o   = 4'b0011;     // data access, privileged
  assign hwdata_o  = '0;

  // The master only moves the bus when it owns it.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (htrans_o != HTRANS_IDLE && !hready_i) |=> $stable(haddr_o) && $stable(htrans_o))
    else $error("rm_ahb_master: address phase changed while hready low");

endmodule
