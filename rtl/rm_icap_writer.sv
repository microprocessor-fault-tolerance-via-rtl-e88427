// rm_icap_writer: moves bitstream words from the buffer into the 32-bit
// configuration port (ICAP) of the FPGA, one word per clock cycle at most.
//
// After start_i it pops the buffer whenever a word is waiting and the port
// can take one, and presents it on icap_i_o with icap_ce_n_o = 0 and
// icap_write_n_o = 0 (both active low, as on the Virtex-4 ICAP). A word
// presented while icap_busy_i is high is held until the port accepts it.
// done_o pulses once words_i words have been accepted; the port is then
// deselected.
// The published design gives the 32-bit port and its one-word-per-cycle rate; the
// hold-on-busy rule is this design's choice.
module rm_icap_writer #(
  parameter int unsigned CNT_W = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  logic [CNT_W-1:0]  words_i,
  output logic              done_o,
  // buffer side
  input  logic              empty_i,
  input  logic [31:0]       data_i,
  output logic              pop_o,
  // configuration port
  output logic              icap_ce_n_o,
  output logic              icap_write_n_o,
  output logic [31:0]       icap_i_o,
  input  logic              icap_busy_i
);

  logic             active_q;
  logic [CNT_W-1:0] words_q, popped_q, written_q;
  logic             accepted, can_present;

  assign accepted    = !icap_ce_n_o && !icap_busy_i;
  assign can_present = icap_ce_n_o || accepted;
  assign pop_o       = active_q && can_present && !empty_i && (popped_q != words_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q       <= 1'b0;
      words_q        <= '0;
      popped_q       <= '0;
      written_q      <= '0;
      icap_ce_n_o    <= 1'b1;
      icap_write_n_o <= 1'b1;
      icap_i_o       <= '0;
      done_o         <= 1'b0;
    end else begin
      done_o <= 1'b0;
      if (start_i && !active_q) begin
        active_q       <= (words_i != '0);
        done_o         <= (words_i == '0);
        words_q        <= words_i;
        popped_q       <= '0;
        written_q      <= '0;
        icap_write_n_o <= (words_i == '0);
      end else if (active_q) begin
        if (accepted) begin
          written_q <= written_q + CNT_W'(1);
          if (written_q + CNT_W'(1) == words_q) begin
            active_q       <= 1'b0;
            done_o         <= 1'b1;
            icap_write_n_o <= 1'b1;
          end
        end
        if (can_present) begin
          if (pop_o) begin
            icap_ce_n_o <= 1'b0;
            icap_i_o    <= data_i;
            popped_q    <= popped_q + CNT_W'(1);
          end else begin
            icap_ce_n_o <= 1'b1;
          end
        end
      end else begin
        icap_ce_n_o <= 1'b1;
      end
    end
  end

endmodule
