// rm_buffer: the small bitstream buffer between the Reconfiguration Manager's
// AHB master and the ICAP writer, so that bus wait states and arbitration
// gaps do not starve the configuration port.
//
// A synchronous first-word-fall-through FIFO: dout_o shows the oldest word
// whenever empty_o is low; pop_i removes it at the clock edge, push_i stores
// din_i. Push and pop in the same cycle are allowed (also when full, if a pop
// makes room). free_o reports the number of free entries, which the master
// uses to never have more reads in flight than there is room for.
// The published design asks only for "a small SRAM buffer"; its depth (16 words) and
// organisation are this design's choices.
module rm_buffer #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push_i,
  input  logic [W-1:0]               din_i,
  input  logic                       pop_i,
  output logic [W-1:0]               dout_o,
  output logic                       empty_o,
  output logic                       full_o,
  output logic [$clog2(DEPTH+1)-1:0] free_o
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr_q, rd_ptr_q;
  logic [CW-1:0] cnt_q;
  logic          do_push, do_pop;

  assign empty_o = (cnt_q == '0);
  assign full_o  = (cnt_q == CW'(DEPTH));
  assign free_o  = CW'(DEPTH) - cnt_q;
  assign dout_o  = mem[rd_ptr_q];

  assign do_pop  = pop_i && !empty_o;
  assign do_push = push_i && (!full_o || do_pop);

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr_q] <= din_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr_q <= '0;
      rd_ptr_q <= '0;
      cnt_q    <= '0;
    end else begin
      if (do_push) wr_ptr_q <= next_ptr(wr_ptr_q);
      if (do_pop)  rd_ptr_q <= next_ptr(rd_ptr_q);
      cnt_q <= cnt_q + CW'(do_push) - CW'(do_pop);
    end
  end

  // A push into a full buffer without a pop is a flow-control error.
  assert property (@(posedge clk) disable iff (!rst_n) !(push_i && full_o && !pop_i))
    else $error("rm_buffer: push while full");

endmodule
