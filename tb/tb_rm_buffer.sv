// tb_rm_buffer: random push/pop traffic against a queue model, including
// filling to full, simultaneous push and pop when full, and draining.
module tb_rm_buffer;
  localparam int D = 16;
  logic        clk = 0, rst_n = 0, push_i = 0, pop_i = 0;
  logic [31:0] din_i = 0, dout_o;
  logic        empty_o, full_o;
  logic [4:0]  free_o;
  int          checks = 0, failures = 0, fulls = 0;
  logic [31:0] q[$];

  rm_buffer #(.W(32), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int push_pct;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      push_pct = ((i / 500) % 2 != 0) ? 80 : 30;
      @(negedge clk);
      chk(empty_o == (q.size() == 0) && full_o == (q.size() == D) && free_o == 5'(D - q.size()), "flags");
      if (q.size() > 0) chk(dout_o == q[0], "head word");
      if (full_o) fulls++;
      push_i = ($urandom_range(99, 0) < push_pct) && (!full_o || q.size() > 0);
      pop_i  = ($urandom_range(99, 0) < 50) && (q.size() > 0);
      if (full_o && push_i) pop_i = 1;
      din_i  = $urandom;
      @(posedge clk);
      if (pop_i) void'(q.pop_front());
      if (push_i) q.push_back(din_i);
    end
    chk(fulls > 0, "buffer reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
