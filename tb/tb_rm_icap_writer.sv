// tb_rm_icap_writer: feeds the writer from a buffer filled at a random rate
// and models a configuration port that is sometimes busy. Checks that every
// word is accepted exactly once and in order, that a word is held while the
// port is busy, that done pulses once after the last word, that the port is
// deselected afterwards, and that with a full buffer and an idle port one
// word is written per cycle.
module tb_rm_icap_writer;
  logic        clk = 0, rst_n = 0, start_i = 0;
  logic [23:0] words_i = 0;
  logic        done_o, pop_o, icap_ce_n_o, icap_write_n_o, icap_busy_i;
  logic [31:0] icap_i_o;
  logic        push, empty_i, full;
  logic [31:0] din, data_i;
  logic [4:0]  free;
  int          checks = 0, failures = 0, accepted = 0, dones = 0, held = 0;
  int          push_pct = 100, busy_pct = 0, pushed = 0, total = 0;

  rm_icap_writer #(.CNT_W(24)) dut (.*);
  rm_buffer #(.W(32), .DEPTH(16)) u_buf (
    .clk, .rst_n, .push_i(push), .din_i(din), .pop_i(pop_o),
    .dout_o(data_i), .empty_o(empty_i), .full_o(full), .free_o(free));

  always #5 clk = ~clk;

  function automatic logic [31:0] word(input int i);
    return 32'(i) * 32'h0101_0007 + 32'h1234;
  endfunction

  logic push_en;
  always_ff @(negedge clk) push_en <= ($urandom_range(99, 0) < push_pct);
  assign push = push_en && !full && pushed < total;
  assign din  = word(pushed);
  always_ff @(negedge clk) icap_busy_i <= ($urandom_range(99, 0) < busy_pct);

  logic        prev_busy_hold = 0;
  logic [31:0] prev_word;
  always @(posedge clk) begin
    if (push) pushed <= pushed + 1;
    if (!icap_ce_n_o && !icap_write_n_o && !icap_busy_i) begin
      checks++;
      if (icap_i_o !== word(accepted)) begin
        failures++; $display("FAIL ICAP word %0d: %h exp %h", accepted, icap_i_o, word(accepted));
      end
      accepted++;
    end
    if (prev_busy_hold && rst_n) begin
      checks++;
      held++;
      if (icap_ce_n_o || icap_i_o !== prev_word) begin failures++; $display("FAIL word not held while busy at %0t ce_n=%b w=%h prev=%h acc=%0d", $time, icap_ce_n_o, icap_i_o, prev_word, accepted); end
    end
    prev_busy_hold = rst_n && !icap_ce_n_o && icap_busy_i;
    prev_word      = icap_i_o;
    if (done_o) dones++;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run(input int n, output int cycles);
    accepted = 0; dones = 0; pushed = 0; total = n;
    if (push_pct == 100) repeat (20) @(negedge clk);   // prefill
    @(negedge clk); words_i = 24'(n); start_i = 1;
    @(negedge clk); start_i = 0;
    cycles = 1;
    while (dones == 0) begin @(negedge clk); cycles++; end
    repeat (4) @(negedge clk);
    chk(accepted == n && dones == 1, "all words written, one done");
    chk(icap_ce_n_o && icap_write_n_o, "port deselected");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    push_pct = 100; busy_pct = 0;
    run(16, cyc);
    chk(cyc <= 16 + 3, $sformatf("one word per cycle from a full buffer (%0d cycles)", cyc));
    push_pct = 100; busy_pct = 0;
    run(500, cyc);
    chk(cyc <= 500 + 3, $sformatf("one word per cycle, streaming (%0d cycles)", cyc));
    push_pct = 40; busy_pct = 20;
    run(700, cyc);
    chk(held > 0, "busy port exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
