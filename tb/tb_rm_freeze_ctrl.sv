// tb_rm_freeze_ctrl: checks the freeze/recovery sequence.
//  * transient: an error shorter than the detection window freezes the
//    pipeline only while present, returns to idle and starts no
//    reconfiguration;
//  * permanent: an error that lasts starts the reconfiguration exactly
//    DETECT_CYCLES+1 edges after it was first sampled, freeze is then held
//    by the manager even if the error drops, and after cfg_done the
//    multiplexer switches to the external ALU and the error is ignored.
module tb_rm_freeze_ctrl;
  localparam int N = 8;
  logic       clk = 0, rst_n = 0, error_i = 0, cfg_done_i = 0;
  logic       freeze_o, cfg_start_o, select_alu_o, transient_o;
  logic [1:0] state_o;
  int         checks = 0, failures = 0, starts = 0, transients = 0;

  rm_freeze_ctrl #(.DETECT_CYCLES(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (cfg_start_o) starts++;
    if (transient_o) transients++;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!freeze_o && select_alu_o && state_o == 2'd0, "idle after reset");
    // transient faults of 1..N cycles
    for (int len = 1; len <= N; len++) begin
      @(negedge clk); error_i = 1;
      #1 chk(freeze_o, "freeze follows error at once");
      repeat (len) @(negedge clk);
      error_i = 0;
      #1 chk(!freeze_o, "freeze drops with a transient error");
      repeat (3) @(negedge clk);
      chk(state_o == 2'd0 && select_alu_o, "back to idle after transient");
    end
    chk(starts == 0, "no reconfiguration for transient faults");
    chk(transients == N, "every transient recognised");
    // permanent fault
    @(negedge clk); error_i = 1;
    lat = 0;
    while (!cfg_start_o) begin @(posedge clk); #1 lat++; end
    chk(lat == N + 1, $sformatf("reconfiguration starts after the window (lat=%0d)", lat));
    chk(state_o == 2'd2 && freeze_o, "reconfiguring and frozen");
    @(negedge clk); error_i = 0;
    #1 chk(freeze_o, "manager holds freeze during reconfiguration");
    repeat (20) @(negedge clk);
    chk(freeze_o && select_alu_o, "still frozen, internal ALU selected");
    error_i = 1;
    cfg_done_i = 1; @(negedge clk); cfg_done_i = 0;
    chk(!freeze_o && !select_alu_o && state_o == 2'd3, "repaired: external ALU, freeze released");
    repeat (10) @(negedge clk);
    chk(!freeze_o && starts == 1, "error of replaced ALU ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
