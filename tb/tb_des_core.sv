// tb_des_core: encrypts and decrypts the published and independently
// computed DES test vectors, checks the latency (one load cycle and 16
// rounds: the result 17 cycles after start) and that busy is
// high for exactly the 16 rounds.
module tb_des_core;
  import tb_ref_pkg::*;
  logic        clk = 0, rst_n = 0, start_i = 0, decrypt_i = 0;
  logic [63:0] key_i = 0, data_i = 0, data_o;
  logic        busy_o, done_o;
  int          checks = 0, failures = 0;

  des_core dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic run(input logic [63:0] k, input logic [63:0] d, input logic dec, output logic [63:0] r);
    int lat;
    @(negedge clk); key_i = k; data_i = d; decrypt_i = dec; start_i = 1;
    @(negedge clk); start_i = 0; key_i = '1; data_i = '1;   // inputs need not be held
    lat = 1;
    while (!done_o) begin chk(busy_o, "busy while computing"); @(negedge clk); lat++; end
    chk(lat == 17, $sformatf("load plus 16 rounds (%0d)", lat));
    chk(!busy_o, "idle when done");
    r = data_o;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] r;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NDES; i++) begin
      run(DES_VECS[i].key, DES_VECS[i].pt, 1'b0, r);
      chk(r == DES_VECS[i].ct, $sformatf("encrypt vector %0d: %h", i, r));
      run(DES_VECS[i].key, DES_VECS[i].ct, 1'b1, r);
      chk(r == DES_VECS[i].pt, $sformatf("decrypt vector %0d: %h", i, r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
