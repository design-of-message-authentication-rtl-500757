// tb_sha1_w16: loads random blocks and compares the word presented at each of
// the 80 steps with an eighty-word expansion computed in the testbench.
module tb_sha1_w16;
  timeunit 1ns; timeprecision 1ps;
  logic         clk = 0, load = 0, shift = 0;
  logic [511:0] blk;
  logic [31:0]  w_t;
  logic [31:0]  w [80];
  int checks = 0, failures = 0;

  sha1_w16 dut (.clk, .load, .blk, .shift, .w_t);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk = '0;
    for (int n = 0; n < 4; n++) begin
      for (int i = 0; i < 16; i++) blk[511-32*i -: 32] = $urandom;
      for (int t = 0; t < 16; t++) w[t] = blk[511-32*t -: 32];
      for (int t = 16; t < 80; t++) begin
        logic [31:0] x;
        x = w[t-3] ^ w[t-8] ^ w[t-14] ^ w[t-16];
        w[t] = {x[30:0], x[31]};
      end
      @(negedge clk); load = 1;
      @(negedge clk); load = 0;
      for (int t = 0; t < 80; t++) begin
        checks++;
        if (w_t !== w[t]) begin failures++; if (failures < 10) $display("FAIL W%0d = %h want %h", t, w_t, w[t]); end
        // an idle cycle must hold the window
        if (t == 40) begin
          @(negedge clk);
          checks++;
          if (w_t !== w[t]) begin failures++; $display("FAIL hold"); end
        end
        shift = 1;
        @(negedge clk);
        shift = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
