// tb_aes_key_expand: runs the key schedule forward over all eleven round keys
// of two cipher keys (FIPS-197 Appendix A.1 style values from an independent
// model) and then backward to round key 0, checking rk_d, rk_q and rnd_q at
// every step.
module tb_aes_key_expand;
  timeunit 1ns; timeprecision 1ps;
  logic         clk = 0, rst = 1, load = 0, step_fwd = 0, step_rev = 0;
  logic [127:0] key, rk_q, rk_d;
  logic [3:0]   rnd_q;
  int checks = 0, failures = 0;

  localparam logic [127:0] RK_A [11] = '{
    128'h000102030405060708090a0b0c0d0e0f, 128'hd6aa74fdd2af72fadaa678f1d6ab76fe,
    128'hb692cf0b643dbdf1be9bc5006830b3fe, 128'hb6ff744ed2c2c9bf6c590cbf0469bf41,
    128'h47f7f7bc95353e03f96c32bcfd058dfd, 128'h3caaa3e8a99f9deb50f3af57adf622aa,
    128'h5e390f7df7a69296a7553dc10aa31f6b, 128'h14f9701ae35fe28c440adf4d4ea9c026,
    128'h47438735a41c65b9e016baf4aebf7ad2, 128'h549932d1f08557681093ed9cbe2c974e,
    128'h13111d7fe3944a17f307a78b4d2b30c5};
  localparam logic [127:0] RK_B [11] = '{
    128'h0702f5a3c49364cc514d0f07c64a1dc2, 128'hd0a6d0171435b4db4578bbdc8332a61e,
    128'hf182a2fbe5b71620a0cfadfc23fd0be2, 128'ha1a93add441e2cfde4d18101c72c8ae3,
    128'hd8d72b1b9cc907e6781886e7bf340c04, 128'hd029d9134ce0def534f858128bcc5416,
    128'hbb099e2ef7e940dbc31118c948dd4cdf, 128'h3a20007ccdc940a70ed8586e460514b1,
    128'hd1dac8261c13888112cbd0ef54cec45e, 128'h41c690065dd518874f1ec8681bd00c36,
    128'h073895a95aed8d2e15f345460e234970};

  aes_key_expand dut (.clk, .rst, .load, .key, .step_fwd, .step_rev, .rk_q, .rk_d, .rnd_q);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [127:0] rks [11]);
    @(negedge clk);
    key = rks[0]; load = 1;
    @(negedge clk);
    load = 0;
    checks++;
    if (rk_q !== rks[0] || rnd_q !== 0) begin failures++; $display("FAIL load"); end
    for (int r = 1; r <= 10; r++) begin
      step_fwd = 1; #1;
      checks++;
      if (rk_d !== rks[r]) begin failures++; $display("FAIL fwd rk_d %0d: %h", r, rk_d); end
      @(negedge clk);
      checks++;
      if (rk_q !== rks[r] || rnd_q !== 4'(r)) begin failures++; $display("FAIL fwd %0d: %h", r, rk_q); end
    end
    step_fwd = 0;
    for (int r = 9; r >= 0; r--) begin
      step_rev = 1; #1;
      checks++;
      if (rk_d !== rks[r]) begin failures++; $display("FAIL rev rk_d %0d: %h", r, rk_d); end
      @(negedge clk);
      checks++;
      if (rk_q !== rks[r] || rnd_q !== 4'(r)) begin failures++; $display("FAIL rev %0d: %h", r, rk_q); end
    end
    step_rev = 0;
  endtask

  initial begin
    key = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    run(RK_A);
    run(RK_B);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
