// tb_aes_sbox: checks ByteSub against FIPS-197 S-box entries, checks that the
// inverse direction undoes the forward one for all 256 bytes, and checks
// that the forward S-box is a permutation with no fixed points.
module tb_aes_sbox;
  timeunit 1ns; timeprecision 1ps;
  logic [7:0] x, y;
  logic       dec;
  logic [7:0] fwd [256];
  int checks = 0, failures = 0;

  aes_sbox dut (.x, .dec, .y);

  task automatic expect_fwd(logic [7:0] in, logic [7:0] out);
    x = in; dec = 1'b0; #1;
    checks++;
    if (y !== out) begin failures++; $display("FAIL S(%h) = %h, want %h", in, y, out); end
    x = out; dec = 1'b1; #1;
    checks++;
    if (y !== in) begin failures++; $display("FAIL InvS(%h) = %h, want %h", out, y, in); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Entries of the FIPS-197 S-box table.
    expect_fwd(8'h00, 8'h63);
    expect_fwd(8'h01, 8'h7C);
    expect_fwd(8'h10, 8'hCA);
    expect_fwd(8'h53, 8'hED);
    expect_fwd(8'h8F, 8'h73);
    expect_fwd(8'hC9, 8'hDD);
    expect_fwd(8'hFF, 8'h16);
    for (int i = 0; i < 256; i++) begin
      x = 8'(i); dec = 1'b0; #1;
      fwd[i] = y;
      checks++;
      if (y == x) begin failures++; $display("FAIL fixed point %h", x); end
      x = y; dec = 1'b1; #1;
      checks++;
      if (y !== 8'(i)) begin failures++; if (failures < 10) $display("FAIL round trip %h", i); end
    end
    for (int i = 0; i < 256; i++)
      for (int j = i + 1; j < 256; j++)
        if (fwd[i] == fwd[j]) begin failures++; $display("FAIL S(%h) == S(%h)", i, j); end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
