// tb_digest_contrast: equal and unequal digest pairs (including a single
// flipped bit in each byte position) must set match accordingly one cycle
// after check; match must hold while check is low.
module tb_digest_contrast;
  timeunit 1ns; timeprecision 1ps;
  logic         clk = 0, rst = 1, check = 0, match, valid;
  logic [127:0] a, b;
  int checks = 0, failures = 0;

  digest_contrast #(.WIDTH(128)) dut (.clk, .rst, .check, .dec_digest(a), .own_digest(b), .match, .valid);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input logic [127:0] x, input logic [127:0] y, input logic want);
    @(negedge clk);
    a = x; b = y; check = 1;
    @(negedge clk);
    check = 0;
    checks++;
    if (match !== want || valid !== 1'b1) begin failures++; $display("FAIL %h vs %h -> %b", x, y, match); end
    a = ~x;
    @(negedge clk);
    checks++;
    if (match !== want || valid !== 1'b0) begin failures++; $display("FAIL hold"); end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    compare(128'h739e0e8490eacbcb2ea11d4a5dbefbae, 128'h739e0e8490eacbcb2ea11d4a5dbefbae, 1'b1);
    compare(128'hb1a2533ec438eb6cfb14af34fa3554fd, 128'h739e0e8490eacbcb2ea11d4a5dbefbae, 1'b0);
    for (int i = 0; i < 16; i++) begin
      logic [127:0] r;
      r = {$urandom, $urandom, $urandom, $urandom};
      compare(r, r, 1'b1);
      compare(r, r ^ (128'h1 << (8*i + i % 8)), 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
