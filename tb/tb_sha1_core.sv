// tb_sha1_core: hashes FIPS 180-1 example messages: "abc" (one block) and the
// 448-bit "abcdbcdecdef..." message (two blocks, chaining cv_out back to
// cv_in), plus the 128-bit message 00112233...eeff, and checks the digests
// and the 82-cycle latency from the start cycle to the done cycle.
module tb_sha1_core;
  timeunit 1ns; timeprecision 1ps;
  localparam logic [159:0] H0 =
    {32'h67452301, 32'hEFCDAB89, 32'h98BADCFE, 32'h10325476, 32'hC3D2E1F0};
  localparam int LAT = 82;

  logic         clk = 0, rst = 1, start = 0, done, busy;
  logic [511:0] blk;
  logic [159:0] cv_in, cv_out;
  int checks = 0, failures = 0;

  sha1_core dut (.clk, .rst, .start, .blk, .cv_in, .cv_out, .done, .busy);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hash(input logic [511:0] b, input logic [159:0] cv, output logic [159:0] res);
    int n;
    @(negedge clk);
    start = 1; blk = b; cv_in = cv;
    @(negedge clk);
    start = 0; blk = '0; cv_in = '0;
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    checks++;
    if (n !== LAT) begin failures++; $display("FAIL latency %0d", n); end
    res = cv_out;
  endtask

  task automatic expect_eq(input logic [159:0] got, input logic [159:0] want, input string what);
    checks++;
    if (got !== want) begin failures++; $display("FAIL %s: %h want %h", what, got, want); end
  endtask

  initial begin
    logic [159:0] h;
    logic [447:0] m2;
    blk = '0; cv_in = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    hash({32'h61626380, 416'h0, 64'd24}, H0, h);
    expect_eq(h, 160'ha9993e364706816aba3e25717850c26c9cd0d89d, "abc");
    m2 = "abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq";
    hash({m2, 1'b1, 63'h0}, H0, h);
    hash({1'b0, 447'h0, 64'd448}, h, h);
    expect_eq(h, 160'h84983e441c3bd26ebaae4aa1f95129e5e54670f1, "two blocks");
    hash({128'h00112233445566778899aabbccddeeff, 1'b1, 319'h0, 64'd128}, H0, h);
    expect_eq(h, 160'h739e0e8490eacbcb2ea11d4a5dbefbae888b092e, "128-bit message");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
