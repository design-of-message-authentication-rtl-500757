// tb_mac_link: a sender and a receiver joined by a channel with an attacker,
// the complete exchange of the MAC scheme.
//
// The sender device generates the MAC of a 128-bit message.  The channel
// delivers message and MAC, possibly altered: unchanged, one MAC byte
// replaced, or one message bit flipped.  The receiver hashes the message it
// got with a SHA-1 core of its own (padding done here), keeps the left-most
// 128 bits, and lets its own MAC device decrypt the MAC and contrast the two
// digests.  An unaltered exchange must match and every altered one must not.
// The first exchange uses message 00112233445566778899aabbccddeeff, key
// 000102030405060708090a0b0c0d0e0f and the MAC byte change that turns
// 4ebc7a40bebe5f78... into 4ebc7a40bebe4078...; its values are checked
// against known results.  Further exchanges use random messages and keys.
module tb_mac_link;
  timeunit 1ns; timeprecision 1ps;
  localparam logic [159:0] H0 =
    {32'h67452301, 32'hEFCDAB89, 32'h98BADCFE, 32'h10325476, 32'hC3D2E1F0};

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  // sender
  logic         s_start = 0, s_done, s_match, s_valid;
  logic [127:0] s_msg, s_key, s_mac;
  mac_top sender (
    .clk, .rst, .start(s_start), .de_encrypt(1'b0), .data_in(s_msg), .key_in(s_key),
    .data_out(s_mac), .done(s_done), .own_digest(128'h0),
    .digest_match(s_match), .match_valid(s_valid)
  );

  // receiver: own SHA-1 and its MAC device in verification mode
  logic         h_start = 0, h_done, h_busy;
  logic [511:0] h_blk;
  logic [159:0] h_cv;
  sha1_core rx_sha (
    .clk, .rst, .start(h_start), .blk(h_blk), .cv_in(H0),
    .cv_out(h_cv), .done(h_done), .busy(h_busy)
  );

  logic         r_start = 0, r_done, r_match, r_valid;
  logic [127:0] r_mac, r_key, r_out;
  mac_top receiver (
    .clk, .rst, .start(r_start), .de_encrypt(1'b1), .data_in(r_mac), .key_in(r_key),
    .data_out(r_out), .done(r_done), .own_digest(h_cv[159:32]),
    .digest_match(r_match), .match_valid(r_valid)
  );

  int checks = 0, failures = 0;
  int n_clean = 0, n_mac_forged = 0, n_msg_forged = 0, n_accept = 0, n_reject = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input logic [127:0] m, input logic [127:0] k, output logic [127:0] mac);
    @(negedge clk);
    s_msg = m; s_key = k; s_start = 1;
    @(negedge clk);
    s_start = 0;
    while (!s_done) @(negedge clk);
    mac = s_mac;
  endtask

  // Returns 1 when the receiver accepts (m, mac).
  task automatic receive(input logic [127:0] m, input logic [127:0] mac,
                         input logic [127:0] k, output logic ok);
    @(negedge clk);
    h_blk = {m, 1'b1, 319'h0, 64'd128}; h_start = 1;
    @(negedge clk);
    h_start = 0;
    while (!h_done) @(negedge clk);
    r_mac = mac; r_key = k; r_start = 1;
    @(negedge clk);
    r_start = 0;
    while (!r_done) @(negedge clk);
    check(r_valid === 1'b1, "contrast result with done");
    ok = r_match;
    if (ok) n_accept++; else n_reject++;
  endtask

  task automatic exchange(input logic [127:0] m, input logic [127:0] k, input int attack);
    logic [127:0] mac, m_rx, mac_rx;
    logic         ok;
    int           pos;
    send(m, k, mac);
    m_rx = m; mac_rx = mac;
    pos = $urandom % 16;
    case (attack)
      1: begin mac_rx[127-8*pos -: 8] = mac[127-8*pos -: 8] ^ 8'(1 + $urandom % 255); n_mac_forged++; end
      2: begin m_rx = m ^ (128'h1 << ($urandom % 128)); n_msg_forged++; end
      default: n_clean++;
    endcase
    receive(m_rx, mac_rx, k, ok);
    check(ok == (attack == 0), $sformatf("attack %0d: receiver %s", attack, ok ? "accepted" : "rejected"));
  endtask

  initial begin
    logic [127:0] mac;
    logic         ok;
    s_msg = '0; s_key = '0; h_blk = '0; r_mac = '0; r_key = '0;
    repeat (3) @(negedge clk);
    rst = 0;

    // The worked example, with the MAC byte change of the example.
    send(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, mac);
    check(mac === 128'h4ebc7a40bebe5f78c91a592c527a4e9f, $sformatf("example MAC %h", mac));
    receive(128'h00112233445566778899aabbccddeeff, mac, 128'h000102030405060708090a0b0c0d0e0f, ok);
    check(ok === 1'b1 && r_out === 128'h739e0e8490eacbcb2ea11d4a5dbefbae, "example accepted");
    n_clean++;
    receive(128'h00112233445566778899aabbccddeeff, 128'h4ebc7a40bebe4078c91a592c527a4e9f,
            128'h000102030405060708090a0b0c0d0e0f, ok);
    check(ok === 1'b0 && r_out === 128'hb1a2533ec438eb6cfb14af34fa3554fd, "falsified example rejected");
    n_mac_forged++;

    for (int i = 0; i < 12; i++)
      exchange({$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom}, i % 3);

    $display("exchanges: clean=%0d mac_forged=%0d msg_forged=%0d accepted=%0d rejected=%0d",
             n_clean, n_mac_forged, n_msg_forged, n_accept, n_reject);
    check(n_clean > 0 && n_mac_forged > 0 && n_msg_forged > 0, "every attack case ran");
    check(n_accept > 0 && n_reject > 0, "both verdicts occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
