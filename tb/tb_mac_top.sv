// tb_mac_top: end-to-end test of the MAC device at its default parameters.
//
// 1. Generation of the MAC for message 00112233445566778899aabbccddeeff with
//    key 000102030405060708090a0b0c0d0e0f; expected MAC
//    4ebc7a40bebe5f78c91a592c527a4e9f.
// 2. Verification of that MAC: decryption must give the partial digest
//    739e0e8490eacbcb2ea11d4a5dbefbae and the contrast must report a match.
// 3. Verification of a MAC falsified in one byte (4ebc7a40bebe4078...):
//    decryption gives b1a2533ec438eb6cfb14af34fa3554fd and the contrast must
//    report a mismatch.
// 4. Three random message/key pairs, generated and verified, with expected
//    values from an independent software SHA-1 / AES model; each verified
//    once intact and once with a random bit flipped.
// The latency of every operation is checked (94 cycles for generation, 22 for
// verification) as is data_out = 0 after reset.  Counters record how often
// each mechanism happened (generation, verification, match, mismatch) and a
// mechanism that never happened counts as a failure.
module tb_mac_top;
  timeunit 1ns; timeprecision 1ps;
  typedef struct packed {
    logic [127:0] msg;
    logic [127:0] key;
    logic [127:0] digest;
    logic [127:0] mac;
  } vec_t;

  localparam vec_t VECS [4] = '{
    '{128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 128'h739e0e8490eacbcb2ea11d4a5dbefbae, 128'h4ebc7a40bebe5f78c91a592c527a4e9f},
    '{128'ha54dca182530bb1d6d132cded6237b2e, 128'hd91e3f721fcb1971174494d6493c9d5c, 128'h9431ae5cf4de22c0b7095dbc9cc908d4, 128'h396c089f30c6ec4a36dc3a5e2f04796b},
    '{128'h3460be31201e69fedaa0eee8b9997f5c, 128'h7c2999fdafe593253cd654af4dfad714, 128'h6e9d02eb91bcc2d4d458b352efde4557, 128'h52998171518e89247352d9ae1b341283},
    '{128'h27a0aeb3fee9232f8af2211f9ee491c5, 128'hb10becb5563bfc1e6f93427ecbc8fe29, 128'h3ba296a552964baeb27d5f60c9801043, 128'hcfa70f2d5de5a6357d87bb317f8fa328}
  };
  localparam int GEN_LAT = 94;
  localparam int VER_LAT = 22;

  logic         clk = 0, rst = 1, start = 0, de_encrypt = 0, done, digest_match, match_valid;
  logic [127:0] data_in, key_in, data_out, own_digest;
  int checks = 0, failures = 0;
  int n_gen = 0, n_ver = 0, n_match = 0, n_mismatch = 0;

  mac_top dut (
    .clk, .rst, .start, .de_encrypt, .data_in, .key_in, .data_out, .done,
    .own_digest, .digest_match, .match_valid
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Runs one operation and returns data_out; checks the latency.
  task automatic run(input logic mode, input logic [127:0] d, input logic [127:0] k,
                     input logic [127:0] own, output logic [127:0] res);
    int n;
    @(negedge clk);
    start = 1; de_encrypt = mode; data_in = d; key_in = k; own_digest = own;
    @(negedge clk);
    start = 0; data_in = '0; key_in = '0; de_encrypt = ~mode;
    n = 1;
    while (!done) begin
      @(negedge clk);
      n++;
    end
    check(n == (mode ? VER_LAT : GEN_LAT), $sformatf("latency %0d (mode %0d)", n, mode));
    res = data_out;
    if (mode) begin
      n_ver++;
      check(match_valid === 1'b1, "match_valid with done");
      if (digest_match) n_match++; else n_mismatch++;
    end else n_gen++;
  endtask

  initial begin
    logic [127:0] r, bad;
    data_in = '0; key_in = '0; own_digest = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    check(data_out === '0, "data_out after reset");

    // Example: generation, verification of the true MAC, of a falsified one.
    run(1'b0, VECS[0].msg, VECS[0].key, '0, r);
    check(r === 128'h4ebc7a40bebe5f78c91a592c527a4e9f, $sformatf("MAC %h", r));
    run(1'b1, r, VECS[0].key, VECS[0].digest, r);
    check(r === 128'h739e0e8490eacbcb2ea11d4a5dbefbae, $sformatf("decrypted %h", r));
    check(digest_match === 1'b1, "true MAC accepted");
    run(1'b1, 128'h4ebc7a40bebe4078c91a592c527a4e9f, VECS[0].key, VECS[0].digest, r);
    check(r === 128'hb1a2533ec438eb6cfb14af34fa3554fd, $sformatf("falsified decrypted %h", r));
    check(digest_match === 1'b0, "falsified MAC rejected");

    for (int v = 1; v < 4; v++) begin
      run(1'b0, VECS[v].msg, VECS[v].key, '0, r);
      check(r === VECS[v].mac, $sformatf("MAC %0d %h", v, r));
      run(1'b1, VECS[v].mac, VECS[v].key, VECS[v].digest, r);
      check(r === VECS[v].digest && digest_match === 1'b1, $sformatf("verify %0d", v));
      bad = VECS[v].mac ^ (128'h1 << ($urandom % 128));
      run(1'b1, bad, VECS[v].key, VECS[v].digest, r);
      check(digest_match === 1'b0, $sformatf("reject %0d", v));
    end

    $display("mechanisms: generate=%0d verify=%0d match=%0d mismatch=%0d",
             n_gen, n_ver, n_match, n_mismatch);
    check(n_gen > 0, "generation never happened");
    check(n_ver > 0, "verification never happened");
    check(n_match > 0, "match never happened");
    check(n_mismatch > 0, "mismatch never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
