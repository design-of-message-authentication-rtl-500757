// tb_aes_core: encrypts and decrypts the FIPS-197 Appendix C.1 vector and
// four random vectors from an independent software model, checking the
// result and the latency from the cycle with start high to the cycle with
// done high (11 cycles for encryption, 21 for decryption).
module tb_aes_core;
  timeunit 1ns; timeprecision 1ps;
  typedef struct packed {
    logic [127:0] pt;
    logic [127:0] key;
    logic [127:0] ct;
  } vec_t;

  localparam vec_t VECS [5] = '{
    '{128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f, 128'h69c4e0d86a7b0430d8cdb78070b4c55a},
    '{128'h0702f5a3c49364cc514d0f07c64a1dc2, 128'h824228ec9b07121f42158c3cdd2e610e, 128'he1b2e721b8c42c4f8f0e25c2c5d23eb5},
    '{128'hff428e62e5c7a889857c7d1e59b3db1f, 128'hb4d366d9238825805a314d1e68db161b, 128'h8bfed505dc457f4d9dc24c583f5164c9},
    '{128'h2ef0bd32a0144010e241cae40c8a2e80, 128'ha62b9a11c41d85a04285c23b9b30d97d, 128'hc6c36097c09d759b36424524c36da047},
    '{128'h69a9adc8f63542e50f955066bdc7a631, 128'hd1b040211699a0d598a3b48ba6043e4c, 128'h2ef5653fb73dfe70f8c75a1472b55297}
  };

  localparam int ENC_LAT = 11;
  localparam int DEC_LAT = 21;

  logic         clk = 0, rst = 1, start = 0, dec = 0, done, busy;
  logic [127:0] din, key, dout;
  int checks = 0, failures = 0;

  aes_core dut (.clk, .rst, .start, .dec, .din, .key, .dout, .done, .busy);

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic d, input logic [127:0] i, input logic [127:0] k,
                     input logic [127:0] want, input int lat);
    int n;
    @(negedge clk);
    start = 1; dec = d; din = i; key = k;
    @(negedge clk);
    start = 0; din = '0; key = '0;
    n = 1;
    while (!done) begin
      @(negedge clk);
      n++;
    end
    checks++;
    if (dout !== want) begin failures++; $display("FAIL dec=%0d %h -> %h want %h", d, i, dout, want); end
    checks++;
    if (n !== lat) begin failures++; $display("FAIL latency %0d want %0d", n, lat); end
  endtask

  initial begin
    din = '0; key = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    foreach (VECS[v]) begin
      run(1'b0, VECS[v].pt, VECS[v].key, VECS[v].ct, ENC_LAT);
      run(1'b1, VECS[v].ct, VECS[v].key, VECS[v].pt, DEC_LAT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
