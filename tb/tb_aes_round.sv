// tb_aes_round: one-round vectors from an independent software AES model:
// random state and round key, encryption and decryption, normal and final
// round.
module tb_aes_round;
  timeunit 1ns; timeprecision 1ps;
  typedef struct packed {
    logic [127:0] s;
    logic [127:0] k;
    logic         dec;
    logic         fin;
    logic [127:0] out;
  } vec_t;

  localparam vec_t VECS [8] = '{
    '{128'h0702f5a3c49364cc514d0f07c64a1dc2, 128'h824228ec9b07121f42158c3cdd2e610e, 1'b0, 1'b0, 128'h3f9bb258333ba068370981f2b174706c},
    '{128'hff428e62e5c7a889857c7d1e59b3db1f, 128'hb4d366d9238825805a314d1e68db161b, 1'b1, 1'b0, 128'hdad47879ee420e064459540a0b07d3b1},
    '{128'h2ef0bd32a0144010e241cae40c8a2e80, 128'ha62b9a11c41d85a04285c23b9b30d97d, 1'b0, 1'b1, 128'h97d1eedc249eb483dafbb8f165bcd014},
    '{128'h69a9adc8f63542e50f955066bdc7a631, 128'hd1b040211699a0d598a3b48ba6043e4c, 1'b1, 1'b1, 128'h35812c0bc02e6506637aaca56ba9c8fd},
    '{128'ha2a6a723e78ff5e8bac2281c4418fb80, 128'h7dadb9bdce9dedae550e4b807144395e, 1'b0, 1'b0, 128'h65e0d435bb74286f8dc41c5b51ba6e92},
    '{128'hd21932883668852228256f58dd0bbcf9, 128'h917066fc78d9e7bb60f62583d06704c2, 1'b1, 1'b0, 128'ha88f3619bff69ea60b39d80b3f694a96},
    '{128'hf927ced914b4ea036199023d9aa190d2, 128'hd19de79a43e347538104d912bcd7cd90, 1'b0, 1'b1, 128'h4810902fb90d27666e365269041b4ab7},
    '{128'h092e2e02c489ed8bbef6acc6e93bf7b5, 128'h4ad44b095885bc4193d38493d78cddab, 1'b1, 1'b1, 128'h0a9de1c7d0469a86c92147413c5a8ec1}
  };

  logic [127:0] state_in, rk, state_out;
  logic         dec, final_rnd;
  int checks = 0, failures = 0;

  aes_round dut (.state_in, .rk, .dec, .final_rnd, .state_out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // FIPS-197 Appendix B, round 1.
    state_in = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    rk = 128'ha0fafe1788542cb123a339392a6c7605;
    dec = 1'b0; final_rnd = 1'b0; #1;
    checks++;
    if (state_out !== 128'ha49c7ff2689f352b6b5bea43026a5049) begin
      failures++; $display("FAIL FIPS round 1: %h", state_out);
    end
    foreach (VECS[i]) begin
      state_in = VECS[i].s; rk = VECS[i].k; dec = VECS[i].dec; final_rnd = VECS[i].fin; #1;
      checks++;
      if (state_out !== VECS[i].out) begin
        failures++; $display("FAIL vec %0d: %h want %h", i, state_out, VECS[i].out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
