// tb_gf_inv: exhaustive check of the field inverter: inv(0) = 0, and for
// every non-zero a, a * inv(a) = 1 computed with the testbench's own
// multiplier; also the FIPS-197 pair {53}^-1 = {ca}.
module tb_gf_inv;
  timeunit 1ns; timeprecision 1ps;
  logic [7:0] a, inv;
  int checks = 0, failures = 0;

  gf_inv dut (.a, .inv);

  function automatic logic [7:0] ref_mul(logic [7:0] x, logic [7:0] y);
    logic [7:0] r = 0;
    for (int i = 0; i < 8; i++) begin
      if (y[i]) r ^= x;
      x = x[7] ? ((x << 1) ^ 8'h1B) : (x << 1);
    end
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 8'h53; #1;
    checks++; if (inv !== 8'hCA) begin failures++; $display("FAIL inv(53) = %h", inv); end
    a = 8'h00; #1;
    checks++; if (inv !== 8'h00) begin failures++; $display("FAIL inv(0) = %h", inv); end
    for (int i = 1; i < 256; i++) begin
      a = 8'(i); #1;
      checks++;
      if (ref_mul(a, inv) !== 8'h01) begin
        failures++;
        if (failures < 10) $display("FAIL inv(%h) = %h", a, inv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
