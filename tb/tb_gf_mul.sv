// tb_gf_mul: exhaustive check of the GF(2^8) multiplier against a
// Russian-peasant reference (shift, reduce by 0x11B, accumulate), plus the
// FIPS-197 example {57}*{83} = {c1}.
module tb_gf_mul;
  timeunit 1ns; timeprecision 1ps;
  logic [7:0] a, b, p;
  int checks = 0, failures = 0;

  gf_mul dut (.a, .b, .p);

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
    a = 8'h57; b = 8'h83; #1;
    checks++; if (p !== 8'hC1) begin failures++; $display("FAIL 57*83 = %h", p); end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j); #1;
        checks++;
        if (p !== ref_mul(a, b)) begin
          failures++;
          if (failures < 10) $display("FAIL %h*%h = %h", a, b, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
