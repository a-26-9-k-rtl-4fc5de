// composite_inv_tb: exhaustive test of the composite-field inverter.
//
// Applies all 65536 field elements and checks a * inv(a) = 1 with the
// table-based reference multiplier (and inv(0) = 0). Combinational: each
// result is sampled 1 ns after the input changes.
module composite_inv_tb;
  import tb_gf_pkg::*;

  logic [15:0] a, y;
  int checks = 0, failures = 0;

  composite_inv dut (.a(a), .y(y));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build();
    for (int v = 0; v < 65536; v++) begin
      a = 16'(v);
      #1;
      checks++;
      if ((v == 0 && y != 16'h0) || (v != 0 && (mul(a, y) != 16'h1 || y != inv(a)))) begin
        failures++;
        if (failures < 10) $display("inv(%h) = %h, expected %h", a, y, inv(a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
