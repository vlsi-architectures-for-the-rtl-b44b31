// tb_sdct_rom: checks the lifting-coefficient ROM against P = 256*tan(t/2) and
// |U| = 256*sin(t), t = angle*pi/16, recomputed with real arithmetic.
module tb_sdct_rom;
  import sdct_tb_pkg::*;
  logic [2:0] angle;
  logic [7:0] p, u_mag;
  int checks = 0, failures = 0;

  sdct_rom dut (.angle, .p, .u_mag);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++) begin
      angle = 3'(a);
      #1;
      checks += 2;
      if (int'(p) != ref_p(a)) begin
        failures++; $display("angle %0d: P=%0d expected %0d", a, p, ref_p(a));
      end
      if (int'(u_mag) != ref_u(a)) begin
        failures++; $display("angle %0d: |U|=%0d expected %0d", a, u_mag, ref_u(a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
