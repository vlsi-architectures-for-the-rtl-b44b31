// tb_sdct_lifting: drives random pairs and angles into the lifting rotator
// every cycle and checks, two cycles later, (1) the exact integer result of the
// three lifting steps and (2) that it is within 4 LSB + |x|/128 (Q8 constants) of the ideal rotation
// [cos sin; -sin cos].
module tb_sdct_lifting;
  import sdct_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] x1, x2, y1, y2;
  logic [7:0] p, u_mag;
  int checks = 0, failures = 0;
  int ex1 [$], ex2 [$], er1 [$], er2 [$], tol [$];

  sdct_lifting #(.W(16)) dut (.clk, .rst_n, .x1, .x2, .p, .u_mag, .y1, .y2);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, i1, i2, r1, r2;
    real t;
    x1 = 0; x2 = 0; p = 0; u_mag = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2002; i++) begin
      @(negedge clk);
      if (i >= 2) begin
        checks += 2;
        if (y1 != 16'(er1[0]) || y2 != 16'(er2[0])) begin
          failures++;
          $display("pair %0d: got (%0d,%0d) expected (%0d,%0d)", i-2, y1, y2, er1[0], er2[0]);
        end
        if ((int'(y1) - ex1[0]) > tol[0] || (ex1[0] - int'(y1)) > tol[0] ||
            (int'(y2) - ex2[0]) > tol[0] || (ex2[0] - int'(y2)) > tol[0]) begin
          failures++;
          $display("pair %0d: (%0d,%0d) too far from ideal (%0d,%0d)", i-2, y1, y2, ex1[0], ex2[0]);
        end
        void'(er1.pop_front()); void'(er2.pop_front());
        void'(ex1.pop_front()); void'(ex2.pop_front()); void'(tol.pop_front());
      end
      a  = (i < 16) ? i % 8 : int'($urandom_range(0, 7));
      i1 = int'($urandom_range(0, 40000)) - 20000;
      i2 = int'($urandom_range(0, 40000)) - 20000;
      x1 = 16'(i1); x2 = 16'(i2);
      p = 8'(ref_p(a)); u_mag = 8'(ref_u(a));
      ref_rot(i1, i2, a, r1, r2);
      er1.push_back(r1); er2.push_back(r2);
      t = a * PI / 16.0;
      // Q8 constants: error grows with the magnitude of the inputs
      tol.push_back(4 + ((i1 < 0 ? -i1 : i1) + (i2 < 0 ? -i2 : i2)) / 128);
      ex1.push_back(int'($floor($cos(t) * i1 + $sin(t) * i2 + 0.5)));
      ex2.push_back(int'($floor(-$sin(t) * i1 + $cos(t) * i2 + 0.5)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
