// sdct_lifting: rotation of one coefficient pair by three lifting steps.
//
// Computes (y1, y2) = R(t) (x1, x2) with R = [cos sin; -sin cos] factored, as in
// the published SDCT architecture, into three shears (lifting steps):
//     a  = x1 + (P*x2 >> 8)
//     y2 = x2 + (U*a  >> 8)
//     y1 = a  + (P*y2 >> 8)
// P and U are Q8 constants (U given as its magnitude, U = -u_mag). The three
// multiplications are written as shift-and-add over the bits of the constant,
// as the design prescribes; ">>" is an arithmetic shift (floor).
// Pipeline (implementation choice): a is registered, y2 is registered, y1 is
// combinational from the second register, so y1/y2 are valid two cycles after
// x1/x2 (the caller registers them once more into its output memory).
// y1 and y2 saturate to W bits (rotation can grow a value by up to sqrt(2)).
module sdct_lifting
  import sdct_pkg::*;
#(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] x1,
  input  logic signed [W-1:0] x2,
  input  logic        [7:0]   p,
  input  logic        [7:0]   u_mag,
  output logic signed [W-1:0] y1,
  output logic signed [W-1:0] y2
);
  localparam int IW = W + 12;   // product width before the >>8

  function automatic logic signed [IW-1:0] mul_sa(input logic signed [IW-1:0] x,
                                                  input logic [7:0] c);
    logic signed [IW-1:0] acc;
    acc = '0;
    for (int b = 0; b < 8; b++)
      if (c[b]) acc = acc + (x <<< b);
    return acc;
  endfunction

  function automatic logic signed [W-1:0] sat(input logic signed [IW-1:0] v);
    logic signed [IW-1:0] hi, lo;
    hi = IW'((1 << (W - 1)) - 1);
    lo = -hi - 1;
    if (v > hi)      return {1'b0, {(W-1){1'b1}}};
    else if (v < lo) return {1'b1, {(W-1){1'b0}}};
    else             return v[W-1:0];
  endfunction

  logic signed [IW-1:0] a_q, x2_q, a_q2, y2_q;
  logic signed [IW-1:0] a_d, y2_d, y1_d;
  logic        [7:0]    p_q, u_q, p_q2;

  always_comb begin
    a_d  = IW'(x1) + (mul_sa(IW'(x2), p) >>> QBITS);
    y2_d = x2_q + ((-mul_sa(a_q, u_q)) >>> QBITS);   // U*a = -(|U|*a)
    y1_d = a_q2 + (mul_sa(y2_q, p_q2) >>> QBITS);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; x2_q <= '0; a_q2 <= '0; y2_q <= '0;
      p_q <= '0; u_q <= '0; p_q2 <= '0;
    end else begin
      a_q  <= a_d;
      x2_q <= IW'(x2);
      p_q  <= p;
      u_q  <= u_mag;
      a_q2 <= a_q;
      y2_q <= y2_d;
      p_q2 <= p_q;
    end
  end

  assign y1 = sat(y1_d);
  assign y2 = sat(y2_q);
endmodule
