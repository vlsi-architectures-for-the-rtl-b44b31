// sdct_rom: lifting-coefficient ROM of the steerable block.
//
// Maps the 3-bit steering-angle index to the two lifting constants of Eq. (3)
// and (4) in Q8: P = (1-cos t)/sin t and the magnitude of U = -sin t (U is always
// negative or zero for the angles used, so only |U| is stored). Index 0 is no
// rotation (P = U = 0). Purely combinational; the values are those of
// sdct_pkg::lift_p / lift_u_mag (t = i*pi/16, an implementation choice).
module sdct_rom
  import sdct_pkg::*;
(
  input  angle_t     angle,
  output logic [7:0] p,
  output logic [7:0] u_mag
);
  always_comb begin
    p     = lift_p(angle);
    u_mag = lift_u_mag(angle);
  end
endmodule
