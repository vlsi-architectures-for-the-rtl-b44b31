// sdct_pkg: types, constants and elaboration-time tables shared by the SDCT design.
//
// Contents:
//  * size_t / angle_t: block-size code (0:4, 1:8, 2:16, 3:32 points) and the
//    steering-angle index (0 = no rotation .. 7).
//  * hevc_coef(k, n): entry (k, n) of the 32-point HEVC integer DCT matrix. Every
//    smaller HEVC matrix is embedded in it: C_N[k][n] = C_32[k*32/N][n].
//    Formula: row 0 is 64; otherwise m = k*(2n+1) mod 128 folds onto the 33-entry
//    table T[i] ~ 64*sqrt(2)*cos(i*pi/64) with the sign of cos(m*pi/64).
//  * lift_p / lift_u_mag: lifting constants for the eight angles in Q8:
//    P = round(256*(1-cos t)/sin t) = round(256*tan(t/2)), U = -round(256*sin t),
//    with t = i*pi/16. The rotation formula and the 8 angles follow the
//    SDCT design; the angle spacing i*pi/16 is this implementation's choice.
//  * zz_table(n_log): the custom zig-zag schedule of an N x N block.
//    Slots 0 .. N(N-1)/2-1 are the off-diagonal pairs (r,c)/(c,r) with r>c,
//    visited anti-diagonal by anti-diagonal (r+c = 1, 2, ...), the direction of
//    travel alternating between neighbouring anti-diagonals. The last N/2 slots
//    carry two diagonal elements each, (2j,2j) and (2j+1,2j+1), which are never
//    rotated. N/2 slots are processed per cycle, so a block takes N cycles.
package sdct_pkg;

  localparam int COEF_W = 16;  // width of a DCT / SDCT coefficient
  localparam int PIX_W  = 9;   // width of a residual sample (8-bit video)
  localparam int QBITS  = 8;   // lifting constants are Q8 (">>8" in the lifting)

  typedef logic [1:0] size_t;
  typedef logic [2:0] angle_t;

  // One zig-zag slot: two block positions read/written together.
  typedef struct packed {
    logic       diag;   // both positions are diagonal elements: bypass
    logic [4:0] r1;
    logic [4:0] c1;
    logic [4:0] r2;
    logic [4:0] c2;
  } zz_slot_t;

  function automatic int size_n(input size_t s);
    return 4 << s;
  endfunction

  // Lifting lanes that carry pairs for an N x N block when the steering unit
  // has 'lanes' rotators. At most N/2 are used, so that N*N/2 slots always
  // divide into whole steps.
  function automatic int lanes_for(input int lanes, input size_t s);
    return (lanes < size_n(s) / 2) ? lanes : size_n(s) / 2;
  endfunction

  // Rotation steps per N x N block: N*N/2 slots shared out over the lanes.
  function automatic int steps_for(input int lanes, input size_t s);
    return size_n(s) * size_n(s) / 2 / lanes_for(lanes, s);
  endfunction

  function automatic int unsigned hevc_t(input int i);
    case (i)
      0: return 90;  1: return 90;  2: return 90;  3: return 90;
      4: return 89;  5: return 88;  6: return 87;  7: return 85;
      8: return 83;  9: return 82; 10: return 80; 11: return 78;
     12: return 75; 13: return 73; 14: return 70; 15: return 67;
     16: return 64; 17: return 61; 18: return 57; 19: return 54;
     20: return 50; 21: return 46; 22: return 43; 23: return 38;
     24: return 36; 25: return 31; 26: return 25; 27: return 22;
     28: return 18; 29: return 13; 30: return 9;  31: return 4;
     default: return 0;
    endcase
  endfunction

  function automatic int hevc_coef(input int k, input int n);
    int m;
    if (k == 0) return 64;
    m = (k * (2 * n + 1)) % 128;
    if (m <= 32)      return  int'(hevc_t(m));
    else if (m < 64)  return -int'(hevc_t(64 - m));
    else if (m <= 96) return -int'(hevc_t(m - 64));
    else              return  int'(hevc_t(128 - m));
  endfunction

  function automatic logic [7:0] lift_p(input angle_t a);
    case (a)
      3'd0: return 8'd0;   3'd1: return 8'd25;  3'd2: return 8'd51;  3'd3: return 8'd78;
      3'd4: return 8'd106; 3'd5: return 8'd137; 3'd6: return 8'd171; default: return 8'd210;
    endcase
  endfunction

  function automatic logic [7:0] lift_u_mag(input angle_t a);
    case (a)
      3'd0: return 8'd0;   3'd1: return 8'd50;  3'd2: return 8'd98;  3'd3: return 8'd142;
      3'd4: return 8'd181; 3'd5: return 8'd213; 3'd6: return 8'd237; default: return 8'd251;
    endcase
  endfunction

  // Whole schedule of an N x N block, N = 4 << n_log; entries past N*N/2 are 0.
  typedef zz_slot_t [511:0] zz_tab_t;

  function automatic zz_tab_t zz_table(input int n_log);
    zz_tab_t t;
    int n, cnt, r, c;
    n   = 4 << n_log;
    for (int i = 0; i < 512; i++) t[i] = '0;
    cnt = 0;
    for (int d = 1; d <= 2 * n - 3; d++) begin
      for (int q = 0; q < n; q++) begin
        // odd anti-diagonals run downwards (r increasing), even ones upwards
        r = (d % 2 == 1) ? ((d + 1) / 2 + q) : (((d < n) ? d : n - 1) - q);
        c = d - r;
        if (r > c && r < n && c >= 0) begin
          t[cnt] = '{diag: 1'b0, r1: 5'(r), c1: 5'(c), r2: 5'(c), c2: 5'(r)};
          cnt++;
        end
      end
    end
    for (int j = 0; j < n / 2; j++) begin
      t[cnt] = '{diag: 1'b1, r1: 5'(2 * j), c1: 5'(2 * j), r2: 5'(2 * j + 1), c2: 5'(2 * j + 1)};
      cnt++;
    end
    return t;
  endfunction

  // Saturate a wide signed value to COEF_W bits.
  function automatic logic signed [COEF_W-1:0] sat_coef(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7fff;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return v[COEF_W-1:0];
  endfunction

endpackage
