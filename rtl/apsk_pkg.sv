// apsk_pkg: types, number formats and constants shared by the 16-APSK
// carrier-phase / symbol-timing synchronizer.
//
// Number formats (all two's complement):
//   sample_t  16 bit Q2.13   baseband samples, interpolants, constellation points
//   angle_t   16 bit Q3.12   radians, range [-pi, pi] (CORDIC angle input)
//   loop_t    32 bit         loop-filter outputs; Q3.28 radians for the carrier
//                            loop, Q2.30 for the timing loop and its counter
//   err_t     16 bit         detector outputs (PED Q2.13, TED Q4.11)
//   llr_t     16 bit Q4.11   log-likelihood ratios
//
// Constellation (16-APSK, 12 outer + 4 inner points, ring ratio 2.75). The
// radii are normalized to unit average symbol energy:
//   R2 = sqrt(16 / (12 + 4/2.75^2)) = 1.13006,  R1 = R2 / 2.75 = 0.41093.
// Outer points sit at 15 + 30*j degrees, inner points at 45 + 90*j degrees.
// Bit labels (MSB first): the two LSBs are the quadrant (bit1 = 1 for I < 0,
// bit0 = 1 for Q < 0); the two MSBs name the point inside the quadrant:
//   01 = outer point at 15 deg, 00 = outer at 45 deg, 10 = outer at 75 deg,
//   11 = inner point at 45 deg (angles measured from the nearest I axis in
//   the first quadrant, mirrored into the other quadrants).
// The ring ratio, the point angles and the sign-bit LSBs follow the thesis;
// the Q-formats, the energy normalization and the stand-in marker are this
// design's choices.
package apsk_pkg;

  localparam int SW = 16;           // sample width
  localparam int SF = 13;           // sample fraction bits
  typedef logic signed [SW-1:0] sample_t;

  typedef struct packed {
    sample_t i;
    sample_t q;
  } cplx_t;

  typedef logic [3:0] sym_bits_t;

  localparam int AF = 12;           // angle fraction bits (Q3.12 radians)
  typedef logic signed [15:0] angle_t;

  typedef logic signed [31:0] loop_t;
  typedef logic signed [15:0] err_t;
  typedef logic signed [15:0] llr_t;

  // first-quadrant constellation coordinates, round(value * 2^13)
  localparam sample_t PT15_BIG   = 16'sd8942;   // R2*cos(15 deg)
  localparam sample_t PT15_SMALL = 16'sd2396;   // R2*sin(15 deg)
  localparam sample_t PT45_OUT   = 16'sd6546;   // R2*cos(45 deg)
  localparam sample_t PT45_IN    = 16'sd2380;   // R1*cos(45 deg)

  // pi in the angle formats
  localparam angle_t      PI_Q12  = 16'sd12868;          // round(pi * 2^12)
  localparam logic signed [33:0] PI_Q28 = 34'sd843314857; // round(pi * 2^28)
  localparam logic signed [33:0] PI6_Q28 = 34'sd140552476; // round(pi/6 * 2^28)

  // first-quadrant point selected by the two MSBs of a label
  function automatic cplx_t quadrant1_point(logic [1:0] msb);
    cplx_t p;
    unique case (msb)
      2'b01:   begin p.i = PT15_BIG;   p.q = PT15_SMALL; end
      2'b00:   begin p.i = PT45_OUT;   p.q = PT45_OUT;   end
      2'b10:   begin p.i = PT15_SMALL; p.q = PT15_BIG;   end
      default: begin p.i = PT45_IN;    p.q = PT45_IN;    end
    endcase
    return p;
  endfunction

  // coordinates of the constellation point with label b
  function automatic cplx_t point_of(sym_bits_t b);
    cplx_t p;
    p = quadrant1_point(b[3:2]);
    if (b[1]) p.i = -p.i;
    if (b[0]) p.q = -p.q;
    return p;
  endfunction

  // ---------------------------------------------------------------------
  // Rotation of labels by multiples of 30 degrees, used to build the
  // rotated copies of the attached synchronization marker (ASM).
  // Outer point j (angle 15+30j) maps to j+m; an inner point at 45+90q
  // moves to 45+90q+30m and is decided to the inner point in quadrant
  // q + round(m/3).
  // ---------------------------------------------------------------------
  function automatic sym_bits_t outer_label(int j);
    // labels of outer points at 15,45,...,345 degrees
    sym_bits_t t;
    case (j % 12)
      0: t = 4'b0100;  1: t = 4'b0000;  2: t = 4'b1000;  3: t = 4'b1010;
      4: t = 4'b0010;  5: t = 4'b0110;  6: t = 4'b0111;  7: t = 4'b0011;
      8: t = 4'b1011;  9: t = 4'b1001; 10: t = 4'b0001; default: t = 4'b0101;
    endcase
    return t;
  endfunction

  function automatic sym_bits_t inner_label(int q);
    sym_bits_t t;
    case (q % 4)
      0: t = 4'b1100;  1: t = 4'b1110;  2: t = 4'b1111;  default: t = 4'b1101;
    endcase
    return t;
  endfunction

  function automatic sym_bits_t rotate_label(sym_bits_t b, int m);
    sym_bits_t r;
    r = b;
    if (b[3:2] == 2'b11) begin
      for (int q = 0; q < 4; q++)
        if (inner_label(q) == b) r = inner_label(q + (m + 1) / 3);
    end else begin
      for (int j = 0; j < 12; j++)
        if (outer_label(j) == b) r = outer_label(j + m);
    end
    return r;
  endfunction

  localparam int ASM_BITS = 256;
  localparam int ASM_SYMS = ASM_BITS / 4;

  // Default marker: the 255-chip maximal-length sequence of x^8+x^6+x^5+x^4+1
  // (register seeded with all ones) followed by a single 0. First bit sent is
  // bit 255.
  function automatic logic [ASM_BITS-1:0] default_asm();
    logic [7:0] s;
    logic [ASM_BITS-1:0] a;
    logic fb;
    s = 8'hFF;
    a = '0;
    for (int k = 0; k < 255; k++) begin
      a[ASM_BITS-1-k] = s[7];
      fb = s[7] ^ s[5] ^ s[4] ^ s[3];
      s = {s[6:0], fb};
    end
    return a;
  endfunction

  // marker rotated counter-clockwise by m*30 degrees, symbol by symbol
  function automatic logic [ASM_BITS-1:0] rotate_asm(logic [ASM_BITS-1:0] a, int m);
    logic [ASM_BITS-1:0] r;
    for (int s = 0; s < ASM_SYMS; s++)
      r[4*s +: 4] = rotate_label(a[4*s +: 4], m);
    return r;
  endfunction

endpackage
