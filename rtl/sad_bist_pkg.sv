// sad_bist_pkg: types, constants and residue arithmetic shared by the
// built-in self-detection/correction (BISDC) motion-estimation array and by
// the on-line minimum-SAD processor.
//
// The array works on 4x4 blocks (16 pixel pairs) of 8-bit pixels, so a block
// SAD needs 12 bits (16 * 255 = 4080). The biresidue code uses the moduli
// phi1 = 2^3-1 = 7 and phi2 = 2^4-1 = 15 (exponents 3 and 4 are coprime):
// the pair of residues of +-2^k is different for every k in 0..11 and every
// sign, which is what makes a single erroneous SAD bit locatable.
// Residues of a Mersenne modulus 2^a-1 are taken by end-around-carry folding
// of a-bit chunks, the usual hardware for such a modulus.
package sad_bist_pkg;

  localparam int unsigned PIX_W   = 8;    // pixel width
  localparam int unsigned SAD_W   = 12;   // SAD width of a 16-pixel block
  localparam int unsigned NPIX    = 16;   // pixels per block (4x4)
  localparam int unsigned NPE     = 16;   // processing elements in the array
  localparam int unsigned PE_IDX_W = 4;   // index of a PE
  localparam int unsigned PHI1_A  = 3;    // phi1 = 2^3 - 1 = 7
  localparam int unsigned PHI2_B  = 4;    // phi2 = 2^4 - 1 = 15
  localparam int unsigned RES_W   = 4;    // width of a residue / syndrome

  // Radix-2 signed digit: value = pos - neg. "11" and "00" both mean zero.
  typedef struct packed {
    logic neg;   // negatively weighted bit (first bit of the digit)
    logic pos;   // positively weighted bit (second bit of the digit)
  } sd_digit_t;

  // Where an injected stuck-at fault sits inside a PE.
  typedef enum logic {
    FAULT_SAD_BUS = 1'b0,   // a line of the PE's 12-bit SAD output bus
    FAULT_ABSDIFF = 1'b1    // a line of the 8-bit |cur - ref| bus
  } fault_site_e;

  // Fault-injection controls of one PE.
  typedef struct packed {
    logic        create_error;   // the fault is present
    fault_site_e site;
    logic [3:0]  line;           // bit index of the faulty line
    logic        stuck_val;      // stuck-at-0 or stuck-at-1
  } pe_fault_t;

  // Control lines of the BISDC controller.
  typedef struct packed {
    logic                tc1;  // TCG takes the current pixel this cycle
    logic [PE_IDX_W-1:0] tc2;  // PE whose reference pixel feeds the TCG
    logic [PE_IDX_W-1:0] dc1;  // PE whose output the detector checks
    logic [PE_IDX_W-1:0] sc1;  // PE whose output the selector takes
    logic                sc2;  // selector delivers its data this cycle
  } bisdc_ctrl_t;

  // x mod (2^a - 1), for a in 2..4 and x up to 16 bits.
  function automatic logic [RES_W-1:0] mod_mersenne(input logic [15:0] x,
                                                     input int unsigned a);
    logic [16:0] s;
    logic [16:0] m;
    m = (17'd1 << a) - 17'd1;
    s = {1'b0, x};
    for (int k = 0; k < 8; k++) s = (s & m) + (s >> a);
    if (s == m) s = '0;
    return s[RES_W-1:0];
  endfunction

  // |n - x| mod (2^a - 1) for a residue x already below 2^a - 1.
  function automatic logic [RES_W-1:0] mod_sub(input logic [15:0] n,
                                                input logic [RES_W-1:0] x,
                                                input int unsigned a);
    logic [15:0] m;
    m = (16'd1 << a) - 16'd1;
    return mod_mersenne({12'd0, mod_mersenne(n, a)} + m - {12'd0, x}, a);
  endfunction

  // Absolute difference of two pixels.
  function automatic logic [PIX_W-1:0] abs_diff(input logic [PIX_W-1:0] c,
                                                 input logic [PIX_W-1:0] r);
    return (c >= r) ? c - r : r - c;
  endfunction

endpackage
