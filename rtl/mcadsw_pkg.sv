// mcadsw_pkg -- constants, types and small functions shared by the MCADSW
// (mini-census adaptive support weight) stereo disparity engine.
//
// Fixed by the algorithm/architecture:
//   * 31x31 aggregation window (WIN), 18x18 output block (BLK), so one block
//     needs a 48x48 region of censuses and weights (REG = BLK + WIN - 1).
//   * 8 column lanes in the vertical aggregation (6 cycles cover 48 columns),
//     3 horizontal aggregators / WTA units fed with 33 vertical costs (PCR).
//   * 6-bit mini-census, weights are one power of two (scale-and-truncate),
//     stored here as a 3-bit shift code.
// Own choices: the widths of the cost sums (sized for the worst case, no
// saturation), the 32-bit memory word layout (pixel x = 4w+i in byte i), and
// the word address map produced by the functions below.
package mcadsw_pkg;

  localparam int WIN   = 31;             // aggregation window edge
  localparam int HALF  = WIN / 2;        // 15
  localparam int BLK   = 18;             // output block edge
  localparam int REG   = BLK + WIN - 1;  // 48: census/weight region edge
  localparam int LANES = 8;              // vertical aggregation lanes
  localparam int NGRP  = REG / LANES;    // 6 column groups per disparity
  localparam int NWTA  = 3;              // horizontal aggregators / WTA units
  localparam int NOUT  = WIN + NWTA - 1; // 33 vertical costs per read
  localparam int NSLOT = BLK / NWTA;     // 6 output pixels per WTA unit
  localparam int CM    = 2;              // census template reach (pixels)

  localparam int CEN_W = 6;              // mini-census bits
  localparam int WC_W  = 3;              // weight code bits
  localparam int VC_W  = 14;             // vertical cost: 31 * (6 << 6) < 2^14
  localparam int FC_W  = 25;             // final cost: 31 * (11904 << 6) < 2^25
  localparam int ADDR_W = 20;            // external word address
  localparam int CRD_W  = 12;            // signed image coordinates

  typedef logic signed [CRD_W-1:0] crd_t;

  // One request to the external memory (32-bit data port).
  typedef struct packed {
    logic              req;
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [31:0]       wdata;
  } mem_req_t;

  typedef struct packed {
    logic [7:0] y;
    logic [7:0] u;
    logic [7:0] v;
  } yuv_t;

  // Column of census codes / weight codes handed around between blocks.
  typedef logic [WIN-1:0][CEN_W-1:0] cen_col_t;
  typedef logic [WIN-1:0][WC_W-1:0]  wgt_col_t;

  // Memory map in 32-bit words: four 8-bit planes (Y left, Y right, U left,
  // V left), four pixels per word, then one disparity per word.
  function automatic logic [ADDR_W-1:0] plane_words(int img_w, int img_h);
    return ADDR_W'((img_w * img_h) / 4);
  endfunction
  function automatic logic [ADDR_W-1:0] base_yl(int w, int h); return '0; endfunction
  function automatic logic [ADDR_W-1:0] base_yr(int w, int h); return plane_words(w, h); endfunction
  function automatic logic [ADDR_W-1:0] base_ul(int w, int h); return ADDR_W'(2) * plane_words(w, h); endfunction
  function automatic logic [ADDR_W-1:0] base_vl(int w, int h); return ADDR_W'(3) * plane_words(w, h); endfunction
  function automatic logic [ADDR_W-1:0] base_disp(int w, int h); return ADDR_W'(4) * plane_words(w, h); endfunction

  // Scaled-and-truncated colour weight: 64*exp(-d/gamma) keeping only its
  // leading one, with steps every 5 distance units.  Code k>0 means weight
  // 2^(k-1); code 0 means weight 0.
  //   d = 0 -> 64, 1..4 -> 32, 5..9 -> 16, ..., 25..29 -> 1, >= 30 -> 0
  function automatic logic [WC_W-1:0] weight_code(logic [9:0] cdist);
    if (cdist == 10'd0)  return 3'd7;
    if (cdist >= 10'd30) return 3'd0;
    return 3'(6 - int'(cdist) / 5);
  endfunction

  // Multiply by a one-hot weight: a single shift.
  function automatic logic [VC_W-1:0] wshift_cost(logic [2:0] cost, logic [WC_W-1:0] code);
    if (code == '0) return '0;
    return VC_W'(cost) << (code - 3'd1);
  endfunction

  function automatic logic [FC_W-1:0] wshift_vcost(logic [VC_W-1:0] vc, logic [WC_W-1:0] code);
    if (code == '0) return '0;
    return FC_W'(vc) << (code - 3'd1);
  endfunction

  function automatic crd_t clampc(crd_t v, int hi);
    if (v < 0) return '0;
    if (v > crd_t'(hi)) return crd_t'(hi);
    return v;
  endfunction

endpackage
