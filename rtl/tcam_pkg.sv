// tcam_pkg: types and helper functions shared by the error-tolerant TCAM and
// the ATM translator.
//
// A ternary digit is held as two bits, a value and a care bit. care=0 is the
// don't-care state X (the cell's two storage bits both 0), care=1 with value
// 0 or 1 is a stored 0 or 1. The unused fourth state of the cell is not
// representable in this encoding. The encoding is this design's choice; the
// X/0/1 states themselves follow the ternary cell the design is based on.
package tcam_pkg;

  // Select of the key multiplexer in front of the Parity TCAM (2 bits wide).
  typedef enum logic [1:0] {
    SEL_SEARCH = 2'd0,  // external search key (regular mode)
    SEL_XKEY   = 2'd1,  // X-key from the X look-up memory (test mode)
    SEL_DATA   = 2'd2,  // backup word from the ECC-SRAM (rewrite path)
    SEL_NONE   = 2'd3   // nothing applied, all-zero word
  } key_sel_e;

  // Operating mode of the error-tolerant TCAM.
  typedef enum logic {
    MODE_REGULAR = 1'b0,
    MODE_TEST    = 1'b1
  } mode_e;

  // ATM cell header layout (5 bytes, byte 1 in bits 39:32).
  localparam int unsigned ATM_HDR_W = 40;
  localparam int unsigned ATM_VPI_W = 12;  // NNI VPI width; UNI VPI is 8 bits
  localparam int unsigned ATM_VCI_W = 16;
  localparam int unsigned ATM_KEY_W = ATM_VPI_W + ATM_VCI_W;

  typedef struct packed {
    logic [3:0]  gfc;   // UNI only, 0 for NNI
    logic [11:0] vpi;   // UNI: 8 LSBs used
    logic [15:0] vci;
    logic [2:0]  pt;
    logic        clp;
    logic [7:0]  hec;
  } atm_hdr_t;

  // Split a 40-bit UNI or NNI header into its fields (UNI =
  // GFC 4, VPI 8, VCI 16, PT 3, CLP 1, HEC 8; NNI = VPI 12, VCI 16, ...).
  function automatic atm_hdr_t atm_parse(input logic [ATM_HDR_W-1:0] h, input logic nni);
    atm_hdr_t f;
    f.gfc = nni ? 4'h0 : h[39:36];
    f.vpi = nni ? h[39:28] : {4'h0, h[35:28]};
    f.vci = h[27:12];
    f.pt  = h[11:9];
    f.clp = h[8];
    f.hec = h[7:0];
    return f;
  endfunction

  // Inverse of atm_parse (a UNI header keeps only the 8 LSBs of vpi).
  function automatic logic [ATM_HDR_W-1:0] atm_pack(input atm_hdr_t f, input logic nni);
    logic [11:0] top12;
    top12 = nni ? f.vpi : {f.gfc, f.vpi[7:0]};
    return {top12, f.vci, f.pt, f.clp, f.hec};
  endfunction

  // Hamming check bits for a DW-bit word: smallest R with 2**R >= DW + R + 1
  function automatic int unsigned secded_r(input int unsigned dw);
    int unsigned r;
    r = 1;
    while ((1 << r) < dw + r + 1) r++;
    return r;
  endfunction

  // SECDED codeword width: data, Hamming check bits, overall parity bit
  function automatic int unsigned secded_cw(input int unsigned dw);
    return dw + secded_r(dw) + 1;
  endfunction

endpackage
