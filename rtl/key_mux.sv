// key_mux: the multiplexer in front of the Parity TCAM.
//
// Chooses which ternary word is driven onto the TCAM's search/write lines:
// the external search key (regular mode), an X-key from the X look-up
// memory (test mode), or a backup word read from the ECC-SRAM (used when a
// TCAM word is rewritten). The 2-bit select comes from the controller. Each
// word is N ternary digits, carried as a value vector and a care vector
// (care=0 is don't care). Select code SEL_NONE drives an all-zero word.
// The three sources and the 2-bit select follow the block diagram of the
// error-tolerant TCAM; the code assignment is this design's choice.
//
// Purely combinational.
module key_mux
  import tcam_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  key_sel_e       sel,
  input  logic [N-1:0]   search_val,
  input  logic [N-1:0]   search_care,
  input  logic [N-1:0]   xkey_val,
  input  logic [N-1:0]   xkey_care,
  input  logic [N-1:0]   data_val,
  input  logic [N-1:0]   data_care,
  output logic [N-1:0]   out_val,
  output logic [N-1:0]   out_care
);

  always_comb begin
    unique case (sel)
      SEL_SEARCH: begin out_val = search_val; out_care = search_care; end
      SEL_XKEY:   begin out_val = xkey_val;   out_care = xkey_care;   end
      SEL_DATA:   begin out_val = data_val;   out_care = data_care;   end
      default:    begin out_val = '0;         out_care = '0;          end
    endcase
  end

endmodule
