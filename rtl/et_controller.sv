// et_controller: controller of the error-tolerant TCAM.
//
// Two modes. In regular mode the external search key goes through the key
// multiplexer to the Parity TCAM and its result is handed back (r_valid one
// cycle after the search). In test mode the controller scrubs the TCAM:
//
//   1. It applies each valid X-key of the X look-up memory in turn.
//   2. It compares the TCAM's answer with the entry's expectation. A
//      multiple match (the TCAM's "refresh bit"), a missing or unexpected
//      match, or a match at another index than expected is a soft error.
//   3. On an error it rewrites, from the backup ECC-SRAM, the expected word
//      and then every word the X-key matches: it searches again with the
//      already rewritten rows disabled and rewrites the lowest match until
//      no row matches. Each rewrite reads the ECC-SRAM (one cycle) and
//      writes the corrected word through the multiplexer (one cycle).
//   4. It applies the same X-key once more. If the error persists it counts
//      an unrepaired key and moves on.
//
// After the last X-key the controller reads every word of the ECC-SRAM once
// (one read per cycle); the SRAM writes back any word it had to correct, so
// single flips in the backup are repaired too, and uncorrectable words are
// counted. Then the pass ends (pass_done pulses) and, while mode stays
// MODE_TEST, a new pass starts. Returning to regular mode takes effect at
// the next X-key boundary.
//
// Host writes (wr_en, accepted while wr_ready) go into the ECC-SRAM at once
// and are copied into the TCAM over the next two cycles through the same
// rewrite path, so the TCAM is only ever written from the backup copy. A
// search presented in the same cycle as a write sees the old word.
//
// What follows the design: the two modes, the X-key test, detection by a
// multiple match, and repair from the ECC-SRAM through the multiplexer. The
// expected-index check, the row-disable walk over all matching rows, the
// re-check, the backup sweep and the status counters are this design's own
// choices.
module et_controller
  import tcam_pkg::*;
#(
  parameter int unsigned W     = 4,
  parameter int unsigned NX    = 8,
  parameter int unsigned CNT_W = 16,
  localparam int unsigned AW = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned XW = (NX > 1) ? $clog2(NX) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  mode_e            mode,
  // host side
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  output logic             wr_ready,
  input  logic             s_valid,
  output logic             s_ready,
  output logic             r_valid,
  // key multiplexer
  output key_sel_e         sel,
  // Parity TCAM
  output logic             tcam_search,
  output logic [W-1:0]     tcam_row_en,
  output logic             tcam_we,
  output logic [AW-1:0]    tcam_waddr,
  input  logic             tcam_rvalid,
  input  logic [AW-1:0]    tcam_addr,
  input  logic             tcam_hit,
  input  logic             tcam_multi,
  // ECC-SRAM
  output logic             sram_we,
  output logic [AW-1:0]    sram_waddr,
  output logic             sram_re,
  output logic [AW-1:0]    sram_raddr,
  input  logic             sram_unc,
  // X look-up memory
  output logic [XW-1:0]    xidx,
  input  logic             x_valid,
  input  logic [AW-1:0]    x_exp_addr,
  input  logic             x_exp_hit,
  // status
  output logic             test_busy,
  output logic             pass_done,
  output logic [CNT_W-1:0] err_cnt,   // X-keys that showed a soft error
  output logic [CNT_W-1:0] fix_cnt,   // TCAM words rewritten by repair
  output logic [CNT_W-1:0] fail_cnt,  // X-keys still wrong after repair
  output logic [CNT_W-1:0] unc_cnt,   // backup reads with an uncorrectable error
  output logic [CNT_W-1:0] pass_cnt   // completed test passes
);

  typedef enum logic [3:0] {
    S_IDLE, S_CP_RD, S_CP_WR, S_T_KEY, S_T_CHK, S_R_KEY, S_R_CHK, S_SCRUB, S_S_END
  } state_e;

  state_e        state, ret;
  logic [AW-1:0] cp_addr;
  logic [W-1:0]  done_mask;
  logic          retried, reg_pending;
  logic [AW-1:0] scrub_addr;
  logic          scrub_rsp;

  // last X-key of a pass
  logic last_key;
  assign last_key = (32'(xidx) == NX - 1);

  // soft error seen by the current X-key
  logic key_err;
  assign key_err = tcam_multi || (tcam_hit != x_exp_hit) ||
                   (tcam_hit && tcam_addr != x_exp_addr);

  always_comb begin
    sel         = SEL_NONE;
    tcam_search = 1'b0;
    tcam_row_en = '1;
    tcam_we     = 1'b0;
    tcam_waddr  = cp_addr;
    sram_we     = 1'b0;
    sram_waddr  = wr_addr;
    sram_re     = 1'b0;
    sram_raddr  = (state == S_SCRUB) ? scrub_addr : cp_addr;
    wr_ready    = 1'b0;
    s_ready     = 1'b0;
    unique case (state)
      S_IDLE: begin
        sel         = SEL_SEARCH;
        wr_ready    = 1'b1;
        s_ready     = (mode == MODE_REGULAR);
        tcam_search = s_valid && s_ready;
        sram_we     = wr_en;
      end
      S_CP_RD: sram_re = 1'b1;
      S_SCRUB: sram_re = 1'b1;
      S_CP_WR: begin
        sel     = SEL_DATA;
        tcam_we = !sram_unc;
      end
      S_T_KEY: begin
        sel         = SEL_XKEY;
        tcam_search = x_valid && (mode == MODE_TEST);
      end
      S_R_KEY: begin
        sel         = SEL_XKEY;
        tcam_search = 1'b1;
        tcam_row_en = ~done_mask;
      end
      default: ;
    endcase
  end

  assign test_busy = (state != S_IDLE) && (state != S_CP_RD || ret != S_IDLE) &&
                     (state != S_CP_WR || ret != S_IDLE);
  assign r_valid   = tcam_rvalid && reg_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      ret         <= S_IDLE;
      cp_addr     <= '0;
      done_mask   <= '0;
      retried     <= 1'b0;
      reg_pending <= 1'b0;
      scrub_addr  <= '0;
      scrub_rsp   <= 1'b0;
      xidx        <= '0;
      pass_done   <= 1'b0;
      err_cnt     <= '0;
      fix_cnt     <= '0;
      fail_cnt    <= '0;
      unc_cnt     <= '0;
      pass_cnt    <= '0;
    end else begin
      reg_pending <= (state == S_IDLE) && tcam_search;
      pass_done   <= 1'b0;
      scrub_rsp   <= (state == S_SCRUB);
      if (scrub_rsp && sram_unc) unc_cnt <= unc_cnt + 1'b1;
      unique case (state)
        S_IDLE: begin
          if (wr_en) begin
            cp_addr <= wr_addr;
            ret     <= S_IDLE;
            state   <= S_CP_RD;
          end else if (mode == MODE_TEST) begin
            xidx    <= '0;
            retried <= 1'b0;
            state   <= S_T_KEY;
          end
        end
        S_CP_RD: state <= S_CP_WR;
        S_CP_WR: begin
          if (sram_unc) unc_cnt <= unc_cnt + 1'b1;
          else if (ret == S_R_KEY) fix_cnt <= fix_cnt + 1'b1;
          state <= ret;
        end
        S_T_KEY: begin
          if (mode != MODE_TEST) begin
            state <= S_IDLE;
          end else if (x_valid) begin
            state <= S_T_CHK;
          end else if (last_key) begin
            scrub_addr <= '0;
            state      <= S_SCRUB;
          end else begin
            xidx    <= xidx + 1'b1;
            retried <= 1'b0;
          end
        end
        S_T_CHK: begin
          if (key_err && !retried) begin
            err_cnt   <= err_cnt + 1'b1;
            done_mask <= '0;
            if (x_exp_hit) begin
              cp_addr               <= x_exp_addr;
              done_mask[x_exp_addr] <= 1'b1;
              ret                   <= S_R_KEY;
              state                 <= S_CP_RD;
            end else begin
              state <= S_R_KEY;
            end
          end else begin
            if (key_err) fail_cnt <= fail_cnt + 1'b1;
            if (last_key) begin
              scrub_addr <= '0;
              state      <= S_SCRUB;
            end else begin
              xidx    <= xidx + 1'b1;
              retried <= 1'b0;
              state   <= S_T_KEY;
            end
          end
        end
        S_R_KEY: state <= S_R_CHK;
        S_R_CHK: begin
          if (tcam_hit) begin
            cp_addr              <= tcam_addr;
            done_mask[tcam_addr] <= 1'b1;
            ret                  <= S_R_KEY;
            state                <= S_CP_RD;
          end else begin
            retried <= 1'b1;
            state   <= S_T_KEY;
          end
        end
        S_SCRUB: begin
          scrub_addr <= scrub_addr + 1'b1;
          if (32'(scrub_addr) == W - 1) state <= S_S_END;
        end
        S_S_END: begin
          pass_cnt  <= pass_cnt + 1'b1;
          pass_done <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a TCAM result is always expected in the check states
  property p_result_in_check;
    @(posedge clk) disable iff (!rst_n)
      (state == S_T_CHK || state == S_R_CHK) |-> tcam_rvalid;
  endproperty
  assert property (p_result_in_check);

endmodule
