// pattern_seq: address pointer of the pattern memories.
//
// One pointer serves all patterns, so frequency, voltage, bias and correction
// stay in step. A machine cycle walks three regions of the memory:
//   region-1 (flat base)     from address 0, +1 per T-clock (50 kHz),
//                            entered on the capture event;
//   region-2 (acceleration)  entered on the acceleration-start event by a
//                            jump to jump_addr, the region-2 address whose
//                            frequency equals the last region-1 word; then +1
//                            per B+ pulse and -1 per B- pulse, so the patterns
//                            follow the measured dipole field;
//   region-3 (flat top)      entered on the flat-top event by a jump to its
//                            head r3_start, then +1 per T-clock.
// The pointer stops at the last address of each region (r2_start-1,
// r3_start-1, r3_end) and never leaves region-2 downwards. A capture event
// restarts the cycle from any state. Event priority: capture, then
// acceleration start (only from region-1), then flat top (only from region-2).
// flat_top_evt and capture_evt are one-clock copies of accepted events.
//
// From the published design: the three regions, their clocks, the three events and
// the jump rules. This design's choices: the region boundaries and jump
// address as registers written by the computer, stopping at region ends.
module pattern_seq
  import rf_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    tclk,          // T-clock pulse (50 kHz)
  input  logic    bclk_up,       // B+ clock pulse
  input  logic    bclk_dn,       // B- clock pulse
  input  logic    ev_capture,
  input  logic    ev_acc_start,
  input  logic    ev_flat_top,
  input  paddr_t  r2_start,      // first address of region-2
  input  paddr_t  r3_start,      // first address of region-3
  input  paddr_t  r3_end,        // last address of region-3
  input  paddr_t  jump_addr,     // region-2 entry address
  output paddr_t  addr,
  output region_e region,
  output logic    capture_evt,
  output logic    flat_top_evt
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr         <= '0;
      region       <= REG_IDLE;
      capture_evt  <= 1'b0;
      flat_top_evt <= 1'b0;
    end else begin
      capture_evt  <= 1'b0;
      flat_top_evt <= 1'b0;
      if (ev_capture) begin
        addr        <= '0;
        region      <= REG_BASE;
        capture_evt <= 1'b1;
      end else if (ev_acc_start && region == REG_BASE) begin
        addr   <= jump_addr;
        region <= REG_ACC;
      end else if (ev_flat_top && region == REG_ACC) begin
        addr         <= r3_start;
        region       <= REG_TOP;
        flat_top_evt <= 1'b1;
      end else begin
        unique case (region)
          REG_IDLE: ;
          REG_BASE: if (tclk && addr < r2_start - 1'b1) addr <= addr + 1'b1;
          REG_ACC: begin
            if (bclk_up && !bclk_dn && addr < r3_start - 1'b1) addr <= addr + 1'b1;
            else if (bclk_dn && !bclk_up && addr > r2_start)   addr <= addr - 1'b1;
          end
          REG_TOP:  if (tclk && addr < r3_end) addr <= addr + 1'b1;
        endcase
      end
    end
  end
endmodule
