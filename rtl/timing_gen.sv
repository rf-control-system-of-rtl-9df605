// timing_gen: timing generator of the RF system.
//
// Divides the 10 MHz clock by TDIV = 200 into the 50 kHz T-clock (a one-clock
// pulse) and, counting T-clocks from a cycle_start pulse, issues the events of
// one machine cycle at times the computer sets: beam capture, acceleration
// start, flat top, and the on/off level of the beam feedback (fb_on high
// between the on and off times). Each event is a one-clock pulse coinciding
// with a T-clock pulse and fires once per cycle.
//
// Register writes (reg_we, reg_sel, reg_data, times in T-clock periods):
// 0 capture, 1 acceleration start, 2 flat top, 3 feedback on, 4 feedback off.
//
// From the published design: the 50 kHz T-clock and the list of outputs. The
// programmable-time scheme is this design's choice.
module timing_gen #(
  parameter int unsigned TDIV = 200,
  parameter int unsigned TW   = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cycle_start,
  input  logic          reg_we,
  input  logic [2:0]    reg_sel,
  input  logic [TW-1:0] reg_data,
  output logic          tclk,
  output logic          ev_capture,
  output logic          ev_acc_start,
  output logic          ev_flat_top,
  output logic          fb_on,
  output logic [TW-1:0] tcount
);
  localparam int unsigned DW = $clog2(TDIV);
  logic [DW-1:0] div;
  logic [TW-1:0] t_cap, t_acc, t_top, t_on, t_off;
  logic          running, tick;

  assign tick = (div == DW'(TDIV-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_cap <= '0; t_acc <= '0; t_top <= '0; t_on <= '0; t_off <= '0;
    end else if (reg_we) begin
      unique case (reg_sel)
        3'd0: t_cap <= reg_data;
        3'd1: t_acc <= reg_data;
        3'd2: t_top <= reg_data;
        3'd3: t_on  <= reg_data;
        3'd4: t_off <= reg_data;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0; tclk <= 1'b0; running <= 1'b0; tcount <= '0;
      ev_capture <= 1'b0; ev_acc_start <= 1'b0; ev_flat_top <= 1'b0; fb_on <= 1'b0;
    end else begin
      div          <= tick ? '0 : div + 1'b1;
      tclk         <= tick;
      ev_capture   <= 1'b0;
      ev_acc_start <= 1'b0;
      ev_flat_top  <= 1'b0;
      if (cycle_start) begin
        running <= 1'b1;
        tcount  <= '0;
        fb_on   <= 1'b0;
      end else if (tick && running) begin
        tcount       <= tcount + 1'b1;
        ev_capture   <= (tcount == t_cap);
        ev_acc_start <= (tcount == t_acc);
        ev_flat_top  <= (tcount == t_top);
        if (tcount == t_on)  fb_on <= 1'b1;
        if (tcount == t_off) fb_on <= 1'b0;
        if (tcount == '1)    running <= 1'b0;
      end
    end
  end
endmodule
