// memory_module: pattern generation of the RF system.
//
// Holds NPAT = 5 pattern kinds (accelerating frequency, accelerating voltage,
// ferrite bias current, beam-position bias, voltage correction), each in two
// 128k-word units (pattern_mem), all read at one pointer (pattern_seq). The
// pointer follows the T-clock in the flat base and flat top and the B-clock
// during acceleration; see pattern_seq for the region rules.
//
// Computer interface (this design's own register map):
//   host_we   write pattern word host_data at host_addr into the idle unit of
//             pattern kind host_sel (0 freq, 1 volt, 2 ferrite, 3 position
//             bias, 4 voltage correction);
//   host_reg_we with host_reg_sel
//             0 region-2 start, 1 region-3 start, 2 region-3 end,
//             3 region-2 jump address, 4 bank request (bit 0).
// A bank request takes effect at the next capture event (one clock after it), so a cycle never
// changes patterns halfway; the computer then loads the other unit.
//
// Outputs are available one clock after the pointer moves (synchronous
// read); after the flat-top jump each output slews by one LSB per clock to
// the stored data.
module memory_module
  import rf_pkg::*;
#(
  parameter int unsigned DEPTH = 131072
) (
  input  logic        clk,
  input  logic        rst_n,
  // computer interface
  input  logic        host_we,
  input  logic [2:0]  host_sel,
  input  paddr_t      host_addr,
  input  pword_t      host_data,
  input  logic        host_reg_we,
  input  logic [2:0]  host_reg_sel,
  // pointer clocks and events
  input  logic        tclk,
  input  logic        bclk_up,
  input  logic        bclk_dn,
  input  logic        ev_capture,
  input  logic        ev_acc_start,
  input  logic        ev_flat_top,
  // pattern outputs
  output pword_t      pat [NPAT],
  output paddr_t      addr,
  output region_e     region,
  output logic        bank,
  output logic [NPAT-1:0] slewing
);
  localparam int unsigned AW = $clog2(DEPTH);

  paddr_t r2_start, r3_start, r3_end, jump_addr;
  logic   bank_req, capture_evt, flat_top_evt;

  initial assert (AW <= PAT_AW) else $error("memory_module: DEPTH exceeds the pointer range");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r2_start  <= paddr_t'(DEPTH/4);
      r3_start  <= paddr_t'(DEPTH/2);
      r3_end    <= paddr_t'(DEPTH-1);
      jump_addr <= paddr_t'(DEPTH/4);
      bank_req  <= 1'b0;
    end else if (host_reg_we) begin
      unique case (host_reg_sel)
        3'd0: r2_start  <= host_addr;
        3'd1: r3_start  <= host_addr;
        3'd2: r3_end    <= host_addr;
        3'd3: jump_addr <= host_addr;
        3'd4: bank_req  <= host_data[0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          bank <= 1'b0;
    else if (capture_evt) bank <= bank_req;
  end

  pattern_seq u_seq (
    .clk, .rst_n, .tclk, .bclk_up, .bclk_dn, .ev_capture, .ev_acc_start, .ev_flat_top,
    .r2_start, .r3_start, .r3_end, .jump_addr, .addr, .region, .capture_evt, .flat_top_evt
  );

  for (genvar k = 0; k < NPAT; k++) begin : g_pat
    pattern_mem #(.DEPTH(DEPTH), .WIDTH(PAT_DW)) u_mem (
      .clk, .rst_n, .bank,
      .wr_en(host_we && host_sel == 3'(k)), .wr_addr(host_addr[AW-1:0]), .wr_data(host_data),
      .addr(addr[AW-1:0]), .flat_top_evt, .dout(pat[k]), .slewing(slewing[k])
    );
  end
endmodule
