// pattern_mem: one pattern kind of the memory module, double buffered.
//
// Two memory units, A and B, of DEPTH words each. The unit selected by 'bank'
// is read at the pattern pointer; the other one is open to the computer's
// writes, so a new pattern can be loaded while the machine runs and put in use
// by switching 'bank'. The read is synchronous (one clock).
//
// Output smoothing: when the pointer jumps to the head of region-3 at the
// flat top, the stored head word may differ from the last value sent out.
// The output then moves towards the stored data by one LSB per clock until it
// has caught up, and afterwards follows the memory again, so the controlled
// device never sees a step. flat_top_evt is high for the one clock in which
// addr first shows the region-3 head; it is delayed here by the read latency
// (one clock) so the comparison starts against the region-3 data.
//
// From the published design: two 128k-word units per pattern, computer writes to the
// idle unit, one-bit-step smoothing at the flat top. This design's choices:
// the word width (20 bits, what the frequency word needs), one step per clock.
module pattern_mem
#(
  parameter int unsigned DEPTH = 131072,
  parameter int unsigned WIDTH    = 20
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     bank,         // unit in use: 0 = A, 1 = B
  input  logic                     wr_en,        // computer write, idle unit
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [WIDTH-1:0]            wr_data,
  input  logic [$clog2(DEPTH)-1:0] addr,         // pattern pointer
  input  logic                     flat_top_evt,
  output logic [WIDTH-1:0]            dout,
  output logic                     slewing
);
  logic [WIDTH-1:0] mem_a [DEPTH];
  logic [WIDTH-1:0] mem_b [DEPTH];
  logic [WIDTH-1:0] rd_a, rd_b, rdata;
  logic          bank_q, ft_d1;

  // Unit A and unit B: one write port (idle unit), one read port each.
  always_ff @(posedge clk) begin
    if (wr_en && bank)  mem_a[wr_addr] <= wr_data;
    rd_a <= mem_a[addr];
  end
  always_ff @(posedge clk) begin
    if (wr_en && !bank) mem_b[wr_addr] <= wr_data;
    rd_b <= mem_b[addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {bank_q, ft_d1} <= '0;
    else        {bank_q, ft_d1} <= {bank, flat_top_evt};
  end
  assign rdata = bank_q ? rd_b : rd_a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout    <= '0;
      slewing <= 1'b0;
    end else if (slewing || ft_d1) begin
      if (dout == rdata)     slewing <= 1'b0;
      else begin
        slewing <= 1'b1;
        dout    <= (dout < rdata) ? dout + 1'b1 : dout - 1'b1;
      end
    end else begin
      dout <= rdata;
    end
  end
endmodule
