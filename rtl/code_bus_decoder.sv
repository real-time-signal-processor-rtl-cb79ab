// code_bus_decoder: page selector and chip-select decoder of the program bus
// that links the control PC's parallel ports to the code memories of all
// nodes.
//
// The 24 dual-port RAMs of a sub-band (three 8K x 16 devices per node, eight
// nodes) share the 13-bit address and 16-bit data lines. The PC first
// latches a page number (0..23) into the page selector with page_ld, taking
// it from the low bits of the data lines; later reads and writes go to that
// page until it is changed. cs[3n+k] selects device k of node n, so node 1
// of the figures uses CS(0-2) and node 8 uses CS(21-23).
//
// Interface: wr and rd are the PC's active-high write and read strobes. A
// page number of 24 or more selects nothing. The load strobe and the use of
// the data lines for the page number are this design's choice. The decoder is
// combinational from the latched page; the page register loads on clk.
module code_bus_decoder #(
  parameter int unsigned NPAGES = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              page_ld,
  input  logic [15:0]       data,
  input  logic              wr,
  input  logic              rd,
  output logic [NPAGES-1:0] cs,
  output logic [$clog2(NPAGES)-1:0] page
);

  localparam int unsigned PW = $clog2(NPAGES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       page <= '0;
    else if (page_ld) page <= data[PW-1:0];
  end

  always_comb begin
    cs = '0;
    if ((wr || rd) && !page_ld && 32'(page) < NPAGES) cs[page] = 1'b1;
  end

endmodule
