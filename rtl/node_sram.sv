// node_sram: a 256K x 32 static RAM of a DSP node (used for SRAM-A and
// SRAM-B).
//
// Asynchronous read, as a static RAM chip: rdata follows addr without a
// clock. A write happens at the clock edge on which cs and we are both high.
// This matches a zero-wait-state memory on the processor's data-memory bus.
module node_sram #(
  parameter int unsigned AW = 18,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          cs,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  assign rdata = mem[addr];

  always_ff @(posedge clk) begin
    if (cs && we) mem[addr] <= wdata;
  end

endmodule
