// dim_corner_turn: double-buffered channel reordering memory of the data
// input module (the "DPRAM logic" stage).
//
// Stokes words of a spectrum are written as they arrive, in channel order
// 0,1,2,...,N_CHAN-1. Once a whole spectrum is in, it is read back in
// node-sequential order: channel 0 of every node's band first, then channel 1
// of every band, and so on (0, 32, 64, ..., 224, 1, 33, ... for 256 channels
// and 8 nodes). The memory has two halves; while one spectrum is read from one
// half the next is written into the other, so reading and writing proceed
// without contention. Write and read each handle one channel per clock.
//
// Interface: in_sof marks channel 0 of a spectrum and resets the write
// channel counter. out_valid/out_node/out_data give one channel (all four
// Stokes words) per clock; out_node is the node the channel belongs to.
//
// Timing: reading of a spectrum starts the clock after its last channel is
// written; read data is registered (one clock after the read address).
// The memory organisation (one 64-bit word per channel instead of eight
// 8-bit devices) is this design's choice; the ordering is the design's.
module dim_corner_turn
  import spps_pkg::*;
#(
  parameter int unsigned NCH    = N_CHAN,
  parameter int unsigned NNODES = N_NODES
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic                      in_sof,
  input  stokes_t                   in_data,
  output logic                      out_valid,
  output logic [$clog2(NNODES)-1:0] out_node,
  output stokes_t                   out_data,
  output logic                      spectrum_done   // pulse: a spectrum finished writing
);

  localparam int unsigned CW = $clog2(NCH);
  localparam int unsigned NW = $clog2(NNODES);
  localparam int unsigned SW = CW - NW;          // slot (channel within node) bits

  stokes_t mem [2*NCH];

  logic          wbank;
  logic [CW-1:0] wch;
  logic          rbank;
  logic          rbusy;
  logic [CW-1:0] ridx;                           // {slot, node}
  logic [CW-1:0] wch_eff;

  assign wch_eff = in_sof ? '0 : wch;

  // write side
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank         <= 1'b0;
      wch           <= '0;
      spectrum_done <= 1'b0;
    end else begin
      spectrum_done <= 1'b0;
      if (in_valid) begin
        if (wch_eff == CW'(NCH-1)) begin
          wch           <= '0;
          wbank         <= ~wbank;
          spectrum_done <= 1'b1;
        end else begin
          wch <= wch_eff + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) mem[{wbank, wch_eff}] <= in_data;
  end

  // read side: ridx low bits select the node, high bits the slot
  logic [NW-1:0] rnode;
  logic [SW-1:0] rslot;
  assign rnode = ridx[NW-1:0];
  assign rslot = ridx[CW-1:NW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rbusy     <= 1'b0;
      rbank     <= 1'b0;
      ridx      <= '0;
      out_valid <= 1'b0;
      out_node  <= '0;
    end else begin
      out_valid <= rbusy;
      out_node  <= rnode;
      if (rbusy) begin
        ridx <= ridx + 1'b1;
        if (ridx == CW'(NCH-1)) rbusy <= 1'b0;
      end
      if (spectrum_done) begin
        rbusy <= 1'b1;
        rbank <= ~wbank;        // the half that was just completed
        ridx  <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    out_data <= mem[{rbank, rnode, rslot}];
  end

  initial begin
    assert (NCH % NNODES == 0 && (1 << CW) == NCH && (1 << NW) == NNODES)
      else $error("dim_corner_turn: NCH and NNODES must be powers of two");
  end

endmodule
