// data_input_module: computes the Stokes parameters of every channel of the
// incoming dual-polarisation spectra and distributes them to the nodes.
//
// Pipeline: stokes_lut (products and signs, 1 clock) -> stokes_addsub
// (I, Q, U, V, 2 clocks) -> dim_corner_turn (channel reordering, double
// buffered) -> dim_distributor (one serial path per node, I,Q,U,V
// time-multiplexed with a write strobe). Input: one channel per clock,
// in_sof on channel 0 of each spectrum. The enable input (ENABLE DIM from the
// result collection module) gates the input; this gating is this design's
// reading of that control line. PASS-THROUGH replaces the Stokes words by
// the raw input components.
//
// Timing: the first words of a spectrum leave 3 clocks (Stokes stages) plus
// NCH clocks (writing the spectrum) plus 2 clocks (read and load) after its
// first channel enters; then every node path carries 4 words per NNODES
// clocks continuously while spectra keep arriving.
//
// The four stages, the pass-through mode, the node-sequential read order and
// the 8 Mwords/s per path follow the module's description; the latency, the
// strobe shape and the fixed channel and node order are this design's.
module data_input_module
  import spps_pkg::*;
#(
  parameter int unsigned NCH    = N_CHAN,
  parameter int unsigned NNODES = N_NODES
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        pass_through,
  input  logic        in_valid,
  input  logic        in_sof,
  input  pol_sample_t in_data,
  output sm16_t       node_data [NNODES],
  output logic        node_wr   [NNODES]
);

  logic     l_valid, l_sof, l_pass;
  lut_out_t l_data;
  logic     s_valid, s_sof;
  stokes_t  s_data;
  logic     c_valid;
  logic [$clog2(NNODES)-1:0] c_node;
  stokes_t  c_data;
  logic     c_done;

  stokes_lut u_lut (
    .clk, .rst_n, .pass_through,
    .in_valid (in_valid & enable), .in_sof, .in_data,
    .out_valid(l_valid), .out_sof(l_sof), .out_pass(l_pass), .out_data(l_data)
  );

  stokes_addsub u_addsub (
    .clk, .rst_n,
    .in_valid(l_valid), .in_sof(l_sof), .in_pass(l_pass), .in_data(l_data),
    .out_valid(s_valid), .out_sof(s_sof), .out_data(s_data)
  );

  dim_corner_turn #(.NCH(NCH), .NNODES(NNODES)) u_ct (
    .clk, .rst_n,
    .in_valid(s_valid), .in_sof(s_sof), .in_data(s_data),
    .out_valid(c_valid), .out_node(c_node), .out_data(c_data),
    .spectrum_done(c_done)
  );

  dim_distributor #(.NNODES(NNODES)) u_dist (
    .clk, .rst_n,
    .in_valid(c_valid), .in_node(c_node), .in_data(c_data),
    .node_data, .node_wr
  );

endmodule
