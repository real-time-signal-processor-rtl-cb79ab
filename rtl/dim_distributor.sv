// dim_distributor: output stage of the data input module.
//
// Each node has a parallel-in, serial-out register that is loaded with the
// four Stokes words of one of its channels and shifts them out one after the
// other, in the order I, Q, U, V, on the node's 16-bit path. A channel for a
// given node arrives once every NNODES clocks, and each word is held for
// NNODES/4 clocks, so every path runs at a steady 4 words per NNODES clocks:
// 8 Mwords/s per node for a 16 MHz channel rate and 8 nodes. A one-clock write strobe marks the first clock of each word, so
// the strobe of each path starts after that path's own pipeline delay.
//
// Interface: in_valid/in_node/in_data come from the reordering memory.
// node_data[n] and node_wr[n] form node n's data path.
// Timing: node n's first word and strobe appear on the clock edge that loads
// its channel (registered outputs).
//
// The shift registers, the word order and the rate follow the module's
// description; the two-clock word with a one-clock strobe is this design's
// choice.
module dim_distributor
  import spps_pkg::*;
#(
  parameter int unsigned NNODES = N_NODES
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [$clog2(NNODES)-1:0] in_node,
  input  stokes_t                   in_data,
  output sm16_t                     node_data [NNODES],
  output logic                      node_wr   [NNODES]
);

  localparam int unsigned HOLD = NNODES / N_STOKES;   // clocks per word
  localparam int unsigned PW   = $clog2(NNODES) + 1;

  for (genvar n = 0; n < NNODES; n++) begin : g_node
    sm16_t         sr [N_STOKES];
    logic [PW-1:0] phase;     // clocks since load
    logic          active;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k < N_STOKES; k++) sr[k] <= '0;
        phase  <= '0;
        active <= 1'b0;
      end else if (in_valid && in_node == n) begin
        sr[0]  <= in_data.i;
        sr[1]  <= in_data.q;
        sr[2]  <= in_data.u;
        sr[3]  <= in_data.v;
        phase  <= '0;
        active <= 1'b1;
      end else if (active) begin
        phase <= phase + 1'b1;
        if (phase == PW'(NNODES - 1)) active <= 1'b0;
        if (32'(phase) % HOLD == HOLD - 1) begin
          for (int k = 0; k < N_STOKES - 1; k++) sr[k] <= sr[k+1];
          sr[N_STOKES-1] <= '0;
        end
      end
    end

    assign node_data[n] = sr[0];
    assign node_wr[n]   = active && (32'(phase) % HOLD == 0);
  end

  initial begin
    assert (NNODES % N_STOKES == 0)
      else $error("dim_distributor: NNODES must be a multiple of 4");
  end

endmodule
