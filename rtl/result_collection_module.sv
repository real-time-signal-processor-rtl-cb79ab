// result_collection_module: gathers the result blocks of the DSP nodes.
//
// rcm_sequencer reads each ready node's SRAM-B over the shared result bus
// (32-bit data, 18-bit address, per-node ENGAGED and OE, per-node BUS-FREE
// back) and splits every 32-bit word into two 16-bit words. These go into
// the 32K x 16 result FIFO, which the PC reads through the ISA window of
// rcm_isa_regs, and at the same time, with a write strobe, to the
// high-speed recorder port (rec_data, rec_wr). The PC sets the bounds, rate
// and node sequence and reads BUS-FREE, the DIM configuration lines and the
// FIFO flags through the same window. Everything runs on one 16 MHz clock.
//
// The block structure (sequencer, 32K x 16 FIFO, ISA window, recorder port)
// follows the module's description; how the parts are wired to one clock and
// the recorder port taking the FIFO's write data are this design's choice.
module result_collection_module #(
  parameter int unsigned NNODES  = 8,
  parameter int unsigned FIFO_AW = 15,
  parameter logic [19:0] BASE    = 20'hD0000
) (
  input  logic              clk,
  input  logic              rst_n,
  // ISA bus
  input  logic [19:0]       sa,
  input  logic [15:0]       sd_in,
  output logic [15:0]       sd_out,
  output logic              sd_oe,
  input  logic              aen,
  input  logic              memw_n,
  input  logic              memr_n,
  output logic              memcs16_n,
  output logic              zerows_n,
  // backplane
  input  logic [NNODES-1:0] busfree,
  input  logic [3:0]        dim_configured,
  input  logic [31:0]       result_data,
  output logic [NNODES-1:0] engaged,
  output logic [NNODES-1:0] oe,
  output logic [17:0]       result_addr,
  output logic [3:0]        configure_dim,
  output logic              enable_dim,
  output logic              acquire_enable,
  // high-speed recorder port
  output logic [15:0]       rec_data,
  output logic              rec_wr,
  // FIFO flags (also on the status register)
  output logic              fifo_empty,
  output logic              fifo_hf,
  output logic              fifo_pafe
);

  logic [7:0]  rate;
  logic [17:0] lower, upper;
  logic [31:0] nodeseq;
  logic        fifo_rd, fifo_clear, fifo_full;
  logic [15:0] fifo_q;
  logic [FIFO_AW:0] fifo_count;
  logic [$clog2(NNODES)-1:0] cur_node;
  logic        node_done;
  logic [7:0]  busfree8;

  assign busfree8 = 8'(busfree);

  rcm_isa_regs #(.BASE(BASE)) u_regs (
    .clk, .rst_n,
    .sa, .sd_in, .sd_out, .sd_oe, .aen, .memw_n, .memr_n, .memcs16_n, .zerows_n,
    .fifo_q, .fifo_empty, .fifo_hf, .fifo_pafe, .fifo_rd, .fifo_clear,
    .busfree(busfree8), .dim_configured,
    .acquire_enable, .enable_dim, .configure_dim, .rate, .lower, .upper, .nodeseq
  );

  rcm_sequencer #(.NNODES(NNODES), .AW(18)) u_seq (
    .clk, .rst_n, .acquire_enable, .rate, .lower, .upper, .nodeseq,
    .busfree, .result_data, .engaged, .oe, .result_addr,
    .fifo_wr(rec_wr), .fifo_wdata(rec_data), .cur_node, .node_done
  );

  sync_fifo #(.DW(16), .AW(FIFO_AW)) u_fifo (
    .clk, .rst_n, .clear(fifo_clear),
    .wr_en(rec_wr), .wr_data(rec_data),
    .rd_en(fifo_rd), .rd_data(fifo_q),
    .empty(fifo_empty), .full(fifo_full), .half_full(fifo_hf), .pafe(fifo_pafe),
    .count(fifo_count)
  );

endmodule
