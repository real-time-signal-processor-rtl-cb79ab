// spps_top: one sub-band of the real-time pulsar signal processor.
//
// Dual-polarisation spectra (256 channels, one channel per clk_dim cycle)
// enter the data input module, which computes I, Q, U, V per channel and
// spreads the channels over eight node paths, 32 consecutive channels per
// node. Each DSP node buffers its path in a FIFO, processes it with its
// processor (outside this module: its program- and data-memory buses are
// ports) and leaves results in SRAM-B. The result collection module reads
// the nodes' SRAM-B blocks over the shared result bus into a FIFO that the
// control PC reads over ISA, and sends the same words to a recorder port.
// The control PC loads code and parameters into the nodes' code memories over
// the program bus (parallel ports, page selector and chip-select decoder).
//
// The result bus is a wired OR: a node drives zeros unless the collector
// has it ENGAGED and asserts its OE. ENABLE DIM from the collector's control
// register gates the data input module after a two-flop synchroniser.
// Clocks: clk_dim 16 MHz (input side), clk_dsp 25 MHz (nodes), clk_rcm
// 16 MHz (collector), clk_pc (program bus).
//
// The partition into blocks, the clock rates and the node count follow the
// instrument's description; the OR-bus, the synchroniser and bringing the
// processor buses out as ports are this design's choice.
module spps_top
  import spps_pkg::*;
#(
  parameter int unsigned FIFO_AW     = 15,   // node input FIFO: 32K x 32
  parameter int unsigned SRAM_AW     = 18,   // SRAM-A / SRAM-B: 256K x 32
  parameter int unsigned RCM_FIFO_AW = 15    // result FIFO: 32K x 16
) (
  input  logic        clk_dim,
  input  logic        clk_dsp,
  input  logic        clk_rcm,
  input  logic        clk_pc,
  input  logic        rst_n,
  // spectra from the FFT
  input  logic        in_valid,
  input  logic        in_sof,
  input  pol_sample_t in_data,
  input  logic        pass_through,
  // program bus from the control PC's parallel ports
  input  logic        pb_page_ld,
  input  logic [12:0] pb_addr,
  input  logic [15:0] pb_wdata,
  input  logic        pb_wr,
  input  logic        pb_rd,
  output logic [15:0] pb_rdata,
  output logic [N_NODES-1:0] pb_int,
  // processor buses, one per node
  input  logic [23:0] pm_addr  [N_NODES],
  input  logic [47:0] pm_wdata [N_NODES],
  input  logic        pm_rd    [N_NODES],
  input  logic        pm_wr    [N_NODES],
  output logic [47:0] pm_rdata [N_NODES],
  input  logic [21:0] dm_addr  [N_NODES],
  input  logic [31:0] dm_wdata [N_NODES],
  input  logic        dm_rd    [N_NODES],
  input  logic        dm_wr    [N_NODES],
  output logic [31:0] dm_rdata [N_NODES],
  output logic [N_NODES-1:0] irq_engaged,
  output logic [N_NODES-1:0] irq_param,
  output logic [N_NODES-1:0] fifo_half_full,
  // ISA bus of the result collection module
  input  logic [19:0] isa_sa,
  input  logic [15:0] isa_sd_in,
  output logic [15:0] isa_sd_out,
  output logic        isa_sd_oe,
  input  logic        isa_aen,
  input  logic        isa_memw_n,
  input  logic        isa_memr_n,
  output logic        isa_memcs16_n,
  output logic        isa_zerows_n,
  // DIM configuration lines and recorder port
  input  logic [3:0]  dim_configured,
  output logic [3:0]  configure_dim,
  output logic        acquire_enable,
  output logic [15:0] rec_data,
  output logic        rec_wr,
  output logic        rcm_fifo_empty,
  output logic        rcm_fifo_hf,
  output logic        rcm_fifo_pafe
);

  // data input module
  sm16_t node_data [N_NODES];
  logic  node_wr   [N_NODES];
  logic  enable_dim, en_s1, en_s2;

  always_ff @(posedge clk_dim or negedge rst_n) begin
    if (!rst_n) {en_s1, en_s2} <= 2'b00;
    else        {en_s1, en_s2} <= {enable_dim, en_s1};
  end

  data_input_module u_dim (
    .clk(clk_dim), .rst_n, .enable(en_s2), .pass_through,
    .in_valid, .in_sof, .in_data, .node_data, .node_wr
  );

  // program bus decoder
  logic [3*N_NODES-1:0] cs;
  logic [4:0]           page;

  code_bus_decoder #(.NPAGES(3*N_NODES)) u_pbdec (
    .clk(clk_pc), .rst_n, .page_ld(pb_page_ld), .data(pb_wdata),
    .wr(pb_wr), .rd(pb_rd), .cs, .page
  );

  // result bus
  logic [N_NODES-1:0] busfree, engaged, oe;
  logic [17:0]        result_addr;
  logic [31:0]        node_result [N_NODES];
  logic [15:0]        node_pc_rdata [N_NODES];
  logic [31:0]        result_data;

  for (genvar n = 0; n < N_NODES; n++) begin : g_node
    dsp_node #(.FIFO_AW(FIFO_AW), .SRAM_AW(SRAM_AW), .CODE_AW(13)) u_node (
      .clk_dim, .clk_dsp, .clk_pc, .rst_n,
      .in_data(node_data[n]), .in_wr(node_wr[n]),
      .pm_addr(pm_addr[n]), .pm_wdata(pm_wdata[n]), .pm_rd(pm_rd[n]), .pm_wr(pm_wr[n]),
      .pm_rdata(pm_rdata[n]),
      .dm_addr(dm_addr[n]), .dm_wdata(dm_wdata[n]), .dm_rd(dm_rd[n]), .dm_wr(dm_wr[n]),
      .dm_rdata(dm_rdata[n]),
      .irq_engaged(irq_engaged[n]), .irq_param(irq_param[n]),
      .fifo_half_full(fifo_half_full[n]),
      .pc_cs(cs[3*n +: 3]), .pc_addr(pb_addr), .pc_wdata(pb_wdata),
      .pc_we(pb_wr), .pc_re(pb_rd), .pc_rdata(node_pc_rdata[n]), .pc_int(pb_int[n]),
      .engaged(engaged[n]), .oe(oe[n]), .result_addr(result_addr[SRAM_AW-1:0]),
      .result_data(node_result[n]), .busfree(busfree[n])
    );
  end

  always_comb begin
    result_data = '0;
    pb_rdata    = '0;
    for (int n = 0; n < N_NODES; n++) begin
      result_data = result_data | node_result[n];
      pb_rdata    = pb_rdata | node_pc_rdata[n];
    end
  end

  result_collection_module #(.NNODES(N_NODES), .FIFO_AW(RCM_FIFO_AW)) u_rcm (
    .clk(clk_rcm), .rst_n,
    .sa(isa_sa), .sd_in(isa_sd_in), .sd_out(isa_sd_out), .sd_oe(isa_sd_oe),
    .aen(isa_aen), .memw_n(isa_memw_n), .memr_n(isa_memr_n),
    .memcs16_n(isa_memcs16_n), .zerows_n(isa_zerows_n),
    .busfree, .dim_configured, .result_data, .engaged, .oe, .result_addr,
    .configure_dim, .enable_dim, .acquire_enable,
    .rec_data, .rec_wr,
    .fifo_empty(rcm_fifo_empty), .fifo_hf(rcm_fifo_hf), .fifo_pafe(rcm_fifo_pafe)
  );

endmodule
