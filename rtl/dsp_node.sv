// dsp_node: memories and glue logic of one DSP processing node.
//
// The processor itself is not part of this module; its program-memory (PM)
// and data-memory (DM) buses are ports. Around it sit:
//  * the input path: node_formatter (sign-magnitude to two's complement,
//    delayed write strobe) feeding a 32K x 32 input FIFO written on the data
//    input module's clock and read on the processor's clock;
//  * the 8K x 48 code/parameter/semaphore memory (code_dpram), shared with
//    the control PC's program bus;
//  * SRAM-A, the 256K x 32 working memory, and SRAM-B, the 256K x 32 result
//    memory that is handed between the processor and the result bus
//    (node_bus_ctrl).
//
// PM map (this design's choice): pm_addr[23] = 1 selects the FIFO, whose
// word appears on pm_rdata[47:16] and is removed by pm_rd; otherwise
// pm_addr[12:0] addresses the code memory. DM map: see node_bus_ctrl.
// Clocks: clk_dim (input side, 16 MHz), clk_dsp (processor, 25 MHz),
// clk_pc (program bus).
module dsp_node
  import spps_pkg::*;
#(
  parameter int unsigned FIFO_AW = 15,   // 32K words
  parameter int unsigned SRAM_AW = 18,   // 256K words
  parameter int unsigned CODE_AW = 13    // 8K words
) (
  input  logic               clk_dim,
  input  logic               clk_dsp,
  input  logic               clk_pc,
  input  logic               rst_n,
  // data path from the data input module
  input  sm16_t              in_data,
  input  logic               in_wr,
  // processor program-memory bus
  input  logic [23:0]        pm_addr,
  input  logic [47:0]        pm_wdata,
  input  logic               pm_rd,
  input  logic               pm_wr,
  output logic [47:0]        pm_rdata,
  // processor data-memory bus
  input  logic [21:0]        dm_addr,
  input  logic [31:0]        dm_wdata,
  input  logic               dm_rd,
  input  logic               dm_wr,
  output logic [31:0]        dm_rdata,
  // processor interrupts and flags
  output logic               irq_engaged,
  output logic               irq_param,
  output logic               fifo_half_full,
  // control PC program bus
  input  logic [2:0]         pc_cs,
  input  logic [CODE_AW-1:0] pc_addr,
  input  logic [15:0]        pc_wdata,
  input  logic               pc_we,
  input  logic               pc_re,
  output logic [15:0]        pc_rdata,
  output logic               pc_int,
  // result bus
  input  logic               engaged,
  input  logic               oe,
  input  logic [SRAM_AW-1:0] result_addr,
  output logic [31:0]        result_data,
  output logic               busfree
);

  // input path
  logic [31:0] f_data;
  logic        f_wr, f_full, f_empty;
  logic [31:0] fifo_q;
  logic [FIFO_AW:0] fifo_count;
  logic        fifo_sel, fifo_rd;

  node_formatter u_fmt (
    .clk(clk_dim), .rst_n, .in_data, .in_wr, .out_data(f_data), .out_wr(f_wr)
  );

  async_fifo #(.DW(32), .AW(FIFO_AW)) u_fifo (
    .wr_clk(clk_dim), .wr_rst_n(rst_n), .wr_en(f_wr), .wr_data(f_data), .wr_full(f_full),
    .rd_clk(clk_dsp), .rd_rst_n(rst_n), .rd_en(fifo_rd), .rd_data(fifo_q),
    .rd_empty(f_empty), .rd_half_full(fifo_half_full), .rd_count(fifo_count)
  );

  assign fifo_sel = pm_addr[23];
  assign fifo_rd  = fifo_sel && pm_rd && !f_empty;

  // code memory
  logic [47:0] code_q;

  code_dpram #(.AW(CODE_AW)) u_code (
    .rst_n,
    .clk_pc, .pc_cs, .pc_addr, .pc_wdata, .pc_we, .pc_re, .pc_rdata, .pc_int,
    .clk_dsp, .dsp_sel(!fifo_sel), .dsp_addr(pm_addr[CODE_AW-1:0]), .dsp_wdata(pm_wdata),
    .dsp_we(pm_wr), .dsp_re(pm_rd), .dsp_rdata(code_q), .dsp_int(irq_param)
  );

  assign pm_rdata = fifo_sel ? {fifo_q, 16'h0000} : code_q;

  // data memories
  logic               sra_cs, sra_we, srb_cs, srb_we;
  logic [31:0]        sra_q, srb_q;
  logic [SRAM_AW-1:0] srb_addr;
  logic               attached, bus_en;

  node_bus_ctrl #(.SAW(SRAM_AW)) u_ctrl (
    .clk(clk_dsp), .rst_n,
    .dm_addr, .dm_wdata, .dm_wr, .dm_rd, .dm_rdata,
    .fifo_empty(f_empty), .fifo_half_full, .param_int(irq_param),
    .sra_cs, .sra_we, .sra_rdata(sra_q),
    .srb_cs, .srb_we, .srb_addr, .srb_rdata(srb_q),
    .engaged, .oe, .result_addr, .result_data, .busfree, .irq_engaged,
    .attached, .bus_en
  );

  node_sram #(.AW(SRAM_AW), .DW(32)) u_sram_a (
    .clk(clk_dsp), .cs(sra_cs), .we(sra_we), .addr(dm_addr[SRAM_AW-1:0]),
    .wdata(dm_wdata), .rdata(sra_q)
  );

  node_sram #(.AW(SRAM_AW), .DW(32)) u_sram_b (
    .clk(clk_dsp), .cs(srb_cs), .we(srb_we), .addr(srb_addr),
    .wdata(dm_wdata), .rdata(srb_q)
  );

endmodule
