// node_bus_ctrl: data-memory glue of a DSP node.
//
// Decodes the processor's data-memory bus into four regions (address bits
// 21:20): 0 = SRAM-A, 1 = SRAM-B, 2 = status port (read), 3 = control port
// (write). The control port holds two software-controlled bits: bit 0
// attaches SRAM-B to the processor (turns on the processor-side buffers) and
// bit 1 is the node's BUS-FREE line to the result collection module. Writing
// a 1 in bit 2 clears the latched ENGAGED interrupt.
//
// SRAM-B has two sides. While it is attached, the processor addresses it and
// may write it. While it is detached, the result address bus addresses it,
// and its data reaches the shared result bus only while the result collection
// module has this node ENGAGED and asserts the node's OE; otherwise the node
// drives zeros, so the nodes' outputs can be ORed onto the result bus in
// place of tri-state buffers.
//
// ENGAGED comes from another clock domain and is synchronised with two flops.
// Its falling edge (the collector has finished with SRAM-B) produces a
// one-clock irq_engaged pulse and sets a sticky flag shown in the status
// port. Status port bits: 0 FIFO empty, 1 FIFO half full, 2 parameter
// semaphore pending, 3 SRAM-B attached, 4 BUS-FREE, 5 ENGAGED, 6 ENGAGED
// interrupt flag. The address map, the bit assignment and the use of an OR
// bus are this design's choice.
module node_bus_ctrl #(
  parameter int unsigned SAW = 18
) (
  input  logic           clk,
  input  logic           rst_n,
  // processor data-memory bus
  input  logic [21:0]    dm_addr,
  input  logic [31:0]    dm_wdata,
  input  logic           dm_wr,
  input  logic           dm_rd,
  output logic [31:0]    dm_rdata,
  // status sources
  input  logic           fifo_empty,
  input  logic           fifo_half_full,
  input  logic           param_int,
  // SRAM-A
  output logic           sra_cs,
  output logic           sra_we,
  input  logic [31:0]    sra_rdata,
  // SRAM-B
  output logic           srb_cs,
  output logic           srb_we,
  output logic [SAW-1:0] srb_addr,
  input  logic [31:0]    srb_rdata,
  // result bus side
  input  logic           engaged,
  input  logic           oe,
  input  logic [SAW-1:0] result_addr,
  output logic [31:0]    result_data,
  output logic           busfree,
  output logic           irq_engaged,
  output logic           attached,
  output logic           bus_en
);

  logic [1:0] region;
  logic       engaged_s1, engaged_s2, engaged_s3;
  logic       irq_flag;
  logic [31:0] status;

  assign region = dm_addr[21:20];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      attached    <= 1'b0;
      busfree     <= 1'b0;
      engaged_s1  <= 1'b0;
      engaged_s2  <= 1'b0;
      engaged_s3  <= 1'b0;
      irq_flag    <= 1'b0;
      irq_engaged <= 1'b0;
    end else begin
      engaged_s1  <= engaged;
      engaged_s2  <= engaged_s1;
      engaged_s3  <= engaged_s2;
      irq_engaged <= engaged_s3 && !engaged_s2;
      if (engaged_s3 && !engaged_s2) irq_flag <= 1'b1;
      if (dm_wr && region == 2'd3) begin
        attached <= dm_wdata[0];
        busfree  <= dm_wdata[1];
        if (dm_wdata[2]) irq_flag <= 1'b0;
      end
    end
  end

  assign sra_cs   = (region == 2'd0) && (dm_wr || dm_rd);
  assign sra_we   = (region == 2'd0) && dm_wr;
  assign srb_cs   = attached ? ((region == 2'd1) && (dm_wr || dm_rd)) : bus_en;
  assign srb_we   = attached && (region == 2'd1) && dm_wr;
  assign srb_addr = attached ? dm_addr[SAW-1:0] : result_addr;

  // output-bus buffers: only while the processor has let go of SRAM-B and
  // the collector addresses this node
  assign bus_en      = !attached && engaged && oe;
  assign result_data = bus_en ? srb_rdata : '0;

  assign status = {25'b0, irq_flag, engaged_s2, busfree, attached, param_int,
                   fifo_half_full, fifo_empty};

  always_comb begin
    unique case (region)
      2'd0:    dm_rdata = sra_rdata;
      2'd1:    dm_rdata = attached ? srb_rdata : '0;
      2'd2:    dm_rdata = status;
      default: dm_rdata = '0;
    endcase
  end

  a_no_clash: assert property (@(posedge clk) disable iff (!rst_n) !(attached && bus_en))
    else $error("node_bus_ctrl: SRAM-B attached to both sides");

endmodule
