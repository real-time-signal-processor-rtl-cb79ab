// rcm_isa_regs: ISA-bus interface, background registers and status register
// of the result collection module.
//
// The module occupies a 64 KB window of the PC's memory space starting at
// BASE (a multiple of 64 KB). The lower 32 KB read the result FIFO: every
// memory read there returns the FIFO's oldest 16-bit word and removes it when
// the read strobe ends. The upper 32 KB hold the registers, one per 16-bit
// word, indexed by address bits 4:1:
//   0 CTRL    bit 0 acquire enable, bit 1 enable DIM, bits 5:2 configure DIM,
//             bit 6 clear the result FIFO (self-clearing)
//   1 RATE    8-bit rate value of the acquisition counter
//   2 LOWER   lower-bound address, bits 15:0    3  bits 17:16
//   4 UPPER   upper-bound address, bits 15:0    5  bits 17:16
//   6 NODESEQ node-sequence pattern, bits 15:0  7  bits 31:16
//   8 STATUS  (read) bits 7:0 BUS-FREE of the nodes, 11:8 DIM configured,
//             12 FIFO empty, 13 FIFO half full, 14 FIFO PAFE
// The board is a 16-bit, zero-wait-state ISA memory: memcs16_n and
// zerows_n go low while the window is addressed (and, for zerows_n, a
// strobe is active). The ISA strobes are active low and asynchronous; they
// are synchronised to clk with two flops and acted on at the rising (end)
// edge. BASE, the register map and the strobe timing are this design's
// choice; the window split, the bound, rate and node-sequence registers and
// the status inputs come from the module's description.
module rcm_isa_regs #(
  parameter logic [19:0] BASE = 20'hD0000
) (
  input  logic        clk,
  input  logic        rst_n,
  // ISA bus
  input  logic [19:0] sa,
  input  logic [15:0] sd_in,
  output logic [15:0] sd_out,
  output logic        sd_oe,
  input  logic        aen,
  input  logic        memw_n,
  input  logic        memr_n,
  output logic        memcs16_n,
  output logic        zerows_n,
  // result FIFO
  input  logic [15:0] fifo_q,
  input  logic        fifo_empty,
  input  logic        fifo_hf,
  input  logic        fifo_pafe,
  output logic        fifo_rd,
  output logic        fifo_clear,
  // status inputs
  input  logic [7:0]  busfree,
  input  logic [3:0]  dim_configured,
  // background registers
  output logic        acquire_enable,
  output logic        enable_dim,
  output logic [3:0]  configure_dim,
  output logic [7:0]  rate,
  output logic [17:0] lower,
  output logic [17:0] upper,
  output logic [31:0] nodeseq
);

  logic sel, sel_fifo, sel_reg;
  logic [3:0] idx;
  logic memw_s1, memw_s2, memw_s3, memr_s1, memr_s2, memr_s3;
  logic wr_end, rd_end;
  logic [15:0] status;

  assign sel      = !aen && (sa[19:16] == BASE[19:16]);
  assign sel_fifo = sel && !sa[15];
  assign sel_reg  = sel && sa[15];
  assign idx      = sa[4:1];

  assign memcs16_n = !sel;
  assign zerows_n  = !(sel && (!memw_n || !memr_n));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {memw_s1, memw_s2, memw_s3} <= 3'b111;
      {memr_s1, memr_s2, memr_s3} <= 3'b111;
    end else begin
      memw_s1 <= memw_n; memw_s2 <= memw_s1; memw_s3 <= memw_s2;
      memr_s1 <= memr_n; memr_s2 <= memr_s1; memr_s3 <= memr_s2;
    end
  end

  assign wr_end = memw_s2 && !memw_s3;   // strobe went inactive
  assign rd_end = memr_s2 && !memr_s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acquire_enable <= 1'b0;
      enable_dim     <= 1'b0;
      configure_dim  <= '0;
      fifo_clear     <= 1'b0;
      rate           <= '0;
      lower          <= '0;
      upper          <= '0;
      nodeseq        <= '0;
    end else begin
      fifo_clear <= 1'b0;
      if (wr_end && sel_reg) begin
        unique case (idx)
          4'd0: begin
            acquire_enable <= sd_in[0];
            enable_dim     <= sd_in[1];
            configure_dim  <= sd_in[5:2];
            fifo_clear     <= sd_in[6];
          end
          4'd1: rate           <= sd_in[7:0];
          4'd2: lower[15:0]    <= sd_in;
          4'd3: lower[17:16]   <= sd_in[1:0];
          4'd4: upper[15:0]    <= sd_in;
          4'd5: upper[17:16]   <= sd_in[1:0];
          4'd6: nodeseq[15:0]  <= sd_in;
          4'd7: nodeseq[31:16] <= sd_in;
          default: ;
        endcase
      end
    end
  end

  assign fifo_rd = rd_end && sel_fifo && !fifo_empty;

  assign status = {1'b0, fifo_pafe, fifo_hf, fifo_empty, dim_configured, busfree};

  always_comb begin
    sd_out = '0;
    if (sel_fifo) sd_out = fifo_q;
    else begin
      unique case (idx)
        4'd0: sd_out = {9'b0, 1'b0, configure_dim, enable_dim, acquire_enable};
        4'd1: sd_out = {8'b0, rate};
        4'd2: sd_out = lower[15:0];
        4'd3: sd_out = {14'b0, lower[17:16]};
        4'd4: sd_out = upper[15:0];
        4'd5: sd_out = {14'b0, upper[17:16]};
        4'd6: sd_out = nodeseq[15:0];
        4'd7: sd_out = nodeseq[31:16];
        4'd8: sd_out = status;
        default: sd_out = '0;
      endcase
    end
  end
  assign sd_oe = sel && !memr_n;

endmodule
