// async_fifo: the input FIFO of a DSP node (32K words of 32 bits).
//
// The write side runs on the data input module's clock and takes one word
// per wr_en; the read side runs on the processor's clock and is read from its
// program-memory bus. The FIFO is first-word-fall-through: rd_data shows the
// oldest word whenever empty is low, and rd_en removes it. Read and write
// pointers cross between the clocks in Gray code through two-flop
// synchronisers. The processor waits for rd_half_full (at least half the
// FIFO filled) and then reads half a FIFO in one burst.
//
// Writes to a full FIFO and reads from an empty one are ignored, and both
// are flagged by assertions. The Gray-code crossing is this design's choice.
module async_fifo #(
  parameter int unsigned DW = 32,
  parameter int unsigned AW = 15          // 2**AW words
) (
  input  logic          wr_clk,
  input  logic          wr_rst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] wr_data,
  output logic          wr_full,
  input  logic          rd_clk,
  input  logic          rd_rst_n,
  input  logic          rd_en,
  output logic [DW-1:0] rd_data,
  output logic          rd_empty,
  output logic          rd_half_full,
  output logic [AW:0]   rd_count
);

  logic [DW-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_s1, wgray_s2, rgray_s1, rgray_s2;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int k = AW - 1; k >= 0; k--) b[k] = b[k+1] ^ g[k];
    return b;
  endfunction

  // write domain
  logic [AW:0] rbin_w;
  assign rbin_w  = gray2bin(rgray_s2);
  assign wr_full = (wbin[AW] != rbin_w[AW]) && (wbin[AW-1:0] == rbin_w[AW-1:0]);

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin  <= '0;
      wgray <= '0;
      rgray_s1 <= '0;
      rgray_s2 <= '0;
    end else begin
      rgray_s1 <= rgray;
      rgray_s2 <= rgray_s1;
      if (wr_en && !wr_full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wbin[AW-1:0]] <= wr_data;
  end

  // read domain
  logic [AW:0] wbin_r;
  assign wbin_r       = gray2bin(wgray_s2);
  assign rd_count     = wbin_r - rbin;
  assign rd_empty     = (rd_count == '0);
  assign rd_half_full = (rd_count >= (AW+1)'(2**(AW-1)));
  assign rd_data      = mem[rbin[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin  <= '0;
      rgray <= '0;
      wgray_s1 <= '0;
      wgray_s2 <= '0;
    end else begin
      wgray_s1 <= wgray;
      wgray_s2 <= wgray_s1;
      if (rd_en && !rd_empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  a_no_overflow: assert property (@(posedge wr_clk) disable iff (!wr_rst_n) wr_en |-> !wr_full)
    else $error("async_fifo: write to a full FIFO");
  a_no_underflow: assert property (@(posedge rd_clk) disable iff (!rd_rst_n) rd_en |-> !rd_empty)
    else $error("async_fifo: read from an empty FIFO");

endmodule
