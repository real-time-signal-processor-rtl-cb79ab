// sync_fifo: the result FIFO bank of the result collection module
// (32K words of 16 bits).
//
// One clock for both sides. The FIFO is first-word-fall-through: rd_data is
// the oldest word whenever empty is low and rd_en removes it. Flags follow
// the usual FIFO-chip set: empty (EF), half full (HF: at least half the
// depth stored) and a programmable almost-empty/almost-full flag (PAFE:
// at most PAE_OFS words, or at most PAF_OFS free places). The offsets are
// this design's choice.
module sync_fifo #(
  parameter int unsigned DW      = 16,
  parameter int unsigned AW      = 15,
  parameter int unsigned PAE_OFS = 127,
  parameter int unsigned PAF_OFS = 127
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          wr_en,
  input  logic [DW-1:0] wr_data,
  input  logic          rd_en,
  output logic [DW-1:0] rd_data,
  output logic          empty,
  output logic          full,
  output logic          half_full,
  output logic          pafe,
  output logic [AW:0]   count
);

  logic [DW-1:0] mem [2**AW];
  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign empty     = (count == '0);
  assign full      = (count == (AW+1)'(2**AW));
  assign half_full = (count >= (AW+1)'(2**(AW-1)));
  assign pafe      = (count <= (AW+1)'(PAE_OFS)) || (count >= (AW+1)'(2**AW - PAF_OFS));
  assign do_wr     = wr_en && !full;
  assign do_rd     = rd_en && !empty;
  assign rd_data   = mem[rptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else if (clear) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !full)
    else $error("sync_fifo: write to a full FIFO");

endmodule
