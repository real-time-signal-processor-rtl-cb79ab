// node_formatter: input formatting of a DSP node.
//
// Words arrive from the data input module as 16-bit sign-magnitude numbers
// with a write strobe. The formatting table converts each to the 32-bit two's
// complement form the processor works with, and the delay module delays the
// strobe so that it reaches the FIFO write input together with the formatted
// word. The table is written as the conversion it holds.
//
// Timing: one register stage; out_wr and out_data follow in_wr/in_data by one
// clock.
module node_formatter
  import spps_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  sm16_t       in_data,
  input  logic        in_wr,
  output logic [31:0] out_data,
  output logic        out_wr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_data <= '0;
      out_wr   <= 1'b0;
    end else begin
      out_data <= sm16_to_int(in_data);
      out_wr   <= in_wr;
    end
  end

endmodule
