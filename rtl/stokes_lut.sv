// stokes_lut: first stage of the Stokes computation (look-up table stage).
//
// For every channel it forms the magnitude products needed by the Stokes
// equations and the signs of the cross products. In the original hardware the
// products come from registered EPROM tables addressed by two 8-bit
// magnitudes; here each table is written as the arithmetic it holds, which
// gives the same contents. The squared terms are the upper 16 bits of the
// 17-bit sum LI^2+LR^2 (i.e. divided by two); the cross products fit in 16
// bits as they are. Each cross-product sign is the XOR of the two sign bits.
//
// PASS-THROUGH mode makes the outputs replicas of the inputs so that raw
// voltages reach the later stages: sq_l carries {|LI|,|LR|}, sq_r carries
// {|RI|,|RR|} and the four sign outputs carry the signs of LR, LI, RR, RI.
// That field mapping is this design's choice.
//
// Timing: one register stage (the registered tables), so the outputs follow
// the inputs by one clock; in_valid/in_sof travel alongside.
module stokes_lut
  import spps_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pass_through,
  input  logic        in_valid,
  input  logic        in_sof,       // first channel of a spectrum
  input  pol_sample_t in_data,
  output logic        out_valid,
  output logic        out_sof,
  output logic        out_pass,     // pass-through flag for the next stage
  output lut_out_t    out_data
);

  lut_out_t lut;
  logic [16:0] sum_l, sum_r;

  always_comb begin
    sum_l = 17'(in_data.li.mag * in_data.li.mag) + 17'(in_data.lr.mag * in_data.lr.mag);
    sum_r = 17'(in_data.ri.mag * in_data.ri.mag) + 17'(in_data.rr.mag * in_data.rr.mag);
    if (pass_through) begin
      lut.sq_l   = {in_data.li.mag, in_data.lr.mag};
      lut.sq_r   = {in_data.ri.mag, in_data.rr.mag};
      lut.p_liri = '0;
      lut.p_lirr = '0;
      lut.p_lrri = '0;
      lut.p_lrrr = '0;
      lut.s_liri = in_data.lr.sign;
      lut.s_lirr = in_data.li.sign;
      lut.s_lrri = in_data.rr.sign;
      lut.s_lrrr = in_data.ri.sign;
    end else begin
      lut.sq_l   = sum_l[16:1];
      lut.sq_r   = sum_r[16:1];
      lut.p_liri = in_data.li.mag * in_data.ri.mag;
      lut.p_lirr = in_data.li.mag * in_data.rr.mag;
      lut.p_lrri = in_data.lr.mag * in_data.ri.mag;
      lut.p_lrrr = in_data.lr.mag * in_data.rr.mag;
      lut.s_liri = in_data.li.sign ^ in_data.ri.sign;
      lut.s_lirr = in_data.li.sign ^ in_data.rr.sign;
      lut.s_lrri = in_data.lr.sign ^ in_data.ri.sign;
      lut.s_lrrr = in_data.lr.sign ^ in_data.rr.sign;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_pass  <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      out_sof   <= in_valid & in_sof;
      out_pass  <= pass_through;
      out_data  <= lut;
    end
  end

endmodule
