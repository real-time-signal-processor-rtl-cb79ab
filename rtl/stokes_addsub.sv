// stokes_addsub: second stage of the Stokes computation (adder stage).
//
// Combines the look-up table outputs into the four Stokes parameters of a
// dual circular-polarisation input, L = LR + j*LI and R = RR + j*RI:
//   I = |L|^2 + |R|^2          V = |L|^2 - |R|^2
//   Q = Re(2 L R*) = 2(LR*RR + LI*RI)
//   U = Im(2 L R*) = 2(LI*RR - LR*RI)
// The table stage delivers every term at half its true value, so the sums
// here are true/2 and need 18 bits with sign. Each result is sent on as a
// 16-bit sign-magnitude word whose magnitude is |sum| >> 2 (true value / 8,
// truncated), which fits 15 bits for all 8-bit inputs. The output scaling is
// this design's choice; the equations and the 16-bit width are the design's.
//
// In PASS-THROUGH mode the raw inputs come out instead:
// I <- LR, Q <- LI, U <- RR, V <- RI, magnitude in the low 8 bits.
//
// Timing: two pipeline registers (add/subtract, then format); outputs follow
// the inputs by two clocks.
module stokes_addsub
  import spps_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  logic     in_sof,
  input  logic     in_pass,
  input  lut_out_t in_data,
  output logic     out_valid,
  output logic     out_sof,
  output stokes_t  out_data
);

  typedef logic signed [17:0] acc_t;

  function automatic acc_t signed_term(logic [15:0] mag, logic s);
    acc_t m;
    m = acc_t'({2'b00, mag});
    return s ? -m : m;
  endfunction

  function automatic sm16_t to_sm16(acc_t x);
    logic [17:0] a;
    a = (x < 0) ? 18'(-x) : 18'(x);
    return '{sign: (x < 0), mag: a[16:2]};
  endfunction

  function automatic sm16_t raw_sm16(logic s, logic [7:0] m);
    return '{sign: s, mag: {7'b0, m}};
  endfunction

  // stage A: sums
  acc_t i_a, v_a, q_a, u_a;
  logic valid_a, sof_a, pass_a;
  lut_out_t raw_a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_a <= 1'b0;
      sof_a   <= 1'b0;
      pass_a  <= 1'b0;
      i_a <= '0; v_a <= '0; q_a <= '0; u_a <= '0;
      raw_a <= '0;
    end else begin
      valid_a <= in_valid;
      sof_a   <= in_sof;
      pass_a  <= in_pass;
      raw_a   <= in_data;
      i_a <= acc_t'({2'b00, in_data.sq_l}) + acc_t'({2'b00, in_data.sq_r});
      v_a <= acc_t'({2'b00, in_data.sq_l}) - acc_t'({2'b00, in_data.sq_r});
      q_a <= signed_term(in_data.p_lrrr, in_data.s_lrrr) + signed_term(in_data.p_liri, in_data.s_liri);
      u_a <= signed_term(in_data.p_lirr, in_data.s_lirr) - signed_term(in_data.p_lrri, in_data.s_lrri);
    end
  end

  // stage B: sign-magnitude formatting or pass-through
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= valid_a;
      out_sof   <= sof_a;
      if (pass_a) begin
        out_data.i <= raw_sm16(raw_a.s_liri, raw_a.sq_l[7:0]);   // LR
        out_data.q <= raw_sm16(raw_a.s_lirr, raw_a.sq_l[15:8]);  // LI
        out_data.u <= raw_sm16(raw_a.s_lrri, raw_a.sq_r[7:0]);   // RR
        out_data.v <= raw_sm16(raw_a.s_lrrr, raw_a.sq_r[15:8]);  // RI
      end else begin
        out_data.i <= to_sm16(i_a);
        out_data.q <= to_sm16(q_a);
        out_data.u <= to_sm16(u_a);
        out_data.v <= to_sm16(v_a);
      end
    end
  end

endmodule
