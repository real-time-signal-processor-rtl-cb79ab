// stokes_lut_tb: checks the product/sign stage against products computed here
// from random sign-magnitude inputs, in normal and pass-through mode, and
// checks the one-clock latency.
//
// The stimulus and the reference model are this testbench's own; the expected
// values and timing follow the behaviour described for the block.
module stokes_lut_tb;
  import spps_pkg::*;

  logic clk = 0, rst_n = 0;
  logic pass_through, in_valid, in_sof;
  pol_sample_t in_data;
  logic out_valid, out_sof, out_pass;
  lut_out_t out_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  stokes_lut dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pol_sample_t x;
    lut_out_t e;
    int a, b;
    pass_through = 0; in_valid = 0; in_sof = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      x = pol_sample_t'({$urandom, $urandom});
      if (t < 4) x = {1'b1, 8'd255, 1'b0, 8'd255, 1'b1, 8'd255, 1'b1, 8'd255};
      pass_through = (t % 7 == 3);
      @(negedge clk);
      in_data = x; in_valid = 1; in_sof = (t % 16 == 0);
      @(posedge clk); #1;
      check(out_valid == 1 && out_sof == (t % 16 == 0) && out_pass == pass_through, "valid/sof/pass latency");
      if (!pass_through) begin
        a = x.li.mag * x.li.mag + x.lr.mag * x.lr.mag;
        b = x.ri.mag * x.ri.mag + x.rr.mag * x.rr.mag;
        check(out_data.sq_l == 16'(a / 2), "sq_l");
        check(out_data.sq_r == 16'(b / 2), "sq_r");
        check(out_data.p_liri == 16'(x.li.mag * x.ri.mag), "p_liri");
        check(out_data.p_lirr == 16'(x.li.mag * x.rr.mag), "p_lirr");
        check(out_data.p_lrri == 16'(x.lr.mag * x.ri.mag), "p_lrri");
        check(out_data.p_lrrr == 16'(x.lr.mag * x.rr.mag), "p_lrrr");
        check(out_data.s_liri == (x.li.sign != x.ri.sign), "s_liri");
        check(out_data.s_lirr == (x.li.sign != x.rr.sign), "s_lirr");
        check(out_data.s_lrri == (x.lr.sign != x.ri.sign), "s_lrri");
        check(out_data.s_lrrr == (x.lr.sign != x.rr.sign), "s_lrrr");
      end else begin
        check(out_data.sq_l == {x.li.mag, x.lr.mag} && out_data.sq_r == {x.ri.mag, x.rr.mag}, "pass mags");
        check({out_data.s_liri, out_data.s_lirr, out_data.s_lrri, out_data.s_lrrr} ==
              {x.lr.sign, x.li.sign, x.rr.sign, x.ri.sign}, "pass signs");
      end
    end
    @(negedge clk); in_valid = 0;
    @(posedge clk); #1;
    check(out_valid == 0, "valid drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
