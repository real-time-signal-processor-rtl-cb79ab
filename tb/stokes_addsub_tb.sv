// stokes_addsub_tb: drives random product terms and checks I, Q, U, V
// (sign-magnitude, magnitude = |sum| / 4) and the pass-through mapping, with
// the two-clock latency.
//
// The stimulus and the reference model are this testbench's own; the expected
// values and timing follow the behaviour described for the block.
module stokes_addsub_tb;
  import spps_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_sof, in_pass;
  lut_out_t in_data;
  logic out_valid, out_sof;
  stokes_t out_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  stokes_addsub dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int sv(logic [15:0] m, logic s);
    return s ? -int'(m) : int'(m);
  endfunction

  function automatic bit same(sm16_t w, int x);
    int a;
    a = (x < 0) ? -x : x;
    return (w.sign == (x < 0)) && (int'(w.mag) == a / 4);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lut_out_t x;
    int ei, eq, eu, ev;
    bit p;
    in_valid = 0; in_sof = 0; in_pass = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      x = lut_out_t'({$urandom, $urandom, $urandom, $urandom});
      x.p_liri = 16'($urandom_range(0, 65025)); x.p_lirr = 16'($urandom_range(0, 65025));
      x.p_lrri = 16'($urandom_range(0, 65025)); x.p_lrrr = 16'($urandom_range(0, 65025));
      x.sq_l = 16'($urandom_range(0, 65025));   x.sq_r = 16'($urandom_range(0, 65025));
      if (t == 0) begin x.p_lrrr = 65025; x.p_liri = 65025; x.s_lrrr = 1; x.s_liri = 1; end
      p = (t % 5 == 2);
      @(negedge clk);
      in_data = x; in_valid = 1; in_sof = (t == 0); in_pass = p;
      @(negedge clk);
      in_valid = 0;
      @(posedge clk); #1;
      check(out_valid == 1 && out_sof == (t == 0), "valid after two clocks");
      if (!p) begin
        ei = int'(x.sq_l) + int'(x.sq_r);
        ev = int'(x.sq_l) - int'(x.sq_r);
        eq = sv(x.p_lrrr, x.s_lrrr) + sv(x.p_liri, x.s_liri);
        eu = sv(x.p_lirr, x.s_lirr) - sv(x.p_lrri, x.s_lrri);
        check(same(out_data.i, ei), "I");
        check(same(out_data.q, eq), "Q");
        check(same(out_data.u, eu), "U");
        check(same(out_data.v, ev), "V");
      end else begin
        check(out_data.i == {x.s_liri, 7'b0, x.sq_l[7:0]}, "pass I<-LR");
        check(out_data.q == {x.s_lirr, 7'b0, x.sq_l[15:8]}, "pass Q<-LI");
        check(out_data.u == {x.s_lrri, 7'b0, x.sq_r[7:0]}, "pass U<-RR");
        check(out_data.v == {x.s_lrrr, 7'b0, x.sq_r[15:8]}, "pass V<-RI");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
