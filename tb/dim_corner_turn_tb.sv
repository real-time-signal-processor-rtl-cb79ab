// dim_corner_turn_tb: writes three back-to-back spectra of tagged words and
// checks that each comes out in node-sequential order (0, 32, 64, ... 224,
// 1, 33, ...) from the right buffer half, starting two clocks after the last
// channel of the spectrum was written, and one channel per clock.
//
// The stimulus and the reference model are this testbench's own; the expected
// values and timing follow the behaviour described for the block.
module dim_corner_turn_tb;
  import spps_pkg::*;

  localparam int NCH = 256, NN = 8, NSPEC = 3;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0;
  stokes_t in_data = '0;
  logic out_valid;
  logic [2:0] out_node;
  stokes_t out_data;
  logic spectrum_done;
  int checks = 0, failures = 0;
  int cyc = 0;
  int last_in_cyc [NSPEC];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dim_corner_turn #(.NCH(NCH), .NNODES(NN)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  function automatic stokes_t tag(int s, int ch);
    stokes_t t;
    t.i = sm16_t'(16'(s * 1000 + ch));
    t.q = sm16_t'(16'(ch ^ 16'h5a5a));
    t.u = sm16_t'(16'(s));
    t.v = sm16_t'(16'(~ch));
    return t;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NSPEC; s++)
      for (int c = 0; c < NCH; c++) begin
        @(negedge clk);
        in_valid = 1; in_sof = (c == 0); in_data = tag(s, c);
        if (c == NCH - 1) last_in_cyc[s] = cyc + 1;  // the edge that takes it
      end
    @(negedge clk) in_valid = 0;
  end

  // sink
  initial begin
    int k, s;
    int first_cyc;
    s = 0; k = 0;
    wait (rst_n);
    while (s < NSPEC) begin
      @(posedge clk); #1;
      if (out_valid) begin
        if (k == 0) begin
          first_cyc = cyc;
          check(first_cyc == last_in_cyc[s] + 2, $sformatf("spectrum %0d read starts 2 clocks after last write (got %0d, want %0d)", s, first_cyc, last_in_cyc[s] + 2));
        end
        check(cyc == first_cyc + k, "one channel per clock");
        check(out_node == 3'(k % NN), "node order");
        check(out_data == tag(s, (k % NN) * (NCH / NN) + k / NN), $sformatf("data s=%0d k=%0d", s, k));
        k++;
        if (k == NCH) begin k = 0; s++; end
      end
    end
    repeat (5) @(posedge clk);
    check(!out_valid, "reading stops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
