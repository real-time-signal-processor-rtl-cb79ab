// node_formatter_tb: random sign-magnitude words, including negative zero
// and full scale, must come out as the same value in 32-bit two's complement
// one clock later, with the strobe delayed by the same clock.
//
// The stimulus and the reference model are this testbench's own; the expected
// values and timing follow the behaviour described for the block.
module node_formatter_tb;
  import spps_pkg::*;
  logic clk = 0, rst_n = 0;
  sm16_t in_data = '0;
  logic in_wr = 0;
  logic [31:0] out_data;
  logic out_wr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  node_formatter dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sm16_t w;
    bit s;
    int v;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      w = sm16_t'(16'($urandom));
      if (t == 0) w = 16'h8000;
      if (t == 1) w = 16'hFFFF;
      if (t == 2) w = 16'h7FFF;
      s = $urandom_range(0, 1);
      @(negedge clk); in_data = w; in_wr = s;
      @(negedge clk); in_wr = 0;
      v = w.mag;
      if (w.sign) v = -v;
      check($signed(out_data) == v, $sformatf("value %h -> %h", w, out_data));
      check(out_wr == s, "strobe delayed one clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
