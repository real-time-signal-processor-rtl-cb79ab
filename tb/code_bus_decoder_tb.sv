// code_bus_decoder_tb: latches every page number 0..23 and checks that a
// read or write strobe selects exactly chip select 3n+k of that page, that
// nothing is selected without a strobe, and that pages above 23 select
// nothing.
//
// The stimulus and the reference model are this testbench's own; the expected
// values and timing follow the behaviour described for the block.
module code_bus_decoder_tb;
  logic clk = 0, rst_n = 0, page_ld = 0, wr = 0, rd = 0;
  logic [15:0] data = 0;
  logic [23:0] cs;
  logic [4:0] page;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  code_bus_decoder #(.NPAGES(24)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 32; p++) begin
      @(negedge clk); page_ld = 1; data = 16'(p) | 16'hA0E0;
      @(negedge clk); page_ld = 0; data = 16'h1234;
      #1 check(cs == '0, "idle: nothing selected");
      wr = 1;
      #1 check(cs == ((p < 24) ? 24'(1 << p) : 24'd0), $sformatf("write selects page %0d", p));
      wr = 0; rd = 1;
      #1 check(cs == ((p < 24) ? 24'(1 << p) : 24'd0), $sformatf("read selects page %0d", p));
      @(negedge clk) rd = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
