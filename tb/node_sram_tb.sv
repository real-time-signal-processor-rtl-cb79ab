// node_sram_tb: writes random words to random addresses of the 256K x 32
// RAM (plus the first and last word), then reads every written address back
// without a clock (asynchronous read) and checks that writes need both cs
// and we.
//
// The stimulus and the reference model are this testbench's own; the expected
// values and timing follow the behaviour described for the block.
module node_sram_tb;
  localparam int AW = 18, DW = 32;
  logic clk = 0, cs = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [DW-1:0] model [int];

  always #5 clk = ~clk;
  node_sram #(.AW(AW), .DW(DW)) dut (.*);

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

  task automatic write(logic [AW-1:0] a, logic [DW-1:0] d, bit c, bit w);
    @(negedge clk);
    addr = a; wdata = d; cs = c; we = w;
    @(negedge clk);
    cs = 0; we = 0;
    if (c && w) model[int'(a)] = d;
  endtask

  initial begin
    logic [AW-1:0] a;
    write('0, 32'h1234_5678, 1, 1);
    write('1, 32'h9abc_def0, 1, 1);
    for (int t = 0; t < 3000; t++) write(AW'($urandom), $urandom, 1, 1);
    // attempted writes without cs or without we must not land
    for (int t = 0; t < 200; t++) begin
      a = AW'($urandom);
      write(a, $urandom, t % 2 == 0, t % 2 == 1);
    end
    foreach (model[k]) begin
      addr = AW'(k);
      #1 check(rdata == model[k], $sformatf("address %0h", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
