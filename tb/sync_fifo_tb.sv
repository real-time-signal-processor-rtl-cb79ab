// sync_fifo_tb: random pushes and pops on the 32K x 16 result FIFO checked
// against a queue model, including the empty, half-full, full and PAFE
// flags (PAFE: at most 127 words or at most 127 free places) and clear.
//
// The stimulus and the reference model are this testbench's own; the expected
// values and timing follow the behaviour described for the block.
module sync_fifo_tb;
  localparam int AW = 15, DW = 16, DEPTH = 2 ** AW;
  logic clk = 0, rst_n = 0, clear = 0, wr_en = 0, rd_en = 0;
  logic [DW-1:0] wr_data = '0, rd_data;
  logic empty, full, half_full, pafe;
  logic [AW:0] count;
  int checks = 0, failures = 0;
  logic [DW-1:0] model [$];

  always #5 clk = ~clk;
  sync_fifo #(.DW(DW), .AW(AW)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_flags();
    int n = model.size();
    check(empty == (n == 0), "empty");
    check(full == (n == DEPTH), "full");
    check(half_full == (n >= DEPTH / 2), "half full");
    check(pafe == (n <= 127 || n >= DEPTH - 127), $sformatf("pafe at %0d", n));
    check(count == n, "count");
    if (n > 0) check(rd_data == model[0], "head word");
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int pw, int pr);
    bit w, r;
    logic [DW-1:0] d;
    w = ($urandom_range(0, 99) < pw) && model.size() < DEPTH;
    r = ($urandom_range(0, 99) < pr) && model.size() > 0;
    d = 16'($urandom);
    @(negedge clk);
    wr_en = w; wr_data = d; rd_en = r;
    @(posedge clk);
    if (r) void'(model.pop_front());
    if (w) model.push_back(d);
    @(negedge clk);
    wr_en = 0; rd_en = 0;
    #1 check_flags();
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 check_flags();
    for (int t = 0; t < 2000; t++) step(60, 50);
    while (model.size() < DEPTH) step(100, 0);   // fill
    check(full, "reached full");
    for (int t = 0; t < 300; t++) step(50, 50);
    while (model.size() > 0) step(0, 100);       // drain
    for (int t = 0; t < 200; t++) step(100, 0);
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    model.delete();
    #1 check_flags();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
