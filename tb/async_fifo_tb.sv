// async_fifo_tb: writes on a 16 MHz-like clock and reads on a 25 MHz-like
// clock (62.5 ns and 40 ns periods). Checks word order against a queue model,
// the empty flag, the half-full flag once half the FIFO is filled, the full
// flag, and that all words come out. Uses the default 32K depth.
//
// The stimulus and the reference model are this testbench's own; the expected
// values and timing follow the behaviour described for the block.
module async_fifo_tb;
  localparam int AW = 15, DW = 32, DEPTH = 2 ** AW;
  logic wr_clk = 0, rd_clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [DW-1:0] wr_data = '0, rd_data;
  logic wr_full, rd_empty, rd_half_full;
  logic [AW:0] rd_count;
  int checks = 0, failures = 0;
  logic [DW-1:0] model [$];
  int nwritten = 0, nread = 0;
  bit saw_hf = 0, saw_full = 0;

  always #31.25 wr_clk = ~wr_clk;
  always #20 rd_clk = ~rd_clk;

  async_fifo #(.DW(DW), .AW(AW)) dut (
    .wr_clk, .wr_rst_n(rst_n), .wr_en, .wr_data, .wr_full,
    .rd_clk, .rd_rst_n(rst_n), .rd_en, .rd_data, .rd_empty, .rd_half_full, .rd_count
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer: fill to full, then keep writing whenever not full
  initial begin
    logic [DW-1:0] d;
    repeat (3) @(posedge wr_clk);
    rst_n = 1;
    while (nwritten < DEPTH + 5000) begin
      @(negedge wr_clk);
      if (!wr_full) begin
        d = $urandom;
        wr_en = 1; wr_data = d;
        @(posedge wr_clk);
        model.push_back(d);
        nwritten++;
      end else begin
        wr_en = 0;
        saw_full = 1;
      end
    end
    @(negedge wr_clk) wr_en = 0;
  end

  // reader: wait for half full, then drain in bursts
  initial begin
    wait (rst_n);
    @(posedge rd_clk); #1;
    check(rd_empty && !rd_half_full, "empty after reset");
    wait (rd_half_full);
    saw_hf = 1;
    check(rd_count >= DEPTH / 2, "half full means at least half the depth");
    wait (saw_full);
    while (nread < DEPTH + 5000) begin
      @(negedge rd_clk);
      if (!rd_empty) begin
        check(model.size() > 0 && rd_data == model[0], $sformatf("word %0d", nread));
        rd_en = 1;
        @(posedge rd_clk);
        void'(model.pop_front());
        nread++;
      end else rd_en = 0;
    end
    @(negedge rd_clk) rd_en = 0;
    repeat (10) @(posedge rd_clk);
    #1;
    check(rd_empty, "empty at the end");
    check(saw_hf && saw_full, "half-full and full seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
