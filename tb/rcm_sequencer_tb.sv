// rcm_sequencer_tb: eight modelled nodes, each with a result memory and a
// BUS-FREE line that its "processor" drops after ENGAGED falls. Checks that
// the sequencer visits only ready nodes in the programmed order, reads
// LOWER..UPPER from each, writes low then high halves, keeps OE inside
// ENGAGED, takes exactly 8*(RATE+1) clocks per location (for RATE = 0, 5 and
// 255, i.e. 8 Mbytes/s down to 31.25 kbytes/s at 16 MHz), waits while no
// node is ready and does not re-engage a node that still shows BUS-FREE.
//
// The stimulus and the reference model are this testbench's own; the expected
// values and timing follow the behaviour described for the block.
module rcm_sequencer_tb;
  localparam int NN = 8;
  logic clk = 0, rst_n = 0;
  logic acquire_enable = 0;
  logic [7:0] rate = 0;
  logic [17:0] lower = 0, upper = 0;
  logic [31:0] nodeseq = 0;
  logic [NN-1:0] busfree = 0;
  logic [31:0] result_data;
  logic [NN-1:0] engaged, oe;
  logic [17:0] result_addr;
  logic fifo_wr;
  logic [15:0] fifo_wdata;
  logic [2:0] cur_node;
  logic node_done;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [15:0] got [$];
  int wr_cyc [$];
  int engage_count [NN];
  logic [NN-1:0] engaged_d = 0;
  bit auto_drop = 1;

  always #31.25 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  rcm_sequencer #(.NNODES(NN), .AW(18)) dut (.*);

  function automatic logic [31:0] mem_word(int n, int a);
    return {8'(n), 24'(a * 3 + 1)};
  endfunction

  always_comb begin
    result_data = '0;
    for (int n = 0; n < NN; n++) if (engaged[n] && oe[n]) result_data |= mem_word(n, int'(result_addr));
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  // node processors: drop BUS-FREE a few clocks after ENGAGED falls
  always @(posedge clk) if (rst_n) begin
    engaged_d <= engaged;
    for (int n = 0; n < NN; n++) begin
      if (engaged[n] && !engaged_d[n]) begin
        engage_count[n]++;
        check(busfree[n], "engaged only a node showing BUS-FREE");
      end
      if (!engaged[n] && engaged_d[n]) fork
        automatic int m = n;
        begin repeat (6) @(posedge clk); if (auto_drop) busfree[m] = 0; end
      join_none
    end
    if (fifo_wr) begin got.push_back(fifo_wdata); wr_cyc.push_back(cyc); end
    check((oe & ~engaged) == 0, "OE only inside ENGAGED");
  end

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one collection round over the given sequence, all listed nodes ready
  task automatic round(int seq[$], int lo, int hi, int r);
    int idx;
    logic [31:0] w;
    int per_loc;
    got.delete(); wr_cyc.delete();
    rate = 8'(r); lower = 18'(lo); upper = 18'(hi);
    nodeseq = 0;
    foreach (seq[k]) nodeseq[4*k +: 4] = {1'b1, 3'(seq[k])};
    foreach (seq[k]) busfree[seq[k]] = 1;
    repeat (4) @(posedge clk);   // let BUS-FREE pass the synchroniser
    acquire_enable = 1;
    wait (got.size() == 2 * seq.size() * (hi - lo + 1));
    wait (engaged == 0);          // last location's final state done
    repeat (20) @(posedge clk);
    acquire_enable = 0;
    idx = 0;
    foreach (seq[k])
      for (int a = lo; a <= hi; a++) begin
        w = mem_word(seq[k], a);
        check(got[idx] == w[15:0] && got[idx+1] == w[31:16], $sformatf("node %0d address %0d got %h %h want %h", seq[k], a, got[idx+1], got[idx], w));
        idx += 2;
      end
    check(got.size() == idx, "no extra words");
    // rate: consecutive low halves of one node are 8*(rate+1) clocks apart
    per_loc = 8 * (r + 1);
    for (int k = 2; k < 2 * (hi - lo + 1); k += 2)
      check(wr_cyc[k] - wr_cyc[k-2] == per_loc, $sformatf("rate %0d: %0d clocks per location", r, wr_cyc[k] - wr_cyc[k-2]));
    repeat (20) @(posedge clk);
  endtask

  initial begin
    int s1[$] = '{0, 1, 2, 3, 4, 5, 6, 7};
    int s2[$] = '{5, 2, 7};
    int s3[$] = '{6};
    for (int n = 0; n < NN; n++) engage_count[n] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    round(s1, 0, 3, 0);
    round(s2, 100, 109, 5);
    round(s3, 262140, 262143, 255);
    for (int n = 0; n < NN; n++)
      check(engage_count[n] == ((n == 5 || n == 2 || n == 7) ? 2 : (n == 6 ? 2 : 1)), $sformatf("node %0d engaged %0d times", n, engage_count[n]));
    // a node that keeps BUS-FREE is not engaged twice; no ready node: no activity
    auto_drop = 0;
    nodeseq = 32'h0000_000B;   // node 3 only
    busfree = 8'h08;
    got.delete();
    acquire_enable = 1;
    lower = 0; upper = 1; rate = 0;
    wait (got.size() == 4);
    repeat (300) @(posedge clk);
    check(got.size() == 4, $sformatf("not engaged again while BUS-FREE stays active (%0d words)", got.size()));
    busfree = 0;
    repeat (20) @(posedge clk);
    busfree = 8'h08;           // new results ready
    repeat (100) @(posedge clk);
    check(got.size() == 8, "engaged again after BUS-FREE dropped and rose");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
