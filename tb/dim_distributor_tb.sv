// dim_distributor_tb: loads channels for the nodes in the node-sequential
// pattern and checks that every node path shows I, Q, U, V in order, one
// strobe every two clocks, each word on the strobe clock, starting at the
// clock edge that loads the channel.
//
// The stimulus and the reference model are this testbench's own; the expected
// values and timing follow the behaviour described for the block.
module dim_distributor_tb;
  import spps_pkg::*;

  localparam int NN = 8;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [2:0] in_node = 0;
  stokes_t in_data = '0;
  sm16_t node_data [NN];
  logic  node_wr [NN];
  int checks = 0, failures = 0;
  int cyc = 0;
  int nwords [NN];
  int load_cyc [NN];
  stokes_t loaded [NN];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dim_distributor #(.NNODES(NN)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: sample just after each edge
  always @(posedge clk) begin
    #1;
    for (int n = 0; n < NN; n++) begin
      if (node_wr[n] && rst_n) begin
        automatic int w = nwords[n] % 4;
        automatic sm16_t e;
        case (w)
          0: e = loaded[n].i;
          1: e = loaded[n].q;
          2: e = loaded[n].u;
          default: e = loaded[n].v;
        endcase
        check(node_data[n] == e, $sformatf("node %0d word %0d", n, w));
        check(cyc == load_cyc[n] + 2 * w, $sformatf("node %0d word %0d timing", n, w));
        nwords[n]++;
      end
    end
  end

  initial begin
    stokes_t d;
    for (int n = 0; n < NN; n++) nwords[n] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 40 * NN; k++) begin
      d = stokes_t'({$urandom, $urandom});
      @(negedge clk);
      in_valid = 1; in_node = 3'(k % NN); in_data = d;
      @(posedge clk);
      loaded[k % NN] = d;
      load_cyc[k % NN] = cyc + 1;
    end
    @(negedge clk) in_valid = 0;
    repeat (12) @(posedge clk);
    for (int n = 0; n < NN; n++) check(nwords[n] == 160, $sformatf("node %0d word count %0d", n, nwords[n]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
