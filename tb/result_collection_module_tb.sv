// result_collection_module_tb: programs the module over ISA (bounds, rate,
// node sequence 4 then 1), lets two modelled nodes offer 4096 result words
// each, and checks the recorder port stream, the FIFO half-full flag in the
// status register once 16K halves are stored, then reads all 16384 halves
// back through the ISA FIFO window in node, address and half order.
//
// The stimulus and the reference model are this testbench's own; the expected
// values and timing follow the behaviour described for the block.
module result_collection_module_tb;
  localparam int NN = 8, NLOC = 4096;
  logic clk = 0, rst_n = 0;
  logic [19:0] isa_sa = 0;
  logic [15:0] isa_sd_in = 0, isa_sd_out;
  logic isa_sd_oe, isa_aen = 1, isa_memw_n = 1, isa_memr_n = 1, isa_memcs16_n, isa_zerows_n;
  logic [NN-1:0] busfree = 0;
  logic [3:0] dim_configured = 4'hF;
  logic [31:0] result_data;
  logic [NN-1:0] engaged, oe;
  logic [17:0] result_addr;
  logic [3:0] configure_dim;
  logic enable_dim, acquire_enable;
  logic [15:0] rec_data;
  logic rec_wr;
  logic fifo_empty, fifo_hf, fifo_pafe;
  int checks = 0, failures = 0;
  logic [15:0] rec [$];
  logic [NN-1:0] engaged_d = 0;

  always #31.25 clk = ~clk;

  result_collection_module #(.NNODES(NN)) dut (
    .clk, .rst_n, .sa(isa_sa), .sd_in(isa_sd_in), .sd_out(isa_sd_out), .sd_oe(isa_sd_oe),
    .aen(isa_aen), .memw_n(isa_memw_n), .memr_n(isa_memr_n),
    .memcs16_n(isa_memcs16_n), .zerows_n(isa_zerows_n),
    .busfree, .dim_configured, .result_data, .engaged, .oe, .result_addr,
    .configure_dim, .enable_dim, .acquire_enable, .rec_data, .rec_wr,
    .fifo_empty, .fifo_hf, .fifo_pafe
  );

  function automatic logic [31:0] word_of(int n, int a);
    return {4'(n), 12'(a), 16'(a ^ 16'h3C3C)};
  endfunction

  always_comb begin
    result_data = '0;
    for (int n = 0; n < NN; n++) if (engaged[n] && oe[n]) result_data |= word_of(n, int'(result_addr));
  end

  always @(posedge clk) begin
    engaged_d <= engaged;
    if (rec_wr) rec.push_back(rec_data);
    for (int n = 0; n < NN; n++) if (!engaged[n] && engaged_d[n]) busfree[n] <= 1'b0;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  `include "isa_host.svh"

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] r;
    int k;
    logic [31:0] w;
    int order[2] = '{4, 1};
    repeat (3) @(posedge clk);
    rst_n = 1;
    isa_write(20'hD8002, 16'h0000);                  // fastest rate
    isa_write(20'hD8004, 16'h0000); isa_write(20'hD8006, 16'h0000);
    isa_write(20'hD8008, 16'(NLOC - 1)); isa_write(20'hD800A, 16'h0000);
    isa_write(20'hD800C, 16'h009C); isa_write(20'hD800E, 16'h0000);   // nodes 4, 1
    busfree[4] = 1; busfree[1] = 1;
    isa_write(20'hD8000, 16'h0003);                  // acquire, enable DIM
    check(acquire_enable && enable_dim, "control lines");
    wait (rec.size() == 2 * 2 * NLOC);
    wait (engaged == 0);
    repeat (10) @(posedge clk);
    isa_read(20'hD8010, r);
    check(r[13] == 1 && r[12] == 0, $sformatf("status shows FIFO half full (%h)", r));
    check(busfree == 0, "both nodes released");
    k = 0;
    foreach (order[i])
      for (int a = 0; a < NLOC; a++) begin
        w = word_of(order[i], a);
        check(rec[k] == w[15:0] && rec[k+1] == w[31:16], $sformatf("recorder words node %0d address %0d", order[i], a));
        k += 2;
      end
    for (int j = 0; j < 2 * 2 * NLOC; j++) begin
      isa_read(20'hD0000, r);
      check(r == rec[j], $sformatf("ISA FIFO word %0d", j));
    end
    isa_read(20'hD8010, r);
    check(r[12] == 1 && r[13] == 0, "status: FIFO empty after reading");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
