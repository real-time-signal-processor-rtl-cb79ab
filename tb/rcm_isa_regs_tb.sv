// rcm_isa_regs_tb: ISA memory cycles write and read back every register,
// read the status register (BUS-FREE, DIM configured, FIFO flags), read the
// FIFO window (one word removed per read cycle), check the 16-bit and
// zero-wait-state responses and that addresses outside the window, or with
// AEN high, are ignored.
//
// The stimulus and the reference model are this testbench's own; the expected
// values and timing follow the behaviour described for the block.
module rcm_isa_regs_tb;
  logic clk = 0, rst_n = 0;
  logic [19:0] isa_sa = 0;
  logic [15:0] isa_sd_in = 0, isa_sd_out;
  logic isa_sd_oe, isa_aen = 1, isa_memw_n = 1, isa_memr_n = 1, isa_memcs16_n, isa_zerows_n;
  logic [15:0] fifo_q;
  logic fifo_empty, fifo_hf = 0, fifo_pafe = 1, fifo_rd, fifo_clear;
  logic [7:0] busfree = 8'h5A;
  logic [3:0] dim_configured = 4'h9;
  logic acquire_enable, enable_dim;
  logic [3:0] configure_dim;
  logic [7:0] rate;
  logic [17:0] lower, upper;
  logic [31:0] nodeseq;
  int checks = 0, failures = 0;
  logic [15:0] fq [$];
  int clears = 0;

  always #31.25 clk = ~clk;

  rcm_isa_regs #(.BASE(20'hD0000)) dut (
    .clk, .rst_n, .sa(isa_sa), .sd_in(isa_sd_in), .sd_out(isa_sd_out), .sd_oe(isa_sd_oe),
    .aen(isa_aen), .memw_n(isa_memw_n), .memr_n(isa_memr_n),
    .memcs16_n(isa_memcs16_n), .zerows_n(isa_zerows_n),
    .fifo_q, .fifo_empty, .fifo_hf, .fifo_pafe, .fifo_rd, .fifo_clear,
    .busfree, .dim_configured, .acquire_enable, .enable_dim, .configure_dim,
    .rate, .lower, .upper, .nodeseq
  );

  assign fifo_empty = (fq.size() == 0);
  assign fifo_q     = fifo_empty ? 16'h0 : fq[0];
  always @(posedge clk) begin
    if (fifo_rd) void'(fq.pop_front());
    if (rst_n && fifo_clear) clears++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  `include "isa_host.svh"

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // decode responses
    isa_sa = 20'hD8000; isa_aen = 0;
    #1 check(!isa_memcs16_n && isa_zerows_n, "MEMCS16 in window, no strobe yet");
    isa_memr_n = 0;
    #1 check(!isa_zerows_n && isa_sd_oe, "zero wait state and data drive on read");
    isa_memr_n = 1; isa_sa = 20'hC8000;
    #1 check(isa_memcs16_n && !isa_sd_oe, "outside the window");
    isa_write(20'hD8002, 16'h00C7);
    check(rate == 8'hC7, "RATE register");
    isa_write(20'hD8004, 16'h1234); isa_write(20'hD8006, 16'h0003);
    check(lower == 18'h31234, "LOWER bound");
    isa_write(20'hD8008, 16'hFFFF); isa_write(20'hD800A, 16'h0002);
    check(upper == 18'h2FFFF, "UPPER bound");
    isa_write(20'hD800C, 16'hBA98); isa_write(20'hD800E, 16'hFEDC);
    check(nodeseq == 32'hFEDC_BA98, "NODESEQ pattern");
    isa_write(20'hD8000, 16'h0027);
    check(acquire_enable && enable_dim && configure_dim == 4'h9, "CTRL bits");
    isa_read(20'hD8002, r); check(r == 16'h00C7, "read back RATE");
    isa_read(20'hD8006, r); check(r == 16'h0003, "read back LOWER high");
    isa_read(20'hD800E, r); check(r == 16'hFEDC, "read back NODESEQ high");
    isa_read(20'hD8000, r); check(r == 16'h0027, "read back CTRL");
    isa_read(20'hD8010, r); check(r == {1'b0, 1'b1, 1'b0, 1'b1, 4'h9, 8'h5A}, $sformatf("STATUS %h", r));
    // ignored cycles
    isa_aen = 1;
    @(negedge clk); isa_sa = 20'hD8002; isa_sd_in = 16'h0011; isa_memw_n = 0;
    repeat (6) @(negedge clk); isa_memw_n = 1; repeat (6) @(negedge clk);
    check(rate == 8'hC7, "AEN high: write ignored");
    isa_write(20'hE8002, 16'h0011);
    check(rate == 8'hC7, "other window: write ignored");
    // FIFO window
    for (int k = 0; k < 10; k++) fq.push_back(16'h7000 + 16'(k));
    for (int k = 0; k < 10; k++) begin
      isa_read(20'hD0000 + 20'(2 * k), r);
      check(r == 16'h7000 + 16'(k), $sformatf("FIFO word %0d", k));
    end
    check(fq.size() == 0, "one word removed per read");
    isa_read(20'hD8010, r); check(r[12] == 1, "status: FIFO empty");
    isa_write(20'hD8000, 16'h0040);
    check(clears == 1 && !acquire_enable, "FIFO clear pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
