// dsp_node_tb: one node at its default sizes, with the testbench acting as
// the processor, the data input module, the PC program bus and the result
// collector. It streams sign-magnitude words in until the FIFO half-full
// flag rises (16K words), reads them back through the program-memory bus as
// two's complement values, accumulates a few into SRAM-A, loads code through
// the PC port and reads it as 48-bit words, copies results to SRAM-B, hands
// SRAM-B to the result bus with BUS-FREE and reads it there, and checks the
// ENGAGED and parameter-semaphore interrupts.
//
// The stimulus and the reference model are this testbench's own; the expected
// values and timing follow the behaviour described for the block.
module dsp_node_tb;
  import spps_pkg::*;

  logic clk_dim = 0, clk_dsp = 0, clk_pc = 0, rst_n = 0;
  sm16_t in_data = '0;
  logic in_wr = 0;
  logic [23:0] pm_addr = 0;
  logic [47:0] pm_wdata = 0, pm_rdata;
  logic pm_rd = 0, pm_wr = 0;
  logic [21:0] dm_addr = 0;
  logic [31:0] dm_wdata = 0, dm_rdata;
  logic dm_rd = 0, dm_wr = 0;
  logic irq_engaged, irq_param, fifo_half_full;
  logic [2:0] pc_cs = 0;
  logic [12:0] pc_addr = 0;
  logic [15:0] pc_wdata = 0, pc_rdata;
  logic pc_we = 0, pc_re = 0, pc_int;
  logic engaged = 0, oe = 0;
  logic [17:0] result_addr = 0;
  logic [31:0] result_data;
  logic busfree;
  int checks = 0, failures = 0;
  int irq_e = 0;
  int sent [$];

  always #31.25 clk_dim = ~clk_dim;
  always #20    clk_dsp = ~clk_dsp;
  always #50    clk_pc  = ~clk_pc;
  always @(posedge clk_dsp) if (rst_n && irq_engaged) irq_e++;

  dsp_node dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #40ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pm_read(logic [23:0] a, output logic [47:0] d);
    @(negedge clk_dsp);
    pm_addr = a; pm_rd = 1;
    #1 d = pm_rdata;
    @(negedge clk_dsp);
    pm_rd = 0;
  endtask

  task automatic dmw(logic [21:0] a, logic [31:0] d);
    @(negedge clk_dsp);
    dm_addr = a; dm_wdata = d; dm_wr = 1;
    @(negedge clk_dsp);
    dm_wr = 0;
  endtask

  task automatic dmr(logic [21:0] a, output logic [31:0] d);
    @(negedge clk_dsp);
    dm_addr = a; dm_rd = 1;
    #1 d = dm_rdata;
    @(negedge clk_dsp);
    dm_rd = 0;
  endtask

  task automatic pcw(int dev, logic [12:0] a, logic [15:0] d);
    @(negedge clk_pc);
    pc_cs = 3'(1 << dev); pc_addr = a; pc_wdata = d; pc_we = 1;
    @(negedge clk_pc);
    pc_we = 0; pc_cs = 0;
  endtask

  initial begin
    logic [47:0] w;
    logic [31:0] r, acc;
    sm16_t x;
    int v;
    repeat (3) @(posedge clk_dim);
    rst_n = 1;
    // input stream: one word every two DIM clocks, until half full
    fork
      begin
        while (!fifo_half_full) begin
          x = sm16_t'(16'($urandom));
          @(negedge clk_dim); in_data = x; in_wr = 1;
          v = x.mag; if (x.sign) v = -v;
          sent.push_back(v);
          @(negedge clk_dim); in_wr = 0;
        end
      end
    join
    check(sent.size() >= 16384 && sent.size() < 16384 + 8, $sformatf("half full after %0d words", sent.size()));
    // processor reads the FIFO through the PM bus and accumulates 4 words
    acc = 0;
    for (int k = 0; k < sent.size(); k++) begin
      pm_read(24'h80_0000, w);
      check($signed(w[47:16]) == sent[k], $sformatf("FIFO word %0d", k));
      if (k < 4) acc = acc + w[47:16];
    end
    dmr(22'h20_0000, r);
    check(r[0] == 1 && r[1] == 0, "status: FIFO empty");
    dmw(22'h00_0100, acc);
    dmr(22'h00_0100, r); check(r == acc, "SRAM-A accumulation");
    // code load by the PC, seen by the processor as 48-bit words
    pcw(0, 13'd100, 16'h1111); pcw(1, 13'd100, 16'h2222); pcw(2, 13'd100, 16'h3333);
    pm_read(24'h00_0064, w);
    check(w == 48'h3333_2222_1111, "code word through PM bus");
    pcw(0, 13'h1FFF, 16'h0001);
    repeat (4) @(posedge clk_dsp);
    check(irq_param, "parameter semaphore interrupt");
    // results to SRAM-B, then hand it over
    dmw(22'h30_0000, 32'h1);                // attach
    for (int k = 0; k < 8; k++) dmw(22'h10_0000 + 22'(k), 32'hB000_0000 + k);
    dmw(22'h30_0000, 32'h2);                // detach, BUS-FREE
    repeat (3) @(posedge clk_dim);
    check(busfree, "BUS-FREE raised");
    engaged = 1;
    for (int k = 0; k < 8; k++) begin
      result_addr = 18'(k); oe = 1;
      #30 check(result_data == 32'hB000_0000 + k, $sformatf("result word %0d", k));
      oe = 0;
      #30;
    end
    engaged = 0;
    repeat (5) @(posedge clk_dsp);
    check(irq_e == 1, "ENGAGED interrupt");
    dmw(22'h30_0000, 32'h4);
    check(!busfree, "BUS-FREE dropped by the service routine");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
