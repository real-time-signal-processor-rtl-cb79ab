// node_bus_ctrl_tb: with two RAMs attached, checks the data-memory decode
// (SRAM-A, SRAM-B, status, control), that SRAM-B is reachable from the
// processor only while attached and from the result bus only while detached,
// ENGAGED and OE, the BUS-FREE control bit, and the interrupt on the falling
// edge of ENGAGED with its sticky status flag and clearing.
//
// The stimulus and the reference model are this testbench's own; the expected
// values and timing follow the behaviour described for the block.
module node_bus_ctrl_tb;
  logic clk = 0, rst_n = 0;
  logic [21:0] dm_addr = 0;
  logic [31:0] dm_wdata = 0, dm_rdata;
  logic dm_wr = 0, dm_rd = 0;
  logic fifo_empty = 1, fifo_half_full = 0, param_int = 0;
  logic sra_cs, sra_we, srb_cs, srb_we;
  logic [31:0] sra_rdata, srb_rdata;
  logic [17:0] srb_addr;
  logic engaged = 0, oe = 0;
  logic [17:0] result_addr = 0;
  logic [31:0] result_data;
  logic busfree, irq_engaged, attached, bus_en;
  int checks = 0, failures = 0;
  int irq_count = 0;

  always #20 clk = ~clk;
  always @(posedge clk) if (rst_n && irq_engaged) irq_count++;

  node_bus_ctrl #(.SAW(18)) dut (.*);
  node_sram #(.AW(18)) u_a (.clk, .cs(sra_cs), .we(sra_we), .addr(dm_addr[17:0]), .wdata(dm_wdata), .rdata(sra_rdata));
  node_sram #(.AW(18)) u_b (.clk, .cs(srb_cs), .we(srb_we), .addr(srb_addr), .wdata(dm_wdata), .rdata(srb_rdata));

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

  task automatic dmw(logic [1:0] region, logic [17:0] a, logic [31:0] d);
    @(negedge clk);
    dm_addr = {region, 2'b00, a}; dm_wdata = d; dm_wr = 1;
    @(negedge clk);
    dm_wr = 0;
  endtask

  task automatic dmr(logic [1:0] region, logic [17:0] a, output logic [31:0] d);
    @(negedge clk);
    dm_addr = {region, 2'b00, a}; dm_rd = 1;
    #1 d = dm_rdata;
    @(negedge clk);
    dm_rd = 0;
  endtask

  initial begin
    logic [31:0] r;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // working memory
    dmw(0, 18'h00010, 32'hA5A5_0001);
    dmw(0, 18'h3FFFF, 32'hA5A5_0002);
    dmr(0, 18'h00010, r); check(r == 32'hA5A5_0001, "SRAM-A read");
    dmr(0, 18'h3FFFF, r); check(r == 32'hA5A5_0002, "SRAM-A top");
    // SRAM-B detached: processor cannot write it
    dmw(1, 18'h00005, 32'hDEAD_BEEF);
    dmr(1, 18'h00005, r); check(r == 32'h0, "detached SRAM-B reads zero");
    // attach, write results, check status
    dmw(3, 0, 32'h1);
    check(attached && !busfree, "attached");
    for (int k = 0; k < 16; k++) dmw(1, 18'(k), 32'hC0DE_0000 + k);
    dmr(1, 18'h00005, r); check(r == 32'hC0DE_0005, "attached SRAM-B read");
    engaged = 1; oe = 1; result_addr = 5;
    #1 check(result_data == 0 && !bus_en, "no bus output while attached");
    engaged = 0; oe = 0;
    fifo_empty = 0; fifo_half_full = 1; param_int = 1;
    dmr(2, 0, r); check(r[6:0] == 7'b0001110, $sformatf("status %b", r[6:0]));
    // detach and raise BUS-FREE
    dmw(3, 0, 32'h2);
    check(!attached && busfree, "detached, bus free");
    dmr(2, 0, r); check(r[4:3] == 2'b10, "status shows bus free");
    // collector reads
    result_addr = 7;
    #1 check(result_data == 0, "no output without ENGAGED");
    engaged = 1;
    #1 check(result_data == 0, "no output without OE");
    for (int k = 0; k < 16; k++) begin
      result_addr = 18'(k); oe = 1;
      #1 check(result_data == 32'hC0DE_0000 + k, "result bus data");
      oe = 0;
      #1 check(result_data == 0, "released without OE");
    end
    repeat (4) @(posedge clk);
    dmr(2, 0, r); check(r[5] == 1, "status shows ENGAGED");
    check(irq_count == 0, "no interrupt yet");
    engaged = 0;
    repeat (5) @(posedge clk);
    check(irq_count == 1, "one interrupt on the falling edge of ENGAGED");
    dmr(2, 0, r); check(r[6] == 1, "sticky interrupt flag");
    dmw(3, 0, 32'h4);   // ISR: clear flag, drop BUS-FREE
    dmr(2, 0, r); check(r[6] == 0 && r[4] == 0, "flag cleared, BUS-FREE dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
