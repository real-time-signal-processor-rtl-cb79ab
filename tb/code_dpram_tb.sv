// code_dpram_tb: the PC port (16 bits, three chip selects, its own clock)
// writes 48-bit words a device at a time and the processor port reads them
// whole, and the reverse; then the semaphore interrupts in both directions
// are raised by writes to the mailbox locations and cleared by reads of
// them.
//
// The stimulus and the reference model are this testbench's own; the expected
// values and timing follow the behaviour described for the block.
module code_dpram_tb;
  localparam int AW = 13;
  logic rst_n = 0, clk_pc = 0, clk_dsp = 0;
  logic [2:0] pc_cs = 0;
  logic [AW-1:0] pc_addr = 0;
  logic [15:0] pc_wdata = 0, pc_rdata;
  logic pc_we = 0, pc_re = 0, pc_int;
  logic dsp_sel = 0;
  logic [AW-1:0] dsp_addr = 0;
  logic [47:0] dsp_wdata = 0, dsp_rdata;
  logic dsp_we = 0, dsp_re = 0, dsp_int;
  int checks = 0, failures = 0;
  logic [47:0] model [int];

  always #50 clk_pc = ~clk_pc;
  always #20 clk_dsp = ~clk_dsp;

  code_dpram #(.AW(AW)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pc_write(int dev, logic [AW-1:0] a, logic [15:0] d);
    @(negedge clk_pc);
    pc_cs = 3'(1 << dev); pc_addr = a; pc_wdata = d; pc_we = 1;
    @(negedge clk_pc);
    pc_we = 0; pc_cs = 0;
  endtask

  task automatic pc_read(int dev, logic [AW-1:0] a, output logic [15:0] d);
    @(negedge clk_pc);
    pc_cs = 3'(1 << dev); pc_addr = a; pc_re = 1;
    #1 d = pc_rdata;
    @(negedge clk_pc);
    pc_re = 0; pc_cs = 0;
  endtask

  task automatic dsp_write(logic [AW-1:0] a, logic [47:0] d);
    @(negedge clk_dsp);
    dsp_sel = 1; dsp_addr = a; dsp_wdata = d; dsp_we = 1;
    @(negedge clk_dsp);
    dsp_we = 0; dsp_sel = 0;
  endtask

  task automatic dsp_read(logic [AW-1:0] a, output logic [47:0] d);
    @(negedge clk_dsp);
    dsp_sel = 1; dsp_addr = a; dsp_re = 1;
    #1 d = dsp_rdata;
    @(negedge clk_dsp);
    dsp_re = 0; dsp_sel = 0;
  endtask

  initial begin
    logic [47:0] w, r;
    logic [15:0] h;
    logic [AW-1:0] a;
    repeat (2) @(posedge clk_pc);
    rst_n = 1;
    repeat (2) @(posedge clk_pc);
    check(!pc_int && !dsp_int, "no semaphores after reset");
    // PC loads code, processor reads it
    for (int t = 0; t < 100; t++) begin
      a = AW'($urandom_range(0, 8000));
      w = {$urandom, $urandom};
      for (int dev = 0; dev < 3; dev++) pc_write(dev, a, w[16*dev +: 16]);
      model[int'(a)] = w;
    end
    foreach (model[k]) begin
      dsp_read(AW'(k), r);
      check(r == model[k], $sformatf("processor reads PC word at %0d", k));
      for (int dev = 0; dev < 3; dev++) begin
        pc_read(dev, AW'(k), h);
        check(h == model[k][16*dev +: 16], "PC read-back");
      end
    end
    // processor writes, PC reads
    for (int t = 0; t < 50; t++) begin
      a = AW'($urandom_range(0, 8000));
      w = {$urandom, $urandom};
      dsp_write(a, w);
      for (int dev = 0; dev < 3; dev++) begin
        pc_read(dev, a, h);
        check(h == w[16*dev +: 16], "PC reads processor word");
      end
    end
    // semaphore PC -> processor
    pc_write(0, '1, 16'h0001);
    repeat (4) @(posedge clk_dsp);
    check(dsp_int, "parameter semaphore raises processor interrupt");
    check(!pc_int, "no PC interrupt");
    dsp_read('1, r);
    repeat (2) @(posedge clk_dsp);
    check(!dsp_int, "processor read clears its interrupt");
    // semaphore processor -> PC
    dsp_write('1 - 1, 48'h0000_0000_00AC);
    repeat (4) @(posedge clk_pc);
    check(pc_int, "acknowledge semaphore raises PC interrupt");
    pc_read(0, '1 - 1, h);
    check(h == 16'h00AC, "acknowledge value");
    repeat (2) @(posedge clk_pc);
    check(!pc_int, "PC read clears its interrupt");
    // a second round works too
    pc_write(0, '1, 16'h0002);
    repeat (4) @(posedge clk_dsp);
    check(dsp_int, "second parameter semaphore");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
