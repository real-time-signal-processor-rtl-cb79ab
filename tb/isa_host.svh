// isa_host.svh: ISA memory read and write cycles for the testbenches of the
// result collection module. Expects clk, isa_* signals and check() in scope.
// A cycle drives the address, asserts the strobe for six 16 MHz clocks and
// releases it for six more.
// The cycle lengths are this testbench's choice; the ISA window itself is
// described in rcm_isa_regs.
task automatic isa_write(logic [19:0] a, logic [15:0] d);
  @(negedge clk);
  isa_sa = a; isa_sd_in = d; isa_aen = 0;
  isa_memw_n = 0;
  repeat (6) @(negedge clk);
  isa_memw_n = 1;
  repeat (6) @(negedge clk);
endtask

task automatic isa_read(logic [19:0] a, output logic [15:0] d);
  @(negedge clk);
  isa_sa = a; isa_aen = 0;
  isa_memr_n = 0;
  repeat (5) @(negedge clk);
  d = isa_sd_out;
  @(negedge clk);
  isa_memr_n = 1;
  repeat (6) @(negedge clk);
endtask
