// spps_top_tb: end-to-end run of one sub-band at its default sizes.
//
// The testbench plays the FFT front end, the control PC (program bus and
// ISA bus) and the eight node processors. The processor model does a reduced
// version of the node software: it clears its working area, waits for the
// input FIFO's half-full flag, reads the FIFO and adds every Stokes word of
// its 32 channels into SRAM-A (a time average per channel and Stokes
// parameter), copies the 128 sums to SRAM-B, raises BUS-FREE, and on the
// ENGAGED interrupt drops BUS-FREE again.
//
// Sequence: code words and parameter semaphores go to every node over the
// program bus and are acknowledged; one spectrum is sent while ENABLE DIM is
// still off (it must not arrive anywhere); the collector is programmed over
// ISA (rate 0, addresses 0..127, nodes 0..7); 128 spectra of random
// voltages and one pass-through spectrum are sent; finally the PC reads the
// 2048 result halves over ISA and they are compared with sums worked out
// here from the input voltages with the Stokes equations. The mechanisms
// exercised are counted and each must have happened.
//
// The stimulus and the reference model are this testbench's own; the expected
// values and timing follow the behaviour described for the block.
module spps_top_tb;
  import spps_pkg::*;

  localparam int NN = N_NODES, NCH = N_CHAN, CPN = NCH / NN;
  localparam int NSPEC = 129;                 // 128 normal + 1 pass-through
  localparam int NWORDS = NSPEC * CPN * 4;    // words per node
  localparam int NRES = CPN * 4;              // result locations per node

  logic clk_dim = 0, clk_dsp = 0, clk_rcm = 0, clk_pc = 0, rst_n = 0;
  logic in_valid = 0, in_sof = 0, pass_through = 0;
  pol_sample_t in_data = '0;
  logic pb_page_ld = 0, pb_wr = 0, pb_rd = 0;
  logic [12:0] pb_addr = 0;
  logic [15:0] pb_wdata = 0, pb_rdata;
  logic [NN-1:0] pb_int;
  logic [23:0] pm_addr [NN];
  logic [47:0] pm_wdata [NN], pm_rdata [NN];
  logic pm_rd [NN], pm_wr [NN];
  logic [21:0] dm_addr [NN];
  logic [31:0] dm_wdata [NN], dm_rdata [NN];
  logic dm_rd [NN], dm_wr [NN];
  logic [NN-1:0] irq_engaged, irq_param, fifo_half_full;
  logic [19:0] isa_sa = 0;
  logic [15:0] isa_sd_in = 0, isa_sd_out;
  logic isa_sd_oe, isa_aen = 1, isa_memw_n = 1, isa_memr_n = 1, isa_memcs16_n, isa_zerows_n;
  logic [3:0] dim_configured = 4'hF, configure_dim;
  logic acquire_enable;
  logic [15:0] rec_data;
  logic rec_wr, rcm_fifo_empty, rcm_fifo_hf, rcm_fifo_pafe;

  int checks = 0, failures = 0;
  pol_sample_t spec [NSPEC][NCH];
  longint expect_sum [NN][NRES];
  logic [15:0] rec [$];

  // mechanism counters
  int n_pass_spectra = 0, n_disabled_spectra = 0, n_half_full = 0, n_engage = 0;
  int n_irq_engaged = 0, n_irq_param = 0, n_pc_ack = 0, n_rcm_hf = 0, n_skip_poll = 0;

  always #31.25 clk_dim = ~clk_dim;
  always #20    clk_dsp = ~clk_dsp;
  always #50    clk_pc  = ~clk_pc;
  initial begin #7; forever #31.25 clk_rcm = ~clk_rcm; end
  wire clk = clk_rcm;           // for the ISA host tasks

  spps_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $time); end
  endtask

  `include "isa_host.svh"

  // ---------------- reference model of the Stokes stage ----------------
  function automatic int sval(sm9_t x);
    return x.sign ? -int'(x.mag) : int'(x.mag);
  endfunction

  function automatic int trunc4(int x);   // sign-magnitude value of x/4
    return (x < 0) ? -((-x) / 4) : x / 4;
  endfunction

  function automatic int stokes_value(pol_sample_t p, bit pass, int w);
    int lr, li, rr, ri, sl, sr;
    lr = sval(p.lr); li = sval(p.li); rr = sval(p.rr); ri = sval(p.ri);
    if (pass) return (w == 0) ? lr : (w == 1) ? li : (w == 2) ? rr : ri;
    sl = (li * li + lr * lr) / 2;
    sr = (ri * ri + rr * rr) / 2;
    case (w)
      0: return trunc4(sl + sr);
      1: return trunc4(lr * rr + li * ri);
      2: return trunc4(li * rr - lr * ri);
      default: return trunc4(sl - sr);
    endcase
  endfunction

  // ---------------- watchdog ----------------
  initial begin
    #60ms;
    failures++;
    $display("watchdog expired: halffull=%0d engage=%0d irq_engaged=%0d rec=%0d hf=%b busfree=%b", n_half_full, n_engage, n_irq_engaged, rec.size(), fifo_half_full, dut.busfree);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- processor bus helpers ----------------
  task automatic pm_read(int n, logic [23:0] a, output logic [47:0] d);
    @(negedge clk_dsp);
    pm_addr[n] = a; pm_rd[n] = 1;
    #1 d = pm_rdata[n];
    @(negedge clk_dsp);
    pm_rd[n] = 0;
  endtask

  task automatic pm_write(int n, logic [23:0] a, logic [47:0] d);
    @(negedge clk_dsp);
    pm_addr[n] = a; pm_wdata[n] = d; pm_wr[n] = 1;
    @(negedge clk_dsp);
    pm_wr[n] = 0;
  endtask

  task automatic dm_write(int n, logic [21:0] a, logic [31:0] d);
    @(negedge clk_dsp);
    dm_addr[n] = a; dm_wdata[n] = d; dm_wr[n] = 1;
    @(negedge clk_dsp);
    dm_wr[n] = 0;
  endtask

  task automatic dm_read(int n, logic [21:0] a, output logic [31:0] d);
    @(negedge clk_dsp);
    dm_addr[n] = a; dm_rd[n] = 1;
    #1 d = dm_rdata[n];
    @(negedge clk_dsp);
    dm_rd[n] = 0;
  endtask

  // ---------------- program bus helpers ----------------
  task automatic pb_page(int p);
    @(negedge clk_pc); pb_wdata = 16'(p); pb_page_ld = 1;
    @(negedge clk_pc); pb_page_ld = 0;
  endtask

  task automatic pb_write(logic [12:0] a, logic [15:0] d);
    @(negedge clk_pc); pb_addr = a; pb_wdata = d; pb_wr = 1;
    @(negedge clk_pc); pb_wr = 0;
  endtask

  task automatic pb_read(logic [12:0] a, output logic [15:0] d);
    @(negedge clk_pc); pb_addr = a; pb_rd = 1;
    #1 d = pb_rdata;
    @(negedge clk_pc); pb_rd = 0;
  endtask

  // ---------------- node processor model ----------------
  task automatic node_program(int n);
    logic [47:0] w;
    logic [31:0] r;
    int k, slot, st;
    // clear the working area of SRAM-A
    for (int a = 0; a < NRES; a++) dm_write(n, 22'(a), 32'h0);
    // wait for half a FIFO of input
    wait (fifo_half_full[n]);
    n_half_full++;
    // read and accumulate every word that is expected
    for (k = 0; k < NWORDS; k++) begin
      while (1) begin
        dm_read(n, 22'h20_0000, r);         // status port
        if (!r[0]) break;                   // FIFO not empty
      end
      pm_read(n, 24'h80_0000, w);
      slot = (k / 4) % CPN;
      st   = k % 4;
      dm_read(n, 22'(slot * 4 + st), r);
      dm_write(n, 22'(slot * 4 + st), r + w[47:16]);
    end
    // copy the sums to SRAM-B and hand it to the result bus
    dm_write(n, 22'h30_0000, 32'h1);
    for (int a = 0; a < NRES; a++) begin
      dm_read(n, 22'(a), r);
      dm_write(n, 22'h10_0000 + 22'(a), r);
    end
    dm_write(n, 22'h30_0000, 32'h2);
    // ENGAGED interrupt: drop BUS-FREE, clear the flag
    @(posedge irq_engaged[n]);
    n_irq_engaged++;
    dm_read(n, 22'h20_0000, r);
    check(r[6] == 1, $sformatf("node %0d interrupt flag", n));
    dm_write(n, 22'h30_0000, 32'h4);
  endtask

  // one processor per node, started by go
  bit go = 0;
  int nodes_done = 0;
  for (genvar g = 0; g < NN; g++) begin : g_proc
    initial begin
      wait (go);
      node_program(g);
      nodes_done++;
    end
  end

  // count engagements and polls that skip a node which is not ready
  logic [NN-1:0] eng_d = 0;
  always @(posedge clk_rcm) if (rst_n) begin
    eng_d <= dut.u_rcm.u_seq.engaged;
    n_engage += $countones(dut.u_rcm.u_seq.engaged & ~eng_d);
    if (dut.u_rcm.u_seq.mode == 1 && !dut.u_rcm.u_seq.busfree_s2[dut.u_rcm.u_seq.cur_node])
      n_skip_poll++;
    if (rec_wr) rec.push_back(rec_data);
  end
  always @(posedge rcm_fifo_hf) n_rcm_hf++;

  // ---------------- main sequence ----------------
  initial begin
    logic [15:0] r16;
    logic [47:0] w48;
    for (int n = 0; n < NN; n++) begin
      pm_addr[n] = 0; pm_wdata[n] = 0; pm_rd[n] = 0; pm_wr[n] = 0;
      dm_addr[n] = 0; dm_wdata[n] = 0; dm_rd[n] = 0; dm_wr[n] = 0;
      for (int a = 0; a < NRES; a++) expect_sum[n][a] = 0;
    end
    for (int s = 0; s < NSPEC; s++)
      for (int c = 0; c < NCH; c++) begin
        spec[s][c] = pol_sample_t'({$urandom, $urandom});
        for (int w = 0; w < 4; w++)
          expect_sum[c / CPN][(c % CPN) * 4 + w] += stokes_value(spec[s][c], s == NSPEC - 1, w);
      end
    repeat (4) @(posedge clk_pc);
    rst_n = 1;
    repeat (4) @(posedge clk_pc);

    // code and parameters over the program bus
    for (int n = 0; n < NN; n++) begin
      for (int d = 0; d < 3; d++) begin
        pb_page(3 * n + d);
        pb_write(13'd5, 16'(n * 16 + d));
        pb_read(13'd5, r16);
        check(r16 == 16'(n * 16 + d), "program bus read-back");
      end
      pb_page(3 * n);
      pb_write(13'h1FFF, 16'h0001);          // parameter semaphore
    end
    for (int n = 0; n < NN; n++) begin
      repeat (4) @(posedge clk_dsp);
      check(irq_param[n], $sformatf("node %0d parameter interrupt", n));
      if (irq_param[n]) n_irq_param++;
      pm_read(n, 24'd5, w48);
      check(w48 == {16'(n * 16 + 2), 16'(n * 16 + 1), 16'(n * 16)}, $sformatf("node %0d code word", n));
      pm_read(n, 24'h1FFF, w48);             // accept, clears the interrupt
      pm_write(n, 24'h1FFE, 48'hACC);        // acknowledge
    end
    repeat (6) @(posedge clk_pc);
    for (int n = 0; n < NN; n++) begin
      check(pb_int[n] && !irq_param[n], $sformatf("node %0d acknowledge", n));
      if (pb_int[n]) n_pc_ack++;
      pb_page(3 * n);
      pb_read(13'h1FFE, r16);
      check(r16 == 16'h0ACC, "acknowledge value");
    end
    @(negedge clk_pc);
    check(pb_int == 0, "acknowledges cleared");

    // a spectrum sent while the data input module is disabled goes nowhere
    for (int c = 0; c < NCH; c++) begin
      @(negedge clk_dim);
      in_valid = 1; in_sof = (c == 0); in_data = pol_sample_t'({$urandom, $urandom});
    end
    @(negedge clk_dim) in_valid = 0;
    n_disabled_spectra++;
    repeat (2 * NCH) @(posedge clk_dim);
    for (int n = 0; n < NN; n++) begin
      logic [31:0] r;
      dm_read(n, 22'h20_0000, r);
      check(r[0] == 1, $sformatf("node %0d FIFO still empty", n));
    end

    // program the collector and enable the data input module
    isa_write(20'hD8002, 16'h0000);
    isa_write(20'hD8004, 16'h0000); isa_write(20'hD8006, 16'h0000);
    isa_write(20'hD8008, 16'(NRES - 1)); isa_write(20'hD800A, 16'h0000);
    isa_write(20'hD800C, 16'hBA98); isa_write(20'hD800E, 16'hFEDC);
    isa_write(20'hD8000, 16'h0003);
    check(acquire_enable, "acquire enabled");
    repeat (4) @(posedge clk_dim);

    fork
      // front end
      begin
        for (int s = 0; s < NSPEC; s++) begin
          for (int c = 0; c < NCH; c++) begin
            @(negedge clk_dim);
            in_valid = 1; in_sof = (c == 0); in_data = spec[s][c];
            pass_through = (s == NSPEC - 1);
          end
          if (s == NSPEC - 1) n_pass_spectra++;
        end
        @(negedge clk_dim) in_valid = 0; pass_through = 0;
      end
      // processors
      begin
        go = 1;
        wait (nodes_done == NN);
      end
    join

    // the PC reads the result FIFO
    wait (rec.size() == NN * NRES * 2);
    repeat (20) @(posedge clk_rcm);
    for (int n = 0; n < NN; n++)
      for (int a = 0; a < NRES; a++) begin
        logic [15:0] lo, hi;
        isa_read(20'hD0000, lo);
        isa_read(20'hD0000, hi);
        check($signed({hi, lo}) == 32'(expect_sum[n][a]),
              $sformatf("node %0d result %0d: got %0d want %0d", n, a, $signed({hi, lo}), expect_sum[n][a]));
        check(rec[2 * (n * NRES + a)] == lo && rec[2 * (n * NRES + a) + 1] == hi, "recorder port copy");
      end
    isa_read(20'hD8010, r16);
    check(r16[12] == 1, "result FIFO empty at the end");
    check(r16[7:0] == 8'h00, "all BUS-FREE lines dropped");

    // every mechanism must have happened
    check(n_disabled_spectra == 1, "disabled spectrum");
    check(n_pass_spectra == 1, "pass-through spectrum");
    check(n_half_full == NN, "FIFO half-full on every node");
    check(n_engage == NN, "each node engaged once");
    check(n_irq_engaged == NN, "ENGAGED interrupt on every node");
    check(n_irq_param == NN, "parameter semaphore on every node");
    check(n_pc_ack == NN, "acknowledge semaphore from every node");
    check(n_skip_poll > 0, "collector polled past a node that was not ready");
    $display("mechanisms: disabled=%0d pass=%0d halffull=%0d engage=%0d irq_engaged=%0d irq_param=%0d ack=%0d skip_poll=%0d rcm_hf=%0d",
             n_disabled_spectra, n_pass_spectra, n_half_full, n_engage, n_irq_engaged, n_irq_param, n_pc_ack, n_skip_poll, n_rcm_hf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
